// tb_pp_fredkin_adder: checks the Fredkin-gate full adder with its
// parity-restoring Feynman gate.
//  - For the 8 operand values with ancillas 0,1,0: sum and carry against
//    integer addition, garbage lines against their formulas (B, G xor B, A,
//    sum'), and equal input/output parity.
//  - Over all 64 values of its six input lines: distinct outputs (the
//    circuit is a permutation), and equal parity whenever the ancilla on
//    line 3 is 0. The closing gate's control then carries B itself, so it
//    cancels the B the stage-1 Feynman gate added; lines 5 and 6 only enter
//    Fredkin gates and may hold anything.
//  - Each of the 14 single inter-gate faults for every operand value. The
//    closing Feynman gate undoes the parity change of whatever its control
//    line carries, so the three faults on the copy of B that ends on that
//    control line (bits 2, 9, 12) must escape the parity check, and their
//    effect on sum and carry is checked; every other single fault must be
//    detected.
module tb_pp_fredkin_adder;
  import rev_pkg::*;
  localparam logic [FA_FAULT_W-1:0] UNDETECTABLE =
      (FA_FAULT_W'(1) << 2) | (FA_FAULT_W'(1) << 9) | (FA_FAULT_W'(1) << 12);

  logic a, b, c, sum, cout, b_o, g, a_o, sum_n;
  logic [FA_ANC_W-1:0]   anc;
  logic [FA_FAULT_W-1:0] fault;
  logic [63:0] seen;
  int checks = 0, failures = 0, detected = 0, escaped = 0;

  pp_fredkin_adder dut (.a, .b, .c, .anc, .fault, .sum, .cout, .b_o, .g,
                        .a_o, .sum_n);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%b b=%b c=%b anc=%b fault=%b -> s=%b co=%b %b%b%b%b",
               what, a, b, c, anc, fault, sum, cout, b_o, g, a_o, sum_n);
    end
  endtask

  function automatic bit par_ok();
    return (a ^ b ^ c ^ (^anc)) == (sum ^ cout ^ b_o ^ g ^ a_o ^ sum_n);
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] total;
    logic       gexp;
    fault = '0;
    anc   = FA_ANC;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      total = 2'(a) + 2'(b) + 2'(c);
      // G = A'C when B = 0, A' + C when B = 1
      gexp  = b ? (~a | c) : (~a & c);
      #1;
      check({cout, sum} == total, "sum/carry");
      check(b_o == b && a_o == a && sum_n == ~sum && g == (gexp ^ b), "garbage");
      check(par_ok(), "parity");
    end
    seen = '0;
    for (int i = 0; i < 64; i++) begin
      {a, b, c, anc} = 6'(i);
      #1;
      if (anc[2] == 1'b0) check(par_ok(), "parity (line 3 = 0)");
      else check(!par_ok(), "parity off by one (line 3 = 1)");
      seen[{sum, cout, b_o, g, a_o, sum_n}] = 1'b1;
    end
    check(seen == '1, "reversible");
    anc = FA_ANC;
    for (int f = 0; f < FA_FAULT_W; f++) begin
      for (int i = 0; i < 8; i++) begin
        {a, b, c} = 3'(i);
        fault = FA_FAULT_W'(1) << f;
        #1;
        if (UNDETECTABLE[f]) begin
          check(par_ok(), "fault on closing-gate control escapes parity");
          escaped++;
          total = 2'(a) + 2'(b) + 2'(c);
          gexp  = b ? (~a | c) : (~a & c);
          // What the escaping fault does to the result: bit 2 feeds B' to
          // the sum stage, bit 9 swaps carry and G, bit 12 only hits garbage.
          case (f)
            2:       check(sum == ~(a ^ b ^ c), "bit 2 inverts the sum");
            9:       check(sum == total[0] && cout == gexp, "bit 9 puts G on the carry");
            default: check({cout, sum} == total, "bit 12 leaves the result");
          endcase
        end else begin
          check(!par_ok(), "single fault detected");
          detected++;
        end
      end
    end
    $display("faults detected=%0d escaped=%0d", detected, escaped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
