// tb_pp_toffoli_lite: checks the Toffoli-like element.
//  - For the 8 operand values with a zero ancilla: P = A, Q = C,
//    R = AB xor C, garbage A'B xor C, and equal input/output parity.
//  - Over all 16 values of its four input lines the outputs are distinct.
//  - Each of the 2 single inter-gate faults is seen as a parity mismatch.
module tb_pp_toffoli_lite;
  import rev_pkg::*;
  logic a, b, c, p, q, r, g;
  logic [TOFL_ANC_W-1:0]   anc;
  logic [TOFL_FAULT_W-1:0] fault;
  logic [15:0] seen;
  int checks = 0, failures = 0;

  pp_toffoli_lite dut (.a, .b, .c, .anc, .fault, .p, .q, .r, .g);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%b b=%b c=%b anc=%b fault=%b -> %b%b%b g=%b",
               what, a, b, c, anc, fault, p, q, r, g);
    end
  endtask

  function automatic bit par_ok();
    return (a ^ b ^ c ^ (^anc)) == (p ^ q ^ r ^ g);
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault = '0;
    anc   = TOFL_ANC;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      check(p == a && q == c && r == ((a & b) ^ c), "function");
      check(g == ((~a & b) ^ c), "garbage");
      check(par_ok(), "parity");
    end
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, anc} = 4'(i);
      #1;
      check(par_ok(), "parity (any ancilla)");
      seen[{p, q, r, g}] = 1'b1;
    end
    check(seen == '1, "reversible");
    anc = TOFL_ANC;
    for (int f = 0; f < TOFL_FAULT_W; f++) begin
      for (int i = 0; i < 8; i++) begin
        {a, b, c} = 3'(i);
        fault = TOFL_FAULT_W'(1) << f;
        #1;
        check(!par_ok(), "single fault detected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
