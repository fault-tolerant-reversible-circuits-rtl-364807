// tb_pp_toffoli: checks the parity-preserving Toffoli construction.
//  - For the 8 operand values with zero ancillas: P = A, Q = B,
//    R = AB xor C, garbage B xor C and A'B xor C, and equal input/output
//    parity.
//  - Over all 32 values of its five input lines (ancillas included) the
//    outputs are all distinct, i.e. the circuit is reversible.
//  - Each of the 4 single inter-gate faults, for every operand value,
//    leaves the output parity different from the input parity.
module tb_pp_toffoli;
  import rev_pkg::*;
  logic a, b, c, p, q, r;
  logic [TOF_ANC_W-1:0]   anc;
  logic [TOF_FAULT_W-1:0] fault;
  logic [1:0] g;
  logic [31:0] seen;
  int checks = 0, failures = 0;

  pp_toffoli dut (.a, .b, .c, .anc, .fault, .p, .q, .r, .g);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%b b=%b c=%b anc=%b fault=%b -> %b%b%b g=%b",
               what, a, b, c, anc, fault, p, q, r, g);
    end
  endtask

  function automatic bit par_ok();
    return (a ^ b ^ c ^ (^anc)) == (p ^ q ^ r ^ (^g));
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault = '0;
    anc   = TOF_ANC;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      check(p == a && q == b && r == ((a & b) ^ c), "toffoli function");
      check(g == {b ^ c, (~a & b) ^ c}, "garbage");
      check(par_ok(), "parity");
    end
    seen = '0;
    for (int i = 0; i < 32; i++) begin
      {a, b, c, anc} = 5'(i);
      #1;
      check(par_ok(), "parity (any ancilla)");
      seen[{p, q, r, g}] = 1'b1;
    end
    check(seen == '1, "reversible");
    anc = TOF_ANC;
    for (int f = 0; f < TOF_FAULT_W; f++) begin
      for (int i = 0; i < 8; i++) begin
        {a, b, c} = 3'(i);
        fault = TOF_FAULT_W'(1) << f;
        #1;
        check(!par_ok(), "single fault detected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
