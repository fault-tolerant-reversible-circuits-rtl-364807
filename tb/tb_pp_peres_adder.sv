// tb_pp_peres_adder: checks the parity-preserving two-Peres-gate full adder.
//  - For the 8 operand values with zero ancillas: sum and carry against
//    integer addition, A and C passed through, and equal input/output
//    parity.
//  - Over all 1024 values of its ten input lines: equal parity and distinct
//    outputs (the circuit is a permutation).
//  - Every one of the 14 single inter-gate faults, for every operand value,
//    is seen as a parity mismatch.
module tb_pp_peres_adder;
  import rev_pkg::*;
  logic a, b, c, sum, cout, a_o, c_o;
  logic [PA_ANC_W-1:0]   anc;
  logic [PA_FAULT_W-1:0] fault;
  logic [PA_GARB_W-1:0]  garb;
  logic [1023:0] seen;
  int checks = 0, failures = 0;

  pp_peres_adder dut (.a, .b, .c, .anc, .fault, .sum, .cout, .a_o, .c_o, .garb);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%b b=%b c=%b anc=%b fault=%b -> s=%b co=%b a=%b c=%b g=%b",
               what, a, b, c, anc, fault, sum, cout, a_o, c_o, garb);
    end
  endtask

  function automatic bit par_ok();
    return (a ^ b ^ c ^ (^anc)) == (sum ^ cout ^ a_o ^ c_o ^ (^garb));
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] total;
    fault = '0;
    anc   = PA_ANC;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      total = 2'(a) + 2'(b) + 2'(c);
      #1;
      check({cout, sum} == total, "sum/carry");
      check(a_o == a && c_o == c, "pass-through lines");
      check(par_ok(), "parity");
    end
    seen = '0;
    for (int i = 0; i < 1024; i++) begin
      {a, b, c, anc} = 10'(i);
      #1;
      check(par_ok(), "parity (any ancilla)");
      seen[{sum, cout, a_o, c_o, garb}] = 1'b1;
    end
    check(seen == '1, "reversible");
    anc = PA_ANC;
    for (int f = 0; f < PA_FAULT_W; f++) begin
      for (int i = 0; i < 8; i++) begin
        {a, b, c} = 3'(i);
        fault = PA_FAULT_W'(1) << f;
        #1;
        check(!par_ok(), "single fault detected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
