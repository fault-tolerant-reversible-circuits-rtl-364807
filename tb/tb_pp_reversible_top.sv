// tb_pp_reversible_top: end-to-end test of all four parity-preserving
// circuits and their parity checkers, at the design's only configuration.
//
// For every operand value it checks each circuit's function (Toffoli,
// Toffoli-like element, both full adders against integer addition) with no
// fault, and that no checker fires. It then injects every single inter-gate
// fault of every circuit and checks the matching err flag: raised, except for
// the three faults of the Fredkin-gate adder that sit on the copy of B ending
// on its closing Feynman gate's control. Finally it injects pairs of faults,
// which cancel in the parity and must go unflagged. Each mechanism, when observed (clean
// operation, fault flagged, fault escaping through the closing Feynman gate,
// compensating fault pair), is counted, and one that never happened counts as
// a failure.
module tb_pp_reversible_top;
  import rev_pkg::*;

  logic                    tof_a, tof_b, tof_c, tof_p, tof_q, tof_r, tof_err;
  logic [TOF_FAULT_W-1:0]  tof_fault;
  logic [1:0]              tof_g;
  logic                    tofl_a, tofl_b, tofl_c, tofl_p, tofl_q, tofl_r, tofl_g, tofl_err;
  logic [TOFL_FAULT_W-1:0] tofl_fault;
  logic                    fa_a, fa_b, fa_c, fa_sum, fa_cout, fa_err;
  logic [FA_FAULT_W-1:0]   fa_fault;
  logic [3:0]              fa_garb;
  logic                    pa_a, pa_b, pa_c, pa_sum, pa_cout, pa_err;
  logic [PA_FAULT_W-1:0]   pa_fault;
  logic [PA_GARB_W+1:0]    pa_garb;

  pp_reversible_top dut (.*);

  localparam logic [FA_FAULT_W-1:0] FA_ESCAPES =
      (FA_FAULT_W'(1) << 2) | (FA_FAULT_W'(1) << 9) | (FA_FAULT_W'(1) << 12);

  int checks = 0, failures = 0;
  int n_clean = 0, n_flagged = 0, n_escaped = 0, n_pairs = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: tof=%b%b%b/%b fa=%b%b/%b pa=%b%b/%b tf=%b ff=%b pf=%b",
               what, tof_a, tof_b, tof_c, tof_err, fa_a, fa_b, fa_c, fa_err,
               pa_a, pa_b, pa_c, pa_err, tof_fault, fa_fault, pa_fault);
    end
  endtask

  task automatic set_operands(input logic [2:0] v);
    {tof_a, tof_b, tof_c}    = v;
    {tofl_a, tofl_b, tofl_c} = v;
    {fa_a, fa_b, fa_c}       = v;
    {pa_a, pa_b, pa_c}       = v;
  endtask

  task automatic clear_faults();
    tof_fault = '0; tofl_fault = '0; fa_fault = '0; pa_fault = '0;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] total;
    clear_faults();

    // Fault-free operation
    for (int i = 0; i < 8; i++) begin
      set_operands(3'(i));
      total = 2'(i[2]) + 2'(i[1]) + 2'(i[0]);
      #1;
      check(tof_p == tof_a && tof_q == tof_b && tof_r == ((tof_a & tof_b) ^ tof_c),
            "toffoli");
      check(tofl_p == tofl_a && tofl_q == tofl_c && tofl_r == ((tofl_a & tofl_b) ^ tofl_c),
            "toffoli-like");
      check({fa_cout, fa_sum} == total, "fredkin adder");
      check({pa_cout, pa_sum} == total, "peres adder");
      check({tof_err, tofl_err, fa_err, pa_err} == 4'b0, "no false alarm");
      if ({tof_err, tofl_err, fa_err, pa_err} == 4'b0 && {fa_cout, fa_sum} == total) n_clean++;
    end

    // Single faults, one circuit at a time
    for (int i = 0; i < 8; i++) begin
      set_operands(3'(i));
      for (int f = 0; f < TOF_FAULT_W; f++) begin
        clear_faults(); tof_fault = TOF_FAULT_W'(1) << f; #1;
        check(tof_err && !tofl_err && !fa_err && !pa_err, "toffoli fault flagged");
        if (tof_err) n_flagged++;
      end
      for (int f = 0; f < TOFL_FAULT_W; f++) begin
        clear_faults(); tofl_fault = TOFL_FAULT_W'(1) << f; #1;
        check(tofl_err && !tof_err && !fa_err && !pa_err, "toffoli-like fault flagged");
        if (tofl_err) n_flagged++;
      end
      for (int f = 0; f < FA_FAULT_W; f++) begin
        clear_faults(); fa_fault = FA_FAULT_W'(1) << f; #1;
        if (FA_ESCAPES[f]) begin
          check(!fa_err, "fault on closing-gate control escapes");
          if (!fa_err) n_escaped++;
        end else begin
          check(fa_err, "fredkin adder fault flagged");
          if (fa_err) n_flagged++;
        end
      end
      for (int f = 0; f < PA_FAULT_W; f++) begin
        clear_faults(); pa_fault = PA_FAULT_W'(1) << f; #1;
        check(pa_err && !tof_err && !tofl_err && !fa_err, "peres adder fault flagged");
        if (pa_err) n_flagged++;
      end
    end

    // Two faults in one parity-preserving circuit compensate each other
    for (int i = 0; i < 8; i++) begin
      set_operands(3'(i));
      for (int f1 = 0; f1 < PA_FAULT_W; f1++) begin
        for (int f2 = f1 + 1; f2 < PA_FAULT_W; f2++) begin
          clear_faults();
          pa_fault = (PA_FAULT_W'(1) << f1) | (PA_FAULT_W'(1) << f2);
          #1;
          check(!pa_err, "fault pair compensates");
          if (!pa_err) n_pairs++;
        end
      end
    end
    clear_faults();

    $display("mechanisms: clean=%0d flagged=%0d escaped=%0d compensating_pairs=%0d",
             n_clean, n_flagged, n_escaped, n_pairs);
    checks++; if (n_clean   == 0) failures++;
    checks++; if (n_flagged == 0) failures++;
    checks++; if (n_escaped == 0) failures++;
    checks++; if (n_pairs   == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
