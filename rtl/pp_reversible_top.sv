// pp_reversible_top: the parity-preserving reversible circuits side by side,
// each with its own parity checker.
//
// Four independent circuits are instantiated, each driven with the constant
// ancilla values it is designed for:
//   tof_*  : Toffoli gate from one FRG and two F2G        (pp_toffoli)
//   tofl_* : Toffoli-like element from one FRG and one F2G (pp_toffoli_lite)
//   fa_*   : Fredkin-gate full adder with parity fix      (pp_fredkin_adder)
//   pa_*   : two-Peres-gate full adder, parity-preserving  (pp_peres_adder)
// Next to each, a parity_checker compares the parity of every input line
// (operands and ancillas) with that of every output line (results and
// garbage) and raises *_err on a mismatch, which flags any single inverted
// line inside a circuit built only of parity-preserving gates. The checkers
// are off the data path: results are available as soon as they settle.
//
// The *_fault vectors reach the fault-injection hooks of each circuit (bit
// meanings are given in the circuit modules); tie them to zero in use.
// Everything is combinational; there is no clock and no latency.
module pp_reversible_top
  import rev_pkg::*;
(
  // Parity-preserving Toffoli
  input  logic                    tof_a, tof_b, tof_c,
  input  logic [TOF_FAULT_W-1:0]  tof_fault,
  output logic                    tof_p, tof_q, tof_r,
  output logic [1:0]              tof_g,
  output logic                    tof_err,
  // Toffoli-like element
  input  logic                    tofl_a, tofl_b, tofl_c,
  input  logic [TOFL_FAULT_W-1:0] tofl_fault,
  output logic                    tofl_p, tofl_q, tofl_r, tofl_g,
  output logic                    tofl_err,
  // Fredkin-gate full adder
  input  logic                    fa_a, fa_b, fa_c,
  input  logic [FA_FAULT_W-1:0]   fa_fault,
  output logic                    fa_sum, fa_cout,
  output logic [3:0]              fa_garb,   // {B, G^B, A, s'}
  output logic                    fa_err,
  // Peres-style full adder
  input  logic                    pa_a, pa_b, pa_c,
  input  logic [PA_FAULT_W-1:0]   pa_fault,
  output logic                    pa_sum, pa_cout,
  output logic [PA_GARB_W+1:0]    pa_garb,   // {A, C, garbage}
  output logic                    pa_err
);

  // Toffoli
  pp_toffoli u_tof (
    .a(tof_a), .b(tof_b), .c(tof_c), .anc(TOF_ANC), .fault(tof_fault),
    .p(tof_p), .q(tof_q), .r(tof_r), .g(tof_g)
  );
  parity_checker #(.IN_W(3 + TOF_ANC_W), .OUT_W(5)) u_chk_tof (
    .in_lines ({tof_a, tof_b, tof_c, TOF_ANC}),
    .out_lines({tof_p, tof_q, tof_r, tof_g}),
    .err      (tof_err)
  );

  // Toffoli-like element
  pp_toffoli_lite u_tofl (
    .a(tofl_a), .b(tofl_b), .c(tofl_c), .anc(TOFL_ANC), .fault(tofl_fault),
    .p(tofl_p), .q(tofl_q), .r(tofl_r), .g(tofl_g)
  );
  parity_checker #(.IN_W(3 + TOFL_ANC_W), .OUT_W(4)) u_chk_tofl (
    .in_lines ({tofl_a, tofl_b, tofl_c, TOFL_ANC}),
    .out_lines({tofl_p, tofl_q, tofl_r, tofl_g}),
    .err      (tofl_err)
  );

  // Fredkin-gate full adder
  pp_fredkin_adder u_fa (
    .a(fa_a), .b(fa_b), .c(fa_c), .anc(FA_ANC), .fault(fa_fault),
    .sum(fa_sum), .cout(fa_cout),
    .b_o(fa_garb[3]), .g(fa_garb[2]), .a_o(fa_garb[1]), .sum_n(fa_garb[0])
  );
  parity_checker #(.IN_W(3 + FA_ANC_W), .OUT_W(6)) u_chk_fa (
    .in_lines ({fa_a, fa_b, fa_c, FA_ANC}),
    .out_lines({fa_sum, fa_cout, fa_garb}),
    .err      (fa_err)
  );

  // Peres-style full adder
  pp_peres_adder u_pa (
    .a(pa_a), .b(pa_b), .c(pa_c), .anc(PA_ANC), .fault(pa_fault),
    .sum(pa_sum), .cout(pa_cout),
    .a_o(pa_garb[PA_GARB_W+1]), .c_o(pa_garb[PA_GARB_W]),
    .garb(pa_garb[PA_GARB_W-1:0])
  );
  parity_checker #(.IN_W(3 + PA_ANC_W), .OUT_W(PA_GARB_W + 4)) u_chk_pa (
    .in_lines ({pa_a, pa_b, pa_c, PA_ANC}),
    .out_lines({pa_sum, pa_cout, pa_garb}),
    .err      (pa_err)
  );

endmodule
