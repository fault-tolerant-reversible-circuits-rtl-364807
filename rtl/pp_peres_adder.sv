// pp_peres_adder: one-bit full adder in the form of two Peres gates, each
// Peres gate being a Toffoli gate followed by a Feynman gate, rebuilt from
// parity-preserving parts so that every single-line fault inside it changes
// the output parity.
//
// The reference circuit works on lines A, B, 0, C:
//   Peres #1: Toffoli(A, B; 0) -> AB on line 3, then Feynman(A; B) -> A^B.
//   Peres #2: Toffoli(A^B, C; AB) -> AB ^ (A^B)C = carry on line 3,
//             then Feynman(C; A^B) -> A^B^C = sum on line 2.
// Here each Toffoli is the parity-preserving pp_toffoli (one FRG, two F2G),
// and each Feynman gate is an F2G whose second target is a constant 0, so it
// also emits a copy of its control as garbage. The Toffoli substitution
// follows the published method; using an F2G in place of each Feynman gate is
// this design's own choice, made because a plain Feynman gate does not keep
// the parity. The circuit takes 3 operands and 7 constant-0 lines and gives
// 4 useful lines (A, sum, carry, C) and 6 garbage lines.
//
// fault[i] inverts one line between two gates (a test hook; tie to zero in
// use): [0] A and [1] B from Toffoli #1 into the first F2G, [2] AB into
// Toffoli #2, [3] A^B into Toffoli #2, [4] A^B and [5] C from Toffoli #2 into
// the last F2G; [9:6] and [13:10] are the internal fault bits of Toffoli #1
// and #2.
//
// Interface: a, b, c operands; anc (drive rev_pkg::PA_ANC, all zero);
// outputs sum, cout, a_o (= A), c_o (= C) and garb. Combinational, zero
// latency.
module pp_peres_adder
  import rev_pkg::*;
(
  input  logic                  a,
  input  logic                  b,
  input  logic                  c,
  input  logic [PA_ANC_W-1:0]   anc,
  input  logic [PA_FAULT_W-1:0] fault,
  output logic                  sum,
  output logic                  cout,
  output logic                  a_o,
  output logic                  c_o,
  output logic [PA_GARB_W-1:0]  garb
);

  logic t1_p, t1_q, t1_r;  // Toffoli #1: A, B, AB
  logic axb;               // first F2G: A^B
  logic t2_p, t2_q;        // Toffoli #2: A^B, C

  pp_toffoli u_tof1 (
    .a(a), .b(b), .c(anc[0]), .anc(anc[2:1]),
    .fault(fault[6 +: TOF_FAULT_W]),
    .p(t1_p), .q(t1_q), .r(t1_r), .g(garb[5:4])
  );

  rg_feynman_double u_f2g1 (
    .a(t1_p ^ fault[0]), .b(t1_q ^ fault[1]), .c(anc[3]),
    .p(a_o), .q(axb), .r(garb[3])
  );

  pp_toffoli u_tof2 (
    .a(axb ^ fault[3]), .b(c), .c(t1_r ^ fault[2]), .anc(anc[5:4]),
    .fault(fault[6 + TOF_FAULT_W +: TOF_FAULT_W]),
    .p(t2_p), .q(t2_q), .r(cout), .g(garb[2:1])
  );

  rg_feynman_double u_f2g2 (
    .a(t2_q ^ fault[5]), .b(t2_p ^ fault[4]), .c(anc[6]),
    .p(c_o), .q(sum), .r(garb[0])
  );

endmodule
