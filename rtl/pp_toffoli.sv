// pp_toffoli: Toffoli gate (P = A, Q = B, R = AB xor C) built only from
// parity-preserving gates, so that any single inverted line inside it shows
// up as a parity mismatch between its input and output lines.
//
// Structure (three gates, five lines):
//   F2G #1  control B, targets anc[0]=0 and C  -> B, B, B^C
//   FRG     control A, data anc[1]=0 and the first B copy -> A, AB, A'B
//   F2G #2  control B^C, targets AB and A'B    -> B^C, A'B^C, AB^C
// The second B copy is output Q, AB^C is output R, and B^C and A'B^C are
// garbage outputs g[1] and g[0]. The gates and their wiring follow the
// published construction; the numbering of the ancilla and fault bits is this
// design's own.
//
// fault[i] inverts one line that runs between two gates (a test hook; tie it
// to zero in use): [0] B copy into the FRG, [1] B^C into F2G #2, [2] AB into
// F2G #2, [3] A'B into F2G #2.
//
// Interface: a, b, c operands; anc ancilla lines (drive rev_pkg::TOF_ANC,
// all zero); outputs p, q, r and garbage g. Combinational, zero latency.
module pp_toffoli
  import rev_pkg::*;
(
  input  logic                   a,
  input  logic                   b,
  input  logic                   c,
  input  logic [TOF_ANC_W-1:0]   anc,
  input  logic [TOF_FAULT_W-1:0] fault,
  output logic                   p,
  output logic                   q,
  output logic                   r,
  output logic [1:0]             g
);

  logic b_ctl, bxc, ab, anb;       // gate outputs
  logic b_ctl_f, bxc_f, ab_f, anb_f; // the same lines after the fault hook

  rg_feynman_double u_f2g_in (
    .a(b), .b(anc[0]), .c(c),
    .p(b_ctl), .q(q), .r(bxc)
  );

  assign b_ctl_f = b_ctl ^ fault[0];
  assign bxc_f   = bxc   ^ fault[1];

  rg_fredkin u_frg (
    .a(a), .b(anc[1]), .c(b_ctl_f),
    .p(p), .q(ab), .r(anb)
  );

  assign ab_f  = ab  ^ fault[2];
  assign anb_f = anb ^ fault[3];

  rg_feynman_double u_f2g_out (
    .a(bxc_f), .b(ab_f), .c(anb_f),
    .p(g[1]), .q(g[0]), .r(r)
  );

endmodule
