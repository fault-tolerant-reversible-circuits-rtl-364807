// pp_toffoli_lite: a smaller, parity-preserving stand-in for a Toffoli gate
// that gives up the Q = B output. It produces P = A and R = AB xor C, passes
// C through as Q, and leaves A'B xor C as garbage. It can replace a Toffoli
// gate wherever the B line is not needed after the gate.
//
// Structure (two gates, four lines):
//   FRG  control A, data anc[0]=0 and B -> A, AB, A'B
//   F2G  control C, targets AB and A'B  -> C, AB^C, A'B^C
// The gates and wiring follow the published construction; the ancilla and
// fault numbering is this design's own.
//
// fault[i] inverts one line between the two gates (a test hook; tie to zero
// in use): [0] AB, [1] A'B.
//
// Interface: a, b, c operands; anc (drive rev_pkg::TOFL_ANC, zero); outputs
// p, q (= C), r, g. Combinational, zero latency.
module pp_toffoli_lite
  import rev_pkg::*;
(
  input  logic                    a,
  input  logic                    b,
  input  logic                    c,
  input  logic [TOFL_ANC_W-1:0]   anc,
  input  logic [TOFL_FAULT_W-1:0] fault,
  output logic                    p,
  output logic                    q,
  output logic                    r,
  output logic                    g
);

  logic ab, anb;

  rg_fredkin u_frg (
    .a(a), .b(anc[0]), .c(b),
    .p(p), .q(ab), .r(anb)
  );

  rg_feynman_double u_f2g (
    .a(c), .b(ab ^ fault[0]), .c(anb ^ fault[1]),
    .p(q), .q(r), .r(g)
  );

endmodule
