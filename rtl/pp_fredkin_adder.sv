// pp_fredkin_adder: one-bit full adder made of Fredkin gates, with an extra
// Feynman gate that makes its output parity equal to its input parity.
//
// Six lines, top to bottom A, B, anc[2]=0, C, anc[1]=1, anc[0]=0, pass three
// gate stages:
//   stage 1: Feynman(B, 0) fans B out to lines 2 and 3;
//            FRG(C; 1, 0) gives C, C', C on lines 4..6.
//            Lines 3 and 4 then cross.
//   stage 2: FRG(A; B, C) on lines 1..3, FRG(B; C', C) on lines 4..6, which
//            gives (B^C)' and B^C. Lines 1 and 4 then cross.
//   stage 3: FRG(B; ...) on lines 1..3 gives B, Cout, G;
//            FRG(A; (B^C)', B^C) on lines 4..6 gives A, s', s.
// The Feynman fan-out in stage 1 adds B to the line parity, so the plain
// three-stage circuit ends with parity(in) ^ B. A final Feynman gate with B
// as control and G as target (giving G^B) cancels that term. Gates, wiring
// and the closing Feynman gate follow the published circuit; ancilla, fault
// and port naming are this design's own.
//
// Both Feynman gates are not parity-preserving by themselves, and the last
// one undoes the parity change of whatever value its control line carries.
// A single fault that inverts the B copy leaving the stage-1 Feynman target
// (fault[2]), the same value leaving stage 2 (fault[9]) or the control line
// of the closing gate (fault[12]) therefore leaves the output parity
// unchanged. The first inverts the sum, the second exchanges the carry with
// G, the third only changes garbage. Every other single-line fault inverts
// the output parity.
//
// fault[i] inverts one inter-gate line (a test hook; tie to zero in use):
// [5:0] the six lines after stage 1, bit 0 = line 1, before the crossing;
// [11:6] the six lines after stage 2, likewise; [12] the B line and [13] the
// G line entering the closing Feynman gate.
//
// Interface: a, b, c operands; anc (drive rev_pkg::FA_ANC = 3'b010);
// outputs sum, cout and the garbage lines b_o (= B), g (= G^B), a_o (= A),
// sum_n (= s'). Combinational, zero latency.
module pp_fredkin_adder
  import rev_pkg::*;
(
  input  logic                  a,
  input  logic                  b,
  input  logic                  c,
  input  logic [FA_ANC_W-1:0]   anc,
  input  logic [FA_FAULT_W-1:0] fault,
  output logic                  sum,
  output logic                  cout,
  output logic                  b_o,
  output logic                  g,
  output logic                  a_o,
  output logic                  sum_n
);

  logic [6:1] s1, s1f;  // lines after stage 1, raw and with fault hook
  logic [6:1] s2, s2f;  // lines after stage 2
  logic       u_b, u_g; // stage-3 outputs entering the closing gate

  // Stage 1
  assign s1[1] = a;
  rg_feynman u_fg_fan (.a(b), .b(anc[2]), .p(s1[2]), .q(s1[3]));
  rg_fredkin u_frg_c  (.a(c), .b(anc[1]), .c(anc[0]),
                       .p(s1[4]), .q(s1[5]), .r(s1[6]));
  assign s1f = s1 ^ fault[5:0];

  // Stage 2 (lines 3 and 4 crossed)
  rg_fredkin u_frg_2t (.a(s1f[1]), .b(s1f[2]), .c(s1f[4]),
                       .p(s2[1]), .q(s2[2]), .r(s2[3]));
  rg_fredkin u_frg_2b (.a(s1f[3]), .b(s1f[5]), .c(s1f[6]),
                       .p(s2[4]), .q(s2[5]), .r(s2[6]));
  assign s2f = s2 ^ fault[11:6];

  // Stage 3 (lines 1 and 4 crossed)
  rg_fredkin u_frg_3t (.a(s2f[4]), .b(s2f[2]), .c(s2f[3]),
                       .p(u_b), .q(cout), .r(u_g));
  rg_fredkin u_frg_3b (.a(s2f[1]), .b(s2f[5]), .c(s2f[6]),
                       .p(a_o), .q(sum_n), .r(sum));

  // Parity-restoring Feynman gate
  rg_feynman u_fg_fix (.a(u_b ^ fault[12]), .b(u_g ^ fault[13]),
                       .p(b_o), .q(g));

endmodule
