// rg_feynman_double: Feynman double-gate (F2G), a 3-input, 3-output
// reversible gate that preserves parity.
//
// The control A is copied to P and, when A is 1, both other lines are
// inverted: P = A, Q = A xor B, R = A xor C. Two controlled NOTs that share a
// control line; inverting two lines together leaves the parity unchanged, so
// A^B^C = P^Q^R for every input. The gate is its own inverse.
//
// Interface: single-bit inputs a (control), b, c; outputs p, q, r. Purely
// combinational, no clock, zero latency.
module rg_feynman_double (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = a ^ c;
  end

endmodule
