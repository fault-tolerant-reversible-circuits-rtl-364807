// rg_feynman: Feynman gate (controlled NOT), a 2-input, 2-output reversible
// gate.
//
// The control input A is copied to P, and the target B is inverted when A is
// 1: P = A, Q = A xor B. The gate is its own inverse. It is not
// parity-preserving (input parity A^B, output parity B), so the parity-
// preserving circuits use it only where the drawings call for it: to fan out
// an operand in the Fredkin-gate full adder and to restore that adder's
// output parity.
//
// Interface: single-bit inputs a, b; outputs p, q. Purely combinational, no
// clock, zero latency.
module rg_feynman (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
