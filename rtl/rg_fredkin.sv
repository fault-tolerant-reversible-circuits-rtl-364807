// rg_fredkin: Fredkin gate (FRG, controlled swap), a 3-input, 3-output
// reversible gate that preserves parity.
//
// The control A is copied to P; when A is 0 the lines B and C pass straight
// through, when A is 1 they are exchanged: Q = A'B + AC, R = A'C + AB. Since
// it only reorders lines, the number of ones, and so the parity, is the same
// at input and output. The gate is its own inverse.
//
// Interface: single-bit inputs a (control), b, c; outputs p, q, r. Purely
// combinational, no clock, zero latency.
module rg_fredkin (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ? c : b;
    r = a ? b : c;
  end

endmodule
