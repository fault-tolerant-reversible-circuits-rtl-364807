// parity_checker: single-fault detector for a parity-preserving reversible
// circuit.
//
// Every gate of a parity-preserving circuit keeps the parity of its lines, so
// the parity of all output lines equals the parity of all input lines
// (constant ancilla inputs included). A fault that inverts one line anywhere
// inside such a circuit inverts the output parity. The checker XORs both
// parities and raises err when they differ. It sits beside the circuit, not in
// its data path: the circuit's results can be used at once while they are
// checked. The checker is ordinary (irreversible) logic.
//
// Interface: in_lines (IN_W bits, every input line of the watched circuit),
// out_lines (OUT_W bits, every output line), err. Purely combinational.
// Widths are parameters; the defaults (3) fit a single 3x3 gate.
module parity_checker #(
  parameter int unsigned IN_W  = 3,
  parameter int unsigned OUT_W = 3
) (
  input  logic [IN_W-1:0]  in_lines,
  input  logic [OUT_W-1:0] out_lines,
  output logic             err
);

  always_comb err = (^in_lines) ^ (^out_lines);

endmodule
