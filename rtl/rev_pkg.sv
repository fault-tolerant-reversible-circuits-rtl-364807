// rev_pkg: constants shared by the parity-preserving reversible circuits.
//
// A reversible circuit has as many output lines as input lines. Lines that
// carry no operand ("ancilla" inputs) must be driven with fixed constants for
// the circuit to compute its function; the values below are those the
// circuits are drawn with (a 0 on every extra Toffoli/F2G line, and 0,1,0 on
// the three extra lines of the Fredkin-gate full adder). The widths of the
// fault-injection vectors, one bit per line that runs between two gates
// inside a circuit, are also kept here so that the top level and the
// testbenches agree on them. The fault vectors are a test hook of this
// design, not part of the circuits as drawn; they are tied to zero in use.
package rev_pkg;

  // Parity-preserving Toffoli (one FRG, two F2G): two constant-0 lines.
  localparam int unsigned TOF_ANC_W   = 2;
  localparam logic [TOF_ANC_W-1:0] TOF_ANC = '0;
  localparam int unsigned TOF_FAULT_W = 4;

  // Toffoli-like element (one FRG, one F2G): one constant-0 line.
  localparam int unsigned TOFL_ANC_W   = 1;
  localparam logic [TOFL_ANC_W-1:0] TOFL_ANC = '0;
  localparam int unsigned TOFL_FAULT_W = 2;

  // Fredkin-gate full adder: lines 3, 5 and 6 carry 0, 1, 0.
  // Bit 2 is line 3, bit 1 line 5, bit 0 line 6.
  localparam int unsigned FA_ANC_W   = 3;
  localparam logic [FA_ANC_W-1:0] FA_ANC = 3'b010;
  localparam int unsigned FA_FAULT_W = 14;

  // Peres-style full adder with parity-preserving Toffoli parts: 7 zeros.
  localparam int unsigned PA_ANC_W   = 7;
  localparam logic [PA_ANC_W-1:0] PA_ANC = '0;
  localparam int unsigned PA_GARB_W  = 6;
  localparam int unsigned PA_FAULT_W = 6 + 2 * TOF_FAULT_W;

endpackage
