# Parity-preserving reversible circuits with single-fault detection

A reversible circuit computes a permutation of its input values: it has as
many output lines as input lines, and the inputs can always be recovered from
the outputs. Reversible logic forbids fan-out and feedback, so the usual way of
making logic fault-tolerant (duplicate it and compare) is expensive here.

This design uses a different route. It builds every circuit from reversible
gates that **preserve parity**: for each gate, the XOR of its output lines
equals the XOR of its input lines. If every gate does this, so does the whole
circuit. A fault that inverts any single line inside the circuit then inverts
the output parity. One parity comparison between the input lines and the
output lines, placed beside the circuit and not in its data path, detects the
fault. No gate in the data path is duplicated and nothing in it waits for the
check.

The RTL models the gates and circuits as combinational logic. There is no
clock, no reset and no latency anywhere in the design.

## The gate set

Three gates are used. Each is its own inverse.

| Gate | Module | Function | Parity-preserving |
|---|---|---|---|
| Feynman (controlled NOT), FG | `rg_feynman` | P = A, Q = A^B | no |
| Feynman double-gate, F2G | `rg_feynman_double` | P = A, Q = A^B, R = A^C | yes |
| Fredkin (controlled swap), FRG | `rg_fredkin` | P = A; B and C swapped when A = 1 | yes |

The F2G keeps parity because it inverts two lines at once, or none. The FRG
keeps parity because it only reorders lines. Two-line gates cannot be useful
here: the only parity-preserving 2x2 permutations pass both lines through,
swap them, or invert both. Among 3x3 gates that pass their first input
straight through, the F2G and the FRG are, up to relabelling and inverting
outputs, the only parity-preserving ones. The plain Feynman gate is not
parity-preserving. It appears only where one of the circuits below needs it.

## The circuits

### Toffoli gate from parity-preserving gates (`pp_toffoli`)

The Toffoli gate (P = A, Q = B, R = AB^C) is the usual building block of
reversible synthesis, but it is not parity-preserving. `pp_toffoli` builds it
from three parity-preserving gates and two constant-0 lines:

```
F2G #1 : control B, targets 0 and C   -> B, B, B^C
FRG    : control A, data 0 and B      -> A, AB, A'B
F2G #2 : control B^C, targets AB, A'B -> B^C, A'B^C, AB^C
```

Outputs: P = A, Q = B (second copy from F2G #1) and R = AB^C. The lines B^C
and A'B^C are garbage. A circuit written with Toffoli gates becomes
parity-preserving when this block replaces each Toffoli gate and
parity-preserving gates replace its other gates.

### Toffoli-like element (`pp_toffoli_lite`)

If the B line is not needed after the gate, two gates are enough. FRG(A; 0, B)
gives A, AB and A'B. Then F2G(C; AB, A'B) gives C, AB^C and A'B^C. The outputs
are P = A, Q = C, R = AB^C, plus one garbage line.

### Full adder from Fredkin gates, with parity fix (`pp_fredkin_adder`)

This is a known full adder built from five Fredkin gates and one Feynman gate,
on six lines `A, B, 0, C, 1, 0`:

```
stage 1: FG(B; 0) -> B, B        FRG(C; 1, 0) -> C, C', C     lines 3,4 cross
stage 2: FRG(A; B, C)            FRG(B; C', C) -> B, (B^C)', B^C   lines 1,4 cross
stage 3: FRG(B; ..) -> B, Cout, G   FRG(A; (B^C)', B^C) -> A, s', s
```

The stage-1 Feynman gate adds B to the line parity, so the circuit on its own
ends with parity(in) ^ B. A second Feynman gate, with B as control and G as
target (G becomes G^B), adds B again and cancels it. With fault-free operation
and line 3 at 0, output parity then equals input parity.

**Limit of this fix.** Both Feynman gates are still not parity-preserving. The
closing gate cancels the parity of whatever value reaches its control line,
and that value is the copy of B made in stage 1. If one of the lines carrying
that copy is inverted, the closing gate cancels the inversion as well, and
the output parity does not change. There are three such places: the stage-1
Feynman target (fault bit 2), the same value after stage 2 (bit 9) and the
closing gate's control (bit 12). Bit 2 inverts the sum and bit 9 puts G on
the carry output, so these two faults give wrong results that nothing flags.
Bit 12 only changes garbage lines. The other 11 inter-gate lines are
covered. The testbenches check this exactly: 11 lines flagged, 3 lines
escape. If full single-fault coverage is needed, use `pp_peres_adder`.

### Full adder from two Peres gates, parity-preserving (`pp_peres_adder`)

The reference circuit uses two Peres gates (a Peres gate is a Toffoli gate
followed by a Feynman gate) on lines `A, B, 0, C`. It yields A,
sum = A^B^C, carry = AB^BC^CA, and C. Here each Toffoli is a `pp_toffoli`. Each
Feynman part is an F2G whose second target is a constant 0, and which emits a
copy of its control as garbage. Every gate is then parity-preserving, and all
14 inter-gate lines are covered. The cost is 8 gates (2 FRG, 6 F2G), 7
constant-0 lines and 6 garbage lines.

| Circuit | Gates | Constant lines | Garbage lines | Single-line faults flagged |
|---|---|---|---|---|
| `pp_toffoli` | 1 FRG, 2 F2G | 2 | 2 | 4 of 4 |
| `pp_toffoli_lite` | 1 FRG, 1 F2G | 1 | 1 (and B lost) | 2 of 2 |
| `pp_fredkin_adder` | 5 FRG, 2 FG | 3 (0, 1, 0) | 4 (B, G^B, A, s') | 11 of 14 |
| `pp_peres_adder` | 2 FRG, 6 F2G | 7 | 6 (plus A and C) | 14 of 14 |

## Checking and fault injection

`parity_checker` XORs all input lines of a circuit, constant lines included,
with all of its output lines, garbage included. It raises `err` on a
mismatch. It is ordinary irreversible logic, sized by `IN_W` and `OUT_W`.

Every composite circuit has a `fault` input with one bit per line that runs
between two of its gates. A 1 inverts that line. This is a test hook of this
design for demonstrating detection. It is not part of the circuits themselves,
and it must be tied to zero in use. Bit meanings are listed in each module's
header comment.

Two faults in the same parity-preserving circuit cancel in the parity and are
not flagged. The scheme covers single faults only.

## Top level (`pp_reversible_top`)

The four circuits stand side by side, each with its own operand, fault, result
and `*_err` ports. The top ties the constant lines to the values listed in
`rev_pkg` and attaches one `parity_checker` per circuit. The circuits are
independent examples; nothing connects them.

## Files

- `rtl/rev_pkg.sv`: constant-line values and fault/garbage widths shared by
  the circuits, the top and the testbenches.
- `rtl/rg_*.sv`: the three gates.
- `rtl/pp_*.sv`, `rtl/parity_checker.sv`: circuits, checker, top.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Gate benches
  run exhaustive truth tables and check that each gate is its own inverse.
  Circuit benches check function, parity, reversibility (all outputs distinct
  over every input and constant-line value) and every single-line fault.
  `tb_pp_reversible_top` runs the whole design end to end. It also checks
  that no checker fires falsely, and that double faults go unflagged.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. To
run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/rev_pkg.sv tb/tb_pp_reversible_top.sv --top-module tb_pp_reversible_top
./obj_dir/Vtb_pp_reversible_top
```

## What is this design's own choice

- The constant lines are ports (`anc`) on every circuit, so that the checker
  can include them and tests can drive other values. Drive them with the
  `rev_pkg` constants.
- The fault-injection ports and their bit numbering.
- In `pp_peres_adder`, each Feynman part is an F2G with a constant-0 second
  target. This keeps parity and costs one extra garbage line per gate.
- The parity checker's form (an XOR tree) and its place beside each circuit.
- No garbage-line reduction (post-optimisation) is applied to the
  substituted Toffoli gates.
- The plain Toffoli and Peres gates, and the Fredkin adder without its parity
  fix, are references only and have no module.
