# Reversible 4×4 multiplier (Peres partial products, MFA summation)

This RTL describes a 4-bit × 4-bit unsigned multiplier built only from
*reversible* gates. A reversible gate maps its input vector one-to-one onto its
output vector, so no information is erased. To compute a non-reversible
function such as AND, some gate inputs are tied to a constant and some outputs
are left unused. The unused outputs are called *garbage*. How good a
reversible design is comes down to three counts: gates, constant inputs and
garbage outputs.

The multiplier works in two stages:

1. **Partial-product generation (PPG).** All 16 bits `x[j] & y[i]` are formed
   at once, each by one 3×3 Peres gate with its third input tied to 0.
2. **Summation network.** Twelve full-adder cells in an array add the four
   partial-product rows into the 8-bit product. The default cell is the
   *modified full adder* (MFA), a propagate/generate full adder whose XOR
   stages are Feynman gates. A TSG gate can be used in its place; the TSG
   version is the baseline the MFA version is compared against.

The design is purely combinational: there is no clock or reset, and `p` is
valid one propagation delay after `x` and `y` settle.

## The gates

| Gate | Module | Inputs → outputs | Role here |
|---|---|---|---|
| Feynman (FG) | `feynman_gate` | P = A, Q = A⊕B | the two XOR stages of the MFA |
| Toffoli (TG) | `toffoli_gate` | P = A, Q = B, R = AB⊕C | optional PPG cell (C = 0 → R = AB) |
| Fredkin (FRG) | `fredkin_gate` | P = A, Q = A'B+AC, R = AB+A'C | optional PPG cell (C = 0 → R = AB) |
| Peres (PG) | `peres_gate` | P = A, Q = A⊕B, R = AB⊕C | default PPG cell (C = 0 → R = AB) |
| TSG | `tsg_gate` | P = A, Q = A'C'⊕B', R = Q⊕D, S = QD⊕(AB⊕C) | optional adder cell (C = 0 → R = sum, S = carry of A, B, D) |
| MFA | `mfa` | Pi = A⊕B, Si = Pi⊕Ci, GiBar = (AB)', Cout = AB + Pi·Ci | default adder cell |

Feynman, Toffoli and Fredkin are each their own inverse. The testbenches check
this by feeding one gate's outputs into a second copy and getting the inputs
back. The Peres gate is not its own inverse: its inputs come back as
A = P, B = P⊕Q, C = R⊕AB.

Two of these definitions are this design's own reading, not something the
source spells out:

* **TSG.** The source gives only the TSG gate's role as a full adder. The
  equations above are the commonly published 4×4 TSG gate. With C = 0 it has
  one constant input and two garbage outputs (P, Q).
* **MFA.** The source's drawing gives the two XOR stages and the names of the
  outputs Pi, GiBar and Cout. It does not mark the type of the other gates.
  GiBar is taken as the inverted generate term, and Cout as the ordinary
  full-adder carry formed from GiBar, Pi and Ci.

## The summation array

This is the part that needs the most care. Row `i` of the partial products,
`pp[i][3:0]`, has weight 2^i. The array is a carry-ripple array multiplier
with three rows of four cells, where row `r` adds `pp[r]` to the running sum
left by row `r-1`:

```
            acc0 = {0, pp[0][3], pp[0][2], pp[0][1], pp[0][0]}      p[0] = pp[0][0]

row r, cell j (r = 1..3, j = 0..3):
    A   = acc[r-1][j+1]
    B   = pp[r][j]
    Cin = carry of cell j-1 of the same row   (0 for j = 0)
    sum  -> acc[r][j]
    carry of cell 3 -> acc[r][4]

    p[1] = acc1[0], p[2] = acc2[0], p[7:3] = acc3[4:0]
```

Four cell inputs are tied to 0: the carry-in of the first cell of each row, and
the A input of the last cell of row 1, which has no partial product above it.
These four cells act as half adders. The carry ripples along a row and into
the next row, so the longest path passes through about 2N−1 = 7 cells.

The source fixes the number of cells (twelve) and shows them in two rows of
seven and five, but its wiring between the cells cannot be recovered. The
arrangement above is the standard array with exactly twelve cells. With it, the
multiplier's constant-input count comes to the 20 that the source reports for
the MFA design.

The network adds any pattern of its 16 input bits correctly, not only patterns
that come from real products. Its testbench relies on this and applies all
2^16 patterns.

## Configurations and parameters

`rev_mult4x4` (top) has these parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 4 (`rev_pkg::MULT_N`) | operand width; the generate loops are written for any N ≥ 2, but only N = 4 is the specified size |
| `ADDER` | `ADDER_MFA` | adder cell: `ADDER_MFA` or `ADDER_TSG` |
| `PPG_GATE` | `PPG_PERES` | partial-product gate: `PPG_PERES`, `PPG_TOFFOLI`, `PPG_FREDKIN` |

The ports are `x[3:0]` and `y[3:0]` in, and `p[7:0]` out. All other gate outputs
come out as well:

* `ppg_garbage[i][j]` is {Q, P} of the partial-product gate for bit (i, j).
* `adder_garbage[k]` is {GiBar, Pi} for MFA cells and {Q, P} for TSG cells,
  where k = (r−1)·4 + j for cell j of row r.

Leave these unconnected if you don't need them. They are there so that the
netlist keeps every output a reversible implementation would have.

## Cost figures

`rev_pkg` computes these counts for any N with the functions
`mult_num_gates`, `mult_num_const_in` and `mult_num_side_out`.

| Configuration | Gates | Constant inputs | Outputs not used by the product |
|---|---|---|---|
| Peres + MFA (default) | 16 + 12 = 28 | 16 + 4 = 20 | 32 + 24 = 56 |
| Peres + TSG | 16 + 12 = 28 | 16 + 12 + 4 = 32 | 32 + 24 = 56 |

The gate counts and the 20 constant inputs of the MFA design agree with the
published figures. The published garbage counts do not agree with each other:
19, 36 and 40 are all given for the MFA design, and 52 and 58 for the TSG
design. They depend on which MFA outputs are counted as garbage, so this RTL
does not try to match any one of them. The published power figures (1.5 µW
for TSG, 0.9 µW for MFA) come from transistor-level simulation and have no
counterpart here.

## What is not here

* The gates' bidirectional pass-transistor cells. The RTL models each gate's
  forward logic function only.
* Reversible latches and flip-flops, and the "modified Toffoli" and "modified
  Fredkin" gates. These are named in passing in the source but never
  specified.

## Files

Every file under `rtl/` is one package or module:

* `rev_pkg.sv`: the enums `ppg_gate_e` and `adder_e`, and `MULT_N`
* `feynman_gate.sv`, `toffoli_gate.sv`, `fredkin_gate.sv`, `peres_gate.sv`, `tsg_gate.sv`: the gates
* `mfa.sv`: the modified full adder
* `rev_ppg4x4.sv`: the partial-product generator
* `rev_sum_net4x4.sv`: the summation array
* `rev_mult4x4.sv`: the top

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Every test is
exhaustive:

* each gate over all its inputs, including one-to-one and inverse checks;
* the PPG over all 256 operand pairs for all three gates;
* the summation network over all 2^16 row patterns for both cells;
* `tb_rev_mult4x4` over all 256 operand pairs in all six configurations, plus
  the cost functions;
* `tb_rev_mult4x4_full` at the top's default parameters.

Each test prints `TB_RESULT checks=<n> failures=<n>`.

## Simulating

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl rtl/rev_pkg.sv tb/tb_rev_mult4x4.sv \
          --top-module tb_rev_mult4x4 -o sim && ./obj_dir/sim
```

To run another test, replace the testbench file and top-module name. To lint a
module: `verilator --lint-only -Wall -Irtl -y rtl rtl/rev_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are an intentionally open Feynman pass-through pin
in `mfa` and package items that a given module does not use.
