# Mean-max membership defuzzifier

A fuzzy controller with two Mamdani rules produces, for each rule, a
consequent membership function clipped at the rule's strength: the minimum
of the two antecedent grades of that rule. The union of the two clipped
functions is a fuzzy set. Before anything can act on it, it has to be
reduced to one crisp number. The mean-max membership (MMM) method takes the
region where the union reaches its highest grade and returns the midpoint of
that region:

    Y = (a + b) / 2,  a = first point at the maximum, b = last point at the maximum

This RTL computes that value in a small combinational circuit. It handles
two fired rules whose consequents are trapezoids once clipped. The
stronger rule's plateau therefore holds the maximum of the union, and its
two end points are `a` and `b`.

## How the maximum is found

No membership function is sampled. The circuit is given, for each rule,
the rule's strength and the two end points of its clipped plateau. It only
has to decide which rule is stronger:

```
 F1, F2 ──► comp1 ──T1──┬──────────────┐
                        ▼              ▼
 C1X1, C2X1 ──► mult1x1 (left)   mult1x1 (right) ◄── C1X2, C2X2
                    │ CX1              │ CX2
                    └──► add1 ◄────────┘
                          │ R3 = CX1 + CX2
                          ▼
                NUM2 ──► div1 ──► O = R3 / NUM2
```

| Signal | Width | Meaning |
|---|---|---|
| `F1`, `F2` | 4 | strengths (clip levels) of rule 1 and rule 2 |
| `C1X1`, `C1X2` | 4 | first and last point of rule 1's plateau on the output axis |
| `C2X1`, `C2X2` | 4 | first and last point of rule 2's plateau |
| `NUM2` | 6 | divisor; tie to 2 for the mean |
| `O` | 6 | crisp output |

* `comp1` sets `T1 = 1` when `F2 > F1` and `T1 = 0` when `F1 > F2`.
* The two `mult1x1` selectors use `T1` to pick the stronger rule's
  first point (`CX1`) and last point (`CX2`). Each zero-extends its pick
  to 6 bits. (The name comes from the original schematic. The block is a
  multiplexer, not a multiplier.)
* `add1` forms `R3 = CX1 + CX2`. With 4-bit points the sum is at most 30,
  so 6 bits never overflow.
* `div1` divides `R3` by `NUM2`. The divisor is a port rather than a
  constant, as in the original schematic. In normal use it is tied to 2.

The circuit has no clock, reset or handshake. `O` is valid one
propagation delay after the inputs settle, and a new set of rule results
can be applied at any time.

## Number formats

All values are unsigned integers. Output-axis positions are 4-bit codes
from 0 to 15, and so is the crisp result in practice. Membership grades
are 4-bit codes too. The circuit only compares them, so any monotonic
mapping works. The examples below use 0.05 per step (0.25 → 5, 0.5 → 10,
0.75 → 15).

## Worked examples

These three cases are reproduced exactly by `tb/tb_mmm_defuzzifier.sv`.
For each case the test checks `T1`, `CX1`, `CX2`, `R3` and `O`.

| Case | F1 | F2 | C1X1..C1X2 | C2X1..C2X2 | T1 | CX1 | CX2 | R3 | O |
|---|---|---|---|---|---|---|---|---|---|
| 1 | 0xA (0.5) | 0x5 (0.25) | 2..6 | 7..0xD | 0 | 0x02 | 0x06 | 0x08 | 0x04 |
| 2 | 0x5 (0.25) | 0xA (0.5) | 1..7 | 8..0xC | 1 | 0x08 | 0x0C | 0x14 | 0x0A |
| 3 | 0xF (0.75) | 0xA (0.5) | 3..7 | 8..0xC | 0 | 0x03 | 0x07 | 0x0A | 0x05 |

## Choices this design makes

The selection rule, the datapath structure and the widths (4-bit inputs;
6-bit internal bus, divisor and output) follow the original design. The
following points were left open there and are decided here:

* **Equal strengths.** When `F1 == F2`, both plateaus are at the maximum,
  and strict MMM would span both of them. This circuit picks rule 1
  (`T1 = 0`) and returns the midpoint of rule 1's plateau. Any consumer
  that cares about ties must handle them itself.
* **Odd sums.** The quotient is truncated, so (3 + 8) / 2 gives 5.
* **Zero divisor.** `div1` returns all ones (0x3F).
* **Divider structure.** `div1` is a combinational restoring long
  division: one trial subtraction per quotient bit, most significant bit
  first. It divides by any 6-bit value, not only by 2. Hard-wiring
  `NUM2 = 2` lets synthesis reduce it to a shift.
* **Select width.** `T1` is one bit.
* **Input validity.** The circuit assumes that each plateau's first point
  is not greater than its last point, and it does not check this.

## Files

| File | Contents |
|---|---|
| `rtl/mmm_pkg.sv` | widths `IN_W = 4`, `DATA_W = 6`, `DIVISOR_DEFAULT = 2` |
| `rtl/comp1.sv` | strength comparator |
| `rtl/mult1x1.sv` | 2:1 plateau-point selector |
| `rtl/add1.sv` | 6-bit adder |
| `rtl/div1.sv` | 6-bit divider |
| `rtl/mmm_defuzzifier.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

Each block is parameterised by its widths, with the defaults above. The
top passes `IN_W` and `DATA_W` down to its blocks. If `IN_W` is widened,
`DATA_W` must stay at least `IN_W + 1` so that the sum cannot overflow.

## Verification

* The unit testbenches are exhaustive. `tb_comp1` and `tb_mult1x1` cover
  every 4-bit input pair. `tb_add1` and `tb_div1` cover every 6-bit
  operand pair. The divider's expected quotient comes from repeated
  subtraction.
* `tb_mmm_defuzzifier` runs at the default widths and has three parts:
  * the three worked examples above;
  * 3000 random rule pairs, about one in eight of them ties. The expected
    value comes from a behavioural model that builds the union on all 16
    axis points and takes the mean of its first and last maximum point.
  * 500 vectors with random divisors.

  The test counts how often rule 1 won, rule 2 won, and the strengths tied.
  It fails if any of the three never occurred.

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each
also has a watchdog that ends the run with a failure if it hangs.

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/mmm_pkg.sv rtl/comp1.sv rtl/mult1x1.sv rtl/add1.sv rtl/div1.sv \
  rtl/mmm_defuzzifier.sv tb/tb_mmm_defuzzifier.sv \
  --top-module tb_mmm_defuzzifier -o sim
./obj_dir/sim
```

For a unit test, compile only `rtl/mmm_pkg.sv`, the module under test and
its testbench.

## Relation to the original implementation

The original was written in VHDL and mapped to a Xilinx Virtex-4
XC4VLX160. It used 142 four-input LUTs in 73 slices. That count includes
a general divider, so a version with a fixed divisor of 2 is much smaller.
This RTL keeps the same blocks and connections, but it is an independent
SystemVerilog description, not a translation.

The fuzzification and min-inference stages that produce `F1`, `F2` and
the plateau end points are not part of this RTL. They are the top's
inputs.
