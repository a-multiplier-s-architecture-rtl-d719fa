# 8x8 approximate multiplier built from 2-bit LUT adders

An 8x8 unsigned multiplier forms eight shifted partial-product rows. Here those
rows are summed by 16-bit adders that are only approximately correct. The
adders are made for FPGA fabric. A 6-input LUT can hold two 5-input functions,
so a 2-bit adder fits in one LUT. The low bits of each adder are handled by
such small approximate 2-bit adders, or are not computed at all. The high bits
are added exactly on the dedicated carry chain. The carry chain is therefore
short, and only the low-order bits of the product are wrong. For error-tolerant
work such as image or audio processing, this trades a bounded error for less
area, power and delay.

Two adder styles are provided, and the top level holds one multiplier built
from each:

* **LEADx** (low error, area efficient). Combinational. Small saturating
  2-bit adders handle the lowest bits, so the error stays small.
* **APEx** (area and power efficient). The low 8 sum bits are the constant 1.
  Operands and results are registered, so the multiplier becomes a 6-stage
  pipeline.

## The 2-bit LUT adders

Both small adders have five inputs and two outputs. Each fits in one 6-input
LUT.

| module | inputs | outputs | function |
|---|---|---|---|
| `aad2` (AAd2) | `a[1:0]`, `b[1:0]`, `ci` | `s[1:0]` | `min(a + b + ci, 3)`: saturates and never produces a carry |
| `aad1` (AAd1) | `a[1:0]`, `b[1:0]`, `ci` | `s[1:0]`, `co` | exact `a + b + ci`; `co` is the carry into the accurate part |

Saturation is the main idea behind AAd2. An overflowing pair gives 3 instead of
wrapping to a small value. The result is never far off, and no carry leaves the
pair. AAd1's `ci` is a predicted carry, not a rippled one: `a[1] & b[1]` of the
bit pair below. The same prediction can be computed inside the first accurate
LUT.

## LEADx, 16 bits (`leadx16`, `leadx8`)

`leadx16` is two 8-bit LEADx units in cascade. Each unit (`leadx8`) maps its
bits as follows:

| bits of the unit | logic | carry in | carry out |
|---|---|---|---|
| 1:0 | `aad2` | the carry out of the unit below (0 for the low unit) | none (saturates) |
| 3:2 | `aad1` | predicted: `a[1] & b[1]` | into bit 4 |
| 7:4 | `carry_chain_adder`, W=4 | from `aad1` | the unit's `cout` |

In the whole 16-bit adder, the exact carry paths are bits 2..7 and 10..15. The
low unit's carry out reaches bits 9:8, because it is the fifth input of the
high unit's AAd2. It goes no further: AAd2 saturates instead of passing it on.
The port list is `a[15:0]`, `b[15:0]`, `s[15:0]` and `cout`. There is no carry
input and no clock.

The result differs from the exact sum in two ways:
* An AAd2 pair that overflows gives 3. The exact result would wrap and carry.
* The carry into bit 2 (or 10) is guessed from `a[1] & b[1]`. A carry caused
  by bit 0, or by the incoming carry, is lost. A carry that is guessed
  correctly also counts once more through AAd2's saturation, so the result can
  be slightly too high as well as too low.

## APEx, 16 bits (`apex16`)

```
a,b ──► [input regs] ──► s[7:0]  = 8'hFF (constant, no logic)
                    └──► s[15:8] = a[15:8] + b[15:8] + c_pred  (carry chain)
                         c_pred  = carry of a[7:6] + b[7:6]
                                          ──► [output regs] ──► s, cout
```

* Timing: a result is on `s`/`cout` two rising edges after its operands are
  presented. A new pair can be presented every cycle.
* Reset: `rst_n` is an active-low synchronous reset. It clears both register
  stages, so the outputs read 0.
* Right after reset, the cleared input register gives `0x00FF` one edge later.
* `APPROX_BITS` (default 8) sets how many low bits are constant.

## The accurate part (`carry_chain_adder`)

Each bit has one LUT, which forms `p = a ^ b`. A 2:1 mux per bit forms the
carry, as the FPGA carry chain does. When `p` is 1 the mux passes the incoming
carry; otherwise it passes `a`, which then equals `b`. The sum bit is
`p ^ carry_in`. The result is an exact W-bit adder.

## The multiplier (`approx_mult8`, `pp_gen`, `approx_add16`)

* `pp_gen` makes row i: `a` if `b[i]` is set, else 0, shifted left by i, in 16
  bits.
* Seven 16-bit adders sum the rows in a balanced tree:
  `(r0+r1)`, `(r2+r3)`, `(r4+r5)`, `(r6+r7)`, then pairs of those, then the
  final sum.
* `approx_add16` picks the adder kind from `ADDER`, which is `ADDER_LEADX` or
  `ADDER_APEX`, defined in `approx_pkg`.
* Adder carry outs are dropped, so the product is the 16-bit sum.

The handshake is `in_valid`/`out_valid`, with no back-pressure:
* LEADx: the multiplier is combinational and `out_valid = in_valid`.
* APEx: every tree level adds two register stages. Product and `out_valid`
  follow the operands by **6 cycles**, and one operation can start per cycle.

`approx_mult_top` places a LEADx multiplier (`lx_*` ports) and an APEx
multiplier (`ax_*` ports) side by side. They share only `clk` and `rst_n`.

### Accuracy over all 65536 operand pairs

| multiplier | exact products | mean absolute error |
|---|---|---|
| LEADx | 24271 (37%) | 283 |
| APEx | 0 | 663 |

APEx is never exact because bits 7:0 of the product are always `0xFF`. Its
error is bounded, but it is intended for cases where the low byte does not
matter. For the 16-bit LEADx adder alone, about a third of random operand pairs
give the exact sum.

## What follows the source architecture and what is chosen here

These points follow the published LEADx/APEx multiplier:
* an 8x8 multiplier whose partial products are reduced by 16-bit LEADx or APEx
  adders;
* LEADx made of two 8-bit units, each with a 4-bit approximate part (AAd2 and
  AAd1) and a 4-bit accurate ripple-carry part;
* APEx with its 8 low bits forced to 1, 8 accurate bits on the carry chain, and
  input and output registers that reset clears;
* 5-input/2-output 2-bit LUT adders.

These points are choices made here, because the description does not fix them:
* The AAd2 truth table is chosen as a saturating add.
* The AAd1 carry prediction is `a[1] & b[1]`.
* The APEx carry into the accurate byte is predicted from bits 7:6.
* In LEADx, the low unit's carry enters the high unit's AAd2. The description
  also calls the second 8-bit unit idle, "master-slave". The cascade was
  chosen because it matches the reported I/O count of the adder (49 signals)
  and its critical path, which runs from an operand bit 2 to sum bit 8.
* The reset is active-low and synchronous.
* The tree order of the reduction is a balanced tree.
* The `in_valid`/`out_valid` handshake is added here.
* Operands are unsigned.

The FPGA area, power and delay figures reported for the original designs
(LUT counts, watts, ns) are not reproduced here: this RTL is
technology-independent.

## Files

| file | content |
|---|---|
| `rtl/approx_pkg.sv` | adder-kind enum, widths, APEx latency |
| `rtl/aad2.sv`, `rtl/aad1.sv` | the 2-bit LUT adders |
| `rtl/carry_chain_adder.sv` | exact LUT + mux carry-chain adder |
| `rtl/leadx8.sv`, `rtl/leadx16.sv` | LEADx unit and 16-bit adder |
| `rtl/apex16.sv` | pipelined 16-bit APEx adder |
| `rtl/pp_gen.sv`, `rtl/approx_add16.sv`, `rtl/approx_mult8.sv` | multiplier |
| `rtl/approx_mult_top.sv` | top level |
| `tb/approx_ref_pkg.sv` | reference models: plain integer arithmetic, no shared code with the RTL |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. What they cover:
* The 2-bit adders, the 8-bit carry-chain adder, `leadx8`, `pp_gen` and the
  multipliers are checked exhaustively.
* `leadx16` and `apex16` are checked with corner cases and random operands.
* `tb_approx_mult_top` runs the top at its default parameters. It sends all
  65536 pairs through both multipliers.
  * APEx operands arrive with random idle cycles, and each product must arrive
    exactly 6 cycles after issue.
  * A reset is applied while operations are in flight.
  * The test counts AAd2 saturation, carries between the LEADx units,
    predicted and lost carries, and the APEx carry prediction. Each must occur
    at least once.

## Simulating

Verilator 5 is enough. For the end-to-end test:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/approx_pkg.sv tb/approx_ref_pkg.sv tb/tb_approx_mult_top.sv \
  --top-module tb_approx_mult_top -o sim
./obj_dir/sim
```

For any other testbench, replace `tb_approx_mult_top` with its name. Every
testbench finishes in well under a second.

Places to make changes:
* To change the AAd2 approximation, edit `aad2.sv` and `ref_aad2` in
  `tb/approx_ref_pkg.sv` together.
* `APPROX_BITS` in `apex16` moves the APEx split. It must be at least 2.
  Update `ref_apex16` to match.
