# TFxP MAC: a multiply-accumulate unit for Triple Fixed-Point numbers

Neural-network values are mostly small, with a few large ones. A plain 16-bit
fixed-point format can't give the small ones enough fractional bits and still
reach the large ones. Floating point covers both cases, but it costs a lot of FPGA logic.
Triple Fixed-Point (TFxP) sits in between. A 2-bit range field picks one of
three fixed radix positions for a 14-bit two's-complement significand. Small
values keep 13 fractional bits and large ones keep 5.

Multiplying two such numbers gives a product with one of several radix
positions. Summing them would normally need an alignment shifter inside the
accumulator loop. This unit avoids that. It shifts the operands **before** the
multiplier so that every product has the same radix point, 25 fractional
bits. The accumulator is then an ordinary integer adder and runs at the full
speed of an FPGA DSP slice. A small output stage converts the 48-bit
accumulator back into a 16-bit TFxP word. It picks the smallest range that
holds the value and flags overflow and underflow.

The RTL implements the format *16_13_9_5* and the MAC structure described in
M. Kerner, K. Tammemäe, J. Raik, T. Hollstein, "Triple Fixed-Point MAC Unit
for Deep Learning". The DSP48E1 slice it was built around is written as plain
logic. The sections below give the choices this RTL makes where that
description says nothing.

## The number format

A word is `{E[1:0], X[13:0]}`. Its value is `X * 2^-b_E`:

| E | fractional bits b | integer bits (plus sign) | span | step |
|---|---|---|---|---|
| 0 | 13 | 0 | [-1, 1 - 2^-13] | 2^-13 |
| 1 | 9  | 4 | [-16, 16 - 2^-9] | 2^-9 |
| 2 | 5  | 8 | [-256, 256 - 2^-5] | 2^-5 |
| 3 | –  | – | overflow (X sign 0) / underflow (X sign 1) | – |

A value is stored in the first range that holds it. The name `16_13_9_5`
lists the word width and then b0, b1 and b2. Range 2 is sized so that
activations of up to about ±114, as seen in a YOLOv2 detection network, do
not overflow.

## Fixing the radix point of the product

This is the core of the design. With `b_A`, `b_B` in {13, 9, 5}, the raw
product `X_A * X_B` has `b_A + b_B` fractional bits: 26, 22, 18, 14 or 10.
The target is 25, and the operands are shifted on their way into the
multiplier:

* The 14-bit A significand feeds a 25-bit multiplier port, so it can move
  left by up to 11 bits. The multiplexer offers `A`, `A>>1`, `A<<3`, `A<<11`.
* The 14-bit B significand feeds an 18-bit port, so it can move left by up
  to 4 bits. The multiplexer offers `B`, `B>>1`, `B<<4`.
* C, the addend, is shifted straight to 25 fractional bits: `C<<12`,
  `C<<16` or `C<<20` for ranges 0, 1 and 2.

| A range | B range | b_A + b_B | A shift | B shift |
|---|---|---|---|---|
| 0 | 0 | 26 | −1 if A0 = 0, else 0 | −1 if A0 = 1, else 0 |
| 0 | 1 | 22 | +3 | 0 |
| 0 | 2 | 18 | +3 | +4 |
| 1 | 0 | 22 | +3 | 0 |
| 1 | 1 | 18 | +3 | +4 |
| 1 | 2 | 14 | +11 | 0 |
| 2 | 0 | 18 | +3 | +4 |
| 2 | 1 | 14 | +11 | 0 |
| 2 | 2 | 10 | +11 | +4 |

Why 25 and not 26: reaching 26 from the 10-bit case would take 16 bits of
left shift, but the ports allow only 11 + 4 = 15. So the common radix is 25,
and the one case with too many fractional bits (both operands in range 0) is
shifted *right* by one. The LSB of A decides which operand moves. If A is
even, A is halved exactly and nothing is lost. If A is odd, B is halved
instead, and B's LSB (zero or one bit of data) is lost. That one bit,
2^-26 × |X_A| at most, is the only rounding the datapath does before the
output stage.

## Accumulator layout and output ranges

The 48-bit accumulator is a signed number with 25 fractional bits:

```
 47 | 46 ........ 33 | 32 .. 29 | 28 .. 25 | 24 ....... 12 | 11 .... 0
 S  |  OF GUARD (14) |  R2 (4)  |  R1 (4)  | FRACTIONAL 13 |  (12)
```

A range fits when every bit above its significand is a copy of S:

* **Range 0:** OF GUARD, R2 and R1 all equal S. The word is `{00, P[25:12]}`.
* **Range 1:** OF GUARD and R2 equal S. The word is `{01, P[29:16]}`.
* **Range 2:** OF GUARD equals S. The word is `{10, P[33:20]}`.
* Otherwise there is overflow (S = 0, word `16'hDFFF`) or underflow (S = 1,
  word `16'hE000`).

Only equality comparators and a multiplexer are needed. There is no
shifter and no leading-zero counter. The bits dropped when packing are
truncated, which rounds towards minus infinity.

## Pipeline and interface (`tfxp_mac`)

```
 a,b,c,use_c ─► tfxp_mode_sel ─► tfxp_preshift ─┬─ A(25) ─► [A reg] ─┐
                                                ├─ B(18) ─► [B reg] ─┴─ × ─► [M reg] ─┐
                                                └─ C(48) ─► [reg] ─► [C reg] ─────────┤
                                                     use_c ─► [reg] ─► [OPMODE reg] ──┤
                                                                    P + or C + ─► [P reg] ─► range detect ─► out mux ─► p
```

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset of every register |
| `in_valid` | in | 1 | `a`, `b`, `c`, `use_c` hold an operation this cycle |
| `a`, `b` | in | 16 | TFxP operands |
| `c` | in | 16 | TFxP addend, used only when `use_c = 1` |
| `use_c` | in | 1 | 1: `P = A·B + C` (start a sum or add a bias); 0: `P = A·B + P` |
| `out_valid` | out | 1 | the outputs hold a new result |
| `p` | out | 16 | TFxP result |
| `ovf`, `unf` | out | 1 | result beyond range 2, above or below |
| `p_acc` | out | 48 | raw accumulator, 25 fractional bits |

Timing: all inputs are sampled on the same rising edge. The result for that
operation is on `p`/`p_acc` after the third rising edge, counting the
sampling edge, with `out_valid` high. A new operation can be issued every
clock. Back-to-back accumulation works because P feeds back in one cycle.
Cycles with `in_valid = 0` leave the accumulator and outputs unchanged. To
compute `y = bias + Σ w·x`, issue the first term with `use_c = 1, c = bias`
and the others with `use_c = 0`. After the last term, `p` holds `y` in
TFxP. The unit does not track where a sum ends. The caller knows which
result is the last term's.

C and `use_c` pass one extra register in front of the slice. The product
needs two stages (A/B register, multiplier register) to reach the adder,
while a DSP48E1's C and OPMODE inputs need one. The extra register lines them
up with the product of the same operation.

## Modules

| file | role |
|---|---|
| `rtl/tfxp_pkg.sv` | widths, field positions, the `tfxp_t` word struct and the select enums |
| `rtl/tfxp_mode_sel.sv` | range fields → shift selects (the table above) |
| `rtl/tfxp_preshift.sv` | the A, B and C shift multiplexers, with sign extension to the port widths |
| `rtl/dsp_slice.sv` | the DSP48E1 subset used: registered 25×18 multiply, 48-bit add of C or P |
| `rtl/tfxp_range_detect.sv` | OF GUARD / R2 / R1 checks → range, `ovf`, `unf` |
| `rtl/tfxp_out_mux.sv` | builds the 16-bit result word |
| `rtl/tfxp_mac.sv` | top level: wires the above and aligns C with the product |

Everything is synthesizable. The design has no parameters that change its
size, because the shift table belongs to this one format. On a 7-series
FPGA, `dsp_slice` should map onto one DSP48E1 with AREG, BREG, CREG, MREG,
OPMODEREG and PREG set to 1. The multiplexers, detection and packing
become LUTs.

## Choices made here, beyond the original description

* **E = 3 operands.** An operand with range code 3 (an earlier overflow)
  is treated as a range-2 number with its significand. The error is not
  carried forward to the result.
* **Range bounds.** The written range-selection rule could be read as
  excluding each range's most negative and most positive significands. This
  design follows the bit-field rule above, so every range uses its full
  two's-complement span.
* **Overflow words.** The code is E = 3 plus a sign. The remaining 13 bits
  are set to the saturated pattern (`DFFF` and `E000`).
* **Truncation** of the dropped accumulator bits, rather than rounding.
* **Handshake and reset.** `in_valid`/`out_valid`, the synchronous reset
  and the `use_c` port are interface choices of this RTL. The original
  unit is described only as a datapath.
* **48-bit wrap.** As in the DSP48E1, a sum beyond ±2^22 wraps inside the
  accumulator. That is far past range 2, so `ovf`/`unf` are raised long
  before it happens, unless a sum goes beyond ±2^22 and back.

Not built: the alternative formats it was compared against (TFxP
16_14_9_5, DFxP 16_13_5 and 16_13_9, FxP 16_13), and any conversion from
floating point to TFxP (that happens offline in software). The reported
resource and clock figures (about 80 LUTs and 22 flip-flops besides one
DSP slice, 393 MHz on a Zynq-7020) come from a vendor tool flow and have
not been reproduced for this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares
against an integer reference model (`tb/tfxp_ref_pkg.sv`). The model counts
values in units of 2^-25, scales with multiplications and floor divisions,
and finds ranges by comparing values with bounds. It shares no code with
the RTL.

| testbench | what it covers |
|---|---|
| `tb_tfxp_mode_sel` | all 128 input combinations; checks that every product lands on 25 fractional bits, that ports are not exceeded, and the A0 rule |
| `tb_tfxp_preshift` | random and extreme significands with every select |
| `tb_dsp_slice` | random multiply, C-load and accumulate with idle gaps; 3-edge latency; P unchanged while idle |
| `tb_tfxp_range_detect` | values on both sides of every range boundary, plus random magnitudes |
| `tb_tfxp_out_mux` | packing of random accumulator values |
| `tb_tfxp_mac` | end to end: 20,000 cycles of mixed sums, bit-exact accumulator and word, latency. Requires each of: 9 range pairs, 3 addend ranges, A- and B-side right shift, a lossy B shift, bias load, accumulate, idle, results in ranges 0/1/2, overflow, underflow, E = 3 inputs |
| `tb_tfxp_conv3x3` | workload: 60 output pixels of a 3×3×32 convolution with bias, inputs drawn from a network-like value distribution and converted to TFxP. Checked bit-exactly, and against the real-valued sum within the bound of the input rounding. Also checks that the extreme values of the analysed network (−113.9 … 106.3) convert without overflow |

`dsp_slice` also carries a concurrent assertion. It requires every valid
operation to produce `out_valid` exactly three edges later. Simulate with
`--assert` to enable it.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Each test was also run against a deliberately broken copy of its module and
reported failures.

Running one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/tfxp_pkg.sv tb/tfxp_ref_pkg.sv tb/tb_tfxp_mac.sv \
    --top-module tb_tfxp_mac -Mdir obj_tb_tfxp_mac
./obj_tb_tfxp_mac/Vtb_tfxp_mac
```

Replace `tb_tfxp_mac` with any other testbench name. The packages must be
listed first, and `-y` lets Verilator find the modules. Each run takes well
under a second.
