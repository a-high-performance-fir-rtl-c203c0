# 4-tap FIR filter with radix-8 Booth multipliers and D-latch carry-select adders

An FIR filter spends almost all of its logic on multiply-accumulate. This design
builds a 4-tap direct-form filter,

    y(n) = h0·x(n) + h1·x(n-1) + h2·x(n-2) + h3·x(n-3),

from two arithmetic units chosen for speed and area:

* a **radix-8 Booth multiplier**. It recodes the multiplier three bits at a time,
  so an 8-bit product needs 3 partial products instead of 8;
* a **carry-select adder whose upper bit groups each have a single ripple-carry adder**.
  A D-latch lets that one adder produce both the carry-in-0 and the carry-in-1
  result. A conventional carry-select adder needs two adders per group for this.

Samples and coefficients are 8-bit two's complement. Products and sums are 16 bits.
The coefficients can be reloaded while the filter runs.

Beside the filter, the RTL contains a **five-stage pipelined single-precision
floating-point multiplier** whose mantissa multiplier uses the same radix-8 Booth scheme
on 24-bit mantissas. The top level holds both units side by side.

## Files

| file | contents |
|---|---|
| `rtl/dsp_pkg.sv` | carry-select group layout functions, radix-8 Booth digit recoding |
| `rtl/rca.sv` | N-bit ripple-carry adder |
| `rtl/csla_dlatch.sv` | D-latch carry-select adder (default 16 bits) |
| `rtl/booth_mult_r8.sv` | N×N signed radix-8 Booth multiplier (default 8 bits) |
| `rtl/fir4.sv` | the pipelined 4-tap filter |
| `rtl/fp_mult_pipe5.sv` | five-stage floating-point multiplier |
| `rtl/fir_system_top.sv` | top level: filter and floating-point multiplier |
| `tb/tb_*.sv` | one self-checking testbench per module. `tb_fir_system_top` runs the whole design at default size. |

## The D-latch carry-select adder

This block is the least conventional part of the design, and the rest of the filter's timing follows from it.

The 16 operand bits are split into five groups: bits 1:0, 3:2, 6:4, 10:7 and 15:11.
Group 0 is a plain 2-bit ripple-carry adder fed by `cin`. Every other group has:

* one ripple-carry adder. Its carry input is the phase signal `en`;
* a D-latch that is transparent while `en = 1`. It holds `{carry, sum}` of that adder;
* a 2:1 multiplexer. It selects the latched value when the carry into the group is 1,
  and the adder's live output when it is 0.

An addition takes two phases:

| phase | ripple-carry adders compute | latch | `sum` |
|---|---|---|---|
| `en = 1` | group sums for carry-in 1 | follows them | not valid |
| `en = 0` | group sums for carry-in 0 | holds the carry-in-1 sums | valid at the end of the phase |

In the `en = 0` phase, each group's carry-in-0 and carry-in-1 results are both present.
The real carry then ripples only through the multiplexers, as in any carry-select adder.
The operands must stay stable through both phases.

Two points are this design's own reading of the structure:

* The shared adder's carry input is driven by the enable. This is the only way one
  adder yields both results.
* The enable is a registered phase bit, not the clock itself.

The latches are deliberate, so synthesis reports one latch per bit of each upper group
(18 latch bits at 16 bits). For other widths, the group rule continues as 2, 2, 3, 4, 5, 6, …
bits, with the last group clipped.

## Radix-8 Booth multiplication

The multiplier `b` is sign-extended and a 0 is appended below its LSB. It is then read in
overlapping 4-bit windows `{b[3k+2], b[3k+1], b[3k], b[3k-1]}`. Each window becomes the
digit `d = -4·b[3k+2] + 2·b[3k+1] + b[3k] + b[3k-1]`, which is in −4…+4:

| window | digit | window | digit |
|---|---|---|---|
| 0000 | 0 | 1000 | −4 |
| 0001, 0010 | +1 | 1001, 1010 | −3 |
| 0011, 0100 | +2 | 1011, 1100 | −2 |
| 0101, 0110 | +3 | 1101, 1110 | −1 |
| 0111 | +4 | 1111 | 0 |

Partial product k is `d_k · a · 8^k`:

* The magnitude comes from a multiplexer over 0, a, 2a, 4a (shifts) and 3a.
  3a is the one "hard multiple". It is formed once as a + 2a.
* For a negative digit the magnitude is negated (two's complement).

The sign-extended rows are summed into the 2N-bit product. For N = 8 there are
ceil(8/3) = 3 rows. The module is combinational and exact for every N; the testbench
checks all 65 536 pairs at N = 8. The example 148 × 394 with 10-bit operands recodes to
the digits 2, 1, −2, 1 (least significant first) and gives 58 312.

The rows are added with a plain sum, and synthesis builds the adder tree. This design
does not build a specific compressor tree.

## Filter pipeline and timing

```
x_in ─► x_tap[0] ─► x_tap[1] ─► x_tap[2] ─► x_tap[3]        (delay line)
           │           │           │           │
          ×h0         ×h1         ×h2         ×h3            (Booth, 8×8)
           │           │           │           │
        prod_q[0]   prod_q[1]   prod_q[2]   prod_q[3]        (registers)
           └────(+)────┘           │           │
              psum[1] ────(+)── delay 1 ──┘           │
                      psum[2] ────(+)────── delay 2 ──┘
                              psum[3] = y_out
```

All three adders are `csla_dlatch`. A phase bit toggles every clock and drives `en` on
all of them. Every pipeline register advances on the clock edge that ends an `en = 0`
phase. So the filter has a **sample period of two clocks**:

* `in_ready` is high in every other cycle. A sample is taken when `in_valid` and
  `in_ready` are both high at a rising edge.
* The result for that sample appears **8 clocks later**. The path is one slot in the
  delay line, one in the product registers and one per adder, with two clocks per slot.
* `out_valid` pulses for one cycle. `y_out` then holds for two cycles.
* A slot without `in_valid` is a bubble: the delay line does not shift, and no output
  is produced for it.
* `coef_we` (taken together with `in_ready`) loads all four coefficients. They apply to
  the sample accepted at the same edge and to all later ones. Results already in flight
  keep their old coefficients.
* `y_out` is the sum modulo 2^16, because the adders are 16 bits wide and the final
  carry is dropped. With 8-bit operands, four products of up to 16 384 can exceed the
  signed 16-bit range. The top bits are then lost, and no saturation is done.
* `rst_n` is an asynchronous, active-low reset. It clears the delay line, the
  coefficients (to zero) and the valid flags.

Two concurrent assertions in `fir4` check the output handshake. `out_valid` is never
high in two consecutive cycles, and it is high only in the cycle right after a slot edge.

The multipliers sit between two register banks that change only every second clock,
so each multiplier has two clock periods to settle.

`TAPS`, `DATA_W` and `ACC_W` are parameters, with defaults 4, 8 and 16. `ACC_W` must be
at least `2·DATA_W`.

## Floating-point multiplier

`fp_mult_pipe5` multiplies two IEEE-754 single-precision numbers. It accepts one pair per
clock, with no stalls. The result is registered by the fifth rising edge, counting the
edge that samples the operands.

| stage | work |
|---|---|
| P1 | split sign / exponent / mantissa, restore the hidden bit, classify zero, infinity, NaN |
| P2 | sign = S1 xor S2, E1 + E2, Booth processor: 8 radix-8 partial products of the 24-bit mantissas |
| P3 | subtract the bias (127), compress 8 partial products to 4 |
| P4 | compress 4 to 2 |
| P5 | final carry-propagate add, normalise (shift right by one and add 1 to the exponent when the product is ≥ 2), pack |

Eight radix-8 digits cover bits 0…23 of the multiplier mantissa. The top digit therefore
reads the hidden 1 (bit 23) as a sign bit. A correction row, multiplicand·2^24, is added
in the 8-to-4 stage to compensate. Both compressor stages add row pairs.

This design's own choices, which a user should know:

* mantissas are **truncated** (round toward zero), not rounded to nearest;
* subnormal inputs count as zero, and results below the normal range are flushed to
  signed zero;
* results above the normal range become signed infinity;
* NaN inputs, and infinity × 0, give the quiet NaN `0x7FC00000`.

## How far the RTL follows its source, and where it departs

These follow the published design:

* the filter structure: four taps, three delay elements, a chain of three adders;
* the widths: 8-bit samples and coefficients, 16-bit adders and output;
* the choice of arithmetic units;
* the carry-select group layout;
* the radix-8 recoding table;
* the floating-point stage split.

These are this design's own choices:

* driving the shared adders' carry-in from the latch enable, and making that enable a
  registered phase bit. As a result, the filter takes a sample every two clocks;
* the register placement in the filter and the delay registers that keep it aligned;
* the valid/ready handshake, the coefficient-load port and the reset;
* modulo-2^16 output arithmetic;
* the plain-sum row addition in both multipliers;
* everything about exceptional values and rounding in the floating-point multiplier.

The source also compares two other carry-select adders, one with two ripple-carry adders
per group and one with a binary-to-excess-1 converter. They are not included here.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops
on a watchdog if the design hangs. To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/dsp_pkg.sv \
          tb/tb_fir_system_top.sv --top-module tb_fir_system_top
./obj_dir/Vtb_fir_system_top
```

Replace the testbench name to run another one:

| testbench | what it checks |
|---|---|
| `tb_csla_dlatch` | driving `en` through both phases, corner-case and random additions |
| `tb_booth_mult_r8` | all 8-bit pairs, plus the 10-bit instance |
| `tb_fir4` | the filter against a reference model: every output value, the 8-clock latency, an impulse response, and random coefficient reloads, bubbles and wrap-around |
| `tb_fp_mult_pipe5` | the floating-point multiplier against a field-level reference |
| `tb_fir_system_top` | both units together at default parameters; fails if a counted event (reload, bubble, wrap, normalising shift and its absence, overflow, underflow, special value) never occurs |

Each run takes well under a second.
