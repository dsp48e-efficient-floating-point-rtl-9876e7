# Floating point multipliers with few DSP slices (SP, DP, DEP, QP)

This is a set of fully pipelined IEEE-754 style floating point multipliers for
four precisions: single (32-bit), double (64-bit), double extended (80-bit) and
quadruple (128-bit). On an FPGA, the costly part of a floating point multiply is
the significand product. Here every significand multiplier is built from one
small building block: a 24x24 multiplier that uses one Xilinx DSP48E slice
(25x18 hard multiplier) plus a little fabric logic. Larger products are
assembled from these blocks with Karatsuba decompositions, which trade
multipliers for adders. The result is 1, 3, 6 and 18 DSP slices for the four
precisions, against 4 to 35 for straightforward tilings. The price is more LUTs
for adders and compressors.

| unit | operand | exponent / fraction | significand multiplier | DSP slices | latency (mult + post) |
|------|---------|---------------------|------------------------|-----------:|----------------------:|
| SP   | 32 bit  | 8 / 23              | 24x24                  | 1          | 3 + 2 = 5             |
| DP   | 64 bit  | 11 / 52             | 53x53                  | 3          | 6 + 3 = 9             |
| DEP  | 80 bit  | 15 / 64             | 66x66 (65 used)        | 6          | 7 + 3 = 10            |
| QP   | 128 bit | 15 / 112            | 114x114 (113 used)     | 18         | 11 + 3 = 14           |

Each unit accepts one operand pair per clock cycle. The top level,
`fp_mult_suite`, places one unit of each precision side by side. Only clock and
reset are shared.

## Datapath of one multiplier (`fp_mult`)

The steps of a product are:

1. **Sign and exponent** (`fp_sign_exp`). The sign is the XOR of the operand
   signs. The exponent sum is `ea + eb - bias`. The operands are also
   classified (zero, infinity, NaN) here. All of this is combinational on the
   inputs. The values are then delayed in a shift register to line up with the
   significand product.
2. **Significand product.** The operands `1.f` are zero-extended to the
   multiplier's width and sent to `mult_dsp_block` (SP), `mant_mult_53` (DP),
   `mant_mult_66` (DEP) or `mant_mult_114` (QP).
3. **Rounding** (`fp_round`). Rounding happens *before* normalization. The
   product of two significands lies in [1, 4), so its top bit decides where
   the result's last bit sits. The block takes the round bit (last kept bit),
   the guard bit (first dropped bit) and the sticky bit (OR of all lower bits).
   It adds one ULP when `guard & (sticky | round)`: round to nearest, ties to
   even. The output is two bits wider than the significand, because rounding
   can carry up to exactly 4.0.
4. **Normalization** (`fp_normalize`). The top two bits of the rounded value
   select the fraction field and an exponent increment of +0, +1 or +2.
5. **Exponent update and final processing** (`fp_finalize`). Overflow gives
   infinity and underflow gives a signed zero. The special classes from step 1
   override the result, then the fields are packed.

Steps 3 to 5 take three register stages for DP, DEP and QP. For SP they take
two: normalization and final processing share the second stage. `in_valid`
travels beside the data in a shift register that `rst_n` clears (active low,
synchronous) and comes out as `out_valid`. The datapath registers have no
reset.

### Number handling

- Only normal numbers are computed. An operand with a zero exponent field
  (zero or subnormal) counts as zero. A result below the normal range is
  flushed to a signed zero. No subnormal result is ever produced.
- An exponent at or above the all-ones value gives a signed infinity.
- NaN in, or zero times infinity, gives the quiet NaN: sign 0, exponent all
  ones, only the top fraction bit set. Infinity times a normal number gives a
  signed infinity.
- The 80-bit format is 1 sign bit, a 15-bit exponent and a 64-bit fraction
  **with an implicit leading one** (a 65-bit significand). It is *not* the x87
  format, which stores the integer bit explicitly.

## The 24x24 building block (`mult_dsp_block`, `dsp48e_mac`, `booth_mult`)

The DSP slice multiplies 25x18 bits signed, which is 24x17 unsigned. A 24x24
product is split at multiplier bit 17:

    a*b = a*b[16:0] + ((a*b[23:17]) << 17)

- `dsp48e_mac` models the slice: two input register stages, then multiply, a
  post-adder with an unregistered C operand, and an output register. It is
  written as portable RTL that a Xilinx tool maps onto one DSP48E.
- `booth_mult` computes the 24x7 part in the fabric in two stages: partial
  products, a counter tree, a register (R0), the final adder, another register
  (R1). Its result enters the DSP post-adder, shifted left by 17 bits, in the
  cycle when the DSP product is ready. The total latency is 3 cycles.

The same module covers 19- to 24-bit operands (parameter `W`). From 22 bits up,
the small multiplier uses radix-4 modified Booth recoding. Below 22 bits the
upper part of b is only 2 to 4 bits wide, so plain AND partial products are
used instead.

## DP: 53x53 (`mant_mult_53`), 3 slices, 6 cycles

    a*b = a[45:0]*b[45:0]
        + ((a[45:0]*b[52:46] + a[52:46]*b[45:0]) << 46)
        + ((a[52:46]*b[52:46]) << 92)

The 46x46 part uses two-partition Karatsuba on 23-bit halves:
`{m11,m00} + ((m10 - m11 - m00) << 23)`.

- `m11` and `m00` are 23x23 blocks.
- `m10 = (a1+a0)(b1+b0)` is a 24x24 block.

The two 46x7 products and the 7x7 product come from two-stage Booth
multipliers. Two more adder stages combine them, so this term is ready in
cycle 4, the same cycle as the DSP products.

One counter tree (`csa_tree`, built from 4:2 compressors and a 3:2 row) reduces
five terms to two vectors:
- `{m11,m00}`
- `m10<<23`
- `-m11<<23`
- `-m00<<23`
- the small-multiplier term `<<46`

A two-stage adder (`add_pipe2`) then adds the two vectors.

Negative terms are two's complement modulo 2^106. The true product is below
2^106, so the sum modulo 2^106 is exact.

Cycle by cycle:
- cycle 1: operand halves and sums registered
- cycles 2-4: DSP blocks
- cycle 5: compression and the lower half of the final add
- cycle 6: the upper half of the final add

## DEP: 66x66 (`mant_mult_66`), 6 slices, 7 cycles

The operands are cut into three 22-bit parts, and three-partition Karatsuba
gives:

    p = {m22,m11,m00} + ((m21 - m22 - m11) << 66)
                      + ((m20 - m22 - m00) << 44)
                      + ((m10 - m11 - m00) << 22)

Here `mii = ai*bi` (22x22 blocks) and `mij = (ai+aj)(bi+bj)` (23x23 blocks).
This uses 6 multipliers instead of 9.

The products arrive at different times:
- The 22x22 blocks take their inputs directly, so their products arrive in
  cycle 3.
- The 23x23 blocks take registered part sums, so their products arrive in
  cycle 4.

The pipeline then runs:
- cycle 4: the three pair sums (`m22+m11`, `m11+m00`, `m22+m00`) are registered
- cycle 5: the three differences are registered
- cycles 6-7: a 4:2 compressor and the two-stage adder

## QP: 114x114 (`mant_mult_114`, `karatsuba2_mult`), 18 slices, 11 cycles

This unit has two levels of Karatsuba, which is the least obvious part of the
design.

**Outer level.** This is the same three-partition scheme as DEP, on 38-bit
parts:

- 38x38 units for `m22`, `m11` and `m00`;
- 39x39 units for `m21`, `m10` and `m20` (a part sum has 39 bits).

**Inner level** (`karatsuba2_mult`). Each 38x38 or 39x39 unit is a
two-partition Karatsuba multiplier with three DSP blocks:

- 39x39 is split 20 + 19 bits and uses blocks of 20x20, 19x19 and 21x21.
- 38x38 is split 19 + 19 and uses two 19x19 blocks and one 20x20 block.

The unit registers three terms: `m10<<LO`, `-(m11+m00)<<LO` and `{m11,m00}`.
A 3:2 row and an adder then sum them. The latency is 5 cycles. The total is
6 units x 3 = 18 DSP slices.

**Combining.** The 228-bit terms are combined with plain adders, not a
compressor. At this width, pipelined adders meet timing better than a
compressor does.

| cycle | operation |
|-------|-----------|
| 1     | part sums registered |
| 5     | 38x38 products (fed directly from the inputs) |
| 6     | 39x39 products; pair sums `m22+m11`, `m11+m00`, `m22+m00` |
| 7     | differences `d21`, `d10`, `d20` |
| 8     | `t1 = d10 + (d20 << 38)` |
| 9     | `t2 = t1 + (d21 << 76)` |
| 10-11 | two-stage adder: `p = {m22,m11,m00} + (t2 << 38)` |

## Where this RTL makes its own choices

The decompositions, the operand splits, the DSP slice counts and every latency
figure (3/6/7/11 cycles for the significand multipliers, 5/9/10/14 in total)
follow the original architecture. The following points are this
implementation's reading or choice:

- **Post-processing.** The exact register placement inside the 2 or 3
  post-processing cycles.
- **DP small multipliers.** The placement of the two adders that combine the
  small DP multipliers.
- **QP adders.** The order in which the QP differences are added over cycles 8
  to 11.
- **Inner Karatsuba units.** The 5-cycle latency of the 38x38 and 39x39 units.
  Their operand sums are combinational in front of the DSP input registers.
- **Counter tree.** The tree uses 4:2 compressors, each built as two 3:2
  counters, with a 3:2 row for a remainder of three. A row of 2:2 counters is
  never needed to reach two vectors.
- **Rounding.** Round to nearest is taken as ties to even.
- **Number handling.** Subnormal flushing, infinity/NaN rules and
  overflow/underflow handling, as listed above.
- **Added signals.** The valid signal and its reset.
- **DSP slice.** The DSP48E is modelled as generic RTL rather than instantiated
  as a vendor primitive. On another FPGA family or an ASIC, `dsp48e_mac` is an
  ordinary 24x17 multiply-add.

## Module hierarchy

    fp_mult_suite
      fp_mult (x4: SP, DP, DEP, QP)
        fp_sign_exp, fp_round, fp_normalize, fp_finalize
        mult_dsp_block            (SP)
        mant_mult_53              (DP)  -> mult_dsp_block x3, booth_mult x3, csa_tree, add_pipe2
        mant_mult_66              (DEP) -> mult_dsp_block x6, csa_tree, add_pipe2
        mant_mult_114             (QP)  -> karatsuba2_mult x6, add_pipe2
          karatsuba2_mult                -> mult_dsp_block x3, csa_tree
            mult_dsp_block               -> dsp48e_mac, booth_mult
              booth_mult                 -> csa_tree

`fp_mult_pkg` holds the format widths, the per-format latencies and the
result-class enum. `fp_mult` picks its significand multiplier from the
fraction width `F`. Other (E, F) pairs are not supported.

## Simulation

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

- **Integer multipliers.** These testbenches stream a new operand pair every
  cycle and compare each output exactly at the documented latency against the
  simulator's own `*`. They cover every width the design instantiates.
- **Floating point units.** `tb_fp_mult` and `tb_fp_mult_suite` use
  `tb/fp_lane_check.sv` together with the reference model
  `tb/fp_ref_pkg.sv`. That model normalizes first and then rounds by
  comparing the remainder with one half, an order independent of the RTL's.
  The operands are random values, specials, ties and products just below a
  power of two. The stream has random bubbles, and the latency is checked
  exactly. DP results are also compared with the simulator's IEEE double
  multiplication.
- **Coverage of paths.** `tb_fp_mult_suite` runs the top at its default
  configuration. It fails unless every path happened in every unit: special
  operand, normalization shift, round up, tie, rounding carry-out, overflow,
  underflow and bubble.

With Verilator 5, from the project root:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_fp_mult_suite \
        -y rtl -y tb +libext+.sv -Irtl rtl/fp_mult_pkg.sv tb/fp_ref_pkg.sv \
        tb/tb_fp_mult_suite.sv -o sim && ./obj_dir/sim

Replace the top module and the file to run another testbench. The full
end-to-end run takes well under a second.

## Status

All modules pass Verilator lint without errors (the only warnings are about
unused bits) and elaborate under Yosys with its slang front end. All 15
testbenches pass. Each testbench also fails against a
deliberately broken copy of its module, which shows that its checks can detect
a fault.

The timing of a real FPGA implementation has not been checked here: the
~300 MHz target, the LUT counts and the DSP48E mapping. The register
placement follows the stated latencies, but no placed-and-routed result backs
it.
