# Power-efficient posit multiplier

A posit number spends a variable number of bits on its regime, and whatever
the regime leaves over goes to the fraction. Numbers far from 1 have long
regimes and therefore short fractions. A conventional posit multiplier is
still built for the longest possible fraction, so for many operands a large
part of its significand multiplier multiplies zeros and burns switching power
doing so.

This multiplier keeps the full-width significand multiplier but cuts it into
a grid of small sub-multipliers. For every operation it looks at the regime
length of each operand, works out how many fraction bits there can be, and
enables only the sub-multipliers whose inputs can hold fraction bits. The
others have their operands held at zero and do not switch while they stay
disabled. Because only
all-zero segments are switched off, the result is always exact: the gating
changes power, never the answer.

The default build is an 8-bit posit multiplier, posit<8,0>, with a 2 x 2 grid
of 4 x 4 sub-multipliers. Width, exponent size and segment size are
parameters. The same RTL has been simulated as posit<16,1> and posit<32,2>.

## Posit format in brief

An N-bit posit with ES exponent bits is read as follows:

| field    | bits                         | meaning                                           |
|----------|------------------------------|---------------------------------------------------|
| sign     | 1 (MSB)                      | negative patterns are the two's complement of the positive one |
| regime   | run of equal bits + 1 ending bit | run of m ones: k = m-1; run of m zeros: k = -m |
| exponent | up to ES bits                | e; bits pushed off the end read as 0              |
| fraction | whatever is left             | f, with a hidden leading 1                        |

value = (-1)^s x 2^(k*2^ES + e) x 1.f

`0000...0` is zero and `1000...0` is NaR (not a real). For posit<8,0> the
fraction has at most 5 bits (regime of length 1), and a regime of length 6 or
7 leaves none.

## Datapath

Everything is combinational: operands in, result out, no clock.

```
 in1 ─► posit_abs (xin1_i) ─► data_extract (uut_de1) ─┬─ mant1 ─┐
                                                      └─ fw1 ─┐ │
                                                   seg_enable ├─► seg_en
                                                      ┌─ fw2 ─┘ │
 in2 ─► posit_abs (xin2_i) ─► data_extract (uut_de2) ─┴─ mant2 ─┤
                                                                ▼
                                      DSR_right_N_S (dsr2) ─► Product (2N bits)
                                                                │
              sign1^sign2, k1*2^ES+e1 + k2*2^ES+e2 ─► posit_encode ─► out
```

| module          | job |
|-----------------|-----|
| `posit_abs`     | subtractor and 2:1 multiplexer: negates the operand when its sign bit is set, so fields are always read from a positive pattern |
| `data_extract`  | counts the regime run, gives k, exponent, the significand `{1, fraction, 0...}` left-aligned in N bits, and `fw`, the number of fraction bits actually present |
| `seg_enable`    | turns `fw1`, `fw2` into the enables of the sub-multipliers |
| `DSR_right_N_S` | the segmented N x N significand multiplier, built from `sub_mult` instances |
| `sub_mult`      | one SEG_W x SEG_W shift-and-add multiplier with operand isolation |
| `posit_encode`  | normalises, packs regime/exponent/fraction, rounds, saturates, applies sign, zero and NaR |
| `posit_mult`    | top level |
| `posit_pkg`     | default values of N, ES and SEG_W |

## How the gating is decided

Both significands are N bits wide with the hidden 1 at bit N-1, and an
operand with `fw` fraction bits has non-zero bits only in positions N-1 down
to N-1-fw. Each significand is cut into NSEG = N/SEG_W segments, counted from
the top:

```
 bit:      7 6 5 4 | 3 2 1 0          (N = 8, SEG_W = 4)
 segment:     0    |    1
```

Segment j can hold a fraction bit exactly when `j*SEG_W <= fw`. Segment 0
holds the hidden bit and is needed for any non-zero operand. Sub-multiplier
(i, j) multiplies segment i of the first significand by segment j of the
second and is enabled when both segments are needed. Its product is added in
at bit `(2*NSEG - 2 - i - j) * SEG_W`.

For posit<8,0> this gives:

| regime length of an operand | fw   | segments needed |
|-----------------------------|------|-----------------|
| 1 (values in [0.5, 2))      | 5    | 0 and 1         |
| 2 (values in [0.25, 0.5) or [2, 4)) | 4 | 0 and 1    |
| 3 and more                  | 0..3 | 0 only          |

So a pair of operands both of magnitude at least 4 or below 0.25 uses one
4 x 4 sub-multiplier out of four. Over all 65536 operand pairs, 27652 use part
of the grid and 36864 need all of it. In the random tests of the 16-bit and
32-bit builds (with a quarter of the operands given long regimes), part of the
grid was idle in 74% and 89% of the operations.

Whether this saves power depends on the operand stream. The test
`tb_posit_mult_activity` counts operand-bit toggles at the inputs of the four
4 x 4 arrays over 20000 consecutive operations:

- **Long-regime operands** (values far from 1): gating removes about 23% of
  the toggles.
- **Uniformly random bit patterns:** gating adds about 3%. Forcing an idle
  operand to zero and releasing it again costs toggles of its own, and with
  uniform patterns both operands are often near 1, where every sub-multiplier
  is needed anyway.

Toggle counts are only a proxy for power; no gate-level power analysis has
been done.

`seg_en` is brought out of the top so that the gating can be observed. While
`start` is low, or when an operand is zero or NaR, every sub-multiplier is
disabled.

## Rounding and exceptions

`posit_encode` receives the significand product P, which lies in [1, 4) once
scaled by 2^-(2N-2), and the summed scale. If P's top bit is set, the scale
grows by one. The result scale splits into a regime value k (arithmetic shift
right by ES) and an exponent e (the low ES bits). The bit string
`{1,0,e,fraction}` (k >= 0) or `{0,1,e,fraction}` (k < 0) is then shifted right
arithmetically by k or -k-1. This grows the regime to the right length in a
single shifter. The top N-1 bits are the result magnitude. The next bit is
the guard bit, and everything below it ORs into a sticky bit. The result is
rounded to nearest, ties to even, in the encoded bits, as the posit format
specifies.

Exceptions follow the posit rules:

- A result beyond maxpos is clamped to maxpos (`sat_max`), and a non-zero
  result below minpos is clamped to minpos (`sat_min`). A product never turns
  into NaR or zero through overflow or underflow.
- NaR times anything is NaR.
- Zero times anything other than NaR is zero.

`round_up`, `sat_max` and `sat_min` are brought out as event flags.

## Interface and timing of `posit_mult`

| port       | dir | width          | meaning |
|------------|-----|----------------|---------|
| `in1`, `in2` | in | N            | posit operands |
| `start`    | in  | 1              | operation enable; low: all sub-multipliers off, `out` = 0 |
| `out`      | out | N              | posit product |
| `Product`  | out | 2N             | significand product P (0 while disabled) |
| `seg_en`   | out | (N/SEG_W)^2    | sub-multiplier enables, bit i*NSEG+j |
| `round_up`, `sat_max`, `sat_min` | out | 1 | rounding / saturation happened |

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 8       | posit width |
| `ES`      | 0       | exponent bits |
| `SEG_W`   | 4       | sub-multiplier width; must divide N |

There are no registers. The result is valid one combinational delay after the
inputs settle. To pipeline the design, register `in1`/`in2`/`start` and
`out`/`Product` around the top.

## Relation to the source design

The design follows an 8-bit posit multiplier published as a short report
with Vivado schematics. From that design come the following:

- the idea of gating sub-multipliers by regime length;
- the 8-bit width and the port names `in1`, `in2`, `start` and `Product[15:0]`;
- the negate-and-select front end and the two `data_extract` units;
- the multiplier unit `DSR_right_N_S` with ports `a`, `b` and `P`;
- the instance names.

The report publishes results of 80 LUTs, 0.065 W and 5.232 ns on an FPGA,
against 144 LUTs, 0.143 W and 8.806 ns for a conventional design. It also
reports an average power saving of 16% across the 8, 16 and 32-bit formats.
None of those figures has been reproduced here. The only measurement made
here is the toggle count described above.

Choices made here, where the source gives nothing or differs:

- **Exponent size.** The source does not give one. ES = 0 is used for the
  8-bit format.
- **Segmentation.** Segment size, grid shape and enable rule are this
  design's own. So is the way a sub-multiplier is disabled (zeroed operands).
- **What `Product` carries.** In the source's simulation waveforms, `Product`
  is the plain integer product of the two input bytes (for example
  66 x 27 = 1782), and the multiplier there is fed straight from the negated
  operands. Here the multiplier is fed with the significands, `Product` is
  the significand product, and the posit result comes out on an extra port,
  `out`. The ports `seg_en`, `round_up`, `sat_max` and `sat_min` are added
  as well, for observation. The integer-product waveforms are not reproduced.
- **`start`.** It is unconnected in the source schematic. Here it gates the
  whole multiplier.
- **Rounding and exceptions.** Round to nearest even, saturation, and the
  handling of zero and NaR follow the posit format. The source mentions
  rounding and exception handling without details.
- **Registers.** None are used, as in the source schematic.

## Verification

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. Expected values are computed in
`posit_ref_pkg`. That package decodes operands bit by bit and uses `real`
arithmetic. For ES = 0 it finds the nearest posit by scanning all patterns.
For any ES it packs the exact product bit by bit.

| testbench             | what it covers |
|-----------------------|----------------|
| `tb_posit_abs`        | all 256 inputs |
| `tb_data_extract`     | all positive 8-bit patterns for ES = 0 and ES = 2 |
| `tb_seg_enable`       | every pair of fraction widths, SEG_W = 4 and 2 |
| `tb_DSR_right_N_S`    | all 65536 operand pairs with every sub-multiplier on, plus random enable masks |
| `tb_posit_encode`     | random products and scales, a sweep of exact ties, zero and NaR |
| `tb_posit_mult`       | all 65536 operand pairs of posit<8,0> at the default parameters, then `start` low; it requires each of the following to occur at least once: partial gating, full use, rounding up, both saturations, NaR, zero, negative operands and idle operation |
| `tb_posit_mult_activity` | operand isolation of each sub-multiplier on every operation, and toggle counts with and without gating for two operand streams |
| `tb_posit_mult_wide`  | posit<16,1> and posit<32,2>, 20000 random pairs each, with result, `Product` and enables checked |

To run one testbench with Verilator:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb -Irtl \
    rtl/posit_pkg.sv tb/posit_ref_pkg.sv tb/tb_posit_mult.sv \
    --top-module tb_posit_mult -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second.

## Changing it

- **Another format.** Override `N` and `ES` on `posit_mult`. `SEG_W` must
  divide `N`.
- **A finer grid.** Give a smaller `SEG_W`. This means more, smaller
  sub-multipliers, so more can be switched off, but the adder that sums their
  products gets wider.
- The sum of sub-products in `DSR_right_N_S` is a plain chain of additions.
  A synthesis tool is free to restructure it. If you need an explicit
  carry-save tree, replace that loop.
