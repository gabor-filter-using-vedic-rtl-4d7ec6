# Convolution filter with Urdhva Triyakbhyam (Vedic) multipliers

A filter spends most of its hardware and most of its delay in its multipliers.
This design builds a direct-form convolution of eight input samples with an
eight-tap filter whose 64 multipliers use the Urdhva Triyakbhyam ("vertically
and crosswise") method of Vedic arithmetic. That method forms all the partial
products of one output column at once and passes a single carry from column to
column. The multipliers are built as a hierarchy: a 2x2-bit cell, a 4x4 made of
four 2x2 cells, and an 8x8 made of four 4x4 cells. Every level uses the same
three-step procedure.

The taps `h` are inputs, not constants. The block therefore applies any 8-tap
kernel, including the Gabor kernel it is meant for in image filtering.

```
x0..x7 ──┐
         ├─► 8 x 8 grid of vedic_mul8x8 ─► 15 anti-diagonal adders ─► y0..y14
h0..h7 ──┘       (x[i] * h[j])               y[n] = Σ x[i]·h[j], i+j=n
```

## The vertically-and-crosswise method

Write both operands as two-digit numbers `aH aL` and `bH bL` in some base `B`.
The product is built one column at a time, starting from the least significant
column:

| step | name       | column sum                    | output digit    | passed on        |
|------|------------|-------------------------------|-----------------|------------------|
| 1    | vertical   | `aL·bL`                       | low digit       | the rest → carry |
| 2    | crosswise  | `aH·bL + aL·bH + carry`       | low digit       | the rest → carry |
| 3    | vertical   | `aH·bH + carry`               | all of it       | –                |

In decimal, 25 × 21 gives the columns 2·2 = 4, 2·1 + 5·2 = 12 and 5·1 = 5. With
the carries resolved that is 525. The method is the same at every base. Only the
digit products change. These come from AND gates at the bottom of the hierarchy
and from the next-smaller multiplier above it:

| module         | digit (base)     | digit products from | column-sum widths (worst case)               |
|----------------|------------------|---------------------|----------------------------------------------|
| `vedic_mul2x2` | 1 bit (base 2)   | AND gates           | half adders                                  |
| `vedic_mul4x4` | 2 bits (base 4)  | 4 × `vedic_mul2x2`  | crosswise 9+9+2 = 20 (5 bits); top 9+5 (4 bits)    |
| `vedic_mul8x8` | 4 bits (base 16) | 4 × `vedic_mul4x4`  | crosswise 225+225+14 = 464 (9 bits); top 225+29 (8 bits) |

Because the top-step sum always fits the upper half of the product, no carry
leaves the multiplier. The comments in each module repeat these bounds next to
the adders whose widths they set.

The two crosswise products of each level are independent of each other and of
the vertical products. All four digit products of a level are therefore formed
in parallel. The only serial path is the short carry chain across the three
column sums.

A 4x4 multiplier can also be worked bit by bit, in seven column steps
(2·4 − 1), each adding every `a[i]·b[j]` with `i+j` equal to the column number.
That gives the same product. Here the 4x4 is built hierarchically from 2x2
cells, the same way the 8x8 is built from 4x4 cells. Every level then has the
same form.

## The convolver

`vedic_convolver` computes the full linear convolution

    y[n] = Σ_k x[k] · h[n−k],    n = 0 … 14

One `vedic_mul8x8` sits at each point `(i, j)` of an 8 × 8 grid and forms
`x[i]·h[j]`. Output `y[n]` adds the products on the anti-diagonal `i + j = n`:
one product for `y0` and `y14`, and up to eight for `y7`. This is the
crosswise grouping again, this time applied to whole samples. The difference
is that no carry passes from one output to the next.

- **Data:** unsigned 8-bit samples and taps (`vedic_pkg::sample_t`).
- **Outputs:** 19 bits each, which is enough for eight full-scale products
  (8 · 255² = 520 200 < 2¹⁹). No output can overflow. The edge outputs add fewer
  products, so their top bits are always zero.
- **Timing:** purely combinational, with no clock, registers or handshake. The
  outputs are valid one propagation delay after the inputs change. To use the
  block in a clocked system, register its inputs and outputs. Then give the
  path one cycle, or pipeline it, depending on your clock.
- **Parameters:** `N_X` and `N_H` (default 8 and 8) set the number of samples
  and taps. `N_Y` and `Y_W` follow from them. The sample width is fixed at
  8 bits by the multiplier.

After synthesis the default convolver comes to about 8 800 word-level cells and
no flip-flops.

## Where this RTL departs from, or adds to, the method as published

- **Word width and signedness:** the method's description gives neither.
  Eight-bit unsigned data is a choice of this design. Signed Gabor coefficients
  need a sign-magnitude wrapper or an offset around the block.
- **Hierarchy:** the 4x4 is built from 2x2 cells, not bit by bit in seven steps.
  Both forms compute the same product.
- **Scaling to larger sizes:** a Karatsuba-style scheme for larger sizes is
  mentioned for the method, but it is not described and not used here. The 8x8
  uses four sub-multipliers, not three.
- **Combinational datapath:** the design's performance is reported as a
  propagation delay, so no pipeline is assumed.
- **Not included:** a conventional-multiplier version of the convolver. It
  served only as a point of comparison for delay and power (roughly 48.6 ns and
  97 mW against 22.3 ns and 81 mW for the Vedic version). Those numbers come
  from synthesis on an unnamed library and cannot be checked in simulation.
  There is no separate multiply-accumulate unit. The convolver's multipliers
  and adders do that work in parallel.

## Files

| file                        | contents |
|-----------------------------|----------|
| `rtl/vedic_pkg.sv`          | sample and product types, widths |
| `rtl/vedic_mul2x2.sv`       | 2x2 cell: AND gates and two half adders |
| `rtl/vedic_mul4x4.sv`       | 4x4 from four 2x2 cells |
| `rtl/vedic_mul8x8.sv`       | 8x8 from four 4x4 cells |
| `rtl/vedic_convolver.sv`    | top: 8 × 8 multiplier grid and anti-diagonal adders |
| `tb/tb_vedic_mul2x2.sv`, `tb/tb_vedic_mul4x4.sv`, `tb/tb_vedic_mul8x8.sv` | exhaustive multiplier tests (16, 256 and 65 536 operand pairs) |
| `tb/tb_vedic_convolver.sv`  | end-to-end convolver test at the default size |

## Verification

Each testbench works out its expected values with plain integer arithmetic and
compares them with the design's outputs. It then prints
`TB_RESULT checks=N failures=M`. A watchdog ends the run with a failure if it
hangs. Each operand set is applied in its own clock cycle and checked in that
same cycle, so the tests also confirm that there is no latency.

- **Multipliers:** every operand pair is tested. The testbench counts the pairs
  whose crosswise column carries into the top digit, and fails if there are
  none.
- **Convolver:** the test applies a unit impulse at each of the eight input
  positions, which must return `h` shifted. It also applies all-ones (the
  largest sums), a few fixed patterns and 2 000 random vectors. That makes
  about 30 000 output checks. The test also requires outputs wider than
  16 bits, so the extra output width is exercised.

Each of these tests has been run against a deliberately broken copy of its
module, and each one caught the fault. The broken copies were:

- the 2x2 cell with its crosswise carry dropped;
- the 4x4 and 8x8 with a carry between column steps dropped;
- the convolver with its sums truncated to 16 bits.

To simulate with Verilator (5.x), from the folder that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing -Irtl -Itb -y rtl \
    rtl/vedic_pkg.sv tb/tb_vedic_convolver.sv --top-module tb_vedic_convolver
./obj_dir/Vtb_vedic_convolver
```

Replace the testbench name to run one of the multiplier tests. The convolver
test builds in about 20 seconds and runs in a fraction of a second. To lint a
module on its own:

```sh
verilator --lint-only -Wall -y rtl rtl/vedic_pkg.sv rtl/vedic_convolver.sv
```

## Changing the design

- **A different number of samples or taps:** override `N_X` and `N_H` on
  `vedic_convolver`. The output width grows with `log2(min(N_X, N_H))`.
- **Wider samples:** add a 16x16 level, built from four `vedic_mul8x8` cells
  exactly as `vedic_mul8x8` is built from `vedic_mul4x4`. Use 8-bit digits.
  The crosswise sum then needs 17 bits and the top sum 16 bits. Then change
  `SAMPLE_W` in `vedic_pkg` and swap the multiplier in the convolver's grid.
- **Fixed coefficients:** tie `h` to constants and let synthesis fold the
  multipliers.
