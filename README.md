# Multiplierless quadrature mirror filter banks with coefficient partitioning

Wavelet denoising of DNA microarray images spends almost all of its
arithmetic in the quadrature mirror filter (QMF) banks of a wavelet
decomposition: long FIR filters, applied along rows and columns of large
16-bit images. This RTL builds those filter banks without a single
multiplier. Every coefficient product is a short network of shifts and
adders, and the networks are arranged so that each adder is as narrow as
possible. The method is *coefficient partitioning* (CP) on top of common
subexpression elimination (CSE):

1. every coefficient is written in canonical signed digit (CSD) form;
2. the digit patterns `[1 0 1]` and `[1 0 -1]` (and their negations) are
   replaced by two shared signals, `x5 = x + (x >> 2)` and `x3 = x - (x >> 2)`;
3. the remaining terms are put into *pseudo floating-point* form, a common
   shift times a *span*;
4. the span is cut into an MSB half and an LSB half, each half is summed on
   its own relative to its own order, and one last adder joins them.

Because the operands of each adder are close together in weight, adders are
short. For the worked example below the adder depth is the same as with
plain CSE: three adder steps.

On top of these multipliers the design builds a two-channel 1-D QMF
analysis bank. Three of those form one level of the 2-D wavelet
decomposition of a raster pixel stream (LL, LH, HL, HH subbands). A chain of
such levels, each filtering the LL band of the one before, is the
tree-structured decomposition at the top of the hierarchy.

## From a coefficient to adders

All of this happens at elaboration time in `qmf_pkg::hcse_terms()`. The
hardware is generated from its result in `cp_coef_mult`.

A coefficient is an integer `C` with `CW` fraction bits (`h = C / 2**CW`),
and a multiplier output is the exact integer `x * C`. A right shift by `k` in
the fixed-point view is therefore a left shift of the other operand by `k`
in the integer view. Nothing is ever truncated inside a multiplier.

Worked example, the default coefficient of `cp_coef_mult`:

```
h = 0.0101001010000101  (16 fraction bits, C = 21125)
  = 2^-2 + 2^-4 + 2^-7 + 2^-9 + 2^-14 + 2^-16       six CSD digits
  = 2^-2 * (x2 + 2^-5 x2 + 2^-12 x2),  x2 = x + x>>2   three CSE terms
MSB half: x2          LSB half: x2 + x2>>7 (scaled by its order 2^-5)
A1: x2 = x + (x >> 2)
A2: x2 + (x2 >> 7)
A3: x2 + (A2 >> 5),   y = A3 >> 2
```

The generated structure for this coefficient has exactly the adders A1, A2
and A3, and it is three adder steps deep.

Rules used by `hcse_terms()`:

- **CSD recoding.** The standard non-adjacent form is used, so no two
  neighbouring digits are non-zero.
- **Pairing.** Digits are scanned from the most significant one. A non-zero
  digit whose neighbour two places lower is also non-zero forms a pair:
  - equal signs give an `x5` term;
  - opposite signs give an `x3` term.
  Any other digit stays a single `x` term.
- **Partition.** With `n` terms, the MSB half gets the first `floor(n/2)`
  terms and the LSB half gets the rest. A partition "by half the span
  length" would put the `2^-5` term of the example into the MSB half. This
  rule is chosen because it reproduces the split of the worked example.
- **Order of additions.** Inside each half the terms are added one after
  another, most significant first. A coefficient with `n` terms is thus
  `ceil(n/2)` adder steps deep after `x5`/`x3`, one more counting them. A
  balanced tree inside each half would be shallower for long coefficients. The example, with
  three terms, is three steps deep counting A1.
- **Edge cases.** One term needs no adder. A zero coefficient gives a
  constant zero.

### Why the adders are short: `shift_add`

Each adder in a network computes `(a << K) ± b`. The `K` low bits of the
result depend only on `b`, so `shift_add` passes them through: unchanged for
an addition, or as the `K`-bit two's complement of `b`'s low bits for a
subtraction, with the borrow fed into the upper adder. Only
`max(WA, WB-K) + 1` bits go through a carry chain.

`qmf_pkg::sa_w()` and `chain_w()` compute the exact width of every partial
sum, and `fa_count()` adds up the full adders of a coefficient. With a
16-bit input, the example coefficient uses:

- 17 full adders for `x5`;
- 20 for A2;
- 20 for A3.

Full adder counts depend on the input width, so they are not directly
comparable with counts quoted for other operand ranges.

## The 1-D QMF bank (`qmf_bank_1d`)

- **Filters.** The low-pass filter `H0` is one of the prototypes in
  `qmf_pkg`. The high-pass filter is its mirror,
  `H1(z) = H0(-z)` (`h1[n] = (-1)^n h0[n]`).
- **Multiplier block (`qmf_mult_block`).** Both filters share one multiplier
  block. It builds `x5` and `x3` once for the whole filter and one CP network
  per *distinct coefficient magnitude*. The two mirrored halves of the
  linear-phase prototype share their products, so a 50-tap filter has 25
  networks. Coefficient signs, and the high-pass sign alternation, are
  applied by the structural adders as add or subtract.
- **Transposed direct form.** Each filter is
  `z_k <= ±p[k] + z_{k+1}`, with output `±p[0] + z_1`.
- **Delay elements of `D` samples.** With `D = 1` the bank filters
  consecutive samples. With `D` equal to a line length it filters down the
  columns of a raster stream. The delays are `D`-word circular buffers that
  share one pointer.
- **Decimation by two.** A sample `t` is kept when `floor(t/D)` is even:
  every other sample when `D = 1`, every other line otherwise.
- **Start-up.** After reset the buffers are swept to zero, one address per
  cycle, and `in_ready` is low for `D` cycles. After that, one sample per
  cycle is accepted.
- **Timing.** A sample accepted at clock edge `e` is registered, the
  products and structural sums are formed from it, and a kept `lp`/`hp`
  pair is valid on `out_valid` after edge `e+2`: two cycles of latency.
- **Output width.** `lp` and `hp` keep full precision (real value
  `lp / 2**CW`). Their width is `XW + ceil(log2(sum|C_n|)) + 1`, so no
  input can overflow them.

## One level of the 2-D decomposition (`qmf_2d`)

A separable 2-D FIR filter is a sum over `i` of `h[i]` times
row-filtered line `m-i`. It is therefore a 1-D filter in which each unit
delay is one line. The top uses exactly that:

```
pix ─► row bank (D=1) ─┬─ low band  ─► >>>CW ─► column bank (D=IMG_W/2) ─┬─ ll
                       │                                                 └─ lh
                       └─ high band ─► >>>CW ─► column bank (D=IMG_W/2) ─┬─ hl
                                                                         └─ hh
```

- **Row bank.** It splits each line and keeps every other sample, so each
  band has `IMG_W/2` samples per line.
- **Column banks.** Each band feeds a column bank whose delay is one
  decimated line. It splits the band vertically and keeps every other line.
- **Output naming.** The first letter is the row filter and the second is
  the column filter: `lh` is row low-pass, column high-pass.
- **Word lengths.** Pixels are unsigned `PIX_W` bits and enter with a zero
  sign bit. After each 1-D stage the sum is floored by `CW` bits, so every
  stage output is an integer at the scale of its input. With the defaults,
  band samples are 20 bits and subband samples 23 bits.
- **Rate and latency.** The input takes one pixel per cycle. The four
  outputs come together, one set per two pixels of every other line. An
  output appears 4 cycles after the pixel that completes it is accepted.
  `pix_ready` is low only for the `IMG_W/2` cycles of the line-buffer clear
  after reset.
- **Borders.** Lines are one continuous stream: there is no symmetric
  border extension. The first outputs of a line include the tail of the
  previous line, and after reset the image is preceded by zeros. If the
  borders matter, pad the lines outside this block.
- **Memory.** Each column bank holds `2 x (TAPS-1)` delay lines of
  `IMG_W/2` words. With the defaults that is 2 x 49 x 256 words of 39 bits
  per column bank.

## The wavelet tree (`qmf_dwt2d`, the top)

Filtering the low band again and again gives the octave-band split of a
wavelet decomposition. `qmf_dwt2d` chains `LEVELS` (default 3) instances of
`qmf_2d`:

- **Level 0** takes the image, `IMG_W` pixels per line.
- **Level `l`** takes the LL band of level `l-1`. That band is itself a
  raster stream of `IMG_W >> l` samples per line, so level `l` is a
  `qmf_2d` with that line length and a signed input (`SIGNED_PIX`).
- **Outputs.** Each level brings out its LH, HL and HH bands with
  `det_valid[l]`. The last level also brings out its LL band (`ll`,
  `ll_valid`), the coarse image.
- **Word growth.** There is no rescaling between levels. Each level adds
  `2*(ceil(log2(sum|C|)) + 1 - CW) + 1` bits, which is 7 with the defaults.
  Subbands are therefore 23, 30 and 37 bits wide. All per-level outputs are
  sign extended to the widest one (`OW`).
- **Flow control.** Deeper levels clear their shorter line buffers long
  before level 0 produces its first LL sample. There is therefore no
  back-pressure between levels, and `pix_ready` is level 0's. An assertion
  checks that no deeper level is offered a sample while clearing.
- **Latency.** A level-`l` output follows the pixel that completes it by
  `4*(l+1)` cycles.
- **Memory.** Line buffers halve with each level. With the defaults, level 0
  holds 4 x 49 x 256 column-delay words, level 1 half of that, and so on.

## Prototype filters

`qmf_pkg` holds equiripple (Parks-McClellan) low-pass designs of 50, 80,
120 and 250 taps:

- pass band edge `0.5*pi`, stop band edge `0.52*pi`, equal weights;
- even length and linear phase (`h[n] = h[N-1-n]`), so only the first half
  of each is stored;
- stored as integers with 24 fraction bits.

`proto_coef(taps, n, wl)` rounds a coefficient to `wl` fraction bits, for
`wl` from 8 to 24: it computes `floor(h24 / 2**(24-wl) + 1/2)`. The band
edges and lengths are the standard test cases of this method. The
coefficient values themselves are this design's own. Such a narrow
transition band gives a poor stop band at these lengths. Any other
coefficient set can be used by replacing the tables: the hardware is
generated from them.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `qmf_dwt2d` | `PIX_W` | 16 | pixel width (unsigned) |
| | `IMG_W` | 512 | pixels per line (multiple of `2**LEVELS`) |
| | `TAPS` | 50 | prototype length: 50, 80, 120 or 250 |
| | `CW` | 16 | coefficient fraction bits, 8 to 24 |
| | `LEVELS` | 3 | decomposition levels |
| `qmf_2d` | `PIX_W`, `IMG_W`, `TAPS`, `CW`, `SIGNED_PIX` | 16, 512, 50, 16, 0 | as above; `SIGNED_PIX` for LL input |
| `qmf_bank_1d` | `XW`, `TAPS`, `CW`, `D` | 17, 50, 16, 1 | input width, length, word length, delay |
| `qmf_mult_block` | `XW`, `TAPS`, `CW` | 17, 50, 16 | |
| `cp_coef_mult` | `XW`, `COEF`, `YW` | 16, 21125, 34 | one coefficient, integer with 16 fraction bits |

The pixel width, line length, number of levels, stage word lengths and
handshake are choices of this design. The filter lengths, coefficient word lengths and
band edges follow the reference design examples.

## What this RTL does not contain

- **Denoising.** The thresholding of subbands and the synthesis
  (reconstruction) bank are not included.
- **Filter lengths 20 and 400.** These ends of the quoted length range have
  no stored prototype, and elaboration stops with an error for them.
- **Baselines.** Plain shift-add and CSE-only multipliers, used only for
  comparison, are not included.

## What follows the method and what is this design's own

Taken from the coefficient-partitioning method:

- CSD coefficients of up to 24 bits;
- sharing of the `[1 0 1]` and `[1 0 -1]` subexpressions;
- the pseudo floating-point (shift, span) form;
- the split of the span into two halves, with the LSB half scaled by its
  order and the shift applied after the additions;
- the worked example coefficient and its three-adder structure;
- the prototype specification (band edges, lengths 50 to 250, 8- to 24-bit
  words);
- the use of tree-structured QMF banks, and 2-D banks built from 1-D
  filters with delays.

Choices of this design:

- the partition rule for more than three terms, and the chained additions
  inside a half;
- the coefficient values;
- the transposed filter form and sharing of mirrored products;
- the mirror high-pass `H0(-z)` and decimation phase;
- the separable row/column arrangement with line-long delays;
- all word lengths between stages, and the floor truncation;
- pixel width, line length and number of levels;
- the valid/ready handshake, reset and buffer clearing;
- continuous filtering across line and frame borders.

The arithmetic is exact and checked sample by sample against an
independent integer model, so the outputs can be trusted to be the stated
filters. Adder counts are not compared with full adder totals reported for the method,
because those depend on operand ranges that are not fixed here.

## Files

- `rtl/qmf_pkg.sv`: types, the CSD/CSE/partition functions, width
  functions, prototype tables.
- `rtl/shift_add.sv`: one reduced-width adder or subtracter.
- `rtl/cse_subexpr.sv`: `x5` and `x3`.
- `rtl/cp_coef_mult.sv`: the generated partitioned network of one
  coefficient (with `cse_subexpr` in front, a complete multiplier).
- `rtl/qmf_mult_block.sv`: the multiplier block of a filter.
- `rtl/qmf_bank_1d.sv`: the 1-D analysis bank.
- `rtl/qmf_2d.sv`: one 2-D level.
- `rtl/qmf_dwt2d.sv`: the multi-level tree (the top).
- `tb/`: the self-checking testbenches listed below, plus the helper
  `qmf_bank_harness.sv`.

## Verification

Every testbench compares against integer arithmetic written independently
of the RTL: plain multiplication and direct convolution. Each ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_cp_coef_mult` | example coefficient and a negative one with `[1 0 -1]` pairs, corner and random inputs; the example elaborates to 3 terms split 1+2 |
| `tb_qmf_mult_block` | all products for 50 taps/16 bits, 250 taps/24 bits, 80 taps/8 bits |
| `tb_qmf_bank_1d` | `D = 1` and `D = 5` banks with idle input cycles: every decimated output, clear time, 2-cycle latency |
| `tb_qmf_workloads` | 1-D banks of 80 taps/8 bits, 120/16 and 250/24 |
| `tb_qmf_2d` | top with 16-pixel lines, 140 lines, random, saturated and checkerboard lines with idle cycles |
| `tb_qmf_2d_full` | one level at its defaults (512-pixel lines), 104 lines |
| `tb_qmf_dwt2d` | three-level tree with 32-pixel lines, 480 lines; every output of every level |
| `tb_qmf_dwt2d_full` | the tree at its defaults (512-pixel lines, 3 levels), 216 lines |

The `qmf_2d` testbenches check every output, the 4-cycle latency and the
output count. They also confirm that line-buffer clearing, idle input
cycles, row decimation and line decimation all occurred, and that each
subband produced non-zero output. The `qmf_dwt2d` testbenches model each
level from the previous level's LL band and check every level's outputs
and counts, the final LL band, clearing and idle cycles.

Run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl rtl/qmf_pkg.sv \
    tb/tb_qmf_dwt2d_full.sv --top-module tb_qmf_dwt2d_full
./obj_dir/Vtb_qmf_dwt2d_full
```

Replace the testbench file and top module name to run the others.
The full-size tests build in about 15 s and simulate in about a second.
