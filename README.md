# Rational image filters in coarse arithmetic

Rational filters form a correction term as a ratio of two polynomials in the pixels,
`num / (d^2 + beta)`. A large local difference `d` (an edge) makes the denominator
large and switches smoothing off. In small areas of flat or noisy image the
denominator stays near `beta` and the filter acts like a linear smoother. The
denominator only has to *detect* detail, so it does not need to be precise. That
observation drives both designs here:

* **`reprog_filter`**: one pipelined datapath that can be loaded, through a serial
  configuration register, with any of four operators. These are edge-preserving noise
  smoothing, block-artifact removal (deblocking), and 1-D and 2-D rational
  interpolation. Squares and reciprocals use 3-bit mantissas. The interpolation
  coefficients are restricted to a few values in eighths, so a two-shifter adder can
  multiply by them.
* **`mrhf_filter`**: a median-rational hybrid filter for raster video. Three
  medians on a 3x3 window are combined by one rational stage. The medians remove
  impulses and the rational stage smooths Gaussian noise without blurring edges.
  The division uses a scaling divider: both operands are scaled by 16 until they fit
  a small reciprocal table.

`image_ops_top` places the two side by side. They share only `clk` and `rst_n`.

## Number formats

| name | meaning |
|---|---|
| `pixel_t` | 8-bit unsigned pixel |
| `afp_t` | coarse float: `zero` flag, signed 7-bit exponent, 8-bit mantissa `0.1xxxxxxx`; value = `man/256 * 2^exp` |
| `par_t` | configuration parameter (alpha, beta): 4-bit mantissa, signed 6-bit exponent; value = `man4/16 * 2^exp` |
| `mu_code_t` | 3-bit multiplier code: `000`=0, `001`=1/8, `011`=1/4, `010`/`101`=1/2, `100`=3/4, `110`=7/8, `111`=1 |
| `plf_w_t` | PLF weight: sign and index into 0, 1/8, 1/4, 3/8, 1/2, 3/4, 7/8, 1, 3/2, 7/4, 2 |

In the code table, the bitwise complement of a code is the code of one minus its
value. The 1-D interpolator relies on this: the weights on `b` and `c` sum to
exactly 1, so its output always lies between `b` and `c`.

All of these live in `rtl/img_pkg.sv`, together with the configuration word `cfg_t`.

## The reprogrammable filter

### Operators

With `e` the centre of the 3x3 mask `a b c / d e f / g h i`:

* smoothing: `e + sum_k alpha * (x_k + y_k - 2e) / ((x_k - y_k)^2 + beta_k)` over the
  pairs (a,i), (c,g), (b,h), (d,f);
* deblocking: the same operator with only the pairs across the block edge enabled;
* 1-D interpolation between `b` and `c` of a row `a b c d`:
  `x = mu*b + (1-mu)*c`, where `mu = A/(A+B)`,
  `A = k((b-a)^2 + (c-a)^2) + 1` and `B = k((b-d)^2 + (c-d)^2) + 1`;
* 2-D interpolation: `x = sum_i mu_i (p_i + q_i)/2` with
  `mu_i = w_i / sum w` and `w_i = 1/(k(p_i - q_i)^2 + 1)`.

### Datapath

```
 columns ─► input_fifo ─► 3x3 mask + 4-sample row
                             │
       ┌─────────────────────┼──────────────────────┐
       ▼                     ▼                      │
  6 x plf (lane 0..5)   rational_core (lanes 1..4)  │
       │              coef = alpha/(d^2+beta)  or mu codes
       ▼                     ▼
 lanes 1..4: radix4_mult x coef   (smoothing, deblocking,
                                   interpolation with computed coefficients)
             shift_add_mult x mu  (interpolation with table codes)
 lanes 0, 5: shift_add_mult x constant code
       │
  upper channel = lanes 0+1+2 ─► O1
  lower channel = lanes 3+4+5 ─► O3
  gamma * (upper + lower)     ─► O2
```

* **PLF lanes.** Each lane has a programmable linear filter `w1*x + w2*e + w3*y` with
  the quantised weights. For smoothing, the four pair lanes are set to `(1, -2, 1)`
  and lane 0 to `(0, 1, 0)` with code 1, which passes `e`.
* **Nonlinear core.** `rational_core` runs in this order:
  1. absolute difference;
  2. coarse square (`sq_approx`, an 8-entry table plus an exponent control bit);
  3. a 4-bit-mantissa add (`approx_sum`), either with `beta` or with a second square;
  4. coarse reciprocal (`inv_approx`, 8 entries of `2048/(8+i)`).

  Then either:
  * **smoothing and deblocking:** the reciprocal is multiplied by `alpha`, giving a
    6-bit mantissa and an exponent;
  * **interpolation:** `1/A` and `1/B` (or the four `w_i`) go to a coefficient table.
    `mu_lut_1d` compares against the midpoints between levels. `mu_lut_2d` aligns
    the four weights to their largest exponent, adds them exactly, then compares.
  * **interpolation with computed coefficients** (`cfg.interp_exact = 1`): an
    extended adder sums the weights, again aligned to the largest exponent. Its coarse
    reciprocal, times each weight, gives a continuous coefficient `mu_i`. These
    coefficients go through the radix-4 multipliers like the smoothing coefficients,
    3 clocks later than the table path.
* **Multipliers.**
  * `radix4_mult` converts its 6-bit multiplier to Booth radix-4 digits. It adds one
    row per clock, most significant first, with a latency of 8.
  * `shift_add_mult` adds or subtracts two shifted copies of its operand, with a
    latency of 3.
  * The core delivers the coefficients 5 clocks before the codes. The two multiplier
    kinds therefore finish together, and the coefficient exponent is applied by a
    shift after the multiplier.
* **Outputs.** Three outputs are rounded and clipped to 0..255. `out_oe` carries the
  configured output enables of O1..O3, for three-state pads outside this RTL.

### Timing

* One 3-pixel column enters per clock with `in_valid`, and one result leaves per clock.
* A column presented at clock edge `n` completes a mask. That mask's result appears
  with `out_valid` after edge `n+20`: a latency of 21 clocks in every mode.
* The exception is interpolation with computed coefficients, where every lane is
  taken 3 clocks later and the latency is 24.
* The pipeline runs freely. A low `in_valid` only holds the input FIFO and marks the
  corresponding output slot invalid.
* The output belongs to the mask whose centre is the middle pixel of the column
  before the newest one.

### Configuration

* `cfg_t` is shifted in MSB first while `cfg_shift` is high. It takes `$bits(cfg_t)`
  clocks, and the previous word comes out on `cfg_sdo`.
* Contents: mode, the 18 PLF weights, `beta` for each pair lane, `alpha`,
  `k = 2^k_exp`, the coefficient-path select `interp_exact`, the constant codes of
  lanes 0 and 5, `gamma` and the output enables.
* The register is live while shifting, so outputs during a reload are meaningless.

### Accuracy

The coarse arithmetic is deliberate. The testbenches measured the following:

* The smoothing coefficient stays within about −12 % / +27 % of the exact
  `alpha/(d^2+beta)`. Flat masks pass through exactly.
* 1-D interpolation always lands between `b` and `c`.
* In 2-D interpolation, the quantised `mu_i` need not sum to 1. With only the levels
  0, 1/8, 1/4, 1/2, 3/4, 1, a ratio near a decision threshold can lose or gain a
  level. On noisy random masks the mean absolute error against the exact operator is
  about 7 grey levels.
* With computed coefficients each `mu` stays within −18 % / +36 % of exact. The
  mean error of the interpolated pixel drops to about 3 grey levels.

## The median-rational hybrid filter

```
pixels ─► line_memory (2 lines) ─► 3x3 window ─┬─► pmf_cwmf ─► phi1 (plus median)
                                               │             └► phi2 (centre-weighted)
                                               └─► cmf ──────► phi3 (cross median)
      y = phi2 + (phi1 + phi3 - 2 phi2) / (K + h (phi1 - phi3)^2)   [mrhf_rational]
```

* **Medians.** All use `minmax_cell`, a compare-exchange steered by the carry of
  `a - b`.
  * **PMF.** The plus median first finds the max `M4` and min `m4` of the four
    neighbours.
  * **CWMF.** The centre-weighted median (centre counted three times) is simply
    `clamp(centre, m4, M4)`. It costs one delay and two extra cells.
  * **CMF.** The cross median sorts the top/bottom corner pair of each new column
    once, and reuses it two columns later when that column becomes the left side of
    the mask.
  * Each median filter takes 4 clocks.
* **Rational stage.** `mrhf_rational` has a latency of 8.
  * `h = 0.01` is realised as `sqrt(h) ~ 2^-4 + 2^-5`. The value to be squared is
    `(|d| >> 4) + (|d| >> 5)`, which fits in 5 bits.
  * The denominator is `s^2 + K`, with `K = 6`.
  * Numerator (10 bits) and denominator (11 bits) are each scaled by 16, with
    rounding, until they are at most 16. That is at most two scalings each.
  * The table `round(256/d)` supplies the reciprocal. The quotient is shifted by
    `16^(e_n - e_d)`, added to `phi2` and clipped.
* **Stalls.** `in_valid` low stalls the whole pipeline, so the filter accepts
  pixels at any rate.
* **Output timing.**
  * The output for the mask whose newest pixel is pixel `j` leaves with `out_valid`
    on the clock that accepts pixel `j+13`.
  * It belongs to image position (row−1, column−1) of pixel `j`.
  * Masks that wrap across a line boundary are not suppressed; the consumer drops
    them.

### Noise performance

The filter was run on a synthetic 768x16 image made of ramps and step edges. The
noise was mixed Gaussian: with probability `1-λ` a sample comes from N(0, s), and
otherwise from N(0, s/λ). SNR is the image variance over the noise variance. The
table gives the MSE against the clean image:

| λ   | SNR  | noisy input | this hardware | real-valued filter (K = 6.25) |
|-----|------|-------------|---------------|-------------------------------|
| 0.1 | 3 dB | 747         | 79.5          | 86.8                          |
| 0.1 | 15 dB| 71.5        | 7.8           | 8.2                           |
| 0.2 | 3 dB | 956         | 172           | 191                           |
| 1   | 3 dB | 1144        | 439           | 479                           |
| 1   | 15 dB| 72.4        | 26.7          | 28.0                          |

The hardware is slightly better than the exact operator at every level. The
truncations make the denominator smaller, so the rational term smooths a little
more.

## Where this design departs from the published one

* **Reprogrammable filter latency.** The published pipeline measures 30 clocks
  (smoothing, deblocking), 31 (1-D) and 34 (2-D). This design has fewer stages: 21
  clocks, or 24 with computed interpolation coefficients. It keeps the published
  rule that the core takes 5 clocks more on the interpolator path, matching the 8-
  vs 3-clock multipliers. The published 2-D table interpolator is 3 clocks slower
  than the 1-D one. Here the 2-D table fits in the same stages, so both take 21.
* **Radix-4 multipliers.** In the lanes they deliver the full 16-bit product. The
  stand-alone block keeps its published default of 3 output digits
  (`OUT_DIGITS = 3`). The array uses ordinary carry-propagate rows rather than
  redundant digit cells.
* **Beta per lane.** Each of the four pair lanes has its own `beta`. The published
  smoothing operator gives a larger `beta' = sqrt(2)*beta` to one set of pairs. The
  published sources differ on whether that set is the axial or the diagonal pairs, so
  either choice can be loaded.
* **1-D interpolator `mu`.** Here `mu = A/(A+B)` weights `b`. One published form
  writes the numerator with the `(c-d)` term instead; the form used here is the one
  the hardware description uses.
* **Computed interpolation coefficients.** These use a block-floating-point sum and
  the same 3-bit reciprocal table. The published text gives only "an extended adder",
  without widths.
* **2-D table sum.** The weight sum is formed exactly, in block floating point. A
  truncating 4-bit sum biased the codes upward.
* **MRHF constant.** `K` is the integer 6; the published value is 6.25.
* **MRHF divider.** The alternative iterative high-precision divider is not built.
  Its quotient selection is not specified.
* **Not in the RTL.**
  * physical parts: pads, the layout, and the FPGA carry chain (which `minmax_cell`
    stands in for);
  * the clock targets: 200 MHz for the ASIC filter, 41 MHz for the FPGA MRHF. The
    MRHF needs 24 MHz for 768x625 frames at 50 Hz, one pixel per clock;
  * power estimation. The input-statistics power macromodel that goes with these
    operators is an analysis method applied to finished netlists. It adds no
    hardware, so it has no RTL here.

## Files

`rtl/` holds one module or package per file. The leaf blocks of the reprogrammable
filter:

* `inv_approx`, `sq_approx`, `approx_sum`
* `radix4_mult`, `shift_add_mult`
* `mu_lut_1d`, `mu_lut_2d`
* `plf`, `config_chain`, `input_fifo`, `rational_core`

Those of the MRHF:

* `minmax_cell`, `line_memory`
* `pmf_cwmf`, `cmf`, `mrhf_rational`

Parameters default to the published numbers: `LINE_W = 768`, `K = 6`, radix-4
10x6 bits with 3 digits and 8 clocks, shift-and-add 3 clocks.

`tb/` holds one self-checking testbench per block, named `tb_<module>`. Each prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` is an independent integer model
of the MRHF (sorted medians, scaling divider).

* `tb_image_ops_top` runs both filters end to end, at a 24-pixel line length. It
  counts every mechanism and fails if any never occurs. The mechanisms are stalls,
  all four modes, output saturation, the CWMF clamp, and 0, 1 and 2 scalings of
  numerator and denominator.
* `tb_image_ops_full` uses the top at its defaults. It filters a full 768x625 frame
  and checks every interior pixel bit-exactly. At the same time it smooths a
  768-column strip.
* `tb_mrhf_noise` runs the noise experiment above at the default line length. It
  covers λ = 0.1, 0.2 and 1 at SNR = 3, 6, 9 and 15 dB. It checks every output
  bit-exactly. It also checks that each frame's MSE drops, and that it stays
  within 1.25x of the real-valued filter.
* `tb_reprog_images` runs the reprogrammable filter over whole images. It smooths
  a noisy 96x24 image strip by strip: MSE 197 at the input, 73 in hardware, 73 for
  the exact operator. It also rebuilds the dropped columns of a column-decimated
  image with both 1-D interpolators: MSE 28 in hardware, 28 exact. Finally it
  deblocks an image coded as 8-pixel segment means. At the segment edges the MSE
  goes from 63 to 35 in hardware, against 34 exact.

To simulate with Verilator, for example:

```
verilator --binary --timing -Irtl -Itb rtl/img_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_image_ops_top.sv --top-module tb_image_ops_top
./obj_dir/Vtb_image_ops_top
```

Testbenches of blocks that do not use the reference model need only `rtl/img_pkg.sv`
and their own file; `-Irtl` finds the modules. The full-frame test runs in about
10 seconds.
