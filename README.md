# Expanded-range hyperbolic CORDIC: e^x and the 2D Gaussian in shift-and-add hardware

This design computes cosh z, sinh z and e^z with nothing but shifters, adders
and registers. It then uses that exponential to produce a 2D Gaussian function,
F(x, y) = K exp(-(x² + y²) / 2σ²), and to build and apply Gaussian smoothing
kernels to an image stream.

The engine is a hyperbolic CORDIC in rotation mode, unrolled into a 19-row
pipeline. A plain hyperbolic CORDIC converges only for |z| below about 1.1.
This one adds six *expansion rows* (negative CORDIC indices) in front. Their
rotation factors are close to 1, which widens the range of convergence to
|z| ≤ 12.43. Every row is registered, so the pipeline accepts one new argument
per clock and returns one result per clock after a fixed latency.

The architecture follows the paper "A Novel Method for Computing Exponential
Function Using CORDIC Algorithm". That paper sets out:

- the recurrences;
- the expansion scheme;
- the 32-bit word width;
- the registered row structure;
- e^z = cosh z + sinh z;
- the Gaussian formula.

This implementation chooses the number format, the number of rows, rounding,
handshakes, and everything about the kernel generator and the smoothing
filter. The section "What is taken from the paper and what is not" lists these
choices.

## The CORDIC core (`cordic_hyp`, `cordic_hyp_stage`)

### Recurrence

Each row *i* applies, with d = +1 when z ≥ 0 and −1 otherwise:

    x' = x + d·t_i·y
    y' = y + d·t_i·x
    z' = z − d·atanh(t_i)

Rows come in two kinds:

| rows | index i | factor t_i | how t·y is formed |
|---|---|---|---|
| expansion | −5 … 0 | 1 − 2^(i−2) | `y − (y >>> (2−i))` |
| ordinary | 1 … 12, with 4 twice | 2^−i | `y >>> i` |

Index 4 must be repeated. Hyperbolic CORDIC does not converge without
repeating indices 4, 13, 40, … (k → 3k+1). Only index 4 falls in 1…12.

Each row has the same hardware:

- two cross-coupled shifters;
- three adder/subtractors;
- one hard-wired angle constant.

The sign bit of that row's z chooses add or subtract in all three adders.

The full schedule with the default parameters is below. "const" is the angle
constant as stored: round(atanh(t)·2^13).

| row | i | t | atanh(t) | const |
|---|---|---|---|---|
| 0 | −5 | 1 − 2^−7 | 2.77063 | 22697 |
| 1 | −4 | 1 − 2^−6 | 2.42209 | 19842 |
| 2 | −3 | 1 − 2^−5 | 2.07157 | 16970 |
| 3 | −2 | 1 − 2^−4 | 1.71699 | 14066 |
| 4 | −1 | 1 − 2^−3 | 1.35403 | 11092 |
| 5 | 0 | 1 − 2^−2 | 0.97296 | 7970 |
| 6 | 1 | 2^−1 | 0.54931 | 4500 |
| 7 | 2 | 2^−2 | 0.25541 | 2092 |
| 8 | 3 | 2^−3 | 0.12566 | 1029 |
| 9, 10 | 4 | 2^−4 | 0.06258 | 513 |
| 11 | 5 | 2^−5 | 0.03126 | 256 |
| … | … | … | … | … |
| 18 | 12 | 2^−12 | 0.00024 | 2 |

The constants sum to 12.43. That sum is the largest |z| for which the
pipeline converges, and it covers the required range of ±12.

`cordic_pkg` computes the schedule, the constants and the gain. It uses
elaboration-time functions (`stage_index`, `stage_angle`, `inv_gain`,
`max_angle`) built from the formulas above. No table is stored, so a change of
`NEG_ITERS`, `POS_ITERS` or `FRAC_BITS` updates everything.

### Gain and start vector

No row applies its scale factor. Instead, the whole pipeline multiplies the
vector by one gain:

    A_n = Π sqrt(1 − t_i²)

The product runs over all 19 rows, the repeated row included. For the defaults
A_n = 5.028·10^−4.

The core therefore delivers:

    Xout = A_n (X0 cosh Z0 + Y0 sinh Z0)
    Yout = A_n (Y0 cosh Z0 + X0 sinh Z0)
    Zout ≈ 0

Start the core at X0 = 1/A_n = 1988.74 and Y0 = 0, and the outputs are
exactly cosh and sinh. `cordic_exp` does this.

The expansion rows dominate the gain. Each contributes sqrt(1 − t²) with t
close to 1, so 1/A_n is large. The vector starts large, and x and y grow or
shrink as the rotation proceeds. The largest intermediate value over the
whole input range is about 9.2·10^4, a little above cosh 12.

### Number format and rounding

All words are 32-bit two's complement with 13 fractional bits (Q18.13).
This format must hold e^12 = 162 755 and the largest intermediate above.
That leaves 13 bits for the fraction, a resolution of 1.2·10^−4. The angle
uses the same format.

The shifted terms are rounded to nearest: half an LSB of the shifted value is
added before the arithmetic shift. With plain truncation, the downward bias
added up across the rows to about 10 LSB on small results.

Measured accuracy with the defaults, against double-precision references:

- cosh and sinh stay inside a tolerance of 6·10^−4 · cosh z + 40 LSB over
  the whole range, with the worst case at 84 % of that tolerance;
- e^−a, as used by the Gaussian, is within about 8 LSB (1·10^−3 absolute)
  everywhere.

Where the last three bits of accuracy matter, widen `FRAC_BITS`. `DATA_W`
must then grow too, to keep 18 integer bits.

### Timing

| block | latency (clocks) | throughput |
|---|---|---|
| `cordic_hyp_stage` | 1 | 1 per clock |
| `cordic_hyp` | 20 (input register + 19 rows) | 1 per clock |
| `cordic_exp` | 21 | 1 per clock |
| `gauss2d` | 24 | 1 per clock |
| `gauss_kernel` | 127 per 5×5 kernel | one kernel at a time |
| `gauss_smooth` | 1 after the pixel that completes a window | 1 pixel per clock |

Reset (`rst_n`) is active low and asynchronous. It clears every pipeline
register and every valid bit. The core has no handshake, matching its
published signal list:

- `clk`, `reset`;
- `X0`, `Y0`, `Z0` in;
- `Xout`, `Yout`, `Zout` out.

The wrappers add a valid bit that travels in a shift register beside the
data.

## From cosh and sinh to e^z (`cordic_exp`)

`cordic_exp` drives the core with the constant start vector (1/A_n, 0). One
more register then adds the two outputs:

    e^z = cosh z + sinh z

cosh, sinh and e^z all leave in the same clock.

An angle beyond ±12.43 is still computed, but its result is meaningless.
`range_err_o` flags such results, and it leaves together with the result.

## The Gaussian generator (`gauss2d`)

`gauss2d` is a four-step pipeline:

1. `r2 = x² + y²`, from two squarers and an adder. The coordinates are
   signed `COORD_W`-bit integers.
2. `arg = r2 · coef`, where `coef = 1/(2σ²)` is an unsigned fixed-point
   input. If `arg` exceeds 12.43 the point is marked as underflow. The true
   value, e^−12.43 ≈ 4·10^−6, is below half an LSB, so 0 is the correctly
   rounded result. Otherwise `z = −arg` goes to the exponential.
3. `e = e^z`, from `cordic_exp`.
4. `F = K · e`, rounded back to Q18.13. It is 0 on underflow. A slightly
   negative `e` (a rounding residue near the range limit) is clamped to 0.

σ (as `coef`) and K travel with every point, in registers beside the
pipeline. Points of different kernels can therefore be interleaved freely,
for example the three scales n = 1, 2, 3 of a multi-scale filter.

## Normalised kernels and smoothing (`gauss_kernel`, `gauss_smooth`)

A Gaussian kernel should sum to one. The normalisation constant is

    K = 1 / Σ exp(−(x²+y²)/(2σ²))

summed over the kernel's support.

### Kernel generator (`gauss_kernel`)

`gauss_kernel` owns one `gauss2d` pipeline. After a `start` pulse it runs
three phases:

1. **Sum.** All KSIZE² points are issued back to back with K = 1, and their
   exponentials are accumulated.
2. **Divide.** K = round(2^26 / sum), from a restoring divider that produces
   one quotient bit per clock (28 clocks).
3. **Emit.** All points are issued again with K. Each coefficient leaves on
   `kc_valid` / `kc_idx` / `kc_data` in raster order: y outer, x inner, both
   rising from −(KSIZE−1)/2. `done` then pulses.

A 5×5 kernel takes 127 clocks. Its coefficients sum to 1 within the rounding
of 25 words, about 0.1 %.

### Smoothing filter (`gauss_smooth`)

`gauss_smooth` holds the KSIZE² coefficients in registers. They are written
through the same (valid, index, data) port, so the kernel generator's output
feeds it directly.

Pixels arrive in raster order, `IMG_W` per line, with `sof` on the first pixel
of a frame. KSIZE−1 cascaded line buffers deliver a full window column with
every pixel. A KSIZE×KSIZE window register shifts one column per pixel, and a
multiply-accumulate over the window gives the output. That output is rounded,
clamped to the pixel range and registered.

Only windows that lie wholly inside the frame produce output:

- the output frame is (IMG_W−KSIZE+1) × (H−KSIZE+1);
- `out_valid` marks its pixels;
- the result for centre pixel (r, c) appears one clock after input pixel
  (r+2, c+2) for KSIZE = 5.

Do not stream pixels while a new kernel is loading: windows would then mix
old and new weights.

## The top level (`cordic_gauss_top`)

The top carries three independent channels. Each has its own CORDIC
pipeline:

| channel | ports | function |
|---|---|---|
| angle | `ang_*` | z → cosh z, sinh z, e^z, range flag (21 clocks) |
| Gaussian | `gau_*` | (x, y, 1/(2σ²), K) → F, e, underflow flag (24 clocks) |
| smoothing | `krn_*`, `pix_*` | `krn_start_i` + 1/(2σ²) → normalised 5×5 kernel, loaded into the filter and shown on `krn_*`; `pix_*` → smoothed pixel stream |

Parameters, with their defaults:

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 32 | word width (the paper's 32 bits) |
| `FRAC_BITS` | 13 | fractional bits of every word |
| `NEG_ITERS` | 5 | expansion rows −NEG_ITERS … 0 (5 gives range ±12.43) |
| `POS_ITERS` | 12 | ordinary indices 1 … POS_ITERS |
| `COORD_W` | 8 | Gaussian coordinate width (signed integer) |
| `KSIZE` | 5 | smoothing kernel size (odd) |
| `PIX_W` | 8 | pixel width |
| `IMG_W` | 256 | pixels per image line (line-buffer depth) |

Changing `NEG_ITERS` changes the range. M = 4 gives only 9.66; M = 6 gives
15.5, but then needs more integer bits. Changing `FRAC_BITS` also requires
checking that 18 integer bits remain.

Synthesis sizes, from a generic word-level synthesis:

| unit | flip-flop bits | notes |
|---|---|---|
| core | 1 920 | about 280 word-level cells |
| whole top | 8 576 | plus 8 192 memory bits for the line buffers |

Four output bits of the top are constant: the top bits of `krn_k_o`. The
divider's quotient is only 28 bits wide, which is enough because K never
exceeds 1.0.

## What is taken from the paper and what is not

Taken from the paper:

- the hyperbolic recurrences with expansion rows (i ≤ 0: t = 1 − 2^(i−2));
- the repeat rule 4, 13, 40, …;
- rotation mode, with the sign of z steering each row;
- the fully unrolled, registered pipeline with hard-wired angles;
- one result per clock;
- 32-bit X0/Y0/Z0/Xout/Yout/Zout;
- an active-low reset;
- the range ±12;
- e^z = cosh z + sinh z;
- F = K_n e^(−(x²+y²)/2σ²) with K_n = 1/Σe;
- smoothing by convolution with the Gaussian kernel, one pixel per clock.

Chosen here:

- **Number format.** The paper speaks of data "scaled to ten decimal places".
  That cannot hold values up to e^12 in 32 bits, so binary Q18.13 is used.
- **Row count.** 12 ordinary indices, one repeated, plus 6 expansion rows,
  19 rows in all. The paper gives no count. Its FPGA report shows about
  1 800 flip-flops, which is consistent with 19 rows of three 32-bit
  registers.
- **Latency.** The paper quotes 450 ns at 344.94 MHz. That is about 155
  clocks, which fits no plausible pipeline depth, so no cycle count was taken
  from it. This core's latency is 20 clocks.
- **Gain.** The paper's A_n formula leaves out the repeated row. Here it is
  included, as convergence requires.
- **Start vector.** The paper chooses the start values "by trial and error".
  Here X0 = 1/A_n and Y0 = 0.
- **Datapath details:** rounding of shifted terms, asynchronous reset, the
  valid/flag side channels, and the underflow rule for Gaussian arguments
  above the range.
- **How σ and K enter the Gaussian:** per point, as 1/(2σ²) and K. Also the
  8-bit coordinates.
- **The whole of `gauss_kernel` and `gauss_smooth`.** The paper gives their
  functions but no structure. Their structure, the 5×5 kernel, 8-bit pixels,
  256-pixel lines and the valid-only border rule are all choices made here.
- **The three-channel top.** The paper does not say how the sinh/cosh
  generator and the Gaussian share the chip.

Not covered:

- an FPGA-specific implementation (the paper's numbers are for a Xilinx
  Virtex-II);
- the vectoring mode of CORDIC, which the paper mentions only as background;
- tanh and atanh, which the paper names as computable but does not build.

## Simulation

Every file in `tb/` is a self-checking testbench. Each prints one line,
`TB_RESULT checks=N failures=M`, and has a watchdog.

| testbench | block | what it checks |
|---|---|---|
| `tb_cordic_hyp_stage` | one row | expansion row (i = −3) and ordinary row (i = 5) against integer reference arithmetic, reset |
| `tb_cordic_hyp` | core | 4 000 random (X0, Y0, Z0), Z0 over ±12.39, against A_n(X0 cosh + Y0 sinh) etc.; latency 20 |
| `tb_cordic_exp` | exp unit | cosh/sinh/exp against `$cosh`/`$sinh`/`$exp`, range flag, latency 21, gaps in valid |
| `tb_gauss2d` | Gaussian | random points, σ and K; underflow; latency 24; bit-exact symmetry of a 9×9 kernel |
| `tb_gauss_kernel` | kernel generator | K and the 25 coefficients for five σ (one with underflowing corners), sum = 1, ≤ 140 clocks, start while busy ignored |
| `tb_gauss_smooth` | smoothing filter (16-pixel lines) | three random frames with gaps against a direct convolution, saturation and clamping, output timing |
| `tb_cordic_gauss_top` | whole design, default parameters | all three channels together (see below) |

In `tb_cordic_gauss_top`, the three channels run as follows:

- **Angle channel:** random angles, some out of range.
- **Gaussian channel:** three normalised 9×9 kernels (σ = 1, 2, 3),
  interleaved point by point. Each must sum to 1.
- **Smoothing channel:** two generated kernels and three 256×8 frames,
  against a reference convolution. A flat frame must stay flat.

The testbench also counts, and requires, the following events:

- an out-of-range angle;
- an underflow;
- a back-to-back burst;
- gaps in the valid stream;
- a kernel switch;
- a kernel reload;
- a reset in mid-traffic.

To run one with Verilator 5 (the package first):

    verilator --binary --timing --assert \
      rtl/cordic_pkg.sv rtl/cordic_hyp_stage.sv rtl/cordic_hyp.sv rtl/cordic_exp.sv \
      rtl/gauss2d.sv rtl/gauss_kernel.sv rtl/gauss_smooth.sv rtl/cordic_gauss_top.sv \
      tb/tb_cordic_gauss_top.sv --top-module tb_cordic_gauss_top
    ./obj_dir/Vtb_cordic_gauss_top

For a block testbench, swap in its file and top-module name. Every testbench
finishes in well under a second. The testbenches use only `$urandom`, and
the reference values are computed inside them with real arithmetic, so no
data files are needed.
