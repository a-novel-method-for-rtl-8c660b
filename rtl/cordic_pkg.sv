// cordic_pkg: shared constants and elaboration-time functions for the
// expanded-range hyperbolic CORDIC and the circuits built on it.
//
// Number format: every data word (x, y, z, results) is a two's-complement
// fixed-point number of DATA_W bits with FRAC_BITS fractional bits, so the
// value v is stored as round(v * 2^FRAC_BITS). With the defaults (32 bits,
// 13 fractional bits) a word holds -262144 .. +262144 with a resolution of
// 1.22e-4, enough for the largest intermediate (about 9.2e4) and for
// e^12 = 1.63e5.
//
// Stage schedule of the pipeline (one stage per micro-rotation):
//   stages 0 .. M          : negative indices i = -M .. 0 (expansion stages),
//                            factor t_i = 1 - 2^(i-2), angle atanh(t_i)
//   stages M+1 .. last     : positive indices i = 1 .. N, factor t_i = 2^-i,
//                            angle atanh(2^-i); indices 4, 13, 40, ... (k -> 3k+1)
//                            are run twice, as hyperbolic CORDIC needs for
//                            convergence.
// The angle constants and the gain correction 1/A_n are computed here from
// those formulas with real arithmetic while the design is elaborated, so
// they follow any change of M, N or FRAC_BITS; no table is stored.
package cordic_pkg;

  // Default sizes. DATA_W = 32 follows the 32-bit words of the design; the
  // rest are this implementation's choices (see README).
  parameter int unsigned DATA_W    = 32;
  parameter int unsigned FRAC_BITS = 13;
  parameter int unsigned NEG_ITERS = 5;   // M: indices -M..0 give range +-12.43
  parameter int unsigned POS_ITERS = 12;  // N: indices 1..N

  // True when index i (>= 1) is one of the repeated indices 4, 13, 40, ...
  function automatic bit is_repeat(input int i);
    int k;
    k = 4;
    while (k < i) k = 3 * k + 1;
    return (k == i);
  endfunction

  // Number of positive-index stages, repeats included.
  function automatic int num_pos_stages(input int n);
    int cnt;
    cnt = 0;
    for (int i = 1; i <= n; i++) cnt += is_repeat(i) ? 2 : 1;
    return cnt;
  endfunction

  // Total number of pipeline stages for M negative and N positive indices.
  function automatic int num_stages(input int m, input int n);
    return (m + 1) + num_pos_stages(n);
  endfunction

  // CORDIC index i of pipeline stage s (negative for expansion stages).
  function automatic int stage_index(input int m, input int s);
    int cnt;
    int i;
    if (s <= m) return s - m;
    cnt = m + 1;
    i = 1;
    forever begin
      if (cnt == s) return i;
      if (is_repeat(i)) begin
        cnt++;
        if (cnt == s) return i;
      end
      cnt++;
      i++;
    end
  endfunction

  // Shift amount of a stage: 2 - i for expansion stages, i otherwise.
  function automatic int stage_shift(input int idx);
    return (idx <= 0) ? (2 - idx) : idx;
  endfunction

  // Factor t_i of a stage as a real number.
  function automatic real stage_factor(input int idx);
    return (idx <= 0) ? (1.0 - 2.0 ** (idx - 2)) : (2.0 ** (-idx));
  endfunction

  function automatic real atanh_r(input real t);
    return 0.5 * $ln((1.0 + t) / (1.0 - t));
  endfunction

  // Rotation angle atanh(t_i) of a stage, rounded to the fixed-point grid.
  function automatic longint stage_angle(input int idx, input int frac);
    return longint'($rtoi(atanh_r(stage_factor(idx)) * (2.0 ** frac) + 0.5));
  endfunction

  // Gain A_n of the whole pipeline: product of sqrt(1 - t_i^2) over all stages.
  function automatic real gain_r(input int m, input int n);
    real a;
    a = 1.0;
    for (int s = 0; s < num_stages(m, n); s++)
      a = a * $sqrt(1.0 - stage_factor(stage_index(m, s)) ** 2);
    return a;
  endfunction

  // 1/A_n on the fixed-point grid: the x start value that makes x_n = cosh z.
  function automatic longint inv_gain(input int m, input int n, input int frac);
    return longint'($rtoi((2.0 ** frac) / gain_r(m, n) + 0.5));
  endfunction

  // Largest |z| the pipeline converges for: the sum of all stage angles.
  function automatic longint max_angle(input int m, input int n, input int frac);
    longint sum;
    sum = 0;
    for (int s = 0; s < num_stages(m, n); s++)
      sum += stage_angle(stage_index(m, s), frac);
    return sum;
  endfunction

endpackage
