// cordic_gauss_top: the complete design, three channels built on the
// expanded-range hyperbolic CORDIC.
//
//   Angle channel    (cordic_exp): for an angle z in (-12.43, +12.43) it
//                    returns cosh z, sinh z and e^z = cosh z + sinh z,
//                    flagging angles outside the range of convergence.
//   Gaussian channel (gauss2d)   : for a point (x, y), a coefficient
//                    1/(2 sigma^2) and a normalisation constant K it returns
//                    F = K exp(-(x^2+y^2)/(2 sigma^2)), flagging points whose
//                    value underflows the word format.
//   Smoothing channel (gauss_kernel + gauss_smooth): on krn_start_i the
//                    kernel generator builds a normalised KSIZE x KSIZE
//                    Gaussian kernel for the given 1/(2 sigma^2) and loads
//                    it, coefficient by coefficient, into the smoothing
//                    filter, which convolves a raster pixel stream of IMG_W
//                    pixels per line with it, one pixel per clock. The
//                    coefficients are also brought out on the krn_* ports.
// Each channel has its own CORDIC pipeline, so all take a new input every
// clock and run independently. Latencies with the defaults: 21 clocks for
// the angle channel, 24 for the Gaussian channel, about 127 clocks to
// build a kernel, and one clock after the pixel that completes a window
// for the smoothing filter. Pixels should not be streamed while a new
// kernel is being loaded (krn_busy_o high), or they mix old and new
// weights.
//
// Data words are DATA_W-bit signed fixed point with FRAC_BITS fractional
// bits (Q18.13 by default); coordinates are COORD_W-bit signed integers.
// Pixels are PIX_W-bit unsigned. Reset is asynchronous and active low.
// Putting the channels side by side in one top is this design's
// arrangement; each channel computes a function the design is built for.
module cordic_gauss_top #(
  parameter int unsigned DATA_W    = cordic_pkg::DATA_W,
  parameter int unsigned FRAC_BITS = cordic_pkg::FRAC_BITS,
  parameter int unsigned NEG_ITERS = cordic_pkg::NEG_ITERS,
  parameter int unsigned POS_ITERS = cordic_pkg::POS_ITERS,
  parameter int unsigned COORD_W   = 8,
  parameter int unsigned KSIZE     = 5,
  parameter int unsigned PIX_W     = 8,
  parameter int unsigned IMG_W     = 256
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // angle channel
  input  logic                      ang_valid_i,
  input  logic signed [DATA_W-1:0]  ang_z_i,
  output logic                      ang_valid_o,
  output logic signed [DATA_W-1:0]  ang_cosh_o,
  output logic signed [DATA_W-1:0]  ang_sinh_o,
  output logic signed [DATA_W-1:0]  ang_exp_o,
  output logic                      ang_range_err_o,
  // Gaussian channel
  input  logic                      gau_valid_i,
  input  logic signed [COORD_W-1:0] gau_x_i,
  input  logic signed [COORD_W-1:0] gau_y_i,
  input  logic        [DATA_W-1:0]  gau_coef_i,
  input  logic signed [DATA_W-1:0]  gau_k_i,
  output logic                      gau_valid_o,
  output logic signed [DATA_W-1:0]  gau_f_o,
  output logic signed [DATA_W-1:0]  gau_exp_o,
  output logic                      gau_underflow_o,
  // smoothing channel: kernel generation
  input  logic                      krn_start_i,
  input  logic        [DATA_W-1:0]  krn_coef_i,
  output logic                      krn_busy_o,
  output logic                      krn_done_o,
  output logic signed [DATA_W-1:0]  krn_k_o,
  output logic                      krn_valid_o,
  output logic [$clog2(KSIZE*KSIZE)-1:0] krn_idx_o,
  output logic signed [DATA_W-1:0]  krn_data_o,
  // smoothing channel: pixels
  input  logic                      pix_valid_i,
  input  logic                      pix_sof_i,
  input  logic        [PIX_W-1:0]   pix_i,
  output logic                      pix_valid_o,
  output logic        [PIX_W-1:0]   pix_o
);

  cordic_exp #(
    .DATA_W   (DATA_W),
    .FRAC_BITS(FRAC_BITS),
    .NEG_ITERS(NEG_ITERS),
    .POS_ITERS(POS_ITERS)
  ) u_angle (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (ang_valid_i),
    .z_in       (ang_z_i),
    .out_valid  (ang_valid_o),
    .cosh_o     (ang_cosh_o),
    .sinh_o     (ang_sinh_o),
    .exp_o      (ang_exp_o),
    .range_err_o(ang_range_err_o)
  );

  gauss2d #(
    .DATA_W   (DATA_W),
    .FRAC_BITS(FRAC_BITS),
    .NEG_ITERS(NEG_ITERS),
    .POS_ITERS(POS_ITERS),
    .COORD_W  (COORD_W)
  ) u_gauss (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (gau_valid_i),
    .px         (gau_x_i),
    .py         (gau_y_i),
    .coef       (gau_coef_i),
    .k_norm     (gau_k_i),
    .out_valid  (gau_valid_o),
    .f_o        (gau_f_o),
    .exp_o      (gau_exp_o),
    .underflow_o(gau_underflow_o)
  );

  gauss_kernel #(
    .DATA_W   (DATA_W),
    .FRAC_BITS(FRAC_BITS),
    .NEG_ITERS(NEG_ITERS),
    .POS_ITERS(POS_ITERS),
    .KSIZE    (KSIZE)
  ) u_kernel (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (krn_start_i),
    .coef    (krn_coef_i),
    .busy    (krn_busy_o),
    .done    (krn_done_o),
    .k_o     (krn_k_o),
    .kc_valid(krn_valid_o),
    .kc_idx  (krn_idx_o),
    .kc_data (krn_data_o)
  );

  gauss_smooth #(
    .DATA_W   (DATA_W),
    .FRAC_BITS(FRAC_BITS),
    .KSIZE    (KSIZE),
    .PIX_W    (PIX_W),
    .IMG_W    (IMG_W)
  ) u_smooth (
    .clk      (clk),
    .rst_n    (rst_n),
    .coef_we  (krn_valid_o),
    .coef_idx (krn_idx_o),
    .coef_data(krn_data_o),
    .pix_valid(pix_valid_i),
    .sof      (pix_sof_i),
    .pix      (pix_i),
    .out_valid(pix_valid_o),
    .out_pix  (pix_o)
  );

endmodule
