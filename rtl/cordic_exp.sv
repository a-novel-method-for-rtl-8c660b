// cordic_exp: hyperbolic sine, cosine and exponential of an angle, using
// e^z = cosh z + sinh z.
//
// The angle goes to cordic_hyp as Z0 with the constant start vector
// X0 = 1/A_n (the gain correction, computed at elaboration) and Y0 = 0, so
// the pipeline returns Xout = cosh z and Yout = sinh z. One more register
// adds the two to give e^z and keeps cosh and sinh aligned with it.
// A valid bit and an out-of-range flag travel beside the data in a shift
// register of the same length; the CORDIC core itself has no handshake.
// range_err_o marks a result whose angle lay outside the range of
// convergence (|z| > sum of the row angles, 12.43 with the defaults); such
// results are computed anyway and are not meaningful.
//
// Interface: in_valid/z_in in; out_valid, cosh_o, sinh_o, exp_o, range_err_o
// out. All words are DATA_W-bit signed fixed point with FRAC_BITS fractional
// bits (e^12 = 162755 fits the default Q18.13 word).
// Timing: LATENCY = cordic latency + 1 = 21 clocks with the defaults, one
// result per clock. The valid/flag side channel is this design's addition.
module cordic_exp #(
  parameter int unsigned DATA_W    = cordic_pkg::DATA_W,
  parameter int unsigned FRAC_BITS = cordic_pkg::FRAC_BITS,
  parameter int unsigned NEG_ITERS = cordic_pkg::NEG_ITERS,
  parameter int unsigned POS_ITERS = cordic_pkg::POS_ITERS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] z_in,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] cosh_o,
  output logic signed [DATA_W-1:0] sinh_o,
  output logic signed [DATA_W-1:0] exp_o,
  output logic                     range_err_o
);

  localparam int LATENCY = cordic_pkg::num_stages(NEG_ITERS, POS_ITERS) + 2;
  localparam logic signed [DATA_W-1:0] X_START =
    DATA_W'(cordic_pkg::inv_gain(NEG_ITERS, POS_ITERS, FRAC_BITS));
  localparam logic signed [DATA_W:0] Z_MAX =
    (DATA_W+1)'(cordic_pkg::max_angle(NEG_ITERS, POS_ITERS, FRAC_BITS));

  logic signed [DATA_W-1:0] xc, yc, zc;
  logic signed [DATA_W:0]   z_abs;
  logic                     out_of_range;

  cordic_hyp #(
    .DATA_W   (DATA_W),
    .FRAC_BITS(FRAC_BITS),
    .NEG_ITERS(NEG_ITERS),
    .POS_ITERS(POS_ITERS)
  ) u_cordic (
    .clk  (clk),
    .rst_n(rst_n),
    .x0   (X_START),
    .y0   ('0),
    .z0   (z_in),
    .xout (xc),
    .yout (yc),
    .zout (zc)
  );

  // The residual angle zc is not needed for the exponential.
  logic unused_zc;
  assign unused_zc = ^zc;

  always_comb begin
    z_abs        = z_in[DATA_W-1] ? -(DATA_W+1)'(z_in) : (DATA_W+1)'(z_in);
    out_of_range = z_abs > Z_MAX;
  end

  // Side channel: valid and range flag, LATENCY clocks long.
  logic [LATENCY-1:0] vld_sr, err_sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_sr <= '0;
      err_sr <= '0;
      cosh_o <= '0;
      sinh_o <= '0;
      exp_o  <= '0;
    end else begin
      vld_sr <= {vld_sr[LATENCY-2:0], in_valid};
      err_sr <= {err_sr[LATENCY-2:0], in_valid & out_of_range};
      cosh_o <= xc;
      sinh_o <= yc;
      exp_o  <= xc + yc;
    end
  end

  assign out_valid   = vld_sr[LATENCY-1];
  assign range_err_o = err_sr[LATENCY-1];

endmodule
