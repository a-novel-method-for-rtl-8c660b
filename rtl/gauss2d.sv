// gauss2d: pipelined 2D Gaussian function generator,
//     F(x, y) = K * exp(-(x^2 + y^2) / (2 sigma^2)),
// with the exponential computed by the expanded-range hyperbolic CORDIC.
//
// Pipeline (one point per clock):
//   1. r2  = x^2 + y^2                             (two squarers, one adder)
//   2. arg = r2 * coef, coef = 1/(2 sigma^2)       (one multiplier)
//      If arg exceeds the CORDIC's range of convergence (12.43 with the
//      defaults) the point is marked as underflow: e^-arg is then below
//      4e-6, under half an LSB of the Q18.13 word, so the result is 0.
//      Otherwise z = -arg goes to the CORDIC.
//   3. e   = e^z from cordic_exp (cosh z + sinh z)
//   4. F   = K * e, rounded to the word format; 0 on underflow, and a
//      slightly negative e (a rounding residue) is clamped to 0.
// sigma and K enter with every point, so points of different kernels
// (the n = 1, 2, 3 of a multi-scale filter) may be interleaved freely.
//
// Interface: in_valid; px, py: signed integer coordinates of COORD_W bits;
// coef: unsigned fixed point 1/(2 sigma^2) with FRAC_BITS fractional bits;
// k_norm: the normalisation constant K, signed fixed point (FRAC_BITS).
// Out: out_valid, f_o (F, fixed point), exp_o (the exponential alone),
// underflow_o.
// Timing: LATENCY = 2 + cordic_exp latency + 1 = 24 clocks with defaults.
// The function and the use of the CORDIC exponential follow the published
// design; the coordinate width, the coefficient inputs, the underflow rule
// and the pipeline cut are this design's choices.
module gauss2d #(
  parameter int unsigned DATA_W    = cordic_pkg::DATA_W,
  parameter int unsigned FRAC_BITS = cordic_pkg::FRAC_BITS,
  parameter int unsigned NEG_ITERS = cordic_pkg::NEG_ITERS,
  parameter int unsigned POS_ITERS = cordic_pkg::POS_ITERS,
  parameter int unsigned COORD_W   = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [COORD_W-1:0] px,
  input  logic signed [COORD_W-1:0] py,
  input  logic        [DATA_W-1:0]  coef,
  input  logic signed [DATA_W-1:0]  k_norm,
  output logic                      out_valid,
  output logic signed [DATA_W-1:0]  f_o,
  output logic signed [DATA_W-1:0]  exp_o,
  output logic                      underflow_o
);

  localparam int R2_W   = 2 * COORD_W + 1;       // x^2 + y^2 <= 2^(2*COORD_W-1)
  localparam int ARG_W  = R2_W + DATA_W;
  localparam int EXP_LAT = cordic_pkg::num_stages(NEG_ITERS, POS_ITERS) + 2;
  localparam logic [ARG_W-1:0] ARG_MAX =
    ARG_W'(cordic_pkg::max_angle(NEG_ITERS, POS_ITERS, FRAC_BITS));

  // ---- stage 1: squares ----
  logic [R2_W-1:0]          r2_q;
  logic [DATA_W-1:0]        coef_q;
  logic signed [DATA_W-1:0] k1_q;
  logic                     v1_q;

  // Coordinates widened before squaring so the products do not wrap.
  logic signed [R2_W-1:0] px_w, py_w;
  assign px_w = R2_W'(px);
  assign py_w = R2_W'(py);

  // ---- stage 2: scaled argument ----
  logic [ARG_W-1:0]         arg;
  logic signed [DATA_W-1:0] z_q;
  logic signed [DATA_W-1:0] k2_q;
  logic                     v2_q, uf2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r2_q   <= '0;
      coef_q <= '0;
      k1_q   <= '0;
      v1_q   <= 1'b0;
      z_q    <= '0;
      k2_q   <= '0;
      v2_q   <= 1'b0;
      uf2_q  <= 1'b0;
    end else begin
      r2_q   <= R2_W'(px_w * px_w) + R2_W'(py_w * py_w);
      coef_q <= coef;
      k1_q   <= k_norm;
      v1_q   <= in_valid;
      uf2_q  <= arg > ARG_MAX;
      z_q    <= (arg > ARG_MAX) ? '0 : -DATA_W'(arg);
      k2_q   <= k1_q;
      v2_q   <= v1_q;
    end
  end

  assign arg = ARG_W'(r2_q) * ARG_W'(coef_q);

  // ---- stage 3: exponential ----
  logic                     ev;
  logic signed [DATA_W-1:0] e_val, e_cosh, e_sinh;
  logic                     e_rerr;

  cordic_exp #(
    .DATA_W   (DATA_W),
    .FRAC_BITS(FRAC_BITS),
    .NEG_ITERS(NEG_ITERS),
    .POS_ITERS(POS_ITERS)
  ) u_exp (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (v2_q),
    .z_in       (z_q),
    .out_valid  (ev),
    .cosh_o     (e_cosh),
    .sinh_o     (e_sinh),
    .exp_o      (e_val),
    .range_err_o(e_rerr)
  );

  // cosh, sinh and the range flag are not used here: z never leaves the
  // range, because larger arguments are diverted as underflow above.
  logic unused_exp;
  assign unused_exp = ^{e_cosh, e_sinh, e_rerr};

  // K and the underflow flag wait for the exponential.
  logic signed [DATA_W-1:0] k_dly [EXP_LAT];
  logic [EXP_LAT-1:0]       uf_dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < EXP_LAT; i++) k_dly[i] <= '0;
      uf_dly <= '0;
    end else begin
      k_dly[0] <= k2_q;
      for (int i = 1; i < EXP_LAT; i++) k_dly[i] <= k_dly[i-1];
      uf_dly <= {uf_dly[EXP_LAT-2:0], uf2_q};
    end
  end

  // ---- stage 4: scale by K ----
  logic signed [2*DATA_W-1:0] prod;
  logic                       uf3;

  // Only bits FRAC_BITS .. FRAC_BITS+DATA_W-1 of the product are kept: the
  // low bits are rounded away and the high bits are zero because e <= 1.
  logic unused_prod;
  assign unused_prod = ^{prod[2*DATA_W-1:FRAC_BITS+DATA_W], prod[FRAC_BITS-1:0]};

  assign uf3  = uf_dly[EXP_LAT-1];
  // Product rounded to nearest on the way back to the word format.
  assign prod = (2*DATA_W)'(e_val) * (2*DATA_W)'(k_dly[EXP_LAT-1])
              + ((2*DATA_W)'(1) <<< (FRAC_BITS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_o         <= '0;
      exp_o       <= '0;
      underflow_o <= 1'b0;
      out_valid   <= 1'b0;
    end else begin
      if (uf3 || e_val[DATA_W-1]) begin
        f_o   <= '0;
        exp_o <= '0;
      end else begin
        f_o   <= prod[FRAC_BITS +: DATA_W];
        exp_o <= e_val;
      end
      underflow_o <= uf3 & ev;
      out_valid   <= ev;
    end
  end

endmodule
