// cordic_hyp_stage: one micro-rotation of the expanded-range hyperbolic
// CORDIC in rotation mode, followed by its pipeline register.
//
// The stage computes, with d = +1 when z >= 0 and -1 otherwise,
//     x' = x + d * t * y
//     y' = y + d * t * x
//     z' = z - d * atanh(t)
// where the factor t depends on the CORDIC index INDEX:
//   INDEX <= 0 (expansion stage): t = 1 - 2^(INDEX-2), formed as y - (y >>> (2-INDEX))
//   INDEX  > 0 (ordinary stage) : t = 2^-INDEX,        formed as y >>> INDEX
// so only shifters and adders are used. The sign of z picks add or subtract
// in all three adders, and the angle atanh(t) is a hard-wired constant,
// which is the row structure of the pipelined architecture: two cross-
// coupled shifters, three add/subtract units, one constant. The per-stage
// scale factor k_i is not applied; the caller compensates the whole gain
// A_n once through the start value of x.
//
// Interface: x_i, y_i, z_i in, x_o, y_o, z_o out, all DATA_W-bit signed
// fixed point with FRAC_BITS fractional bits. Timing: one clock of latency,
// a new input every clock. rst_n is an asynchronous, active-low reset that
// clears the register (reset style is this design's choice).
// Shifted terms are rounded to nearest, ties toward plus infinity.
module cordic_hyp_stage #(
  parameter int unsigned DATA_W    = cordic_pkg::DATA_W,
  parameter int unsigned FRAC_BITS = cordic_pkg::FRAC_BITS,
  parameter int          INDEX     = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] x_i,
  input  logic signed [DATA_W-1:0] y_i,
  input  logic signed [DATA_W-1:0] z_i,
  output logic signed [DATA_W-1:0] x_o,
  output logic signed [DATA_W-1:0] y_o,
  output logic signed [DATA_W-1:0] z_o
);

  localparam int unsigned SHIFT = cordic_pkg::stage_shift(INDEX);
  localparam logic signed [DATA_W-1:0] ANGLE =
    DATA_W'(cordic_pkg::stage_angle(INDEX, FRAC_BITS));

  logic signed [DATA_W-1:0] tx, ty;   // t * y and t * x
  logic signed [DATA_W-1:0] x_n, y_n, z_n;
  logic                     z_neg;    // d = -1

  // Shifted operands rounded to nearest (half an LSB of the shifted value
  // added before the shift) so that truncation errors do not pile up
  // along the pipeline.
  localparam logic signed [DATA_W-1:0] HALF = DATA_W'(1) <<< (SHIFT - 1);
  logic signed [DATA_W-1:0] ys, xs;   // y >>> SHIFT and x >>> SHIFT, rounded

  always_comb begin
    ys = (y_i + HALF) >>> SHIFT;
    xs = (x_i + HALF) >>> SHIFT;
    if (INDEX <= 0) begin
      tx = y_i - ys;
      ty = x_i - xs;
    end else begin
      tx = ys;
      ty = xs;
    end
    z_neg = z_i[DATA_W-1];
    if (z_neg) begin
      x_n = x_i - tx;
      y_n = y_i - ty;
      z_n = z_i + ANGLE;
    end else begin
      x_n = x_i + tx;
      y_n = y_i + ty;
      z_n = z_i - ANGLE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_o <= '0;
      y_o <= '0;
      z_o <= '0;
    end else begin
      x_o <= x_n;
      y_o <= y_n;
      z_o <= z_n;
    end
  end

endmodule
