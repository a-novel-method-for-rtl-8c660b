// cordic_hyp: expanded-range hyperbolic CORDIC, rotation mode, fully
// unrolled and pipelined.
//
// The three 32-bit inputs are caught in an input register and then pass
// through a chain of cordic_hyp_stage rows, one per micro-rotation:
// NEG_ITERS+1 expansion rows (indices -M .. 0) that widen the range of
// convergence, then the ordinary rows for indices 1 .. POS_ITERS with
// indices 4, 13, 40, ... doubled. Each row's direction is the sign of its
// own z, so z is driven toward zero and on the way out
//     Xout = A_n (X0 cosh Z0 + Y0 sinh Z0)
//     Yout = A_n (Y0 cosh Z0 + X0 sinh Z0)
//     Zout = residual angle (close to 0)
// where A_n = product of sqrt(1 - t_i^2) over all rows (A_n = 5.03e-4 for
// the defaults). Starting from X0 = 1/A_n, Y0 = 0 gives cosh and sinh
// directly. Convergence holds for |Z0| up to the sum of the row angles,
// 12.43 with NEG_ITERS = 5.
//
// Interface follows the block's published signal list: clock, active-low
// reset (asynchronous here), X0/Y0/Z0 in and Xout/Yout/Zout out, all
// DATA_W-bit signed fixed point with FRAC_BITS fractional bits.
// Timing: LATENCY = rows + 1 clocks (20 with the defaults: the input
// register and 19 rows); a new input is accepted every clock.
// The number of rows and the fixed-point format are this design's choices;
// the word width, the row structure and the recurrences are the published
// ones.
module cordic_hyp #(
  parameter int unsigned DATA_W    = cordic_pkg::DATA_W,
  parameter int unsigned FRAC_BITS = cordic_pkg::FRAC_BITS,
  parameter int unsigned NEG_ITERS = cordic_pkg::NEG_ITERS,
  parameter int unsigned POS_ITERS = cordic_pkg::POS_ITERS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] x0,
  input  logic signed [DATA_W-1:0] y0,
  input  logic signed [DATA_W-1:0] z0,
  output logic signed [DATA_W-1:0] xout,
  output logic signed [DATA_W-1:0] yout,
  output logic signed [DATA_W-1:0] zout
);

  localparam int NSTAGES = cordic_pkg::num_stages(NEG_ITERS, POS_ITERS);

  // Row s reads element s and writes element s+1.
  logic signed [DATA_W-1:0] xs [NSTAGES+1];
  logic signed [DATA_W-1:0] ys [NSTAGES+1];
  logic signed [DATA_W-1:0] zs [NSTAGES+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
    end else begin
      xs[0] <= x0;
      ys[0] <= y0;
      zs[0] <= z0;
    end
  end

  for (genvar s = 0; s < NSTAGES; s++) begin : g_row
    cordic_hyp_stage #(
      .DATA_W   (DATA_W),
      .FRAC_BITS(FRAC_BITS),
      .INDEX    (cordic_pkg::stage_index(NEG_ITERS, s))
    ) u_stage (
      .clk  (clk),
      .rst_n(rst_n),
      .x_i  (xs[s]),
      .y_i  (ys[s]),
      .z_i  (zs[s]),
      .x_o  (xs[s+1]),
      .y_o  (ys[s+1]),
      .z_o  (zs[s+1])
    );
  end

  assign xout = xs[NSTAGES];
  assign yout = ys[NSTAGES];
  assign zout = zs[NSTAGES];

endmodule
