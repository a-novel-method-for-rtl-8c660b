// gauss_kernel: generator of a normalised KSIZE x KSIZE Gaussian kernel,
//     F(x, y) = K exp(-(x^2 + y^2) / (2 sigma^2)),  K = 1 / sum of exp(...)
// over x, y = -(KSIZE-1)/2 .. +(KSIZE-1)/2, so the coefficients sum to one.
//
// It drives one gauss2d pipeline in three phases after a start pulse:
//   SUM  : all KSIZE^2 points are issued back to back with K = 1 and the
//          returned exponentials are accumulated.
//   DIV  : K = round(2^(2*FRAC_BITS) / sum) by a serial restoring divider,
//          one quotient bit per clock (QW = 2*FRAC_BITS+2 clocks).
//   EMIT : the points are issued again with that K; each result leaves on
//          the coefficient port in raster order (y outer, x inner, both
//          from -(KSIZE-1)/2 upward) with its index y'*KSIZE + x'.
// done pulses for one clock after the last coefficient. A start while busy
// is ignored.
//
// Interface: start, coef (1/(2 sigma^2), unsigned, FRAC_BITS fractional
// bits); out: busy, done, k_o (the K found, held until the next run),
// kc_valid, kc_idx, kc_data (coefficient, same fixed-point format).
// Timing with defaults (KSIZE = 5): 25 + 24 clocks for SUM, 28 for DIV,
// 25 + 24 for EMIT, about 130 clocks per kernel.
// The normalisation formula is the published one; computing it by a second
// pass and a serial divider, and the kernel size, are this design's choices.
module gauss_kernel #(
  parameter int unsigned DATA_W    = cordic_pkg::DATA_W,
  parameter int unsigned FRAC_BITS = cordic_pkg::FRAC_BITS,
  parameter int unsigned NEG_ITERS = cordic_pkg::NEG_ITERS,
  parameter int unsigned POS_ITERS = cordic_pkg::POS_ITERS,
  parameter int unsigned KSIZE     = 5
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic        [DATA_W-1:0]       coef,
  output logic                           busy,
  output logic                           done,
  output logic signed [DATA_W-1:0]       k_o,
  output logic                           kc_valid,
  output logic        [$clog2(KSIZE*KSIZE)-1:0] kc_idx,
  output logic signed [DATA_W-1:0]       kc_data
);

  localparam int NPTS  = KSIZE * KSIZE;
  localparam int IDX_W = $clog2(NPTS);
  localparam int HALF  = (KSIZE - 1) / 2;
  localparam int CW    = $clog2(KSIZE) + 2;       // signed coordinate width
  localparam int QW    = 2 * FRAC_BITS + 2;       // quotient / dividend width
  localparam int SUM_W = DATA_W + IDX_W;
  localparam logic [63:0] ONE_SQ = 64'(1) << (2 * FRAC_BITS);   // 1.0 * 2^FRAC

  typedef enum logic [2:0] {S_IDLE, S_SUM, S_DIV, S_EMIT} state_t;
  state_t state;

  logic [IDX_W:0]           n_issued, n_recv;
  logic signed [CW-1:0]     ix, iy;               // coordinates being issued
  logic [DATA_W-1:0]        coef_q;
  logic [SUM_W-1:0]         sum;
  logic [QW-1:0]            div_num;
  logic [QW-2:0]            quot;                 // all but the last quotient bit
  logic [SUM_W-1:0]         rem;                  // remainder, always < sum
  logic [$clog2(QW+1)-1:0]  div_cnt;

  // gauss2d interface
  logic                     g_in_valid, g_out_valid, g_uf;
  logic signed [DATA_W-1:0] g_k, g_f, g_exp;

  gauss2d #(
    .DATA_W   (DATA_W),
    .FRAC_BITS(FRAC_BITS),
    .NEG_ITERS(NEG_ITERS),
    .POS_ITERS(POS_ITERS),
    .COORD_W  (CW)
  ) u_gauss (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (g_in_valid),
    .px         (ix),
    .py         (iy),
    .coef       (coef_q),
    .k_norm     (g_k),
    .out_valid  (g_out_valid),
    .f_o        (g_f),
    .exp_o      (g_exp),
    .underflow_o(g_uf)
  );

  // Underflowed points return 0 and need no special handling here.
  logic unused_uf;
  assign unused_uf = g_uf;

  assign g_in_valid = ((state == S_SUM) || (state == S_EMIT)) && (n_issued < (IDX_W+1)'(NPTS));
  assign g_k        = (state == S_SUM) ? DATA_W'(longint'(1) <<< FRAC_BITS) : k_o;
  assign busy       = (state != S_IDLE);

  // Divider step: shift in the next dividend bit, subtract if possible.
  logic [SUM_W:0] rem_sh;
  assign rem_sh = {rem, div_num[QW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      n_issued <= '0;
      n_recv   <= '0;
      ix       <= '0;
      iy       <= '0;
      coef_q   <= '0;
      sum      <= '0;
      div_num  <= '0;
      quot     <= '0;
      rem      <= '0;
      div_cnt  <= '0;
      k_o      <= '0;
      done     <= 1'b0;
      kc_valid <= 1'b0;
      kc_idx   <= '0;
      kc_data  <= '0;
    end else begin
      done     <= 1'b0;
      kc_valid <= 1'b0;

      // coordinate sweep, shared by both passes
      if (g_in_valid) begin
        n_issued <= n_issued + 1'b1;
        if (ix == CW'(HALF)) begin
          ix <= -CW'(HALF);
          iy <= iy + 1'b1;
        end else begin
          ix <= ix + 1'b1;
        end
      end

      unique case (state)
        S_IDLE: begin
          if (start) begin
            state    <= S_SUM;
            coef_q   <= coef;
            sum      <= '0;
            n_issued <= '0;
            n_recv   <= '0;
            ix       <= -CW'(HALF);
            iy       <= -CW'(HALF);
          end
        end

        S_SUM: begin
          if (g_out_valid) begin
            sum    <= sum + SUM_W'(g_exp);
            n_recv <= n_recv + 1'b1;
            if (n_recv == (IDX_W+1)'(NPTS - 1)) begin
              state   <= S_DIV;
              // dividend 2^(2F) + sum/2 gives a rounded quotient
              div_num <= QW'(ONE_SQ + 64'(SUM_W'(sum + SUM_W'(g_exp)) >> 1));
              sum     <= sum + SUM_W'(g_exp);
              rem     <= '0;
              quot    <= '0;
              div_cnt <= '0;
            end
          end
        end

        S_DIV: begin
          div_num <= div_num << 1;
          if (rem_sh >= (SUM_W+1)'(sum)) begin
            rem  <= SUM_W'(rem_sh - (SUM_W+1)'(sum));
            quot <= {quot[QW-3:0], 1'b1};
          end else begin
            rem  <= SUM_W'(rem_sh);
            quot <= {quot[QW-3:0], 1'b0};
          end
          div_cnt <= div_cnt + 1'b1;
          if (div_cnt == ($clog2(QW+1))'(QW - 1)) begin
            state    <= S_EMIT;
            n_issued <= '0;
            n_recv   <= '0;
            ix       <= -CW'(HALF);
            iy       <= -CW'(HALF);
          end
        end

        S_EMIT: begin
          if (g_out_valid) begin
            kc_valid <= 1'b1;
            kc_idx   <= IDX_W'(n_recv);
            kc_data  <= g_f;
            n_recv   <= n_recv + 1'b1;
            if (n_recv == (IDX_W+1)'(NPTS - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end

        default: state <= S_IDLE;
      endcase

      // K is ready one clock after the last division step
      if (state == S_DIV && div_cnt == ($clog2(QW+1))'(QW - 1))
        k_o <= DATA_W'({quot, (rem_sh >= (SUM_W+1)'(sum))});
    end
  end

endmodule
