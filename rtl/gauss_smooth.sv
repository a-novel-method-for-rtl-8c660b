// gauss_smooth: streaming Gaussian smoothing filter. Each output pixel is
// the weighted average of the KSIZE x KSIZE input pixels around it, the
// weights being the coefficients of a normalised Gaussian kernel (loaded
// from gauss_kernel).
//
// Structure:
//   - coefficient registers, KSIZE^2 words, written through coef_we/idx/data
//     (index = row * KSIZE + column of the kernel, row 0 at the top);
//   - KSIZE-1 cascaded line buffers of IMG_W pixels, so that with every new
//     pixel a full column of the window becomes available;
//   - a KSIZE x KSIZE window register that shifts one column per pixel;
//   - a multiply-accumulate over the whole window, rounded to nearest and
//     clamped to the pixel range, registered at the output.
// One pixel is accepted per clock (pix_valid may have gaps). Pixels arrive
// in raster order, IMG_W per line; sof marks the first pixel of a frame.
// Only windows that lie wholly inside the frame produce output ("valid"
// convolution): the output frame is (IMG_W-KSIZE+1) pixels wide and
// starts KSIZE-1 lines late, and out_valid marks its pixels. The output
// comes one clock after the pixel that completes its window, i.e. the
// result for centre pixel (r, c) appears with input pixel (r+h, c+h),
// h = (KSIZE-1)/2, plus one clock.
//
// Pixels are unsigned PIX_W-bit integers; coefficients are signed DATA_W-bit
// fixed point with FRAC_BITS fractional bits.
// The filtering function follows the published description of Gaussian
// smoothing; the window size, line width, pixel width, border rule and
// the whole structure are this design's choices.
module gauss_smooth #(
  parameter int unsigned DATA_W    = cordic_pkg::DATA_W,
  parameter int unsigned FRAC_BITS = cordic_pkg::FRAC_BITS,
  parameter int unsigned KSIZE     = 5,
  parameter int unsigned PIX_W     = 8,
  parameter int unsigned IMG_W     = 256
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // coefficient load
  input  logic                                 coef_we,
  input  logic        [$clog2(KSIZE*KSIZE)-1:0] coef_idx,
  input  logic signed [DATA_W-1:0]             coef_data,
  // pixel stream in
  input  logic                                 pix_valid,
  input  logic                                 sof,
  input  logic        [PIX_W-1:0]              pix,
  // smoothed stream out
  output logic                                 out_valid,
  output logic        [PIX_W-1:0]              out_pix
);

  localparam int NPTS  = KSIZE * KSIZE;
  localparam int COL_W = $clog2(IMG_W);
  localparam int ROW_W = $clog2(KSIZE) + 1;
  localparam int ACC_W = PIX_W + DATA_W + $clog2(NPTS) + 1;

  logic signed [DATA_W-1:0] coef_r [NPTS];
  logic [PIX_W-1:0]         lbuf   [KSIZE-1][IMG_W];
  logic [PIX_W-1:0]         win    [KSIZE][KSIZE];   // [row][col], row 0 oldest
  logic [PIX_W-1:0]         col_new [KSIZE];         // column entering the window
  logic [COL_W-1:0]         col;
  logic [ROW_W-1:0]         rows_seen;               // saturates at KSIZE-1
  logic [COL_W-1:0]         col_eff;
  logic [ROW_W-1:0]         row_eff;
  logic                     win_ok;

  // A pixel flagged sof starts at column 0, row 0.
  assign col_eff = sof ? '0 : col;
  assign row_eff = sof ? '0 : rows_seen;

  // The new column: oldest line at index 0, the incoming pixel last.
  always_comb begin
    for (int r = 0; r < KSIZE - 1; r++) col_new[r] = lbuf[KSIZE-2-r][col_eff];
    col_new[KSIZE-1] = pix;
  end

  // Coefficients
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPTS; i++) coef_r[i] <= '0;
    end else if (coef_we) begin
      coef_r[coef_idx] <= coef_data;
    end
  end

  // Line buffers: lbuf[0] holds the previous line, lbuf[k] the line k+1 back.
  always_ff @(posedge clk) begin
    if (pix_valid) begin
      lbuf[0][col_eff] <= pix;
      for (int k = 1; k < KSIZE - 1; k++) lbuf[k][col_eff] <= lbuf[k-1][col_eff];
    end
  end

  // Position counters and window
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      rows_seen <= '0;
      for (int r = 0; r < KSIZE; r++)
        for (int c = 0; c < KSIZE; c++) win[r][c] <= '0;
    end else if (pix_valid) begin
      if (col_eff == COL_W'(IMG_W - 1)) begin
        col <= '0;
        if (row_eff != ROW_W'(KSIZE - 1)) rows_seen <= row_eff + 1'b1;
        else                              rows_seen <= row_eff;
      end else begin
        col       <= col_eff + 1'b1;
        rows_seen <= row_eff;
      end
      for (int r = 0; r < KSIZE; r++) begin
        for (int c = 0; c < KSIZE - 1; c++) win[r][c] <= win[r][c+1];
        win[r][KSIZE-1] <= col_new[r];
      end
    end
  end

  // The window is complete when the current pixel closes a full KSIZE x KSIZE
  // block of one frame.
  assign win_ok = pix_valid && (row_eff == ROW_W'(KSIZE - 1))
                            && (col_eff >= COL_W'(KSIZE - 1));

  // Weighted sum over the window as it will be after this clock's shift.
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] acc_rnd;

  always_comb begin
    acc = '0;
    for (int r = 0; r < KSIZE; r++) begin
      for (int c = 0; c < KSIZE - 1; c++)
        acc += ACC_W'($signed({1'b0, win[r][c+1]})) * ACC_W'(coef_r[r*KSIZE + c]);
      acc += ACC_W'($signed({1'b0, col_new[r]})) * ACC_W'(coef_r[r*KSIZE + KSIZE - 1]);
    end
    acc_rnd = (acc + (ACC_W'(1) <<< (FRAC_BITS - 1))) >>> FRAC_BITS;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= win_ok;
      if (win_ok) begin
        if (acc_rnd < 0)
          out_pix <= '0;
        else if (acc_rnd > ACC_W'((1 << PIX_W) - 1))
          out_pix <= '1;
        else
          out_pix <= PIX_W'(acc_rnd);
      end
    end
  end

endmodule
