// tb_gauss_smooth: self-checking test of the streaming smoothing filter,
// with a short line (IMG_W = 16) to keep the run small; the kernel is the
// default 5 x 5.
//
// Three frames of 16 x 10 random pixels are streamed with random gaps in
// pix_valid. Frame 1 uses a random kernel, frame 2 a kernel whose weights
// exceed one in sum (so outputs saturate at 255), frame 3 a negative centre
// weight (so outputs clamp at 0). Each frame starts with sof. For every
// frame the expected output, 12 x 6 pixels, is computed here directly from
// the stored image and coefficients: round(sum coef * pixel / 2^13),
// clamped to 0..255, in raster order. Output count per frame and the
// one-clock delay after the completing pixel are checked too.
module tb_gauss_smooth;
  localparam int W = 32;
  localparam int F = 13;
  localparam int K = 5;
  localparam int IW = 16;
  localparam int IH = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic coef_we = 1'b0;
  logic [4:0] coef_idx = '0;
  logic signed [W-1:0] coef_data = '0;
  logic pix_valid = 1'b0, sof = 1'b0;
  logic [7:0] pix = '0;
  logic out_valid;
  logic [7:0] out_pix;
  int checks = 0;
  int failures = 0;
  int img [IH][IW];
  longint cf [K*K];
  int expq[$];
  int n_sat = 0, n_clamp = 0;
  bit expect_next = 1'b0;
  bit expect_d = 1'b0;     // expect_next one clock later

  always #5 clk = ~clk;

  gauss_smooth #(.IMG_W(IW)) u_dut (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_idx(coef_idx),
    .coef_data(coef_data), .pix_valid(pix_valid), .sof(sof), .pix(pix),
    .out_valid(out_valid), .out_pix(out_pix));

  task automatic fail(input string msg);
    failures++;
    if (failures < 30) $display("FAIL %s", msg);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker; expect_next is set when the pixel that completes a
  // window was sent, so out_valid must follow exactly one clock later.
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== expect_d) fail("out_valid timing");
      if (out_valid) begin
        if (expq.size() == 0) fail("unexpected output");
        else begin
          int e;
          e = expq.pop_front();
          checks++;
          if (int'(out_pix) != e) fail($sformatf("pixel %0d expected %0d", out_pix, e));
          if (e == 255) n_sat++;
          if (e == 0) n_clamp++;
        end
      end
    end
    expect_d <= expect_next;
  end

  task automatic load_coefs();
    for (int i = 0; i < K * K; i++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_idx = 5'(i); coef_data = W'(cf[i]);
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  task automatic run_frame();
    // reference
    for (int r = 0; r + K <= IH; r++)
      for (int c = 0; c + K <= IW; c++) begin
        longint acc;
        acc = 0;
        for (int i = 0; i < K; i++)
          for (int j = 0; j < K; j++) acc += cf[i * K + j] * longint'(img[r + i][c + j]);
        acc = acc + (longint'(1) << (F - 1));
        acc = (acc >= 0) ? acc / (longint'(1) << F) : -((-acc + (longint'(1) << F) - 1) / (longint'(1) << F));
        if (acc < 0) acc = 0;
        if (acc > 255) acc = 255;
        expq.push_back(int'(acc));
      end
    // stream
    for (int r = 0; r < IH; r++)
      for (int c = 0; c < IW; c++) begin
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          pix_valid = 1'b0; sof = 1'b0; expect_next = 1'b0;
        end
        @(negedge clk);
        pix_valid = 1'b1;
        sof = (r == 0 && c == 0);
        pix = 8'(img[r][c]);
        expect_next = (r >= K - 1) && (c >= K - 1);
      end
    @(negedge clk);
    pix_valid = 1'b0; sof = 1'b0; expect_next = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (expq.size() != 0) fail($sformatf("%0d outputs missing", expq.size()));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // frame 1: random weights summing to about one
    for (int i = 0; i < K * K; i++) cf[i] = longint'($urandom_range(0, 655));
    load_coefs();
    for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) img[r][c] = int'($urandom_range(0, 255));
    run_frame();
    // frame 2: weights summing to about 3, bright image -> saturation
    for (int i = 0; i < K * K; i++) cf[i] = longint'($urandom_range(600, 1400));
    load_coefs();
    for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) img[r][c] = int'($urandom_range(0, 255));
    run_frame();
    // frame 3: negative centre -> clamping at 0
    for (int i = 0; i < K * K; i++) cf[i] = longint'($urandom_range(0, 300));
    cf[12] = -40000;
    load_coefs();
    for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) img[r][c] = int'($urandom_range(0, 255));
    run_frame();
    checks++;
    if (n_sat == 0 || n_clamp == 0) fail($sformatf("saturation %0d, clamp %0d", n_sat, n_clamp));
    $display("saturated %0d, clamped %0d", n_sat, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
