// tb_cordic_gauss_top: end-to-end test of the whole design at its default
// parameters (no parameter is overridden).
//
// Both channels run at the same time:
//   angle channel    - random angles, some outside the range, with gaps;
//                      results checked against $cosh, $sinh, $exp, and the
//                      range flag checked.
//   Gaussian channel - three normalised kernels (sigma = 1, 2, 3, as in a
//                      three-scale filter), 9 x 9 points each, sent back to
//                      back and interleaved point by point; K for each is
//                      1 / (sum of its exponentials), computed here. Every
//                      F is compared with K exp(-(x^2+y^2)/(2 sigma^2)), and
//                      each kernel's outputs must sum to 1 within 0.5 %
//                      (within 0.2 % of the sum that K, rounded to the
//                      word format, predicts).
//                      A wide sigma = 0.5 sweep at large radius forces
//                      underflow.
//   smoothing channel - kernels for sigma = 1 and sigma = 2 are generated
//                      and loaded into the filter; after each, a frame of
//                      256 x 8 random pixels is filtered and compared with a
//                      convolution computed here from the coefficients seen
//                      on the krn_* ports; the coefficients must sum to 1
//                      within 0.6 %, and a flat frame must come out flat.
// Mechanisms counted, each must occur at least once: angle out of range,
// Gaussian underflow, a run of 100 back-to-back valid inputs on both
// channels, a gap in the valid stream, a kernel switch between consecutive
// points, a kernel reload, and a reset in the middle of traffic that
// empties the pipelines.
// Latencies of 21 and 24 clocks are checked on single samples.
module tb_cordic_gauss_top;
  localparam int W = 32;
  localparam int F = 13;
  localparam real SC = 2.0 ** F;
  localparam int LAT_A = 21;
  localparam int LAT_G = 24;
  localparam longint ZMAX = 101800;

  typedef struct {
    int     x;
    int     y;
    longint c;
    longint k;
    int     kern;   // kernel number, -1 for points outside a kernel
  } point_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ang_valid_i = 1'b0;
  logic signed [W-1:0] ang_z_i = '0;
  logic ang_valid_o, ang_range_err_o;
  logic signed [W-1:0] ang_cosh_o, ang_sinh_o, ang_exp_o;
  logic gau_valid_i = 1'b0;
  logic signed [7:0] gau_x_i = '0, gau_y_i = '0;
  logic [W-1:0] gau_coef_i = '0;
  logic signed [W-1:0] gau_k_i = '0;
  logic gau_valid_o, gau_underflow_o;
  logic signed [W-1:0] gau_f_o, gau_exp_o;
  logic krn_start_i = 1'b0;
  logic [W-1:0] krn_coef_i = '0;
  logic krn_busy_o, krn_done_o, krn_valid_o;
  logic signed [W-1:0] krn_k_o, krn_data_o;
  logic [4:0] krn_idx_o;
  logic pix_valid_i = 1'b0, pix_sof_i = 1'b0;
  logic [7:0] pix_i = '0;
  logic pix_valid_o;
  logic [7:0] pix_o;
  localparam int KS = 5;
  localparam int IW = 256;
  localparam int IH = 8;
  longint kcoef [KS*KS];
  int img [IH][IW];
  int pq[$];
  int n_pix_out = 0;

  int checks = 0;
  int failures = 0;
  longint aq[$];
  point_t gq[$];
  real ksum [3];
  real kexp [3];
  int  kcnt [3];
  // mechanism counters
  int m_range = 0, m_uf = 0, m_burst = 0, m_gap = 0, m_switch = 0, m_reset = 0;
  int m_reload = 0;

  always #5 clk = ~clk;

  cordic_gauss_top u_dut (
    .clk(clk), .rst_n(rst_n),
    .ang_valid_i(ang_valid_i), .ang_z_i(ang_z_i), .ang_valid_o(ang_valid_o),
    .ang_cosh_o(ang_cosh_o), .ang_sinh_o(ang_sinh_o), .ang_exp_o(ang_exp_o),
    .ang_range_err_o(ang_range_err_o),
    .gau_valid_i(gau_valid_i), .gau_x_i(gau_x_i), .gau_y_i(gau_y_i),
    .gau_coef_i(gau_coef_i), .gau_k_i(gau_k_i), .gau_valid_o(gau_valid_o),
    .gau_f_o(gau_f_o), .gau_exp_o(gau_exp_o), .gau_underflow_o(gau_underflow_o),
    .krn_start_i(krn_start_i), .krn_coef_i(krn_coef_i), .krn_busy_o(krn_busy_o),
    .krn_done_o(krn_done_o), .krn_k_o(krn_k_o), .krn_valid_o(krn_valid_o),
    .krn_idx_o(krn_idx_o), .krn_data_o(krn_data_o),
    .pix_valid_i(pix_valid_i), .pix_sof_i(pix_sof_i), .pix_i(pix_i),
    .pix_valid_o(pix_valid_o), .pix_o(pix_o));

  // ---- smoothing channel: coefficient capture and pixel checker ----
  always @(posedge clk) begin
    if (rst_n && krn_valid_o) kcoef[krn_idx_o] = longint'(krn_data_o);
    if (rst_n && pix_valid_o) begin
      n_pix_out++;
      if (pq.size() == 0) fail("unexpected smoothed pixel");
      else begin
        int e;
        e = pq.pop_front();
        checks++;
        if (int'(pix_o) != e) fail($sformatf("smoothed pixel %0d expected %0d", pix_o, e));
      end
    end
  end

  task automatic make_kernel(input real sigma);
    real csum;
    int cyc;
    @(negedge clk);
    krn_coef_i = W'(longint'($rtoi(SC / (2.0 * sigma * sigma) + 0.5)));
    krn_start_i = 1'b1;
    @(negedge clk);
    krn_start_i = 1'b0;
    cyc = 0;
    while (!krn_done_o && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    csum = 0.0;
    for (int i = 0; i < KS * KS; i++) csum += real'(kcoef[i]) / SC;
    checks += 2;
    if (cyc >= 1000) fail("kernel generation did not finish");
    if (absr(csum - 1.0) > 0.006) fail($sformatf("kernel sums to %f", csum));
    // symmetry of the loaded kernel
    for (int r = 0; r < KS; r++)
      for (int c = 0; c < KS; c++) begin
        checks++;
        if (kcoef[r * KS + c] != kcoef[c * KS + r] || kcoef[r * KS + c] != kcoef[r * KS + KS - 1 - c])
          fail("kernel not symmetric");
      end
    $display("kernel sigma=%f K=%0d sum=%f in %0d clocks", sigma, krn_k_o, csum, cyc + 2);
    m_reload++;
  endtask

  task automatic smooth_frame(input bit flat);
    for (int r = 0; r < IH; r++)
      for (int c = 0; c < IW; c++) img[r][c] = flat ? 100 : int'($urandom_range(0, 255));
    for (int r = 0; r + KS <= IH; r++)
      for (int c = 0; c + KS <= IW; c++) begin
        longint acc;
        acc = 0;
        for (int i = 0; i < KS; i++)
          for (int j = 0; j < KS; j++) acc += kcoef[i * KS + j] * longint'(img[r + i][c + j]);
        acc = (acc + (longint'(1) << (F - 1))) / (longint'(1) << F);
        if (acc > 255) acc = 255;
        if (flat) begin
          checks++;
          if (acc < 99 || acc > 101) fail($sformatf("flat frame gives %0d", acc));
        end
        pq.push_back(int'(acc));
      end
    for (int r = 0; r < IH; r++)
      for (int c = 0; c < IW; c++) begin
        @(negedge clk);
        pix_valid_i = 1'b1;
        pix_sof_i = (r == 0 && c == 0);
        pix_i = 8'(img[r][c]);
      end
    @(negedge clk);
    pix_valid_i = 1'b0;
    pix_sof_i = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (pq.size() != 0) fail($sformatf("%0d smoothed pixels missing", pq.size()));
  endtask

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 30) $display("FAIL %s", msg);
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- angle channel checker ----
  always @(posedge clk) begin
    if (rst_n && ang_valid_o) begin
      longint z;
      real zr, c, s, e;
      bit oor;
      if (aq.size() == 0) begin
        fail("unexpected angle result");
      end else begin
        z = aq.pop_front();
        oor = (z > ZMAX) || (z < -ZMAX);
        checks++;
        if (ang_range_err_o !== oor) fail($sformatf("range flag for z=%0d", z));
        if (ang_range_err_o) m_range++;
        if (!oor) begin
          zr = real'(z) / SC;
          c = $cosh(zr) * SC; s = $sinh(zr) * SC; e = $exp(zr) * SC;
          checks += 3;
          if (absr(real'(ang_cosh_o) - c) > 6.0e-4 * c + 40.0) fail($sformatf("cosh z=%0d", z));
          if (absr(real'(ang_sinh_o) - s) > 6.0e-4 * c + 40.0) fail($sformatf("sinh z=%0d", z));
          if (absr(real'(ang_exp_o) - e) > 6.0e-4 * e + 40.0) fail($sformatf("exp z=%0d", z));
        end
      end
    end
  end

  // ---- Gaussian channel checker ----
  always @(posedge clk) begin
    if (rst_n && gau_valid_o) begin
      point_t p;
      real arg, fe;
      bit uf;
      if (gq.size() == 0) begin
        fail("unexpected Gaussian result");
      end else begin
        p = gq.pop_front();
        arg = real'(p.x * p.x + p.y * p.y) * real'(p.c) / SC;
        uf = arg > 12.43;
        fe = uf ? 0.0 : $exp(-arg) * real'(p.k);
        checks += 2;
        if (gau_underflow_o !== uf) fail($sformatf("underflow flag, arg %f", arg));
        if (gau_underflow_o) m_uf++;
        if (absr(real'(gau_f_o) - fe) > 1.0e-3 * fe + 10.0 * (1.0 + real'(p.k) / SC))
          fail($sformatf("F(%0d,%0d) got %0d expected %f", p.x, p.y, gau_f_o, fe));
        if (p.kern >= 0) begin
          ksum[p.kern] += real'(gau_f_o) / SC;
          kcnt[p.kern]++;
        end
      end
    end
  end

  task automatic send_ang(input longint z, input bit v);
    ang_valid_i = v;
    ang_z_i = W'(z);
    if (v) aq.push_back(z);
  endtask

  task automatic send_gau(input int x, input int y, input longint c, input longint k,
                          input int kern, input bit v);
    point_t p;
    p.x = x; p.y = y; p.c = c; p.k = k; p.kern = kern;
    gau_valid_i = v;
    gau_x_i = 8'(x); gau_y_i = 8'(y); gau_coef_i = W'(c); gau_k_i = W'(k);
    if (v) gq.push_back(p);
  endtask

  function automatic longint rand_angle();
    longint z;
    if ($urandom_range(0, 7) == 0) begin
      z = longint'($urandom_range(101801, 140000));
      if ($urandom_range(0, 1) == 1) z = -z;
    end else begin
      z = longint'($urandom_range(0, 203000)) - 101500;
    end
    return z;
  endfunction

  initial begin
    longint coefs [3];
    longint kq [3];
    int lat;
    int run;
    for (int n = 0; n < 3; n++) begin
      real sg, c, sum;
      sg = real'(n + 1);
      coefs[n] = longint'($rtoi(SC / (2.0 * sg * sg) + 0.5));
      c = real'(coefs[n]) / SC;
      sum = 0.0;
      for (int y = -4; y <= 4; y++)
        for (int x = -4; x <= 4; x++) sum += $exp(-real'(x * x + y * y) * c);
      kq[n] = longint'($rtoi(SC / sum + 0.5));
      kexp[n] = real'(kq[n]) * sum / SC;   // sum expected with K rounded
      ksum[n] = 0.0;
      kcnt[n] = 0;
    end

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // 1. latency of single samples
    send_ang(8192, 1'b1);
    send_gau(1, 1, 4096, 8192, -1, 1'b1);
    @(negedge clk);
    send_ang(0, 1'b0);
    send_gau(0, 0, 0, 0, -1, 1'b0);
    for (lat = 1; lat < 60; lat++) begin
      checks++;
      if (ang_valid_o !== (lat == LAT_A)) fail($sformatf("angle valid at clock %0d", lat));
      checks++;
      if (gau_valid_o !== (lat == LAT_G)) fail($sformatf("Gaussian valid at clock %0d", lat));
      @(negedge clk);
    end

    // 2. three kernels, interleaved point by point, back to back, while the
    //    angle channel also runs back to back
    run = 0;
    for (int y = -4; y <= 4; y++)
      for (int x = -4; x <= 4; x++)
        for (int n = 0; n < 3; n++) begin
          send_gau(x, y, coefs[n], kq[n], n, 1'b1);
          send_ang(rand_angle(), 1'b1);
          m_switch++;
          run++;
          @(negedge clk);
        end
    if (run >= 100) m_burst++;

    // 3. random traffic with gaps on both channels, including underflow
    for (int i = 0; i < 1500; i++) begin
      bit va, vg;
      va = ($urandom_range(0, 3) != 0);
      vg = ($urandom_range(0, 3) != 0);
      if (!va || !vg) m_gap++;
      send_ang(rand_angle(), va);
      send_gau(int'($urandom_range(0, 255)) - 128, int'($urandom_range(0, 255)) - 128,
               longint'($urandom_range(4, 4096)), longint'($urandom_range(0, 16384)), -1, vg);
      @(negedge clk);
    end
    send_ang(0, 1'b0);
    send_gau(0, 0, 0, 0, -1, 1'b0);
    repeat (LAT_G + 5) @(negedge clk);

    checks++;
    if (aq.size() != 0 || gq.size() != 0)
      fail($sformatf("results missing: angle %0d, Gaussian %0d", aq.size(), gq.size()));

    // 4. kernel normalisation
    for (int n = 0; n < 3; n++) begin
      checks++;
      if (kcnt[n] != 81 || absr(ksum[n] - 1.0) > 0.005 || absr(ksum[n] - kexp[n]) > 0.002)
        fail($sformatf("kernel %0d: %0d points, sum %f", n, kcnt[n], ksum[n]));
      $display("kernel sigma=%0d K=%0d points=%0d sum=%f", n + 1, kq[n], kcnt[n], ksum[n]);
    end

    // 5. smoothing channel: two kernels, two frames each
    make_kernel(1.0);
    smooth_frame(1'b0);
    smooth_frame(1'b1);
    make_kernel(2.0);
    smooth_frame(1'b0);
    checks++;
    if (n_pix_out != 3 * (IW - KS + 1) * (IH - KS + 1))
      fail($sformatf("%0d smoothed pixels", n_pix_out));

    // 6. reset in the middle of traffic
    for (int i = 0; i < 10; i++) begin
      send_ang(rand_angle(), 1'b1);
      send_gau(1, 2, 2048, 8192, -1, 1'b1);
      pix_valid_i = 1'b1;
      pix_sof_i = (i == 0);     // a new frame: no window completes in 10 pixels
      @(negedge clk);
    end
    pix_valid_i = 1'b0;
    pix_sof_i = 1'b0;
    rst_n = 1'b0;
    aq.delete();
    gq.delete();
    send_ang(0, 1'b0);
    send_gau(0, 0, 0, 0, -1, 1'b0);
    @(negedge clk);
    rst_n = 1'b1;
    m_reset++;
    for (int i = 0; i < 40; i++) begin
      checks++;
      if (ang_valid_o || gau_valid_o || pix_valid_o || krn_busy_o) fail("result after reset");
      @(negedge clk);
    end

    $display("mechanisms: range_err=%0d underflow=%0d burst=%0d gap=%0d kernel_switch=%0d reset=%0d kernel_reload=%0d",
             m_range, m_uf, m_burst, m_gap, m_switch, m_reset, m_reload);
    checks += 7;
    if (m_reload < 2) fail("kernel never reloaded");
    if (m_range == 0) fail("angle range error never occurred");
    if (m_uf == 0) fail("underflow never occurred");
    if (m_burst == 0) fail("no back-to-back burst");
    if (m_gap == 0) fail("no gap in the valid stream");
    if (m_switch == 0) fail("no kernel switch");
    if (m_reset == 0) fail("no reset during traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
