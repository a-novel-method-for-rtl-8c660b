// tb_gauss_kernel: self-checking test of the normalised Gaussian kernel
// generator at its default size (5 x 5 kernel).
//
// For several sigma values (one small enough that the kernel corners
// underflow) the generator is started and its outputs are compared with a
// reference computed here with real arithmetic: K = 1 / sum of the 25
// exponentials (within 0.5 % + 1 LSB), each coefficient K exp(-r^2 c)
// (within 0.2 % + 12 LSB), coefficient indices 0..24 in raster order, and
// the coefficients summing to 1 within 0.6 %. The run must finish in at
// most 140 clocks, done must pulse once, and a start pulse during a run
// must be ignored.
module tb_gauss_kernel;
  localparam int W = 32;
  localparam int F = 13;
  localparam real SC = 2.0 ** F;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] coef = '0;
  logic busy, done, kc_valid;
  logic signed [W-1:0] k_o, kc_data;
  logic [4:0] kc_idx;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  gauss_kernel u_dut (
    .clk(clk), .rst_n(rst_n), .start(start), .coef(coef), .busy(busy),
    .done(done), .k_o(k_o), .kc_valid(kc_valid), .kc_idx(kc_idx),
    .kc_data(kc_data));

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

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

  task automatic run_kernel(input real sigma);
    longint c;
    real cr, sum, kref, csum, e;
    int nvalid, ndone, cycles;
    c = longint'($rtoi(SC / (2.0 * sigma * sigma) + 0.5));
    cr = real'(c) / SC;
    sum = 0.0;
    for (int y = -2; y <= 2; y++)
      for (int x = -2; x <= 2; x++) begin
        e = $exp(-real'(x * x + y * y) * cr);
        if (real'(x * x + y * y) * cr > 12.43) e = 0.0;
        sum += e;
      end
    kref = SC / sum;
    @(negedge clk);
    coef = W'(c);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    nvalid = 0; ndone = 0; csum = 0.0; cycles = 1;
    while (busy && cycles < 1000) begin
      if (cycles == 10) begin
        // a start while busy must not restart the run
        start = 1'b1;
        coef = W'(c * 2);
      end else begin
        start = 1'b0;
      end
      if (kc_valid) begin
        int x, y;
        real exp_c;
        x = int'(kc_idx) % 5 - 2;
        y = int'(kc_idx) / 5 - 2;
        checks++;
        if (int'(kc_idx) != nvalid) fail($sformatf("index %0d, expected %0d", kc_idx, nvalid));
        e = $exp(-real'(x * x + y * y) * cr);
        if (real'(x * x + y * y) * cr > 12.43) e = 0.0;
        exp_c = kref * e;
        checks++;
        if (absr(real'(kc_data) - exp_c) > 2.0e-3 * exp_c + 12.0)
          fail($sformatf("sigma %f coef %0d got %0d expected %f", sigma, kc_idx, kc_data, exp_c));
        csum += real'(kc_data) / SC;
        nvalid++;
      end
      if (done) ndone++;
      @(negedge clk);
      cycles++;
    end
    start = 1'b0;
    // last output and done may arrive in the clock busy falls
    if (kc_valid) begin
      csum += real'(kc_data) / SC;
      nvalid++;
    end
    if (done) ndone++;
    checks += 5;
    if (nvalid != 25) fail($sformatf("%0d coefficients", nvalid));
    if (ndone != 1) fail($sformatf("done pulsed %0d times", ndone));
    if (cycles > 140) fail($sformatf("took %0d clocks", cycles));
    if (absr(real'(k_o) - kref) > 5.0e-3 * kref + 1.0)
      fail($sformatf("K %0d expected %f", k_o, kref));
    if (absr(csum - 1.0) > 0.006) fail($sformatf("coefficients sum to %f", csum));
    $display("sigma %f: K %0d (ref %f), sum %f, %0d clocks", sigma, k_o, kref, csum, cycles);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy || kc_valid || done) fail("not idle after reset");
    run_kernel(1.0);
    run_kernel(0.7);
    run_kernel(1.5);
    run_kernel(0.35);
    run_kernel(3.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
