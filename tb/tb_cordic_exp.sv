// tb_cordic_exp: self-checking test of the cosh / sinh / exp generator at
// its default size.
//
// Part 1 sends one isolated angle and counts the clocks until out_valid:
// it must be 21. Part 2 streams random angles with random gaps in the valid
// signal; roughly one in ten angles is outside +-12.43 and must come back
// with range_err_o set (its data is not checked). Results are matched in
// order against a queue of the angles sent and compared with $cosh, $sinh
// and $exp within a relative tolerance of 6e-4 plus a few LSBs.
module tb_cordic_exp;
  localparam int W = 32;
  localparam int F = 13;
  localparam int LATENCY = 21;
  localparam int NSAMP = 3000;
  localparam real SC = 2.0 ** F;
  localparam longint ZMAX = 101800;   // 12.43 * 2^13, just over the sum of the angles

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0] z_in = '0;
  logic out_valid, range_err;
  logic signed [W-1:0] cosh_o, sinh_o, exp_o;
  int checks = 0;
  int failures = 0;
  int n_err_seen = 0;
  int received = 0;
  longint zq[$];

  always #5 clk = ~clk;

  cordic_exp u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .z_in(z_in),
    .out_valid(out_valid), .cosh_o(cosh_o), .sinh_o(sinh_o), .exp_o(exp_o),
    .range_err_o(range_err));

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check_val(input string what, input longint got, input real exp, input real mag);
    real tol;
    tol = 6.0e-4 * mag + 40.0;
    checks++;
    if (absr(real'(got) - exp) > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d expected %f", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (3 * NSAMP + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: every valid output is matched with the oldest angle sent.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint z;
      real zr, c, s, e;
      bit oor;
      z = zq.pop_front();
      received++;
      oor = (z > ZMAX) || (z < -ZMAX);
      checks++;
      if (range_err !== oor) begin
        failures++;
        $display("FAIL range flag %0b for z=%0d", range_err, z);
      end
      if (range_err) n_err_seen++;
      if (!oor) begin
        zr = real'(z) / SC;
        c = $cosh(zr) * SC; s = $sinh(zr) * SC; e = $exp(zr) * SC;
        check_val("cosh", longint'(cosh_o), c, c);
        check_val("sinh", longint'(sinh_o), s, c);
        check_val("exp", longint'(exp_o), e, e + c);
      end
    end
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // Part 1: latency of a single sample.
    in_valid = 1'b1;
    z_in = W'(longint'(8192));          // z = 1.0
    zq.push_back(8192);
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != LATENCY) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, LATENCY);
    end
    @(negedge clk);
    // Part 2: stream with gaps.
    for (int n = 0; n < NSAMP; n++) begin
      longint z;
      if ($urandom_range(0, 9) == 0) begin
        z = longint'($urandom_range(101801, 150000));
        if ($urandom_range(0, 1) == 1) z = -z;
      end else begin
        z = longint'($urandom_range(0, 203000)) - 101500;
      end
      in_valid = ($urandom_range(0, 3) != 0);
      z_in = W'(z);
      if (in_valid) zq.push_back(z);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LATENCY + 5) @(negedge clk);
    checks++;
    if (zq.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", zq.size());
    end
    checks++;
    if (n_err_seen == 0) begin
      failures++;
      $display("FAIL range flag never raised");
    end
    $display("results %0d, out-of-range %0d", received, n_err_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
