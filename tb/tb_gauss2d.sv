// tb_gauss2d: self-checking test of the 2D Gaussian generator at its
// default size (8-bit coordinates, Q18.13 words).
//
// Part 1 sends one point and checks the latency of 24 clocks and the value
// F(0,0) = K. Part 2 streams random points (coordinates -128..127), random
// sigma (coefficients 1/(2 sigma^2) from about 0.0004 to 2) and random K
// (0..2), with gaps in the valid signal. The reference F = K exp(-r2 c) is
// computed here with $exp from the same quantised c and K (tolerance
// 0.1 % plus 10 LSB of the exponential, scaled by K); arguments over
// 12.43 must be reported as underflow with F = 0. Both underflow and
// in-range points must occur. Part 3 sweeps a 9 x 9 kernel of sigma = 1.5
// and checks its symmetry F(x,y) = F(-x,y) = F(y,x) bit for bit.
module tb_gauss2d;
  localparam int W = 32;
  localparam int F = 13;
  localparam int LATENCY = 24;
  localparam int NSAMP = 3000;
  localparam real SC = 2.0 ** F;
  localparam real ARGMAX = 12.43;

  typedef struct {
    int     x;
    int     y;
    longint c;
    longint k;
  } point_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [7:0] px = '0, py = '0;
  logic [W-1:0] coef = '0;
  logic signed [W-1:0] k_norm = '0;
  logic out_valid, underflow;
  logic signed [W-1:0] f_o, exp_o;
  int checks = 0;
  int failures = 0;
  int n_uf = 0;
  int n_ok = 0;
  real maxabs = 0.0;
  point_t q[$];
  bit sweep = 1'b0;
  longint kern [81];
  int nk = 0;

  always #5 clk = ~clk;

  gauss2d u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .px(px), .py(py),
    .coef(coef), .k_norm(k_norm), .out_valid(out_valid), .f_o(f_o),
    .exp_o(exp_o), .underflow_o(underflow));

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin : watchdog
    repeat (3 * NSAMP + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      point_t p;
      real arg, e, fe, tol;
      bit uf;
      p = q.pop_front();
      arg = real'(p.x * p.x + p.y * p.y) * real'(p.c) / SC;
      uf = arg > ARGMAX;
      checks++;
      if (underflow !== uf) begin
        failures++;
        $display("FAIL underflow %0b for arg %f", underflow, arg);
      end
      e  = $exp(-arg) * SC;
      fe = uf ? 0.0 : e * real'(p.k) / SC;
      tol = 1.0e-3 * fe + 10.0 * (1.0 + real'(p.k) / SC);
      if (uf) n_uf++; else n_ok++;
      checks++;
      if (absr(real'(f_o) - fe) > maxabs) maxabs = absr(real'(f_o) - fe);
      if (absr(real'(f_o) - fe) > tol) begin
        failures++;
        if (failures < 20)
          $display("FAIL F(%0d,%0d) c=%0d k=%0d got %0d expected %f", p.x, p.y, p.c, p.k, f_o, fe);
      end
      checks++;
      if (absr(real'(exp_o) - (uf ? 0.0 : e)) > 1.0e-3 * e + 10.0) begin
        failures++;
        if (failures < 20) $display("FAIL exp got %0d expected %f", exp_o, e);
      end
      if (sweep) begin
        kern[nk] = longint'(f_o);
        nk++;
      end
    end
  end

  task automatic send(input int x, input int y, input longint c, input longint k);
    point_t p;
    p.x = x; p.y = y; p.c = c; p.k = k;
    in_valid = 1'b1;
    px = 8'(x); py = 8'(y); coef = W'(c); k_norm = W'(k);
    q.push_back(p);
  endtask

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // Part 1
    send(0, 0, 4096, 8192);
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != LATENCY || f_o < 8185 || f_o > 8199) begin
      failures++;
      $display("FAIL latency %0d (expected %0d), F(0,0) %0d", lat, LATENCY, f_o);
    end
    @(negedge clk);
    // Part 2
    for (int n = 0; n < NSAMP; n++) begin
      int x, y;
      longint c;
      x = int'($urandom_range(0, 255)) - 128;
      y = int'($urandom_range(0, 255)) - 128;
      if (n % 2 == 0) begin
        x = x / 16; y = y / 16;
      end
      c = longint'($urandom_range(3, 16384));
      if (n % 3 == 0) c = longint'($urandom_range(3, 200));
      send(x, y, c, longint'($urandom_range(0, 16384)));
      in_valid = ($urandom_range(0, 4) != 0);
      if (!in_valid) void'(q.pop_back());
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LATENCY + 5) @(negedge clk);
    // Part 3: a 9 x 9 kernel, sigma = 1.5, K = 1
    sweep = 1'b1;
    for (int y = -4; y <= 4; y++)
      for (int x = -4; x <= 4; x++) begin
        send(x, y, longint'($rtoi(SC / (2.0 * 1.5 * 1.5) + 0.5)), 8192);
        @(negedge clk);
      end
    in_valid = 1'b0;
    repeat (LATENCY + 5) @(negedge clk);
    checks++;
    if (nk != 81) begin
      failures++;
      $display("FAIL kernel has %0d points", nk);
    end else begin
      for (int y = 0; y < 9; y++)
        for (int x = 0; x < 9; x++) begin
          checks++;
          if (kern[y * 9 + x] != kern[y * 9 + (8 - x)] || kern[y * 9 + x] != kern[x * 9 + y]) begin
            failures++;
            $display("FAIL kernel symmetry at %0d,%0d", x - 4, y - 4);
          end
        end
    end
    checks++;
    if (q.size() != 0 || n_uf == 0 || n_ok == 0) begin
      failures++;
      $display("FAIL left %0d, underflows %0d, in range %0d", q.size(), n_uf, n_ok);
    end
    $display("in range %0d, underflow %0d, worst |F error| %f LSB", n_ok, n_uf, maxabs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
