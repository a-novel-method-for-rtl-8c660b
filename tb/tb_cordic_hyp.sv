// tb_cordic_hyp: self-checking test of the pipelined expanded-range
// hyperbolic CORDIC at its default size (32-bit Q18.13, 6 expansion rows,
// indices 1..12 with 4 repeated: 19 rows, 20 clocks of latency).
//
// A new random input enters every clock. Most inputs use the start vector
// (1/A_n, 0) so the outputs are cosh z and sinh z; the rest use random
// X0, Y0 of both signs. Angles cover the whole range -12.4 .. +12.4.
// The expected results A_n (X0 cosh z + Y0 sinh z), A_n (Y0 cosh z +
// X0 sinh z) and a residual angle near zero are computed here with real
// arithmetic, A_n from its product formula. Each output is compared with
// the input applied exactly LATENCY clocks earlier, which checks the
// latency and the one-result-per-clock rate.
module tb_cordic_hyp;
  localparam int W = 32;
  localparam int F = 13;
  localparam int LATENCY = 20;
  localparam int NSAMP = 4000;
  localparam real SC = 2.0 ** F;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [W-1:0] x0, y0, z0, xo, yo, zo;
  int checks = 0;
  int failures = 0;
  real an;
  real maxerr = 0.0;
  longint xin [NSAMP + LATENCY];
  longint yin [NSAMP + LATENCY];
  longint zin [NSAMP + LATENCY];

  always #5 clk = ~clk;

  cordic_hyp u_dut (
    .clk(clk), .rst_n(rst_n), .x0(x0), .y0(y0), .z0(z0),
    .xout(xo), .yout(yo), .zout(zo));

  function automatic real gain();
    real a;
    int k;
    a = 1.0;
    for (int i = -5; i <= 0; i++) a *= $sqrt(1.0 - (1.0 - 2.0 ** (i - 2)) ** 2);
    k = 4;
    for (int i = 1; i <= 12; i++) begin
      a *= $sqrt(1.0 - 2.0 ** (-2 * i));
      if (i == k) begin
        a *= $sqrt(1.0 - 2.0 ** (-2 * i));
        k = 3 * k + 1;
      end
    end
    return a;
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check_val(input string what, input longint got, input real exp, input real tol);
    real err;
    checks++;
    err = absr(real'(got) - exp);
    if (err / tol > maxerr) maxerr = err / tol;
    if (err > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d expected %f", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (NSAMP + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint inv_a;
    real zr, xr, yr, c, s, tol;
    an = gain();
    inv_a = longint'($rtoi(SC / an + 0.5));
    x0 = '0; y0 = '0; z0 = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (xo != 0 || yo != 0 || zo != 0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NSAMP + LATENCY; n++) begin
      if (n < NSAMP) begin
        zin[n] = longint'($urandom_range(0, 203000)) - 101500;     // +-12.39
        if (n % 4 == 3) begin
          xin[n] = longint'($urandom_range(0, 32'(inv_a))) - inv_a / 2;
          yin[n] = longint'($urandom_range(0, 32'(inv_a))) - inv_a / 2;
        end else begin
          xin[n] = inv_a;
          yin[n] = 0;
        end
        x0 = W'(xin[n]); y0 = W'(yin[n]); z0 = W'(zin[n]);
      end
      @(posedge clk); #1;
      if (n >= LATENCY - 1 && n - (LATENCY - 1) < NSAMP) begin
        int m;
        m = n - (LATENCY - 1);
        zr = real'(zin[m]) / SC;
        xr = real'(xin[m]); yr = real'(yin[m]);
        c = $cosh(zr); s = $sinh(zr);
        tol = 6.0e-4 * an * (absr(xr) + absr(yr)) * c + 40.0;
        check_val("x", longint'(xo), an * (xr * c + yr * s), tol);
        check_val("y", longint'(yo), an * (yr * c + xr * s), tol);
        check_val("z", longint'(zo), 0.0, 4.0e-4 * SC);
      end
      @(negedge clk);
    end
    $display("worst error / tolerance = %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
