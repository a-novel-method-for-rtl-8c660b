// tb_cordic_hyp_stage: self-checking test of one CORDIC micro-rotation.
//
// Two stages are tested side by side, an expansion stage (index -3,
// t = 1 - 2^-5) and an ordinary stage (index 5, t = 2^-5). Random x, y, z
// of both signs are applied every clock; the expected registered result is
// worked out here with 64-bit integer arithmetic (floor division after adding half
// the divisor, i.e. rounding to nearest) and the angle from $atanh, then compared one clock
// later. Reset must clear the outputs.
module tb_cordic_hyp_stage;
  localparam int W = 32;
  localparam int F = 13;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [W-1:0] x, y, z;
  logic signed [W-1:0] xn_o, yn_o, zn_o, xp_o, yp_o, zp_o;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  cordic_hyp_stage #(.DATA_W(W), .FRAC_BITS(F), .INDEX(-3)) u_neg (
    .clk(clk), .rst_n(rst_n), .x_i(x), .y_i(y), .z_i(z),
    .x_o(xn_o), .y_o(yn_o), .z_o(zn_o));
  cordic_hyp_stage #(.DATA_W(W), .FRAC_BITS(F), .INDEX(5)) u_pos (
    .clk(clk), .rst_n(rst_n), .x_i(x), .y_i(y), .z_i(z),
    .x_o(xp_o), .y_o(yp_o), .z_o(zp_o));

  function automatic longint fdiv(input longint a, input int sh);
    longint d;
    d = longint'(1) <<< sh;
    a = a + d / 2;    // round to nearest
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  function automatic longint ang(input real t);
    return longint'($rtoi($atanh(t) * (2.0 ** F) + 0.5));
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xe, ye, ze, d, tx, ty, xv, yv, zv;
    longint an, ap;
    an = ang(1.0 - 2.0 ** (-5));
    ap = ang(2.0 ** (-5));
    x = 32'sd12345; y = -32'sd999; z = 32'sd77;
    repeat (3) @(posedge clk);
    #1;
    check("reset x", xn_o, 0); check("reset z", zp_o, 0);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      xv = longint'($signed($urandom_range(0, 2000000))) - 1000000;
      yv = longint'($signed($urandom_range(0, 2000000))) - 1000000;
      zv = longint'($signed($urandom_range(0, 200000))) - 100000;
      if (n % 5 == 0) zv = 0;
      x = W'(xv); y = W'(yv); z = W'(zv);
      d = (zv < 0) ? -1 : 1;
      @(posedge clk); #1;
      // expansion stage, shift 2 - (-3) = 5
      tx = yv - fdiv(yv, 5); ty = xv - fdiv(xv, 5);
      check("neg x", xn_o, xv + d * tx);
      check("neg y", yn_o, yv + d * ty);
      check("neg z", zn_o, zv - d * an);
      // ordinary stage, shift 5
      check("pos x", xp_o, xv + d * fdiv(yv, 5));
      check("pos y", yp_o, yv + d * fdiv(xv, 5));
      check("pos z", zp_o, zv - d * ap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
