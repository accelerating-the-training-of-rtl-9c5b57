// tb_act_unit: checks the activation unit against real-valued reference
// functions: ReLU exactly (clip at 10), sigmoid and tanh within the error of
// the piecewise-linear approximation, the saturation regions exactly, and the
// derivatives from the forward output exactly.
module tb_act_unit;
  import cnn_pkg::*;

  act_e  func;
  logic  deriv;
  data_t x, y;
  int checks = 0, failures = 0;

  act_unit dut (.func(func), .deriv(deriv), .x(x), .y(y));

  task automatic expect_near(input int exp_v, input int tol, input string what);
    checks++;
    if (int'(y) > exp_v + tol || int'(y) < exp_v - tol) begin
      failures++;
      $display("FAIL %s x=%0d y=%0d expected %0d +-%0d", what, x, y, exp_v, tol);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr;
    int  e;
    deriv = 0;
    for (int v = -6000; v <= 6000; v += 37) begin
      x = data_t'(v);
      xr = real'(v) / 256.0;
      func = ACT_RELU;    #1;
      e = (v <= 0) ? 0 : ((v > 2560) ? 2560 : v);
      expect_near(e, 0, "relu");
      func = ACT_NONE;    #1; expect_near(v, 0, "none");
      func = ACT_SIGMOID; #1;
      e = (v <= -4434) ? 0 : int'(256.0 / (1.0 + $exp(-xr)));
      expect_near(e, (v <= -4434) ? 0 : 6, "sigmoid");
      func = ACT_TANH;    #1;
      e = (v >= 2217) ? 256 : int'(256.0 * (($exp(2.0*xr) - 1.0) / ($exp(2.0*xr) + 1.0)));
      expect_near(e, (v >= 2217) ? 0 : 12, "tanh");
    end
    // derivatives from the forward output
    deriv = 1;
    for (int v = -300; v <= 300; v += 7) begin
      x = data_t'(v);
      func = ACT_RELU;    #1; expect_near((v > 0) ? 256 : 0, 0, "relu'");
      func = ACT_SIGMOID; #1; expect_near((v * (256 - v)) >>> 8, 0, "sigmoid'");
      func = ACT_TANH;    #1; expect_near(256 - ((v * v) >>> 8), 0, "tanh'");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
