// tb_sine: every phase from -128 to 127 (radians * 32) against the
// piecewise approximation evaluated in real arithmetic: x for |x| < 0.6,
// 0.825 x + 0.105 above, 0.825 x - 0.105 below, times 32 and rounded up,
// with the phase clamped to +-50.
module tb_sine;
  logic signed [7:0] phase, value;
  int checks = 0, failures = 0;

  sine dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x, y;
    int p2;
    for (int p = -128; p < 128; p++) begin
      phase = 8'(p);
      #1;
      p2 = (p > 50) ? 50 : (p < -50) ? -50 : p;
      x = real'(p2) / 32.0;
      if (x > 0.6)       y = 0.825 * x + 0.105;
      else if (x < -0.6) y = 0.825 * x - 0.105;
      else               y = x;
      check(int'(value) == int'($ceil(32.0 * y - 1e-9)),
            $sformatf("sin(%0d) = %0d want %0f", p, value, 32.0 * y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
