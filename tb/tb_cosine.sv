// tb_cosine: every phase from -128 to 127 (radians * 32) against the
// approximation 1 - |x| computed in real arithmetic, with the phase clamped
// to +-pi/2 (50). Also checks the approximation is within 0.58 of cos(x).
module tb_cosine;
  logic signed [7:0] phase, value;
  int checks = 0, failures = 0;

  cosine dut (.*);

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
    real x, want;
    for (int p = -128; p < 128; p++) begin
      phase = 8'(p);
      #1;
      x = real'(p) / 32.0;
      if (x > 50.0 / 32.0) x = 50.0 / 32.0;
      if (x < -50.0 / 32.0) x = -50.0 / 32.0;
      want = $ceil(32.0 * (1.0 - ((x < 0) ? -x : x)) - 1e-9);
      check(int'(value) == int'(want), $sformatf("cos(%0d) = %0d want %0f", p, value, want));
      check($cos(x) - real'(value) / 32.0 < 0.58, "close to cosine");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
