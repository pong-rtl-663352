// tb_ir_carrier: checks that the LED output is a square wave of period
// 2 * HALF cycles while the line is high and constant 0 while it is low.
module tb_ir_carrier;
  localparam int HALF = 5;
  logic clk = 0, rst = 1, line = 0, led;
  int checks = 0, failures = 0;

  ir_carrier #(.HALF_PERIOD(HALF)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_rise, rises, ones;
    repeat (3) @(posedge clk);
    rst <= 0;
    // low line: never lit
    repeat (50) begin
      @(negedge clk);
      check(led == 0, "dark while line low");
    end
    line <= 1;
    repeat (3) @(posedge clk);
    last_rise = -1; rises = 0; ones = 0;
    for (int i = 0; i < 20 * HALF; i++) begin
      logic prev;
      prev = led;
      @(posedge clk);
      @(negedge clk);
      if (led) ones++;
      if (led && !prev) begin
        if (last_rise >= 0) check(i - last_rise == 2 * HALF, $sformatf("period %0d", i - last_rise));
        last_rise = i;
        rises++;
      end
    end
    check(rises >= 9, "carrier toggles");
    check(ones == 10 * HALF, $sformatf("duty %0d", ones));
    line <= 0;
    repeat (2) @(posedge clk);
    repeat (30) begin
      @(negedge clk);
      check(led == 0, "dark again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
