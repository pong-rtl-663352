// tb_ir_idle_detect: feeds random line values, sampled at ticks, and
// compares `idle` with a reference that counts consecutive zero samples.
module tb_ir_idle_detect;
  localparam int LEN = 6;
  logic clk = 0, rst = 1, tick = 0, line_in = 0, idle;
  int checks = 0, failures = 0, zeros = 0, n_idle = 0;

  ir_idle_detect #(.IDLE_LEN(LEN)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    check(idle == 0, "not idle after reset");
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk);
      tick    <= ($urandom_range(0, 2) == 0);
      // long runs of zeros now and then
      line_in <= ((i / 40) % 2 == 0) ? ($urandom_range(0, 3) == 0) : 1'b0;
      @(negedge clk);
      // tick and line were applied at the last edge; dut samples next edge
      if (tick) zeros = line_in ? 0 : zeros + 1;
      @(posedge clk);
      tick <= 0;
      @(negedge clk);
      check(idle == (zeros >= LEN), $sformatf("idle at step %0d (zeros %0d)", i, zeros));
      if (idle) n_idle++;
    end
    check(n_idle > 100, "idle seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
