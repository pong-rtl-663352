// tb_tick_gen: checks that `tick` is one cycle wide and comes every DIV
// cycles, the first DIV cycles after reset.
module tb_tick_gen;
  localparam int DIV = 7;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0;

  tick_gen #(.DIV(DIV)) dut (.*);

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
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 1; i <= 30 * DIV; i++) begin
      @(posedge clk);
      @(negedge clk);
      check(tick == (i % DIV == 0), $sformatf("cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
