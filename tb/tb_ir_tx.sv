// tb_ir_tx: checks the infra-red serialiser with a 300 us tick shortened
// to every TICK cycles. After each tick the line must follow the box
// encoding: for every bit two ticks high, two ticks carrying the bit, two
// ticks low; then 6 ticks of rest with `busy` still high; `busy` falls
// after 6 * 15 + 6 ticks.
module tb_ir_tx;
  localparam int NB = 15, TICK = 4;
  logic clk = 0, rst = 1, tick = 0, ready = 0, busy, line;
  logic [NB-1:0] data;
  int checks = 0, failures = 0;

  ir_tx #(.NBITS(NB)) dut (.*);

  always #5 clk = !clk;

  int tc = 0;
  always @(posedge clk) begin
    tc <= (tc == TICK - 1) ? 0 : tc + 1;
    tick <= (tc == TICK - 1);
  end

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
    logic [NB-1:0] d;
    int k, ph;
    data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 12; n++) begin
      d = NB'($urandom);
      if (n == 0) d = '1;
      if (n == 1) d = '0;
      @(posedge clk);
      ready <= 1; data <= d;
      @(posedge clk);
      ready <= 0; data <= ~d;
      // slot k is the interval after the (k+1)-th tick
      k = 0;
      while (k < 6 * NB + 6) begin
        @(posedge clk);
        if (tick) begin
          @(negedge clk);
          if (k < 6 * NB) begin
            ph = k % 6;
            check(line == ((ph < 2) ? 1'b1 : (ph < 4) ? d[NB - 1 - k / 6] : 1'b0),
                  $sformatf("pkt %0d slot %0d", n, k));
          end else begin
            check(line == 0, "rest is low");
          end
          check(busy == 1, "busy during packet");
          k++;
        end
      end
      // busy falls at the next tick
      @(posedge tick);
      @(negedge clk);
      @(negedge clk);
      check(busy == 0, "busy falls after the rest");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
