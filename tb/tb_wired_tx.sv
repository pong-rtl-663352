// tb_wired_tx: checks the wired serialiser against the line waveform
// expected from the protocol: a 9-cycle preamble (3 cycles 1, 3 cycles 0,
// 3 cycles 1), then 15 bits of 9 cycles each, most significant first, then
// a 9-cycle low gap, with `busy` high for exactly 17 * 9 cycles.
module tb_wired_tx;
  localparam int NB = 15, CPB = 9;
  logic clk = 0, rst = 1, ready = 0, busy, line;
  logic [NB-1:0] data;
  int checks = 0, failures = 0;

  wired_tx #(.NBITS(NB), .CYCLES_PER_BIT(CPB)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit expected(input logic [NB-1:0] d, input int t);
    int sym, sub;
    sym = t / CPB;
    sub = t % CPB;
    if (sym == 0) return (sub < 3) || (sub >= 6);
    if (sym <= NB) return d[NB - sym];
    return 1'b0;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] d;
    int busy_len;
    data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(line == 0 && busy == 0, "idle after reset");
    for (int n = 0; n < 40; n++) begin
      d = NB'($urandom);
      if (n == 0) d = '1;
      if (n == 1) d = '0;
      ready <= 1; data <= d;
      @(posedge clk);
      ready <= 0; data <= NB'($urandom);   // data must be copied at ready
      busy_len = 0;
      for (int t = 0; t < (NB + 2) * CPB; t++) begin
        @(negedge clk);
        check(line == expected(d, t), $sformatf("pkt %0d cycle %0d line", n, t));
        check(busy == 1, $sformatf("pkt %0d cycle %0d busy", n, t));
        @(posedge clk);
      end
      @(negedge clk);
      check(busy == 0, "busy falls after 17 bit times");
      check(line == 0, "line idles low");
      @(posedge clk);
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
