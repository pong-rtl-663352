// tb_wired_rx: drives the wired line with packets built from the protocol
// (preamble 1/0/1 thirds, 9 cycles per bit), with random gaps, line noise
// before the preamble and a single wrong sample inside some preambles, and
// checks every packet and the latency from the first data bit to `valid`.
module tb_wired_rx;
  localparam int NB = 15, CPB = 9;
  logic clk = 0, rst = 1, line_in = 0, valid;
  logic [NB-1:0] data;
  int checks = 0, failures = 0;
  int n_expected = 0, n_got = 0;
  logic [NB-1:0] exp_q [$];
  longint first_bit_cycle [$];
  longint cyc = 0;

  wired_rx #(.NBITS(NB), .CYCLES_PER_BIT(CPB)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

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

  // monitor
  always @(posedge clk) if (!rst && valid) begin
    longint lat;
    n_got++;
    if (exp_q.size() == 0) check(0, "unexpected packet");
    else begin
      check(data == exp_q[0], $sformatf("packet %h expected %h", data, exp_q[0]));
      // edges from the first data bit on line_in to seeing `valid`:
      // 2 synchroniser flops, 14 whole bits, the fifth cycle of the last
      // bit, and one edge for the registered `valid`
      lat = cyc - first_bit_cycle[0];
      check(lat == 2 + (NB - 1) * CPB + 5 + 1, $sformatf("latency %0d", lat));
      void'(exp_q.pop_front());
      void'(first_bit_cycle.pop_front());
    end
  end

  initial begin
    logic [NB-1:0] d;
    int glitch;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      d = NB'($urandom);
      if (n == 0) d = '1;
      if (n == 1) d = '0;
      glitch = (n % 3 == 2) ? $urandom_range(0, CPB - 1) : -1;
      // idle low (random length) with an occasional short pulse
      repeat ($urandom_range(CPB, 3 * CPB)) @(posedge clk);
      exp_q.push_back(d);
      for (int t = 0; t < CPB; t++) begin
        line_in <= ((t < 3) || (t >= 6)) ^ (t == glitch);
        @(posedge clk);
      end
      first_bit_cycle.push_back(cyc);
      for (int b = NB - 1; b >= 0; b--) begin
        line_in <= d[b];
        repeat (CPB) @(posedge clk);
      end
      line_in <= 0;
      repeat (CPB) @(posedge clk);
    end
    repeat (50) @(posedge clk);
    check(n_got == 60, $sformatf("received %0d of 60", n_got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
