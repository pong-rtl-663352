// tb_ir_rx: drives the IR receiver with box-encoded packets (a 300 us unit
// shortened to T cycles, so the 900 us sample point is 3T after the rising
// edge), pulses `idle` in the rest between packets, drops one bit from
// some packets and checks that exactly the intact packets arrive, with the
// right content, 900 us (plus the synchroniser) after the last rising edge.
module tb_ir_rx;
  localparam int NB = 15, T = 8;
  logic clk = 0, rst = 1, line_in = 0, idle = 0, valid;
  logic [NB-1:0] data;
  int checks = 0, failures = 0, n_got = 0, n_sent = 0;
  logic [NB-1:0] exp_q [$];
  longint cyc = 0, last_rise = 0;

  ir_rx #(.NBITS(NB), .SAMPLE_CYCLES(3 * T)) dut (.*);

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

  always @(posedge clk) if (!rst && valid) begin
    n_got++;
    if (exp_q.size() == 0) check(0, "unexpected packet");
    else begin
      check(data == exp_q[0], $sformatf("data %h expected %h", data, exp_q[0]));
      // 3 edges to see the rise through the synchroniser, 3T to the sample,
      // one edge for the registered `valid`
      check(cyc - last_rise == 4 + 3 * T, $sformatf("latency %0d", cyc - last_rise));
      void'(exp_q.pop_front());
    end
  end

  task automatic send_bit(input bit b);
    line_in <= 1;
    last_rise = cyc;
    repeat (2 * T) @(posedge clk);
    line_in <= b;
    repeat (2 * T) @(posedge clk);
    line_in <= 0;
    repeat (2 * T) @(posedge clk);
  endtask

  initial begin
    logic [NB-1:0] d;
    int drop;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 30; n++) begin
      d = NB'($urandom);
      if (n == 0) d = '1;
      if (n == 1) d = '0;
      drop = (n % 4 == 3) ? $urandom_range(0, NB - 1) : -1;
      if (drop < 0) exp_q.push_back(d);
      for (int b = NB - 1; b >= 0; b--)
        if (b != NB - 1 - drop) send_bit(d[b]);
      // rest: the idle detector would fire here
      repeat (3 * T) @(posedge clk);
      idle <= 1;
      repeat (2 * T) @(posedge clk);
      idle <= 0;
      repeat (T) @(posedge clk);
      if (drop < 0) n_sent++;
    end
    repeat (10) @(posedge clk);
    check(n_got == n_sent, $sformatf("received %0d of %0d", n_got, n_sent));
    check(exp_q.size() == 0, "all intact packets received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
