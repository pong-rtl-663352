// tb_divider: random and corner-case divisions against the / operator,
// and the latency: `done` with the quotient N edges after the edge that
// samples `start` (lat counts negedges from the one before that edge).
module tb_divider;
  localparam int N = 20, D = 16;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [N-1:0] dividend, quotient;
  logic [D-1:0] divisor;
  int checks = 0, failures = 0;

  divider #(.N(N), .D(D)) dut (.*);

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
    logic [N-1:0] a, want;
    logic [D-1:0] b;
    int lat;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      a = N'($urandom);
      b = D'($urandom);
      case (i % 6)
        0: b = D'($urandom_range(1, 15));
        1: b = D'($urandom_range(100, 2000));
        2: a = N'($urandom_range(0, 100));
        3: if (i < 30) b = 0;
        default: ;
      endcase
      if (i == 4) begin a = '1; b = 1; end
      if (i == 5) begin a = '1; b = '1; end
      want = (b == 0) ? '1 : a / N'(b);
      @(negedge clk);
      start = 1; dividend = a; divisor = b;
      @(negedge clk);
      start = 0; dividend = ~a; divisor = ~b;
      lat = 1;
      while (!done) begin
        check(busy, "busy while dividing");
        @(negedge clk);
        lat++;
        if (lat > 100) break;
      end
      check(lat == N + 1, $sformatf("latency %0d", lat));
      check(quotient == want, $sformatf("%0d / %0d = %0d want %0d", a, b, quotient, want));
      @(negedge clk);
      check(!busy && quotient == want, "quotient holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
