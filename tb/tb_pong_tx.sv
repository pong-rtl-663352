// tb_pong_tx: the packet scheduler against a model transmitter that stays
// busy for a random time after each `tx_ready`. Checks that `tx_ready` is
// never given while busy, that each frame sends exactly the paddle packet,
// plus puck x, y and velocity when the puck is ours, plus a loss packet
// when lost, with the values present at `go`; and that on a link slower
// than the frame rate every packet kind still goes out and a handoff flag
// is not lost.
module tb_pong_tx;
  import pong_pkg::*;
  logic clk = 0, rst = 1, go = 0, send_puck = 0, handoff = 0, lost = 0;
  logic [9:0] paddle_y = 0, puck_y = 0;
  logic [10:0] puck_x = 0;
  logic signed [5:0] vel_x = 0, vel_y = 0;
  logic tx_busy = 0, tx_ready;
  packet_t tx_data;
  int checks = 0, failures = 0;
  int busy_len = 20;
  packet_t got [$];

  pong_tx dut (.*);

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

  // model transmitter: busy rises the cycle after ready
  int remaining = 0;
  always @(posedge clk) begin
    if (tx_ready) begin
      check(!tx_busy && remaining == 0, "ready while busy");
      got.push_back(tx_data);
      remaining <= busy_len;
      tx_busy <= 1;
    end else if (remaining > 1) remaining <= remaining - 1;
    else begin
      remaining <= 0;
      tx_busy <= 0;
    end
  end

  task automatic pulse_go();
    @(negedge clk);
    go = 1;
    @(negedge clk);
    go = 0;
  endtask

  initial begin
    int kinds [5];
    bit saw_handoff;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 200; f++) begin
      bit sp, ho, ls;
      int np, nx, ny, vx, vy;
      sp = $urandom_range(0, 1); ho = sp && ($urandom_range(0, 3) == 0); ls = ($urandom_range(0, 5) == 0);
      np = $urandom_range(0, 767); nx = $urandom_range(0, 1023); ny = $urandom_range(0, 767);
      vx = $urandom_range(0, 30) - 15; vy = $urandom_range(0, 30) - 15;
      busy_len = $urandom_range(1, 30);
      @(negedge clk);
      send_puck = sp; handoff = ho; lost = ls; paddle_y = 10'(np); puck_x = 11'(nx); puck_y = 10'(ny);
      vel_x = 6'(vx); vel_y = 6'(vy);
      got.delete();
      pulse_go();
      // values may change after go
      paddle_y = ~paddle_y; puck_x = ~puck_x;
      repeat (6 * 40) @(posedge clk);
      check(got.size() == 1 + (sp ? 3 : 0) + (ls ? 1 : 0), $sformatf("frame %0d: %0d packets", f, got.size()));
      foreach (got[i]) begin
        case (got[i].ptype)
          PKT_PADDLE: check(int'(got[i].payload) == np, "paddle value");
          PKT_PUCK_X: check(sp && int'(got[i].payload) == nx, "puck x value");
          PKT_PUCK_Y: check(sp && int'(got[i].payload) == ny, "puck y value");
          PKT_PUCK_V: check(sp && got[i].payload == {1'b0, ho, 5'(vx), 5'(vy)}, "velocity value");
          PKT_LOSS:   check(ls, "loss only when lost");
          default:    check(0, "bad packet type");
        endcase
      end
    end
    // slow link: a new frame every 100 cycles, a packet takes 150
    busy_len = 150;
    got.delete();
    for (int f = 0; f < 40; f++) begin
      @(negedge clk);
      send_puck = 1; handoff = (f == 3); lost = 0;
      pulse_go();
      repeat (98) @(posedge clk);
    end
    repeat (800) @(posedge clk);
    kinds = '{0, 0, 0, 0, 0};
    saw_handoff = 0;
    foreach (got[i]) begin
      kinds[int'(got[i].ptype)]++;
      if (got[i].ptype == PKT_PUCK_V && got[i].payload[10]) saw_handoff = 1;
    end
    for (int k = 0; k < 4; k++) check(kinds[k] >= 5, $sformatf("kind %0d sent %0d times on a slow link", k, kinds[k]));
    check(saw_handoff, "handoff survives a slow link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
