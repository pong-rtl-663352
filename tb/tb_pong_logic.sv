// tb_pong_logic: plays one station against a scripted opponent.
// A reference model of the rules (move by the velocity, reflect off the top
// and bottom walls, return off the local paddle when crossing its face,
// lose at the left wall) predicts the puck while this station is master.
// The script checks: the first master comes from the switch; puck updates
// are rejected while master and accepted (x mirrored, vx negated) when
// not; a paddle return flips the master bit and raises the handoff flag
// for one frame; a velocity packet with the handoff flag makes the station
// master again; paddle buttons move the paddle by 4 per frame within the
// screen; a miss ends the game as lost; a loss packet ends it as won.
module tb_pong_logic;
  import pong_pkg::*;
  logic clk = 0, rst = 1, player_one = 1, btn_up = 0, btn_down = 0, frame = 0, rx_valid = 0;
  logic [3:0] speed = 4'd9;
  packet_t rx_data;
  logic [10:0] puck_x;
  logic [9:0] puck_y, local_paddle_y, remote_paddle_y;
  logic signed [5:0] vel_x, vel_y;
  logic master, handoff, send_puck, game_over, lost, tx_go;
  int checks = 0, failures = 0;
  int n_wall = 0, n_hit = 0, n_reject = 0, n_accept = 0, n_handoff_in = 0;

  pong_logic dut (.*);

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

  // reference state
  int mx, my, mvx, mvy, mly;
  bit mmaster, mlost, mover;

  task automatic model_frame();
    int nx, ny;
    bit hit;
    if (btn_up && !btn_down && mly - 4 >= 64) mly -= 4;
    else if (btn_down && !btn_up && mly + 4 <= 704) mly += 4;
    if (!mmaster || mover) return;
    nx = mx + mvx; ny = my + mvy;
    if (ny < 16)       begin ny = 32 - ny;        mvy = -mvy; n_wall++; end
    else if (ny > 751) begin ny = 2 * 751 - ny;   mvy = -mvy; n_wall++; end
    hit = (mx - 16 > 16) && (nx - 16 <= 16) && (ny - mly < 80) && (mly - ny < 80);
    if (hit) begin
      nx = 32; mvx = -mvx; mmaster = 0; n_hit++;
    end else if (nx - 16 <= 0) begin
      nx = 16; mover = 1; mlost = 1;
    end
    mx = nx; my = ny;
  endtask

  task automatic do_frame();
    @(negedge clk);
    frame = 1;
    model_frame();
    @(negedge clk);
    frame = 0;
    check(tx_go == 1, "tx_go one cycle after the frame");
    check(int'(puck_x) == mx && int'(puck_y) == my, $sformatf("puck %0d,%0d want %0d,%0d", puck_x, puck_y, mx, my));
    check(int'(local_paddle_y) == mly, "paddle");
    check(master == mmaster && lost == mlost && game_over == mover, "flags");
    if (mmaster && !mover) check(int'(vel_x) == mvx && int'(vel_y) == mvy, "velocity");
  endtask

  task automatic send(input pkt_type_e t, input int payload);
    @(negedge clk);
    rx_valid = 1;
    rx_data = '{ptype: t, payload: 12'(payload)};
    @(negedge clk);
    rx_valid = 0;
  endtask

  initial begin
    int rx, ry, vy;
    rx_data = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    mx = 512; my = 384; mvx = -9; mvy = 9; mly = 384; mmaster = 1; mlost = 0; mover = 0;
    @(negedge clk);
    check(master == 1 && puck_x == 512 && puck_y == 384, "start as player one");
    for (int round = 0; round < 6; round++) begin
      // play until the local paddle returns the puck, tracking it
      while (mmaster && !mover) begin
        btn_up   = (mly > my + 8) && (round != 5);
        btn_down = (mly < my - 8) && (round != 5);
        if ($urandom_range(0, 3) == 0) begin
          // a puck update while master must be rejected
          send(PKT_PUCK_X, 100);
          send(PKT_PUCK_Y, 100);
          check(int'(puck_x) == mx && int'(puck_y) == my, "update rejected while master");
          n_reject++;
        end
        do_frame();
      end
      if (mover) begin
        $display("round %0d ended: puck %0d,%0d paddle %0d", round, mx, my, mly);
        break;
      end
      btn_up = 0;
      btn_down = 0;
      // this frame hands off
      check(handoff == 1 && send_puck == 1, "handoff flagged after a return");
      @(negedge clk);
      check(handoff == 0, "handoff cleared after tx_go");
      // opponent moves the puck: its positions arrive mirrored
      rx = 1024 - mx; ry = my;
      for (int k = 0; k < 5; k++) begin
        rx -= 9; ry = (ry + 9 > 700) ? 700 : ry + 9;
        send(PKT_PUCK_X, rx);
        send(PKT_PUCK_Y, ry);
        send(PKT_PADDLE, 100 + k);
        check(int'(puck_x) == 1024 - rx && int'(puck_y) == ry, "remote puck accepted and mirrored");
        check(int'(remote_paddle_y) == 100 + k, "remote paddle accepted");
        n_accept++;
        mx = 1024 - rx; my = ry;
        do_frame();
      end
      // opponent returns the puck and hands over with its velocity
      rx = 1024 - 512; ry = (mly < 150) ? 150 : (mly > 620) ? 620 : mly;
      send(PKT_PUCK_X, rx);
      send(PKT_PUCK_Y, ry);
      // slow vertical speed so that the tracking paddle (4 per frame) keeps up
      vy = (round % 2 == 0) ? -2 : 3;
      send(PKT_PUCK_V, {1'b1, 5'(9), 5'(vy)});
      check(master == 1 && int'(vel_x) == -9 && int'(vel_y) == vy, "handoff accepted");
      n_handoff_in++;
      mmaster = 1; mx = 1024 - rx; my = ry; mvx = -9; mvy = vy;
    end
    check(mover && mlost, "the final round ends in a miss");
    check(game_over && lost, "game lost");
    // frames after the end do not move anything
    do_frame();
    // paddle limits
    btn_up = 1; btn_down = 0;
    repeat (200) do_frame();
    check(local_paddle_y == 64, "paddle stops at the top");
    btn_up = 0; btn_down = 1;
    repeat (200) do_frame();
    check(local_paddle_y == 704, "paddle stops at the bottom");
    btn_down = 0;
    // a new game as the second player, ended by the opponent's loss
    player_one = 0;
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    mx = 512; my = 384; mvx = -9; mvy = 9; mly = 384; mmaster = 0; mlost = 0; mover = 0;
    check(master == 0, "second player does not start as master");
    do_frame();
    check(puck_x == 512, "non-master does not move the puck");
    send(PKT_LOSS, 0);
    check(game_over && !lost, "opponent's loss ends the game as won");
    check(n_wall > 0 && n_hit >= 5 && n_reject > 0 && n_accept > 0 && n_handoff_in >= 5, "all mechanisms exercised");
    $display("walls %0d returns %0d rejected %0d accepted %0d", n_wall, n_hit, n_reject, n_accept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
