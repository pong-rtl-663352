// tb_pong_top: two stations, A and B, cross-connected, on a reduced raster
// (256 x 192 visible) with proportionally smaller objects and a fast IR
// time base. The test plays whole games:
//   1. both switches set to player one: both stations are master and
//      reject each other's puck updates;
//   2. a proper game over the wired link, both paddles tracking the puck,
//      with the 3D view and both camera modes selected part of the time;
//   3. the same over the infra-red link, with a model of the IR receiver
//      chip (it reports the carrier as present while the LED blinked in the
//      last two cycles);
//   4. A moves its paddle away from the puck and misses: A lost, B won.
// It counts wall bounces, paddle returns (master flips), handoffs accepted,
// rejected updates, packets over each link, game over and lit pixels in
// each view, checks that B shows A's puck mirrored while A is master, and
// fails any mechanism that never happened.
module tb_pong_top;
  localparam int W = 256, H = 192;
  logic clk = 0, rst = 1;
  logic p1_a = 1, p1_b = 0, up_a = 0, dn_a = 0, up_b = 0, dn_b = 0;
  logic [3:0] speed = 4'd6;
  logic view_3d = 0, locked = 1, use_ir = 0;
  logic wire_ab, wire_ba, led_a, led_b, irin_a, irin_b;
  logic [23:0] rgb_a, rgb_b;
  logic hs_a, vs_a, bl_a, hs_b, vs_b, bl_b, go_a, go_b, lost_a, lost_b, m_a, m_b;
  int checks = 0, failures = 0;

  pong_top #(.H_ACTIVE(W), .H_FP(4), .H_SYNC(8), .H_BP(12),
             .V_ACTIVE(H), .V_FP(1), .V_SYNC(2), .V_BP(30),
             .PADDLE_W(4), .PADDLE_H(32), .PUCK_SIZE(8), .PADDLE_STEP(8),
             .TICK_DIV(8), .IR_SAMPLE(24), .CARRIER_HALF(1)) a (
    .clk, .rst, .player_one(p1_a), .btn_up(up_a), .btn_down(dn_a), .speed,
    .view_3d, .locked_camera(locked), .use_ir,
    .wire_in(wire_ba), .wire_out(wire_ab), .ir_in(irin_a), .ir_led(led_a),
    .vga_rgb(rgb_a), .vga_hsync(hs_a), .vga_vsync(vs_a), .vga_blank(bl_a),
    .game_over(go_a), .lost(lost_a), .master(m_a));

  pong_top #(.H_ACTIVE(W), .H_FP(4), .H_SYNC(8), .H_BP(12),
             .V_ACTIVE(H), .V_FP(1), .V_SYNC(2), .V_BP(30),
             .PADDLE_W(4), .PADDLE_H(32), .PUCK_SIZE(8), .PADDLE_STEP(8),
             .TICK_DIV(8), .IR_SAMPLE(24), .CARRIER_HALF(1)) b (
    .clk, .rst, .player_one(p1_b), .btn_up(up_b), .btn_down(dn_b), .speed,
    .view_3d, .locked_camera(locked), .use_ir,
    .wire_in(wire_ab), .wire_out(wire_ba), .ir_in(irin_b), .ir_led(led_b),
    .vga_rgb(rgb_b), .vga_hsync(hs_b), .vga_vsync(vs_b), .vga_blank(bl_b),
    .game_over(go_b), .lost(lost_b), .master(m_b));

  // IR receiver chip model: carrier seen in the last two cycles
  logic led_a_d, led_b_d;
  always @(posedge clk) begin
    led_a_d <= led_a;
    led_b_d <= led_b;
  end
  assign irin_b = led_a || led_a_d;
  assign irin_a = led_b || led_b_d;

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters
  int n_wall = 0, n_return = 0, n_handoff = 0, n_reject = 0, n_wired = 0, n_ir = 0;
  int n_px2d = 0, n_px3d = 0, n_mirror = 0, n_frames = 0;
  logic [5:0] vy_a_d, vy_b_d;
  logic m_a_d, m_b_d;
  always @(posedge clk) if (!rst) begin
    vy_a_d <= a.vel_y; vy_b_d <= b.vel_y;
    m_a_d <= m_a; m_b_d <= m_b;
    if ((m_a && a.vel_y != vy_a_d && m_a_d) || (m_b && b.vel_y != vy_b_d && m_b_d)) n_wall++;
    if ((m_a_d && !m_a && !go_a) || (m_b_d && !m_b && !go_b)) n_return++;
    if ((!m_a_d && m_a) || (!m_b_d && m_b)) n_handoff++;
    if (a.u_logic.rx_valid && m_a && a.rx_data.ptype inside {pong_pkg::PKT_PUCK_X, pong_pkg::PKT_PUCK_Y})
      n_reject++;
    if (a.u_wrx.valid || b.u_wrx.valid) n_wired++;
    if (a.u_irx.valid || b.u_irx.valid) n_ir++;
    if (!bl_a && rgb_a != 0) begin
      if (view_3d) n_px3d++; else n_px2d++;
    end
    if (a.frame) n_frames++;
  end

  // paddles follow their own station's puck
  always @(posedge clk) begin
    up_b <= (b.local_y > b.puck_y + 2);
    dn_b <= (b.local_y + 2 < b.puck_y);
  end
  bit a_tracks = 1;
  always @(posedge clk) begin
    // when not tracking, A moves its paddle away from the puck
    up_a <= a_tracks ? (a.local_y > a.puck_y + 2) : (a.local_y <= a.puck_y);
    dn_a <= a_tracks ? (a.local_y + 2 < a.puck_y) : (a.local_y > a.puck_y);
  end

  // while A is master, B must show A's puck mirrored once A's packets are in
  always @(posedge clk) if (!rst && a.frame && m_a && m_a_d && !m_b && !go_a && n_frames > 2 && !use_ir) begin
    check(int'(b.puck_x) == W - int'(a.puck_x) && b.puck_y == a.puck_y,
          $sformatf("B shows %0d,%0d, A has %0d,%0d", b.puck_x, b.puck_y, a.puck_x, a.puck_y));
    n_mirror++;
  end

  task automatic restart(input bit pa, input bit pb);
    @(negedge clk);
    rst = 1; p1_a = pa; p1_b = pb;
    repeat (3) @(negedge clk);
    rst = 0;
  endtask

  task automatic frames(input int n);
    repeat (n) @(posedge a.frame);
  endtask

  initial begin
    int r0, h0, w0;
    // 1. misconfigured: two masters
    restart(1, 1);
    frames(4);
    check(m_a && m_b, "both masters");
    check(n_reject > 0, "updates rejected by a master");
    // 2. wired game
    restart(1, 0);
    check(m_a && !m_b, "A starts as master");
    r0 = n_return; h0 = n_handoff;
    for (int k = 0; k < 8; k++) begin
      view_3d = k[0];
      locked  = k[1];
      frames(20);
    end
    check(!go_a && !go_b, "wired game still running");
    check(n_return - r0 >= 4 && n_handoff - h0 >= 4, $sformatf("returns %0d handoffs %0d on the wire", n_return - r0, n_handoff - h0));
    // 3. infra-red game
    use_ir = 1;
    restart(0, 1);
    check(!m_a && m_b, "B starts as master");
    r0 = n_return; h0 = n_handoff; w0 = n_wired;
    frames(160);
    check(!go_a && !go_b, "IR game still running");
    check(n_return - r0 >= 2 && n_handoff - h0 >= 2, $sformatf("returns %0d handoffs %0d over IR", n_return - r0, n_handoff - h0));
    check(n_wired == w0, "wired receiver idle while IR is used");
    // 4. A stops tracking and loses
    a_tracks = 0;
    for (int k = 0; k < 200 && !(go_a && go_b); k++) frames(1);
    frames(2);
    check(go_a && lost_a, "A missed and lost");
    check(go_b && !lost_b, "B told of the win");
    $display("walls %0d returns %0d handoffs %0d rejects %0d wired %0d ir %0d px2d %0d px3d %0d mirror %0d",
             n_wall, n_return, n_handoff, n_reject, n_wired, n_ir, n_px2d, n_px3d, n_mirror);
    check(n_wall > 0, "wall bounce happened");
    check(n_wired > 0 && n_ir > 0, "both links carried packets");
    check(n_px2d > 0 && n_px3d > 0, "both views drew");
    check(n_mirror > 10, "mirrored puck checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
