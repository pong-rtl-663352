// tb_pong_top_full: two stations at the default sizes (1024 x 768 raster,
// 27 MHz link timing), cross-connected by the wired link. Station A serves
// at speed 10, the fastest at which a paddle moving 4 pixels per frame
// still reaches the puck; both paddles track it. The test runs until A has
// returned the puck and B has taken over as master (one complete rally
// leg and handoff, about 48 frames), checks that B mirrors A's puck while A
// is master, and that both the top-down and the perspective view draw the
// objects (the view switch flips halfway).
module tb_pong_top_full;
  logic clk = 0, rst = 1;
  logic up_a = 0, dn_a = 0, up_b = 0, dn_b = 0, view_3d = 0;
  logic wire_ab, wire_ba, led_a, led_b;
  logic [23:0] rgb_a, rgb_b;
  logic hs_a, vs_a, bl_a, hs_b, vs_b, bl_b, go_a, go_b, lost_a, lost_b, m_a, m_b;
  int checks = 0, failures = 0;

  pong_top a (
    .clk, .rst, .player_one(1'b1), .btn_up(up_a), .btn_down(dn_a), .speed(4'd10),
    .view_3d, .locked_camera(1'b1), .use_ir(1'b0),
    .wire_in(wire_ba), .wire_out(wire_ab), .ir_in(1'b0), .ir_led(led_a),
    .vga_rgb(rgb_a), .vga_hsync(hs_a), .vga_vsync(vs_a), .vga_blank(bl_a),
    .game_over(go_a), .lost(lost_a), .master(m_a));

  pong_top b (
    .clk, .rst, .player_one(1'b0), .btn_up(up_b), .btn_down(dn_b), .speed(4'd10),
    .view_3d, .locked_camera(1'b0), .use_ir(1'b0),
    .wire_in(wire_ab), .wire_out(wire_ba), .ir_in(1'b0), .ir_led(led_b),
    .vga_rgb(rgb_b), .vga_hsync(hs_b), .vga_vsync(vs_b), .vga_blank(bl_b),
    .game_over(go_b), .lost(lost_b), .master(m_b));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100 * 1344 * 806) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    up_a <= (a.local_y > a.puck_y + 4);
    dn_a <= (a.local_y + 4 < a.puck_y);
    up_b <= (b.local_y > b.puck_y + 4);
    dn_b <= (b.local_y + 4 < b.puck_y);
  end

  int n_mirror = 0, n_frames = 0, px2d = 0, px3d = 0, n_wired = 0;
  always @(posedge clk) if (!rst) begin
    if (a.frame) n_frames++;
    if (a.frame && m_a && !m_b && !go_a && n_frames > 1) begin
      check(int'(b.puck_x) == 1024 - int'(a.puck_x) && b.puck_y == a.puck_y, "B mirrors A's puck");
      n_mirror++;
    end
    if (!bl_b && rgb_b != 0) begin
      if (view_3d) px3d++; else px2d++;
    end
    if (a.u_wrx.valid || b.u_wrx.valid) n_wired++;
  end

  initial begin
    int f;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(m_a && !m_b, "A serves");
    f = 0;
    while (!(m_b && !m_a) && f < 80) begin
      @(posedge a.frame);
      f++;
      if (f == 10) view_3d = 1;
    end
    check(m_b && !m_a, $sformatf("handoff to B after %0d frames", f));
    check(!go_a && !go_b, "no miss");
    @(posedge a.frame);
    check(n_mirror > 20, $sformatf("mirror checked %0d times", n_mirror));
    check(px2d > 1000 && px3d > 1000, $sformatf("pixels 2D %0d 3D %0d", px2d, px3d));
    check(n_wired > 2 * f, "packets over the wire");
    $display("frames %0d packets %0d", f, n_wired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
