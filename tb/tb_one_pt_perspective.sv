// tb_one_pt_perspective: the perspective renderer at its default sizes.
// Checks that the output is black before the first projection pass, that a
// pass of 18 projections ends within the 38 blank lines (38 * 1344 cycles)
// after the frame pulse, and that pixels at the centres of box faces,
// computed here from the camera equations in real arithmetic, show the
// right colour: puck top, local paddle front and top, opponent paddle
// front, both with the locked camera and with the camera following the
// local paddle (which then appears in the middle of the screen).
module tb_one_pt_perspective;
  logic clk = 0, rst = 1, frame = 0, locked_camera = 1, pass_done;
  logic [10:0] puck_x, hcount;
  logic [9:0]  puck_y, local_paddle_y, remote_paddle_y, vcount;
  logic [23:0] pixel;
  int checks = 0, failures = 0;

  one_pt_perspective dut (.*);

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

  // camera of the defaults: 256 behind, 192 high, tilt -4/32 rad, e = (-512,-384,512)
  real cam_gy;
  task automatic project(input real gx, input real gy, input real h, output real bx, output real by);
    real vx, vy, vz, c, s, dy, dz;
    c = 28.0 / 32.0;  s = -4.0 / 32.0;     // cosine 1-|x|, sine x
    vx = gy - cam_gy; vy = 192.0 - h; vz = gx + 256.0;
    dy = c * vy + s * vz;
    dz = -s * vy + c * vz;
    bx = 512.0 / dz * vx + 512.0;
    by = 512.0 / dz * dy + 384.0;
  endtask

  // colour at the centre of a face given by four table points
  task automatic probe(input real g [4][3], input logic [23:0] want, input string what);
    real sx, sy, bx, by;
    sx = 0; sy = 0;
    for (int k = 0; k < 4; k++) begin
      project(g[k][0], g[k][1], g[k][2], bx, by);
      sx += bx / 4.0; sy += by / 4.0;
    end
    @(negedge clk);
    hcount = 11'($rtoi(sx)); vcount = 10'($rtoi(sy));
    @(negedge clk);
    check(pixel == want, $sformatf("%s at (%0d,%0d): %h want %h", what, hcount, vcount, pixel, want));
  endtask

  task automatic run_pass();
    int n;
    @(negedge clk);
    frame = 1;
    @(negedge clk);
    frame = 0;
    n = 1;
    while (!pass_done && n < 100000) begin
      @(negedge clk);
      n++;
    end
    check(pass_done && n <= 38 * 1344, $sformatf("pass took %0d cycles", n));
    // per projection: one start cycle, DIV_N + 6 in the mapping module, one
    // to take its result
    check(n == 18 * (20 + 8) + 1, $sformatf("pass length %0d", n));
  endtask

  initial begin
    real g [4][3];
    real px, py, ly, ry;
    hcount = 0; vcount = 0;
    px = 600; py = 600; ly = 200; ry = 384;
    puck_x = 11'(600); puck_y = 10'(600); local_paddle_y = 10'(200); remote_paddle_y = 10'(384);
    repeat (3) @(posedge clk);
    rst <= 0;
    // before any pass: black everywhere
    cam_gy = 384;
    g = '{'{px - 16, py - 16, 32}, '{px + 16, py - 16, 32}, '{px - 16, py + 16, 32}, '{px + 16, py + 16, 32}};
    probe(g, 24'h0, "before first pass");

    for (int round = 0; round < 2; round++) begin
      locked_camera = (round == 0);
      cam_gy = (round == 0) ? 384 : ly;
      run_pass();
      // puck top face
      g = '{'{px - 16, py - 16, 32}, '{px + 16, py - 16, 32}, '{px - 16, py + 16, 32}, '{px + 16, py + 16, 32}};
      probe(g, 24'hFFFFFF, "puck top");
      // local paddle front face (x = 0 plane)
      g = '{'{0, ly - 64, 0}, '{0, ly + 64, 0}, '{0, ly - 64, 32}, '{0, ly + 64, 32}};
      probe(g, 24'h008000, "local paddle front");
      // local paddle top face
      g = '{'{0, ly - 64, 32}, '{0, ly + 64, 32}, '{16, ly - 64, 32}, '{16, ly + 64, 32}};
      probe(g, 24'h00FF00, "local paddle top");
      // opponent paddle front face
      g = '{'{1008, ry - 64, 0}, '{1008, ry + 64, 0}, '{1008, ry - 64, 32}, '{1008, ry + 64, 32}};
      probe(g, 24'h800080, "opponent paddle front");
      // empty corner of the screen
      @(negedge clk);
      hcount = 11'd5; vcount = 10'd5;
      @(negedge clk);
      check(pixel == 24'h0, "background black");
    end
    // following camera: local paddle centred on the screen
    @(negedge clk);
    hcount = 11'd512;
    vcount = 10'd700;
    begin
      real bx, by;
      project(8, ly, 16, bx, by);
      vcount = 10'($rtoi(by));
    end
    @(negedge clk);
    check(pixel == 24'h008000 || pixel == 24'h00FF00, "local paddle in the middle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
