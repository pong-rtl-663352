// tb_mapping_module: projects random points with random camera positions
// and orientations and compares with the same equations evaluated in real
// arithmetic (d = Rx Ry Rz (a - c), b = e_z/d_z * d - e), using the same
// sine and cosine values. The design truncates d to whole units and keeps
// 8 fraction bits of e_z/d_z, so it may differ by 2 pixels, plus e_z/d_z
// pixels, plus 1% of the distance from the vanishing point.
// Also checks the latency (DIV_N + 6 edges) and that a point behind the
// camera gives a saturated, in-range result.
module tb_mapping_module;
  import pong_pkg::*;
  localparam int DIV_N = 20;
  logic clk = 0, rst = 1, start = 0, busy, done;
  tpoint_t a, cam;
  logic signed [7:0] cos_x, sin_x, cos_y, sin_y, cos_z, sin_z;
  logic signed [11:0] e_x, e_y;
  logic [10:0] e_z;
  spoint_t b;
  int checks = 0, failures = 0, compared = 0;

  mapping_module #(.DIV_N(DIV_N)) dut (.*);

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

  function automatic real q5(input logic signed [7:0] v);
    return real'(v) / 32.0;
  endfunction

  initial begin
    real vx, vy, vz, t1, t2, dx, dy, dz, bx, by, tol_x, tol_y;
    int lat;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 1500; i++) begin
      real ax, ay, az;
      int tx, ty, tz;
      tx = (i % 3 == 0) ? 0 : $urandom_range(0, 16) - 8;
      ty = (i % 3 == 0) ? 0 : $urandom_range(0, 8) - 4;
      tz = (i % 3 == 0) ? 0 : $urandom_range(0, 8) - 4;
      // cosine 1-|x|, sine x in this range
      cos_x = 8'(32 - ((tx < 0) ? -tx : tx)); sin_x = 8'(tx);
      cos_y = 8'(32 - ((ty < 0) ? -ty : ty)); sin_y = 8'(ty);
      cos_z = 8'(32 - ((tz < 0) ? -tz : tz)); sin_z = 8'(tz);
      e_x = -12'sd512; e_y = -12'sd384; e_z = 11'($urandom_range(256, 1000));
      a.gx = 12'($urandom_range(0, 1023)); a.gy = 12'($urandom_range(0, 767));
      a.h  = 12'($urandom_range(0, 64));
      cam.gx = -12'($urandom_range(100, 400)); cam.gy = 12'($urandom_range(0, 767));
      cam.h  = 12'($urandom_range(64, 256));
      if (i == 7) begin a.gx = -12'sd500; cam.gx = 12'sd0; end   // behind the camera
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 200) begin
        @(negedge clk);
        lat++;
      end
      check(lat == DIV_N + 7, $sformatf("latency %0d", lat));
      // reference
      vx = real'(a.gy - cam.gy); vy = real'(cam.h - a.h); vz = real'(a.gx - cam.gx);
      t1 = q5(cos_z) * vx + q5(sin_z) * vy;  t2 = -q5(sin_z) * vx + q5(cos_z) * vy;
      vx = t1; vy = t2;
      t1 = q5(cos_y) * vx - q5(sin_y) * vz;  t2 = q5(sin_y) * vx + q5(cos_y) * vz;
      vx = t1; vz = t2;
      t1 = q5(cos_x) * vy + q5(sin_x) * vz;  t2 = -q5(sin_x) * vy + q5(cos_x) * vz;
      dx = vx; dy = t1; dz = t2;
      if (dz > 50.0) begin
        bx = real'(e_z) / dz * dx - real'(e_x);
        by = real'(e_z) / dz * dy - real'(e_y);
        if (bx > -2000 && bx < 2000 && by > -2000 && by < 2000) begin
          tol_x = 2.0 + real'(e_z) / dz + 0.01 * ((bx + real'(e_x) < 0) ? -(bx + real'(e_x)) : bx + real'(e_x));
          tol_y = 2.0 + real'(e_z) / dz + 0.01 * ((by + real'(e_y) < 0) ? -(by + real'(e_y)) : by + real'(e_y));
          check((real'(b.x) - bx) < tol_x && (bx - real'(b.x)) < tol_x, $sformatf("bx %0d want %f", int'(b.x), bx));
          check((real'(b.y) - by) < tol_y && (by - real'(b.y)) < tol_y, $sformatf("by %0d want %f dz %f ez %0d", int'(b.y), by, dz, e_z));
          compared++;
        end
      end else if (dz <= 0.0) begin
        check(b.x >= -12'sd2048 && b.x <= 12'sd2047, "behind camera saturates");
      end
    end
    check(compared > 1000, $sformatf("compared %0d", compared));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
