// tb_six_points: random boxes; checks the six corners: P1/P2/P3 on the
// left (gy - width/2), P4/P5/P6 on the right, P3/P6 far (gx + depth/2),
// the others near, P1/P4 on the table and the rest at the box height.
module tb_six_points;
  import pong_pkg::*;
  logic signed [11:0] gx, gy;
  logic [10:0] depth, width, height;
  tpoint_t pts [6];
  int checks = 0, failures = 0;

  six_points dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, d, w, hh, near, far, left, right;
    for (int i = 0; i < 2000; i++) begin
      x = $urandom_range(0, 1023); y = $urandom_range(0, 767);
      d = $urandom_range(0, 200);  w = $urandom_range(0, 200); hh = $urandom_range(0, 100);
      gx = 12'(x); gy = 12'(y); depth = 11'(d); width = 11'(w); height = 11'(hh);
      #1;
      near = x - d / 2; far = x + d / 2; left = y - w / 2; right = y + w / 2;
      check(pts[0] == '{gx: 12'(near), gy: 12'(left),  h: 12'(0)},  "P1");
      check(pts[1] == '{gx: 12'(near), gy: 12'(left),  h: 12'(hh)}, "P2");
      check(pts[2] == '{gx: 12'(far),  gy: 12'(left),  h: 12'(hh)}, "P3");
      check(pts[3] == '{gx: 12'(near), gy: 12'(right), h: 12'(0)},  "P4");
      check(pts[4] == '{gx: 12'(near), gy: 12'(right), h: 12'(hh)}, "P5");
      check(pts[5] == '{gx: 12'(far),  gy: 12'(right), h: 12'(hh)}, "P6");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
