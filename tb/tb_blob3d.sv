// tb_blob3d: a projected box shaped like the hexagon of the perspective
// view (top face P2-P3-P6-P5 above front face P1-P2-P5-P4). Random pixels
// are classified with a real-arithmetic reference of the two trapezoids;
// the pixel must be the top colour, the front colour or black.
module tb_blob3d;
  import pong_pkg::*;
  localparam logic [23:0] TOP = 24'h112233, FRONT = 24'h445566;
  spoint_t pts [6];
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic hit;
  logic [23:0] pixel;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  blob3d #(.TOP_COLOR(TOP), .FRONT_COLOR(FRONT)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // inside a trapezoid with horizontal top (yt) and bottom (yb), strictly
  function automatic int in_trap(input real h, input real v, input real yt, input real yb,
                                 input real xtl, input real xtr, input real xbl, input real xbr);
    real xl, xr;
    if (v <= yt || v >= yb) return 0;
    xl = xtl + (xbl - xtl) * (v - yt) / (yb - yt);
    xr = xtr + (xbr - xtr) * (v - yt) / (yb - yt);
    return (h > xl + 1e-6 && h < xr - 1e-6) ? 1 : 0;
  endfunction

  initial begin
    int h, v, dx, yt;
    logic [23:0] want;
    bit edge_px;
    for (int shape = 0; shape < 20; shape++) begin
      dx = $urandom_range(0, 400); yt = $urandom_range(0, 300);
      pts[0] = '{x: 12'(dx + 120), y: 12'(yt + 110)};   // P1
      pts[1] = '{x: 12'(dx + 100), y: 12'(yt + 50)};    // P2
      pts[2] = '{x: 12'(dx + 150), y: 12'(yt)};         // P3
      pts[3] = '{x: 12'(dx + 280), y: 12'(yt + 110)};   // P4
      pts[4] = '{x: 12'(dx + 300), y: 12'(yt + 50)};    // P5
      pts[5] = '{x: 12'(dx + 250), y: 12'(yt)};         // P6
      for (int j = 0; j < 1000; j++) begin
        h = dx + $urandom_range(80, 320);
        v = yt + $urandom_range(0, 130);
        hcount = 11'(h); vcount = 10'(v);
        #1;
        // skip pixels on a border, where rounding decides
        edge_px = (v == yt) || (v == yt + 50) || (v == yt + 110);
        if (in_trap(h, v, yt, yt + 50, dx + 150, dx + 250, dx + 100, dx + 300)) want = TOP;
        else if (in_trap(h, v, yt + 50, yt + 110, dx + 100, dx + 300, dx + 120, dx + 280)) want = FRONT;
        else want = 24'h0;
        // a pixel within one column of a slanted side is left to rounding
        for (int o = -1; o <= 1; o += 2) begin
          if (in_trap(h + o, v, yt, yt + 50, dx + 150, dx + 250, dx + 100, dx + 300)
              != in_trap(h, v, yt, yt + 50, dx + 150, dx + 250, dx + 100, dx + 300)) edge_px = 1;
          if (in_trap(h + o, v, yt + 50, yt + 110, dx + 100, dx + 300, dx + 120, dx + 280)
              != in_trap(h, v, yt + 50, yt + 110, dx + 100, dx + 300, dx + 120, dx + 280)) edge_px = 1;
        end
        if (edge_px) continue;
        check(pixel == want && hit == (want != 0), $sformatf("(%0d,%0d) %h want %h", h, v, pixel, want));
        seen[(want == TOP) ? 0 : (want == FRONT) ? 1 : 2]++;
      end
    end
    for (int k = 0; k < 3; k++) check(seen[k] > 1000, "top, front and outside covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
