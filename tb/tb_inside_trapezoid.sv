// tb_inside_trapezoid: random trapezoids with horizontal top and bottom
// sides (as the perspective view produces) and random pixels. The
// reference interpolates the left and right sides in real arithmetic at
// the pixel's row; pixels on a side count as inside.
module tb_inside_trapezoid;
  import pong_pkg::*;
  spoint_t tl, tr, br, bl;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic is_in;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;

  inside_trapezoid dut (.*);

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

  initial begin
    int yt, yb, xtl, xtr, xbl, xbr, h, v;
    real xl, xr;
    bit want;
    for (int i = 0; i < 400; i++) begin
      yt = $urandom_range(0, 600); yb = yt + $urandom_range(1, 160);
      xtl = $urandom_range(0, 800); xtr = xtl + $urandom_range(0, 200);
      xbl = xtl - 100 + $urandom_range(0, 200); xbr = xbl + $urandom_range(0, 300);
      if (xbr < xbl) xbr = xbl;
      tl = '{x: 12'(xtl), y: 12'(yt)}; tr = '{x: 12'(xtr), y: 12'(yt)};
      bl = '{x: 12'(xbl), y: 12'(yb)}; br = '{x: 12'(xbr), y: 12'(yb)};
      for (int j = 0; j < 50; j++) begin
        h = $urandom_range(((xtl < xbl) ? xtl : xbl) - 20 < 0 ? 0 : ((xtl < xbl) ? xtl : xbl) - 20,
                           ((xtr > xbr) ? xtr : xbr) + 20);
        v = $urandom_range(yt < 10 ? 0 : yt - 10, yb + 10);
        hcount = 11'(h); vcount = 10'(v);
        #1;
        if (v < yt || v > yb) want = 0;
        else begin
          xl = xtl + real'(xbl - xtl) * real'(v - yt) / real'(yb - yt);
          xr = xtr + real'(xbr - xtr) * real'(v - yt) / real'(yb - yt);
          if ((h - xl) * (h - xl) < 1e-9 || (h - xr) * (h - xr) < 1e-9) continue;
          want = (h > xl) && (h < xr);
        end
        check(is_in == want, $sformatf("(%0d,%0d) in [%0d..%0d]-[%0d..%0d] y %0d..%0d: %0d",
              h, v, xtl, xtr, xbl, xbr, yt, yb, is_in));
        if (want) n_in++; else n_out++;
      end
    end
    check(n_in > 1000 && n_out > 1000, "both outcomes covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
