// tb_trad_renderer: random positions and raster points; the pixel one
// clock later must be the puck, local paddle, opponent paddle or black
// colour exactly as the centre-and-size rectangles say.
module tb_trad_renderer;
  logic clk = 0;
  logic [10:0] hcount, puck_x;
  logic [9:0]  vcount, puck_y, local_paddle_y, remote_paddle_y;
  logic [23:0] pixel;
  int checks = 0, failures = 0;
  int hits[4] = '{0, 0, 0, 0};

  trad_renderer dut (.*);

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
    logic [23:0] want;
    int h, v, px, py, ly, ry, k;
    for (int i = 0; i < 20000; i++) begin
      px = $urandom_range(16, 1008); py = $urandom_range(16, 752);
      ly = $urandom_range(64, 704);  ry = $urandom_range(64, 704);
      k = $urandom_range(0, 3);
      // aim at an object most of the time
      case (k)
        0: begin h = px + $urandom_range(0, 40) - 20; v = py + $urandom_range(0, 40) - 20; end
        1: begin h = $urandom_range(0, 20);           v = ly + $urandom_range(0, 140) - 70; end
        2: begin h = 1024 - $urandom_range(1, 20);    v = ry + $urandom_range(0, 140) - 70; end
        default: begin h = $urandom_range(0, 1343);   v = $urandom_range(0, 805); end
      endcase
      if (h < 0) h = 0;
      if (v < 0) v = 0;
      @(negedge clk);
      hcount = 11'(h); vcount = 10'(v);
      puck_x = 11'(px); puck_y = 10'(py);
      local_paddle_y = 10'(ly); remote_paddle_y = 10'(ry);
      if (h >= px - 16 && h < px + 16 && v >= py - 16 && v < py + 16) begin
        want = 24'hFFFFFF; hits[0]++;
      end else if (h < 16 && v >= ly - 64 && v < ly + 64) begin
        want = 24'h00FF00; hits[1]++;
      end else if (h >= 1008 && h < 1024 && v >= ry - 64 && v < ry + 64) begin
        want = 24'hFF00FF; hits[2]++;
      end else begin
        want = 24'h0; hits[3]++;
      end
      @(negedge clk);
      check(pixel == want, $sformatf("pixel at %0d,%0d: %h want %h", h, v, pixel, want));
    end
    for (int j = 0; j < 4; j++) check(hits[j] > 100, "each case covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
