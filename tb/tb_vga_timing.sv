// tb_vga_timing: runs a small raster (20+2+3+3 by 10+1+2+1) for three
// frames and checks counters, sync and blank positions against the
// expected format, and exactly one `frame` pulse per frame at the first
// blank line. Then checks the line and frame length of the default format.
module tb_vga_timing;
  localparam int HA = 20, HF = 2, HS = 3, HB = 3, VA = 10, VF = 1, VS = 2, VB = 1;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  logic clk = 0, rst = 1;
  logic [10:0] hcount, hcount_f;
  logic [9:0]  vcount, vcount_f;
  logic hsync, vsync, blank, frame, hsync_f, vsync_f, blank_f, frame_f;
  int checks = 0, failures = 0;

  vga_timing #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
               .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut (.*);
  vga_timing full (.clk, .rst, .hcount(hcount_f), .vcount(vcount_f), .hsync(hsync_f),
                   .vsync(vsync_f), .blank(blank_f), .frame(frame_f));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int frames, h, v;
    longint n, last_frame;
    repeat (3) @(posedge clk);
    rst <= 0;
    frames = 0;
    for (int i = 1; i <= 3 * HT * VT; i++) begin
      @(posedge clk);
      @(negedge clk);
      h = i % HT;
      v = (i / HT) % VT;
      check(hcount == 11'(h) && vcount == 10'(v), $sformatf("counters at %0d: %0d,%0d", i, hcount, vcount));
      check(hsync == !(h >= HA + HF && h < HA + HF + HS), "hsync");
      check(vsync == !(v >= VA + VF && v < VA + VF + VS), "vsync");
      check(blank == (h >= HA || v >= VA), "blank");
      check(frame == (h == 0 && v == VA), "frame pulse");
      if (frame) frames++;
    end
    check(frames == 3, "one frame pulse per frame");
    // default 1024x768 format: 1344 x 806 cycles per frame
    n = 0; last_frame = -1;
    while (last_frame < 0 || n < last_frame + 2) begin
      @(posedge clk);
      n++;
      if (frame_f) begin
        if (last_frame >= 0) begin
          check(n - last_frame == 1344 * 806, $sformatf("frame length %0d", n - last_frame));
          break;
        end
        last_frame = n;
      end
      if (hcount_f == 11'd1343) check(1, "");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
