// vga_timing: raster counters and sync for the monitor.
//
// Counts hcount across H_TOTAL pixels and vcount across V_TOTAL lines.
// The defaults are the 1024x768 at 60 Hz format (65 MHz pixel clock), which
// matches the 11-bit puck x and 10-bit y coordinates of the game. Syncs
// are active low; `blank` is high outside the visible area. `frame` pulses
// for one cycle at the first pixel of the first blank line, once per
// screen refresh, and starts the game update. All outputs are registered
// and change together.
module vga_timing #(
  parameter int H_ACTIVE = 1024,
  parameter int H_FP     = 24,
  parameter int H_SYNC   = 136,
  parameter int H_BP     = 160,
  parameter int V_ACTIVE = 768,
  parameter int V_FP     = 3,
  parameter int V_SYNC   = 6,
  parameter int V_BP     = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank,
  output logic        frame
);
  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [10:0] nh;
  logic [9:0]  nv;

  always_comb begin
    nh = hcount + 11'd1;
    nv = vcount;
    if (32'(hcount) == H_TOTAL - 1) begin
      nh = '0;
      nv = (32'(vcount) == V_TOTAL - 1) ? 10'd0 : vcount + 10'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
      frame  <= 1'b0;
    end else begin
      hcount <= nh;
      vcount <= nv;
      hsync  <= !((32'(nh) >= H_ACTIVE + H_FP) && (32'(nh) < H_ACTIVE + H_FP + H_SYNC));
      vsync  <= !((32'(nv) >= V_ACTIVE + V_FP) && (32'(nv) < V_ACTIVE + V_FP + V_SYNC));
      blank  <= (32'(nh) >= H_ACTIVE) || (32'(nv) >= V_ACTIVE);
      frame  <= (nh == 11'd0) && (32'(nv) == V_ACTIVE);
    end
  end

endmodule
