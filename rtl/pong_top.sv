// pong_top: one station of two-player pong played across two FPGAs.
//
// Two identical stations each run this design and are cross-connected by a
// serial link. Each station keeps the full game state (pong_logic), sends
// its share of that state once per frame as 15-bit packets (pong_tx) and
// applies the packets of the opponent. The switch `player_one` must differ
// between the stations; it decides which one moves the puck first.
//
// Two links are built. The wired link (wired_tx / wired_rx, 9 clock cycles
// per bit) is the one that works at frame rate. The infra-red link (ir_tx /
// ir_rx with ir_idle_detect, 1800 us per bit on a 300 us tick, and
// ir_carrier for the 40 kHz LED drive) needs 28.8 ms per packet, slower
// than the 16.7 ms frame, so it delivers the state only every few frames.
// `use_ir` selects which receiver feeds the game and which transmitter
// the scheduler talks to; both transmit lines are always driven (the idle
// one stays low).
//
// The picture comes from one of two stateless renderers: the top-down
// trad_renderer or the perspective one_pt_perspective, chosen by the
// `view_3d` switch. `locked_camera` fixes the perspective camera across the
// middle of the table instead of following the local paddle. The RGB
// output and the syncs are aligned: the renderers add one clock, and so do
// the delayed sync registers here.
//
// Status outputs: `master` is high while this station moves the puck,
// `game_over` once either player has missed, and `lost` when the miss was
// the local player's.
//
// The block structure, the switches and the 24-bit pixel follow the
// design; one clock for everything (with the slow IR timing made from
// clock enables) and the `use_ir` selection are this design's choices. The
// defaults assume a 27 MHz clock for the link timing.
module pong_top
  import pong_pkg::*;
#(
  parameter int H_ACTIVE       = 1024,
  parameter int H_FP           = 24,
  parameter int H_SYNC         = 136,
  parameter int H_BP           = 160,
  parameter int V_ACTIVE       = 768,
  parameter int V_FP           = 3,
  parameter int V_SYNC         = 6,
  parameter int V_BP           = 29,
  parameter int PADDLE_W       = 16,
  parameter int PADDLE_H       = 128,
  parameter int PUCK_SIZE      = 32,
  parameter int PADDLE_STEP    = 4,
  parameter int CYCLES_PER_BIT = 9,
  parameter int TICK_DIV       = 8100,
  parameter int IR_SAMPLE      = 24300,
  parameter int CARRIER_HALF   = 337
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        player_one,
  input  logic        btn_up,
  input  logic        btn_down,
  input  logic [3:0]  speed,
  input  logic        view_3d,
  input  logic        locked_camera,
  input  logic        use_ir,
  input  logic        wire_in,
  output logic        wire_out,
  input  logic        ir_in,
  output logic        ir_led,
  output logic [23:0] vga_rgb,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        vga_blank,
  output logic        game_over,
  output logic        lost,
  output logic        master
);
  // raster
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank, frame;

  vga_timing #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_vga (
    .clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank, .frame
  );

  // game state
  logic [10:0]       puck_x;
  logic [9:0]        puck_y, local_y, remote_y;
  logic signed [5:0] vel_x, vel_y;
  logic              handoff, send_puck, tx_go;
  logic              rx_valid;
  packet_t           rx_data;

  pong_logic #(
    .SCREEN_W(H_ACTIVE), .SCREEN_H(V_ACTIVE), .PADDLE_W(PADDLE_W),
    .PADDLE_H(PADDLE_H), .PUCK_SIZE(PUCK_SIZE), .PADDLE_STEP(PADDLE_STEP)
  ) u_logic (
    .clk, .rst, .player_one, .btn_up, .btn_down, .speed, .frame,
    .rx_valid, .rx_data,
    .puck_x, .puck_y, .local_paddle_y(local_y), .remote_paddle_y(remote_y),
    .vel_x, .vel_y, .master, .handoff, .send_puck, .game_over, .lost, .tx_go
  );

  // packet scheduling
  logic    tx_ready, tx_busy;
  packet_t tx_data;

  pong_tx u_ptx (
    .clk, .rst, .go(tx_go), .send_puck, .handoff, .lost,
    .paddle_y(local_y), .puck_x, .puck_y, .vel_x, .vel_y,
    .tx_busy, .tx_ready, .tx_data
  );

  // wired link
  logic                wtx_busy, wrx_valid;
  logic [PKT_BITS-1:0] wrx_data;

  wired_tx #(.NBITS(PKT_BITS), .CYCLES_PER_BIT(CYCLES_PER_BIT)) u_wtx (
    .clk, .rst, .ready(tx_ready && !use_ir), .data(tx_data),
    .busy(wtx_busy), .line(wire_out)
  );

  wired_rx #(.NBITS(PKT_BITS), .CYCLES_PER_BIT(CYCLES_PER_BIT)) u_wrx (
    .clk, .rst, .line_in(wire_in), .valid(wrx_valid), .data(wrx_data)
  );

  // infra-red link
  logic                tick, itx_busy, itx_line, irx_valid, ir_idle;
  logic [PKT_BITS-1:0] irx_data;
  logic [1:0]          ir_sync;

  tick_gen #(.DIV(TICK_DIV)) u_tick (.clk, .rst, .tick);

  ir_tx #(.NBITS(PKT_BITS)) u_itx (
    .clk, .rst, .tick, .ready(tx_ready && use_ir), .data(tx_data),
    .busy(itx_busy), .line(itx_line)
  );

  ir_carrier #(.HALF_PERIOD(CARRIER_HALF)) u_carrier (
    .clk, .rst, .line(itx_line), .led(ir_led)
  );

  always_ff @(posedge clk) begin
    if (rst) ir_sync <= '0;
    else     ir_sync <= {ir_sync[0], ir_in};
  end

  ir_idle_detect u_idle (
    .clk, .rst, .tick, .line_in(ir_sync[1]), .idle(ir_idle)
  );

  ir_rx #(.NBITS(PKT_BITS), .SAMPLE_CYCLES(IR_SAMPLE)) u_irx (
    .clk, .rst, .line_in(ir_in), .idle(ir_idle), .valid(irx_valid), .data(irx_data)
  );

  assign tx_busy  = use_ir ? itx_busy : wtx_busy;
  assign rx_valid = use_ir ? irx_valid : wrx_valid;
  assign rx_data  = use_ir ? packet_t'(irx_data) : packet_t'(wrx_data);

  // renderers and view switch
  logic [23:0] pix_2d, pix_3d;
  logic        pass_done;

  trad_renderer #(
    .SCREEN_W(H_ACTIVE), .PADDLE_W(PADDLE_W), .PADDLE_H(PADDLE_H), .PUCK_SIZE(PUCK_SIZE)
  ) u_trad (
    .clk, .hcount, .vcount, .puck_x, .puck_y,
    .local_paddle_y(local_y), .remote_paddle_y(remote_y), .pixel(pix_2d)
  );

  one_pt_perspective #(
    .SCREEN_W(H_ACTIVE), .SCREEN_H(V_ACTIVE), .PADDLE_W(PADDLE_W),
    .PADDLE_H(PADDLE_H), .PUCK_SIZE(PUCK_SIZE)
  ) u_persp (
    .clk, .rst, .frame, .locked_camera, .puck_x, .puck_y,
    .local_paddle_y(local_y), .remote_paddle_y(remote_y),
    .hcount, .vcount, .pass_done, .pixel(pix_3d)
  );

  logic blank_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      vga_hsync <= 1'b1;
      vga_vsync <= 1'b1;
      blank_d   <= 1'b1;
    end else begin
      vga_hsync <= hsync;
      vga_vsync <= vsync;
      blank_d   <= blank;
    end
  end

  assign vga_blank = blank_d;
  assign vga_rgb   = blank_d ? 24'h0 : (view_3d ? pix_3d : pix_2d);

endmodule
