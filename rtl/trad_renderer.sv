// trad_renderer: the classic top-down view of the table.
//
// Draws the local paddle against the left wall, the opponent's paddle
// against the right wall and a square puck. Paddles are placed by their
// centre y only, since their x is fixed; the puck by its centre x and y.
// Sizes are parameters. The pixel for (hcount, vcount) appears on `pixel`
// one clock later; anything outside the objects is black.
//
// Centre-based placement, fixed-x paddles and parameter sizes follow the
// design; the sizes and colours are this design's choices.
module trad_renderer #(
  parameter int          SCREEN_W     = 1024,
  parameter int          PADDLE_W     = 16,
  parameter int          PADDLE_H     = 128,
  parameter int          PUCK_SIZE    = 32,
  parameter logic [23:0] LOCAL_COLOR  = 24'h00_FF_00,
  parameter logic [23:0] REMOTE_COLOR = 24'hFF_00_FF,
  parameter logic [23:0] PUCK_COLOR   = 24'hFF_FF_FF
) (
  input  logic        clk,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [10:0] puck_x,
  input  logic [9:0]  puck_y,
  input  logic [9:0]  local_paddle_y,
  input  logic [9:0]  remote_paddle_y,
  output logic [23:0] pixel
);
  localparam int HP  = PUCK_SIZE / 2;
  localparam int HPD = PADDLE_H / 2;

  // true when v lies in [c - half, c + half)
  function automatic logic in_span(input int v, input int c, input int half);
    return (v >= c - half) && (v < c + half);
  endfunction

  logic in_local, in_remote, in_puck;

  always_comb begin
    int h, v;
    h = int'(hcount);
    v = int'(vcount);
    in_local  = (h < PADDLE_W) && in_span(v, int'(local_paddle_y), HPD);
    in_remote = (h >= SCREEN_W - PADDLE_W) && (h < SCREEN_W)
                && in_span(v, int'(remote_paddle_y), HPD);
    in_puck   = in_span(h, int'(puck_x), HP) && in_span(v, int'(puck_y), HP);
  end

  always_ff @(posedge clk) begin
    if (in_puck)        pixel <= PUCK_COLOR;
    else if (in_local)  pixel <= LOCAL_COLOR;
    else if (in_remote) pixel <= REMOTE_COLOR;
    else                pixel <= 24'h0;
  end

endmodule
