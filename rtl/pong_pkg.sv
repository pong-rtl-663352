// pong_pkg: types and constants shared by the two-station pong design.
//
// A station exchanges fixed 15-bit packets with its opponent. The packet is
// a 3-bit type tag and a 12-bit payload. The width of 15 bits follows the
// design; the tag/payload split and the type codes are this design's own.
//
//   PKT_PADDLE  payload[9:0]  sender's paddle centre y
//   PKT_PUCK_X  payload[10:0] puck centre x, in the sender's frame
//   PKT_PUCK_Y  payload[9:0]  puck centre y
//   PKT_PUCK_V  payload[10] handoff, [9:5] vx, [4:0] vy (signed, sender's frame)
//   PKT_LOSS    sender missed the puck and lost
//
// Screen points of the perspective renderer are signed 12-bit pixel
// coordinates so that projected corners may lie off screen.
package pong_pkg;

  localparam int PKT_BITS = 15;

  typedef enum logic [2:0] {
    PKT_PADDLE = 3'd0,
    PKT_PUCK_X = 3'd1,
    PKT_PUCK_Y = 3'd2,
    PKT_PUCK_V = 3'd3,
    PKT_LOSS   = 3'd4
  } pkt_type_e;

  typedef struct packed {
    pkt_type_e   ptype;
    logic [11:0] payload;
  } packet_t;

  // A projected point on the screen.
  typedef struct packed {
    logic signed [11:0] x;
    logic signed [11:0] y;
  } spoint_t;

  // A point of the 2D table plus a height above it (game units).
  typedef struct packed {
    logic signed [11:0] gx;   // along the table, from the local paddle
    logic signed [11:0] gy;   // across the table
    logic signed [11:0] h;    // height above the table
  } tpoint_t;

  // Side-of-line value of (px,py) against the line (x1,y1)->(x2,y2), in the
  // form of the design's line equation:
  //   L - b = py*(x2-x1) + px*(y1-y2) - (y2*(x2-x1) + x2*(y1-y2)).
  // With screen y growing downwards and y1 < y2, a positive value means the
  // point is left of the line, a negative one right of it.
  function automatic logic signed [31:0] line_side(
      input logic signed [12:0] px, input logic signed [12:0] py,
      input logic signed [12:0] x1, input logic signed [12:0] y1,
      input logic signed [12:0] x2, input logic signed [12:0] y2);
    logic signed [31:0] dx, dy;
    dx = 32'(x2) - 32'(x1);
    dy = 32'(y1) - 32'(y2);
    return (32'(py) * dx + 32'(px) * dy) - (32'(y2) * dx + 32'(x2) * dy);
  endfunction

endpackage
