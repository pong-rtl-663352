// six_points: the six box corners that outline an object in perspective.
//
// An object (puck or paddle) is a box standing on the table. Its footprint
// is given by its centre (gx along the table, gy across it), its depth
// (extent along gx) and width (extent along gy); its height is a further
// input. The camera looks along +gx, so "near" is the smaller gx and
// "left" the smaller gy. The corners, numbered as in the renderer:
//   P1 near-left bottom   P2 near-left top   P3 far-left top
//   P4 near-right bottom  P5 near-right top  P6 far-right top
// P2-P3-P6-P5 is the top face (upper trapezoid on screen) and
// P1-P2-P5-P4 the front face (lower trapezoid). Purely combinational.
//
// Six points per object and the two trapezoids follow the design. The
// height as an extra input and the numbering of the points are this
// design's: the text names the extreme left and right projected points
// P2 and P5 and the upper trapezoid sides P2-P3 and P5-P6, which this
// numbering satisfies.
module six_points
  import pong_pkg::*;
(
  input  logic signed [11:0] gx,
  input  logic signed [11:0] gy,
  input  logic [10:0]        depth,
  input  logic [10:0]        width,
  input  logic [10:0]        height,
  output tpoint_t            pts [6]
);
  logic signed [11:0] near, far, left, right, top;

  always_comb begin
    near  = gx - 12'(depth >> 1);
    far   = gx + 12'(depth >> 1);
    left  = gy - 12'(width >> 1);
    right = gy + 12'(width >> 1);
    top   = 12'(height);
    pts[0] = '{gx: near, gy: left,  h: 12'sd0};
    pts[1] = '{gx: near, gy: left,  h: top};
    pts[2] = '{gx: far,  gy: left,  h: top};
    pts[3] = '{gx: near, gy: right, h: 12'sd0};
    pts[4] = '{gx: near, gy: right, h: top};
    pts[5] = '{gx: far,  gy: right, h: top};
  end

endmodule
