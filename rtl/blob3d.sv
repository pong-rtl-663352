// blob3d: paints one box of the perspective view.
//
// Takes the six projected corners of a box (see six_points for the
// numbering) and the raster position. The box is drawn as two trapezoids
// stacked on each other: the upper one P2-P3-P6-P5 is the top face and
// the lower one P1-P2-P5-P4 the front face, each tested with
// inside_trapezoid. A pixel in the top face gets TOP_COLOR, one in the
// front face FRONT_COLOR, anything else is black and `hit` is low.
// Purely combinational; the caller registers the pixel.
//
// The two stacked trapezoids and their corners follow the design; the
// colours are this design's.
module blob3d
  import pong_pkg::*;
#(
  parameter logic [23:0] TOP_COLOR   = 24'hFF_FF_FF,
  parameter logic [23:0] FRONT_COLOR = 24'h80_80_80
) (
  input  spoint_t     pts [6],
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic        hit,
  output logic [23:0] pixel
);
  logic in_top, in_front;

  inside_trapezoid u_top (
    .tl(pts[2]), .tr(pts[5]), .br(pts[4]), .bl(pts[1]),
    .hcount, .vcount, .is_in(in_top)
  );

  inside_trapezoid u_front (
    .tl(pts[1]), .tr(pts[4]), .br(pts[3]), .bl(pts[0]),
    .hcount, .vcount, .is_in(in_front)
  );

  always_comb begin
    hit = in_top || in_front;
    if (in_top)        pixel = TOP_COLOR;
    else if (in_front) pixel = FRONT_COLOR;
    else               pixel = 24'h0;
  end

endmodule
