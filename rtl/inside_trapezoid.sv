// inside_trapezoid: is the pixel (hcount, vcount) inside a four-sided figure?
//
// The figure is given by its corners top-left, top-right, bottom-right and
// bottom-left. Each side is a line y*(x2-x1) + x*(y1-y2) = b through its
// two ends, and the pixel is classified by comparing the left-hand side at
// (hcount, vcount) with b, so no division is needed (see
// pong_pkg::line_side). With screen y growing downwards and the ends
// ordered so that y1 < y2, a larger value means left of the line and a
// smaller one right of it. The pixel is inside when it is right of (or on)
// the left side, left of (or on) the right side, below (or on) the top side
// and above (or on) the bottom side; for the two horizontal-ish sides the
// ends are ordered left to right, which makes "larger" mean "below".
// Purely combinational.
//
// The line form, the flipped comparisons for screen coordinates and the
// four tests follow the design. Testing the top and bottom sides with the
// same line form (rather than as horizontal limits) and counting points on
// a side as inside are this design's choices.
module inside_trapezoid
  import pong_pkg::*;
(
  input  spoint_t     tl, tr, br, bl,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic        is_in
);
  // side value for the line through p and q, ends ordered by `by_y`
  function automatic logic signed [31:0] side(
      input spoint_t p, input spoint_t q, input logic by_y,
      input logic signed [12:0] hx, input logic signed [12:0] vy);
    spoint_t s1, s2;
    logic swap;
    swap = by_y ? (p.y > q.y) : (p.x > q.x);
    s1 = swap ? q : p;
    s2 = swap ? p : q;
    return line_side(hx, vy, 13'(s1.x), 13'(s1.y), 13'(s2.x), 13'(s2.y));
  endfunction

  always_comb begin
    logic signed [12:0] hx, vy;
    hx = signed'({2'b0, hcount});
    vy = signed'({3'b0, vcount});
    is_in = (side(tl, bl, 1'b1, hx, vy) <= 0)     // right of left side
          && (side(tr, br, 1'b1, hx, vy) >= 0)     // left of right side
          && (side(tl, tr, 1'b0, hx, vy) >= 0)     // below top side
          && (side(bl, br, 1'b0, hx, vy) <= 0);    // above bottom side
  end

endmodule
