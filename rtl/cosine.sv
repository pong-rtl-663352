// cosine: piecewise-linear cosine for the camera rotation.
//
// The phase is in radians times 32 (signed), and so is the result. The
// approximation is the design's: cos(x) ~ 1 - |x| for -pi/2 < x < pi/2,
// i.e. 32 - |phase| in scaled units. Phases beyond +-pi/2 (+-50) are
// clamped to +-50; the clamp is this design's choice. Note that the
// approximation is coarse (it reaches -0.56 at pi/2) and is kept as given.
// Purely combinational.
module cosine (
  input  logic signed [7:0] phase,
  output logic signed [7:0] value
);
  localparam int LIMIT = 50;   // pi/2 * 32

  always_comb begin
    int a;
    a = int'(phase);
    if (a < 0) a = -a;
    if (a > LIMIT) a = LIMIT;
    value = 8'(32 - a);
  end

endmodule
