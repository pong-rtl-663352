// sine: piecewise-linear sine for the camera rotation.
//
// Phase and result are radians times 32 (signed). Following the design's
// approximation: for |x| < 0.6 the result is x; for 0.6 < x < pi/2 it is
// 0.825 x + 0.105; for -pi/2 < x < -0.6 it is 0.825 x - 0.105. In scaled
// units the outer segments are 0.825*phase +- 3.36, rounded up (ceiling)
// to an integer as the design does. |phase| <= 19 counts as the inner
// segment (0.6 * 32 = 19.2). Phases beyond +-pi/2 (+-50) are clamped,
// which is this design's choice. Purely combinational.
module sine (
  input  logic signed [7:0] phase,
  output logic signed [7:0] value
);
  localparam int LIMIT = 50;   // pi/2 * 32
  localparam int KNEE  = 19;   // 0.6 * 32

  // ceiling of n / 1000 for any sign of n
  function automatic int ceil_div1000(input int n);
    if (n >= 0) return (n + 999) / 1000;
    else        return -((-n) / 1000);
  endfunction

  always_comb begin
    int p;
    p = int'(phase);
    if (p > LIMIT) p = LIMIT;
    if (p < -LIMIT) p = -LIMIT;
    if (p > KNEE)       value = 8'(ceil_div1000(825 * p + 3360));
    else if (p < -KNEE) value = 8'(ceil_div1000(825 * p - 3360));
    else                value = 8'(p);
  end

endmodule
