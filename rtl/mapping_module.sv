// mapping_module: projects one point of the table onto the screen.
//
// The point a is given in table units (gx along the table, gy across,
// h height). It is placed in camera space as a = (gy, -h, gx), so that
// depth is z and screen y grows downwards, and the camera position c is
// given the same way. Then, as in the design,
//
//   d = Rx(tx) * Ry(ty) * Rz(tz) * (a - c)
//   b_x = (e_z / d_z) * d_x - e_x,   b_y = (e_z / d_z) * d_y - e_y
//
// with Rz = [c s 0; -s c 0; 0 0 1], Ry = [c 0 -s; 0 1 0; s 0 c] and
// Rx = [1 0 0; 0 c s; 0 -s c]. Sines and cosines come in scaled by 32;
// the three products are kept at full precision (the untouched component
// of each stage is scaled by 32 to stay aligned) and d is shifted right by
// 3 * 5 bits once they are complete. e_z / d_z is computed by
// the radix-2 divider as (e_z << FRAC) / d_z, a quotient with FRAC fraction
// bits; the product with d_x, d_y is shifted right by FRAC bits again. A
// point at or behind the camera (d_z <= 0) is divided by 1 instead, and
// results are saturated to the signed 12-bit screen range.
//
// Timing: pulse `start` with the inputs held until `done`. The three
// rotations take one cycle each, one cycle starts the divider, the
// division takes DIV_N cycles and one cycle each goes to noticing its
// ready and to the products: `done` pulses with `b` valid DIV_N + 6 clock
// edges after the edge that samples `start`. `busy` is high meanwhile and
// starts are ignored. The matrix equation, the
// scale of 32, the shift by 5 and the wait for the divider's ready follow
// the design; the axis placement, the
// fraction width and the saturation are this design's choices.
module mapping_module
  import pong_pkg::*;
#(
  parameter int FRAC  = 8,
  parameter int DIV_N = 20
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  tpoint_t           a,
  input  tpoint_t           cam,
  input  logic signed [7:0] cos_x, sin_x,
  input  logic signed [7:0] cos_y, sin_y,
  input  logic signed [7:0] cos_z, sin_z,
  input  logic signed [11:0] e_x, e_y,
  input  logic [10:0]       e_z,
  output logic              busy,
  output logic              done,
  output spoint_t           b
);
  typedef enum logic [2:0] {S_IDLE, S_RZ, S_RY, S_RX, S_DSTART, S_DIV, S_OUT} state_e;

  state_e             state;
  localparam int VW = 44;
  logic signed [VW-1:0] vx, vy, vz;     // working vector, scaled by 32^stage
  logic signed [15:0]   dx, dy, dz;     // camera-space point after the shift
  logic               div_start, div_busy, div_done;
  logic [DIV_N-1:0]   q;
  logic [15:0]        dz_div;

  function automatic logic signed [VW-1:0] mac2(
      input logic signed [7:0] k1, input logic signed [VW-1:0] v1,
      input logic signed [7:0] k2, input logic signed [VW-1:0] v2);
    return VW'(k1) * v1 + VW'(k2) * v2;
  endfunction

  function automatic logic signed [11:0] sat12(input logic signed [47:0] v);
    if (v > 48'sd2047)  return 12'sd2047;
    if (v < -48'sd2048) return -12'sd2048;
    return 12'(v);
  endfunction

  assign dx     = 16'(vx >>> 15);
  assign dy     = 16'(vy >>> 15);
  assign dz     = 16'(vz >>> 15);
  assign dz_div = (dz > 0) ? 16'(dz) : 16'd1;

  divider #(.N(DIV_N), .D(16)) u_div (
    .clk, .rst,
    .start    (div_start),
    .dividend (DIV_N'({e_z, FRAC'(0)})),
    .divisor  (dz_div),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (q)
  );

  assign div_start = (state == S_DSTART);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      vx    <= '0;
      vy    <= '0;
      vz    <= '0;
      done  <= 1'b0;
      b     <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          vx    <= VW'(a.gy) - VW'(cam.gy);
          vy    <= VW'(cam.h) - VW'(a.h);
          vz    <= VW'(a.gx) - VW'(cam.gx);
          state <= S_RZ;
        end
        S_RZ: begin
          vx    <= mac2(cos_z, vx, sin_z, vy);
          vy    <= mac2(-sin_z, vx, cos_z, vy);
          vz    <= vz <<< 5;
          state <= S_RY;
        end
        S_RY: begin
          vx    <= mac2(cos_y, vx, -sin_y, vz);
          vz    <= mac2(sin_y, vx, cos_y, vz);
          vy    <= vy <<< 5;
          state <= S_RX;
        end
        S_RX: begin
          vy    <= mac2(cos_x, vy, sin_x, vz);
          vz    <= mac2(-sin_x, vy, cos_x, vz);
          vx    <= vx <<< 5;
          state <= S_DSTART;
        end
        S_DSTART: state <= S_DIV;
        S_DIV: if (div_done) state <= S_OUT;
        default: begin  // S_OUT
          b.x   <= sat12(((48'(dx) * 48'($signed({1'b0, q}))) >>> FRAC) - 48'(e_x));
          b.y   <= sat12(((48'(dy) * 48'($signed({1'b0, q}))) >>> FRAC) - 48'(e_y));
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

endmodule
