// one_pt_perspective: the "3D" view from just above and behind the local
// paddle.
//
// The renderer keeps no game state. At each `frame` pulse it copies the
// puck and paddle positions and starts a projection pass: for each of the
// three boxes (local paddle, puck, opponent paddle) six_points gives six
// corners, and mapping_module projects them one after the other onto the
// screen; the next point is started only when the mapping module reports
// `done` (its divider takes DIV_N cycles). A pass takes 18 projections,
// 18 * (DIV_N + 8) cycles (504 at the defaults), well inside the vertical blanking that
// follows the frame pulse. The corners are kept in registers, and for every
// raster position three blob3d instances test the boxes; the nearest box
// that covers the pixel wins (local paddle, then puck, then opponent
// paddle). Until the first pass has finished, the output is black.
//
// The camera sits CAM_BACK units (a quarter of the table length) behind
// the local wall and CAM_H (a quarter of its width) above the table; boxes
// are OBJ_H high. These and E_X/E_Y/E_Z scale with the screen size.
// With `locked_camera` high it stays across the middle of the table;
// otherwise it follows the local paddle. Its orientation is
// THETA_X/Y/Z in radians times 32, turned into sines and cosines by the
// sine and cosine blocks. E_X, E_Y, E_Z place the viewer relative to the
// screen (b = e_z/d_z * d - e; the negative E_X, E_Y put the vanishing
// point in the middle of the screen). `pixel` follows (hcount, vcount) by
// one clock, like trad_renderer.
//
// The submodule structure, the inputs, the per-frame sequencing with ready
// signals and the use of a locked camera switch follow the design. The
// camera placement, the object height, the colours and the draw order are
// this design's choices.
module one_pt_perspective
  import pong_pkg::*;
#(
  parameter int          SCREEN_W  = 1024,
  parameter int          SCREEN_H  = 768,
  parameter int          PADDLE_W  = 16,
  parameter int          PADDLE_H  = 128,
  parameter int          PUCK_SIZE = 32,
  parameter int          OBJ_H     = PUCK_SIZE,
  parameter int          CAM_BACK  = SCREEN_W / 4,
  parameter int          CAM_H     = SCREEN_H / 4,
  parameter int          THETA_X   = -4,
  parameter int          THETA_Y   = 0,
  parameter int          THETA_Z   = 0,
  parameter int          E_X       = -(SCREEN_W / 2),
  parameter int          E_Y       = -(SCREEN_H / 2),
  parameter int          E_Z       = SCREEN_W / 2,
  parameter int          DIV_N     = 20
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        frame,
  input  logic        locked_camera,
  input  logic [10:0] puck_x,
  input  logic [9:0]  puck_y,
  input  logic [9:0]  local_paddle_y,
  input  logic [9:0]  remote_paddle_y,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic        pass_done,
  output logic [23:0] pixel
);
  // colours of box o (0 local paddle, 1 puck, 2 opponent paddle), top or front face
  function automatic logic [23:0] box_color(input int o, input bit front);
    case (o)
      0:       return front ? 24'h00_80_00 : 24'h00_FF_00;
      1:       return front ? 24'h90_90_90 : 24'hFF_FF_FF;
      default: return front ? 24'h80_00_80 : 24'hFF_00_FF;
    endcase
  endfunction

  // camera orientation
  logic signed [7:0] cx, sx, cy, sy, cz, sz;
  cosine u_cos_x (.phase(8'(THETA_X)), .value(cx));
  sine   u_sin_x (.phase(8'(THETA_X)), .value(sx));
  cosine u_cos_y (.phase(8'(THETA_Y)), .value(cy));
  sine   u_sin_y (.phase(8'(THETA_Y)), .value(sy));
  cosine u_cos_z (.phase(8'(THETA_Z)), .value(cz));
  sine   u_sin_z (.phase(8'(THETA_Z)), .value(sz));

  // positions copied at the frame pulse
  logic [10:0] l_puck_x;
  logic [9:0]  l_puck_y, l_local_y, l_remote_y;
  logic        l_locked;

  // corner generation for the box being projected
  logic [1:0]          obj;
  logic [2:0]          pt;
  logic signed [11:0]  ogx, ogy;
  logic [10:0]         odepth, owidth;
  tpoint_t             corners [6];
  tpoint_t             cam;

  always_comb begin
    case (obj)
      2'd0: begin
        ogx = 12'(PADDLE_W / 2);            ogy = 12'(l_local_y);
        odepth = 11'(PADDLE_W);             owidth = 11'(PADDLE_H);
      end
      2'd1: begin
        ogx = 12'(l_puck_x);                ogy = 12'(l_puck_y);
        odepth = 11'(PUCK_SIZE);            owidth = 11'(PUCK_SIZE);
      end
      default: begin
        ogx = 12'(SCREEN_W - PADDLE_W / 2); ogy = 12'(l_remote_y);
        odepth = 11'(PADDLE_W);             owidth = 11'(PADDLE_H);
      end
    endcase
    cam.gx = -12'(CAM_BACK);
    cam.gy = l_locked ? 12'(SCREEN_H / 2) : 12'(l_local_y);
    cam.h  = 12'(CAM_H);
  end

  six_points u_six (
    .gx(ogx), .gy(ogy), .depth(odepth), .width(owidth), .height(11'(OBJ_H)),
    .pts(corners)
  );

  // projection sequencer
  typedef enum logic [1:0] {P_IDLE, P_START, P_WAIT} pstate_e;
  pstate_e  pstate;
  logic     map_start, map_busy, map_done;
  spoint_t  map_b;
  spoint_t  proj [3][6];
  logic     proj_valid;

  mapping_module #(.DIV_N(DIV_N)) u_map (
    .clk, .rst,
    .start (map_start),
    .a     (corners[pt]),
    .cam   (cam),
    .cos_x (cx), .sin_x(sx),
    .cos_y (cy), .sin_y(sy),
    .cos_z (cz), .sin_z(sz),
    .e_x   (12'(E_X)), .e_y(12'(E_Y)), .e_z(11'(E_Z)),
    .busy  (map_busy),
    .done  (map_done),
    .b     (map_b)
  );

  assign map_start = (pstate == P_START);

  always_ff @(posedge clk) begin
    if (rst) begin
      pstate     <= P_IDLE;
      obj        <= '0;
      pt         <= '0;
      proj_valid <= 1'b0;
      pass_done  <= 1'b0;
      l_puck_x   <= '0;
      l_puck_y   <= '0;
      l_local_y  <= '0;
      l_remote_y <= '0;
      l_locked   <= 1'b0;
      proj       <= '{default: '0};
    end else begin
      pass_done <= 1'b0;
      case (pstate)
        P_IDLE: if (frame) begin
          l_puck_x   <= puck_x;
          l_puck_y   <= puck_y;
          l_local_y  <= local_paddle_y;
          l_remote_y <= remote_paddle_y;
          l_locked   <= locked_camera;
          obj        <= '0;
          pt         <= '0;
          pstate     <= P_START;
        end
        P_START: pstate <= P_WAIT;
        default: if (map_done) begin   // P_WAIT
          proj[obj][pt] <= map_b;
          if (pt == 3'd5) begin
            pt <= '0;
            if (obj == 2'd2) begin
              obj        <= '0;
              pstate     <= P_IDLE;
              proj_valid <= 1'b1;
              pass_done  <= 1'b1;
            end else begin
              obj    <= obj + 2'd1;
              pstate <= P_START;
            end
          end else begin
            pt     <= pt + 3'd1;
            pstate <= P_START;
          end
        end
      endcase
    end
  end

  // raster: three boxes, nearest first
  logic        hit [3];
  logic [23:0] bpix [3];

  for (genvar o = 0; o < 3; o++) begin : g_box
    blob3d #(.TOP_COLOR(box_color(o, 1'b0)), .FRONT_COLOR(box_color(o, 1'b1))) u_blob (
      .pts(proj[o]), .hcount, .vcount, .hit(hit[o]), .pixel(bpix[o])
    );
  end

  always_ff @(posedge clk) begin
    if (!proj_valid)  pixel <= 24'h0;
    else if (hit[0])  pixel <= bpix[0];
    else if (hit[1])  pixel <= bpix[1];
    else if (hit[2])  pixel <= bpix[2];
    else              pixel <= 24'h0;
  end

endmodule
