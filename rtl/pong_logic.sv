// pong_logic: the game state of one of the two stations.
//
// Each station shows its own paddle on the left wall (x = 0) and the
// opponent's on the right wall, so the opponent's puck x is mirrored
// (x -> SCREEN_W - x, vx -> -vx). Exactly one station is the master: it
// moves the puck while the puck travels towards its own paddle. The other
// station only shows the puck positions the master sends. Paddle updates
// are always accepted; puck updates (position and speed) are accepted only
// by the station that is not master and rejected by the master. When the master's paddle returns the
// puck, the master bit flips: the station sends its last puck state with
// the handoff flag and the opponent, on accepting it, becomes master. The
// first master is chosen by the `player_one` switch, and the puck starts in
// the middle moving towards that station's paddle.
//
// Once per `frame` pulse the local paddle moves by PADDLE_STEP while a
// button is held, and the master moves the puck by its velocity, bouncing
// off the top and bottom walls and off its paddle. A puck that reaches the
// local wall without touching the paddle stops the game: this station has
// lost and keeps telling the opponent so. `tx_go` pulses one cycle after
// the frame update, when the state for this frame's packets is ready.
//
// Packets from the opponent are applied in the cycle after `rx_valid`. All
// positions are centres. The master bit, its flip on a bounce, its initial
// value from a switch, the rule of which station computes the puck and the
// accepted updates (puck position, remote paddle, puck speed) follow the
// design. Sizes, speeds, the collision rule and the handoff packet are this
// design's own.
module pong_logic
  import pong_pkg::*;
#(
  parameter int SCREEN_W    = 1024,
  parameter int SCREEN_H    = 768,
  parameter int PADDLE_W    = 16,
  parameter int PADDLE_H    = 128,
  parameter int PUCK_SIZE   = 32,
  parameter int PADDLE_STEP = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              player_one,
  input  logic              btn_up,
  input  logic              btn_down,
  input  logic [3:0]        speed,
  input  logic              frame,
  input  logic              rx_valid,
  input  packet_t           rx_data,
  output logic [10:0]       puck_x,
  output logic [9:0]        puck_y,
  output logic [9:0]        local_paddle_y,
  output logic [9:0]        remote_paddle_y,
  output logic signed [5:0] vel_x,
  output logic signed [5:0] vel_y,
  output logic              master,
  output logic              handoff,
  output logic              send_puck,
  output logic              game_over,
  output logic              lost,
  output logic              tx_go
);
  localparam int HP  = PUCK_SIZE / 2;
  localparam int HPD = PADDLE_H / 2;

  logic signed [12:0] nx, ny, px, py;
  logic signed [5:0]  nvx, nvy;
  logic               hit, miss;

  assign px = signed'({2'b0, puck_x});
  assign py = signed'({3'b0, puck_y});

  // Next puck position of the master, walls and local paddle.
  always_comb begin
    logic signed [12:0] dy;
    nvx = vel_x;
    nvy = vel_y;
    nx  = px + 13'(vel_x);
    ny  = py + 13'(vel_y);
    if (ny < 13'(HP)) begin
      ny  = 13'(2 * HP) - ny;
      nvy = -vel_y;
    end else if (ny > 13'(SCREEN_H - 1 - HP)) begin
      ny  = 13'(2 * (SCREEN_H - 1 - HP)) - ny;
      nvy = -vel_y;
    end
    dy = ny - signed'({3'b0, local_paddle_y});
    if (dy < 0) dy = -dy;
    // crossing the paddle's front face during this frame
    hit  = (px - 13'(HP) > 13'(PADDLE_W)) && (nx - 13'(HP) <= 13'(PADDLE_W))
           && (dy < 13'(HPD + HP));
    miss = !hit && (nx - 13'(HP) <= 0);
    if (hit) begin
      nx  = 13'(PADDLE_W + HP);
      nvx = -vel_x;
    end else if (miss) begin
      nx = 13'(HP);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      puck_x          <= 11'(SCREEN_W / 2);
      puck_y          <= 10'(SCREEN_H / 2);
      local_paddle_y  <= 10'(SCREEN_H / 2);
      remote_paddle_y <= 10'(SCREEN_H / 2);
      vel_x           <= -signed'({2'b0, speed});
      vel_y           <= signed'({2'b0, speed});
      master          <= player_one;
      handoff         <= 1'b0;
      game_over       <= 1'b0;
      lost            <= 1'b0;
      tx_go           <= 1'b0;
    end else begin
      tx_go <= frame;
      if (tx_go) handoff <= 1'b0;

      if (frame) begin
        if (btn_up && !btn_down && 32'(local_paddle_y) >= HPD + PADDLE_STEP)
          local_paddle_y <= local_paddle_y - 10'(PADDLE_STEP);
        else if (btn_down && !btn_up && 32'(local_paddle_y) + PADDLE_STEP <= SCREEN_H - HPD)
          local_paddle_y <= local_paddle_y + 10'(PADDLE_STEP);
        if (master && !game_over) begin
          puck_x <= 11'(nx);
          puck_y <= 10'(ny);
          vel_x  <= nvx;
          vel_y  <= nvy;
          if (hit) begin
            master  <= 1'b0;
            handoff <= 1'b1;
          end
          if (miss) begin
            game_over <= 1'b1;
            lost      <= 1'b1;
          end
        end
      end

      if (rx_valid) begin
        case (rx_data.ptype)
          PKT_PADDLE: remote_paddle_y <= rx_data.payload[9:0];
          PKT_PUCK_X: if (!master) puck_x <= 11'(SCREEN_W) - rx_data.payload[10:0];
          PKT_PUCK_Y: if (!master) puck_y <= rx_data.payload[9:0];
          PKT_PUCK_V: if (!master) begin
            vel_x <= -6'(signed'(rx_data.payload[9:5]));
            vel_y <= 6'(signed'(rx_data.payload[4:0]));
            if (rx_data.payload[10] && !game_over) master <= 1'b1;
          end
          PKT_LOSS: game_over <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  assign send_puck = (master || handoff) && !game_over;

endmodule
