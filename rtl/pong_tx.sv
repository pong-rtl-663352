// pong_tx: per-frame packet scheduler between the game logic and a serial
// transmitter.
//
// At each `go` pulse (once per screen refresh) it copies the state this
// station is responsible for and marks the packets to send: the paddle
// position always; puck x, puck y and puck velocity while `send_puck` is
// high; a loss packet while `lost` is high. The marked packets are handed
// to the transmitter one at a time with a one-cycle `tx_ready` pulse when
// `tx_busy` is low, waiting for `tx_busy` to rise before the next one.
// A round-robin pointer picks the next marked packet, so on a link slower
// than the frame rate every kind of packet still gets through. The handoff
// flag is held until a velocity packet carrying it has been handed over.
//
// The per-refresh activation and the content (coordinates and puck speed)
// follow the design; the packet format is in pong_pkg and, like the order
// and the round robin, is this design's own.
module pong_tx
  import pong_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              go,
  input  logic              send_puck,
  input  logic              handoff,
  input  logic              lost,
  input  logic [9:0]        paddle_y,
  input  logic [10:0]       puck_x,
  input  logic [9:0]        puck_y,
  input  logic signed [5:0] vel_x,
  input  logic signed [5:0] vel_y,
  input  logic              tx_busy,
  output logic              tx_ready,
  output packet_t           tx_data
);
  localparam int NSLOT = 5;   // order: paddle, x, y, velocity, loss

  logic [NSLOT-1:0] pending;
  logic [2:0]       ptr;
  logic             wait_ack;
  logic [9:0]       l_paddle, l_py;
  logic [10:0]      l_px;
  logic [4:0]       l_vx, l_vy;
  logic             l_handoff;
  packet_t          slot_pkt;

  always_comb begin
    case (ptr)
      3'd0:    slot_pkt = '{ptype: PKT_PADDLE, payload: {2'b0, l_paddle}};
      3'd1:    slot_pkt = '{ptype: PKT_PUCK_X, payload: {1'b0, l_px}};
      3'd2:    slot_pkt = '{ptype: PKT_PUCK_Y, payload: {2'b0, l_py}};
      3'd3:    slot_pkt = '{ptype: PKT_PUCK_V, payload: {1'b0, l_handoff, l_vx, l_vy}};
      default: slot_pkt = '{ptype: PKT_LOSS, payload: '0};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pending   <= '0;
      ptr       <= '0;
      wait_ack  <= 1'b0;
      tx_ready  <= 1'b0;
      tx_data   <= '0;
      l_paddle  <= '0;
      l_px      <= '0;
      l_py      <= '0;
      l_vx      <= '0;
      l_vy      <= '0;
      l_handoff <= 1'b0;
    end else begin
      tx_ready <= 1'b0;
      if (wait_ack) begin
        if (tx_busy) wait_ack <= 1'b0;
      end else if (!tx_busy && !tx_ready) begin
        if (pending[ptr]) begin
          tx_data      <= slot_pkt;
          tx_ready     <= 1'b1;
          wait_ack     <= 1'b1;
          pending[ptr] <= 1'b0;
          if (ptr == 3'd3) l_handoff <= 1'b0;
        end
        ptr <= (ptr == 3'(NSLOT - 1)) ? 3'd0 : ptr + 3'd1;
      end
      if (go) begin
        l_paddle <= paddle_y;
        l_px     <= puck_x;
        l_py     <= puck_y;
        l_vx     <= 5'(vel_x);
        l_vy     <= 5'(vel_y);
        pending  <= pending | {lost, {3{send_puck}}, 1'b1};
        if (handoff) l_handoff <= 1'b1;
      end
    end
  end

endmodule
