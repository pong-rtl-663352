// wired_tx: serialiser for the wired link between the two stations.
//
// Every symbol is held on the line for CYCLES_PER_BIT clock cycles (9). A
// packet starts with a preamble of three thirds of a bit: 1 for 3 cycles,
// 0 for 3 cycles, 1 for 3 cycles. The NBITS (15) data bits follow at once,
// most significant bit first. After the last bit the line is held at 0 for
// one further bit time so the receiver is back in its wait state before the
// next preamble. The line idles at 0.
//
// Interface: pulse `ready` for one cycle with `data` valid while `busy` is
// low; the data are copied into a register at that moment. `busy` stays
// high from the cycle after `ready` until the trailing gap has ended. A
// packet occupies (NBITS + 2) * CYCLES_PER_BIT cycles. An assertion flags
// a `ready` that arrives while `busy` is high.
//
// The bit time, the 3-cycle parts of the preamble, the 15-bit packet and
// the capture of the data on `ready` follow the design. The middle third of
// the preamble is 0 and the last third 1: with an all-ones message the line
// is then 0 only for a third of a bit, as the design describes. The bit
// order and the trailing gap are this design's own choices.
module wired_tx #(
  parameter int NBITS          = 15,
  parameter int CYCLES_PER_BIT = 9
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ready,
  input  logic [NBITS-1:0] data,
  output logic             busy,
  output logic             line
);
  localparam int THIRD = CYCLES_PER_BIT / 3;
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA, S_GAP} state_e;

  state_e                        state;
  logic [NBITS-1:0]              shreg;
  logic [$clog2(CYCLES_PER_BIT+1)-1:0] cyc;
  logic [$clog2(NBITS+1)-1:0]    bit_n;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      shreg <= '0;
      cyc   <= '0;
      bit_n <= '0;
      line  <= 1'b0;
    end else begin
      case (state)
        S_IDLE: begin
          line <= 1'b0;
          if (ready) begin
            shreg <= data;
            state <= S_PRE;
            cyc   <= '0;
            line  <= 1'b1;
          end
        end
        S_PRE: begin
          if (32'(cyc) == CYCLES_PER_BIT - 1) begin
            cyc   <= '0;
            bit_n <= '0;
            state <= S_DATA;
            line  <= shreg[NBITS-1];
          end else begin
            cyc  <= cyc + 1'b1;
            // preamble: first and last thirds 1, middle third 0
            line <= !((32'(cyc) + 1 >= THIRD) && (32'(cyc) + 1 < 2 * THIRD));
          end
        end
        S_DATA: begin
          if (32'(cyc) == CYCLES_PER_BIT - 1) begin
            cyc <= '0;
            if (32'(bit_n) == NBITS - 1) begin
              state <= S_GAP;
              line  <= 1'b0;
            end else begin
              bit_n <= bit_n + 1'b1;
              shreg <= shreg << 1;
              line  <= shreg[NBITS-2];
            end
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
        default: begin  // S_GAP
          line <= 1'b0;
          if (32'(cyc) == CYCLES_PER_BIT - 1) begin
            cyc   <= '0;
            state <= S_IDLE;
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Handshake rule: a packet may only be offered while the transmitter is
  // idle; an offer while busy would be lost.
  always_ff @(posedge clk)
    if (!rst) assert (!(ready && busy)) else $error("wired_tx: ready while busy");

endmodule
