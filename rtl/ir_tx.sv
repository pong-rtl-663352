// ir_tx: serialiser for the infra-red link.
//
// Works on a 300 us enable `tick`. Each bit takes an 1800 us window of six
// ticks: two ticks of 1, two ticks carrying the bit, two ticks of 0, so
// every bit has exactly one rise and one fall. The NBITS bits of a packet
// follow each other, most significant first. After the packet the line
// rests at 0 for REST_TICKS ticks (1800 us) so that the receiver can find
// the packet border; only then does `busy` fall.
//
// Interface: pulse `ready` with `data` valid while `busy` is low; the data
// are registered then. The first high tick starts at the next `tick`. A
// packet takes 6*NBITS + REST_TICKS ticks (96 ticks, 28.8 ms). An assertion
// flags a `ready` that arrives while `busy` is high.
//
// The 600/600/600 us box encoding, the rest of at least 1800 us and the
// 300 us time base follow the design; the bit order is this design's.
module ir_tx #(
  parameter int NBITS      = 15,
  parameter int REST_TICKS = 6
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,
  input  logic             ready,
  input  logic [NBITS-1:0] data,
  output logic             busy,
  output logic             line
);
  typedef enum logic [1:0] {S_IDLE, S_ARM, S_BITS, S_REST} state_e;

  state_e                     state;
  logic [NBITS-1:0]           shreg;
  logic [2:0]                 phase;   // tick within the bit, 0..5
  logic [$clog2(NBITS+1)-1:0] bit_n;
  logic [$clog2(REST_TICKS+1)-1:0] rest;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      shreg <= '0;
      phase <= '0;
      bit_n <= '0;
      rest  <= '0;
      line  <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (ready) begin
          shreg <= data;
          state <= S_ARM;
        end
        S_ARM: if (tick) begin
          state <= S_BITS;
          phase <= '0;
          bit_n <= '0;
          line  <= 1'b1;
        end
        S_BITS: if (tick) begin
          if (phase == 3'd5) begin
            phase <= '0;
            if (32'(bit_n) == NBITS - 1) begin
              state <= S_REST;
              rest  <= '0;
              line  <= 1'b0;
            end else begin
              bit_n <= bit_n + 1'b1;
              shreg <= shreg << 1;
              line  <= 1'b1;
            end
          end else begin
            phase <= phase + 1'b1;
            case (phase + 1'b1)
              3'd1:       line <= 1'b1;
              3'd2, 3'd3: line <= shreg[NBITS-1];
              default:    line <= 1'b0;
            endcase
          end
        end
        default: if (tick) begin  // S_REST
          if (32'(rest) == REST_TICKS - 1) state <= S_IDLE;
          else rest <= rest + 1'b1;
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Handshake rule: a packet may only be offered while the transmitter is
  // idle; an offer while busy would be lost.
  always_ff @(posedge clk)
    if (!rst) assert (!(ready && busy)) else $error("ir_tx: ready while busy");

endmodule
