// ir_rx: deserialiser for the infra-red link.
//
// The demodulated line (1 while the 40 kHz carrier is seen) passes a
// two-flop synchroniser. On a rising edge the receiver starts a timer and
// records the line SAMPLE_CYCLES later, 900 us after the edge, which is the
// middle of the 600 us window that carries the bit. It then waits for the
// next rising edge. A counter holds the index of the bit being received;
// when NBITS bits have been recorded it puts the packet on `data` and
// pulses `valid`. Whenever `idle` (from ir_idle_detect) is high the bit
// count returns to 0, so a packet that lost a bit is dropped at the next
// packet border instead of shifting all later packets.
//
// SAMPLE_CYCLES = 24300 is 900 us at 27 MHz. The edge-triggered 900 us
// sample, the bit counter and the reset by the idle detector follow the
// design. Running the timer on the system clock and clearing only the
// count (so an edge seen before `idle` falls is not lost) are this
// design's choices.
module ir_rx #(
  parameter int NBITS         = 15,
  parameter int SAMPLE_CYCLES = 24300
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             line_in,
  input  logic             idle,
  output logic             valid,
  output logic [NBITS-1:0] data
);
  logic [2:0]                       sync;   // [2] is the previous sample
  logic                             rise;
  logic                             timing;
  logic [$clog2(SAMPLE_CYCLES+1)-1:0] timer;
  logic [$clog2(NBITS+1)-1:0]       bit_n;
  logic [NBITS-1:0]                 buffer;

  assign rise = sync[1] && !sync[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync   <= '0;
      timing <= 1'b0;
      timer  <= '0;
      bit_n  <= '0;
      buffer <= '0;
      data   <= '0;
      valid  <= 1'b0;
    end else begin
      sync  <= {sync[1:0], line_in};
      valid <= 1'b0;
      if (!timing) begin
        if (rise) begin
          timing <= 1'b1;
          timer  <= '0;
        end
      end else if (32'(timer) == SAMPLE_CYCLES - 1) begin
        timing <= 1'b0;
        buffer <= {buffer[NBITS-2:0], sync[1]};
        if (32'(bit_n) == NBITS - 1) begin
          bit_n <= '0;
          data  <= {buffer[NBITS-2:0], sync[1]};
          valid <= 1'b1;
        end else begin
          bit_n <= bit_n + 1'b1;
        end
      end else begin
        timer <= timer + 1'b1;
      end
      if (idle) bit_n <= '0;
    end
  end

endmodule
