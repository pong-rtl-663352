// wired_rx: deserialiser for the wired link.
//
// The line is first passed through a two-flop synchroniser. In the WAIT
// state every sample is shifted into a CYCLES_PER_BIT-long shift register,
// which is compared with the preamble (1 for a third of a bit, 0 for a
// third, 1 for a third). When at most MAX_MISMATCH samples differ the
// receiver enters RECV: it steps through the NBITS bit indices, CYCLES_PER_BIT
// cycles each, and records the line on the fifth cycle of every bit. After
// the last bit it puts the packet on `data` and pulses `valid` for one
// cycle, clears the shift register and returns to WAIT.
//
// `data` holds the last packet until the next one is complete. From the
// first cycle of the first data bit on the synchronised line to `valid` is
// (NBITS-1)*CYCLES_PER_BIT + 5 cycles.
//
// The two states, the shift-register preamble match, the 9-cycle bit and
// sampling on the fifth cycle follow the design. What counts as an
// approximate match (one differing sample), the synchroniser and the bit
// order (most significant first) are this design's choices.
module wired_rx #(
  parameter int NBITS          = 15,
  parameter int CYCLES_PER_BIT = 9,
  parameter int MAX_MISMATCH   = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             line_in,
  output logic             valid,
  output logic [NBITS-1:0] data
);
  localparam int THIRD = CYCLES_PER_BIT / 3;
  localparam int SAMPLE_AT = 4;   // fifth cycle of a bit, counting from 0

  // Preamble as it sits in the shift register, oldest sample at the MSB.
  function automatic logic [CYCLES_PER_BIT-1:0] preamble();
    logic [CYCLES_PER_BIT-1:0] p;
    for (int i = 0; i < CYCLES_PER_BIT; i++)
      p[CYCLES_PER_BIT-1-i] = !((i >= THIRD) && (i < 2 * THIRD));
    return p;
  endfunction
  localparam logic [CYCLES_PER_BIT-1:0] PRE = preamble();

  typedef enum logic {S_WAIT, S_RECV} state_e;

  logic [1:0]                          sync;
  logic                                ln;
  state_e                              state;
  logic [CYCLES_PER_BIT-1:0]           shreg;
  logic [$clog2(CYCLES_PER_BIT+1)-1:0] cyc;
  logic [$clog2(NBITS+1)-1:0]          bit_n;
  logic [NBITS-1:0]                    buffer;
  logic                                match;

  assign ln = sync[1];

  always_comb begin
    int diff;
    logic [CYCLES_PER_BIT-1:0] nxt;
    nxt  = {shreg[CYCLES_PER_BIT-2:0], ln};
    diff = 0;
    for (int i = 0; i < CYCLES_PER_BIT; i++)
      if (nxt[i] != PRE[i]) diff++;
    match = (diff <= MAX_MISMATCH);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sync   <= '0;
      state  <= S_WAIT;
      shreg  <= '0;
      cyc    <= '0;
      bit_n  <= '0;
      buffer <= '0;
      data   <= '0;
      valid  <= 1'b0;
    end else begin
      sync  <= {sync[0], line_in};
      valid <= 1'b0;
      case (state)
        S_WAIT: begin
          shreg <= {shreg[CYCLES_PER_BIT-2:0], ln};
          if (match) begin
            state <= S_RECV;
            cyc   <= '0;
            bit_n <= '0;
          end
        end
        default: begin  // S_RECV
          if (32'(cyc) == SAMPLE_AT)
            buffer[NBITS-1-32'(bit_n)] <= ln;
          if (32'(cyc) == SAMPLE_AT && 32'(bit_n) == NBITS - 1) begin
            data  <= {buffer[NBITS-1:1], ln};
            valid <= 1'b1;
            state <= S_WAIT;
            shreg <= '0;
          end else if (32'(cyc) == CYCLES_PER_BIT - 1) begin
            cyc   <= '0;
            bit_n <= bit_n + 1'b1;
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
      endcase
    end
  end

endmodule
