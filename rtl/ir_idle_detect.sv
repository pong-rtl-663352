// ir_idle_detect: finds the rest between infra-red packets.
//
// At every 300 us `tick` the line is sampled into an IDLE_LEN-long shift
// register; `idle` is high while all IDLE_LEN samples are 0. Inside a
// packet the line is low for at most 1200 us (a 0 bit), i.e. four samples,
// while the rest after a packet gives at least eight, so IDLE_LEN = 6 tells
// them apart. The receiver uses `idle` to restart its bit count. The
// sampling on the 300 us tick and the all-zero rule follow the design; the
// number of samples is this design's choice. `idle` changes one cycle
// after a tick. The shift register resets to all ones (not idle).
module ir_idle_detect #(
  parameter int IDLE_LEN = 6
) (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  input  logic line_in,
  output logic idle
);
  logic [IDLE_LEN-1:0] hist;

  always_ff @(posedge clk) begin
    if (rst) hist <= '1;
    else if (tick) hist <= {hist[IDLE_LEN-2:0], line_in};
  end

  assign idle = (hist == '0);

endmodule
