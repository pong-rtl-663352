// ir_carrier: puts the IR transmitter's bit stream on a 40 kHz carrier.
//
// On the infra-red channel a logical 1 is a 40 kHz square wave sent to the
// LED and a logical 0 is a constant 0. The carrier is made by toggling a
// flip-flop every HALF_PERIOD cycles (337 at 27 MHz, 40.06 kHz). `led` is
// the registered AND of carrier and `line`, so it follows `line` with one
// cycle of delay. The carrier meaning follows the design; generating it by
// a counter on the system clock is this design's choice.
module ir_carrier #(
  parameter int HALF_PERIOD = 337
) (
  input  logic clk,
  input  logic rst,
  input  logic line,
  output logic led
);
  logic [$clog2(HALF_PERIOD)-1:0] cnt;
  logic                           wave;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      wave <= 1'b0;
      led  <= 1'b0;
    end else begin
      if (32'(cnt) == HALF_PERIOD - 1) begin
        cnt  <= '0;
        wave <= !wave;
      end else begin
        cnt <= cnt + 1'b1;
      end
      led <= line & wave;
    end
  end

endmodule
