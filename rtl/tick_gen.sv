// tick_gen: one-cycle enable every DIV clock cycles.
//
// The infra-red link runs on a slow time base of 300 us. Rather than a
// second clock, the whole design stays on the system clock and the slow
// logic is enabled by this tick. DIV = 8100 gives 300 us at 27 MHz. The
// 300 us period follows the design; the clock-enable form is this design's.
// `tick` is high in the cycle where the counter wraps, first DIV cycles
// after reset.
module tick_gen #(
  parameter int DIV = 8100
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  logic [$clog2(DIV)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (32'(cnt) == DIV - 1) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
