// divider: unsigned radix-2 non-restoring divider.
//
// One quotient bit is produced per clock cycle, from the most significant
// down, by adding or subtracting the divisor according to the sign of the
// partial remainder; the quotient bit is 1 when the new remainder is not
// negative. Pulse `start` with the operands; `busy` is high for N cycles
// and `done` pulses in the cycle `quotient` becomes valid, N clock edges
// after the edge that samples `start`. The quotient holds until the next
// start. A zero divisor gives an all-ones quotient. The fractional part of a quotient is obtained
// by shifting the dividend left by the wanted number of fraction bits.
//
// The algorithm and its one-bit-per-cycle timing with a ready signal are
// those of the divider the design relies on; widths are this design's.
module divider #(
  parameter int N = 20,   // dividend and quotient width
  parameter int D = 16    // divisor width
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [N-1:0] dividend,
  input  logic [D-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] quotient
);
  logic signed [D+1:0]   rem;
  logic [N-1:0]          num;
  logic [D-1:0]          den;
  logic [$clog2(N+1)-1:0] cnt;
  logic signed [D+1:0]   shifted, nrem;

  always_comb begin
    shifted = {rem[D:0], num[N-1]};
    if (rem >= 0) nrem = shifted - signed'({2'b0, den});
    else          nrem = shifted + signed'({2'b0, den});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rem      <= '0;
      num      <= '0;
      den      <= '0;
      cnt      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem      <= '0;
        num      <= dividend;
        den      <= divisor;
        cnt      <= '0;
        busy     <= 1'b1;
      end else if (busy) begin
        rem      <= nrem;
        num      <= num << 1;
        quotient <= {quotient[N-2:0], !nrem[D+1] || (den == '0)};
        if (32'(cnt) == N - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
