`timescale 1ps/1fs
// fb_divider: feedback divider.  Counts oscillator cycles modulo N and
// produces a divided clock that is high for the first N/2 cycles of each
// group (50 % duty for even N).  The rising edge of `div` follows the
// rising input edge that wraps the counter, one flip-flop delay later.
// N = 4 is the fixed divide ratio of the prototype DPLLs.
module fb_divider #(
  parameter int N = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic div
);
  localparam int CW = (N > 2) ? $clog2(N) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt <= '0;
      div <= 1'b0;
    end else begin
      cnt <= (cnt == CW'(N-1)) ? '0 : cnt + 1'b1;
      div <= (cnt == CW'(N-1)) || (int'(cnt) < N/2 - 1);
    end
endmodule
