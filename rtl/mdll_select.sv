`timescale 1ps/1fs
// mdll_select: divide-by-N and select logic of the multiplying DLL.
// A modulo-N counter advances on every rising edge of the oscillator output.
// SEL is high during the N-th cycle of each group (counter = N-1), so the
// multiplexer in front of the ring passes the reference and the next rising
// edge of the ring is the reference edge instead of the ring's own edge;
// that injected edge wraps the counter and drops SEL.  Thus N output edges
// occur per reference period, one of them injected.  `div` is the
// divide-by-N output (high for the first half of each group).
// Following the document: the reference replaces the oscillator edge every
// N cycles, N = 4.  Own choice: counter-based SEL timing.
module mdll_select #(
  parameter int N = 4
) (
  input  logic out,
  input  logic rst_n,
  output logic sel,
  output logic div
);
  localparam int CW = (N > 2) ? $clog2(N) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge out or negedge rst_n)
    if (!rst_n) cnt <= CW'(N-1);          // first edge after reset is injected
    else        cnt <= (cnt == CW'(N-1)) ? '0 : cnt + 1'b1;

  assign sel = (cnt == CW'(N-1));
  assign div = (int'(cnt) < N/2);
endmodule
