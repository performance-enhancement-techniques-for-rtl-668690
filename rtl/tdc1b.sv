`timescale 1ps/1fs
// tdc1b: 1-bit TDC of the digital MDLL.
// FF1 samples the oscillator output OUT on the rising reference edge and so
// tells whether the oscillator edge came before (1: oscillator early, too
// fast) or after (0: too slow) the reference edge.  FF2, clocked by the
// inverted reference, resamples FF1 half a reference period later to keep
// the output-dependent load off FF1.  D_TDC is valid from the falling
// reference edge and is read by the loop filter on the next rising edge.
// Structure as in the document (two flip-flops, FF2 on the inverted
// reference); reset is this design's addition.
module tdc1b (
  input  logic ref_clk,
  input  logic out,       // oscillator output
  input  logic rst_n,
  output logic d_tdc      // 1: oscillator edge early
);
  logic ff1;
  always_ff @(posedge ref_clk or negedge rst_n)
    if (!rst_n) ff1 <= 1'b0;
    else        ff1 <= out;

  always_ff @(negedge ref_clk or negedge rst_n)
    if (!rst_n) d_tdc <= 1'b0;
    else        d_tdc <= ff1;
endmodule
