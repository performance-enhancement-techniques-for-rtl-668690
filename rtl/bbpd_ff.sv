`timescale 1ps/1fs
// bbpd_ff: early/late flip-flop on the PFD outputs (bang-bang phase detector).
// On each rising reference edge the flip-flop samples the PFD's DN output as
// it was just before that edge: DN high means the feedback edge already
// arrived (oscillator early, too fast), DN low means the reference came
// first.  The output `early` is 1 when the reference leads, i.e. when the
// oscillator must speed up.  One decision per reference cycle, valid one
// reference edge after the edge it describes.  The document states only that
// a flip-flop on the PFD outputs acts as early/late detector; sampling DN on
// the reference edge is this design's choice.
module bbpd_ff (
  input  logic ref_clk,
  input  logic rst_n,
  input  logic dn,        // PFD DN output
  output logic early      // 1: reference leads -> raise frequency
);
  always_ff @(posedge ref_clk or negedge rst_n)
    if (!rst_n) early <= 1'b0;
    else        early <= ~dn;
endmodule
