`timescale 1ps/1fs
// dlf_accum: digital loop filter of the integral path (used by both DPLLs and
// by the tuning loop of the digital MDLL).
// A 1-to-4 demultiplexer collects four consecutive bang-bang decisions at
// the reference rate; every fourth reference cycle (strobe `en4`, i.e. at
// F_REF/4) the accumulator adds KI times the sum of the four signed
// decisions (+1 for early/raise, -1 for late/lower).  The 18-bit
// accumulator saturates at its ends.  Only its 14 MSBs leave the block as
// D_I: the 4 LSBs are dropped, which lowers the loop gain and suppresses
// dithering jitter.  D_I changes on the cycle in which `en4` is high and is
// meant to be consumed by a block enabled by the same strobe.
// Following the document: demux ratio, F_REF/4 rate, 18-bit accumulator,
// 4 dropped LSBs.  Own choices: gain KI, saturation, reset to mid-scale.
module dlf_accum
  import pll_pkg::*;
#(
  parameter int ACC_BITS = ACC_W,   // accumulator width
  parameter int OUT_BITS = DI_W,    // MSBs passed on
  parameter int KI       = 1        // gain per decision, in accumulator LSBs
) (
  input  logic                clk,      // reference clock
  input  logic                rst_n,
  input  logic                bb,       // 1: raise frequency, 0: lower
  output logic                en4,      // F_REF/4 strobe
  output logic [OUT_BITS-1:0] d_i       // accumulator MSBs
);
  logic [1:0]          phase;          // demux slot
  logic [2:0]          word;           // first three decisions of the group
  logic [ACC_BITS-1:0] acc;

  localparam logic [ACC_BITS:0] ACC_MAX = {1'b0, {ACC_BITS{1'b1}}};

  // number of "raise" decisions among the four of this group
  logic [2:0] n_up;
  assign n_up = 3'(word[0]) + 3'(word[1]) + 3'(word[2]) + 3'(bb);

  // signed step: KI * (2*n_up - 4)
  logic signed [ACC_BITS+1:0] step, next;
  assign step = (ACC_BITS+2)'(KI) * ((ACC_BITS+2)'(n_up) * 2 - 4);
  assign next = $signed({2'b00, acc}) + step;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase <= '0;
      word  <= '0;
      acc   <= {1'b1, {(ACC_BITS-1){1'b0}}};
      en4   <= 1'b0;
    end else begin
      phase <= phase + 1'b1;
      en4   <= (phase == 2'd3);
      if (phase != 2'd3) word[phase] <= bb;
      else if (next < 0) acc <= '0;
      else if (next > $signed({1'b0, ACC_MAX})) acc <= {ACC_BITS{1'b1}};
      else acc <= next[ACC_BITS-1:0];
    end

  assign d_i = acc[ACC_BITS-1 -: OUT_BITS];
endmodule
