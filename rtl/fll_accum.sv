`timescale 1ps/1fs
// fll_accum: digital loop filter of the frequency-locking loop.
// On every `valid` strobe the signed frequency error (positive: oscillator
// too fast) is subtracted, times gain KF, from an 18-bit saturating
// accumulator; its 14 MSBs drive the FLL delta-sigma DAC and, through the
// regulator, the ring-oscillator supply (higher code, higher supply, higher
// frequency).  Reset to mid-scale.
// Following the document: an accumulator driving a delta-sigma DAC "similar
// to the one used for the MDLL tuning loop".  Own choices: width, gain,
// saturation, reset value.
module fll_accum
  import pll_pkg::*;
#(
  parameter int ACC_BITS = ACC_W,
  parameter int OUT_BITS = DI_W,
  parameter int ERR_W    = 15,
  parameter int KF       = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,
  input  logic signed [ERR_W-1:0] ferr,
  output logic [OUT_BITS-1:0]     d_fll
);
  logic [ACC_BITS-1:0]        acc;
  logic signed [ACC_BITS+1:0] next;
  assign next = $signed({2'b00, acc}) - (ACC_BITS+2)'(KF) * (ACC_BITS+2)'(ferr);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) acc <= {1'b1, {(ACC_BITS-1){1'b0}}};
    else if (valid) begin
      if (next < 0)                                            acc <= '0;
      else if (next > $signed({2'b00, {ACC_BITS{1'b1}}}))      acc <= '1;
      else                                                     acc <= next[ACC_BITS-1:0];
    end

  assign d_fll = acc[ACC_BITS-1 -: OUT_BITS];
endmodule
