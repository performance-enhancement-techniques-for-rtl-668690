`timescale 1ps/1fs
// dsm2_15: second-order digital delta-sigma modulator that truncates the
// 14-bit loop-filter word D_I to the 15 levels (0..14) of the current-mode
// DAC, and the thermometer code that switches its unit elements.
// Structure (error feedback): the input is scaled by 7/8 so that full scale
// spans 14 unit steps of 1024 LSBs; w = x + 2e[n-1] - e[n-2]; the output
// level is w rounded to a multiple of 1024 and clipped to 0..14; the stored
// error is e = w - level*1024, which gives level*1024 = x - (1 - z^-1)^2 e,
// i.e. second-order shaped quantisation noise.  The error is clipped to
// +-3 steps so that overload at the ends of the range cannot run away.
// One output per `en` strobe (F_REF/4 in the loops); output registered.
// Following the document: 14-bit input, second order, 15 levels.  Own
// choices: error-feedback topology, 7/8 scaling, clipping.
module dsm2_15
  import pll_pkg::*;
#(
  parameter int IN_W = DI_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [IN_W-1:0]       d_in,
  output logic [3:0]            level,
  output logic [DAC_LEVELS-1:0] therm
);
  localparam int STEP = 1 << (IN_W - 4);          // 1024 for 14 bits
  localparam int EMAX = 3 * STEP;

  logic signed [IN_W+3:0] x, w, q, e_new, e1, e2;
  logic signed [IN_W+3:0] lvl_raw;

  localparam int XW = IN_W + 4;
  localparam logic signed [XW-1:0] STEP_S = XW'(STEP);
  localparam logic signed [XW-1:0] EMAX_S = XW'(EMAX);
  localparam logic signed [XW-1:0] LMAX_S = XW'(DAC_LEVELS - 1);

  always_comb begin
    x       = $signed({4'b0, d_in}) - $signed({7'b0, d_in[IN_W-1:3]});
    w       = x + (e1 <<< 1) - e2;
    lvl_raw = (w + (STEP_S >>> 1)) >>> (IN_W - 4);
    if (lvl_raw < 0)            lvl_raw = '0;
    else if (lvl_raw > LMAX_S)  lvl_raw = LMAX_S;
    q       = lvl_raw <<< (IN_W - 4);
    // quantisation error: output minus loop input
    e_new   = q - w;
    if (e_new > EMAX_S)       e_new = EMAX_S;
    else if (e_new < -EMAX_S) e_new = -EMAX_S;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      e1    <= '0;
      e2    <= '0;
      level <= '0;
      therm <= '0;
    end else if (en) begin
      e1    <= -e_new;
      e2    <= e1;
      level <= lvl_raw[3:0];
      therm <= therm15(lvl_raw[3:0]);
    end
endmodule
