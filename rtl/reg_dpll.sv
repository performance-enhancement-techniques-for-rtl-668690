`timescale 1ps/1fs
// reg_dpll: low-power supply-regulated digital PLL.
// A three-state PFD followed by an early/late flip-flop is the 1-bit phase
// detector.  Its decision drives two paths: directly the ring DCO's output
// time constant (bang-bang proportional path, no regulator in it, so the
// loop delay stays short) and the digital integral path - 1-to-4
// demultiplexer, 18-bit accumulator at F_REF/4, 14 MSBs through a
// second-order delta-sigma modulator, 15-level current DAC and 500 kHz
// low-pass filter.  The integral control voltage is buffered onto the
// oscillator supply by a replica-biased regulator; since that regulator is
// only in the slow integral path, it can have a low-frequency output pole
// and high supply rejection at low power.  Feedback divider /N.
// DCO, DAC/filter and regulator are behavioural models; the rest is
// synthesizable logic clocked by the reference.  Structure, widths and rates
// follow the document; gains and N = 4 are this design's choices.
module reg_dpll
  import pll_pkg::*;
#(
  parameter int N_DIV = 4,
  parameter int KI    = 1
) (
  input  logic            ref_clk,
  input  logic            rst_n,
  input  real             v_noise,   // noise on the supply ahead of the regulator [V]
  output logic            clk_out,
  output logic            fb,
  output logic [DI_W-1:0] d_i,
  output logic            early
);
  logic up, dn, en4;
  logic [3:0] level;
  logic [DAC_LEVELS-1:0] therm;
  real v_i, v_dd;

  pfd3 u_pfd (.ref_clk(ref_clk), .fb_clk(fb), .rst_n(rst_n), .up(up), .dn(dn));
  bbpd_ff u_bb (.ref_clk(ref_clk), .rst_n(rst_n), .dn(dn), .early(early));
  dlf_accum #(.KI(KI)) u_dlf (
    .clk(ref_clk), .rst_n(rst_n), .bb(early), .en4(en4), .d_i(d_i));
  dsm2_15 u_dsm (
    .clk(ref_clk), .rst_n(rst_n), .en(en4), .d_in(d_i), .level(level), .therm(therm));
  dac15_lpf_model u_dac (.therm(therm), .v_out(v_i));
  ldo_reg_model u_reg (.v_ctrl(v_i), .v_noise(v_noise), .v_dd_vco(v_dd));
  reg_dco_model u_dco (.v_dd(v_dd), .bb(early), .clk_out(clk_out));
  fb_divider #(.N(N_DIV)) u_div (.clk(clk_out), .rst_n(rst_n), .div(fb));
endmodule
