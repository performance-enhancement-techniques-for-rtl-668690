`timescale 1ps/1fs
// dmdll: digital multiplying delay-locked loop with a 1-bit TDC.
// The ring oscillator (DXRO) has a multiplexer in its loop; the select
// logic counts output cycles and, in every N-th cycle, lets the reference
// edge replace the ring's own edge, which resets the jitter the ring has
// accumulated.  Two loops tune the ring:
//   * MDLL tuning loop: a 1-bit TDC (two flip-flops) tells whether the
//     ring's edge came before or after the reference; a 1-to-4
//     demultiplexer and 18-bit accumulator integrate that sign; the 14 MSBs
//     go through a second-order delta-sigma modulator, 15-level DAC and
//     low-pass filter to the ring's V_TUNE input (stage time constant).
//   * Frequency-locking loop (FLL): a counting frequency detector (output
//     /64 into a 14-bit counter, sampled every 2048 reference cycles,
//     differentiated, compared with 128) feeds an accumulator, a second
//     delta-sigma DAC and the replica regulator that sets the ring supply.
// Start-up: while inj_en is low, SEL is held low and the ring runs free so
// the FLL can acquire the frequency (an injected ring always produces
// exactly N edges per reference period, which hides its frequency error
// from the counter); inj_en high enables injection.  Until then the tuning
// loop filter receives alternating decisions and holds mid-scale.  This
// sequencing is this design's choice.  Oscillator, DACs/filters and
// regulator are behavioural models; the rest is synthesizable.
module dmdll
  import pll_pkg::*;
#(
  parameter int N       = 4,
  parameter int KI      = 1,
  parameter int KF      = 256,
  parameter int OUT_DIV = 64,
  parameter int REF_DIV = 2048
) (
  input  logic            ref_clk,
  input  logic            rst_n,
  input  logic            inj_en,     // enable reference injection
  input  real             v_noise,    // supply noise ahead of the regulator [V]
  output logic            clk_out,
  output logic            sel,
  output logic            d_tdc,
  output logic [DI_W-1:0] d_tune,
  output logic [DI_W-1:0] d_fll,
  output logic            fd_valid,
  output logic signed [14:0] ferr,
  output int              n_inj
);
  logic sel_raw, div, en4, out_nat;
  logic [3:0] lvl_t, lvl_f;
  logic [DAC_LEVELS-1:0] th_t, th_f;
  real v_tune, v_fll, v_dd;

  mdll_select #(.N(N)) u_sel (.out(clk_out), .rst_n(rst_n), .sel(sel_raw), .div(div));
  assign sel = sel_raw & inj_en;

  dxro_model u_dxro (
    .ref_clk(ref_clk), .sel(sel), .v_dd(v_dd), .v_tune(v_tune),
    .out(clk_out), .out_nat(out_nat), .n_inj(n_inj));

  // MDLL tuning loop
  tdc1b u_tdc (.ref_clk(ref_clk), .out(out_nat), .rst_n(rst_n), .d_tdc(d_tdc));
  // while injection is off the loop filter sees alternating decisions, so
  // the tuning word holds its reset (mid-scale) value
  logic hold_t, bb_t;
  always_ff @(posedge ref_clk or negedge rst_n)
    if (!rst_n) hold_t <= 1'b0;
    else        hold_t <= ~hold_t;
  assign bb_t = inj_en ? ~d_tdc : hold_t;
  dlf_accum #(.KI(KI)) u_dlf (
    .clk(ref_clk), .rst_n(rst_n), .bb(bb_t), .en4(en4), .d_i(d_tune));
  dsm2_15 u_dsm_t (
    .clk(ref_clk), .rst_n(rst_n), .en(en4), .d_in(d_tune), .level(lvl_t), .therm(th_t));
  dac15_lpf_model u_dac_t (.therm(th_t), .v_out(v_tune));

  // frequency-locking loop
  fll_freq_det #(.OUT_DIV(OUT_DIV), .REF_DIV(REF_DIV), .CNT_W(14), .N(N)) u_fd (
    .f_out(clk_out), .ref_clk(ref_clk), .rst_n(rst_n), .ferr(ferr), .valid(fd_valid));
  fll_accum #(.KF(KF)) u_fll (
    .clk(ref_clk), .rst_n(rst_n), .valid(fd_valid), .ferr(ferr), .d_fll(d_fll));
  dsm2_15 u_dsm_f (
    .clk(ref_clk), .rst_n(rst_n), .en(en4), .d_in(d_fll), .level(lvl_f), .therm(th_f));
  dac15_lpf_model u_dac_f (.therm(th_f), .v_out(v_fll));
  ldo_reg_model u_reg (.v_ctrl(v_fll), .v_noise(v_noise), .v_dd_vco(v_dd));
endmodule
