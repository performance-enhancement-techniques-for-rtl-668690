`timescale 1ps/1fs
// snc_dpll: ring-oscillator digital PLL with background-calibrated supply
// noise cancellation.
// Proportional path: a three-state PFD drives the oscillator directly
// through a 3-level DAC, so the proportional path has no TDC quantisation.
// Integral path: a flip-flop on the PFD output gives the sign of the phase
// error; a 1-to-4 demultiplexer and an 18-bit accumulator at F_REF/4 form
// the digital integrator; its 14 MSBs D_I pass through a second-order
// delta-sigma modulator to a 15-level current DAC and a 500 kHz low-pass
// filter that sets the integral control voltage.  Feedback divider: /4.
// Supply-noise cancellation: a slow triangular test code D_TEST modulates
// the oscillator supply through a digitally controlled resistor.  The
// calibration engine correlates D_I with the triangle and steps the 5-bit
// cancellation code D_C until the triangle no longer shows in D_I; the same
// gain then cancels any other supply noise.  D_C also sets the
// proportional-path bandwidth code IBW = 31 - D_C.
// The DCO, the DACs and the filter are behavioural models; everything else
// is synthesizable logic clocked by the reference.  Structure, widths, rates
// and the divide ratio follow the document; loop gains and the correlator
// details are this design's choices (see the blocks' own headers).
module snc_dpll
  import pll_pkg::*;
#(
  parameter int N_DIV    = 4,
  parameter int KI       = 2,
  parameter int TEST_W   = 4,
  parameter int PRESCALE = 31,
  parameter int THR      = 8
) (
  input  logic            ref_clk,
  input  logic            rst_n,
  input  logic            cal_en,     // background calibration on
  input  real             v_noise,    // external noise on the DCO supply [V]
  output logic            clk_out,    // DCO output
  output logic            fb,         // divided feedback clock
  output logic [DC_W-1:0] d_c,        // cancellation code
  output logic [DI_W-1:0] d_i,        // integral word
  output logic [3:0]      level,      // delta-sigma DAC level
  output logic [TEST_W-1:0] d_test,   // test signal code
  output logic            early,      // bang-bang decision
  output logic            cal_step    // calibration changed D_C
);
  logic up, dn, en4, rising, half_end, step_up, step_dn;
  logic [DAC_LEVELS-1:0] therm;
  logic [DC_W-1:0] ibw;
  real v_i;

  pfd3 u_pfd (.ref_clk(ref_clk), .fb_clk(fb), .rst_n(rst_n), .up(up), .dn(dn));

  bbpd_ff u_bb (.ref_clk(ref_clk), .rst_n(rst_n), .dn(dn), .early(early));

  dlf_accum #(.KI(KI)) u_dlf (
    .clk(ref_clk), .rst_n(rst_n), .bb(early), .en4(en4), .d_i(d_i));

  dsm2_15 u_dsm (
    .clk(ref_clk), .rst_n(rst_n), .en(en4), .d_in(d_i), .level(level), .therm(therm));

  dac15_lpf_model u_dac (.therm(therm), .v_out(v_i));

  test_signal_gen #(.W(TEST_W), .PRESCALE(PRESCALE)) u_tsg (
    .clk(ref_clk), .rst_n(rst_n), .en(en4),
    .d_test(d_test), .rising(rising), .half_end(half_end));

  cancel_cal #(.THR(THR)) u_cal (
    .clk(ref_clk), .rst_n(rst_n), .cal_en(cal_en), .d_i(d_i),
    .rising(rising), .half_end(half_end),
    .d_c(d_c), .ibw(ibw), .step_up(step_up), .step_dn(step_dn));
  assign cal_step = step_up | step_dn;

  snc_dco_model u_dco (
    .up(up), .dn(dn), .v_i(v_i), .d_test(4'(d_test)), .v_noise(v_noise),
    .d_c(d_c), .ibw(ibw), .clk_out(clk_out));

  fb_divider #(.N(N_DIV)) u_div (.clk(clk_out), .rst_n(rst_n), .div(fb));
endmodule
