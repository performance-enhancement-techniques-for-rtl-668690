`timescale 1ps/1fs
// pll_techniques_top: the four timing circuits side by side.  They share no
// signals; each keeps its own reference, reset and outputs:
//   snc_*  noise-cancelling ring-oscillator DPLL (background-calibrated
//          supply-noise cancellation)
//   reg_*  low-power DPLL with the supply regulator in the integral path
//   mdl_*  digital multiplying DLL with 1-bit TDC and FLL
//   tdc_*  switched-ring-oscillator TDC
// See each module's header for its operation and timing.
module pll_techniques_top
  import pll_pkg::*;
(
  // noise-cancelling DPLL
  input  logic              snc_ref,
  input  logic              snc_rst_n,
  input  logic              snc_cal_en,
  input  real               snc_v_noise,
  output logic              snc_clk_out,
  output logic [DC_W-1:0]   snc_d_c,
  output logic [DI_W-1:0]   snc_d_i,
  // regulated DPLL
  input  logic              reg_ref,
  input  logic              reg_rst_n,
  input  real               reg_v_noise,
  output logic              reg_clk_out,
  output logic [DI_W-1:0]   reg_d_i,
  // digital MDLL
  input  logic              mdl_ref,
  input  logic              mdl_rst_n,
  input  logic              mdl_inj_en,
  input  real               mdl_v_noise,
  output logic              mdl_clk_out,
  output logic [DI_W-1:0]   mdl_d_tune,
  output logic [DI_W-1:0]   mdl_d_fll,
  output int                mdl_n_inj,
  // SRO-TDC
  input  logic              tdc_clk_s,
  input  logic              tdc_t_in,
  input  logic              tdc_t_ref,
  input  logic              tdc_rst_n,
  output logic signed [5:0] tdc_d_out
);
  logic snc_fb, snc_early, snc_cal_step;
  logic [3:0] snc_level, snc_d_test;
  snc_dpll u_snc (
    .ref_clk(snc_ref), .rst_n(snc_rst_n), .cal_en(snc_cal_en), .v_noise(snc_v_noise),
    .clk_out(snc_clk_out), .fb(snc_fb), .d_c(snc_d_c), .d_i(snc_d_i), .level(snc_level),
    .d_test(snc_d_test), .early(snc_early), .cal_step(snc_cal_step));

  logic reg_fb, reg_early;
  reg_dpll u_reg (
    .ref_clk(reg_ref), .rst_n(reg_rst_n), .v_noise(reg_v_noise),
    .clk_out(reg_clk_out), .fb(reg_fb), .d_i(reg_d_i), .early(reg_early));

  logic mdl_sel, mdl_d_tdc, mdl_fd_valid;
  logic signed [14:0] mdl_ferr;
  dmdll u_mdl (
    .ref_clk(mdl_ref), .rst_n(mdl_rst_n), .inj_en(mdl_inj_en), .v_noise(mdl_v_noise),
    .clk_out(mdl_clk_out), .sel(mdl_sel), .d_tdc(mdl_d_tdc), .d_tune(mdl_d_tune),
    .d_fll(mdl_d_fll), .fd_valid(mdl_fd_valid), .ferr(mdl_ferr), .n_inj(mdl_n_inj));

  logic [4:0] tdc_d_p, tdc_d_n;
  logic       tdc_v_td;
  sro_tdc u_tdc (
    .clk_s(tdc_clk_s), .t_in(tdc_t_in), .t_ref(tdc_t_ref), .rst_n(tdc_rst_n),
    .d_out(tdc_d_out), .d_p(tdc_d_p), .d_n(tdc_d_n), .v_td(tdc_v_td));
endmodule
