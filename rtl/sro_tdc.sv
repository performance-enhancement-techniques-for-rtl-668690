`timescale 1ps/1fs
// sro_tdc: pseudo-differential switched-ring-oscillator time-to-digital
// converter.
// The time-difference generator turns the delay between the rising edges
// of t_in and t_ref into a pulse V_TD.  Two 16-stage switched ring
// oscillators run in complementary fashion: the positive one at F_H while
// V_TD is high and at F_L otherwise, the negative one the other way round
// (their combined supply current stays constant).  Each ring acts as an
// integrator of V_TD whose phase wraps modulo 2*pi instead of saturating.
// On every sampling-clock edge each phase processor quantises its ring's
// phase (32 segments), encodes it to 5 bits and differentiates it; the
// output D_OUT = D_P - D_N is the first-order noise-shaped measure of the
// duty cycle T_IN/T_C, averaged over many samples:
//   E[D_P - D_N] = 2*STAGES*T_S*(F_H - F_L)*(2*T_IN/T_C - 1).
// Sampling and carrier clocks are independent (oversampling ratio set by
// the sampling clock).  Rings are behavioural models; the TDG and the
// phase processors are synthesizable.  Latency 3 sampling clocks.
module sro_tdc #(
  parameter int STAGES = 16
) (
  input  logic        clk_s,     // sampling clock (faster than F_H)
  input  logic        t_in,      // input carrier
  input  logic        t_ref,     // reference carrier
  input  logic        rst_n,
  output logic signed [$clog2(2*STAGES):0] d_out,
  output logic [$clog2(2*STAGES)-1:0] d_p,
  output logic [$clog2(2*STAGES)-1:0] d_n,
  output logic        v_td
);
  logic [STAGES-1:0] ph_p, ph_n;

  tdg u_tdg (.t_in(t_in), .t_ref(t_ref), .rst_n(rst_n), .v_td(v_td));

  sro_model #(.STAGES(STAGES), .START_SEG(0.0)) u_sro_p (.sw(v_td),  .phases(ph_p));
  sro_model #(.STAGES(STAGES), .START_SEG(7.5)) u_sro_n (.sw(~v_td), .phases(ph_n));

  sro_phase_proc #(.STAGES(STAGES)) u_pp_p (.clk(clk_s), .rst_n(rst_n), .phases(ph_p), .d_out(d_p));
  sro_phase_proc #(.STAGES(STAGES)) u_pp_n (.clk(clk_s), .rst_n(rst_n), .phases(ph_n), .d_out(d_n));

  assign d_out = $signed({1'b0, d_p}) - $signed({1'b0, d_n});
endmodule
