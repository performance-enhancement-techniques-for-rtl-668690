`timescale 1ps/1fs
// End-to-end testbench for pll_techniques_top with every parameter at its
// default.  The four circuits run at the same time:
//   * noise-cancelling DPLL: 375 MHz reference, locks to 1.5 GHz, then
//     background calibration is switched on, D_C settles around the
//     cancelling code, calibration is switched off again (mode switch) and
//     D_C must hold;
//   * regulated DPLL: 375 MHz reference, locks to 1.5 GHz, a 20 mV supply
//     step later it must still be locked;
//   * digital MDLL: 375 MHz reference, frequency acquisition by the FLL with
//     the ring free-running, then reference injection: 4 output edges and
//     1 injection per reference period;
//   * SRO-TDC: 500 MHz sampling clock, 80 MHz carriers, the input delay is
//     stepped from 3 ns to 9 ns and the average output must follow.
// Every mechanism is counted and a mechanism that never happened is a
// failure: bang-bang early and late decisions (both DPLLs), integral-path
// delta-sigma level changes, test-signal turning points, calibration steps
// up and down, calibration frozen, FLL frequency updates, reference
// injections, TDC early/late decisions of the MDLL, positive and negative
// SRO-TDC outputs and wraps of the ring-oscillator phase.
module tb_pll_techniques_top;
  import pll_pkg::*;
  int checks = 0, failures = 0;

  localparam real T_REF = 2666.667;     // 375 MHz
  localparam real T_S   = 2000.0;       // 500 MHz
  localparam real T_C   = 12500.0;      // 80 MHz

  logic snc_ref = 0, snc_rst_n = 1, snc_cal_en = 0;
  real  snc_v_noise = 0.0;
  logic snc_clk_out;
  logic [DC_W-1:0] snc_d_c;
  logic [DI_W-1:0] snc_d_i;
  logic reg_ref = 0, reg_rst_n = 1;
  real  reg_v_noise = 0.0;
  logic reg_clk_out;
  logic [DI_W-1:0] reg_d_i;
  logic mdl_ref = 0, mdl_rst_n = 1, mdl_inj_en = 0;
  real  mdl_v_noise = 0.0;
  logic mdl_clk_out;
  logic [DI_W-1:0] mdl_d_tune, mdl_d_fll;
  int   mdl_n_inj;
  logic tdc_clk_s = 0, tdc_t_in = 0, tdc_t_ref = 0, tdc_rst_n = 1;
  logic signed [5:0] tdc_d_out;

  pll_techniques_top dut (.*);

  // clocks: the three loops get references with unrelated start phases
  initial begin #100.0; forever #(T_REF / 2.0) snc_ref = ~snc_ref; end
  initial begin #730.0; forever #(T_REF / 2.0) reg_ref = ~reg_ref; end
  initial begin #1210.0; forever #(T_REF / 2.0) mdl_ref = ~mdl_ref; end
  initial forever begin
    #(T_S / 2.0 + $itor($urandom % 20) / 10.0) tdc_clk_s = 1;
    #(T_S / 2.0) tdc_clk_s = 0;
  end
  real dt = 3000.0;
  initial begin #3777.0; forever begin tdc_t_ref = 1; #(T_C / 2.0); tdc_t_ref = 0; #(T_C / 2.0); end end
  always @(posedge tdc_t_ref)
    fork begin #(dt); tdc_t_in = 1; #(T_C / 2.0); tdc_t_in = 0; end join_none

  // mechanism counters
  int snc_early = 0, snc_late = 0, snc_lvl_chg = 0, snc_turn = 0, snc_cal_up = 0, snc_cal_dn = 0;
  int snc_frozen = 0, reg_early = 0, reg_late = 0, reg_lvl_chg = 0;
  int mdl_fll_upd = 0, mdl_tdc_one = 0, mdl_tdc_zero = 0, tdc_pos = 0, tdc_neg = 0, tdc_wrap = 0;
  int n_snc = 0, n_reg = 0, n_mdl = 0;
  logic [3:0] snc_lvl_q = '0, reg_lvl_q = '0;
  logic [DC_W-1:0] dc_q = '0;

  always @(posedge snc_ref) if (snc_rst_n) begin
    if (dut.snc_early) snc_early++; else snc_late++;
    if (dut.snc_level != snc_lvl_q) snc_lvl_chg++;
    snc_lvl_q = dut.snc_level;
    if (dut.u_snc.half_end) snc_turn++;
    if (dut.u_snc.step_up) snc_cal_up++;
    if (dut.u_snc.step_dn) snc_cal_dn++;
    if (!snc_cal_en && dut.u_snc.half_end && snc_d_c == dc_q) snc_frozen++;
    dc_q = snc_d_c;
  end
  always @(posedge reg_ref) if (reg_rst_n) begin
    if (dut.reg_early) reg_early++; else reg_late++;
    if (dut.u_reg.level != reg_lvl_q) reg_lvl_chg++;
    reg_lvl_q = dut.u_reg.level;
  end
  always @(posedge mdl_ref) if (mdl_rst_n) begin
    if (dut.mdl_fd_valid) mdl_fll_upd++;
    if (mdl_inj_en) begin
      if (dut.mdl_d_tdc) mdl_tdc_one++; else mdl_tdc_zero++;
    end
  end
  always @(posedge tdc_clk_s) if (tdc_rst_n) begin
    if (tdc_d_out > 0) tdc_pos++;
    if (tdc_d_out < 0) tdc_neg++;
  end
  always @(posedge dut.u_tdc.ph_p[0]) tdc_wrap++;
  always @(posedge snc_clk_out) n_snc++;
  always @(posedge reg_clk_out) n_reg++;
  always @(posedge mdl_clk_out) n_mdl++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic mech(input string name, input int n);
    $display("  %-34s %0d", name, n);
    check(n > 0, {"mechanism never seen: ", name});
  endtask

  // frequencies of the three outputs over the same 4 us window
  task automatic meas(output real fs, output real fr, output real fm);
    int a, b, c;
    a = n_snc; b = n_reg; c = n_mdl;
    #4.0e6;
    fs = $itor(n_snc - a) / 4000.0;
    fr = $itor(n_reg - b) / 4000.0;
    fm = $itor(n_mdl - c) / 4000.0;
  endtask

  function automatic real tdc_expect(input real d);
    real fh, fl;
    fh = 1.0 / (32.0 * 156.0);
    fl = 0.3719 * fh;
    return 32.0 * T_S * (fh - fl) * (2.0 * d / T_C - 1.0);
  endfunction

  task automatic tdc_mean(input int n, output real m);
    m = 0.0;
    repeat (n) begin @(posedge tdc_clk_s); m += $itor(tdc_d_out); end
    m /= $itor(n);
  endtask

  real fs, fr, fm, m3, m9;
  int i0, c0, r0, dcmin, dcmax;
  logic [DC_W-1:0] dc_hold;
  initial begin
    #1;
    snc_rst_n = 0; reg_rst_n = 0; mdl_rst_n = 0; tdc_rst_n = 0;
    #10000;
    snc_rst_n = 1; reg_rst_n = 1; mdl_rst_n = 1; tdc_rst_n = 1;
    // SRO-TDC at dt = 3 ns
    #100000;
    tdc_mean(4000, m3);
    $display("SRO-TDC mean at 3 ns: %f (expected %f)", m3, tdc_expect(3000.0));
    check(m3 - tdc_expect(3000.0) < 0.05 && tdc_expect(3000.0) - m3 < 0.05, "SRO-TDC mean at 3 ns");
    dt = 9000.0;
    #50000;
    tdc_mean(4000, m9);
    $display("SRO-TDC mean at 9 ns: %f (expected %f)", m9, tdc_expect(9000.0));
    check(m9 - tdc_expect(9000.0) < 0.05 && tdc_expect(9000.0) - m9 < 0.05, "SRO-TDC mean at 9 ns");
    // noise-cancelling DPLL: lock, then background calibration
    wait ($realtime > 100.0e6);
    meas(fs, fr, fm);
    $display("at 100 us: snc %f GHz", fs);
    check(fs > 1.4995 && fs < 1.5005, $sformatf("noise-cancelling DPLL locked: %f GHz", fs));
    check(snc_d_c == 0, "D_C at reset value before calibration");
    snc_cal_en = 1;
    // regulated DPLL and MDLL acquisition
    wait ($realtime > 300.0e6);
    meas(fs, fr, fm);
    $display("at 300 us: reg %f GHz, MDLL free-running %f GHz", fr, fm);
    check(fr > 1.4995 && fr < 1.5005, $sformatf("regulated DPLL locked: %f GHz", fr));
    check(fm > 1.485 && fm < 1.515, $sformatf("MDLL frequency acquired: %f GHz", fm));
    reg_v_noise = 0.020;
    mdl_inj_en = 1;
    // calibration result; then freeze it (mode switch)
    dcmin = 31; dcmax = 0;
    repeat (100) begin
      #1.0e6;
      if (snc_d_c < dcmin) dcmin = snc_d_c;
      if (snc_d_c > dcmax) dcmax = snc_d_c;
    end
    $display("D_C between %0d and %0d with calibration running", dcmin, dcmax);
    check(dcmin >= 1 && dcmax <= 7, $sformatf("D_C settles to %0d..%0d, expected 4 +- 3", dcmin, dcmax));
    snc_cal_en = 0;
    dc_hold = snc_d_c;
    #150.0e6;
    check(snc_d_c == dc_hold, "D_C holds with calibration off");
    // final state of the three loops
    i0 = mdl_n_inj; c0 = n_mdl; r0 = 0;
    meas(fs, fr, fm);
    $display("at %0t: snc %f GHz, reg %f GHz, MDLL %f GHz", $time, fs, fr, fm);
    check(fs > 1.4995 && fs < 1.5005, $sformatf("noise-cancelling DPLL still locked: %f GHz", fs));
    check(fr > 1.4995 && fr < 1.5005, $sformatf("regulated DPLL locked after supply step: %f GHz", fr));
    check(n_mdl - c0 >= 4 * 1500 - 2 && n_mdl - c0 <= 4 * 1500 + 2,
          $sformatf("MDLL: %0d edges in 1500 reference periods", n_mdl - c0));
    check(mdl_n_inj - i0 >= 1499 && mdl_n_inj - i0 <= 1501,
          $sformatf("MDLL: %0d injections in 1500 reference periods", mdl_n_inj - i0));
    $display("mechanisms:");
    mech("snc bang-bang early", snc_early);
    mech("snc bang-bang late", snc_late);
    mech("snc delta-sigma level change", snc_lvl_chg);
    mech("snc test-signal turning point", snc_turn);
    mech("snc calibration step up", snc_cal_up);
    mech("snc calibration step down", snc_cal_dn);
    mech("snc calibration frozen", snc_frozen);
    mech("reg bang-bang early", reg_early);
    mech("reg bang-bang late", reg_late);
    mech("reg delta-sigma level change", reg_lvl_chg);
    mech("mdl FLL frequency update", mdl_fll_upd);
    mech("mdl reference injection", mdl_n_inj);
    mech("mdl TDC early", mdl_tdc_one);
    mech("mdl TDC late", mdl_tdc_zero);
    mech("tdc positive output", tdc_pos);
    mech("tdc negative output", tdc_neg);
    mech("tdc ring phase wrap", tdc_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
