`timescale 1ps/1fs
// Closed-loop testbench for snc_dpll at its defaults: 375 MHz reference,
// divide-by-4, 1.5 GHz output.
//  1. lock: output frequency 4 x reference, bang-bang decisions both ways,
//     integral path settles;
//  2. supply-noise response before calibration (D_C = 0): a 20 mV step on
//     the oscillator supply: shift of D_I and peak PFD pulse width;
//  3. background calibration: D_C walks up from 0 and settles around the
//     code that cancels the supply sensitivity (4 in the oscillator model);
//     calibration steps are counted;
//  4. calibration frozen (cal_en low): D_C must not move;
//  5. the same supply step now barely moves D_I and disturbs the phase less;
//  6. lock is kept throughout.
module tb_snc_dpll;
  import pll_pkg::*;
  int checks = 0, failures = 0;
  logic r = 0, rst_n = 1, cal_en = 0;
  real vn = 0.0;
  logic clk, fb, early, cal_step;
  logic [DC_W-1:0] dc;
  logic [DI_W-1:0] di;
  logic [3:0] lvl, dt;
  snc_dpll dut (.ref_clk(r), .rst_n(rst_n), .cal_en(cal_en), .v_noise(vn), .clk_out(clk), .fb(fb),
    .d_c(dc), .d_i(di), .level(lvl), .d_test(dt), .early(early), .cal_step(cal_step));

  localparam real T_REF = 2666.667;
  initial forever #(T_REF / 2.0) r = ~r;

  real tu = 0.0, td = 0.0, maxw = 0.0;
  int nclk = 0, n_early = 0, n_late = 0, n_step = 0;
  always @(posedge dut.up) tu = $realtime;
  always @(negedge dut.up) if ($realtime - tu > maxw) maxw = $realtime - tu;
  always @(posedge dut.dn) td = $realtime;
  always @(negedge dut.dn) if ($realtime - td > maxw) maxw = $realtime - td;
  always @(posedge clk) nclk++;
  always @(posedge r) begin
    if (rst_n) begin
      if (early) n_early++; else n_late++;
      if (cal_step) n_step++;
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic meas_f(output real f_ghz);
    int n0;
    n0 = nclk; #4.0e6; f_ghz = $itor(nclk - n0) / 4000.0;
  endtask

  // 20 mV supply step: shift of the mean integral word (what the loop has
  // to correct) and peak PFD pulse width over the following 30 us
  task automatic mean_di(output real m);
    m = 0.0;
    repeat (400) begin #50000; m += $itor(di); end
    m /= 400.0;
  endtask
  task automatic noise_step(output real w, output real ddi);
    real m0, m1;
    mean_di(m0);
    maxw = 0.0;
    vn = 0.020;
    #30.0e6;
    w = maxw;
    mean_di(m1);
    ddi = m1 - m0;
    vn = 0.0; #40.0e6;
  endtask

  real f, w_before, w_after, w_quiet, di_before, di_after;
  int e0, l0, s0, dc_min, dc_max;
  logic [DC_W-1:0] dc_frozen;
  initial begin
    #1 rst_n = 0;
    #10000 rst_n = 1;
    #60.0e6;
    meas_f(f);
    check(f > 1.4995 && f < 1.5005, $sformatf("locked output %f GHz, expected 1.5", f));
    e0 = n_early; l0 = n_late;
    maxw = 0.0; #20.0e6; w_quiet = maxw;
    check(n_early - e0 > 100 && n_late - l0 > 100,
          $sformatf("bang-bang toggles: %0d early %0d late", n_early - e0, n_late - l0));
    check(w_quiet < 200.0, $sformatf("locked phase error %f ps", w_quiet));
    check(dc == 0, "D_C stays 0 while calibration is off");
    noise_step(w_before, di_before);
    $display("20 mV step, D_C=0: peak error %f ps, D_I shift %f", w_before, di_before);
    check(di_before < -100.0, $sformatf("uncancelled step moves D_I by %f", di_before));
    // background calibration
    s0 = n_step;
    cal_en = 1;
    #100.0e6;
    dc_min = 31; dc_max = 0;
    repeat (200) begin
      #1.0e6;
      if (dc < dc_min) dc_min = dc;
      if (dc > dc_max) dc_max = dc;
    end
    check(dc_min >= 1 && dc_max <= 7, $sformatf("D_C settles to %0d..%0d, expected 4 +- 3", dc_min, dc_max));
    check(n_step - s0 >= 4, $sformatf("%0d calibration steps", n_step - s0));
    // freeze and re-measure
    cal_en = 0;
    while (dc != 4) begin
      cal_en = 1; @(posedge r iff cal_step); cal_en = 0;
      @(posedge r);
    end
    dc_frozen = dc;
    noise_step(w_after, di_after);
    $display("20 mV step, D_C=%0d: peak error %f ps, D_I shift %f", dc, w_after, di_after);
    check(dc == dc_frozen, "D_C frozen with cal_en low");
    check(di_after > 0.1 * di_before && di_after < -0.1 * di_before,
          $sformatf("cancellation removes the step from D_I: %f -> %f", di_before, di_after));
    check(w_after < 0.7 * w_before,
          $sformatf("cancellation reduces the supply-step error: %f -> %f ps", w_before, w_after));
    meas_f(f);
    check(f > 1.4995 && f < 1.5005, $sformatf("still locked %f GHz", f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
