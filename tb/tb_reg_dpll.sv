`timescale 1ps/1fs
// Closed-loop testbench for reg_dpll at its defaults: 375 MHz reference,
// divide-by-4, 1.5 GHz output.
//  1. lock from the power-on control voltage: output 4 x reference;
//  2. the bang-bang proportional path toggles both ways in lock and the
//     integral word settles;
//  3. a 20 mV step on the supply ahead of the regulator is attenuated by
//     the regulator: the integral word hardly moves and the PFD pulse width
//     stays within the locked limit cycle;
//  4. lock is kept.
module tb_reg_dpll;
  import pll_pkg::*;
  int checks = 0, failures = 0;
  logic r = 0, rst_n = 1;
  real vn = 0.0;
  logic clk, fb, early;
  logic [DI_W-1:0] di;
  reg_dpll dut (.ref_clk(r), .rst_n(rst_n), .v_noise(vn), .clk_out(clk), .fb(fb), .d_i(di), .early(early));

  localparam real T_REF = 2666.667;
  initial forever #(T_REF / 2.0) r = ~r;

  real tu = 0.0, td = 0.0, maxw = 0.0;
  int nclk = 0, n_early = 0, n_late = 0;
  always @(posedge dut.up) tu = $realtime;
  always @(negedge dut.up) if ($realtime - tu > maxw) maxw = $realtime - tu;
  always @(posedge dut.dn) td = $realtime;
  always @(negedge dut.dn) if ($realtime - td > maxw) maxw = $realtime - td;
  always @(posedge clk) nclk++;
  always @(posedge r) if (rst_n) begin
    if (early) n_early++; else n_late++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic meas_f(output real f_ghz);
    int n0;
    n0 = nclk; #4.0e6; f_ghz = $itor(nclk - n0) / 4000.0;
  endtask
  task automatic mean_di(output real m);
    m = 0.0;
    repeat (400) begin #50000; m += $itor(di); end
    m /= 400.0;
  endtask

  real f, m0, m1, w_quiet, w_step, m_a, m_b;
  int e0, l0;
  initial begin
    #1 rst_n = 0;
    #10000 rst_n = 1;
    #250.0e6;                          // slew from the power-on control voltage
    meas_f(f);
    check(f > 1.4995 && f < 1.5005, $sformatf("locked output %f GHz, expected 1.5", f));
    e0 = n_early; l0 = n_late;
    maxw = 0.0;
    mean_di(m_a);
    w_quiet = maxw;
    mean_di(m_b);
    check(n_early - e0 > 100 && n_late - l0 > 100,
          $sformatf("bang-bang toggles: %0d early %0d late", n_early - e0, n_late - l0));
    check(m_b - m_a < 30.0 && m_a - m_b < 30.0, $sformatf("integral word settled %f -> %f", m_a, m_b));
    check(w_quiet < 200.0, $sformatf("locked phase error %f ps", w_quiet));
    mean_di(m0);
    vn = 0.020;
    maxw = 0.0;
    #30.0e6;
    w_step = maxw;
    mean_di(m1);
    $display("20 mV supply step: D_I shift %f, peak error %f ps (quiet %f ps)", m1 - m0, w_step, w_quiet);
    check(m1 - m0 > -20.0 && m1 - m0 < 20.0, $sformatf("regulated supply: D_I shift %f", m1 - m0));
    check(w_step < 1.5 * w_quiet + 20.0, $sformatf("supply step error %f ps", w_step));
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
