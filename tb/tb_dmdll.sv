`timescale 1ps/1fs
// Closed-loop testbench for dmdll at its defaults: 375 MHz reference,
// multiplication by 4, 1.5 GHz output.
//  1. free-running acquisition: the frequency-locking loop brings the
//     counted frequency error to within +-1 count of 128 and the ring to
//     1.5 GHz within the counter resolution;
//  2. injection enabled: exactly one injected edge per reference period,
//     exactly four output edges per reference period;
//  3. the 1-bit TDC toggles both ways: the tuning loop centres the ring's
//     own edge on the reference (within 5 ps), and the injected edge is the
//     reference edge plus the multiplexer delay;
//  4. a 20 mV supply step is absorbed: injection and frequency are kept.
module tb_dmdll;
  import pll_pkg::*;
  int checks = 0, failures = 0;
  logic r = 0, rst_n = 1, inj_en = 0;
  real vn = 0.0;
  logic clk, sel, d_tdc, fdv;
  logic [DI_W-1:0] d_tune, d_fll;
  logic signed [14:0] ferr;
  int n_inj;
  dmdll dut (.ref_clk(r), .rst_n(rst_n), .inj_en(inj_en), .v_noise(vn), .clk_out(clk), .sel(sel),
    .d_tdc(d_tdc), .d_tune(d_tune), .d_fll(d_fll), .fd_valid(fdv), .ferr(ferr), .n_inj(n_inj));

  localparam real T_REF = 2666.667;
  initial forever #(T_REF / 2.0) r = ~r;

  int nclk = 0, nref = 0, n_one = 0, n_zero = 0, nval = 0, n_bad_inj = 0, n_inj_chk = 0;
  int last_inj = 0;
  real t_ref_edge = 0.0;
  logic signed [14:0] last_ferr = '0;
  always @(posedge clk) begin
    nclk++;
    if (inj_en && n_inj != last_inj) begin
      n_inj_chk++;
      if ($realtime - t_ref_edge < 9.9 || $realtime - t_ref_edge > 10.1) n_bad_inj++;
    end
    last_inj = n_inj;
  end
  real max_nat = 0.0;
  always @(posedge dut.out_nat) begin
    real d;
    d = $realtime - t_ref_edge;
    if (d > T_REF / 2.0) d -= T_REF;
    if (d < 0.0) d = -d;
    if (d < 100.0 && d > max_nat) max_nat = d;
  end
  always @(posedge r) begin
    nref++;
    t_ref_edge = $realtime;
    if (rst_n) begin
      if (d_tdc) n_one++; else n_zero++;
      if (fdv) begin nval++; last_ferr = ferr; end
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

  real f;
  int v0, c0, r0, i0, o0, z0, fmax;
  initial begin
    #1 rst_n = 0;
    #10000 rst_n = 1;
    // acquisition with the ring free-running
    #400.0e6;
    check(nval > 20, $sformatf("%0d frequency-detector results", nval));
    fmax = 0;
    v0 = nval;
    while (nval < v0 + 10) begin
      @(posedge r);
      if (fdv && (ferr > fmax || -ferr > fmax)) fmax = (ferr < 0) ? -ferr : ferr;
    end
    check(fmax <= 1, $sformatf("FLL locked, |error| up to %0d counts", fmax));
    meas_f(f);
    $display("free-running after FLL: %f GHz", f);
    check(f > 1.485 && f < 1.515, $sformatf("free-running %f GHz, expected 1.5 within a count", f));
    // injection
    inj_en = 1;
    #200.0e6;                          // tuning loop pulls the ring's own edge onto the reference
    r0 = nref; c0 = nclk; i0 = n_inj; o0 = n_one; z0 = n_zero;
    n_inj_chk = 0; n_bad_inj = 0; max_nat = 0.0;
    #(T_REF * 1000);
    check(n_inj - i0 >= 999 && n_inj - i0 <= 1001, $sformatf("%0d injections in 1000 reference periods", n_inj - i0));
    check(nclk - c0 >= 3999 && nclk - c0 <= 4001, $sformatf("%0d output edges in 1000 reference periods", nclk - c0));
    check(n_one - o0 > 50 && n_zero - z0 > 50, $sformatf("TDC toggles: %0d ones %0d zeros", n_one - o0, n_zero - z0));
    check(max_nat < 5.0, $sformatf("ring's own edge up to %f ps from the reference", max_nat));
    check(n_inj_chk > 900 && n_bad_inj == 0, $sformatf("%0d of %0d injected edges mistimed", n_bad_inj, n_inj_chk));
    // supply step
    vn = 0.020;
    #50.0e6;
    c0 = nclk; i0 = n_inj;
    #(T_REF * 1000);
    check(n_inj - i0 >= 999 && n_inj - i0 <= 1001, $sformatf("after supply step: %0d injections", n_inj - i0));
    check(nclk - c0 >= 3999 && nclk - c0 <= 4001, $sformatf("after supply step: %0d edges", nclk - c0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
