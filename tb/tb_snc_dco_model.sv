`timescale 1ps/1fs
// Testbench for snc_dco_model: frequency from v_i, supply sensitivity of
// the test code with and without cancellation (zero at d_c = 4, reversed
// at d_c = 8), and the proportional phase kick of UP pulses scaled by the
// bandwidth code.
module tb_snc_dco_model;
  int checks = 0, failures = 0;
  logic up = 0, dn = 0, clk;
  real vi = 0.5, vn = 0.0;
  logic [3:0] dt = 0;
  logic [4:0] dc = 0, ibw = 0;
  int n = 0;
  snc_dco_model dut (.up(up), .dn(dn), .v_i(vi), .d_test(dt), .v_noise(vn),
    .d_c(dc), .ibw(ibw), .clk_out(clk));
  always @(posedge clk) n++;
  task automatic freq(input real win_ps, output real f_ghz);
    int n0;
    n0 = n; #(win_ps); f_ghz = $itor(n - n0) / win_ps * 1000.0;
  endtask
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  real f0, f1;
  initial begin
    #10000;
    freq(4.0e6, f0);
    check(f0 > 1.699 && f0 < 1.701, $sformatf("f(v_i=0.5) = %f GHz", f0));
    dt = 15;                                  // +10 mV on the supply
    freq(4.0e6, f1);
    check(f1 - f0 > 0.0095 && f1 - f0 < 0.0105, $sformatf("uncancelled test step %f GHz", f1 - f0));
    dc = 4;
    freq(4.0e6, f1);
    check(f1 - f0 > -0.0006 && f1 - f0 < 0.0006, $sformatf("cancelled at d_c=4: %f GHz", f1 - f0));
    dc = 8;
    freq(4.0e6, f1);
    check(f1 - f0 > -0.0105 && f1 - f0 < -0.0095, $sformatf("over-cancelled: %f GHz", f1 - f0));
    dt = 0; dc = 0;
    vn = 0.02;                                // external noise behaves like the test signal
    freq(4.0e6, f1);
    check(f1 - f0 > 0.0195 && f1 - f0 < 0.0205, $sformatf("noise sensitivity %f GHz", f1 - f0));
    vn = 0.0;
    // proportional path: 200 ps UP pulse every 2 ns -> +0.05*0.1 GHz (ibw 0)
    fork
      begin repeat (2000) begin up = 1; #200; up = 0; #1800; end end
      freq(4.0e6, f1);
    join
    check(f1 - f0 > 0.004 && f1 - f0 < 0.006, $sformatf("UP kick %f GHz", f1 - f0));
    ibw = 31;                                 // doubles proportional gain
    fork
      begin repeat (2000) begin dn = 1; #200; dn = 0; #1800; end end
      freq(4.0e6, f1);
    join
    check(f1 - f0 > -0.011 && f1 - f0 < -0.009, $sformatf("DN kick at ibw=31 %f GHz", f1 - f0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
