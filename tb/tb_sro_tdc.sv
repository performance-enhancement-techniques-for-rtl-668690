`timescale 1ps/1fs
// Closed-loop testbench for sro_tdc: 500 MHz sampling clock, 80 MHz input
// and reference carriers, t_in delayed from t_ref by dt.  The average of
// D_OUT over many samples must follow
//   E[D_OUT] = 2*STAGES*T_S*(F_H - F_L)*(2*dt/T_C - 1)
// (F_H = 1/(32*156 ps), F_L = 0.3719*F_H), i.e. be linear in dt, and the
// accumulated error of D_OUT against that mean must stay bounded over the
// whole run (first-order noise shaping: the ring phase is never lost),
// also over a four times longer run.
// Sampling and carrier clocks are asynchronous; the sampling period gets a
// small random jitter.
module tb_sro_tdc;
  int checks = 0, failures = 0;
  logic clk_s = 0, t_in = 0, t_ref = 0, rst_n = 1;
  logic signed [5:0] d_out;
  logic [4:0] d_p, d_n;
  logic v_td;
  sro_tdc dut (.clk_s(clk_s), .t_in(t_in), .t_ref(t_ref), .rst_n(rst_n),
    .d_out(d_out), .d_p(d_p), .d_n(d_n), .v_td(v_td));

  localparam real T_C = 12500.0;                       // 80 MHz carrier
  localparam real T_S = 2000.0;                        // 500 MHz sampling
  localparam real F_H = 1.0 / (32.0 * 156.0);          // per ps
  localparam real F_L = 0.3719 * F_H;
  real dt = 1000.0;

  initial forever begin
    #(T_S / 2.0 + $itor($urandom % 20) / 10.0) clk_s = 1;
    #(T_S / 2.0) clk_s = 0;
  end
  initial begin
    #3777.0;
    forever begin t_ref = 1; #(T_C / 2.0); t_ref = 0; #(T_C / 2.0); end
  end
  always @(posedge t_ref)
    fork
      begin #(dt); t_in = 1; #(T_C / 2.0); t_in = 0; end
    join_none

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // average over n samples, then the worst accumulated deviation of the
  // next n samples from that average
  task automatic run(input int n, output real mean, output real dev);
    real sum, acc;
    sum = 0.0;
    repeat (n) begin @(posedge clk_s); sum += $itor(d_out); end
    mean = sum / $itor(n);
    acc = 0.0; dev = 0.0;
    repeat (n) begin
      @(posedge clk_s);
      acc += $itor(d_out) - mean;
      if (acc > dev) dev = acc;
      if (-acc > dev) dev = -acc;
    end
  endtask

  real m, dev, ex, p2p, dts[5];
  real ms[5];
  initial begin
    dts = '{1000.0, 3000.0, 6250.0, 9000.0, 11500.0};
    #1 rst_n = 0;
    #5000 rst_n = 1;
    foreach (dts[i]) begin
      dt = dts[i];
      repeat (20) @(posedge clk_s);
      run(4000, m, dev);
      ex = 2.0 * 16.0 * T_S * (F_H - F_L) * (2.0 * dt / T_C - 1.0);
      ms[i] = m;
      $display("dt=%6.0f ps  mean D_OUT=%8.4f  expected %8.4f  max accumulated error %6.2f", dt, m, ex, dev);
      check(m - ex < 0.05 && ex - m < 0.05, $sformatf("mean at dt=%f: %f vs %f", dt, m, ex));
      // the integrated rate difference swings by p2p within each carrier
      // period, the reference mean carries up to p2p/n of error; shaped
      // quantisation adds a few LSB and must not grow
      p2p = 2.0 * 16.0 * (F_H - F_L) * 2.0 * dt * (1.0 - dt / T_C);
      check(dev < 2.0 * p2p + 12.0, $sformatf("accumulated error %f at dt=%f (bound %f)", dev, dt, 2.0 * p2p + 12.0));
    end
    // a four times longer run must not accumulate more error
    dt = 3000.0;
    repeat (20) @(posedge clk_s);
    run(16000, m, dev);
    p2p = 2.0 * 16.0 * (F_H - F_L) * 2.0 * dt * (1.0 - dt / T_C);
    $display("16000 samples at dt=3000: mean %f, max accumulated error %f", m, dev);
    check(dev < 2.0 * p2p + 12.0, $sformatf("long run accumulated error %f", dev));
    // monotonic transfer
    check(ms[0] < ms[1] && ms[1] < ms[2] && ms[2] < ms[3] && ms[3] < ms[4], "monotonic transfer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
