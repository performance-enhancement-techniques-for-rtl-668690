`timescale 1ps/1fs
// Testbench for cancel_cal: a loop stand-in feeds D_I = base -
// G*(OPT - D_C)*D_TEST, i.e. the test triangle appears in D_I with a sign
// and size set by the remaining mismatch, as in the PLL.  The code must
// climb from 0 to OPT one step per test period, then stay; IBW must be
// 31 - D_C; with cal_en low the code must hold.  Repeated for a second
// optimum reached from above.
module tb_cancel_cal;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, en = 0, cal_en = 1;
  initial #1 rst_n = 0;   // reset edge at the start
  logic [3:0] d_test;
  logic rising, half_end, step_up, step_dn;
  logic [13:0] d_i;
  logic [4:0] d_c, ibw;
  int opt = 4, ups = 0, dns = 0, periods = 0;

  test_signal_gen #(.W(4), .PRESCALE(2)) u_tsg (.clk(clk), .rst_n(rst_n), .en(en),
    .d_test(d_test), .rising(rising), .half_end(half_end));
  cancel_cal #(.THR(4)) dut (.clk(clk), .rst_n(rst_n), .cal_en(cal_en), .d_i(d_i),
    .rising(rising), .half_end(half_end), .d_c(d_c), .ibw(ibw),
    .step_up(step_up), .step_dn(step_dn));

  always #500 clk = ~clk;
  always @(posedge clk) en <= ~en;
  assign d_i = 14'(8000 - 3 * (opt - int'(d_c)) * int'(d_test) + ($urandom % 3));
  always @(posedge clk) begin
    if (step_up) ups++;
    if (step_dn) dns++;
    if (half_end && rising) periods++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #3000 rst_n = 1;
    check(d_c == 0 && ibw == 31, "reset code");
    // each test period is 2*15*2 strobes = 120 clocks
    repeat (120 * 12) @(posedge clk);
    check(d_c == 5'(opt), $sformatf("converged to %0d, expected %0d", d_c, opt));
    check(ups == opt && dns == 0, $sformatf("steps up %0d down %0d", ups, dns));
    check(ibw == 5'(31 - opt), "IBW = 31 - D_C");
    // settling speed: at most one step per period
    check(periods >= ups, "no more than one step per period");
    // hold while disabled
    cal_en = 0; opt = 20;
    repeat (120 * 5) @(posedge clk);
    check(d_c == 4, "code holds with calibration disabled");
    cal_en = 1;
    repeat (120 * 20) @(posedge clk);
    check(d_c == 20, $sformatf("tracks new optimum, got %0d", d_c));
    opt = 9;
    repeat (120 * 16) @(posedge clk);
    check(d_c == 9, $sformatf("tracks lower optimum, got %0d", d_c));
    check(dns == 11, $sformatf("down steps %0d", dns));
    // a mismatch beyond the code range saturates at 31 without wrapping
    opt = 40;
    repeat (120 * 30) @(posedge clk);
    check(d_c == 31, $sformatf("saturates at 31, got %0d", d_c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
