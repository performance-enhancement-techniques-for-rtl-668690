`timescale 1ps/1fs
// Testbench for dsm2_15: for several constant inputs the mean output level
// must equal (7/8 * input)/1024, the level must stay in 0..14, the
// thermometer code must hold `level` ones, and the running sum of the
// error (level*1024 - 7/8*input) must stay bounded (noise shaping: the
// error has no DC content).  A ramp checks that the output tracks.
module tb_dsm2_15;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, en = 1;
  initial #1 rst_n = 0;   // reset edge at the start
  logic [13:0] d_in = 0;
  logic [3:0] level;
  logic [14:0] therm;
  dsm2_15 dut (.clk(clk), .rst_n(rst_n), .en(en), .d_in(d_in), .level(level), .therm(therm));
  always #1000 clk = ~clk;

  task automatic run_const(input int x);
    real xs, sum, cum, maxcum;
    int bad;
    xs = $itor(x) - $itor(x >> 3);
    d_in = 14'(x);
    repeat (10) @(posedge clk);
    sum = 0; cum = 0; maxcum = 0; bad = 0;
    repeat (4096) begin
      @(posedge clk); #1;
      sum += level;
      cum += $itor(level) * 1024.0 - xs;
      if (cum > maxcum) maxcum = cum;
      if (-cum > maxcum) maxcum = -cum;
      if (level > 14) bad++;
      if ($countones(therm) != int'(level) || therm != 15'((1 << level) - 1)) bad++;
    end
    checks += 3;
    if (bad != 0) begin failures++; $display("FAIL: x=%0d range/therm errors %0d", x, bad); end
    if (sum / 4096.0 > xs / 1024.0 + 0.01 || sum / 4096.0 < xs / 1024.0 - 0.01) begin
      failures++; $display("FAIL: x=%0d mean %f exp %f", x, sum / 4096.0, xs / 1024.0);
    end
    if (maxcum > 8.0 * 1024.0) begin failures++; $display("FAIL: x=%0d error sum %f", x, maxcum); end
  endtask

  initial begin
    #3000 rst_n = 1;
    run_const(8192); run_const(3000); run_const(12345); run_const(1500);
    run_const(15000); run_const(777); run_const(9999);
    // ramp: the output follows the input within a few levels
    for (int x = 2000; x < 14000; x += 8) begin
      d_in = 14'(x); @(posedge clk); #1;
      checks++;
      if (int'(level) > (x - (x >> 3)) / 1024 + 3 || int'(level) + 3 < (x - (x >> 3)) / 1024) begin
        failures++; $display("FAIL: ramp x=%0d level %0d", x, level);
      end
    end
    // enable low: output holds
    en = 0; d_in = 0;
    begin
      logic [3:0] held;
      held = level;
      repeat (20) @(posedge clk);
      checks++;
      if (level != held) begin failures++; $display("FAIL: output changed without enable"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
