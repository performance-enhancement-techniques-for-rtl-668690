`timescale 1ps/1fs
// Testbench for dac15_lpf_model: steps of the number of enabled unit
// elements; the output must settle to count/14, rise monotonically and
// take on the order of the 500 kHz filter's time constant to do so.
module tb_dac15_lpf_model;
  int checks = 0, failures = 0;
  logic [14:0] th = '0;
  real v, vprev;
  int nonmono = 0;
  dac15_lpf_model dut (.therm(th), .v_out(v));
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (v=%f)", msg, v); end
  endtask
  initial begin
    #20000000;                       // 20 us
    check(v < 0.005, "settles to 0 with no element on");
    th = 15'h007f;                   // 7 elements -> 0.5
    #300000;
    check(v > 0.05 && v < 0.45, "partial response after 0.3 us");
    #20000000;
    check(v > 0.495 && v < 0.505, "settles to 7/14");
    th = 15'h3fff;                   // 14 elements -> 1.0
    vprev = v;
    repeat (200) begin
      #10000;
      if (v < vprev - 1e-9) nonmono++;
      vprev = v;
    end
    check(nonmono == 0, "monotonic rise");
    #20000000;
    check(v > 0.995 && v < 1.005, "settles to 14/14");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
