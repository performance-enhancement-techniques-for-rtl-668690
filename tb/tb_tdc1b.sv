`timescale 1ps/1fs
// Testbench for tdc1b: the oscillator output is set high or low before the
// rising reference edge (edge early / late) and changed right after it;
// D_TDC must show the sampled level after the falling reference edge and
// not before it (FF2 timing).
module tb_tdc1b;
  int checks = 0, failures = 0;
  logic r = 0, out = 0, rst_n = 1, d;
  initial #1 rst_n = 0;   // reset edge at the start
  bit v, prev_v = 0;
  tdc1b dut (.ref_clk(r), .out(out), .rst_n(rst_n), .d_tdc(d));
  initial begin
    #100 rst_n = 1;
    repeat (300) begin
      v = 1'($urandom);
      out = v;
      #200 r = 1;
      #5 out = ~v;
      #100;
      checks++;
      if (d !== prev_v) begin failures++; $display("FAIL: output changed before falling edge"); end
      #95 r = 0;
      #10;
      checks++;
      if (d !== v) begin failures++; $display("FAIL: d_tdc=%b exp %b", d, v); end
      prev_v = v;
      #190;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
