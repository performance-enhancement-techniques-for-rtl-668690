`timescale 1ps/1fs
// Testbench for fll_accum: random signed errors on random strobes; an
// independent saturating model of acc -= KF*ferr is compared after each
// strobe (14 MSBs of 18 bits), including saturation at both ends.
module tb_fll_accum;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, valid = 0;
  initial #1 rst_n = 0;   // reset edge at the start
  logic signed [14:0] ferr = 0;
  logic [13:0] d;
  localparam int KF = 37;
  fll_accum #(.KF(KF)) dut (.clk(clk), .rst_n(rst_n), .valid(valid), .ferr(ferr), .d_fll(d));
  always #1000 clk = ~clk;
  longint acc = 131072;
  int bias = 0;
  initial begin
    #3000 rst_n = 1;
    repeat (20000) begin
      @(negedge clk);
      valid = ($urandom % 3) == 0;
      ferr = 15'(int'($urandom % 41) - 20 + bias);
      @(posedge clk); #1;
      if (valid) begin
        acc -= KF * int'(ferr);
        if (acc < 0) acc = 0;
        if (acc > 262143) acc = 262143;
      end
      checks++;
      if (d != 14'(acc >> 4)) begin failures++; $display("FAIL: d=%0d exp %0d", d, acc >> 4); end
      if (checks == 5000) bias = 30;
      if (checks == 12000) bias = -30;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
