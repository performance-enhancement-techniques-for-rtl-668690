`timescale 1ps/1fs
// Testbench for bbpd_ff: random DN levels ahead of each reference edge;
// the output after the edge must be the inverse of the sampled DN.
module tb_bbpd_ff;
  int checks = 0, failures = 0;
  logic r = 0, rst_n = 1, dn = 0, early;
  initial #1 rst_n = 0;   // reset edge at the start
  bit exp_v;
  bbpd_ff dut (.ref_clk(r), .rst_n(rst_n), .dn(dn), .early(early));
  initial begin
    #50; check_rst();
    rst_n = 1;
    repeat (200) begin
      dn = 1'($urandom);
      exp_v = ~dn;
      #300 r = 1;
      #10 dn = 1'($urandom);     // DN changes after the edge: must not matter
      #10;
      checks++;
      if (early !== exp_v) begin failures++; $display("FAIL: early=%b exp=%b", early, exp_v); end
      #300 r = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check_rst();
    checks++;
    if (early !== 1'b0) begin failures++; $display("FAIL: reset value"); end
  endtask
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
