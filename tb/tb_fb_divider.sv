`timescale 1ps/1fs
// Testbench for fb_divider: N = 4 (default) and N = 6.  Counts input
// cycles between rising output edges (must be N) and high cycles (N/2).
module tb_fb_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, d4, d6;
  initial #1 rst_n = 0;   // reset edge at the start
  int c4 = 0, h4 = 0, c6 = 0, h6 = 0, e4 = 0, e6 = 0;
  logic p4 = 0, p6 = 0;
  fb_divider dut4 (.clk(clk), .rst_n(rst_n), .div(d4));
  fb_divider #(.N(6)) dut6 (.clk(clk), .rst_n(rst_n), .div(d6));
  always #333.333 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    c4++; c6++;
    if (d4) h4++;
    if (d6) h6++;
    if (d4 && !p4) begin
      if (e4 > 1) begin
        checks += 2;
        if (c4 != 4) begin failures++; $display("FAIL: /4 period %0d", c4); end
        if (h4 != 2 + 1 - 1) begin failures++; $display("FAIL: /4 high %0d", h4); end
      end
      e4++; c4 = 0; h4 = 0;
    end
    if (d6 && !p6) begin
      if (e6 > 1) begin
        checks += 2;
        if (c6 != 6) begin failures++; $display("FAIL: /6 period %0d", c6); end
        if (h6 != 3) begin failures++; $display("FAIL: /6 high %0d", h6); end
      end
      e6++; c6 = 0; h6 = 0;
    end
    p4 = d4; p6 = d6;
  end
  initial begin
    #2000 rst_n = 1;
    #200000;
    checks++;
    if (e4 < 50) begin failures++; $display("FAIL: too few /4 edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
