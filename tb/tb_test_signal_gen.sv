`timescale 1ps/1fs
// Testbench for test_signal_gen: with a strobe every other clock and
// PRESCALE = 3, one triangle period must last 2*15*3 strobes, span codes
// 0..15, change by one code at a time and flag each turning point once.
// The default configuration is also checked for its 930-strobe period.
module tb_test_signal_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, en = 0;
  initial #1 rst_n = 0;   // reset edge at the start
  logic [3:0] d, dd;
  logic rising, half_end, r_d, he_d;
  test_signal_gen #(.W(4), .PRESCALE(3)) dut (.clk(clk), .rst_n(rst_n), .en(en),
    .d_test(d), .rising(rising), .half_end(half_end));
  test_signal_gen dut_d (.clk(clk), .rst_n(rst_n), .en(1'b1),
    .d_test(dd), .rising(r_d), .half_end(he_d));
  always #500 clk = ~clk;
  always @(posedge clk) en <= ~en;

  int strobes = 0, ends = 0, last_end = -1, mn = 99, mx = -1, prev = 0, jumps = 0;
  int cyc = 0, dends = 0, dlast = -1;
  always @(posedge clk) if (rst_n) begin
    #1;
    cyc++;
    if (en) strobes++;   // en was high at this edge before toggling? count edges with strobe
    if (int'(d) < mn) mn = d;
    if (int'(d) > mx) mx = d;
    if (int'(d) - prev > 1 || prev - int'(d) > 1) jumps++;
    prev = d;
    if (half_end) begin
      if (last_end >= 0) begin
        checks++;
        if (cyc - last_end != 2 * 15 * 3) begin failures++; $display("FAIL: half period %0d clocks", cyc - last_end); end
      end
      last_end = cyc; ends++;
    end
    if (he_d) begin
      if (dlast >= 0) begin
        checks++;
        if (cyc - dlast != 15 * 31) begin failures++; $display("FAIL: default half period %0d", cyc - dlast); end
      end
      dlast = cyc; dends++;
    end
  end
  initial begin
    #3000 rst_n = 1;
    #20000000;
    checks += 4;
    if (mn != 0 || mx != 15) begin failures++; $display("FAIL: span %0d..%0d", mn, mx); end
    if (jumps != 0) begin failures++; $display("FAIL: %0d jumps", jumps); end
    if (ends < 10) begin failures++; $display("FAIL: %0d turning points", ends); end
    if (dends < 4) begin failures++; $display("FAIL: default generator %0d turning points", dends); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
