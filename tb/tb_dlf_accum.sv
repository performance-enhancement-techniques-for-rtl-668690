`timescale 1ps/1fs
// Testbench for dlf_accum: random and biased bang-bang streams; an
// independent model keeps the 18-bit accumulator (groups of four decisions,
// saturating) and the 14-bit output is compared on every strobe.  Also
// checks the F_REF/4 strobe rate and saturation at both ends.
module tb_dlf_accum;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, bb = 0, en4;
  initial #1 rst_n = 0;   // reset edge at the start
  logic [13:0] d_i;
  localparam int KI = 3;
  dlf_accum #(.KI(KI)) dut (.clk(clk), .rst_n(rst_n), .bb(bb), .en4(en4), .d_i(d_i));
  always #1333 clk = ~clk;

  longint acc = 131072;
  int slot = 0, nup = 0, since = 1, prob = 50;

  always @(posedge clk) if (rst_n) begin
    // model sees the same bb the DUT samples at this edge
    nup += bb;
    slot++;
    if (slot == 4) begin
      acc += KI * (2 * nup - 4);
      if (acc < 0) acc = 0;
      if (acc > 262143) acc = 262143;
      slot = 0; nup = 0;
    end
    #1;
    if (en4) begin
      checks += 2;
      if (d_i != 14'(acc >> 4)) begin failures++; $display("FAIL: d_i=%0d exp=%0d", d_i, acc >> 4); end
      if (since != 4 && since != 0) begin failures++; $display("FAIL: strobe spacing %0d", since); end
      since = 0;
    end
    since++;
    bb = ($urandom % 100) < prob;
  end

  initial begin
    #5000 rst_n = 1;
    repeat (4000) @(posedge clk);
    prob = 100; repeat (400000) @(posedge clk);   // drive to top
    checks++;
    if (d_i != 14'h3fff) begin failures++; $display("FAIL: no saturation at top, %0d", d_i); end
    prob = 0; repeat (400000) @(posedge clk);
    checks++;
    if (d_i != 0) begin failures++; $display("FAIL: no saturation at bottom, %0d", d_i); end
    prob = 50; repeat (4000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
