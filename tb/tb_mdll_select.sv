`timescale 1ps/1fs
// Testbench for mdll_select: on a free-running clock SEL must be high in
// exactly one of every N cycles (N = 4 default, N = 5 second instance) and
// the first cycle after reset must be a select cycle; `div` must be high
// for N/2 of every N cycles.
module tb_mdll_select;
  int checks = 0, failures = 0;
  logic out = 0, rst_n = 1, s4, dv4, s5, dv5;
  initial #1 rst_n = 0;   // reset edge at the start
  mdll_select dut4 (.out(out), .rst_n(rst_n), .sel(s4), .div(dv4));
  mdll_select #(.N(5)) dut5 (.out(out), .rst_n(rst_n), .sel(s5), .div(dv5));
  always #333 out = ~out;
  int n = 0, sel4 = 0, sel5 = 0, hi4 = 0;
  initial begin
    #100;
    checks += 2;
    if (s4 !== 1) begin failures++; $display("FAIL: SEL not set after reset"); end
    if (s5 !== 1) begin failures++; $display("FAIL: SEL (N=5) not set after reset"); end
    @(negedge out); rst_n = 1;
    repeat (400) begin
      @(negedge out);    // sample in the middle of each cycle
      n++;
      if (s4) sel4++;
      if (s5) sel5++;
      if (dv4) hi4++;
      if (n % 20 == 0) begin
        checks += 3;
        if (sel4 != 5) begin failures++; $display("FAIL: N=4 selects %0d in 20", sel4); end
        if (sel5 != 4) begin failures++; $display("FAIL: N=5 selects %0d in 20", sel5); end
        if (hi4 != 10) begin failures++; $display("FAIL: div high %0d in 20", hi4); end
        sel4 = 0; sel5 = 0; hi4 = 0;
      end
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
