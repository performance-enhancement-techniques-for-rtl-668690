`timescale 1ps/1fs
// Testbench for fll_freq_det at its default size (/64, /2048, N = 4):
// the oscillator runs at 4*F_REF*(1 + eps) for several eps; the error must
// equal 128*eps within one count (counting quantisation), be positive for
// a fast oscillator, and arrive once every 2048 reference cycles.
module tb_fll_freq_det;
  int checks = 0, failures = 0;
  logic r = 0, f = 0, rst_n = 1, valid;
  initial #1 rst_n = 0;   // reset edge at the start
  logic signed [14:0] ferr;
  real tref = 2666.666, eps = 0.0;
  fll_freq_det dut (.f_out(f), .ref_clk(r), .rst_n(rst_n), .ferr(ferr), .valid(valid));
  always #(tref / 2.0) r = ~r;
  always #(tref / 8.0 / (1.0 + eps)) f = ~f;
  int nval = 0, last = 0, cyc = 0;
  real sum;
  always @(posedge r) cyc++;
  always @(posedge r) if (valid) begin
    if (nval > 0) begin
      checks++;
      if (cyc - last != 2048) begin failures++; $display("FAIL: strobe spacing %0d", cyc - last); end
    end
    last = cyc; nval++;
  end
  task automatic measure(input real e);
    real exp_v;
    int got;
    eps = e;
    exp_v = 128.0 * e;
    repeat (3) @(posedge valid);      // settle
    repeat (4) begin
      @(posedge r); while (!valid) @(posedge r);
      got = int'(ferr);
      checks++;
      if ($itor(got) > exp_v + 1.01 || $itor(got) < exp_v - 1.01) begin
        failures++; $display("FAIL: eps=%f ferr=%0d exp %f", e, got, exp_v);
      end
    end
  endtask
  initial begin
    #10000 rst_n = 1;
    measure(0.0); measure(0.05); measure(-0.1); measure(0.3); measure(-0.02);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
