`timescale 1ps/1fs
// Testbench for sro_model: the ring must run at 1/(32*156 ps) = 200.3 MHz
// with sw high and at 0.3719 of that with sw low, step through the 32
// segments in order, and keep its phase across switching (no lost or
// extra segments).
module tb_sro_model;
  int checks = 0, failures = 0;
  logic sw = 1;
  logic [15:0] ph, prev;
  int steps = 0, bad = 0, first = 1;
  sro_model dut (.sw(sw), .phases(ph));
  function automatic int segof(input logic [15:0] p);
    int c;
    c = $countones(p);
    return p[0] ? c : (c == 0 ? 0 : 32 - c);
  endfunction
  always @(ph) begin
    int d;
    d = (segof(ph) - segof(prev) + 32) % 32;
    if (d != 1 && !first) bad++;
    first = 0;
    steps++;
    prev = ph;
  end
  task automatic meas(input real exp_mhz, input string what);
    int s0; real f;
    #5000; s0 = steps; #2.0e6; f = $itor(steps - s0) / 32.0 / 2.0;   // MHz
    checks++;
    if (f < exp_mhz * 0.995 || f > exp_mhz * 1.005) begin failures++; $display("FAIL: %s %f MHz exp %f", what, f, exp_mhz); end
  endtask
  initial begin
    prev = 16'h0;
    meas(200.32, "F_H");
    sw = 0; meas(200.32 * 0.3719, "F_L");
    repeat (500) begin #($urandom % 700 + 13); sw = ~sw; end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL: %0d non-unit segment steps", bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
