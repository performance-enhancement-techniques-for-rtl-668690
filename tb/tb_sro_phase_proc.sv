`timescale 1ps/1fs
// Testbench for sro_phase_proc: the testbench builds the 16 ring outputs
// for a phase segment it advances by a random 0..25 segments per sampling
// period (wrapping modulo 32) and checks that the output, four clocks
// later, equals each advance.
module tb_sro_phase_proc;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge at the start
  logic [15:0] ph;
  logic [4:0] d;
  sro_phase_proc dut (.clk(clk), .rst_n(rst_n), .phases(ph), .d_out(d));
  always #1000 clk = ~clk;
  int seg = 0, adv[$];
  function automatic logic [15:0] pat(input int s);
    logic [15:0] p;
    for (int k = 0; k < 16; k++) p[k] = (s < 16) ? (k < s) : (k >= s - 16);
    return p;
  endfunction
  initial begin
    ph = pat(0);
    #3000 rst_n = 1;
    repeat (3000) begin
      int a;
      @(negedge clk);
      a = (checks < 100) ? 1 : int'($urandom % 26);
      seg = (seg + a) % 32;
      ph = pat(seg);
      adv.push_back(a);
      @(posedge clk); #1;
      if (adv.size() > 3) begin
        int e;
        e = adv.pop_front();
        checks++;
        if (int'(d) != e) begin failures++; $display("FAIL: d=%0d exp %0d", d, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
