`timescale 1ps/1fs
// Testbench for reg_dco_model: frequency F_LO + F_SPAN*v_dd +- KBB.
module tb_reg_dco_model;
  int checks = 0, failures = 0;
  real vdd = 0.7;
  logic bb = 1, clk;
  int n = 0;
  reg_dco_model dut (.v_dd(vdd), .bb(bb), .clk_out(clk));
  always @(posedge clk) n++;
  task automatic meas(input real exp_ghz, input string what);
    int n0; real f;
    #1000; n0 = n; #4.0e6; f = $itor(n - n0) / 4000.0;
    checks++;
    if (f < exp_ghz - 0.0006 || f > exp_ghz + 0.0006) begin failures++; $display("FAIL: %s %f exp %f", what, f, exp_ghz); end
  endtask
  initial begin
    meas(1.504, "bb=1");
    bb = 0; meas(1.496, "bb=0");
    vdd = 0.2; meas(0.996, "low supply");
    vdd = 1.0; bb = 1; meas(1.804, "top of range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
