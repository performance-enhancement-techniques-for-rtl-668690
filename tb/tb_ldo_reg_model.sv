`timescale 1ps/1fs
// Testbench for ldo_reg_model: the output must follow a control step with
// a first-order response and reject supply noise by the factor REJ.
module tb_ldo_reg_model;
  int checks = 0, failures = 0;
  real vc = 0.3, vn = 0.0, vo;
  ldo_reg_model dut (.v_ctrl(vc), .v_noise(vn), .v_dd_vco(vo));
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (v=%f)", msg, vo); end
  endtask
  initial begin
    #2000000;
    check(vo > 0.299 && vo < 0.301, "follows control voltage");
    vc = 0.8;
    #31831;                            // one time constant of 5 MHz
    check(vo > 0.3 + 0.5 * 0.55 && vo < 0.3 + 0.5 * 0.70, "first-order step response");
    #2000000;
    check(vo > 0.799 && vo < 0.801, "settles to new control voltage");
    vn = 0.2;
    #2000000;
    check(vo > 0.809 && vo < 0.811, "supply noise attenuated by REJ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
