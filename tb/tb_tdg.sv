`timescale 1ps/1fs
// Testbench for tdg: for input edges leading or lagging the reference by a
// known time, exactly one pulse of that width must appear on V_TD.
module tb_tdg;
  int checks = 0, failures = 0;
  logic ti = 0, tr = 0, rst_n = 1, v;
  initial #1 rst_n = 0;   // reset edge at the start
  real t0, w;
  int npulse;
  tdg dut (.t_in(ti), .t_ref(tr), .rst_n(rst_n), .v_td(v));
  always @(posedge v) begin t0 = $realtime; npulse++; end
  always @(negedge v) w = $realtime - t0;
  task automatic pair(input real off);
    w = 0; npulse = 0;
    if (off >= 0) begin tr = 1; #(off); ti = 1; end
    else begin ti = 1; #(-off); tr = 1; end
    #300 tr = 0; ti = 0; #300;
    checks += 2;
    if (w < (off < 0 ? -off : off) - 0.01 || w > (off < 0 ? -off : off) + 0.01) begin
      failures++; $display("FAIL: offset %f width %f", off, w);
    end
    if (npulse != 1) begin failures++; $display("FAIL: %0d pulses", npulse); end
  endtask
  initial begin
    #100 rst_n = 1; #100;
    pair(125.0); pair(-60.0); pair(1.5); pair(-999.0); pair(333.3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
