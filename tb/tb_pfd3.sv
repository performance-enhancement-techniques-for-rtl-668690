`timescale 1ps/1fs
// Testbench for pfd3: applies rising-edge pairs with known offsets and
// checks that the UP (or DN) pulse width equals the offset and that the
// other output stays low.
module tb_pfd3;
  int checks = 0, failures = 0;
  logic r = 0, f = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge at the start
  logic up, dn;
  real t_up, w_up, t_dn, w_dn;

  pfd3 dut (.ref_clk(r), .fb_clk(f), .rst_n(rst_n), .up(up), .dn(dn));

  always @(posedge up) t_up = $realtime;
  always @(negedge up) w_up = $realtime - t_up;
  always @(posedge dn) t_dn = $realtime;
  always @(negedge dn) w_dn = $realtime - t_dn;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one edge pair: ref at 0, fb at `off` (negative: fb first)
  task automatic pair(input real off);
    w_up = 0.0; w_dn = 0.0;
    if (off >= 0) begin
      r = 1; #(off); f = 1;
    end else begin
      f = 1; #(-off); r = 1;
    end
    #(500.0);
    r = 0; f = 0;
    #(500.0);
    if (off >= 0) begin
      check(w_up > off - 0.01 && w_up < off + 0.01, $sformatf("UP width %0.2f for offset %0.2f", w_up, off));
      check(w_dn < 0.01, $sformatf("DN width %0.2f for offset %0.2f", w_dn, off));
    end else begin
      check(w_dn > -off - 0.01 && w_dn < -off + 0.01, $sformatf("DN width %0.2f for offset %0.2f", w_dn, off));
      check(w_up < 0.01, $sformatf("UP width %0.2f for offset %0.2f", w_up, off));
    end
    check(up == 0 && dn == 0, "PFD returns to reset state");
  endtask

  initial begin
    #100 rst_n = 1; #100;
    pair(100.0); pair(-250.0); pair(37.5); pair(-3.0); pair(400.0);
    // frequency detection: two ref edges before one fb edge keeps UP high
    r = 1; #100 r = 0; #100 r = 1; #50;
    check(up == 1 && dn == 0, "UP held over two reference edges");
    f = 1; #10;
    check(up == 0 && dn == 0, "cleared by feedback edge");
    r = 0; f = 0; #100;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
