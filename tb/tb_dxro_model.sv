`timescale 1ps/1fs
// Testbench for dxro_model: free-running frequency from v_dd and v_tune;
// then, with SEL from a divide-by-4 select counter and a reference slightly
// slower and then faster than the ring would need, every reference edge
// must be injected: four output edges per reference period, the injected
// rising edge T_MUX (10 ps) after the reference edge.  The ring's own edge
// (out_nat) must come early when the ring is fast and with the injected
// edge when it is slow.  A second ring with +-3 ps period jitter per half
// period runs free for 12 us: the duration of 400 of its cycles must spread
// (random walk, expected standard deviation about 49 ps).  Then it is
// injected: its injected edge must still sit exactly T_MUX after the
// reference, and each of the three free edges after it must stay within the
// jitter of at most six half periods (+-18 ps) of its own mean position.
module tb_dxro_model;
  int checks = 0, failures = 0;
  logic r = 0, sel = 0, out, nat;
  real vdd = 0.5, vt = 0.5, tr = 0.0, tref = 2700.0;
  int n_nat_early = 0, n_nat_same = 0;
  int ninj, n = 0, cnt = 3, nbad = 0, nref = 0, en = 0, chk = 0;
  dxro_model dut (.ref_clk(r), .sel(sel), .v_dd(vdd), .v_tune(vt), .out(out), .out_nat(nat), .n_inj(ninj));
  always @(posedge out) begin
    n++;
    cnt = (cnt == 3) ? 0 : cnt + 1;
    if (en) sel = (cnt == 3);
    if (chk && cnt == 0) begin
      checks++;
      if ($realtime - tr < 9.99 || $realtime - tr > 10.01) begin
        nbad++; failures++; $display("FAIL: injected edge %f ps after reference", $realtime - tr);
      end
    end
  end
  always @(posedge r) begin tr = $realtime; nref++; end
  // jittery ring
  logic oj, nj, selj = 0;
  int ninjj, jdone = 0, nj_e = 0, cntj = 3, enj = 0, chkj = 0, ns = 0;
  real t0j = 0.0, s1 = 0.0, s2 = 0.0, dmin[4], dmax[4];
  dxro_model #(.JIT_PS(3.0)) dj (.ref_clk(r), .sel(selj), .v_dd(0.5), .v_tune(1.0), .out(oj), .out_nat(nj), .n_inj(ninjj));
  initial for (int k = 0; k < 4; k++) begin dmin[k] = 1.0e9; dmax[k] = -1.0e9; end
  always @(posedge oj) begin
    real d;
    nj_e++;
    if (!enj && nj_e % 400 == 0) begin
      if (nj_e > 400 && ns < 30) begin
        d = $realtime - t0j; s1 += d; s2 += d * d; ns++;
      end
      t0j = $realtime;
    end
    cntj = (cntj == 3) ? 0 : cntj + 1;
    if (enj) selj = (cntj == 3);
    if (chkj) begin
      d = $realtime - tr;
      if (d < dmin[cntj]) dmin[cntj] = d;
      if (d > dmax[cntj]) dmax[cntj] = d;
    end
  end
  initial begin
    real m, sd;
    #12.0e6;
    m = s1 / ns; sd = $sqrt(s2 / ns - m * m);
    $display("jittery ring free-running: 400 cycles = %f ps, std %f ps", m, sd);
    checks += 2;
    if (m < 275862.0 - 60.0 || m > 275862.0 + 60.0) begin failures++; $display("FAIL: jittery ring mean"); end
    if (sd < 25.0 || sd > 90.0) begin failures++; $display("FAIL: jittery ring spread %f ps", sd); end
    enj = 1;
    #1.0e6;
    chkj = 1;
    #(tref * 200);
    chkj = 0;
    for (int k = 0; k < 4; k++) $display("jittery ring injected: edge %0d at %f..%f ps", k, dmin[k], dmax[k]);
    checks += 2;
    if (dmin[0] < 9.99 || dmax[0] > 10.01) begin failures++; $display("FAIL: jittery injected edge"); end
    if (dmax[3] - dmin[3] > 36.0 || dmax[3] - dmin[3] < 1.0) begin failures++; $display("FAIL: jitter after injection %f ps", dmax[3] - dmin[3]); end
    jdone = 1;
  end
  logic injc = 0;
  always @(negedge out) injc = sel;
  always @(posedge nat) if (chk && injc) begin
    if (out) n_nat_same++; else n_nat_early++;
  end
  task automatic check_nat(input bit fast);
    checks++;
    if (fast ? (n_nat_early < 190 || n_nat_same != 0) : (n_nat_early != 0 || n_nat_same < 190)) begin
      failures++; $display("FAIL: out_nat fast=%0d early=%0d same=%0d", fast, n_nat_early, n_nat_same);
    end
  endtask
  initial forever begin #(tref / 2.0) r = ~r; end
  initial begin
    int n0, i0; real f;
    #10000; n0 = n; #2.0e6; f = $itor(n - n0) / 2000.0;
    checks++;
    if (f < 1.3995 || f > 1.4005) begin failures++; $display("FAIL: free-run %f GHz", f); end
    vt = 1.0;
    #10000; n0 = n; #2.0e6; f = $itor(n - n0) / 2000.0;
    checks++;
    if (f < 1.4495 || f > 1.4505) begin failures++; $display("FAIL: tuned %f GHz", f); end
    // injection: ring at 1.45 GHz, reference 370.4 MHz (4x = 1.4815 GHz)
    en = 1;
    #1.0e6;                           // phase drifts into the capture window
    n0 = n; i0 = ninj; chk = 1;
    #(tref * 200);
    checks += 2;
    if (ninj - i0 < 199 || ninj - i0 > 201) begin failures++; $display("FAIL: %0d injections in 200 periods", ninj - i0); end
    if (n - n0 < 799 || n - n0 > 801) begin failures++; $display("FAIL: %0d edges in 200 periods", n - n0); end
    check_nat(0);
    // ring faster than 4 x reference: its own edge comes before the injected one
    chk = 0; vt = 1.0; vdd = 0.57;
    #1.0e6;
    n0 = n; i0 = ninj; chk = 1; n_nat_early = 0; n_nat_same = 0;
    #(tref * 200);
    checks += 2;
    if (ninj - i0 < 199 || ninj - i0 > 201) begin failures++; $display("FAIL: fast ring %0d injections", ninj - i0); end
    if (n - n0 < 799 || n - n0 > 801) begin failures++; $display("FAIL: fast ring %0d edges", n - n0); end
    check_nat(1);
    chk = 0;
    wait (jdone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
