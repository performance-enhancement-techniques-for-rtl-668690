`timescale 1ps/1fs
// snc_dco_model -- BEHAVIOURAL MODEL, not synthesizable.
// Supply-noise-insensitive ring DCO of the noise-cancelling DPLL, together
// with its 3-level proportional DAC and the test-signal resistor.
//   frequency = F_MIN + F_SPAN*v_i                         (integral path)
//             + (KN - KC*d_c) * v_sup                      (supply path)
//   v_sup     = TEST_LSB*d_test + v_noise                  (R_DTEST + noise)
// The oscillator itself speeds up with its supply (sensitivity KN); the
// cancelling transistors, biased by the calibration code d_c, sink a
// current that slows it down by KC per code, so the net supply
// sensitivity vanishes at d_c = KN/KC (4 with the defaults, the code the
// prototype settled on at 1.5 GHz).
// Proportional path: the PFD pulse widths are measured; an UP pulse of
// width w advances the output phase by KP*w cycles (DN retards it), applied
// as a shift of the next half period.  KP grows with the bandwidth code:
// KP = KP0*(1 + ibw/31), i.e. a lower calibration code raises the loop
// bandwidth.  Frequencies in GHz, voltages in volts, times in ps.
module snc_dco_model #(
  parameter real F_MIN    = 0.4,     // GHz, bottom of 0.4-3 GHz range
  parameter real F_SPAN   = 2.6,     // GHz over v_i = 0..1
  parameter real KP0      = 0.05,    // GHz step while UP or DN is active
  parameter real KN       = 1.0,     // GHz/V oscillator supply sensitivity
  parameter real KC       = 0.25,    // GHz/V cancelled per code step
  parameter real TEST_LSB = 0.01/15.0  // V per test code (10 mVpp over 15 codes)
) (
  input  logic       up,
  input  logic       dn,
  input  real        v_i,
  input  logic [3:0] d_test,
  input  real        v_noise,
  input  logic [4:0] d_c,
  input  logic [4:0] ibw,
  output logic       clk_out
);
  real t_up, t_dn, kick;   // kick: pending phase advance in cycles
  real f, half;

  initial begin
    kick = 0.0; t_up = 0.0; t_dn = 0.0;
  end
  always @(posedge up) t_up <= $realtime;
  always @(negedge up) kick = kick + KP0 * (1.0 + $itor(ibw) / 31.0) * ($realtime - t_up) * 1.0e-3;
  always @(posedge dn) t_dn <= $realtime;
  always @(negedge dn) kick = kick - KP0 * (1.0 + $itor(ibw) / 31.0) * ($realtime - t_dn) * 1.0e-3;

  function automatic real freq_ghz();
    real fv;
    fv = F_MIN + F_SPAN * v_i
       + (KN - KC * $itor(d_c)) * (TEST_LSB * $itor(d_test) + v_noise);
    if (fv < 0.05) fv = 0.05;
    return fv;
  endfunction

  initial begin
    clk_out = 1'b0;
    forever begin
      f    = freq_ghz();
      half = 500.0 / f - 1000.0 * kick / f;   // ps
      kick = 0.0;
      if (half < 20.0) half = 20.0;
      #(half);
      clk_out = ~clk_out;
    end
  end
endmodule
