`timescale 1ps/1fs
// dac15_lpf_model -- BEHAVIOURAL MODEL, not synthesizable.
// 15-element current-mode DAC with its resistor and second-order passive
// low-pass filter.  The number of enabled unit elements (0..14 used by the
// modulator, 15 possible) sets a normalised target voltage count/14; two
// cascaded first-order sections, each with its pole at 1.554*BW_HZ so that
// the cascade has its -3 dB point at BW_HZ (500 kHz in the document),
// smooth it into the control voltage v_out.  The filter is evaluated every
// TSTEP_PS picoseconds.  Unit-element mismatch is not modelled.  The output
// starts at V_INIT.
module dac15_lpf_model #(
  parameter real BW_HZ    = 500.0e3,
  parameter real TSTEP_PS = 1000.0,
  parameter real V_INIT   = 0.5
) (
  input  logic [14:0] therm,
  output real         v_out
);
  localparam real PI = 3.14159265358979;
  real a, x1, target;

  initial begin
    a     = 2.0 * PI * 1.554 * BW_HZ * TSTEP_PS * 1.0e-12;
    x1    = V_INIT;
    v_out = V_INIT;
  end
  always begin
    #(TSTEP_PS);
    target = $itor($countones(therm)) / 14.0;
    x1     = x1 + a * (target - x1);
    v_out  = v_out + a * (x1 - v_out);
  end
endmodule
