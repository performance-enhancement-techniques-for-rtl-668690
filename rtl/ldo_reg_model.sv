`timescale 1ps/1fs
// ldo_reg_model -- BEHAVIOURAL MODEL, not synthesizable.
// Replica-biased low-dropout regulator that buffers a control voltage onto
// the ring-oscillator supply.  The large bypass capacitor C_D puts the
// dominant pole (omega_D) at the oscillator supply node, so both the
// control voltage and the residual supply noise reach the output through a
// first-order low-pass with corner POLE_HZ; the noise is additionally
// attenuated by the DC rejection REJ.  Voltages are normalised to the
// oscillator's tuning range (0..1).  Evaluated every TSTEP_PS.  The values
// of POLE_HZ and REJ are this model's assumptions; the document gives the
// structure and says only that omega_D lies below the amplifier pole.
module ldo_reg_model #(
  parameter real POLE_HZ  = 5.0e6,
  parameter real REJ      = 0.05,
  parameter real TSTEP_PS = 1000.0,
  parameter real V_INIT   = 0.5
) (
  input  real v_ctrl,
  input  real v_noise,
  output real v_dd_vco
);
  localparam real PI = 3.14159265358979;
  real a;
  initial begin
    a        = 2.0 * PI * POLE_HZ * TSTEP_PS * 1.0e-12;
    v_dd_vco = V_INIT;
  end
  always begin
    #(TSTEP_PS);
    v_dd_vco = v_dd_vco + a * (v_ctrl + REJ * v_noise - v_dd_vco);
  end
endmodule
