`timescale 1ps/1fs
// reg_dco_model -- BEHAVIOURAL MODEL, not synthesizable.
// Regulated three-stage ring DCO of the supply-regulated DPLL.  The
// regulated supply v_dd (normalised 0..1 over the tuning range) sets the
// frequency F_LO + F_SPAN*v_dd; the bang-bang proportional input shifts it
// by +KBB (bb = 1) or -KBB (bb = 0) by changing the stage output time
// constant.  The half period is recomputed at every output edge.
// Frequencies in GHz, times in ps.  Range 0.8-1.8 GHz from the document;
// KBB is this model's assumption.
module reg_dco_model #(
  parameter real F_LO   = 0.8,
  parameter real F_SPAN = 1.0,
  parameter real KBB    = 0.004
) (
  input  real  v_dd,
  input  logic bb,
  output logic clk_out
);
  real f;
  initial clk_out = 1'b0;
  always begin
    f = F_LO + F_SPAN * v_dd + (bb ? KBB : -KBB);
    if (f < 0.05) f = 0.05;
    #(500.0 / f);
    clk_out = ~clk_out;
  end
endmodule
