`timescale 1ps/1fs
// tdg: time-difference generator of the SRO-TDC.
// A three-state PFD compares the rising edges of the input and reference
// signals; the XOR of its UP and DN outputs is a single pulse whose width
// equals the time between the two edges, whichever comes first.  The pulse
// V_TD switches the SROs between their two frequencies.  Structure (PFD +
// XOR) as in the document; the static-CMOS details of the gates are not
// modelled.
module tdg (
  input  logic t_in,
  input  logic t_ref,
  input  logic rst_n,
  output logic v_td
);
  logic up, dn;
  pfd3 u_pfd (.ref_clk(t_ref), .fb_clk(t_in), .rst_n(rst_n), .up(up), .dn(dn));
  assign v_td = up ^ dn;
endmodule
