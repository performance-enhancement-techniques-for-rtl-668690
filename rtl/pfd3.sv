`timescale 1ps/1fs
// pfd3: classical three-state phase-frequency detector.
// A rising edge of `ref` sets UP, a rising edge of `fb` sets DN; as soon as
// both are set the pair is cleared, so the width of the remaining UP (or DN)
// pulse equals the time by which `ref` leads (or lags) `fb`.  Three output
// states: UP only, DN only, neither (reset).  The clear is asynchronous and,
// in this RTL, immediate; the physical reset delay of a real PFD is not
// modelled.  Used as the proportional-path detector of the noise-cancelling
// DPLL, as the front of the bang-bang detector of both DPLLs, and inside
// the time-difference generator of the SRO-TDC.
module pfd3 (
  input  logic ref_clk,   // reference edge input
  input  logic fb_clk,    // feedback / second edge input
  input  logic rst_n,     // asynchronous reset, active low
  output logic up,        // ref leads
  output logic dn         // fb leads
);
  logic clr;
  assign clr = (up & dn) | ~rst_n;

  always_ff @(posedge ref_clk or posedge clr)
    if (clr) up <= 1'b0;
    else     up <= 1'b1;

  always_ff @(posedge fb_clk or posedge clr)
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
endmodule
