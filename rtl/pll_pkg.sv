`timescale 1ps/1fs
// pll_pkg: widths and small helpers shared by the digital loop blocks of the
// three clock multipliers (noise-cancelling DPLL, regulated DPLL, digital MDLL)
// and by the switched-ring-oscillator TDC.
//   * DI_W / ACC_W : the 18-bit loop-filter accumulator whose 14 MSBs (D_I)
//     drive the delta-sigma DAC (4 LSBs dropped to reduce dithering jitter).
//   * DAC_LEVELS   : the 15 unit elements of the current-mode DAC.
//   * DC_W         : width of the supply-noise cancellation code D_C.
package pll_pkg;
  localparam int ACC_W      = 18;
  localparam int DI_W       = 14;
  localparam int DAC_LEVELS = 15;
  localparam int DC_W       = 5;

  // Thermometer code with the lowest `lvl` unit elements switched on.
  function automatic logic [DAC_LEVELS-1:0] therm15(input logic [3:0] lvl);
    logic [DAC_LEVELS-1:0] t;
    for (int k = 0; k < DAC_LEVELS; k++) t[k] = (k < int'(lvl));
    return t;
  endfunction
endpackage
