`timescale 1ps/1fs
// test_signal_gen: deterministic triangular test signal D_TEST for the
// background calibration of the noise-cancelling DPLL.
// A W-bit up/down counter steps once every PRESCALE strobes of `en`,
// counting 0 -> 2^W-1 and back down to 0, so one triangle period is
// 2*(2^W-1)*PRESCALE strobes.  With en = F_REF/4 = 93.75 MHz (1.5 GHz
// output, divide-by-4) the defaults give 93.75 MHz / 930 = 100.8 kHz, the
// 100 kHz of the prototype.  `rising` tells the calibration which slope is
// in progress, `half_end` pulses for one strobe at each turning point.
// Following the document: triangular shape, about 100 kHz.  Own choices:
// code width W (the resistor DAC resolution is not given) and the counter.
module test_signal_gen #(
  parameter int W        = 4,
  parameter int PRESCALE = 31
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] d_test,
  output logic         rising,
  output logic         half_end
);
  localparam int PW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;
  logic [PW-1:0] pre;
  logic          tick;
  assign tick = en && (pre == PW'(PRESCALE-1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pre      <= '0;
      d_test   <= '0;
      rising   <= 1'b1;
      half_end <= 1'b0;
    end else begin
      half_end <= 1'b0;
      if (en) pre <= (pre == PW'(PRESCALE-1)) ? '0 : pre + 1'b1;
      if (tick) begin
        if (rising) begin
          d_test <= d_test + 1'b1;
          if (d_test == {{(W-1){1'b1}}, 1'b0}) begin
            rising   <= 1'b0;
            half_end <= 1'b1;
          end
        end else begin
          d_test <= d_test - 1'b1;
          if (d_test == {{(W-1){1'b0}}, 1'b1}) begin
            rising   <= 1'b1;
            half_end <= 1'b1;
          end
        end
      end
    end
endmodule
