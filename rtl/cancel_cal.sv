`timescale 1ps/1fs
// cancel_cal: background calibration engine of the supply-noise
// cancellation gain.
// The triangular test signal on the DCO supply reaches the accumulator
// output D_I (low-pass path) unless the cancellation current exactly
// offsets the oscillator's supply sensitivity.  The engine records D_I at
// both turning points of the triangle and forms, once per test period,
//   corr = (D_I change over the rising half) - (D_I change over the falling half).
// An under-cancelled oscillator speeds up when the supply rises, so the
// loop pulls D_I down: corr < -THR_S -> raise D_C.  Over-cancelled gives
// corr > THR_S -> lower D_C.  D_C moves by one code per test period, so a
// 5-bit code settles within 31 periods from reset (D_C = 0).  The
// proportional-path bandwidth code follows as IBW = 31 - D_C (a lower
// calibration code raises I_BW and the loop bandwidth).  With cal_en low
// D_C holds its value.
// Following the document: correlation of D_I with the test signal, 5-bit
// code, one step per test period, D_C down -> I_BW up.  Own choices: the
// sign-sign correlator, threshold THR, reset value 0.
module cancel_cal
  import pll_pkg::*;
#(
  parameter int THR = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cal_en,
  input  logic [DI_W-1:0] d_i,
  input  logic            rising,     // slope in progress (from test_signal_gen)
  input  logic            half_end,   // one-cycle pulse at each turning point
  output logic [DC_W-1:0] d_c,
  output logic [DC_W-1:0] ibw,
  output logic            step_up,    // one-cycle pulses, for observation
  output logic            step_dn
);
  logic [DI_W-1:0]         d_mark;     // D_I at the previous turning point
  logic signed [DI_W+1:0]  delta_rise;
  logic signed [DI_W+1:0]  delta, corr;
  logic                    have_rise;
  logic                    have_mark;   // d_mark holds a turning-point value

  localparam logic signed [DI_W+1:0] THR_S = (DI_W+2)'(THR);

  assign delta = $signed({2'b00, d_i}) - $signed({2'b00, d_mark});
  assign corr  = delta_rise - delta;      // used at the end of a falling half

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d_mark     <= '0;
      delta_rise <= '0;
      have_rise  <= 1'b0;
      have_mark  <= 1'b0;
      d_c        <= '0;
      step_up    <= 1'b0;
      step_dn    <= 1'b0;
    end else begin
      step_up <= 1'b0;
      step_dn <= 1'b0;
      if (half_end) begin
        d_mark    <= d_i;
        have_mark <= 1'b1;
        // `rising` has already flipped at the turning point: low means the
        // rising half just ended
        if (!rising) begin
          delta_rise <= delta;
          have_rise  <= have_mark;
        end else if (have_rise) begin
          have_rise <= 1'b0;
          if (cal_en) begin
            if (corr < -THR_S && d_c != '1) begin
              d_c     <= d_c + 1'b1;
              step_up <= 1'b1;
            end else if (corr > THR_S && d_c != '0) begin
              d_c     <= d_c - 1'b1;
              step_dn <= 1'b1;
            end
          end
        end
      end
    end

  assign ibw = ~d_c;
endmodule
