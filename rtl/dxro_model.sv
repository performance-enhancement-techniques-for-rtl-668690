`timescale 1ps/1fs
// dxro_model -- BEHAVIOURAL MODEL, not synthesizable.
// Digitally multiplexed ring oscillator of the MDLL: a multiplexer followed
// by three delay cells.  The regulated supply v_dd (normalised 0..1) sets
// the coarse frequency F_LO + F_SPAN*v_dd (FLL path); v_tune (0..1) trims it
// by K_TUNE*(v_tune - 0.5) through the stage time constant (MDLL path).
// While SEL is high at a falling output edge the multiplexer passes the
// reference, so the next rising edge of `out` is the reference edge plus
// T_MUX; the injected edge restarts the ring, which removes the accumulated
// jitter.  `out_nat` is the ring's own waveform: identical to `out`, except
// that in an injected cycle it rises when the ring's own edge would have
// come (or with the injected edge, if that is earlier).  The 1-bit TDC
// samples it to tell whether the ring's edge is early or late.  The time of
// the next reference edge is predicted from the measured reference period.
// `n_inj` counts injected edges.  JIT_PS (0 by default) adds to every half
// period an independent error drawn uniformly from +-JIT_PS, a white period
// jitter whose sum over many cycles is the random walk that injection
// bounds; its size is this model's choice.  Frequencies in GHz, times in ps.
module dxro_model #(
  parameter real F_LO   = 0.8,
  parameter real F_SPAN = 1.2,
  parameter real K_TUNE = 0.1,
  parameter real T_MUX  = 10.0,
  parameter real JIT_PS = 0.0
) (
  input  logic ref_clk,
  input  logic sel,
  input  real  v_dd,
  input  real  v_tune,
  output logic out,
  output logic out_nat,
  output int   n_inj
);
  real t_last, t_per, t_nat, t_inj, hp;

  initial begin
    t_last = -1.0;
    t_per  = 0.0;
    n_inj  = 0;
  end
  always @(posedge ref_clk) begin
    if (t_last >= 0.0) t_per <= $realtime - t_last;
    t_last <= $realtime;
  end

  function automatic real half_ps();
    real f;
    f = F_LO + F_SPAN * v_dd + K_TUNE * (v_tune - 0.5);
    if (f < 0.05) f = 0.05;
    if (JIT_PS == 0.0) return 500.0 / f;
    return 500.0 / f + JIT_PS * ($itor($urandom_range(2000)) - 1000.0) / 1000.0;
  endfunction

  initial begin
    out = 1'b0;
    out_nat = 1'b0;
    #(half_ps());
    forever begin
      out = 1'b1;
      out_nat = 1'b1;
      #(half_ps());
      out = 1'b0;
      out_nat = 1'b0;
      hp = half_ps();
      if (sel && t_per > 0.0) begin
        t_nat = $realtime + hp;
        t_inj = t_last + t_per + T_MUX;
        while (t_inj <= $realtime) t_inj = t_inj + t_per;
        n_inj = n_inj + 1;
        if (t_nat < t_inj) begin
          #(t_nat - $realtime);
          out_nat = 1'b1;
        end
        #(t_inj - $realtime);
      end else begin
        #(hp);
      end
    end
  end
endmodule
