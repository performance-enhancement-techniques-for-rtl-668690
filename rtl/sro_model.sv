`timescale 1ps/1fs
// sro_model -- BEHAVIOURAL MODEL, not synthesizable.
// Switched ring oscillator: a 16-stage pseudo-differential ring whose NMOS
// sources are switched between two voltages so that it runs at F_H while
// `sw` is high and at F_L while it is low; it never stops (unlike a gated
// ring oscillator), so no phase is lost at the switching instants.
// The phase is kept in units of one stage delay, modulo 2*STAGES; stage k
// is high in segments k+1..k+STAGES of the 2*STAGES segments of a period.
// The model is event driven: it schedules the time at which the phase
// reaches the next segment boundary and reschedules whenever `sw` changes,
// so the outputs change exactly at the boundary crossings.  F_H follows
// from the 156 ps stage delay (200 MHz for 16 stages); F_L = FL_RATIO*F_H
// is this model's assumption, chosen non-commensurate with F_H as the
// document requires to avoid dead zones.  START_SEG sets the initial phase.
module sro_model #(
  parameter int  STAGES         = 16,
  parameter real STAGE_DELAY_PS = 156.0,
  parameter real FL_RATIO       = 0.3719,
  parameter real START_SEG      = 0.0
) (
  input  logic              sw,
  output logic [STAGES-1:0] phases
);
  real ph;            // phase in stage delays, 0 .. 2*STAGES
  real rate;          // stage delays per ps
  real t_upd;         // time at which ph was last brought up to date
  int  gen;           // generation of the pending boundary event
  int  seg;           // segment shown on the outputs, 0 .. 2*STAGES-1

  function automatic logic [STAGES-1:0] pattern(input int s);
    logic [STAGES-1:0] p;
    for (int k = 0; k < STAGES; k++)
      p[k] = (s < STAGES) ? (k < s) : (k >= s - STAGES);
    return p;
  endfunction

  function automatic real rate_of(input logic s);
    return (s ? 1.0 : FL_RATIO) / STAGE_DELAY_PS;
  endfunction

  // bring the phase up to the present time at the current rate
  function automatic void advance();
    ph    = ph + rate * ($realtime - t_upd);
    t_upd = $realtime;
  endfunction

  // schedule the boundary at the end of the shown segment (at once if the
  // phase is already past it); an event made stale by a later reschedule
  // finds a newer generation and does nothing
  task automatic schedule();
    int  g;
    real d;
    gen = gen + 1;
    g   = gen;
    d   = ($itor(seg) + 1.0 - ph) / rate;
    if (d < 0.0) d = 0.0;
    fork
      begin
        #(d);
        if (g == gen) seg_cross();
      end
    join_none
  endtask

  task automatic seg_cross();
    advance();
    if (ph < $itor(seg + 1)) ph = $itor(seg + 1);     // time rounding
    seg = seg + 1;
    if (seg == 2 * STAGES) begin
      seg = 0;
      ph  = ph - 2.0 * STAGES;
    end
    phases = pattern(seg);
    schedule();
  endtask

  initial begin
    gen    = 0;
    ph     = START_SEG;
    t_upd  = 0.0;
    rate   = rate_of(sw);
    seg    = int'($floor(ph));
    phases = pattern(seg);
    schedule();
  end

  always @(sw) begin
    advance();
    rate = rate_of(sw);
    schedule();
  end
endmodule
