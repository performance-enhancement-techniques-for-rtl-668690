`timescale 1ps/1fs
// sro_phase_proc: digital phase processor of one SRO half-circuit.
// 1. Phase quantiser: the STAGES ring outputs are sampled on the sampling
//    clock (two flip-flop ranks, the second against metastability).
// 2. Transition detector: adjacent sampled phases are compared (XOR, with
//    the ring's inversion between the last and the first stage); the
//    position of the single transition and the level of stage 0 give the
//    ring's phase segment, written out as a thermometer code of
//    2*STAGES-1 bits (31 for the 16-stage ring).
// 3. ROM encoder: the thermometer code is mapped to a 5-bit segment number
//    0..2*STAGES-1.
// 4. Digital differentiator: the segment number minus the previous one,
//    modulo 2*STAGES, is the phase advance during one sampling period
//    (phase wrap-around handled by the modulo; the sampling clock must be
//    faster than the highest SRO frequency).
// Segment convention: in segment s < STAGES stages 0..s-1 are high and the
// rest low; in segment s >= STAGES stages 0..s-STAGES-1 are low and the rest
// high.  Latency: d_out shows the advance up to a sampling edge three
// clock edges after it.
// Following the document: sampling, transition detection, thermometer code,
// ROM encoder to 5 bits, differentiation.  Own choices: segment
// convention, encoder written as a case table, pipeline depth.
module sro_phase_proc #(
  parameter int STAGES = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [STAGES-1:0]         phases,
  output logic [$clog2(2*STAGES)-1:0] d_out
);
  localparam int SW = $clog2(2*STAGES);
  localparam int TW = 2*STAGES - 1;

  logic [STAGES-1:0] s1, s2;
  logic [TW-1:0]     therm;
  logic [SW-1:0]     seg, seg_prev;

  // transition detector -> thermometer code
  logic [STAGES-1:0] trans;
  int                seg_q;
  always_comb begin
    trans[0] = s2[0] ^ ~s2[STAGES-1];
    for (int k = 1; k < STAGES; k++) trans[k] = s2[k] ^ s2[k-1];
    // position k of the transition; with the level of stage 0 it gives the
    // segment: k > 0 -> k (stage 0 high) or STAGES+k (low); k = 0 ->
    // STAGES (all high) or 0 (all low).  Thermometer = `segment` ones.
    seg_q = 0;
    for (int k = STAGES-1; k >= 0; k--)
      if (trans[k])
        seg_q = (k == 0) ? (s2[0] ? STAGES : 0) : (s2[0] ? k : STAGES + k);
    for (int j = 0; j < TW; j++) therm[j] = (j < seg_q);
  end

  // ROM encoder: thermometer -> binary (count of leading ones)
  function automatic logic [SW-1:0] rom_enc(input logic [TW-1:0] t);
    logic [SW-1:0] r;
    r = '0;
    for (int j = 0; j < TW; j++) if (t[j]) r = SW'(j + 1);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; seg <= '0; seg_prev <= '0; d_out <= '0;
    end else begin
      s1       <= phases;
      s2       <= s1;
      seg      <= rom_enc(therm);
      seg_prev <= seg;
      d_out    <= seg - seg_prev;      // modulo 2*STAGES by width
    end
endmodule
