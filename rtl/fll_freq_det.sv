`timescale 1ps/1fs
// fll_freq_det: counting frequency detector of the MDLL's frequency-locking
// loop.
// The oscillator clock is divided by OUT_DIV (64) and the divided clock
// advances a 14-bit counter.  The reference is divided by REF_DIV (2048);
// on each edge of that slow clock the counter is sampled and the difference
// from the previous sample (1 - z^-1, two registers) is compared with its
// nominal value NOM = REF_DIV*N/OUT_DIV (128 for N = 4).  The signed
// difference count - NOM is the frequency error, positive when the
// oscillator is too fast, valid with a one-cycle `valid` strobe in the
// reference domain.
// Crossing from the divided-oscillator domain: the counter is kept in Gray
// code, sampled by two reference flip-flops and converted back (this
// synchroniser is this design's choice; the document does not describe
// the crossing).  The counter wraps modulo 2^14, so the difference is taken
// modulo 2^14 as well.
module fll_freq_det #(
  parameter int OUT_DIV = 64,
  parameter int REF_DIV = 2048,
  parameter int CNT_W   = 14,
  parameter int N       = 4
) (
  input  logic                  f_out,
  input  logic                  ref_clk,
  input  logic                  rst_n,
  output logic signed [CNT_W:0] ferr,
  output logic                  valid
);
  localparam int NOM = REF_DIV * N / OUT_DIV;
  localparam int OW  = $clog2(OUT_DIV);
  localparam int RW  = $clog2(REF_DIV);

  // oscillator domain: /OUT_DIV prescaler and Gray counter
  logic [OW-1:0]    pre;
  logic [CNT_W-1:0] cnt_bin, cnt_gray;
  always_ff @(posedge f_out or negedge rst_n)
    if (!rst_n) begin
      pre      <= '0;
      cnt_bin  <= '0;
      cnt_gray <= '0;
    end else begin
      pre <= pre + 1'b1;
      if (pre == OW'(OUT_DIV-1)) begin
        cnt_bin  <= cnt_bin + 1'b1;
        cnt_gray <= (cnt_bin + 1'b1) ^ ((cnt_bin + 1'b1) >> 1);
      end
    end

  // reference domain
  logic [CNT_W-1:0] g_s1, g_s2, smp, smp_prev, g2b;
  logic [RW-1:0]    rdiv;
  logic [1:0]       warm;           // samples taken since reset (saturating)
  always_comb begin
    g2b[CNT_W-1] = g_s2[CNT_W-1];
    for (int k = CNT_W-2; k >= 0; k--) g2b[k] = g2b[k+1] ^ g_s2[k];
  end

  logic [CNT_W-1:0] diff;
  assign diff = smp - smp_prev;

  always_ff @(posedge ref_clk or negedge rst_n)
    if (!rst_n) begin
      g_s1 <= '0; g_s2 <= '0; smp <= '0; smp_prev <= '0;
      rdiv <= '0; warm <= '0; ferr <= '0; valid <= 1'b0;
    end else begin
      g_s1  <= cnt_gray;
      g_s2  <= g_s1;
      rdiv  <= rdiv + 1'b1;
      valid <= 1'b0;
      if (rdiv == RW'(REF_DIV-1)) begin
        smp      <= g2b;
        smp_prev <= smp;
        if (warm != 2'd3) warm <= warm + 1'b1;
      end
      // one cycle after a new sample: differentiate
      if (rdiv == '0 && warm >= 2'd2) begin
        ferr  <= $signed({1'b0, diff}) - (CNT_W+1)'(NOM);
        valid <= 1'b1;
      end
    end
endmodule
