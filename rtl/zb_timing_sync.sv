// Symbol timing synchronisation against the preamble template.
//
// The preamble is eight repetitions of data symbol 0. The signs of the last
// 64 I samples and the last 64 Q samples are kept in shift registers and
// correlated with the sign pattern that symbol 0 produces on the 4-samples-
// per-pulse grid (I pulse k carries chip c(2k); Q pulse k carries c(2k+1)
// and is offset by two samples). The first sample of every pulse falls on
// the zero of the half-sine and carries no information, so it is left out:
// each rail's score is 2*matches-48 over the other 48 samples, and the
// timing metric is |score_I| + |score_Q|, so that an
// unknown polarity of each rail does not hide the peak.
//
// After `search` is pulsed, the block watches exactly one symbol period
// (64 samples) and keeps the sample with the largest metric: that sample
// is the last one of a symbol. From then on `locked` is high and `pos`
// gives, combinationally for the present input sample, its position 0..63
// in the symbol. The peak metric is the link-quality figure, and the signs
// of the two scores at the peak go to the phase corrector.
// The sign-only correlation, the one-symbol search window and the choice of
// the peak metric as link quality are choices of this design.
module zb_timing_sync
  import zb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       search,      // pulse: start a one-symbol peak search
  input  logic       in_valid,
  input  sample_t    si,
  input  sample_t    sq,
  output logic       locked,
  output logic [5:0] pos,         // position of the present sample in its symbol
  output logic [7:0] peak_metric, // link quality, 0..96
  output logic       neg_i,       // I score negative at the peak
  output logic       neg_q,
  output logic [7:0] metric       // present metric (for observation)
);

  logic [SPS-1:0] sr_i, sr_q;     // bit 0 = newest sample sign (1 = positive)
  logic [SPS-1:0] tmpl_i, tmpl_q; // template, bit (63-j) = sample j of the symbol
  logic [SPS-1:0] wt_i, wt_q;     // 0 where the template pulse is zero
  localparam int NW = SPS - SPS / SPC;   // weighted samples per rail (48)
  logic [5:0]     cnt, best_cnt;
  logic [6:0]     srch_left;
  logic           searching;
  logic signed [7:0] score_i, score_q;
  logic [SPS-1:0] win_i, win_q;

  always_comb begin
    logic [31:0] c0;
    c0 = chip_seq(4'd0);
    for (int j = 0; j < SPS; j++) begin
      tmpl_i[SPS-1-j] = c0[2*(j/SPC)];
      tmpl_q[SPS-1-j] = c0[2*(((j + SPS - 2) % SPS) / SPC) + 1];
      wt_i[SPS-1-j]   = (j % SPC) != 0;
      wt_q[SPS-1-j]   = ((j + SPS - 2) % SPC) != 0;
    end
  end

  // window including the present sample
  assign win_i = {sr_i[SPS-2:0], ~si[SW-1]};
  assign win_q = {sr_q[SPS-2:0], ~sq[SW-1]};

  always_comb begin
    int mi, mq;
    mi = 0; mq = 0;
    for (int j = 0; j < SPS; j++) begin
      if (wt_i[j]) mi += int'(win_i[j] == tmpl_i[j]);
      if (wt_q[j]) mq += int'(win_q[j] == tmpl_q[j]);
    end
    score_i = 8'(2*mi - NW);
    score_q = 8'(2*mq - NW);
    metric  = 8'(score_i[7] ? -score_i : score_i) + 8'(score_q[7] ? -score_q : score_q);
  end

  assign pos = cnt - best_cnt - 6'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_i <= '0; sr_q <= '0;
      cnt <= '0; best_cnt <= '0; srch_left <= '0; searching <= 1'b0;
      locked <= 1'b0; peak_metric <= '0; neg_i <= 1'b0; neg_q <= 1'b0;
    end else begin
      if (search) begin
        searching   <= 1'b1;
        locked      <= 1'b0;
        srch_left   <= 7'(SPS);
        peak_metric <= '0;
      end
      if (in_valid) begin
        sr_i <= win_i;
        sr_q <= win_q;
        cnt  <= cnt + 6'd1;
        if (searching && !search) begin
          if (metric > peak_metric) begin
            peak_metric <= metric;
            best_cnt    <= cnt;
            neg_i       <= score_i[7];
            neg_q       <= score_q[7];
          end
          srch_left <= srch_left - 7'd1;
          if (srch_left == 7'd1) begin
            searching <= 1'b0;
            locked    <= 1'b1;
          end
        end
      end
    end
  end

endmodule
