// frame2_fs: Frame 2 (spike profile, SP) and the frequency synthesizer (FS).
//
// The document tunes the three ADDs scaling factors (scaling1..3) from the
// FS output, which is derived from Frame 2, choosing one scale in each of
// three frequency sub-bands of delta = 1 .. 7. The measure and the band
// limits are this design's choices:
//  * Frame 2 watches all seven derivative lines d_all (delta = 1..7) of
//    2**NSP_LOG spikes. For each spike and each delta it takes the maximum and
//    minimum of the line, and adds to a score how far these lie from their
//    running means (mean += (value - mean) / 8; the first spike seeds the
//    means). A large score marks a scale whose extrema spread widely across
//    spikes, i.e. that separates spike shapes well.
//  * The FS then picks, in each sub-band, the delta with the largest score:
//    scaling1 from delta 1..B1_END (high frequency), scaling2 from
//    B1_END+1..B2_END, scaling3 from B2_END+1..7 (low frequency). With the
//    defaults 4 and 5 the scale sets reported for the test recordings,
//    {3, 5, 6} and {4, 5, 6}, are both reachable.
//
// Interface and timing: learning starts after reset and again on retune.
// locked is low while learning; when learning ends, scaling is loaded,
// locked rises and tuned pulses for one cycle. Before the first lock the
// scaling registers hold DEF_S1..DEF_S3.
module frame2_fs
  import ss_pkg::*;
#(
  parameter int unsigned NSP_LOG = 5,
  parameter int unsigned B1_END  = 4,
  parameter int unsigned B2_END  = 5,
  parameter int unsigned DEF_S1  = 3,
  parameter int unsigned DEF_S2  = 5,
  parameter int unsigned DEF_S3  = 6
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   retune,
  input  logic   in_valid,
  input  logic   in_first,
  input  logic   in_last,
  input  feat_t  d_all [NDELTA],
  output delta_t scaling [NLINES],
  output logic   locked,
  output logic   tuned
);
  localparam int unsigned SC_W = FEAT_W + 2 + NSP_LOG;
  typedef logic [SC_W-1:0] score_t;

  feat_t              cur_max [NDELTA], cur_min [NDELTA];
  feat_t              nxt_max [NDELTA], nxt_min [NDELTA];
  feat_t              ext_max [NDELTA], ext_min [NDELTA];
  feat_t              m_max   [NDELTA], m_min   [NDELTA];
  score_t             score   [NDELTA];
  logic [NSP_LOG-1:0] nspk;
  logic               upd, sel, seeded;
  delta_t             pick [NLINES];

  // Running-mean step: m + (v - m) / 8, computed one bit wider.
  function automatic feat_t mean_step(feat_t m, feat_t v);
    logic signed [FEAT_W:0] d;
    d = $signed({v[FEAT_W-1], v}) - $signed({m[FEAT_W-1], m});
    return FEAT_W'($signed({m[FEAT_W-1], m}) + (d >>> 3));
  endfunction

  // Index of the largest score in [lo, hi] (1-based deltas).
  function automatic delta_t band_max(score_t sc [NDELTA], int unsigned lo, int unsigned hi);
    delta_t best;
    score_t bs;
    best = delta_t'(lo);
    bs   = sc[lo-1];
    for (int unsigned d = 1; d <= NDELTA; d++)
      if (d > lo && d <= hi && sc[d-1] > bs) begin
        best = delta_t'(d);
        bs   = sc[d-1];
      end
    return best;
  endfunction

  always_comb begin
    for (int k = 0; k < NDELTA; k++) begin
      nxt_max[k] = (in_first || d_all[k] > cur_max[k]) ? d_all[k] : cur_max[k];
      nxt_min[k] = (in_first || d_all[k] < cur_min[k]) ? d_all[k] : cur_min[k];
    end
    pick[0] = band_max(score, 1, B1_END);
    pick[1] = band_max(score, B1_END + 1, B2_END);
    pick[2] = band_max(score, B2_END + 1, NDELTA);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NDELTA; k++) begin
        cur_max[k] <= '0; cur_min[k] <= '0;
        ext_max[k] <= '0; ext_min[k] <= '0;
        m_max[k]   <= '0; m_min[k]   <= '0;
        score[k]   <= '0;
      end
      scaling[0] <= delta_t'(DEF_S1);
      scaling[1] <= delta_t'(DEF_S2);
      scaling[2] <= delta_t'(DEF_S3);
      nspk   <= '0;
      upd    <= 1'b0;
      sel    <= 1'b0;
      seeded <= 1'b0;
      locked <= 1'b0;
      tuned  <= 1'b0;
    end else begin
      tuned <= 1'b0;
      upd   <= 1'b0;
      sel   <= 1'b0;
      if (retune) begin
        locked <= 1'b0;
        seeded <= 1'b0;
        nspk   <= '0;
        for (int k = 0; k < NDELTA; k++) score[k] <= '0;
      end else begin
        // Stage 1: extrema of every derivative line over the spike.
        if (in_valid && !locked) begin
          cur_max <= nxt_max;
          cur_min <= nxt_min;
          if (in_last) begin
            ext_max <= nxt_max;
            ext_min <= nxt_min;
            upd     <= 1'b1;
          end
        end
        // Stage 2: spread score and running means.
        if (upd) begin
          for (int k = 0; k < NDELTA; k++) begin
            if (!seeded) begin
              m_max[k] <= ext_max[k];
              m_min[k] <= ext_min[k];
            end else begin
              score[k] <= score[k] + SC_W'(abs_diff(ext_max[k], m_max[k]))
                                   + SC_W'(abs_diff(ext_min[k], m_min[k]));
              m_max[k] <= mean_step(m_max[k], ext_max[k]);
              m_min[k] <= mean_step(m_min[k], ext_min[k]);
            end
          end
          seeded <= 1'b1;
          nspk   <= nspk + 1'b1;
          if (nspk == '1) sel <= 1'b1;
        end
        // Stage 3: frequency synthesizer picks one scale per sub-band.
        if (sel) begin
          scaling <= pick;
          locked  <= 1'b1;
          tuned   <= 1'b1;
        end
      end
    end
  end

  initial begin
    assert (B1_END >= 1 && B2_END > B1_END && NDELTA > B2_END)
      else $error("sub-band limits must split delta = 1..7 into three bands");
  end
endmodule
