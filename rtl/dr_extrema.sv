// dr_extrema: dimensionality reduction by extrema sampling.
//
// As in the document, each of the three decomposed spike waveforms is
// reduced to its maximum and its minimum, which gives K = 6 features per
// spike. The feature order FV0..FV5 = {max, min} of line 1, line 2, line 3
// is this design's choice.
//
// Interface and timing: the decomposed samples stream in with in_first /
// in_last; fv_valid pulses one cycle after the in_last sample, with fv held
// until the next spike ends.
module dr_extrema
  import ss_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  feat_t d_sel [NLINES],
  output logic  fv_valid,
  output fv_t   fv
);
  feat_t cur_max [NLINES], cur_min [NLINES];
  feat_t nxt_max [NLINES], nxt_min [NLINES];

  always_comb begin
    for (int j = 0; j < NLINES; j++) begin
      nxt_max[j] = (in_first || d_sel[j] > cur_max[j]) ? d_sel[j] : cur_max[j];
      nxt_min[j] = (in_first || d_sel[j] < cur_min[j]) ? d_sel[j] : cur_min[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NLINES; j++) begin
        cur_max[j] <= '0;
        cur_min[j] <= '0;
      end
      fv_valid <= 1'b0;
      fv       <= '0;
    end else begin
      fv_valid <= in_valid && in_last;
      if (in_valid) begin
        cur_max <= nxt_max;
        cur_min <= nxt_min;
        if (in_last)
          for (int j = 0; j < NLINES; j++) begin
            fv[2*j]   <= nxt_max[j];
            fv[2*j+1] <= nxt_min[j];
          end
      end
    end
  end
endmodule
