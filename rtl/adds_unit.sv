// adds_unit: adaptive discrete derivatives (ADDs) of a spike waveform.
//
// Implements the document's decomposition ADDs = amp * [s(n) - s(n - delta)]
// with amp = 1 for every scale delta = 1 .. 7 at once (the "decomposition
// processor"), and routes three of them, chosen by scaling1..3, to the three
// decomposition lines used for features. A 7-deep delay line holds
// s(n-1) .. s(n-7); at the first sample of a spike the line is filled with
// that sample, so the early differences are zero rather than mixing spikes
// (this start-up rule is this design's choice).
//
// Interface and timing: streaming, one cycle of latency; d_all[k] is the
// derivative at delta = k + 1; d_sel[j] is the one at delta = scaling[j].
module adds_unit
  import ss_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  delta_t          scaling [NLINES],
  input  logic            in_valid,
  input  logic            in_first,
  input  logic            in_last,
  input  sample_t         in_sample,
  output logic            out_valid,
  output logic            out_first,
  output logic            out_last,
  output feat_t           d_all [NDELTA],
  output feat_t           d_sel [NLINES]
);
  sample_t line [NDELTA];   // line[k] = s(n - 1 - k) before this input
  feat_t   diff [NDELTA];

  always_comb begin
    for (int k = 0; k < NDELTA; k++) begin
      sample_t past;
      past    = in_first ? in_sample : line[k];
      diff[k] = FEAT_W'(in_sample) - FEAT_W'(past);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NDELTA; k++) begin
        line[k]  <= '0;
        d_all[k] <= '0;
      end
      for (int j = 0; j < NLINES; j++) d_sel[j] <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_first <= in_valid && in_first;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        line[0] <= in_sample;
        for (int k = 1; k < NDELTA; k++) line[k] <= in_first ? in_sample : line[k-1];
        for (int k = 0; k < NDELTA; k++) d_all[k] <= diff[k];
        for (int j = 0; j < NLINES; j++)
          d_sel[j] <= (scaling[j] == 3'd0) ? diff[0] : diff[scaling[j] - 3'd1];
      end
    end
  end
endmodule
