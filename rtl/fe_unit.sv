// fe_unit: adaptive feature extraction (MAF -> ADDs -> DR, tuned by Frame 2/FS).
//
// The aligned spike alsp(n) is denoised by the moving-average filter (MAF),
// decomposed by the adaptive discrete derivatives (ADDs) and reduced by
// extrema sampling (DR) to a six-feature vector FV, as the document
// describes. Frame 2 and the frequency synthesizer watch all seven derivative
// lines and set the three scaling factors of the ADDs.
//
// MAF length from the SNR = Vp-p / sigma_N (the document says the SNR sets
// the length; the steps are this design's choice): SNR >= 32 -> 1 tap,
// >= 16 -> 2 taps, >= 8 -> 4 taps, otherwise 8 taps. The choice is made at
// the first sample of each spike while Frame 2 learns, and frozen once it
// locks, so that all spikes clustered together are filtered alike; a retune
// chooses again.
//
// Interface and timing: spike samples stream in with in_first / in_last (any
// spacing). fv_valid pulses 3 cycles after the in_last sample, only once
// Frame 2 has locked; spikes seen while it learns train Frame 2 only.
module fe_unit
  import ss_pkg::*;
#(
  parameter int unsigned NSP_LOG = 5,
  parameter int unsigned B1_END  = 4,
  parameter int unsigned B2_END  = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SAMPLE_W-1:0] sigma,
  input  logic [SAMPLE_W:0]   vpp,
  input  logic                retune,
  input  logic                in_valid,
  input  logic                in_first,
  input  logic                in_last,
  input  sample_t             in_sample,
  output logic                fv_valid,
  output fv_t                 fv,
  output delta_t              scaling [NLINES],
  output logic                locked,
  output logic [1:0]          maf_len_log
);
  logic [1:0] len_now, len_q, len_use;
  logic       m_valid, m_first, m_last;
  sample_t    m_sample;
  logic       a_valid, a_first, a_last;
  feat_t      d_all [NDELTA];
  feat_t      d_sel [NLINES];
  logic       dr_valid;
  logic       fs_tuned;

  always_comb begin
    if      ((SAMPLE_W+5)'(vpp) >= ((SAMPLE_W+5)'(sigma) << 5)) len_now = 2'd0;
    else if ((SAMPLE_W+5)'(vpp) >= ((SAMPLE_W+5)'(sigma) << 4)) len_now = 2'd1;
    else if ((SAMPLE_W+5)'(vpp) >= ((SAMPLE_W+5)'(sigma) << 3)) len_now = 2'd2;
    else                                                         len_now = 2'd3;
    len_use = (in_valid && in_first && !locked) ? len_now : len_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    len_q <= 2'd3;
    else if (in_valid && in_first && !locked) len_q <= len_now;
  end

  assign maf_len_log = len_q;

  maf_filter #(.MAX_LOG(3)) u_maf (
    .clk, .rst_n, .len_log(len_use),
    .in_valid, .in_first, .in_last, .in_sample,
    .out_valid(m_valid), .out_first(m_first), .out_last(m_last), .out_sample(m_sample)
  );

  adds_unit u_adds (
    .clk, .rst_n, .scaling,
    .in_valid(m_valid), .in_first(m_first), .in_last(m_last), .in_sample(m_sample),
    .out_valid(a_valid), .out_first(a_first), .out_last(a_last),
    .d_all, .d_sel
  );

  dr_extrema u_dr (
    .clk, .rst_n,
    .in_valid(a_valid), .in_first(a_first), .in_last(a_last), .d_sel,
    .fv_valid(dr_valid), .fv
  );

  frame2_fs #(.NSP_LOG(NSP_LOG), .B1_END(B1_END), .B2_END(B2_END)) u_fs (
    .clk, .rst_n, .retune,
    .in_valid(a_valid), .in_first(a_first), .in_last(a_last), .d_all,
    .scaling, .locked, .tuned(fs_tuned)
  );

  // A spike whose extraction finished in the cycle Frame 2 locked was
  // decomposed with the old scales, so it is dropped too.
  assign fv_valid = dr_valid && locked && !fs_tuned;
endmodule
