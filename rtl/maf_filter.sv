// maf_filter: moving-average denoising filter (MAF) of the aligned spike.
//
// The MAF suppresses random and high-frequency noise in the aligned spike
// before its decomposition; the document sets its length from the SNR
// Vp-p / sigma_N. Here the length is 2**len_log taps (1, 2, 4 or 8, chosen by
// the caller), and each output is the mean of the newest 2**len_log inputs.
// At the first sample of a spike the whole tap line is filled with that
// sample, so the window never mixes two spikes. Tap count, power-of-two
// lengths and start-up rule are this design's choices.
//
// Interface and timing: in_valid / in_first / in_last in, same three flags
// out, one cycle of latency. len_log must stay constant during a spike.
module maf_filter
  import ss_pkg::*;
#(
  parameter int unsigned MAX_LOG = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(MAX_LOG+1)-1:0] len_log,
  input  logic                     in_valid,
  input  logic                     in_first,
  input  logic                     in_last,
  input  sample_t                  in_sample,
  output logic                     out_valid,
  output logic                     out_first,
  output logic                     out_last,
  output sample_t                  out_sample
);
  localparam int unsigned TAPS = 1 << MAX_LOG;
  localparam int unsigned SW   = SAMPLE_W + MAX_LOG;

  sample_t              line [TAPS];   // line[0] newest before this input
  logic signed [SW-1:0] sum;

  always_comb begin
    sum = SW'(in_sample);
    for (int i = 1; i < TAPS; i++)
      if (i < (1 << len_log))
        sum += in_first ? SW'(in_sample) : SW'(line[i-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) line[i] <= '0;
      out_valid  <= 1'b0;
      out_first  <= 1'b0;
      out_last   <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= in_valid;
      out_first <= in_valid && in_first;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        line[0] <= in_sample;
        for (int i = 1; i < TAPS; i++) line[i] <= in_first ? in_sample : line[i-1];
        out_sample <= SAMPLE_W'(sum >>> len_log);
      end
    end
  end
endmodule
