// noise_frame1: Frame 1, the noise statistics frame.
//
// Learns the noise level sigma_N and the peak-to-peak amplitude Vp-p of the
// recorded signal. The document states that sigma_N is provided by Frame 1,
// that the small-amplitude threshold is SThr = 4 sigma_N, and that the SNR
// Vp-p / sigma_N sets the MAF length; how sigma_N is estimated is this
// design's choice. A median tracker follows the median of |x|: on every
// sample it steps up by one if |x| is above the current value and down by
// one if below, so it settles where half the samples are larger. Because
// spikes are rare, they hardly move it (unlike a mean of |x|). For Gaussian
// noise median|x| = 0.6745 sigma, so at the end of every window of
// 2**WIN_LOG samples
//   sigma_N = 1.5 * median|x|   (1.5 approximates 1/0.6745 = 1.48)
//   SThr    = 4 * sigma_N       (saturated to the sample range)
//   Vp-p    = max(x) - min(x) over the window
// are loaded into output registers and stat_valid is set; the next window
// starts at once, so the estimates track slow changes of the noise.
//
// Interface: x is taken when sample_en is high. Until the first window ends
// SThr holds its largest value, so nothing is detected.
module noise_frame1
  import ss_pkg::*;
#(
  parameter int unsigned WIN_LOG = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sample_en,
  input  sample_t               x,
  output logic [SAMPLE_W-1:0]   sigma,      // unsigned, sample units
  output logic [SAMPLE_W-1:0]   sthr,       // unsigned, compared with |x|
  output logic [SAMPLE_W:0]     vpp,        // unsigned
  output logic                  stat_valid
);
  logic [SAMPLE_W-1:0] med, med_next;
  logic [WIN_LOG-1:0]  cnt;
  sample_t             xmax, xmin, max_next, min_next;
  logic [SAMPLE_W-1:0] xabs;
  logic [SAMPLE_W+1:0] sig_c;
  logic [SAMPLE_W+3:0] thr_c;

  always_comb begin
    xabs = x[SAMPLE_W-1] ? SAMPLE_W'(-x) : SAMPLE_W'(x);
    if (xabs > med)                med_next = med + 1'b1;
    else if (xabs < med)           med_next = med - 1'b1;
    else                           med_next = med;
    max_next = (cnt == '0 || x > xmax) ? x : xmax;
    min_next = (cnt == '0 || x < xmin) ? x : xmin;
    sig_c    = (SAMPLE_W+2)'(med_next) + (SAMPLE_W+2)'(med_next >> 1);
    thr_c    = (SAMPLE_W+4)'(sig_c) << 2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      med        <= '0;
      cnt        <= '0;
      xmax       <= '0;
      xmin       <= '0;
      sigma      <= '0;
      sthr       <= '1;
      vpp        <= '0;
      stat_valid <= 1'b0;
    end else if (sample_en) begin
      med  <= med_next;
      cnt  <= cnt + 1'b1;
      xmax <= max_next;
      xmin <= min_next;
      if (cnt == '1) begin
        sigma      <= (sig_c > (SAMPLE_W+2)'({SAMPLE_W{1'b1}})) ? '1 : SAMPLE_W'(sig_c);
        sthr       <= (thr_c > (SAMPLE_W+4)'({SAMPLE_W{1'b1}})) ? '1 : SAMPLE_W'(thr_c);
        vpp        <= (SAMPLE_W+1)'($signed({max_next[SAMPLE_W-1], max_next}) -
                                    $signed({min_next[SAMPLE_W-1], min_next}));
        stat_valid <= 1'b1;
      end
    end
  end
endmodule
