// wneo_detector: dual-threshold spike detector (SThr, then omega-NEO).
//
// Following the document, a cheap amplitude test against SThr = 4 sigma_N
// gates the omega-NEO energy operator
//     psi(n) = x(n)^2 - x(n - omega) * x(n + omega),   omega = 2,
// built from two multipliers and one subtractor, so the multipliers only
// work while the signal is large (the "conditional enable"). The energy is
// smoothed by a moving-average filter, and an accumulator (adder plus
// register) integrates the smoothed energy to form the detection threshold
// Thr. A spike is confirmed when the smoothed energy exceeds Thr while the
// conditional enable is on.
//
// This design's choices, where the document is silent: the enable compares
// |x(n)| (the centre tap) with SThr; the MA filter is MA_LEN = 2**MA_LOG taps;
// the accumulator sums the smoothed energy of the samples where the enable
// is on, and after every 2**ACC_LOG such samples loads
// Thr = (sum / 2**ACC_LOG) / 2**THR_SHIFT, half the mean energy of the large
// samples by default (Thr is 0 until the first window ends). Averaging only
// over enabled samples keeps Thr independent of the firing rate. The psi
// value is clamped at zero.
//
// Interface and timing: one sample per sample_en. det pulses for one
// sample_en step after the first sample of a confirmed run. The energy seen
// then belongs to input samples taken about omega + MA_LEN/2 steps earlier,
// so the spike peak lies a few samples before the detection; the aligner
// searches a window around it.
module wneo_detector
  import ss_pkg::*;
#(
  parameter int unsigned OMEGA    = 2,
  parameter int unsigned MA_LOG   = 2,
  parameter int unsigned ACC_LOG  = 6,
  parameter int unsigned THR_SHIFT = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_en,
  input  sample_t             x,
  input  logic [SAMPLE_W-1:0] sthr,
  output logic                det,
  output logic [2*SAMPLE_W:0] energy,     // smoothed energy (for observation)
  output logic [2*SAMPLE_W:0] thr,
  output logic                cond_en     // conditional enable of the multipliers
);
  localparam int unsigned E_W     = 2 * SAMPLE_W + 1;
  localparam int unsigned MA_LEN  = 1 << MA_LOG;
  localparam int unsigned ACC_W   = E_W + ACC_LOG;
  localparam int unsigned DLY     = 2 * OMEGA + 1;

  // Tap line: tap[0] = x(n + omega) (newest), tap[OMEGA] = x(n),
  // tap[2*OMEGA] = x(n - omega).
  sample_t             tap [DLY];
  logic [E_W-1:0]      ma_line [MA_LEN];
  logic [E_W+MA_LOG-1:0] ma_sum;
  logic [E_W-1:0]      psi, ma_out;
  logic [ACC_W-1:0]    acc;
  logic [ACC_LOG-1:0]  acc_cnt;
  logic                hit, hit_d;
  logic [SAMPLE_W-1:0] xc_abs;
  logic signed [2*SAMPLE_W:0] sq, cr, df;
  logic [ACC_W-1:0]    acc_next, thr_full;

  always_comb begin
    xc_abs  = tap[OMEGA][SAMPLE_W-1] ? SAMPLE_W'(-tap[OMEGA]) : SAMPLE_W'(tap[OMEGA]);
    cond_en = xc_abs > sthr;
    // Multiplier inputs are forced to zero when the enable is off.
    sq  = cond_en ? (2*SAMPLE_W+1)'(tap[OMEGA] * tap[OMEGA])       : '0;
    cr  = cond_en ? (2*SAMPLE_W+1)'(tap[0]     * tap[2*OMEGA])     : '0;
    df  = sq - cr;
    psi = df[2*SAMPLE_W] ? '0 : E_W'(df);
    ma_sum = '0;
    for (int i = 0; i < MA_LEN; i++) ma_sum += (E_W+MA_LOG)'(ma_line[i]);
    ma_out = E_W'(ma_sum >> MA_LOG);
    hit    = cond_en && (ma_out > thr);
    acc_next = acc + ACC_W'(ma_out);
    // The sum of 2**ACC_LOG energies shifted right by ACC_LOG or more fits
    // back into E_W bits, so the upper bits of thr_full are always zero.
    thr_full = acc_next >> (ACC_LOG + THR_SHIFT);
  end

  assign energy = ma_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DLY; i++)    tap[i]     <= '0;
      for (int i = 0; i < MA_LEN; i++) ma_line[i] <= '0;
      acc     <= '0;
      acc_cnt <= '0;
      thr     <= '0;
      hit_d   <= 1'b0;
      det     <= 1'b0;
    end else if (sample_en) begin
      tap[0] <= x;
      for (int i = 1; i < DLY; i++) tap[i] <= tap[i-1];
      ma_line[0] <= psi;
      for (int i = 1; i < MA_LEN; i++) ma_line[i] <= ma_line[i-1];
      if (cond_en) begin
        acc_cnt <= acc_cnt + 1'b1;
        if (acc_cnt == '1) begin
          acc <= '0;
          thr <= E_W'(thr_full);
        end else begin
          acc <= acc_next;
        end
      end
      hit_d <= hit;
      det   <= hit && !hit_d;
    end else begin
      det <= 1'b0;
    end
  end
endmodule
