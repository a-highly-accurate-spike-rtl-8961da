// perf_check: performance check and training control (sorting-threshold
// self-tuning).
//
// The document's clustering unit monitors the clustered feature vectors,
// decides whether the sorting threshold should be moved towards an optimal
// level T_opt, and triggers retraining to recompute the cluster means. Its
// metrics are not given; this design uses two:
//  * after each training, the number of finalized clusters must lie in
//    [CMIN, CMAX]. Too many (or none, when every cluster stayed too small)
//    means the threshold splits units: it rises by THR_STEP. A single cluster
//    means it joins units: it falls by THR_STEP (never below THR_STEP).
//  * during assignment, in each window of 2**WIN_LOG labelled vectors the
//    outliers (no cluster within the threshold) may number at most
//    OUT_LIMIT; more raise the threshold by THR_STEP.
// Each change pulses retrain. After TUNE_MAX changes the threshold is kept.
// tuned is high while the current threshold has passed its last check.
//
// Interface and timing: train_done and res_valid are one-cycle pulses from
// the training unit; retrain is a one-cycle pulse the cycle after the
// deciding event, and thr changes in the same cycle.
module perf_check
  import ss_pkg::*;
#(
  parameter int unsigned THR_INIT  = 48,
  parameter int unsigned THR_STEP  = 24,
  parameter int unsigned CMIN      = 2,
  parameter int unsigned CMAX      = 8,
  parameter int unsigned WIN_LOG   = 6,
  parameter int unsigned OUT_LIMIT = 8,
  parameter int unsigned TUNE_MAX  = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           train_done,
  input  logic [ROW_W:0] n_final,
  input  logic           res_valid,
  input  logic           res_outlier,
  input  phase_e         res_phase,
  output dist_t          thr,
  output logic           retrain,
  output logic           tuned,
  output logic [3:0]     n_iter
);
  logic [WIN_LOG-1:0] win_cnt;
  logic [WIN_LOG:0]   out_cnt, out_next;
  logic               can_tune;

  always_comb begin
    can_tune = 32'(n_iter) < TUNE_MAX;
    out_next = out_cnt + (WIN_LOG+1)'(res_outlier);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr     <= dist_t'(THR_INIT);
      retrain <= 1'b0;
      tuned   <= 1'b0;
      n_iter  <= '0;
      win_cnt <= '0;
      out_cnt <= '0;
    end else begin
      retrain <= 1'b0;
      if (train_done) begin
        win_cnt <= '0;
        out_cnt <= '0;
        if (can_tune && (32'(n_final) > CMAX || n_final == '0)) begin
          thr     <= thr + dist_t'(THR_STEP);
          retrain <= 1'b1;
          tuned   <= 1'b0;
          n_iter  <= n_iter + 1'b1;
        end else if (can_tune && 32'(n_final) < CMIN && 32'(thr) >= 2 * THR_STEP) begin
          thr     <= thr - dist_t'(THR_STEP);
          retrain <= 1'b1;
          tuned   <= 1'b0;
          n_iter  <= n_iter + 1'b1;
        end else begin
          tuned <= 1'b1;
        end
      end else if (res_valid && res_phase == PH_ASSIGN) begin
        win_cnt <= win_cnt + 1'b1;
        out_cnt <= out_next;
        if (win_cnt == '1) begin
          win_cnt <= '0;
          out_cnt <= '0;
          if (can_tune && 32'(out_next) > OUT_LIMIT) begin
            thr     <= thr + dist_t'(THR_STEP);
            retrain <= 1'b1;
            tuned   <= 1'b0;
            n_iter  <= n_iter + 1'b1;
          end else begin
            tuned <= 1'b1;
          end
        end
      end
    end
  end
endmodule
