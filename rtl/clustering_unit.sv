// clustering_unit: online unsupervised clustering with sorting-threshold
// self-tuning.
//
// Joins the training unit (training memory and its engines) with the
// performance check / training control, as in the document's clustering
// unit: the training unit clusters with the current sorting threshold, the
// performance check watches the results, moves the threshold and orders
// retraining. A retrain, or a pulse on restart, clears the memory. res_* report each processed
// feature vector; only those with res_phase == PH_ASSIGN carry a final
// label. Timing as in training_unit (9 cycles per vector at the defaults).
module clustering_unit
  import ss_pkg::*;
#(
  parameter int unsigned TRAIN_LEN = 256,
  parameter int unsigned NMIN      = 4,
  parameter int unsigned THR_INIT  = 48,
  parameter int unsigned THR_STEP  = 24,
  parameter int unsigned WIN_LOG   = 6,
  parameter int unsigned OUT_LIMIT = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           restart,
  input  logic           fv_valid,
  input  fv_t            fv,
  output logic           fv_ready,
  output logic           res_valid,
  output row_idx_t       res_row,
  output dist_t          res_dist,
  output logic           res_outlier,
  output phase_e         res_phase,
  output phase_e         phase,
  output logic [ROW_W:0] n_final,
  output logic [ROW_W:0] n_used,
  output dist_t          thr,
  output logic           tuned,
  output logic [3:0]     n_iter,
  output logic           retrain,
  output logic           train_done
);
  logic clear;

  // The memory is cleared on a self-tuning step or on an external restart
  // (new ADDs scaling factors make the stored means meaningless).
  assign clear = retrain || restart;

  training_unit #(.TRAIN_LEN(TRAIN_LEN), .NMIN(NMIN)) u_train (
    .clk, .rst_n, .fv_valid, .fv, .fv_ready, .thr, .retrain(clear),
    .res_valid, .res_row, .res_dist, .res_outlier, .res_phase,
    .phase, .train_done, .n_final, .n_used
  );

  perf_check #(.THR_INIT(THR_INIT), .THR_STEP(THR_STEP), .WIN_LOG(WIN_LOG), .OUT_LIMIT(OUT_LIMIT)) u_perf (
    .clk, .rst_n, .train_done, .n_final,
    .res_valid, .res_outlier, .res_phase,
    .thr, .retrain, .tuned, .n_iter
  );
endmodule
