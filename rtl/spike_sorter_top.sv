// spike_sorter_top: adaptive spike sorting processor, one recording channel.
//
// Chain (as in the document): detection and alignment -> adaptive feature
// extraction and dimensionality reduction -> online clustering.
//  * Frame 1 (noise_frame1) learns sigma_N and Vp-p; SThr = 4 sigma_N.
//  * wneo_detector confirms SThr crossings with the omega-NEO energy.
//  * spike_aligner cuts a 32-sample window aligned on the spike peak.
//  * fe_unit (MAF, ADDs, DR, Frame 2 / frequency synthesizer) turns each
//    spike into six extrema features.
//  * clustering_unit trains cluster means in the 64-row training memory,
//    merges and finalizes them, labels later spikes and self-tunes its
//    sorting threshold, retraining when needed.
//
// Clocking: one clk at 960 kHz. clk_enables derives the document's slower
// rates as enables: samples are taken, and Frame 1 and the detector run, at
// 30 kHz; the aligned spike streams into feature extraction at 240 kHz; the
// clustering unit runs at the full 960 kHz rate. The document lists the four
// rates but not which unit uses which; this mapping is this design's choice,
// and the 120 kHz enable is brought out as tick_120k for external use.
//
// Interface: adc_sample is taken in the cycle sample_tick is high. retune
// makes Frame 2 relearn the ADDs scales; when it locks again the clustering
// memory is cleared and training starts over. Each labelled spike gives a
// one-cycle spike_valid with its cluster (training-memory row) and the
// outlier flag; feature vectors that arrive while the clustering unit is busy
// are dropped and counted by fv_dropped pulses.
module spike_sorter_top
  import ss_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  sample_t        adc_sample,
  input  logic           retune,
  output logic           sample_tick,
  output logic           tick_120k,
  // detection
  output logic           det,
  output logic           det_enable,
  output logic [SAMPLE_W-1:0] sigma_n,
  output logic [SAMPLE_W-1:0] sthr,
  output logic [2*SAMPLE_W:0] det_energy,
  output logic [2*SAMPLE_W:0] det_thr,
  output logic           align_busy,
  // feature extraction
  output logic           fv_valid,
  output fv_t            fv,
  output delta_t         scaling [NLINES],
  output logic           fs_locked,
  output logic [1:0]     maf_len_log,
  output logic           fv_dropped,
  // clustering
  output logic           spike_valid,
  output row_idx_t       spike_cluster,
  output logic           spike_outlier,
  output dist_t          spike_dist,
  output logic [ROW_W:0] rows_used,
  output logic [3:0]     tune_iter,
  output phase_e         phase,
  output logic [ROW_W:0] n_clusters,
  output dist_t          sort_thr,
  output logic           thr_tuned,
  output logic           retrain,
  output logic           train_done
);
  logic                en_240k;
  logic [SAMPLE_W:0]   vpp;
  logic                stat_valid;
  logic                sp_valid, sp_first, sp_last;
  sample_t             sp_sample;
  logic                fv_ready;
  logic                res_valid, res_outlier;
  row_idx_t            res_row;
  phase_e              res_phase;
  logic                retune_pend, restart;
  logic                fs_locked_d;

  clk_enables u_clk (
    .clk, .rst_n, .en_240k, .en_120k(tick_120k), .en_30k(sample_tick)
  );

  noise_frame1 u_frame1 (
    .clk, .rst_n, .sample_en(sample_tick), .x(adc_sample),
    .sigma(sigma_n), .sthr, .vpp, .stat_valid
  );

  wneo_detector u_det (
    .clk, .rst_n, .sample_en(sample_tick), .x(adc_sample), .sthr,
    .det, .energy(det_energy), .thr(det_thr), .cond_en(det_enable)
  );

  spike_aligner u_align (
    .clk, .rst_n, .sample_en(sample_tick), .x(adc_sample), .det(det && stat_valid),
    .out_en(en_240k), .sp_valid, .sp_sample, .sp_first, .sp_last, .busy(align_busy)
  );

  fe_unit u_fe (
    .clk, .rst_n, .sigma(sigma_n), .vpp, .retune,
    .in_valid(sp_valid), .in_first(sp_first), .in_last(sp_last), .in_sample(sp_sample),
    .fv_valid, .fv, .scaling, .locked(fs_locked), .maf_len_log
  );

  // Restart clustering once Frame 2 locks again after a retune.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      retune_pend <= 1'b0;
      fs_locked_d <= 1'b0;
    end else begin
      fs_locked_d <= fs_locked;
      if (retune)                         retune_pend <= 1'b1;
      else if (fs_locked && !fs_locked_d) retune_pend <= 1'b0;
    end
  end
  assign restart = retune_pend && fs_locked && !fs_locked_d;

  clustering_unit u_clu (
    .clk, .rst_n, .restart, .fv_valid, .fv, .fv_ready,
    .res_valid, .res_row, .res_dist(spike_dist), .res_outlier, .res_phase,
    .phase, .n_final(n_clusters), .n_used(rows_used), .thr(sort_thr), .tuned(thr_tuned),
    .n_iter(tune_iter), .retrain, .train_done
  );

  assign fv_dropped    = fv_valid && !fv_ready;
  assign spike_valid   = res_valid && res_phase == PH_ASSIGN;
  assign spike_cluster = res_row;
  assign spike_outlier = res_outlier;
endmodule
