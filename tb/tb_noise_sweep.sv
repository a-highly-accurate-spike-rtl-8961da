// tb_noise_sweep: the whole spike sorter at its default sizes, run on
// synthetic three-unit recordings at four noise levels, 0.05, 0.10, 0.15 and
// 0.20, in the sense of the standard spike-sorting benchmarks: the standard
// deviation of the background noise divided by the spike peak amplitude
// (here the mean of the three units' peaks, 233 counts). The noise is
// Gaussian, made as the sum of twelve uniform variates.
//
// For each level the design is reset, runs Frame 1, Frame 2, training and
// threshold self-tuning from scratch, and then labels 250 spikes. The
// accuracy is scored as in tb_spike_sorter_top: each result is credited to
// the latest spike that began at least 20 samples earlier, every unit's most
// frequent label must be distinct, and the share of spikes with their unit's
// label is reported. At 0.05 and 0.10 the units must get distinct labels and
// at least 65 % of spikes their unit's label (measured: 100 % and 74 %). At
// 0.15 and 0.20 the scores are only reported (measured: two units share a
// label at 0.15; at 0.20 SThr = 4 sigma_N lies above the smallest unit's
// peak, so most of its spikes are never detected); there the checks are that
// training and self-tuning finish and that spikes are still labelled. A level
// that never reaches the assignment phase within its time limit fails.
module tb_noise_sweep;
  import ss_pkg::*;
  real noise_sd = 11.65;
  logic clk = 1'b0, rst_n = 1'b0;
  sample_t adc_sample = '0;
  logic retune = 1'b0;
  logic sample_tick, tick_120k, det, det_enable, align_busy;
  logic [SAMPLE_W-1:0] sigma_n, sthr;
  logic [2*SAMPLE_W:0] det_energy, det_thr;
  logic fv_valid, fs_locked, fv_dropped;
  fv_t fv;
  delta_t scaling [NLINES];
  logic [1:0] maf_len_log;
  logic spike_valid, spike_outlier, thr_tuned, retrain, train_done;
  row_idx_t spike_cluster;
  dist_t spike_dist, sort_thr;
  phase_e phase;
  logic [ROW_W:0] n_clusters, rows_used;
  logic [3:0] tune_iter;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spike_sorter_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus: synthetic three-unit recording ----------------
  real tmpl [3][24];
  int  t_sample = 0;          // samples produced so far
  int  onset_t [$];           // spike start times
  int  onset_c [$];           // spike units
  int  n_spikes = 0;

  function automatic real bump(real k, real c, real w);
    return $exp(-((k - c) / w) * ((k - c) / w));
  endfunction

  initial begin
    for (int k = 0; k < 24; k++) begin
      tmpl[0][k] = -230.0 * bump(k, 6, 1.4) + 70.0 * bump(k, 11, 3.0);
      tmpl[1][k] = -140.0 * bump(k, 6, 2.6) + 110.0 * bump(k, 13, 3.5);
      tmpl[2][k] = -330.0 * bump(k, 6, 2.0) + 20.0 * bump(k, 12, 4.0);
    end
  end

  int next_onset = 40, cur_unit = 0, cur_k = 99;
  always @(posedge clk) begin
    if (sample_tick) begin
      real v;
      v = 0.0;
      for (int i = 0; i < 12; i++) v += real'($urandom_range(65535)) / 65536.0;
      v = (v - 6.0) * noise_sd;
      if (t_sample == next_onset) begin
        cur_unit = int'($urandom_range(2));
        cur_k = 0;
        onset_t.push_back(t_sample);
        onset_c.push_back(cur_unit);
        n_spikes++;
        next_onset = t_sample + 70 + int'($urandom_range(40));
      end
      if (cur_k < 24) begin
        v += tmpl[cur_unit][cur_k];
        cur_k++;
      end
      if (v > 511.0) v = 511.0;
      if (v < -512.0) v = -512.0;
      adc_sample <= sample_t'(int'(v));
      t_sample++;
    end
  end

  // Unit of the latest spike that started at least 20 samples ago.
  function automatic int unit_now();
    int u;
    u = -1;
    while (onset_t.size() > 1 && onset_t[1] <= t_sample - 20) begin
      void'(onset_t.pop_front());
      void'(onset_c.pop_front());
    end
    if (onset_t.size() > 0 && onset_t[0] <= t_sample - 20) u = onset_c[0];
    return u;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_cond = 0, n_det = 0, n_win = 0, n_lock = 0, n_fv = 0, n_drop = 0;
  int n_done = 0, n_merge = 0, n_final_ph = 0, n_lab = 0, n_out = 0, n_retrain = 0;
  int n_len [4] = '{0, 0, 0, 0};
  int n_restart = 0, n_thr_change = 0, n_since = 0;
  logic cond_d = 0, busy_d = 0, lock_d = 0;
  phase_e phase_d = PH_TRAIN;
  dist_t thr_d = '0;
  int conf [3][ROWS];

  always @(posedge clk) if (rst_n) begin
    cond_d <= det_enable; busy_d <= align_busy; lock_d <= fs_locked; phase_d <= phase; thr_d <= sort_thr;
    if (det_enable && !cond_d) n_cond++;
    if (det) n_det++;
    if (align_busy && !busy_d) n_win++;
    if (fs_locked && !lock_d) n_lock++;
    if (fv_valid) begin n_fv++; n_len[maf_len_log]++; end
    if (fv_dropped) n_drop++;
    if (train_done) begin
      // labels of different trainings are not comparable: score the latest
      n_done++;
      n_since = 0;
      for (int u = 0; u < 3; u++) for (int r = 0; r < ROWS; r++) conf[u][r] = 0;
    end
    if (phase == PH_MERGE && phase_d != PH_MERGE) n_merge++;
    if (phase == PH_FINAL && phase_d != PH_FINAL) n_final_ph++;
    if (retrain) n_retrain++;
    if (sort_thr != thr_d && n_done > 0) n_thr_change++;
    if (phase == PH_TRAIN && phase_d == PH_ASSIGN && !retrain) n_restart++;
    if (spike_valid) begin
      int u;
      n_lab++;
      n_since++;
      if (spike_outlier) n_out++;
      u = unit_now();
      if (u >= 0 && !spike_outlier) conf[u][spike_cluster]++;
    end
  end

  localparam int NLEV = 4;
  const int lev_pc [NLEV] = '{5, 10, 15, 20};
  const int lev_bar [NLEV] = '{65, 65, 0, 0};
  int acc_last = 0;

  task automatic score_level(int pc, int bar);
    int best [3], bestn [3], tot, hit;
    tot = 0; hit = 0;
    for (int u = 0; u < 3; u++) begin
      best[u] = 0; bestn[u] = -1;
      for (int r = 0; r < ROWS; r++) begin
        tot += conf[u][r];
        if (conf[u][r] > bestn[u]) begin bestn[u] = conf[u][r]; best[u] = r; end
      end
      hit += bestn[u];
    end
    acc_last = tot ? 100 * hit / tot : 0;
    $display("noise 0.%02d: %0d labelled, %0d outliers, clusters %0d, accuracy %0d %%, threshold %0d, scales %0d %0d %0d, MAF taps %0d",
             pc, tot, n_out, n_clusters, acc_last, sort_thr, scaling[0], scaling[1], scaling[2], 1 << maf_len_log);
    check(tot > 20, $sformatf("noise 0.%02d: spikes labelled", pc));
    if (bar > 0) begin
      check(best[0] != best[1] && best[1] != best[2] && best[0] != best[2],
            $sformatf("noise 0.%02d: units get distinct clusters", pc));
      check(acc_last >= bar, $sformatf("noise 0.%02d: accuracy at least %0d %%", pc, bar));
    end
  endtask

  initial begin
    for (int l = 0; l < NLEV; l++) begin
      int cyc;
      bit ok;
      noise_sd = 233.0 * real'(lev_pc[l]) / 100.0;
      rst_n <= 1'b0;
      repeat (5) @(posedge clk);
      rst_n <= 1'b1;
      n_out = 0;
      cyc = 0;
      ok = 1'b0;
      for (int u = 0; u < 3; u++) for (int r = 0; r < ROWS; r++) conf[u][r] = 0;
      while (cyc < 15_000_000) begin
        @(posedge clk);
        cyc++;
        if (phase == PH_ASSIGN && thr_tuned) begin ok = 1'b1; break; end
      end
      check(ok, $sformatf("noise 0.%02d: training and self-tuning finished", lev_pc[l]));
      if (ok) begin
        for (int u = 0; u < 3; u++) for (int r = 0; r < ROWS; r++) conf[u][r] = 0;
        n_out = 0;
        cyc = 0;
        while (!(n_since >= 250 && phase == PH_ASSIGN) && cyc < 15_000_000) begin
          @(posedge clk);
          cyc++;
        end
        score_level(lev_pc[l], lev_bar[l]);
      end
    end
    $display("spikes %0d, detections %0d, feature vectors %0d", n_spikes, n_det, n_fv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
