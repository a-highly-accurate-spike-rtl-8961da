// tb_spike_sorter_top: end-to-end run of the spike sorting processor at its
// default sizes (960 kHz clock, 30 kHz samples, 64-row training memory,
// 256 training spikes, 32-spike Frame 2 window).
//
// The recording is synthetic: uniform noise of +-NOISE counts plus spikes of
// three units with different shapes (sums of two Gaussian bumps), one every
// 70 to 110 samples, unit chosen at random. The testbench knows which unit
// fired when, and credits each clustering result to the latest spike that
// began at least 20 samples earlier (results come about 35 samples after a
// spike starts, and spikes are at least 70 apart).
//
// It checks that the run passes through every mechanism of the design and
// counts how often each happened: SThr conditional enables, omega-NEO
// detections, aligned windows, MAF length selection, Frame 2 lock, feature
// vectors, training / merging / finalizing, labelled spikes, outliers,
// threshold self-tuning, and a retune that relearns the ADDs scales and
// restarts clustering. After each assignment phase it checks the sorting
// accuracy over the labels given since the latest training: every unit's
// most frequent label must differ, and those labels must cover at least
// 65 % of the labelled spikes (over ten random seeds the runs scored 69 to
// 100 %, about 90 % on average).
module tb_spike_sorter_top;
  import ss_pkg::*;
  localparam int NOISE = 24;
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
    repeat (40_000_000) @(posedge clk);
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
      v = real'(int'($urandom_range(2 * NOISE)) - NOISE);
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

  // Sorting accuracy over the labels collected so far, then clear them.
  task automatic score(string tag);
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
    $display("%s: %0d labelled, units -> clusters %0d %0d %0d, accuracy %0d %%, threshold %0d, scales %0d %0d %0d",
             tag, tot, best[0], best[1], best[2], tot ? 100 * hit / tot : 0, sort_thr,
             scaling[0], scaling[1], scaling[2]);
    check(tot > 50, {tag, ": enough labelled spikes"});
    check(best[0] != best[1] && best[1] != best[2] && best[0] != best[2], {tag, ": units get distinct clusters"});
    check(100 * hit >= 65 * tot, {tag, ": sorting accuracy at least 65 %"});
    for (int u = 0; u < 3; u++) begin
      string line;
      line = "";
      for (int r = 0; r < ROWS; r++) if (conf[u][r]) line = {line, $sformatf(" row%0d:%0d", r, conf[u][r])};
      $display("  unit %0d ->%s", u, line);
    end
    for (int u = 0; u < 3; u++) for (int r = 0; r < ROWS; r++) conf[u][r] = 0;
  endtask

  // Wait until n spikes have been labelled by one and the same training.
  task automatic wait_labels(int n);
    while (!(n_since >= n && phase == PH_ASSIGN)) @(posedge clk);
  endtask

  initial begin
    int d0;
    for (int u = 0; u < 3; u++) for (int r = 0; r < ROWS; r++) conf[u][r] = 0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    // first run: learn everything, then label spikes
    while (!(phase == PH_ASSIGN && thr_tuned)) @(posedge clk);
    for (int u = 0; u < 3; u++) for (int r = 0; r < ROWS; r++) conf[u][r] = 0;
    wait_labels(250);
    score("first run");
    // retune: Frame 2 relearns the scales, clustering starts over
    @(negedge clk); retune = 1'b1;
    @(negedge clk); retune = 1'b0;
    @(posedge clk);
    check(!fs_locked, "retune unlocks Frame 2");
    d0 = n_done;
    while (!(n_lock >= 2 && n_done > d0 && phase == PH_ASSIGN && thr_tuned)) @(posedge clk);
    for (int u = 0; u < 3; u++) for (int r = 0; r < ROWS; r++) conf[u][r] = 0;
    wait_labels(200);
    score("after retune");

    $display("spikes %0d, SThr enables %0d, detections %0d, windows %0d, feature vectors %0d (dropped %0d)",
             n_spikes, n_cond, n_det, n_win, n_fv, n_drop);
    $display("MAF lengths used (1/2/4/8 taps): %0d %0d %0d %0d; sigma_N %0d, SThr %0d",
             n_len[0], n_len[1], n_len[2], n_len[3], sigma_n, sthr);
    $display("Frame 2 locks %0d, trainings %0d, merge phases %0d, finalize phases %0d, retrains %0d, threshold changes %0d, restarts %0d",
             n_lock, n_done, n_merge, n_final_ph, n_retrain, n_thr_change, n_restart);
    $display("labelled %0d, outliers %0d, clusters %0d, rows used %0d", n_lab, n_out, n_clusters, rows_used);
    check(n_cond > 0, "SThr conditional enable happened");
    check(n_det >= n_spikes * 9 / 10 - 40, "omega-NEO detections");
    check(n_win > 0, "aligned windows");
    check(n_len[0] + n_len[1] + n_len[2] + n_len[3] > 0, "MAF length selected");
    check(n_lock == 2, "Frame 2 locked twice");
    check(n_fv > 0, "feature vectors");
    check(n_done >= 2 && n_merge >= 2 && n_final_ph >= 2, "training, merging and finalizing");
    check(n_out > 0, "outliers flagged");
    check(n_retrain > 0 && n_thr_change > 0, "sorting threshold self-tuned");
    check(n_restart >= 1, "retune restarted the clustering");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
