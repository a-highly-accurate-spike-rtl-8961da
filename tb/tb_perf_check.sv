// tb_perf_check: drives training results and assignment outcomes into the
// performance check and checks the sorting-threshold steps and retrain
// pulses: too many or no clusters raise the threshold, one cluster lowers it,
// an acceptable count sets tuned; a window of 8 assignments with more than 2
// outliers raises it; after TUNE_MAX = 4 changes the threshold is kept.
module tb_perf_check;
  import ss_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic train_done = 0, res_valid = 0, res_outlier = 0;
  logic [ROW_W:0] n_final = '0;
  phase_e res_phase = PH_ASSIGN;
  dist_t thr;
  logic retrain, tuned;
  logic [3:0] n_iter;
  int checks = 0, failures = 0, n_retrain = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && retrain) n_retrain++;

  perf_check #(.THR_INIT(100), .THR_STEP(20), .WIN_LOG(3), .OUT_LIMIT(2), .TUNE_MAX(4)) dut (
    .clk, .rst_n, .train_done, .n_final, .res_valid, .res_outlier, .res_phase,
    .thr, .retrain, .tuned, .n_iter);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic done(int n, int e_thr, bit e_retrain);
    int n_before;
    n_before = n_retrain;
    @(negedge clk); train_done = 1; n_final = (ROW_W+1)'(n);
    @(negedge clk); train_done = 0;
    check(retrain == e_retrain, $sformatf("retrain after %0d clusters", n));
    @(negedge clk);
    check(!retrain, "retrain is one cycle");
    check(int'(thr) == e_thr, $sformatf("thr %0d expected %0d after %0d clusters", thr, e_thr, n));
    check(n_retrain == n_before + int'(e_retrain), "retrain count");
  endtask

  task automatic window(int outliers, int e_thr, bit e_retrain);
    int n_before;
    n_before = n_retrain;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); res_valid = 1; res_outlier = (i < outliers);
      res_phase = (i == 3) ? PH_TRAIN : PH_ASSIGN;     // training results are not counted
      if (i == 3) begin @(negedge clk); res_phase = PH_ASSIGN; end
    end
    @(negedge clk); res_valid = 0;
    @(negedge clk);
    check(int'(thr) == e_thr, $sformatf("thr %0d expected %0d after %0d outliers", thr, e_thr, outliers));
    check(n_retrain == n_before + int'(e_retrain), "window retrain count");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(thr == dist_t'(100) && !tuned, "initial threshold");
    done(12, 120, 1);          // too many clusters
    check(!tuned, "not tuned after a change");
    done(0, 140, 1);           // none finalized
    done(1, 120, 1);           // one cluster: lower
    done(3, 120, 0);           // accepted
    check(tuned, "tuned after an accepted training");
    window(1, 120, 0);         // 1 outlier of 8: fine
    check(tuned, "still tuned");
    window(3, 140, 1);         // 3 outliers: raise
    check(n_iter == 4'd4, "four changes counted");
    done(20, 140, 0);          // limit reached: keep
    check(tuned, "kept at the limit");
    window(8, 140, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
