// tb_clustering_unit: unsupervised clustering with threshold self-tuning.
// Feature vectors come from three well separated centres plus uniform noise
// of +-8 per feature. The initial sorting threshold (12) is far too small:
// every vector opens its own cluster, none is finalized, and the
// performance check must raise the threshold and retrain until training
// ends with exactly three clusters; windows of 16 labelled vectors with more
// than one outlier raise it further. After 900 vectors, 90 more are
// labelled: each centre must map to one cluster, different centres to
// different clusters, and at most 3 may be outliers. A restart pulse must clear the memory.
module tb_clustering_unit;
  import ss_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic restart = 1'b0, fv_valid = 1'b0;
  fv_t fv;
  logic fv_ready, res_valid, res_outlier, tuned, retrain, train_done;
  row_idx_t res_row;
  dist_t res_dist, thr;
  phase_e res_phase, phase;
  logic [ROW_W:0] n_final, n_used;
  logic [3:0] n_iter;
  int checks = 0, failures = 0, n_retrain = 0;
  int centre [3][K] = '{'{-200, 150, -60, 90, 300, -250},
                        '{100, -100, 200, -150, 0, 50},
                        '{300, 250, -300, 0, -200, 200}};

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && retrain) n_retrain++;

  clustering_unit #(.TRAIN_LEN(40), .THR_INIT(12), .THR_STEP(24), .WIN_LOG(4), .OUT_LIMIT(1)) dut (
    .clk, .rst_n, .restart, .fv_valid, .fv, .fv_ready,
    .res_valid, .res_row, .res_dist, .res_outlier, .res_phase,
    .phase, .n_final, .n_used, .thr, .tuned, .n_iter, .retrain, .train_done);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int c, output int row, output bit outl, output phase_e ph);
    int lat;
    @(negedge clk);
    while (!fv_ready) @(negedge clk);
    fv_valid = 1'b1;
    for (int i = 0; i < K; i++) fv[i] = feat_t'(centre[c][i] + int'($urandom_range(16)) - 8);
    @(negedge clk);
    fv_valid = 1'b0;
    lat = 0;
    while (!res_valid && lat < 40) begin @(negedge clk); lat++; end
    row = int'(res_row); outl = res_outlier; ph = res_phase;
  endtask

  initial begin
    int row, label [3], sent, n_out;
    bit outl, ok;
    phase_e ph;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    sent = 0;
    while (sent < 900) begin
      send(sent % 3, row, outl, ph);
      sent++;
    end
    $display("after %0d vectors, %0d retrains, threshold %0d, %0d clusters", sent, n_retrain, thr, n_final);
    check(phase == PH_ASSIGN && tuned, "self-tuning converged");
    check(n_retrain >= 1 && int'(n_iter) == n_retrain, "threshold was retuned");
    check(thr > dist_t'(12), "threshold raised");
    check(n_final == 3, $sformatf("three clusters, got %0d", n_final));
    for (int c = 0; c < 3; c++) label[c] = -1;
    n_out = 0;
    for (int i = 0; i < 90; i++) begin
      send(i % 3, row, outl, ph);
      check(ph == PH_ASSIGN, "labelled");
      if (outl) n_out++;
      else if (label[i % 3] < 0) label[i % 3] = row;
      else check(row == label[i % 3], $sformatf("centre %0d label %0d expected %0d", i % 3, row, label[i % 3]));
    end
    check(n_out <= 3, $sformatf("%0d outliers of 90", n_out));
    check(label[0] != label[1] && label[1] != label[2] && label[0] != label[2], "distinct labels");
    @(negedge clk); restart = 1'b1;
    @(negedge clk); restart = 1'b0;
    check(n_used == 0 && phase == PH_TRAIN, "restart clears the memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
