// tb_training_unit: runs a hand-worked clustering scenario through the
// training memory and its engines (sorting threshold 60, 103 training
// vectors, NMIN = 4). All six features of a vector are equal, so the l1
// distance is 6 |a - b| and matching means |a - b| <= 10.
//  * 70 vectors at -300 open row 0; its NOSPC saturates at 63 and the row is
//    finalized during training, its mean staying -300.
//  * 20 vectors at 0 open row 1; 3 vectors at 300 open row 2 (too few: freed).
//  * one vector at 100 opens row 3, one at 111 opens row 4 (66 > 60), then
//    eight at 106 update row 4: 111 -> 109 -> 108 -> 108 ... (n = 9).
//  * merging joins rows 3 and 4 (48 <= 60): (100 + 9 * 108) / 10 = 107.
// Then it checks the labels, distances and outlier flags of assignments,
// the result latency (9 clock edges after the accepting edge), that merging
// holds fv_ready low, and that retrain empties the memory.
module tb_training_unit;
  import ss_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fv_valid = 1'b0, retrain = 1'b0;
  fv_t fv;
  logic fv_ready;
  dist_t thr = dist_t'(60);
  logic res_valid, res_outlier, train_done;
  row_idx_t res_row;
  dist_t res_dist;
  phase_e res_phase, phase;
  logic [ROW_W:0] n_final, n_used;
  int checks = 0, failures = 0;
  int n_merge_cycles = 0, n_done = 0;

  always #5 clk = ~clk;

  training_unit #(.TRAIN_LEN(103), .NMIN(4)) dut (
    .clk, .rst_n, .fv_valid, .fv, .fv_ready, .thr, .retrain,
    .res_valid, .res_row, .res_dist, .res_outlier, .res_phase,
    .phase, .train_done, .n_final, .n_used);

  always @(posedge clk) if (rst_n) begin
    if (phase == PH_MERGE) begin
      n_merge_cycles++;
      if (fv_ready) begin failures++; checks++; $display("FAIL ready while merging"); end
    end
    if (train_done) n_done++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Present a vector with all features = a; return the result.
  task automatic send(int a, output int row, output int d, output bit outl, output int lat);
    @(negedge clk);
    while (!fv_ready) @(negedge clk);
    fv_valid = 1'b1;
    for (int i = 0; i < K; i++) fv[i] = feat_t'(a);
    @(posedge clk);
    @(negedge clk);
    fv_valid = 1'b0;
    lat = 0;
    while (!res_valid && lat < 40) begin @(posedge clk); lat++; @(negedge clk); end
    row = int'(res_row); d = int'(res_dist); outl = res_outlier;
  endtask

  task automatic expect_train(int a, bit e_out, int e_row);
    int row, d, lat;
    bit outl;
    send(a, row, d, outl, lat);
    check(lat == 9, $sformatf("latency %0d", lat));
    check(res_phase == PH_TRAIN, "training phase");
    check(outl == e_out, $sformatf("training a=%0d outlier %0d", a, outl));
    if (!e_out) check(row == e_row, $sformatf("training a=%0d row %0d expected %0d", a, row, e_row));
  endtask

  task automatic expect_assign(int a, int e_row, int e_dist, bit e_out);
    int row, d, lat;
    bit outl;
    send(a, row, d, outl, lat);
    check(res_phase == PH_ASSIGN, "assignment phase");
    check(lat == 9, $sformatf("latency %0d", lat));
    check(row == e_row, $sformatf("assign a=%0d row %0d expected %0d", a, row, e_row));
    check(d == e_dist, $sformatf("assign a=%0d dist %0d expected %0d", a, d, e_dist));
    check(outl == e_out, $sformatf("assign a=%0d outlier %0d", a, outl));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(phase == PH_TRAIN && n_used == 0, "empty after reset");
    expect_train(-300, 1, 0);
    expect_train(0, 1, 1);
    expect_train(300, 1, 2);
    expect_train(100, 1, 3);
    expect_train(111, 1, 4);
    check(n_used == 5, "five rows opened");
    for (int i = 0; i < 69; i++) expect_train(-300, 0, 0);
    check(dut.mem[0].nospc == 6'd63 && dut.mem[0].finalized, "NOSPC saturated and row finalized");
    for (int i = 0; i < 19; i++) expect_train(0, 0, 1);
    for (int i = 0; i < 2; i++) expect_train(300, 0, 2);
    for (int i = 0; i < 7; i++) expect_train(106, 0, 4);
    check(dut.mem[4].fv[0] == feat_t'(108) && dut.mem[4].nospc == 6'd8, "row 4 mean after updates");
    expect_train(106, 0, 4);             // 103rd vector ends training
    repeat (700) @(negedge clk);
    check(n_merge_cycles > 64, "merging engine ran");
    check(n_done == 1, "train_done pulsed once");
    check(phase == PH_ASSIGN, "assignment phase reached");
    check(n_final == 3 && n_used == 3, $sformatf("clusters %0d used %0d", n_final, n_used));
    expect_assign(-295, 0, 30, 0);
    expect_assign(0, 1, 0, 0);
    expect_assign(107, 3, 0, 0);
    expect_assign(112, 3, 30, 0);
    expect_assign(300, 3, 6 * 193, 1);
    expect_assign(55, 3, 6 * 52, 1);
    @(negedge clk); retrain = 1'b1;
    @(negedge clk); retrain = 1'b0;
    check(n_used == 0 && n_final == 0 && phase == PH_TRAIN, "retrain clears the memory");
    expect_train(5, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
