// tb_frame2_fs: checks that Frame 2 / the frequency synthesizer pick, in
// each sub-band (delta 1-4, 5, 6-7), the scale whose extrema vary most
// across spikes. Spikes are built so that in each band one line changes its
// amplitude from spike to spike (wide or narrow spread) and the others repeat
// the same waveform, which makes the right choice clear without repeating the
// scoring arithmetic. Also checks the default scales before the first lock,
// that locked is low while learning (8 spikes here), a single tuned pulse,
// and relearning after retune.
module tb_frame2_fs;
  import ss_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic retune = 1'b0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  feat_t d_all [NDELTA];
  delta_t scaling [NLINES];
  logic locked, tuned;
  int checks = 0, failures = 0;
  int n_tuned = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && tuned) n_tuned++;

  frame2_fs #(.NSP_LOG(3)) dut (.clk, .rst_n, .retune, .in_valid, .in_first, .in_last, .d_all,
                                .scaling, .locked, .tuned);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One spike of 16 samples; spread[k] is the random amplitude range of line k.
  task automatic spike(int spread [NDELTA]);
    int amp [NDELTA];
    for (int k = 0; k < NDELTA; k++) amp[k] = 100 + (spread[k] ? int'($urandom_range(spread[k])) : 0);
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      in_valid = 1; in_first = (n == 0); in_last = (n == 15);
      for (int k = 0; k < NDELTA; k++)
        d_all[k] = feat_t'((n == 4) ? amp[k] : ((n == 9) ? -amp[k] : n));
    end
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic learn(int spread [NDELTA], int e1, int e2, int e3);
    for (int s = 0; s < 8; s++) begin
      check(!locked, "not locked while learning");
      spike(spread);
    end
    repeat (3) @(negedge clk);
    check(locked, "locked after 8 spikes");
    check(int'(scaling[0]) == e1, $sformatf("scaling1 %0d expected %0d", scaling[0], e1));
    check(int'(scaling[1]) == e2, $sformatf("scaling2 %0d expected %0d", scaling[1], e2));
    check(int'(scaling[2]) == e3, $sformatf("scaling3 %0d expected %0d", scaling[2], e3));
  endtask

  initial begin
    int sp1 [NDELTA] = '{0, 0, 300, 0, 50, 0, 300};
    int sp2 [NDELTA] = '{300, 30, 0, 0, 0, 300, 40};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(scaling[0] == 3'd3 && scaling[1] == 3'd5 && scaling[2] == 3'd6, "default scales");
    learn(sp1, 3, 5, 7);
    check(n_tuned == 1, "one tuned pulse");
    spike(sp2);                 // after lock nothing changes
    spike(sp2);
    check(scaling[0] == 3'd3 && scaling[2] == 3'd7, "scales held while locked");
    @(negedge clk); retune = 1'b1;
    @(negedge clk); retune = 1'b0;
    learn(sp2, 1, 5, 6);
    check(n_tuned == 2, "second tuned pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
