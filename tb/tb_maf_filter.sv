// tb_maf_filter: streams random 32-sample spikes through the MAF with each
// length (1, 2, 4, 8 taps) and with gaps between samples, and compares every
// output with floor(sum of the newest L samples / L), where samples before
// the first of a spike count as copies of the first. Also checks the one-
// cycle latency and the first / last flags.
module tb_maf_filter;
  import ss_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] len_log = '0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  sample_t in_sample = '0;
  logic out_valid, out_first, out_last;
  sample_t out_sample;
  int checks = 0, failures = 0;
  int exp_q [$];
  int first_q [$];

  always #5 clk = ~clk;

  maf_filter dut (.clk, .rst_n, .len_log, .in_valid, .in_first, .in_last, .in_sample,
                  .out_valid, .out_first, .out_last, .out_sample);

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

  // Output monitor: one output per input, one cycle later.
  logic in_valid_d = 0;
  always @(posedge clk) begin
    in_valid_d <= in_valid;
    if (rst_n) begin
      if (out_valid != in_valid_d) begin checks++; failures++; $display("FAIL latency"); end
      if (out_valid) begin
        int e, f;
        e = exp_q.pop_front();
        f = first_q.pop_front();
        check(int'(out_sample) == e, $sformatf("maf out %0d expected %0d", out_sample, e));
        check(out_first == (f == 1) && out_last == (f == 2), "flags");
      end
    end
  end

  initial begin
    int s [32];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int sp = 0; sp < 40; sp++) begin
      int L;
      len_log = 2'(sp % 4);
      L = 1 << (sp % 4);
      for (int n = 0; n < 32; n++) s[n] = int'($urandom_range(1000)) - 500;
      for (int n = 0; n < 32; n++) begin
        int sum;
        sum = 0;
        for (int i = 0; i < L; i++) sum += s[(n - i < 0) ? 0 : n - i];
        exp_q.push_back((sum >= 0) ? sum / L : -((-sum + L - 1) / L));
        first_q.push_back(n == 0 ? 1 : (n == 31 ? 2 : 0));
        @(negedge clk);
        in_valid = 1; in_first = (n == 0); in_last = (n == 31); in_sample = sample_t'(s[n]);
        @(negedge clk);
        in_valid = 0; in_first = 0; in_last = 0;
        if (sp % 2 == 1) repeat (n % 3) @(negedge clk);
      end
    end
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "all outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
