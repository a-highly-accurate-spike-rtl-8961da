// tb_adds_unit: streams random spikes through the ADDs with random scaling
// factors and checks all seven derivatives s(n) - s(n - delta) (samples
// before the first of a spike count as copies of it) and the three selected
// lines, one cycle after each input.
module tb_adds_unit;
  import ss_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  delta_t scaling [NLINES];
  logic in_valid = 0, in_first = 0, in_last = 0;
  sample_t in_sample = '0;
  logic out_valid, out_first, out_last;
  feat_t d_all [NDELTA];
  feat_t d_sel [NLINES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adds_unit dut (.clk, .rst_n, .scaling, .in_valid, .in_first, .in_last, .in_sample,
                 .out_valid, .out_first, .out_last, .d_all, .d_sel);

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

  initial begin
    int s [32];
    int sc [3];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int sp = 0; sp < 30; sp++) begin
      for (int j = 0; j < 3; j++) begin
        sc[j] = int'($urandom_range(6)) + 1;
        scaling[j] = delta_t'(sc[j]);
      end
      for (int n = 0; n < 32; n++) s[n] = (sp == 0) ? ((n % 2) ? 511 : -512) : int'($urandom_range(1023)) - 512;
      for (int n = 0; n < 32; n++) begin
        @(negedge clk);
        in_valid = 1; in_first = (n == 0); in_last = (n == 31); in_sample = sample_t'(s[n]);
        @(negedge clk);
        in_valid = 0; in_first = 0; in_last = 0;
        check(out_valid && out_first == (n == 0) && out_last == (n == 31), "valid and flags");
        for (int k = 1; k <= 7; k++)
          check(int'(d_all[k-1]) == s[n] - s[(n - k < 0) ? 0 : n - k],
                $sformatf("d_all delta=%0d n=%0d: %0d", k, n, d_all[k-1]));
        for (int j = 0; j < 3; j++)
          check(int'(d_sel[j]) == s[n] - s[(n - sc[j] < 0) ? 0 : n - sc[j]],
                $sformatf("d_sel line %0d", j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
