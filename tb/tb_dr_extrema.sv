// tb_dr_extrema: streams random decomposed spikes of random length into the
// DR unit and checks that the six features are {max, min} of each of the
// three lines and that fv_valid pulses once, one cycle after the last sample.
module tb_dr_extrema;
  import ss_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  feat_t d_sel [NLINES];
  logic fv_valid;
  fv_t fv;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dr_extrema dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .d_sel, .fv_valid, .fv);

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
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int sp = 0; sp < 60; sp++) begin
      int mx [3], mn [3], len;
      len = int'($urandom_range(40)) + 1;
      for (int j = 0; j < 3; j++) begin mx[j] = -5000; mn[j] = 5000; end
      for (int n = 0; n < len; n++) begin
        @(negedge clk);
        in_valid = 1; in_first = (n == 0); in_last = (n == len - 1);
        for (int j = 0; j < 3; j++) begin
          int v;
          v = (sp < 4) ? ((sp % 2) ? 1023 : -1024) + n : int'($urandom_range(2047)) - 1024;
          if (v > 1023) v = 1023;
          d_sel[j] = feat_t'(v);
          if (v > mx[j]) mx[j] = v;
          if (v < mn[j]) mn[j] = v;
        end
        @(negedge clk);
        in_valid = 0; in_first = 0; in_last = 0;
        check(fv_valid == (n == len - 1), "fv_valid timing");
      end
      for (int j = 0; j < 3; j++) begin
        check(int'(fv[2*j]) == mx[j], $sformatf("max line %0d: %0d expected %0d", j, fv[2*j], mx[j]));
        check(int'(fv[2*j+1]) == mn[j], $sformatf("min line %0d: %0d expected %0d", j, fv[2*j+1], mn[j]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
