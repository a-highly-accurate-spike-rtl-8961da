// tb_clk_enables: checks the 240 kHz / 120 kHz / 30 kHz enable pulses.
// Over 40 periods of the slowest rate it checks the spacing of every pulse
// (4, 8 and 32 clk cycles) and that the slow pulses line up with the fast.
module tb_clk_enables;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en_240k, en_120k, en_30k;
  int   checks = 0, failures = 0;
  int   last240 = -1, last120 = -1, last30 = -1, cyc = 0;
  int   n240 = 0, n120 = 0, n30 = 0;

  always #5 clk = ~clk;

  clk_enables dut (.clk, .rst_n, .en_240k, .en_120k, .en_30k);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (32 * 40) begin
      @(negedge clk);
      cyc++;
      if (en_240k) begin
        if (last240 >= 0) check(cyc - last240 == 4, "240k spacing");
        last240 = cyc; n240++;
      end
      if (en_120k) begin
        if (last120 >= 0) check(cyc - last120 == 8, "120k spacing");
        check(en_240k, "120k aligned with 240k");
        last120 = cyc; n120++;
      end
      if (en_30k) begin
        if (last30 >= 0) check(cyc - last30 == 32, "30k spacing");
        check(en_120k && en_240k, "30k aligned with faster rates");
        last30 = cyc; n30++;
      end
    end
    check(n30 == 40, "30k count");
    check(n120 == 160, "120k count");
    check(n240 == 320, "240k count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
