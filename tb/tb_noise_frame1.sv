// tb_noise_frame1: checks Frame 1's sigma_N, SThr and Vp-p estimates.
// Random samples of a chosen spread are fed one every 3 clk cycles. The
// testbench runs its own median tracker m (m += 1 if |x| > m, m -= 1 if
// |x| < m) and expects at each 64-sample window end sigma = m + floor(m/2),
// SThr = 4 sigma (saturated), Vp-p = max - min of the window. SThr must be
// all ones before the first window. The tracker is also checked to land near
// the true median of |x| (within 25 %) once it has settled.
module tb_noise_frame1;
  import ss_pkg::*;
  localparam int WL = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_en = 1'b0;
  sample_t x = '0;
  logic [SAMPLE_W-1:0] sigma, sthr;
  logic [SAMPLE_W:0]   vpp;
  logic stat_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  noise_frame1 #(.WIN_LOG(WL)) dut (.clk, .rst_n, .sample_en, .x, .sigma, .sthr, .vpp, .stat_valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int spread [6] = '{20, 60, 150, 150, 150, 400};
    int med = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(sthr == '1 && !stat_valid, "SThr saturated before the first window");
    for (int w = 0; w < 6; w++) begin
      int mx, mn, v, es, et;
      mx = -100000; mn = 100000;
      for (int i = 0; i < (1 << WL); i++) begin
        v = int'($urandom_range(2 * spread[w])) - spread[w];
        if (((v < 0) ? -v : v) > med) med++;
        else if (((v < 0) ? -v : v) < med) med--;
        if (v > mx) mx = v;
        if (v < mn) mn = v;
        @(negedge clk); x = sample_t'(v); sample_en = 1'b1;
        @(negedge clk); sample_en = 1'b0;
        @(negedge clk);
        if (w == 0 && i < (1 << WL) - 1) check(!stat_valid, "not valid during first window");
      end
      es = med + med / 2;
      et = 4 * es;
      if (et > 1023) et = 1023;
      if (es > 1023) es = 1023;
      check(stat_valid, "valid after window");
      check(int'(sigma) == es, $sformatf("sigma %0d expected %0d", sigma, es));
      check(int'(sthr) == et, $sformatf("sthr %0d expected %0d", sthr, et));
      if (w == 4) check(med > 75 * 3 / 4 && med < 75 * 5 / 4, $sformatf("median %0d near 75", med));
      check(int'(vpp) == mx - mn, $sformatf("vpp %0d expected %0d", vpp, mx - mn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
