// tb_fe_unit: drives aligned spikes through the adaptive feature extraction
// unit with a Frame 2 window of 4 spikes. Before the lock no feature vector
// may come out. After it, every vector is compared with a model built here:
// MAF of length 1/2/4/8 from SNR = Vp-p / sigma_N (>= 32, >= 16, >= 8, less),
// derivatives s(n) - s(n - delta) on the unit's three scales, then {max, min}
// per line. The MAF length follows the SNR while Frame 2 learns and stays
// frozen after the lock. Also checks the 3-cycle latency after the last
// sample.
module tb_fe_unit;
  import ss_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [SAMPLE_W-1:0] sigma = 10'd10;
  logic [SAMPLE_W:0]   vpp = 11'd200;
  logic retune = 1'b0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  sample_t in_sample = '0;
  logic fv_valid, locked;
  fv_t fv;
  delta_t scaling [NLINES];
  logic [1:0] maf_len_log;
  int checks = 0, failures = 0;
  int n_fv = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && fv_valid) n_fv++;

  fe_unit #(.NSP_LOG(2)) dut (.clk, .rst_n, .sigma, .vpp, .retune, .in_valid, .in_first, .in_last,
                              .in_sample, .fv_valid, .fv, .scaling, .locked, .maf_len_log);

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

  function automatic int fdiv(int a, int b);   // floor division
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  initial begin
    int s [32], m [32];
    int vpps [4] = '{400, 200, 100, 50};
    int frozen = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int sp = 0; sp < 24; sp++) begin
      int L, lg, n_before, sc [3], mx [3], mn [3], lat;
      bit was_locked;
      vpp = 11'(vpps[sp % 4]);
      lg  = (vpps[sp % 4] >= 320) ? 0 : (vpps[sp % 4] >= 160) ? 1 : (vpps[sp % 4] >= 80) ? 2 : 3;
      if (locked) lg = frozen;          // frozen while Frame 2 is locked
      L   = 1 << lg;
      for (int n = 0; n < 32; n++)
        s[n] = (n < 6) ? int'($urandom_range(20)) - 10
             : (n < 12) ? -40 * (n - 5) - int'($urandom_range(10 * (sp % 5)))
             : (n < 20) ? -240 + 45 * (n - 11) : 120 - 12 * (n - 19);
      for (int n = 0; n < 32; n++) begin
        int sum;
        sum = 0;
        for (int i = 0; i < L; i++) sum += s[(n - i < 0) ? 0 : n - i];
        m[n] = fdiv(sum, L);
      end
      was_locked = locked;
      for (int j = 0; j < 3; j++) sc[j] = int'(scaling[j]);
      for (int j = 0; j < 3; j++) begin
        mx[j] = -99999; mn[j] = 99999;
        for (int n = 0; n < 32; n++) begin
          int d;
          d = m[n] - m[(n - sc[j] < 0) ? 0 : n - sc[j]];
          if (d > mx[j]) mx[j] = d;
          if (d < mn[j]) mn[j] = d;
        end
      end
      n_before = n_fv;
      for (int n = 0; n < 32; n++) begin
        @(negedge clk);
        in_valid = 1; in_first = (n == 0); in_last = (n == 31); in_sample = sample_t'(s[n]);
        @(negedge clk);
        in_valid = 0; in_first = 0; in_last = 0;
      end
      if (!was_locked) frozen = lg;
      check(int'(maf_len_log) == frozen, $sformatf("MAF length code %0d expected %0d", maf_len_log, frozen));
      lat = 1;
      while (!fv_valid && lat < 6) begin @(negedge clk); lat++; end
      if (was_locked) begin
        check(fv_valid && lat == 3, $sformatf("fv latency %0d", lat));
        for (int j = 0; j < 3; j++) begin
          check(int'(fv[2*j]) == mx[j], $sformatf("spike %0d line %0d max %0d expected %0d", sp, j, fv[2*j], mx[j]));
          check(int'(fv[2*j+1]) == mn[j], $sformatf("spike %0d line %0d min %0d expected %0d", sp, j, fv[2*j+1], mn[j]));
        end
      end else begin
        repeat (4) @(negedge clk);
        check(n_fv == n_before, "no feature vector before Frame 2 locks");
      end
      repeat (4) @(negedge clk);
    end
    check(locked, "Frame 2 locked");
    check(n_fv == 20, $sformatf("feature vectors %0d expected 20", n_fv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
