// tb_spike_aligner: writes low-level samples with one large peak per spike,
// pulses det at a random distance from the peak (peak from 12 samples before
// to 3 after the detection) and checks that the 32 streamed samples are the
// stored samples from peak - 8 to peak + 23, with the first / last flags.
// A second det during each spike must be ignored. Samples are written every
// 4 cycles, output enables come every 2 cycles.
module tb_spike_aligner;
  import ss_pkg::*;
  localparam int NSP = 40, GAP = 80, T = NSP * GAP + 100;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_en = 1'b0, det = 1'b0, out_en = 1'b0;
  sample_t x = '0;
  logic sp_valid, sp_first, sp_last, busy;
  sample_t sp_sample;
  int checks = 0, failures = 0;
  int xs [T];
  int exp_q [$];
  int pos = 0, windows = 0;

  always #5 clk = ~clk;

  spike_aligner dut (.clk, .rst_n, .sample_en, .x, .det, .out_en,
                     .sp_valid, .sp_sample, .sp_first, .sp_last, .busy);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (T * 4 + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) out_en <= ~out_en;

  always @(negedge clk) begin
    if (sp_valid) begin
      int e;
      e = exp_q.size() ? exp_q.pop_front() : 9999;
      check(int'(sp_sample) == e, $sformatf("window %0d sample %0d: %0d expected %0d", windows, pos, sp_sample, e));
      check(sp_first == (pos == 0), "first flag");
      check(sp_last == (pos == 31), "last flag");
      if (pos == 8) check(int'(sp_sample) == xs_peak(windows), "peak at position 8");
      pos++;
      if (sp_last) begin pos = 0; windows++; end
    end
  end

  int peaks [NSP];
  function automatic int xs_peak(int w);
    return xs[peaks[w]];
  endfunction

  initial begin
    for (int t = 0; t < T; t++) xs[t] = int'($urandom_range(80)) - 40;
    for (int s = 0; s < NSP; s++) begin
      int tdet;
      tdet = 60 + s * GAP;
      peaks[s] = tdet + int'($urandom_range(15)) - 12;
      xs[peaks[s]] = (s % 2) ? 300 + s : -300 - s;
      xs[peaks[s] - 1] = xs[peaks[s]] / 2;
      for (int n = 0; n < 32; n++) exp_q.push_back(xs[peaks[s] - 8 + n]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < T; t++) begin
      @(negedge clk); x = sample_t'(xs[t]); sample_en = 1'b1;
      @(negedge clk); sample_en = 1'b0;
      if ((t - 60) % GAP == 0 && t >= 60 && t < 60 + NSP * GAP) begin
        check(!busy, "idle before detection");
        det = 1'b1;
      end
      if ((t - 65) % GAP == 0 && t >= 65 && t < 65 + NSP * GAP) begin
        check(busy, "busy during a spike");
        det = 1'b1;       // ignored: refractory
      end
      @(negedge clk); det = 1'b0;
      @(negedge clk);
    end
    check(windows == NSP, $sformatf("windows streamed: %0d", windows));
    check(exp_q.size() == 0, "all samples seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
