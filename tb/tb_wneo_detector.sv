// tb_wneo_detector: feeds noise with spikes into the dual-threshold
// detector and checks, after every sample, the smoothed omega-NEO energy,
// the conditional enable, the adaptive threshold and the detection pulse
// against values computed here from the sample history:
//   cond(t)   = |x(t-2)| > SThr
//   psi(t)    = cond(t) ? max(0, x(t-2)^2 - x(t) x(t-4)) : 0
//   energy(t) = floor(mean of psi(t-1) .. psi(t-4))
//   Thr       = (sum of energy over 8 enabled samples) / 16
//   det(t+1)  = hit(t) and not hit(t-1), hit = cond and energy > Thr.
// Uses ACC_LOG = 3 to get several threshold updates in a short run.
module tb_wneo_detector;
  import ss_pkg::*;
  localparam int T = 900;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_en = 1'b0;
  sample_t x = '0;
  logic [SAMPLE_W-1:0] sthr = 10'd40;
  logic det, cond_en;
  logic [2*SAMPLE_W:0] energy, thr;
  int checks = 0, failures = 0;
  longint xs [-8:T], psi [-8:T], en [-8:T];
  bit hit [-8:T];
  int n_det = 0, n_cond = 0;

  always #5 clk = ~clk;

  wneo_detector #(.ACC_LOG(3)) dut (.clk, .rst_n, .sample_en, .x, .sthr, .det, .energy, .thr, .cond_en);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int shape [7] = '{-30, -120, -200, -90, 40, 60, 20};
    longint acc, m_thr;
    int cnt;
    bit c;
    for (int t = -8; t <= T; t++) begin xs[t] = 0; psi[t] = 0; en[t] = 0; hit[t] = 0; end
    acc = 0; m_thr = 0; cnt = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 1; t <= T; t++) begin
      int ph;
      ph = t % 37;
      xs[t] = (ph < 7) ? shape[ph] * (1 + (t / 37) % 3) / 2 : int'($urandom_range(30)) - 15;
      if (xs[t] > 511) xs[t] = 511;
      if (xs[t] < -512) xs[t] = -512;
      // threshold update uses the state before this step
      c = ((xs[t-3] < 0) ? -xs[t-3] : xs[t-3]) > 40;
      if (t > 1 && c) begin
        cnt++;
        acc += en[t-1];
        if (cnt == 8) begin m_thr = acc >> 4; acc = 0; cnt = 0; end
      end
      @(negedge clk); x = sample_t'(xs[t]); sample_en = 1'b1;
      @(negedge clk); sample_en = 1'b0;
      // model of the state after step t
      c = ((xs[t-2] < 0) ? -xs[t-2] : xs[t-2]) > 40;
      psi[t] = c ? xs[t-2] * xs[t-2] - xs[t] * xs[t-4] : 0;
      if (psi[t] < 0) psi[t] = 0;
      en[t]  = (psi[t-1] + psi[t-2] + psi[t-3] + psi[t-4]) >> 2;
      hit[t] = c && (en[t] > m_thr);
      check(cond_en == c, $sformatf("cond_en at %0d", t));
      check(longint'(energy) == en[t], $sformatf("energy at %0d: %0d expected %0d", t, energy, en[t]));
      check(longint'(thr) == m_thr, $sformatf("thr at %0d: %0d expected %0d", t, thr, m_thr));
      check(det == (hit[t-1] && !hit[t-2]), $sformatf("det at %0d", t));
      if (det) n_det++;
      if (c) n_cond++;
      @(negedge clk);
      check(!det, "det lasts one cycle");
      @(negedge clk);
    end
    check(n_det >= 15, $sformatf("spikes detected: %0d", n_det));
    check(m_thr > 0, "threshold adapted");
    $display("detections %0d, enabled samples %0d, final Thr %0d", n_det, n_cond, m_thr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
