// tb_l1_engine: compares the eight l1-norm outputs with sums of absolute
// feature differences worked out in the testbench, for random vectors
// including the extreme feature values.
module tb_l1_engine;
  import ss_pkg::*;
  fv_t   a;
  fv_t   rows [INTERLEAVE];
  dist_t distance [INTERLEAVE];
  int checks = 0, failures = 0;

  l1_engine dut (.a, .rows, .distance);

  function automatic int rnd_feat(int t);
    case (t % 4)
      0:       return -1024;
      1:       return 1023;
      default: return int'($urandom_range(2047)) - 1024;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int av [K];
      for (int i = 0; i < K; i++) begin
        av[i] = (t < 20) ? rnd_feat(t + i) : int'($urandom_range(2047)) - 1024;
        a[i]  = feat_t'(av[i]);
      end
      for (int j = 0; j < INTERLEAVE; j++)
        for (int i = 0; i < K; i++) rows[j][i] = feat_t'((t < 20) ? rnd_feat(t + i + j + 1) : int'($urandom_range(2047)) - 1024);
      #1;
      for (int j = 0; j < INTERLEAVE; j++) begin
        int e;
        e = 0;
        for (int i = 0; i < K; i++) begin
          int d;
          d = av[i] - int'(rows[j][i]);
          e += (d < 0) ? -d : d;
        end
        checks++;
        if (int'(distance[j]) != e) begin
          failures++;
          $display("FAIL row %0d: %0d expected %0d", j, distance[j], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
