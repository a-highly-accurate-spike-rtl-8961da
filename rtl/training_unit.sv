// training_unit: training memory and its processing engines (online clustering).
//
// The training memory has ROWS rows. As in the document each row holds the
// six features FV0..FV5 of a cluster mean (C0-C5), a 1-bit status flag (C6,
// row in use), a 6-bit number of spikes per cluster NOSPC (C7) and a 1-bit
// finalized flag (C8). Around it sit the engines the document names: an
// l1-norm engine that compares a vector with 8 rows per cycle (8-way
// interleaving), a status engine (here: row masks and the free-row search),
// a cluster generator, an update engine (B), a merging engine (A) and the
// finalized-cluster set used to assign spikes. The document does not give
// the clustering algorithm itself; the following is this design's own
// simple online algorithm built from those engines:
//
//  TRAIN  Each feature vector is compared with all rows in use (8 cycles).
//         If the nearest mean lies within the sorting threshold thr, the
//         update engine moves it: mean += (fv - mean) / (NOSPC + 1) and
//         NOSPC += 1. A row whose NOSPC saturates at 63 is finalized and no
//         longer updated or merged. Otherwise the cluster generator opens the
//         first free row with mean = fv, NOSPC = 1 (the vector is dropped if
//         no row is free). After TRAIN_LEN vectors training ends.
//  MERGE  The merging engine compares each non-finalized row with the
//         higher-numbered ones, 8 per cycle; a pair no further apart than
//         MERGE_Q/4 times thr (twice thr by default) is merged into the lower
//         row as the NOSPC-weighted mean and the upper row is freed. Means of
//         one unit's spikes can end up about thr apart when training splits
//         it; distinct units lie further apart.
//  FINAL  Rows in use with NOSPC >= NMIN are finalized; all other rows are
//         freed. n_final counts the clusters; train_done pulses.
//  ASSIGN Each vector is compared with the finalized rows and labelled with
//         the nearest one's row number; it is an outlier if none lies within
//         thr.
// retrain clears the memory and starts TRAIN again (used by the
// performance check's sorting-threshold self-tuning).
//
// Interface and timing: a vector is accepted when fv_valid and fv_ready are
// both high at a clock edge. Its result (res_valid for one cycle, res_row,
// res_dist, res_outlier, res_phase) appears ROWS/8 + 1 edges later: eight
// scan cycles and one decision cycle, 9 at the defaults. While merging and
// finalizing fv_ready is low.
module training_unit
  import ss_pkg::*;
#(
  parameter int unsigned TRAIN_LEN = 256,
  parameter int unsigned NMIN      = 4,
  parameter int unsigned MERGE_Q   = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     fv_valid,
  input  fv_t      fv,
  output logic     fv_ready,
  input  dist_t    thr,
  input  logic     retrain,
  output logic     res_valid,
  output row_idx_t res_row,
  output dist_t    res_dist,
  output logic     res_outlier,
  output phase_e   res_phase,
  output phase_e   phase,
  output logic     train_done,
  output logic [ROW_W:0] n_final,
  output logic [ROW_W:0] n_used
);
  localparam int unsigned P     = INTERLEAVE;
  localparam int unsigned NGRP  = ROWS / P;
  localparam int unsigned GRP_W = $clog2(NGRP);
  localparam int unsigned TL_W  = $clog2(TRAIN_LEN + 1);

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_DECIDE, S_MSCAN, S_MDO, S_FINAL} state_e;

  row_t                mem [ROWS];
  state_e              state;
  fv_t                 fv_q;
  logic [GRP_W-1:0]    grp;
  row_idx_t            mi, mj;
  dist_t               best;
  row_idx_t            best_idx;
  logic                found;
  row_idx_t            free_idx;
  logic                free_found;
  logic [TL_W-1:0]     trained;

  // l1-norm engine operands.
  fv_t                 eng_a;
  fv_t                 eng_rows [P];
  dist_t               eng_d [P];
  logic [P-1:0]        cand, hit;
  dist_t               g_best;
  row_idx_t            g_idx;
  logic                g_found;
  row_idx_t            g_free;
  logic                g_free_found;
  row_idx_t            g_hit;
  logic                g_hit_found;

  l1_engine #(.P(P)) u_l1 (.a(eng_a), .rows(eng_rows), .distance(eng_d));

  // Status engine: masks of the rows taking part in the current step, and
  // the search for the best / first-free / first-hit row in the group.
  always_comb begin
    eng_a = (state == S_MSCAN) ? mem[mi].fv : fv_q;
    for (int j = 0; j < P; j++) eng_rows[j] = mem[row_idx_t'(32'(grp) * P + j)].fv;
  end

  // Merging distance: MERGE_Q / 4 times the sorting threshold.
  logic [DIST_W+3:0] merge_thr;
  assign merge_thr = ((DIST_W+4)'(thr) * (DIST_W+4)'(MERGE_Q)) >> 2;

  always_comb begin
    g_best = '1; g_idx = '0; g_found = 1'b0;
    g_free = '0; g_free_found = 1'b0;
    g_hit  = '0; g_hit_found = 1'b0;
    for (int j = 0; j < P; j++) begin
      row_idx_t r;
      r = row_idx_t'(32'(grp) * P + j);
      unique case (state)
        S_MSCAN: cand[j] = mem[r].status && !mem[r].finalized && (r > mi);
        default: cand[j] = (phase == PH_ASSIGN) ? mem[r].finalized : mem[r].status;
      endcase
      hit[j] = cand[j] && ((DIST_W+4)'(eng_d[j]) <= merge_thr);
      if (cand[j] && (!g_found || eng_d[j] < g_best)) begin
        g_best  = eng_d[j];
        g_idx   = r;
        g_found = 1'b1;
      end
      if (!mem[r].status && !g_free_found) begin
        g_free       = r;
        g_free_found = 1'b1;
      end
      if (hit[j] && !g_hit_found) begin
        g_hit       = r;
        g_hit_found = 1'b1;
      end
    end
  end

  // Update engine (B): mean + (fv - mean) / (n + 1).
  function automatic feat_t upd_mean(feat_t m, feat_t v, nospc_t n);
    logic signed [FEAT_W+1:0] d, q;
    d = $signed({{2{v[FEAT_W-1]}}, v}) - $signed({{2{m[FEAT_W-1]}}, m});
    q = d / $signed({1'b0, (FEAT_W+1)'(n) + 1'b1});
    return FEAT_W'($signed({{2{m[FEAT_W-1]}}, m}) + q);
  endfunction

  // Merging engine (A): (na * a + nb * b) / (na + nb).
  function automatic feat_t merge_mean(feat_t a, nospc_t na, feat_t b, nospc_t nb);
    logic signed [FEAT_W+NOSPC_W+1:0] s;
    logic signed [FEAT_W+NOSPC_W+1:0] q;
    s = $signed({{(NOSPC_W+2){a[FEAT_W-1]}}, a}) * $signed({1'b0, (FEAT_W+NOSPC_W+1)'(na)})
      + $signed({{(NOSPC_W+2){b[FEAT_W-1]}}, b}) * $signed({1'b0, (FEAT_W+NOSPC_W+1)'(nb)});
    q = s / $signed({1'b0, (FEAT_W+NOSPC_W+1)'(na) + (FEAT_W+NOSPC_W+1)'(nb)});
    // The weighted mean lies between a and b, so q fits in FEAT_W bits.
    return q[FEAT_W-1:0];
  endfunction

  function automatic nospc_t sat_add(nospc_t a, nospc_t b);
    logic [NOSPC_W:0] s;
    s = (NOSPC_W+1)'(a) + (NOSPC_W+1)'(b);
    return s[NOSPC_W] ? '1 : s[NOSPC_W-1:0];
  endfunction

  always_comb begin
    n_final = '0;
    n_used  = '0;
    for (int r = 0; r < ROWS; r++) begin
      n_final += (ROW_W+1)'(mem[r].finalized);
      n_used  += (ROW_W+1)'(mem[r].status);
    end
  end

  assign fv_ready = (state == S_IDLE) && !retrain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) mem[r] <= '0;
      state       <= S_IDLE;
      phase       <= PH_TRAIN;
      fv_q        <= '0;
      grp         <= '0;
      mi          <= '0;
      mj          <= '0;
      best        <= '1;
      best_idx    <= '0;
      found       <= 1'b0;
      free_idx    <= '0;
      free_found  <= 1'b0;
      trained     <= '0;
      res_valid   <= 1'b0;
      res_row     <= '0;
      res_dist    <= '0;
      res_outlier <= 1'b0;
      res_phase   <= PH_TRAIN;
      train_done  <= 1'b0;
    end else if (retrain) begin
      for (int r = 0; r < ROWS; r++) mem[r] <= '0;
      state      <= S_IDLE;
      phase      <= PH_TRAIN;
      trained    <= '0;
      res_valid  <= 1'b0;
      train_done <= 1'b0;
    end else begin
      res_valid  <= 1'b0;
      train_done <= 1'b0;
      unique case (state)
        S_IDLE: if (fv_valid) begin
          fv_q       <= fv;
          grp        <= '0;
          found      <= 1'b0;
          best       <= '1;
          free_found <= 1'b0;
          state      <= S_SCAN;
        end
        S_SCAN: begin
          if (g_found && (!found || g_best < best)) begin
            best     <= g_best;
            best_idx <= g_idx;
            found    <= 1'b1;
          end
          if (g_free_found && !free_found) begin
            free_idx   <= g_free;
            free_found <= 1'b1;
          end
          grp <= grp + 1'b1;
          if (grp == GRP_W'(NGRP - 1)) state <= S_DECIDE;
        end
        S_DECIDE: begin
          res_valid   <= 1'b1;
          res_row     <= best_idx;
          res_dist    <= best;
          res_outlier <= !(found && best <= thr);
          res_phase   <= phase;
          state       <= S_IDLE;
          if (phase == PH_TRAIN) begin
            if (found && best <= thr) begin
              if (!mem[best_idx].finalized) begin
                for (int i = 0; i < K; i++)
                  mem[best_idx].fv[i] <= upd_mean(mem[best_idx].fv[i], fv_q[i], mem[best_idx].nospc);
                mem[best_idx].nospc     <= sat_add(mem[best_idx].nospc, nospc_t'(1));
                mem[best_idx].finalized <= mem[best_idx].nospc == nospc_t'('1) - 1'b1;
              end
            end else if (free_found) begin
              mem[free_idx].fv        <= fv_q;
              mem[free_idx].status    <= 1'b1;
              mem[free_idx].nospc     <= nospc_t'(1);
              mem[free_idx].finalized <= 1'b0;
            end
            trained <= trained + 1'b1;
            if (trained == TL_W'(TRAIN_LEN - 1)) begin
              phase <= PH_MERGE;
              mi    <= '0;
              grp   <= '0;
              state <= S_MSCAN;
            end
          end
        end
        S_MSCAN: begin
          if (!mem[mi].status || mem[mi].finalized) begin
            grp <= '0;
            mi  <= mi + 1'b1;
            if (mi == row_idx_t'(ROWS - 1)) begin
              phase <= PH_FINAL;
              state <= S_FINAL;
            end
          end else if (g_hit_found) begin
            mj    <= g_hit;
            state <= S_MDO;
          end else begin
            grp <= grp + 1'b1;
            if (grp == GRP_W'(NGRP - 1)) begin
              mi <= mi + 1'b1;
              if (mi == row_idx_t'(ROWS - 1)) begin
                phase <= PH_FINAL;
                state <= S_FINAL;
              end
            end
          end
        end
        S_MDO: begin
          for (int i = 0; i < K; i++)
            mem[mi].fv[i] <= merge_mean(mem[mi].fv[i], mem[mi].nospc, mem[mj].fv[i], mem[mj].nospc);
          mem[mi].nospc <= sat_add(mem[mi].nospc, mem[mj].nospc);
          mem[mj]       <= '0;
          state         <= S_MSCAN;
        end
        S_FINAL: begin
          for (int r = 0; r < ROWS; r++) begin
            if (mem[r].status && (mem[r].finalized || mem[r].nospc >= nospc_t'(NMIN)))
              mem[r].finalized <= 1'b1;
            else
              mem[r] <= '0;
          end
          phase      <= PH_ASSIGN;
          train_done <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
