// l1_engine: interleaved l1-norm engine of the training unit.
//
// Computes the l1-norm sum_i |a_i - b_i| between one feature vector and P
// training-memory rows in parallel. The document interleaves eight rows per
// step in its l1-norm and merging engines (P = 8) to minimise the
// power-area product, so a 64-row scan takes eight steps. The engine is
// purely combinational; the caller registers the result.
module l1_engine
  import ss_pkg::*;
#(
  parameter int unsigned P = INTERLEAVE
) (
  input  fv_t   a,
  input  fv_t   rows [P],
  output dist_t distance [P]
);
  always_comb begin
    for (int j = 0; j < P; j++) distance[j] = l1_dist(a, rows[j]);
  end
endmodule
