// ss_pkg: types and constants shared by the spike sorting processor.
//
// The processor works on signed ADC samples, cuts aligned spike windows,
// decomposes them with adaptive discrete derivatives (ADDs) and keeps six
// extrema features (K = 6) per spike for clustering in a 64-row training
// memory. K = 6, the 64 rows, the 1-bit status / 6-bit NOSPC / 1-bit finalized
// row fields, the 8-way interleaving, delta = 1..7 and omega = 2 follow the
// document. Sample and feature widths, the spike window length and the peak
// position in the window are this design's own choices.
package ss_pkg;

  // Sample and feature formats (assumed widths).
  localparam int unsigned SAMPLE_W = 10;              // ADC sample, two's complement
  localparam int unsigned FEAT_W   = SAMPLE_W + 1;    // s(n) - s(n - delta) needs one more bit
  localparam int unsigned K        = 6;               // features per spike
  localparam int unsigned NDELTA   = 7;               // delta = 1 .. 7
  localparam int unsigned NLINES   = 3;               // scaling1 .. scaling3
  localparam int unsigned DIST_W   = FEAT_W + 4;      // sum of six |a-b| of FEAT_W-bit values

  // Training memory geometry.
  localparam int unsigned ROWS       = 64;
  localparam int unsigned ROW_W      = $clog2(ROWS);
  localparam int unsigned NOSPC_W    = 6;
  localparam int unsigned INTERLEAVE = 8;             // rows compared per cycle

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [FEAT_W-1:0]   feat_t;
  typedef logic        [DIST_W-1:0]   dist_t;
  typedef logic        [2:0]          delta_t;        // 1 .. 7
  typedef logic        [NOSPC_W-1:0]  nospc_t;
  typedef logic        [ROW_W-1:0]    row_idx_t;

  // Feature vector FV0..FV5: {max, min} of decomposition lines 1, 2, 3.
  typedef feat_t [K-1:0] fv_t;

  // One training-memory row: C0-C5 features, C6 status, C7 NOSPC, C8 finalized.
  typedef struct packed {
    fv_t    fv;
    logic   status;
    nospc_t nospc;
    logic   finalized;
  } row_t;

  // Phase of the clustering unit.
  typedef enum logic [1:0] {
    PH_TRAIN  = 2'd0,
    PH_MERGE  = 2'd1,
    PH_FINAL  = 2'd2,
    PH_ASSIGN = 2'd3
  } phase_e;

  // |a - b| of two features.
  function automatic logic [FEAT_W:0] abs_diff(feat_t a, feat_t b);
    logic signed [FEAT_W:0] d;
    d = $signed({a[FEAT_W-1], a}) - $signed({b[FEAT_W-1], b});
    return d[FEAT_W] ? (FEAT_W+1)'(-d) : (FEAT_W+1)'(d);
  endfunction

  // l1-norm between two feature vectors.
  function automatic dist_t l1_dist(fv_t a, fv_t b);
    dist_t s;
    s = '0;
    for (int i = 0; i < K; i++) s += DIST_W'(abs_diff(a[i], b[i]));
    return s;
  endfunction

endpackage
