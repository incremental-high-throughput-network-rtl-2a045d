// ntc_pkg: shared sizes and record types of the incremental k-means
// network traffic classifier.
//
// A cluster is summarised by its Clustering Feature CF = <N, mu, R, U, T, y>.
// The field widths are those of the reference design: y 5 bits, mu 126 bits,
// R 192 bits, U 72 bits, T 11 bits and N 11 bits, 417 bits per cluster. With
// d = 6 flow features this gives 21 bits per centroid feature, 32 bits per
// radius feature and 12 bits per direction feature.
//
// Number formats are this design's own choice: features and centroids are
// unsigned fixed point with FRAC_BITS fraction bits, radii use the same scale
// in a wider word, and U is an unsigned factor with U_FRAC fraction bits.
// Feature i sits at bits [W*i +: W] of a vector.
package ntc_pkg;

  localparam int unsigned D         = 6;    // flow features per instance
  localparam int unsigned FEAT_W    = 21;   // one centroid / feature value
  localparam int unsigned R_W       = 32;   // one radius component
  localparam int unsigned U_W       = 12;   // one direction component
  localparam int unsigned N_W       = 11;   // instance count
  localparam int unsigned T_W       = 11;   // timestamp
  localparam int unsigned Y_W       = 5;    // class label
  localparam int unsigned FRAC_BITS = 16;   // fraction bits of features/radii
  localparam int unsigned U_FRAC    = 11;   // fraction bits of U (1.0 = 2048)
  localparam int unsigned DIST_W    = FEAT_W + $clog2(D);  // Manhattan distance

  // Fixed boundary used for clusters holding a single instance (R = 2).
  localparam logic [DIST_W-1:0] FIX_BOUNDARY = DIST_W'(2) << FRAC_BITS;
  // Initial values of a freshly injected cluster.
  localparam logic [U_W-1:0] U_INIT = U_W'(1) << U_FRAC;
  localparam logic [T_W-1:0] T_INIT = T_W'(1);

  typedef logic [FEAT_W-1:0] feat_t;
  typedef logic [DIST_W-1:0] dist_t;
  typedef logic [Y_W-1:0]    label_t;
  typedef logic [N_W-1:0]    count_t;
  typedef logic [T_W-1:0]    tstamp_t;

  typedef logic [D-1:0][FEAT_W-1:0] feat_vec_t;  // x or mu, 126 bits
  typedef logic [D-1:0][R_W-1:0]    rad_vec_t;   // R, 192 bits
  typedef logic [D-1:0][U_W-1:0]    dir_vec_t;   // U, 72 bits

  // Cluster memory A word (bits 130..0 as laid out, plus a valid bit on top).
  typedef struct packed {
    logic      valid;
    label_t    y;     // 130:126
    feat_vec_t mu;    // 125:0
  } mem_a_t;

  // Cluster memory B word: R, bits 191..0.
  typedef rad_vec_t mem_b_t;

  // Cluster memory C word: U 93:22, N 21:11, T 10:0.
  typedef struct packed {
    dir_vec_t u;
    count_t   n;
    tstamp_t  t;
  } mem_c_t;

  // Complete cluster record as moved between learning units.
  typedef struct packed {
    mem_a_t a;
    mem_b_t b;
    mem_c_t c;
  } cluster_t;

  // How the learning unit treats an instance (Fig. 6 decision).
  typedef enum logic [1:0] {
    LM_NONE   = 2'd0,   // low confidence (L0): nothing is written
    LM_UPDATE = 2'd1,   // update the nearest cluster's CF
    LM_NEW    = 2'd2    // inject a new cluster
  } learn_method_e;

  localparam int unsigned IDX_W = 8;        // cluster address width (k_max <= 256)
  typedef logic [IDX_W-1:0] idx_t;

  // Side information travelling with one cluster through the distance pipeline.
  typedef struct packed {
    logic   live;   // slot carries a scanned memory entry
    logic   cvalid; // that entry holds a valid cluster
    logic   last;   // final entry of this scan
    idx_t   idx;    // its address
    label_t y;      // its class
  } scan_tag_t;

  // Result of a nearest-centroid search.
  typedef struct packed {
    logic      found;   // at least one valid cluster was scanned
    idx_t      idx;     // address of the nearest cluster
    dist_t     distance; // its Manhattan distance
    label_t    y;       // its class
  } nearest_t;

  // Classified instance handed from the classifier to the learning unit.
  typedef struct packed {
    feat_vec_t x;
    nearest_t  nn;
  } learn_item_t;

endpackage
