// traffic_classifier: online, incremental, semi-supervised network traffic
// classifier based on k-means clusters (top level).
//
// Each flow instance is a vector of D = 6 flow features. The classification
// unit assigns it the class of the nearest cluster centroid (Manhattan
// distance) and reports the class on pred_*. The same result goes to the
// incremental_learning unit, which, when the instance lies inside that
// cluster, folds it into the cluster's statistics. Labeled instances from the
// host (lab_*) are learned with priority and may create new clusters. When
// the model reaches K_MAX clusters it is pruned back to K_D by aging
// timestamps. Both units share cluster_memory: unit A (valid, class,
// centroid) has a read port for each; the learning unit alone writes.
// The three-unit structure, the memory split and the sizes (K_MAX = 128,
// K_D = 64, D = 6) follow the reference design, which sits as a stage of a
// packet-switch pipeline after a flow exporter and feature extractor; those
// are outside this design and the instances arrive here as features.
//
// Timing: a classification takes k + D + 4 clocks for k stored clusters
// (74 to 137 clocks for k = 64..127) and the next instance may enter in the
// clock the previous result appears. Learning runs in parallel.
// Interface: valid/ready handshakes on flow_*, lab_* and cf_* (cf_* loads a
// complete cluster record, used for the initial model); pred_valid is a
// one-clock pulse. The ev_* outputs pulse once per learning event.
module traffic_classifier
  import ntc_pkg::*;
#(
  parameter int unsigned K_MAX      = 128,
  parameter int unsigned K_D        = 64,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  // flow instances to classify
  input  logic      flow_valid,
  output logic      flow_ready,
  input  feat_vec_t flow_x,
  // predicted class
  output logic      pred_valid,
  output logic      pred_found,
  output label_t    pred_class,
  output idx_t      pred_cluster,
  output dist_t     pred_distance,
  // labeled instances from the host
  input  logic      lab_valid,
  output logic      lab_ready,
  input  feat_vec_t lab_x,
  input  label_t    lab_y,
  // initial model records from the host
  input  logic      cf_valid,
  output logic      cf_ready,
  input  cluster_t  cf_in,
  // status
  output idx_t      num_clusters,
  output logic      reconstructing,
  output logic      ev_update,
  output logic      ev_new,
  output logic      ev_low_conf,
  output logic      ev_recon,
  output logic      ev_fifo_drop,
  output logic      ev_stale
);

  logic        cls_rd_en, lrn_rd_en, mem_wr_en;
  idx_t        cls_rd_addr, lrn_rd_addr, mem_wr_addr;
  mem_a_t      cls_rd_data;
  cluster_t    lrn_rd_data, mem_wr_data;
  nearest_t    pred;
  logic        learn_valid;
  learn_item_t learn_item;

  classification #(.K_MAX(K_MAX)) u_classification (
    .clk, .rst_n,
    .in_valid(flow_valid), .in_ready(flow_ready), .in_x(flow_x),
    .pred_valid, .pred,
    .learn_valid, .learn_item,
    .mem_rd_en(cls_rd_en), .mem_rd_addr(cls_rd_addr), .mem_rd_data(cls_rd_data)
  );

  incremental_learning #(.K_MAX(K_MAX), .K_D(K_D), .FIFO_DEPTH(FIFO_DEPTH)) u_incremental_learning (
    .clk, .rst_n,
    .cls_valid(learn_valid), .cls_item(learn_item),
    .lab_valid, .lab_ready, .lab_x, .lab_y,
    .cf_valid, .cf_ready, .cf_in,
    .mem_wr_en, .mem_wr_addr, .mem_wr_data,
    .mem_rd_en(lrn_rd_en), .mem_rd_addr(lrn_rd_addr), .mem_rd_data(lrn_rd_data),
    .num_clusters, .reconstructing,
    .ev_update, .ev_new, .ev_low_conf, .ev_recon, .ev_fifo_drop, .ev_stale
  );

  cluster_memory #(.K_MAX(K_MAX)) u_cluster_memory (
    .clk, .rst_n,
    .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .cls_rd_en, .cls_rd_addr, .cls_rd_data,
    .lrn_rd_en, .lrn_rd_addr, .lrn_rd_data
  );

  assign pred_found    = pred.found;
  assign pred_class    = pred.y;
  assign pred_cluster  = pred.idx;
  assign pred_distance = pred.distance;

endmodule
