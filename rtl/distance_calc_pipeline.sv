// distance_calc_pipeline: Manhattan distance between a flow instance and one
// cluster centroid, one feature per pipeline stage.
//
// The pipeline has D stages, D being the number of features. Stage j adds
// greater[j] - smaller[j] (the absolute difference of feature j, already
// ordered by compare_input) to the running sum handed on from stage j-1.
// A new cluster can enter every clock, so a scan over k clusters streams
// through in k + D clocks. This is the structure the classification block
// describes; the register layout (all operands travel with the sum) is this
// design's choice.
//
// Interface: in_tag qualifies greater/smaller; distance/out_tag appear D clocks
// later. Latency: D clocks, throughput one cluster per clock.
module distance_calc_pipeline
  import ntc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  scan_tag_t in_tag,
  input  feat_vec_t greater,
  input  feat_vec_t smaller,
  output scan_tag_t out_tag,
  output dist_t     distance
);

  // Stage registers: index j holds the state after stage j+1.
  scan_tag_t tag_q [D];
  dist_t     acc_q [D];
  feat_vec_t g_q   [D];
  feat_vec_t s_q   [D];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < D; j++) begin
        tag_q[j] <= '0;
        acc_q[j] <= '0;
        g_q[j]   <= '0;
        s_q[j]   <= '0;
      end
    end else begin
      tag_q[0] <= in_tag;
      g_q[0]   <= greater;
      s_q[0]   <= smaller;
      acc_q[0] <= dist_t'(greater[0]) - dist_t'(smaller[0]);
      for (int j = 1; j < D; j++) begin
        tag_q[j] <= tag_q[j-1];
        g_q[j]   <= g_q[j-1];
        s_q[j]   <= s_q[j-1];
        acc_q[j] <= acc_q[j-1] + dist_t'(g_q[j-1][j]) - dist_t'(s_q[j-1][j]);
      end
    end
  end

  assign out_tag = tag_q[D-1];
  assign distance    = acc_q[D-1];

endmodule
