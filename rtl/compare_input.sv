// compare_input: front stage of the nearest-centroid search.
//
// For every one of the D features it compares the flow instance value x[i]
// with the cluster centroid mu[i] and routes the larger value to greater[i]
// and the smaller one to smaller[i], so that the distance pipeline after it
// only ever subtracts smaller from greater and never needs a sign.
// The ordering follows the Compare_Input module of the classification block
// diagram; registering its outputs is this design's choice.
//
// Interface: in_tag qualifies x/mu (in_tag.live), out_tag follows one cycle
// later together with the ordered pairs. Latency: 1 clock.
module compare_input
  import ntc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  scan_tag_t in_tag,
  input  feat_vec_t x,
  input  feat_vec_t mu,
  output scan_tag_t out_tag,
  output feat_vec_t greater,
  output feat_vec_t smaller
);

  feat_vec_t g_c, s_c;

  always_comb begin
    for (int i = 0; i < D; i++) begin
      if (x[i] >= mu[i]) begin
        g_c[i] = x[i];
        s_c[i] = mu[i];
      end else begin
        g_c[i] = mu[i];
        s_c[i] = x[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_tag <= '0;
      greater <= '0;
      smaller <= '0;
    end else begin
      out_tag <= in_tag;
      greater <= g_c;
      smaller <= s_c;
    end
  end

endmodule
