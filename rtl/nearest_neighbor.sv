// nearest_neighbor: nearest-centroid search used inside the learning unit.
//
// It has the architecture of the classification block (scan sequencer,
// compare_input, D-stage distance_calc_pipeline, get_nearest) but reports
// the nearest cluster's address and minimum distance instead of a predicted
// class. The learning unit uses it for labeled instances from the host,
// which arrive without a classifier result. A search over k valid clusters
// stored from address 0 ends k + D + 4 clocks after start, as in the
// classifier. The scan end rule (first invalid entry or address K_MAX-1)
// and the start/done handshake are this design's choices.
//
// Interface: start (one clock, with x) begins a search while busy is low;
// done pulses for one clock with found, idx and distance. mem_rd_* is a read
// port of cluster memory A with one clock of read latency.
module nearest_neighbor
  import ntc_pkg::*;
#(
  parameter int unsigned K_MAX = 128
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  feat_vec_t x,
  output logic      busy,
  output logic      done,
  output logic      found,
  output idx_t      idx,
  output dist_t     distance,
  // cluster memory A read port
  output logic      mem_rd_en,
  output idx_t      mem_rd_addr,
  input  mem_a_t    mem_rd_data
);

  feat_vec_t x_q;
  logic      busy_q;
  logic      issuing_q;
  logic      scan_open_q;
  idx_t      addr_q;
  logic      rd_live_q;
  logic      rd_last_q;
  idx_t      rd_idx_q;

  scan_tag_t mem_tag, cmp_tag, pipe_tag;
  feat_vec_t greater, smaller;
  dist_t     pipe_dist;
  logic      res_valid;
  nearest_t  res;

  assign busy        = busy_q;
  assign mem_rd_en   = issuing_q;
  assign mem_rd_addr = addr_q;

  always_comb begin
    mem_tag        = '0;
    mem_tag.live   = rd_live_q && scan_open_q;
    mem_tag.cvalid = mem_rd_data.valid;
    mem_tag.last   = rd_last_q || !mem_rd_data.valid;
    mem_tag.idx    = rd_idx_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q         <= '0;
      busy_q      <= 1'b0;
      issuing_q   <= 1'b0;
      scan_open_q <= 1'b0;
      addr_q      <= '0;
      rd_live_q   <= 1'b0;
      rd_last_q   <= 1'b0;
      rd_idx_q    <= '0;
    end else begin
      rd_live_q <= issuing_q;
      rd_last_q <= (addr_q == idx_t'(K_MAX - 1));
      rd_idx_q  <= addr_q;
      if (issuing_q) begin
        addr_q <= addr_q + 1'b1;
        if (addr_q == idx_t'(K_MAX - 1)) issuing_q <= 1'b0;
      end
      if (mem_tag.live && mem_tag.last) begin
        scan_open_q <= 1'b0;
        issuing_q   <= 1'b0;
      end
      if (res_valid) busy_q <= 1'b0;
      if (start && !busy_q) begin
        busy_q      <= 1'b1;
        x_q         <= x;
        addr_q      <= '0;
        issuing_q   <= 1'b1;
        scan_open_q <= 1'b1;
      end
    end
  end

  compare_input u_compare_input (
    .clk, .rst_n,
    .in_tag (mem_tag),
    .x      (x_q),
    .mu     (mem_rd_data.mu),
    .out_tag(cmp_tag),
    .greater(greater),
    .smaller(smaller)
  );

  distance_calc_pipeline u_distance_calc_pipeline (
    .clk, .rst_n,
    .in_tag (cmp_tag),
    .greater(greater),
    .smaller(smaller),
    .out_tag(pipe_tag),
    .distance   (pipe_dist)
  );

  get_nearest u_get_nearest (
    .clk, .rst_n,
    .in_tag      (pipe_tag),
    .distance        (pipe_dist),
    .result_valid(res_valid),
    .result      (res)
  );

  assign done  = res_valid;
  assign found = res.found;
  assign idx   = res.idx;
  assign distance  = res.distance;

endmodule
