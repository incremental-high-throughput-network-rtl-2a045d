// classification: online classifier. Assigns a flow instance the class of
// its nearest cluster centroid under the Manhattan distance.
//
// On accepting an instance the scan sequencer reads cluster memory A from
// address 0 upwards, one entry per clock. Each entry goes through
// compare_input (orders x and mu per feature), the D-stage
// distance_calc_pipeline (sums |x - mu|) and get_nearest (keeps the minimum).
// The valid bit stored with every entry tells which addresses hold a cluster:
// the scan ends at the first invalid entry or at address K_MAX-1. With k
// valid clusters stored from address 0 the predicted class appears
// k + D + 4 clocks after the instance is accepted (1 issue, 1 memory, 1
// compare, D pipeline, 1 get_nearest), which is the cycle count given for
// the reference design; one instance is classified at a time, and the next
// may be accepted in the clock the result appears.
// The sub-block structure and the cycle count follow the reference design;
// the valid/ready handshake and the end-of-scan rule are this design's.
//
// Interface: in_valid/in_ready/in_x takes an instance. pred_valid pulses for
// one clock with pred (found, nearest address, distance, class). The same
// result together with x is offered to the learning unit on learn_valid /
// learn_item (no back-pressure: the learning FIFO drops it when full).
// mem_rd_en/mem_rd_addr/mem_rd_data is a read port of memory A with one
// clock of read latency.
module classification
  import ntc_pkg::*;
#(
  parameter int unsigned K_MAX = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  // flow instance
  input  logic        in_valid,
  output logic        in_ready,
  input  feat_vec_t   in_x,
  // predicted class
  output logic        pred_valid,
  output nearest_t    pred,
  // nearest cluster information for the learning unit
  output logic        learn_valid,
  output learn_item_t learn_item,
  // cluster memory A read port
  output logic        mem_rd_en,
  output idx_t        mem_rd_addr,
  input  mem_a_t      mem_rd_data
);

  typedef enum logic { S_IDLE, S_BUSY } cls_state_e;
  cls_state_e state_q;

  feat_vec_t x_q;
  logic      issuing_q;   // sequencer still issuing reads
  logic      scan_open_q; // last entry not yet seen at the memory output
  idx_t      addr_q;
  logic      rd_live_q;   // a read was issued in the previous clock
  logic      rd_last_q;
  idx_t      rd_idx_q;

  scan_tag_t mem_tag, cmp_tag, pipe_tag;
  feat_vec_t greater, smaller;
  dist_t     distance;
  logic      res_valid;
  nearest_t  res;

  assign in_ready    = (state_q == S_IDLE) || res_valid;
  assign mem_rd_en   = issuing_q;
  assign mem_rd_addr = addr_q;

  // Entry arriving from memory A in this clock.
  always_comb begin
    mem_tag        = '0;
    mem_tag.live   = rd_live_q && scan_open_q;
    mem_tag.cvalid = mem_rd_data.valid;
    mem_tag.last   = rd_last_q || !mem_rd_data.valid;
    mem_tag.idx    = rd_idx_q;
    mem_tag.y      = mem_rd_data.y;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      x_q         <= '0;
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
      if (res_valid) state_q <= S_IDLE;
      if (in_valid && in_ready) begin
        state_q     <= S_BUSY;
        x_q         <= in_x;
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
    .distance   (distance)
  );

  get_nearest u_get_nearest (
    .clk, .rst_n,
    .in_tag      (pipe_tag),
    .distance        (distance),
    .result_valid(res_valid),
    .result      (res)
  );

  assign pred_valid    = res_valid;
  assign pred          = res;
  assign learn_valid   = res_valid;
  assign learn_item.x  = x_q;
  assign learn_item.nn = res;

  // Only one instance is in flight, so the result belongs to x_q.
  a_one_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid |-> state_q == S_BUSY);

endmodule
