// get_nearest: keeps the cluster with the smallest total distance of a scan.
//
// A small state machine watches the distance pipeline output. In WAIT_FIRST
// it takes the first valid distance of a scan as the current minimum; in
// COMPARE it replaces the minimum only by a strictly smaller distance, so on
// a tie the lower cluster address wins (this design's choice). The entry
// marked last closes the scan: one clock later result_valid pulses with the
// nearest cluster's address, distance and class. A scan without any valid
// cluster returns found = 0. That the comparison starts with the first valid
// distance follows the classification block description.
//
// Latency: 1 clock from the last entry to result_valid.
module get_nearest
  import ntc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  scan_tag_t in_tag,
  input  dist_t     distance,
  output logic      result_valid,
  output nearest_t  result
);

  typedef enum logic { WAIT_FIRST, COMPARE } gn_state_e;
  gn_state_e state_q;
  nearest_t  best_q;

  // Best candidate including the entry currently presented.
  nearest_t  best_c;
  logic      take;

  always_comb begin
    take   = in_tag.live && in_tag.cvalid &&
             ((state_q == WAIT_FIRST) || (distance < best_q.distance));
    best_c = (state_q == WAIT_FIRST) ? '0 : best_q;
    if (take) begin
      best_c.found = 1'b1;
      best_c.idx   = in_tag.idx;
      best_c.distance  = distance;
      best_c.y     = in_tag.y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= WAIT_FIRST;
      best_q       <= '0;
      result_valid <= 1'b0;
      result       <= '0;
    end else begin
      result_valid <= 1'b0;
      if (in_tag.live) begin
        if (in_tag.last) begin
          result_valid <= 1'b1;
          result       <= best_c;
          state_q      <= WAIT_FIRST;
          best_q       <= '0;
        end else begin
          best_q <= best_c;
          if (take) state_q <= COMPARE;
        end
      end
    end
  end

endmodule
