// boundary_check: decides whether an instance lies inside its nearest
// cluster, which the learning unit reads as high prediction confidence.
//
// Part 1 (clusters with N > 1): the D radius components r^1..r^D of the
// cluster are summed two per step in a chain of adders (r0 = 0,
// r1 = r0 + r^1 + r^2, ...), the sum is divided by N to give the cluster
// radius R, and the instance distance D is compared with R:
// in_boundary_1 = (D <= R). Part 2 (clusters with N = 1, which have no
// radius yet): in_boundary_2 = (D <= 2), the fixed boundary R = 2 in feature
// units. A state machine (WAIT_START, COMPARE_FIX_RADIUS, COMPARE_RADIUS)
// picks the part from N and raises done when the comparison is made.
// The adder chain, the divide by N, the fixed boundary of 2 and the three
// states follow the reference design. That "inside" means "not greater than"
// (the comparators are drawn as '>'), the one-step-per-clock timing and the
// N = 0 guard (treated as N = 1) are this design's choices.
//
// Timing: start in WAIT_START; done pulses 2 clocks later for N = 1 and
// D/2 + 2 clocks later (5 for D = 6) otherwise; in_boundary* hold their value
// until the next start.
module boundary_check
  import ntc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  count_t   n,
  input  dist_t    d,
  input  rad_vec_t r,
  output logic     busy,
  output logic     done,
  output logic     in_boundary,    // selected result
  output logic     in_boundary_1,  // D <= sum(r)/N
  output logic     in_boundary_2   // D <= 2
);

  localparam int unsigned SUM_W  = R_W + $clog2(D);
  localparam int unsigned STEPS  = (D + 1) / 2;   // adders in the chain
  typedef logic [SUM_W-1:0] sum_t;

  typedef enum logic [1:0] { S_WAIT_START, S_COMPARE_FIX, S_COMPARE_RADIUS } bc_state_e;
  bc_state_e state_q;

  count_t   n_q;
  dist_t    d_q;
  rad_vec_t r_q;
  sum_t     acc_q;
  logic [$clog2(STEPS+1)-1:0] step_q;

  sum_t radius;
  sum_t pair;
  int unsigned lo;

  always_comb begin
    radius = acc_q / sum_t'(n_q);
    lo     = 2 * int'(step_q);
    pair   = sum_t'(r_q[lo]);
    if (lo + 1 < D) pair = pair + sum_t'(r_q[lo + 1]);
  end

  assign busy = (state_q != S_WAIT_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_WAIT_START;
      n_q           <= '0;
      d_q           <= '0;
      r_q           <= '0;
      acc_q         <= '0;
      step_q        <= '0;
      done          <= 1'b0;
      in_boundary   <= 1'b0;
      in_boundary_1 <= 1'b0;
      in_boundary_2 <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_WAIT_START: begin
          if (start) begin
            n_q    <= (n == '0) ? count_t'(1) : n;
            d_q    <= d;
            r_q    <= r;
            acc_q  <= '0;
            step_q <= '0;
            state_q <= (n <= count_t'(1)) ? S_COMPARE_FIX : S_COMPARE_RADIUS;
          end
        end
        S_COMPARE_FIX: begin
          in_boundary_2 <= (d_q <= FIX_BOUNDARY);
          in_boundary_1 <= 1'b0;
          in_boundary   <= (d_q <= FIX_BOUNDARY);
          done          <= 1'b1;
          state_q       <= S_WAIT_START;
        end
        S_COMPARE_RADIUS: begin
          if (int'(step_q) < STEPS) begin
            acc_q  <= acc_q + pair;
            step_q <= step_q + 1'b1;
          end else begin
            // radius done: R = sum / N and compare
            in_boundary_1 <= (sum_t'(d_q) <= radius);
            in_boundary_2 <= (d_q <= FIX_BOUNDARY);
            in_boundary   <= (sum_t'(d_q) <= radius);
            done          <= 1'b1;
            state_q       <= S_WAIT_START;
          end
        end
        default: state_q <= S_WAIT_START;
      endcase
    end
  end

endmodule
