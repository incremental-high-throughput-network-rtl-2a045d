// cluster_update: computes the new Clustering Feature of the nearest cluster
// after it absorbs an instance x, or builds a new cluster from x.
//
// Per feature, following the CF update data-flow graph:
//   q     = |x - mu| / N
//   mu'   = (mu * N + x) / (N + 1)
//   R'    = R + u * q + |x - mu'|
// and once per cluster N' = N + 1 and T' = T + 1. The features are processed
// one after another (serial at feature level, to save hardware), each in
// five clocked steps: (1) |x - mu| and mu * N, (2) the divide by N and
// + x, (3) * u and the divide by N + 1, (4) |x - mu'|, (5) the sum into R'.
// An update therefore takes 5*D + 1 clocks from start to the write. A new
// cluster (N = 1, mu = x, R = 0, U = U_INIT, T = T_INIT, class = label) or a
// low-confidence instance (nothing written) takes 1 clock.
// The equations, the serial schedule and the cycle counts follow the
// reference design. The fixed-point scaling (u has U_FRAC fraction bits),
// truncating division, saturation of R, N and T, leaving U unchanged (the
// data-flow graph gives no update for it) and the initial U and T of a new
// cluster are this design's choices.
//
// Interface: start with method, addr, x, label and the current record cf
// (ignored for LM_NEW) while busy is low. done pulses for one clock; in that
// clock wr_en/wr_addr/wr_cf carry the record to write (wr_en low for
// LM_NONE).
module cluster_update
  import ntc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  learn_method_e method,
  input  idx_t          addr,
  input  feat_vec_t     x,
  input  label_t        label,
  input  cluster_t      cf,
  output logic          busy,
  output logic          done,
  output logic          wr_en,
  output idx_t          wr_addr,
  output cluster_t      wr_cf
);

  localparam int unsigned MN_W = FEAT_W + N_W + 1;          // mu*N + x
  localparam int unsigned W_W  = U_W + FEAT_W;              // u * q
  localparam int unsigned RS_W = R_W + 2;                   // R' before saturation
  localparam int unsigned FW   = $clog2(D);

  typedef enum logic { S_WAIT_START, S_CALCULATE_CF } cu_state_e;
  cu_state_e state_q;

  cluster_t  cf_q;
  feat_vec_t x_q;
  idx_t      addr_q;
  logic [FW-1:0] f_q;      // feature being processed
  logic [2:0]    s_q;      // step 0..4
  count_t    n_new;

  // per-feature working registers
  feat_t             diff_q, q_q, mnew_q, diff2_q;
  logic [MN_W-1:0]   mn_q;
  logic [W_W-1:0]    w_q;
  feat_vec_t         mu_w_q;
  rad_vec_t          r_w_q;

  feat_t  xf, muf;
  logic [MN_W-1:0] mnew_full;
  logic [W_W-1:0]  w_full;
  logic [RS_W-1:0] r_sum;

  always_comb begin
    xf        = x_q[f_q];
    muf       = cf_q.a.mu[f_q];
    n_new     = (cf_q.c.n == '1) ? cf_q.c.n : cf_q.c.n + 1'b1;
    mnew_full = mn_q / MN_W'(n_new);
    w_full    = (W_W'(cf_q.c.u[f_q]) * W_W'(q_q)) >> U_FRAC;
    r_sum     = RS_W'(cf_q.b[f_q]) + RS_W'(w_q) + RS_W'(diff2_q);
  end

  assign busy = (state_q != S_WAIT_START);

  function automatic feat_t absdiff(input feat_t a, input feat_t b);
    return (a >= b) ? a - b : b - a;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_WAIT_START;
      cf_q    <= '0;
      x_q     <= '0;
      addr_q  <= '0;
      f_q     <= '0;
      s_q     <= '0;
      diff_q  <= '0;
      q_q     <= '0;
      mnew_q  <= '0;
      diff2_q <= '0;
      mn_q    <= '0;
      w_q     <= '0;
      mu_w_q  <= '0;
      r_w_q   <= '0;
      done    <= 1'b0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_cf   <= '0;
    end else begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      unique case (state_q)
        S_WAIT_START: begin
          if (start) begin
            cf_q   <= cf;
            x_q    <= x;
            addr_q <= addr;
            f_q    <= '0;
            s_q    <= '0;
            mu_w_q <= cf.a.mu;
            r_w_q  <= cf.b;
            if (method == LM_NEW) begin
              // inject a new cluster in one clock
              done          <= 1'b1;
              wr_en         <= 1'b1;
              wr_addr       <= addr;
              wr_cf.a.valid <= 1'b1;
              wr_cf.a.y     <= label;
              wr_cf.a.mu    <= x;
              wr_cf.b       <= '0;
              wr_cf.c.u     <= {D{U_INIT}};
              wr_cf.c.n     <= count_t'(1);
              wr_cf.c.t     <= T_INIT;
            end else if (method == LM_UPDATE) begin
              state_q <= S_CALCULATE_CF;
            end else begin
              done <= 1'b1;   // low confidence: no learning
            end
          end
        end
        S_CALCULATE_CF: begin
          unique case (s_q)
            3'd0: begin
              diff_q <= absdiff(xf, muf);
              mn_q   <= MN_W'(muf) * MN_W'(cf_q.c.n);
            end
            3'd1: begin
              q_q  <= diff_q / feat_t'(cf_q.c.n);
              mn_q <= mn_q + MN_W'(xf);
            end
            3'd2: begin
              w_q    <= w_full;
              mnew_q <= feat_t'(mnew_full);
            end
            3'd3: begin
              diff2_q <= absdiff(xf, mnew_q);
            end
            default: begin
              mu_w_q[f_q] <= mnew_q;
              r_w_q[f_q]  <= (r_sum > RS_W'({R_W{1'b1}})) ? {R_W{1'b1}} : r_sum[R_W-1:0];
            end
          endcase
          if (s_q == 3'd4) begin
            s_q <= '0;
            if (f_q == FW'(D - 1)) begin
              // radius done: write back the whole record
              state_q     <= S_WAIT_START;
              done        <= 1'b1;
              wr_en       <= 1'b1;
              wr_addr     <= addr_q;
              wr_cf.a.valid <= 1'b1;
              wr_cf.a.y   <= cf_q.a.y;
              wr_cf.a.mu  <= mu_w_q;
              wr_cf.a.mu[f_q] <= mnew_q;
              wr_cf.b     <= r_w_q;
              wr_cf.b[f_q] <= (r_sum > RS_W'({R_W{1'b1}})) ? {R_W{1'b1}} : r_sum[R_W-1:0];
              wr_cf.c.u   <= cf_q.c.u;
              wr_cf.c.n   <= n_new;
              wr_cf.c.t   <= (cf_q.c.t == '1) ? cf_q.c.t : cf_q.c.t + 1'b1;
            end else begin
              f_q <= f_q + 1'b1;
            end
          end else begin
            s_q <= s_q + 1'b1;
          end
        end
        default: state_q <= S_WAIT_START;
      endcase
    end
  end

endmodule
