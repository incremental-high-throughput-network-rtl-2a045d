// incremental_learning: keeps the cluster model up to date while the
// classifier runs. It is the only unit that writes the cluster memory.
//
// Inputs are (a) classified instances from the classifier, with their
// nearest cluster, buffered in a FIFO because learning one instance can take
// longer than classifying it, and (b) labeled instances from the host, which
// have priority and are not buffered. A controlling state machine takes one
// instance at a time:
//   - a labeled instance first goes through nearest_neighbor to find its
//     nearest cluster; a classified instance already carries it;
//   - the nearest cluster's record is read and boundary_check decides whether
//     the instance lies inside it (high confidence);
//   - cluster_update then either updates that cluster (inside; for a labeled
//     instance also only if the class matches), injects a new cluster at the
//     next free address (labeled instance outside, or of another class, or
//     no cluster at all), or does nothing (classified instance outside: low
//     confidence, L0);
//   - once the number of clusters reaches K_MAX, reconstruction prunes the
//     model back to K_D clusters. Meanwhile host instances wait and
//     classified instances collect in the FIFO.
// A third input, cf_*, appends a complete cluster record; it loads the
// initial model built offline from labeled data.
// The units, the FIFO, the host priority and the reconstruction trigger
// follow the reference design. The decision rules above, dropping a
// classified instance when the FIFO is full (the classifier is never
// stalled), skipping one whose cluster address is no longer valid, the FIFO
// depth and the preload port are this design's choices.
//
// Timing: a classified instance takes about 10 clocks (low confidence) to
// 45 clocks (update) from the FIFO to the memory write.
module incremental_learning
  import ntc_pkg::*;
#(
  parameter int unsigned K_MAX      = 128,
  parameter int unsigned K_D        = 64,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // classified instances from the classifier (no back-pressure)
  input  logic        cls_valid,
  input  learn_item_t cls_item,
  // labeled instances from the host
  input  logic        lab_valid,
  output logic        lab_ready,
  input  feat_vec_t   lab_x,
  input  label_t      lab_y,
  // complete cluster records from the host (initial model)
  input  logic        cf_valid,
  output logic        cf_ready,
  input  cluster_t    cf_in,
  // cluster memory
  output logic        mem_wr_en,
  output idx_t        mem_wr_addr,
  output cluster_t    mem_wr_data,
  output logic        mem_rd_en,
  output idx_t        mem_rd_addr,
  input  cluster_t    mem_rd_data,
  // status and event pulses
  output idx_t        num_clusters,
  output logic        reconstructing,
  output logic        ev_update,
  output logic        ev_new,
  output logic        ev_low_conf,
  output logic        ev_recon,
  output logic        ev_fifo_drop,
  output logic        ev_stale
);

  typedef enum logic [2:0] {
    S_IDLE, S_NN_WAIT, S_RD, S_RD_WAIT, S_BC, S_CU_GO, S_CU_WAIT, S_RECON
  } il_state_e;
  il_state_e state_q;

  idx_t          count_q;
  feat_vec_t     cur_x_q;
  label_t        cur_y_q;
  logic          cur_lab_q;
  idx_t          cur_idx_q;
  dist_t         cur_dist_q;
  cluster_t      rec_q;
  learn_method_e method_q;
  idx_t          cu_addr_q;

  // FIFO of classified instances
  logic        q_pop, q_empty, q_ovf;
  learn_item_t q_dout;

  sync_fifo #(.T(learn_item_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(cls_valid), .din(cls_item),
    .pop(q_pop), .dout(q_dout),
    .full(), .empty(q_empty), .count(), .overflow(q_ovf)
  );

  // Nearest neighbour for labeled instances
  logic   nn_start, nn_busy, nn_done, nn_found;
  idx_t   nn_idx;
  dist_t  nn_dist;
  logic   nn_rd_en;
  idx_t   nn_rd_addr;

  nearest_neighbor #(.K_MAX(K_MAX)) u_nearest_neighbor (
    .clk, .rst_n,
    .start(nn_start), .x(lab_x),
    .busy(nn_busy), .done(nn_done), .found(nn_found), .idx(nn_idx), .distance(nn_dist),
    .mem_rd_en(nn_rd_en), .mem_rd_addr(nn_rd_addr), .mem_rd_data(mem_rd_data.a)
  );

  // Boundary check on the record just read
  logic bc_start, bc_done, bc_in;

  boundary_check u_boundary_check (
    .clk, .rst_n,
    .start(bc_start), .n(mem_rd_data.c.n), .d(cur_dist_q), .r(mem_rd_data.b),
    .busy(), .done(bc_done),
    .in_boundary(bc_in), .in_boundary_1(), .in_boundary_2()
  );

  // CF update / new cluster injection
  logic     cu_start, cu_done, cu_wr_en;
  idx_t     cu_wr_addr;
  cluster_t cu_wr_cf;

  cluster_update u_cluster_update (
    .clk, .rst_n,
    .start(cu_start), .method(method_q), .addr(cu_addr_q),
    .x(cur_x_q), .label(cur_y_q), .cf(rec_q),
    .busy(), .done(cu_done),
    .wr_en(cu_wr_en), .wr_addr(cu_wr_addr), .wr_cf(cu_wr_cf)
  );

  // Reconstruction
  logic     rc_start, rc_busy, rc_done, rc_rd_en, rc_wr_en;
  idx_t     rc_total, rc_rd_addr, rc_wr_addr;
  cluster_t rc_wr_data;

  reconstruction #(.K_MAX(K_MAX), .K_D(K_D)) u_reconstruction (
    .clk, .rst_n,
    .start(rc_start), .busy(rc_busy), .done(rc_done), .total(rc_total),
    .mem_rd_en(rc_rd_en), .mem_rd_addr(rc_rd_addr), .mem_rd_data(mem_rd_data),
    .mem_wr_en(rc_wr_en), .mem_wr_addr(rc_wr_addr), .mem_wr_data(rc_wr_data)
  );

  // ---------------------------------------------------------------- control
  logic need_recon, take_lab, take_cf, take_cls, cls_usable;

  assign need_recon = (count_q >= idx_t'(K_MAX));
  assign lab_ready  = (state_q == S_IDLE) && !need_recon;
  assign take_lab   = lab_valid && lab_ready;
  assign cf_ready   = (state_q == S_IDLE) && !need_recon && !lab_valid;
  assign take_cf    = cf_valid && cf_ready;
  assign take_cls   = (state_q == S_IDLE) && !need_recon && !lab_valid && !cf_valid && !q_empty;
  assign cls_usable = q_dout.nn.found && (q_dout.nn.idx < count_q);

  assign q_pop    = take_cls;
  assign nn_start = take_lab;
  assign rc_start = (state_q == S_IDLE) && need_recon;
  assign bc_start = (state_q == S_RD_WAIT) && mem_rd_data.a.valid;
  assign cu_start = (state_q == S_CU_GO);

  assign num_clusters   = count_q;
  assign reconstructing = (state_q == S_RECON);

  // Memory port sharing: one owner at a time by construction of the FSM.
  always_comb begin
    mem_rd_en   = 1'b0;
    mem_rd_addr = cur_idx_q;
    if (rc_busy) begin
      mem_rd_en   = rc_rd_en;
      mem_rd_addr = rc_rd_addr;
    end else if (nn_busy) begin
      mem_rd_en   = nn_rd_en;
      mem_rd_addr = nn_rd_addr;
    end else if (state_q == S_RD) begin
      mem_rd_en   = 1'b1;
    end

    mem_wr_en   = 1'b0;
    mem_wr_addr = count_q;
    mem_wr_data = cf_in;
    if (rc_busy) begin
      mem_wr_en   = rc_wr_en;
      mem_wr_addr = rc_wr_addr;
      mem_wr_data = rc_wr_data;
    end else if (cu_wr_en) begin
      mem_wr_en   = 1'b1;
      mem_wr_addr = cu_wr_addr;
      mem_wr_data = cu_wr_cf;
    end else if (take_cf) begin
      mem_wr_en   = 1'b1;
      mem_wr_data.a.valid = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      count_q    <= '0;
      cur_x_q    <= '0;
      cur_y_q    <= '0;
      cur_lab_q  <= 1'b0;
      cur_idx_q  <= '0;
      cur_dist_q <= '0;
      rec_q      <= '0;
      method_q   <= LM_NONE;
      cu_addr_q  <= '0;
      ev_update  <= 1'b0;
      ev_new     <= 1'b0;
      ev_low_conf <= 1'b0;
      ev_recon   <= 1'b0;
      ev_fifo_drop <= 1'b0;
      ev_stale   <= 1'b0;
    end else begin
      ev_update    <= 1'b0;
      ev_new       <= 1'b0;
      ev_low_conf  <= 1'b0;
      ev_recon     <= 1'b0;
      ev_fifo_drop <= q_ovf;
      ev_stale     <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (rc_start) begin
            state_q  <= S_RECON;
            ev_recon <= 1'b1;
          end else if (take_lab) begin
            cur_x_q   <= lab_x;
            cur_y_q   <= lab_y;
            cur_lab_q <= 1'b1;
            state_q   <= S_NN_WAIT;
          end else if (take_cf) begin
            count_q <= count_q + 1'b1;
          end else if (take_cls) begin
            cur_x_q    <= q_dout.x;
            cur_y_q    <= q_dout.nn.y;
            cur_lab_q  <= 1'b0;
            cur_idx_q  <= q_dout.nn.idx;
            cur_dist_q <= q_dout.nn.distance;
            if (cls_usable) state_q <= S_RD;
            else            ev_stale <= 1'b1;
          end
        end
        S_NN_WAIT: begin
          if (nn_done) begin
            if (nn_found) begin
              cur_idx_q  <= nn_idx;
              cur_dist_q <= nn_dist;
              state_q    <= S_RD;
            end else begin
              method_q  <= LM_NEW;
              cu_addr_q <= count_q;
              state_q   <= S_CU_GO;
            end
          end
        end
        S_RD: state_q <= S_RD_WAIT;
        S_RD_WAIT: begin
          rec_q <= mem_rd_data;
          if (mem_rd_data.a.valid) begin
            state_q <= S_BC;
          end else if (cur_lab_q) begin
            method_q  <= LM_NEW;
            cu_addr_q <= count_q;
            state_q   <= S_CU_GO;
          end else begin
            ev_stale <= 1'b1;
            state_q  <= S_IDLE;
          end
        end
        S_BC: begin
          if (bc_done) begin
            state_q <= S_CU_GO;
            if (cur_lab_q) begin
              if (bc_in && (rec_q.a.y == cur_y_q)) begin
                method_q  <= LM_UPDATE;
                cu_addr_q <= cur_idx_q;
              end else begin
                method_q  <= LM_NEW;
                cu_addr_q <= count_q;
              end
            end else begin
              method_q  <= bc_in ? LM_UPDATE : LM_NONE;
              cu_addr_q <= cur_idx_q;
            end
          end
        end
        S_CU_GO: state_q <= S_CU_WAIT;
        S_CU_WAIT: begin
          if (cu_done) begin
            state_q <= S_IDLE;
            unique case (method_q)
              LM_NEW: begin
                count_q <= count_q + 1'b1;
                ev_new  <= 1'b1;
              end
              LM_UPDATE: ev_update   <= 1'b1;
              default:   ev_low_conf <= 1'b1;
            endcase
          end
        end
        S_RECON: begin
          if (rc_done) begin
            count_q <= rc_total;
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_single_writer: assert property (@(posedge clk) disable iff (!rst_n)
    !(rc_busy && cu_wr_en));
  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n)
    !(nn_busy && rc_busy));

endmodule
