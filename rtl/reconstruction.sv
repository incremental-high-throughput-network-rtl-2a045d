// reconstruction: bounds the model size. When the number of clusters reaches
// K_MAX the learning unit starts this block, which ages every cluster and
// keeps K_D of them.
//
// Phase READ copies the cluster memory into a K_MAX-deep FIFO: each valid
// cluster with timestamp t != 0 is pushed with t - 1, clusters with t = 0 are
// discarded. Phase PRUNE runs while the FIFO holds more than K_D clusters:
// the head is popped, discarded if its t is 0, otherwise pushed back with
// t - 1 (the FIFO output loops back through the same t check). Phase WRITE
// writes the FIFO contents to addresses 0, 1, ... and an empty (invalid)
// record to every remaining address up to K_MAX - 1, so the write-back takes
// K_MAX clocks and leaves the clusters packed from address 0.
// The FIFO, the t check, the loop while total > K_D and the write-back of
// empty clusters follow the reference design; that t is also decremented on
// every pass of the loop (needed for the loop to end) and that fewer than
// K_D clusters may survive when many have t = 0 are this design's reading.
//
// Interface: start while busy is low; done pulses for one clock with total,
// the number of clusters written back. mem_rd_* reads a whole record with one
// clock of latency; mem_wr_* writes one.
// Timing: READ K_MAX + 1 clocks, PRUNE one clock per popped cluster, WRITE
// K_MAX clocks.
module reconstruction
  import ntc_pkg::*;
#(
  parameter int unsigned K_MAX = 128,
  parameter int unsigned K_D   = 64
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  output logic     busy,
  output logic     done,
  output idx_t     total,
  // cluster memory access
  output logic     mem_rd_en,
  output idx_t     mem_rd_addr,
  input  cluster_t mem_rd_data,
  output logic     mem_wr_en,
  output idx_t     mem_wr_addr,
  output cluster_t mem_wr_data
);

  localparam int unsigned CW = $clog2(K_MAX + 1);

  typedef enum logic [1:0] { S_IDLE, S_READ, S_PRUNE, S_WRITE } rc_state_e;
  rc_state_e state_q;

  idx_t     addr_q;
  logic     issuing_q;
  logic     rd_live_q;
  idx_t     written_q;

  logic     f_push, f_pop, f_empty, f_ovf;
  cluster_t f_din, f_dout;
  logic [CW-1:0] f_count;

  assign busy = (state_q != S_IDLE);

  // Check t of the entry arriving from memory (READ) or from the FIFO head
  // (PRUNE) and push the survivors with t - 1.
  always_comb begin
    f_push = 1'b0;
    f_pop  = 1'b0;
    f_din  = '0;
    mem_wr_en   = 1'b0;
    mem_wr_addr = addr_q;
    mem_wr_data = '0;
    unique case (state_q)
      S_READ: begin
        f_din     = mem_rd_data;
        f_din.c.t = mem_rd_data.c.t - 1'b1;
        f_push    = rd_live_q && mem_rd_data.a.valid && (mem_rd_data.c.t != '0);
      end
      S_PRUNE: begin
        if (f_count > CW'(K_D)) begin
          f_pop     = 1'b1;
          f_din     = f_dout;
          f_din.c.t = f_dout.c.t - 1'b1;
          f_push    = (f_dout.c.t != '0);
        end
      end
      S_WRITE: begin
        mem_wr_en = 1'b1;
        if (!f_empty) begin
          f_pop       = 1'b1;
          mem_wr_data = f_dout;
          mem_wr_data.a.valid = 1'b1;
        end
      end
      default: ;
    endcase
  end

  assign mem_rd_en   = issuing_q;
  assign mem_rd_addr = addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      addr_q    <= '0;
      issuing_q <= 1'b0;
      rd_live_q <= 1'b0;
      written_q <= '0;
      done      <= 1'b0;
      total     <= '0;
    end else begin
      done      <= 1'b0;
      rd_live_q <= issuing_q;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            state_q   <= S_READ;
            addr_q    <= '0;
            issuing_q <= 1'b1;
          end
        end
        S_READ: begin
          if (issuing_q) begin
            if (addr_q == idx_t'(K_MAX - 1)) issuing_q <= 1'b0;
            else addr_q <= addr_q + 1'b1;
          end else if (!rd_live_q) begin
            state_q <= S_PRUNE;
          end
        end
        S_PRUNE: begin
          if (f_count <= CW'(K_D)) begin
            state_q   <= S_WRITE;
            addr_q    <= '0;
            written_q <= '0;
          end
        end
        S_WRITE: begin
          if (!f_empty) written_q <= written_q + 1'b1;
          if (addr_q == idx_t'(K_MAX - 1)) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
            total   <= f_empty ? written_q : written_q + 1'b1;
          end else begin
            addr_q <= addr_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  sync_fifo #(.T(cluster_t), .DEPTH(K_MAX)) u_fifo (
    .clk, .rst_n,
    .push(f_push), .din(f_din),
    .pop(f_pop), .dout(f_dout),
    .full(), .empty(f_empty), .count(f_count), .overflow(f_ovf)
  );

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !f_ovf);

endmodule
