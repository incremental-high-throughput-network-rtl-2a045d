// cluster_memory: stores the Clustering Feature of up to K_MAX clusters.
//
// The 417-bit record is split into three units so that each stays a
// manageable memory: unit A (valid, y, mu) with a read port for the
// classifier and one for the learning unit, unit B (R) and unit C (U, N, T)
// with a single read port for the learning unit. One write port, owned by
// the learning unit, writes a whole record into all three units at the same
// address. All reads have one clock of latency. The split, the port counts
// and the bit layout follow the reference design; writing the three units
// together is this design's choice.
module cluster_memory
  import ntc_pkg::*;
#(
  parameter int unsigned K_MAX = 128
) (
  input  logic     clk,
  input  logic     rst_n,
  // write port (learning unit)
  input  logic     wr_en,
  input  idx_t     wr_addr,
  input  cluster_t wr_data,
  // unit A read port for the classifier
  input  logic     cls_rd_en,
  input  idx_t     cls_rd_addr,
  output mem_a_t   cls_rd_data,
  // read port for the learning unit (all three units)
  input  logic     lrn_rd_en,
  input  idx_t     lrn_rd_addr,
  output cluster_t lrn_rd_data
);

  cluster_memory_a #(.K_MAX(K_MAX)) u_mem_a (
    .clk, .rst_n,
    .wr_en, .wr_addr, .wr_data(wr_data.a),
    .rd1_en(cls_rd_en), .rd1_addr(cls_rd_addr), .rd1_data(cls_rd_data),
    .rd2_en(lrn_rd_en), .rd2_addr(lrn_rd_addr), .rd2_data(lrn_rd_data.a)
  );

  cluster_ram #(.K_MAX(K_MAX), .WIDTH($bits(mem_b_t))) u_mem_b (
    .clk,
    .wr_en, .wr_addr, .wr_data(wr_data.b),
    .rd_en(lrn_rd_en), .rd_addr(lrn_rd_addr), .rd_data(lrn_rd_data.b)
  );

  cluster_ram #(.K_MAX(K_MAX), .WIDTH($bits(mem_c_t))) u_mem_c (
    .clk,
    .wr_en, .wr_addr, .wr_data(wr_data.c),
    .rd_en(lrn_rd_en), .rd_addr(lrn_rd_addr), .rd_data(lrn_rd_data.c)
  );

endmodule
