// cluster_ram: one-write, one-read synchronous memory of K_MAX words of
// WIDTH bits. It implements units B (radius R, 192 bits) and C (U, N and T,
// 94 bits) of the cluster memory, both accessed only by the learning unit.
// The read has one clock of latency and returns the old word when the same
// address is written in that clock. No reset: the learning unit only reads
// addresses that unit A marks valid, and those have been written.
module cluster_ram
  import ntc_pkg::*;
#(
  parameter int unsigned K_MAX = 128,
  parameter int unsigned WIDTH = 192
) (
  input  logic             clk,
  input  logic             wr_en,
  input  idx_t             wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  idx_t             rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  localparam int unsigned AW = $clog2(K_MAX);

  logic [WIDTH-1:0] mem [K_MAX];

  always_ff @(posedge clk) begin
    if (wr_en && (wr_addr < idx_t'(K_MAX))) mem[wr_addr[AW-1:0]] <= wr_data;
    if (rd_en && (rd_addr < idx_t'(K_MAX))) rd_data <= mem[rd_addr[AW-1:0]];
  end

endmodule
