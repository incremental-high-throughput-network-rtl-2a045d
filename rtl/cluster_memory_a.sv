// cluster_memory_a: unit A of the cluster memory. Holds, per cluster
// address, a valid bit, the class y (bits 130:126) and the centroid mu
// (bits 125:0).
//
// It has one write port, driven only by the learning unit, and two
// independent read ports: port 1 serves the classifier, port 2 the learning
// unit. Both reads are synchronous with one clock of read latency; a read of
// the address being written in the same clock returns the old word. The
// valid bit tells the classifier which addresses hold a cluster. Port
// structure and bit layout follow the reference design; the read timing is
// this design's choice. The y/mu array has no reset (block RAM); the valid
// bits are kept in flip-flops cleared by reset so that an empty model reads
// as empty.
module cluster_memory_a
  import ntc_pkg::*;
#(
  parameter int unsigned K_MAX = 128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   wr_en,
  input  idx_t   wr_addr,
  input  mem_a_t wr_data,
  input  logic   rd1_en,
  input  idx_t   rd1_addr,
  output mem_a_t rd1_data,
  input  logic   rd2_en,
  input  idx_t   rd2_addr,
  output mem_a_t rd2_data
);

  typedef struct packed {
    label_t    y;
    feat_vec_t mu;
  } ymu_t;

  ymu_t             mem   [K_MAX];
  logic [K_MAX-1:0] valid_q;
  ymu_t             rd1_q, rd2_q;
  logic             rd1_v_q, rd2_v_q;

  localparam int unsigned AW = $clog2(K_MAX);

  logic wr_ok;
  assign wr_ok = wr_en && (wr_addr < idx_t'(K_MAX));

  always_ff @(posedge clk) begin
    if (wr_ok) mem[wr_addr[AW-1:0]] <= '{y: wr_data.y, mu: wr_data.mu};
    if (rd1_en) rd1_q <= mem[rd1_addr[AW-1:0]];
    if (rd2_en) rd2_q <= mem[rd2_addr[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      rd1_v_q <= 1'b0;
      rd2_v_q <= 1'b0;
    end else begin
      if (wr_ok) valid_q[wr_addr[AW-1:0]] <= wr_data.valid;
      if (rd1_en) rd1_v_q <= (rd1_addr < idx_t'(K_MAX)) && valid_q[rd1_addr[AW-1:0]];
      if (rd2_en) rd2_v_q <= (rd2_addr < idx_t'(K_MAX)) && valid_q[rd2_addr[AW-1:0]];
    end
  end

  assign rd1_data = '{valid: rd1_v_q, y: rd1_q.y, mu: rd1_q.mu};
  assign rd2_data = '{valid: rd2_v_q, y: rd2_q.y, mu: rd2_q.mu};

endmodule
