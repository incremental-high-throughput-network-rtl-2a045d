// tb_cluster_memory: writes random cluster records to random addresses and
// reads them back through both read ports against a model, checking the
// one-clock read latency, the old-data result when reading the address being
// written, the valid bits after reset (all clear) and the split of the record
// over units A, B and C.
module tb_cluster_memory;
  import ntc_pkg::*;
  import tb_ntc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int K = 128;

  logic     wr_en, cls_rd_en, lrn_rd_en;
  idx_t     wr_addr, cls_rd_addr, lrn_rd_addr;
  cluster_t wr_data, lrn_rd_data;
  mem_a_t   cls_rd_data;

  cluster_memory dut (.*);

  cluster_t model [K];
  logic     mvalid[K];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; cls_rd_en = 0; lrn_rd_en = 0; wr_addr = '0; cls_rd_addr = '0; lrn_rd_addr = '0; wr_data = '0;
    for (int i = 0; i < K; i++) mvalid[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // after reset every address reads as invalid
    for (int i = 0; i < K; i++) begin
      @(negedge clk);
      cls_rd_en = 1; cls_rd_addr = idx_t'(i);
      @(posedge clk); #1;
      checks++;
      if (cls_rd_data.valid !== 1'b0) begin failures++; $display("FAIL valid after reset %0d", i); end
    end
    for (int n = 0; n < 3000; n++) begin
      automatic cluster_t  exp_l, rec;
      automatic mem_a_t    exp_c;
      automatic logic      vl, vc;
      automatic int        wa = $urandom_range(0, K - 1);
      automatic int        ra = (n % 5 == 0) ? wa : $urandom_range(0, K - 1);
      automatic int        rb = $urandom_range(0, K - 1);
      @(negedge clk);
      rec = rand_cluster(8);
      rec.a.valid = ($urandom_range(0, 7) != 0);
      wr_en = ($urandom_range(0, 1) == 1); wr_addr = idx_t'(wa); wr_data = rec;
      cls_rd_en = 1; cls_rd_addr = idx_t'(ra);
      lrn_rd_en = 1; lrn_rd_addr = idx_t'(rb);
      exp_c = model[ra].a; vc = mvalid[ra];
      exp_l = model[rb];   vl = mvalid[rb];
      @(posedge clk); #1;
      if (wr_en) begin model[wa] = rec; mvalid[wa] = 1; end
      if (vc) begin
        checks++;
        if (cls_rd_data !== exp_c) begin failures++; if (failures < 10) $display("FAIL cls n=%0d addr=%0d", n, ra); end
      end
      if (vl) begin
        checks++;
        if (lrn_rd_data !== exp_l) begin failures++; if (failures < 10) $display("FAIL lrn n=%0d addr=%0d", n, rb); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
