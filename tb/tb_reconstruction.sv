// tb_reconstruction: fills a model of the cluster memory with K_MAX clusters
// of random timestamps and runs reconstruction. The memory afterwards must
// equal a reference of the algorithm: copy clusters with t != 0 (as t - 1),
// then pop/discard t = 0 or re-push with t - 1 until K_D remain, then write
// them from address 0 and empty records up to K_MAX - 1. Checks total, the
// K_MAX write clocks, and three timestamp mixes: small t (normal), large t
// (many pruning rounds) and mostly t = 0 (fewer than K_D survive).
module tb_reconstruction;
  import ntc_pkg::*;
  import tb_ntc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int K_MAX = 128, K_D = 64;

  logic     start, busy, done, mem_rd_en, mem_wr_en;
  idx_t     total, mem_rd_addr, mem_wr_addr;
  cluster_t mem_rd_data, mem_wr_data;

  reconstruction dut (.*);

  cluster_t mem [K_MAX];
  int       writes;
  always_ff @(posedge clk) begin
    if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr[6:0]];
    if (mem_wr_en) begin mem[mem_wr_addr[6:0]] <= mem_wr_data; writes <= writes + 1; end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 9; run++) begin
      automatic cluster_t q[$];
      automatic int tmax = (run % 3 == 0) ? 4 : (run % 3 == 1) ? 60 : 1;
      for (int i = 0; i < K_MAX; i++) begin
        mem[i] = rand_cluster(8);
        mem[i].c.t = tstamp_t'($urandom_range(0, tmax));
        if (run % 3 == 2 && $urandom_range(0, 3) != 0) mem[i].c.t = '0;
      end
      // reference
      for (int i = 0; i < K_MAX; i++)
        if (mem[i].a.valid && mem[i].c.t != 0) begin
          automatic cluster_t c = mem[i];
          c.c.t = c.c.t - 1;
          q.push_back(c);
        end
      while (q.size() > K_D) begin
        automatic cluster_t h = q.pop_front();
        if (h.c.t != 0) begin h.c.t = h.c.t - 1; q.push_back(h); end
      end
      @(negedge clk);
      writes = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (total !== idx_t'(q.size())) begin failures++; $display("FAIL run %0d total %0d exp %0d", run, total, q.size()); end
      checks++;
      if (writes != K_MAX) begin failures++; $display("FAIL run %0d writes %0d", run, writes); end
      for (int i = 0; i < K_MAX; i++) begin
        automatic cluster_t e = (i < q.size()) ? q[i] : '0;
        checks++;
        if (mem[i] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL run %0d addr %0d valid=%0b t=%0d exp valid=%0b t=%0d",
                                      run, i, mem[i].a.valid, mem[i].c.t, e.a.valid, e.c.t);
        end
      end
      $display("run %0d: survivors %0d", run, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
