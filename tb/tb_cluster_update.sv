// tb_cluster_update: random cluster records and instances through the three
// learning methods. An update must produce the reference CF (mu, R, N, T,
// class and U) and take 5*D + 1 = 31 clocks from start to the write; a new
// cluster must be written in 1 clock with N = 1, mu = x, R = 0; a
// low-confidence instance must finish in 1 clock without a write.
module tb_cluster_update;
  import ntc_pkg::*;
  import tb_ntc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          start, busy, done, wr_en;
  learn_method_e method;
  idx_t          addr, wr_addr;
  feat_vec_t     x;
  label_t        label;
  cluster_t      cf, wr_cf;

  cluster_update dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; method = LM_NONE; addr = '0; x = '0; label = '0; cf = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1500; k++) begin
      automatic cluster_t exp;
      automatic int cycles;
      automatic int exp_cycles;
      automatic logic exp_wr;
      @(negedge clk);
      cf = rand_cluster(8);
      if (k % 13 == 0) cf.c.n = '1;            // saturated count
      if (k % 17 == 0) cf.c.t = '1;            // saturated timestamp
      if (k % 11 == 0) cf.b[k % D] = '1;       // radius saturation
      x = rand_vec(8);
      label = label_t'($urandom_range(0, 31));
      addr = idx_t'($urandom_range(0, 127));
      method = learn_method_e'(k % 3);
      unique case (method)
        LM_UPDATE: begin exp = ref_update(cf, x); exp_cycles = 5 * D + 1; exp_wr = 1; end
        LM_NEW:    begin exp = ref_new_cluster(x, label); exp_cycles = 1; exp_wr = 1; end
        default:   begin exp = '0; exp_cycles = 1; exp_wr = 0; end
      endcase
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != exp_cycles) begin failures++; $display("FAIL k=%0d cycles %0d exp %0d", k, cycles, exp_cycles); end
      checks++;
      if (wr_en !== exp_wr || (exp_wr && (wr_addr !== addr || wr_cf !== exp))) begin
        failures++;
        if (failures < 10) begin
          $display("FAIL k=%0d method=%s wr_en=%0b", k, method.name(), wr_en);
          for (int i = 0; i < D; i++)
            $display("  f%0d mu %h/%h R %h/%h", i, wr_cf.a.mu[i], exp.a.mu[i], wr_cf.b[i], exp.b[i]);
          $display("  n %0d/%0d t %0d/%0d y %0d/%0d", wr_cf.c.n, exp.c.n, wr_cf.c.t, exp.c.t, wr_cf.a.y, exp.a.y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
