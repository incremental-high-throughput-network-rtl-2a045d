// tb_nearest_neighbor: the learning unit's nearest-centroid search against a
// model of cluster memory A. For models of k = 0 ... K_MAX clusters it checks
// found, the nearest address and the minimum distance against a reference
// search, the k + D + 4 clock search time (k + D + 3 when every address is
// valid), and that busy drops with done.
module tb_nearest_neighbor;
  import ntc_pkg::*;
  import tb_ntc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int K_MAX = 128;

  logic      start, busy, done, found, mem_rd_en;
  feat_vec_t x;
  idx_t      idx, mem_rd_addr;
  dist_t     distance;
  mem_a_t    mem_rd_data;

  nearest_neighbor dut (.*);

  mem_a_t mem [K_MAX];
  always_ff @(posedge clk) if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr[6:0]];

  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ks[$] = '{0, 1, 3, 64, 90, 127, 128};
    start = 0; x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ks[ki]) begin
      automatic int k = ks[ki];
      for (int i = 0; i < K_MAX; i++) begin
        mem[i] = '0;
        if (i < k) begin
          mem[i].valid = 1'b1;
          mem[i].y     = label_t'($urandom_range(0, 4));
          mem[i].mu    = rand_vec(4);
        end
      end
      for (int n = 0; n < 20; n++) begin
        automatic feat_vec_t xv = rand_vec(4);
        automatic nearest_t  exp = '0;
        automatic longint    t0;
        automatic int        exp_lat = (k < K_MAX) ? k + D + 4 : k + D + 3;
        for (int i = 0; i < k; i++) begin
          automatic dist_t dd = ref_distance(xv, mem[i].mu);
          if (!exp.found || dd < exp.distance) exp = '{found: 1'b1, idx: idx_t'(i), distance: dd, y: mem[i].y};
        end
        @(negedge clk);
        start = 1; x = xv;
        t0 = cyc;
        @(negedge clk);
        start = 0; x = '0;
        checks++;
        if (!busy) begin failures++; $display("FAIL busy low after start"); end
        while (!done) @(negedge clk);
        checks++;
        if (cyc - t0 != longint'(exp_lat)) begin
          failures++; $display("FAIL k=%0d latency %0d exp %0d", k, cyc - t0, exp_lat);
        end
        checks++;
        if (found !== exp.found || (exp.found && (idx !== exp.idx || distance !== exp.distance))) begin
          failures++;
          $display("FAIL k=%0d n=%0d found=%0b idx=%0d d=%0d exp %0b %0d %0d", k, n, found, idx, distance,
                   exp.found, exp.idx, exp.distance);
        end
        @(negedge clk);
        checks++;
        if (busy) begin failures++; $display("FAIL still busy"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
