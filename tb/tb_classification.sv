// tb_classification: the classifier against a model of cluster memory A.
// For models of k = 0 ... K_MAX clusters (stored from address 0, including
// duplicated centroids to create ties) it classifies random instances and
// checks the predicted class, nearest address and distance against a
// reference search (lowest address wins a tie), the result latency of
// k + D + 4 clocks (k + D + 3 when all K_MAX addresses are valid and no
// invalid entry ends the scan), that the next instance is accepted in the
// clock the result appears, and that the learning-unit copy matches.
module tb_classification;
  import ntc_pkg::*;
  import tb_ntc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int K_MAX = 128;

  logic        in_valid, in_ready, pred_valid, learn_valid, mem_rd_en;
  feat_vec_t   in_x;
  nearest_t    pred;
  learn_item_t learn_item;
  idx_t        mem_rd_addr;
  mem_a_t      mem_rd_data;

  classification dut (.*);

  // memory A model: one clock read latency
  mem_a_t mem [K_MAX];
  always_ff @(posedge clk) if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr[6:0]];

  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ks[$] = '{0, 1, 2, 5, 64, 100, 127, 128};
    in_valid = 0; in_x = '0;
    for (int i = 0; i < K_MAX; i++) mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ks[ki]) begin
      automatic int k = ks[ki];
      for (int i = 0; i < K_MAX; i++) begin
        mem[i] = '0;
        if (i < k) begin
          mem[i].valid = 1'b1;
          mem[i].y     = label_t'($urandom_range(0, 4));
          mem[i].mu    = (i > 3 && i % 9 == 0) ? mem[i - 3].mu : rand_vec(4);
        end
      end
      for (int n = 0; n < 20; n++) begin
        automatic feat_vec_t xv;
        automatic nearest_t  exp = '0;
        automatic longint    t0;
        automatic int        exp_lat = (k < K_MAX) ? k + D + 4 : k + D + 3;
        // every fourth instance equals a stored centroid shifted slightly
        xv = rand_vec(4);
        if (k > 3 && n % 4 == 0) xv = mem[9 * ($urandom_range(1, (k - 1) / 9 > 0 ? (k - 1) / 9 : 1))].mu;
        for (int i = 0; i < k; i++) begin
          automatic dist_t dd = ref_distance(xv, mem[i].mu);
          if (!exp.found || dd < exp.distance) exp = '{found: 1'b1, idx: idx_t'(i), distance: dd, y: mem[i].y};
        end
        @(negedge clk);
        in_valid = 1; in_x = xv;
        // accepted at this clock's rising edge
        while (!in_ready) @(negedge clk);
        t0 = cyc;
        @(negedge clk);
        in_valid = (n % 2 == 1);      // odd: hold valid to test back-to-back
        in_x = rand_vec(4);
        while (!pred_valid) @(negedge clk);
        checks++;
        if (cyc - t0 != longint'(exp_lat)) begin
          failures++; $display("FAIL k=%0d latency %0d exp %0d", k, cyc - t0, exp_lat);
        end
        checks++;
        if (pred.found !== exp.found ||
            (exp.found && (pred.idx !== exp.idx || pred.distance !== exp.distance || pred.y !== exp.y))) begin
          failures++;
          $display("FAIL k=%0d n=%0d found=%0b idx=%0d d=%0d y=%0d exp %0b %0d %0d %0d",
                   k, n, pred.found, pred.idx, pred.distance, pred.y, exp.found, exp.idx, exp.distance, exp.y);
        end
        checks++;
        if (!learn_valid || learn_item.x !== xv || learn_item.nn !== pred) begin
          failures++; $display("FAIL learn item k=%0d n=%0d", k, n);
        end
        checks++;
        if (!in_ready) begin failures++; $display("FAIL not ready when result appears"); end
        if (in_valid) begin
          // the held instance is accepted now; let it finish and drop it
          @(negedge clk);
          in_valid = 0;
          while (!pred_valid) @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
