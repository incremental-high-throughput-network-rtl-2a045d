// tb_distance_calc_pipeline: streams one random ordered pair per clock and
// checks that the Manhattan distance of each appears exactly D clocks later
// with its side information (one result per clock).
module tb_distance_calc_pipeline;
  import ntc_pkg::*;
  import tb_ntc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  scan_tag_t in_tag, out_tag;
  feat_vec_t greater, smaller;
  dist_t     distance;

  distance_calc_pipeline dut (.*);

  localparam int N = 400;
  dist_t     exp_d [N];
  scan_tag_t exp_t [N];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  initial begin
    in_tag = '0; greater = '0; smaller = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      automatic feat_vec_t a = rand_vec(16), b = rand_vec(16);
      @(negedge clk);
      for (int i = 0; i < D; i++) begin
        greater[i] = (a[i] > b[i]) ? a[i] : b[i];
        smaller[i] = (a[i] > b[i]) ? b[i] : a[i];
      end
      in_tag   = '{live: 1'b1, cvalid: 1'b1, last: (n == N-1), idx: idx_t'(n), y: label_t'(n)};
      exp_d[n] = ref_distance(a, b);
      exp_t[n] = in_tag;
    end
    @(negedge clk);
    in_tag = '0;
  end

  // checker: entry n is driven in clock n and sampled at the edge ending it;
  // its distance must be visible in clock n + D, i.e. after D - 1 more edges.
  initial begin
    @(posedge rst_n);
    @(posedge clk);          // edge at which entry 0 is sampled
    repeat (D - 2) @(posedge clk);
    for (int n = 0; n < N; n++) begin
      @(posedge clk); #1;
      checks++;
      if (distance !== exp_d[n] || out_tag !== exp_t[n]) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d dist=%0d exp=%0d idx=%0d", n, distance, exp_d[n], out_tag.idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
