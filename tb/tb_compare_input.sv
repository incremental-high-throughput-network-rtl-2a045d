// tb_compare_input: random feature/centroid pairs; checks that every feature
// pair comes out ordered (greater >= smaller, same two values) one clock
// later, and that the side information follows with the same delay.
module tb_compare_input;
  import ntc_pkg::*;
  import tb_ntc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  scan_tag_t in_tag, out_tag;
  feat_vec_t x, mu, greater, smaller;

  compare_input dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    feat_vec_t px, pmu;
    scan_tag_t ptag;
    in_tag = '0; x = '0; mu = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      x  = rand_vec(8);
      mu = (n % 7 == 0) ? x : rand_vec(8);
      in_tag = '{live: 1'b1, cvalid: n[0], last: n[1], idx: idx_t'(n), y: label_t'(n)};
      px = x; pmu = mu; ptag = in_tag;
      @(posedge clk); #1;
      for (int i = 0; i < D; i++) begin
        automatic feat_t g = (px[i] > pmu[i]) ? px[i] : pmu[i];
        automatic feat_t s = (px[i] > pmu[i]) ? pmu[i] : px[i];
        checks++;
        if (greater[i] !== g || smaller[i] !== s) begin
          failures++;
          $display("FAIL n=%0d i=%0d x=%h mu=%h got g=%h s=%h", n, i, px[i], pmu[i], greater[i], smaller[i]);
        end
      end
      checks++;
      if (out_tag !== ptag) begin failures++; $display("FAIL tag n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
