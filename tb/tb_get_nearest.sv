// tb_get_nearest: presents scans of random length (with invalid entries,
// ties and pipeline bubbles mixed in) and checks the reported nearest
// address, distance, class and found flag against a reference minimum
// search, that the result appears in the clock right after the last entry
// and that result_valid is a one-clock pulse. Every tenth scan has no valid
// cluster at all.
module tb_get_nearest;
  import ntc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  scan_tag_t in_tag;
  dist_t     distance;
  logic      result_valid;
  nearest_t  result;

  get_nearest dut (.*);

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_tag = '0; distance = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      automatic int len = $urandom_range(1, 40);
      automatic nearest_t exp = '0;
      for (int e = 0; e < len; e++) begin
        automatic logic v = (s % 10 == 3) ? 1'b0 : ($urandom_range(0, 4) != 0);
        automatic dist_t dd = dist_t'($urandom_range(0, 50));
        @(negedge clk);
        in_tag   = '{live: 1'b1, cvalid: v, last: (e == len - 1), idx: idx_t'(e), y: label_t'($urandom_range(0, 31))};
        distance = dd;
        if (v && (!exp.found || dd < exp.distance))
          exp = '{found: 1'b1, idx: idx_t'(e), distance: dd, y: in_tag.y};
        if ($urandom_range(0, 5) == 0 && e != len - 1) begin
          @(negedge clk);
          in_tag = '0;
        end
      end
      @(posedge clk); #1;   // edge that samples the last entry
      checks++;
      if (result_valid !== 1'b1 ||
          result.found !== exp.found ||
          (exp.found && (result.idx !== exp.idx || result.distance !== exp.distance || result.y !== exp.y))) begin
        failures++;
        $display("FAIL scan %0d: valid=%0b found=%0b idx=%0d d=%0d exp found=%0b idx=%0d d=%0d",
                 s, result_valid, result.found, result.idx, result.distance, exp.found, exp.idx, exp.distance);
      end
      @(negedge clk);
      in_tag = '0;
      @(posedge clk); #1;
      checks++;
      if (result_valid !== 1'b0) begin failures++; $display("FAIL valid not a pulse, scan %0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
