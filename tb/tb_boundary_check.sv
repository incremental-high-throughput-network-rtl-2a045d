// tb_boundary_check: random (N, D, R) triples, biased so that D falls near
// the radius, checked against the reference rule (D <= sum(R)/N for N > 1,
// D <= 2 for N = 1). Also checks the number of clocks from start to done:
// 2 for N = 1 (fixed boundary) and D/2 + 2 = 5 for N > 1 (adder chain,
// divide, compare).
module tb_boundary_check;
  import ntc_pkg::*;
  import tb_ntc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     start, busy, done, in_boundary, in_boundary_1, in_boundary_2;
  count_t   n;
  dist_t    d;
  rad_vec_t r;

  boundary_check dut (.*);

  int n_in = 0, n_out = 0, n_fix = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; n = '0; d = '0; r = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      automatic longint sum = 0;
      automatic int cycles = 0;
      automatic bit exp;
      @(negedge clk);
      n = (k % 4 == 0) ? count_t'(1) : count_t'($urandom_range(2, 2047));
      for (int i = 0; i < D; i++) begin
        r[i] = R_W'($urandom_range(0, 32'h7fff_ffff)) >> $urandom_range(0, 24);
        sum += r[i];
      end
      if (n == 1) d = dist_t'($urandom_range(0, 4 << FRAC_BITS));
      else d = dist_t'((sum / n) + $signed($urandom_range(0, 2000)) - 1000);
      if (k % 50 == 7) d = dist_t'(sum / n);   // exactly on the boundary
      exp = ref_in_boundary(n, d, r);
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      checks++;
      if (in_boundary !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d n=%0d d=%0d sum=%0d got %0b exp %0b", k, n, d, sum, in_boundary, exp);
      end
      checks++;
      if (cycles != ((n == 1) ? 2 : (D + 1) / 2 + 2)) begin
        failures++;
        $display("FAIL k=%0d latency %0d", k, cycles);
      end
      if (n == 1) n_fix++;
      if (exp) n_in++; else n_out++;
    end
    checks++;
    if (n_in == 0 || n_out == 0 || n_fix == 0) begin failures++; $display("FAIL coverage"); end
    $display("boundary: inside=%0d outside=%0d fixed=%0d", n_in, n_out, n_fix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
