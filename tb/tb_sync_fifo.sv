// tb_sync_fifo: random push/pop traffic against a queue model on a FIFO of
// non-power-of-two depth. Checks head data, count, full/empty, the overflow
// flag when pushing into a full FIFO, and push+pop in the same clock while
// full.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 5;
  typedef logic [15:0] item_t;

  logic push, pop, full, empty, overflow;
  item_t din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.T(item_t), .DEPTH(DEPTH)) dut (.*);

  item_t model[$];
  int n_full_pushpop = 0, n_ovf = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      automatic logic exp_ovf;
      @(negedge clk);
      // state checks before this clock's operation
      checks++;
      if (count !== ($bits(count))'(model.size()) || empty !== (model.size() == 0) ||
          full !== (model.size() == DEPTH) || (model.size() > 0 && dout !== model[0])) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d count=%0d exp=%0d dout=%h", n, count, model.size(), dout);
      end
      push = ($urandom_range(0, 99) < ((n / 500) % 2 ? 70 : 40));
      pop  = (model.size() > 0) && ($urandom_range(0, 99) < ((n / 500) % 2 ? 40 : 70));
      din  = item_t'($urandom);
      exp_ovf = push && !pop && model.size() == DEPTH;
      if (push && pop && model.size() == DEPTH) n_full_pushpop++;
      if (exp_ovf) n_ovf++;
      @(posedge clk); #1;
      if (pop) void'(model.pop_front());
      if (push && !exp_ovf) model.push_back(din);
      checks++;
      if (overflow !== exp_ovf) begin failures++; $display("FAIL overflow n=%0d", n); end
    end
    checks++;
    if (n_full_pushpop == 0 || n_ovf == 0) begin
      failures++;
      $display("FAIL coverage full_pushpop=%0d ovf=%0d", n_full_pushpop, n_ovf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
