// sync_fifo: single-clock first-in first-out buffer of DEPTH entries of type
// T, used for the classifier-to-learning buffer and for the reconstruction
// buffer.
//
// Storage is an array addressed by a read and a write pointer; the head entry
// is always visible on dout (show-ahead). A push and a pop may happen in the
// same clock, also when the buffer is full (the pop frees the slot). Pushing
// into a full buffer without popping is ignored and reported on overflow
// for one clock; the caller decides what that means. Depths need not be
// powers of two.
//
// Interface: push/din, pop/dout, full, empty, count. Latency: a pushed entry
// is visible on dout one clock after the push when the buffer was empty.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  T                           din,
  input  logic                       pop,
  output T                           dout,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  typedef logic [$clog2(DEPTH+1)-1:0] cnt_t;

  T              mem [DEPTH];
  logic [PW-1:0] rd_ptr_q, wr_ptr_q;
  cnt_t          count_q;

  logic do_pop, do_push;

  assign empty   = (count_q == '0);
  assign full    = (count_q == cnt_t'(DEPTH));
  assign count   = count_q;
  assign dout    = mem[rd_ptr_q];
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr_q] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr_q <= '0;
      wr_ptr_q <= '0;
      count_q  <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && !do_push;
      if (do_push) wr_ptr_q <= next_ptr(wr_ptr_q);
      if (do_pop)  rd_ptr_q <= next_ptr(rd_ptr_q);
      count_q <= count_q + cnt_t'(do_push) - cnt_t'(do_pop);
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> !empty);

endmodule
