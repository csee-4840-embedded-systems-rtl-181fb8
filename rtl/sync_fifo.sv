// sync_fifo: single-clock first-in first-out buffer with show-ahead output.
//
// DEPTH words of WIDTH bits. A push (push && !full) writes wdata at the tail;
// the word at the head is always visible on rdata while !empty, and a pop
// (pop && !empty) drops it. Both may happen in the same clock. Pointers are
// one bit wider than the address so that full and empty are told apart; the
// fill level is given as `count`. Reset empties the buffer.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_push, do_pop;

  assign count   = wptr - rptr;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  // The writer must respect `full` and the reader `empty`.
  assert property (@(posedge clk) disable iff (reset) push |-> !full)
    else $error("sync_fifo: push while full");
  assert property (@(posedge clk) disable iff (reset) pop |-> !empty)
    else $error("sync_fifo: pop while empty");

endmodule
