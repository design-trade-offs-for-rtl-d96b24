// wlsb_commit_fifo: the order in which pending stores are committed.
//
// Stores leave the buffer for memory in FIFO order. The order is kept per
// entry: an entry index is pushed when a store first gives the entry a
// pending slot, and popped when the masked WideWord write of all its
// pending slots has reached memory. Later stores to an entry already queued
// join its pending slots and are committed with it, so repeated stores to
// one location cost a single memory write. An entry with a pending store is
// never replaced, so an index is never queued twice and DEPTH = ENTRIES
// always suffices. Committing per entry rather than per store is this
// design's reading of the document's FIFO commit order.
// Circular buffer; push and pop take effect at the clock edge, head is
// visible combinationally.
module wlsb_commit_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] push_data,
  input  logic         pop,
  output logic [W-1:0] head,
  output logic         empty,
  output logic         full
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rd_q, wr_q;
  logic [PW:0]   cnt_q;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty = (cnt_q == 0);
  assign full  = (cnt_q == (PW+1)'(DEPTH));
  assign head  = mem[rd_q];

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= incr(wr_q);
      if (do_pop)  rd_q <= incr(rd_q);
      cnt_q <= cnt_q + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wr_q] <= push_data;

  // A push into a full queue would lose an entry's stores.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
