// bf_queue: the process queue of the breadth-first search.
//
// A first-in first-out store of cell addresses, built as a circular buffer in
// one memory array with a write pointer, a read pointer and an occupancy
// count. `push` writes `din` at the tail. `pop` removes the head and presents
// it on `dout` on the next clock edge (synchronous read, as a block RAM gives).
// Push and pop may happen in the same cycle. `clear` and `reset` empty the
// queue. The search marks a cell visited when it enqueues it, so each cell is
// enqueued at most once per search and a depth of one entry per cell
// (2^ADDR_W) can never overflow; the assertions flag misuse anyway.
// The queue itself is the search's; its depth, the synchronous read and the
// on-chip placement are this implementation's choices.
module bf_queue #(
  parameter int unsigned ADDR_W = 11,
  parameter int unsigned DEPTH  = 2 ** ADDR_W
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              clear,
  input  logic              push,
  input  logic [ADDR_W-1:0] din,
  input  logic              pop,
  output logic [ADDR_W-1:0] dout,
  output logic              empty,
  output logic              full
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [ADDR_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  wr_ptr, rd_ptr;
  logic [PTR_W:0]    count;

  assign empty = (count == 0);
  assign full  = (count == (PTR_W+1)'(DEPTH));

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (reset || clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
    if (pop)  dout <= mem[rd_ptr];
  end

  no_push_when_full: assert property (@(posedge clk) disable iff (reset || clear)
                                      push && !pop |-> !full);
  no_pop_when_empty: assert property (@(posedge clk) disable iff (reset || clear)
                                      pop |-> !empty);
endmodule
