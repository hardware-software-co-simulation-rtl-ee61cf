// Synchronous first-in first-out buffer (the LZ77 unit's input FIFO).
//
// DEPTH entries of WIDTH bits in a circular array with read and write
// pointers and an occupancy counter.  push is ignored when full and pop when
// empty; a push and a pop in the same cycle are both performed.  The head
// entry is visible on rdata whenever empty is low (first-word fall-through),
// so a consumer pops and uses it in the same cycle.  The LZ77 unit's FIFO is
// 512 bytes deep in the document (twice the 256-byte search window); the
// first-word fall-through organisation is this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty,
  output logic [CW-1:0]    count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wptr] <= wdata;

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) count <= CW'(DEPTH));
endmodule
