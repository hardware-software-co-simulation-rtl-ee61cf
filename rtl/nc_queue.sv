// Non-cacheable (NC) request queue between the load/store unit and the bus.
//
// Loads and stores that fall in an RU's address range bypass the caches and
// are queued here, in program order, for the AHB master interface; the queue
// keeps the load/store unit from stalling while the bus is busy.  Besides the
// FIFO, the queue counts NC stores that have been accepted but whose bus
// transfer has not yet completed.  load_issue_ok is high only when that count
// is zero: this is the pipeline rule that no NC load may issue until every
// outstanding NC store has committed, which keeps a control-register write
// ahead of the following status-register read and stops store-to-load
// forwarding for NC addresses.  An assertion flags a load pushed against that
// rule.  The queue and the ordering rule come from the document; the depth of
// eight (the size of the load/store queue) and the completion handshake are
// this design's choice.
//
// Interface: push/req_in when the LSU hands over a request (ignored when
// full); head/valid towards the master interface, which pops with take;
// store_done pulses once per completed NC store transfer.
module nc_queue
  import rcs_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    push,
  input  nc_req_t req_in,
  output logic    full,
  output nc_req_t head,
  output logic    valid,
  input  logic    take,
  input  logic    store_done,
  output logic    load_issue_ok,
  output logic [CW-1:0] stores_outstanding
);
  localparam int unsigned W = $bits(nc_req_t);

  logic          empty;
  logic [CW-1:0] count;
  logic [W-1:0]  head_bits;
  logic          st_in, st_out;

  sync_fifo #(.WIDTH(W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .push  (push),
    .wdata (W'(req_in)),
    .pop   (take),
    .rdata (head_bits),
    .full, .empty, .count
  );

  assign head  = nc_req_t'(head_bits);
  assign valid = !empty;

  assign st_in  = push && !full && req_in.write;
  assign st_out = store_done;

  always_ff @(posedge clk) begin
    if (rst) stores_outstanding <= '0;
    else     stores_outstanding <= stores_outstanding + CW'(st_in) - CW'(st_out);
  end

  assign load_issue_ok = (stores_outstanding == '0);

  a_load_order: assert property (@(posedge clk) disable iff (rst)
    (push && !req_in.write) |-> load_issue_ok)
    else $error("NC load issued while NC stores are outstanding");
  a_store_count: assert property (@(posedge clk) disable iff (rst)
    store_done |-> (stores_outstanding != '0));
endmodule
