// Simple non-pipelined AHB master tasks for the block testbenches.
// The including module provides clk, m2s (ahb_m2s_t), t_hsel (select of the
// slave under test) and t_s2m (the response of the data-phase owner).
// Signals are driven on the falling edge; a transfer's address phase takes
// one cycle and its data phase lasts until the response has HREADYOUT high.
// t_wait counts the wait states of the last transfer.
int t_wait;

task automatic ahb_xfer(input bit wr, input logic [31:0] a, input logic [31:0] wd,
                        output logic [31:0] rd, input logic [2:0] size = 3'd2);
  @(negedge clk);
  m2s.haddr  = a;
  m2s.htrans = rcs_pkg::HTRANS_NONSEQ;
  m2s.hwrite = wr;
  m2s.hsize  = size;
  m2s.hburst = rcs_pkg::HBURST_SINGLE;
  t_hsel     = 1'b1;
  @(negedge clk);
  m2s.htrans = rcs_pkg::HTRANS_IDLE;
  t_hsel     = 1'b0;
  m2s.hwdata = wd;
  t_wait     = 0;
  while (!t_s2m.hreadyout) begin @(negedge clk); t_wait++; end
  rd = t_s2m.hrdata;
  @(posedge clk);
endtask

task automatic ahb_wr(input logic [31:0] a, input logic [31:0] wd);
  logic [31:0] unused;
  ahb_xfer(1'b1, a, wd, unused);
endtask

task automatic ahb_rd(input logic [31:0] a, output logic [31:0] rd);
  ahb_xfer(1'b0, a, 32'd0, rd);
endtask
