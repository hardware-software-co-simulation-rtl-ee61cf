// AMBA 2 APB master tasks for the block testbenches.  The including module
// provides clk, apb (apb_m2s_t), t_psel and t_prdata.  A transfer is a SETUP
// cycle followed by an ACCESS cycle; read data is taken in the ACCESS cycle.
task automatic apb_xfer(input bit wr, input logic [15:0] a, input logic [31:0] wd,
                        output logic [31:0] rd);
  @(negedge clk);
  apb.paddr = a; apb.pwrite = wr; apb.pwdata = wd; apb.penable = 1'b0; t_psel = 1'b1;
  @(negedge clk);
  apb.penable = 1'b1;
  rd = t_prdata;
  @(posedge clk);
  #1 t_psel = 1'b0; apb.penable = 1'b0;
endtask

task automatic apb_wr(input logic [15:0] a, input logic [31:0] wd);
  logic [31:0] unused;
  apb_xfer(1'b1, a, wd, unused);
endtask

task automatic apb_rd(input logic [15:0] a, output logic [31:0] rd);
  apb_xfer(1'b0, a, 32'd0, rd);
endtask
