// Self-checking test of apb_bridge with three register-file APB slaves.
// AHB writes and reads through the bridge are checked against a model; each
// transfer must take exactly one AHB wait state and produce a SETUP then an
// ACCESS cycle with the right PSEL.  A back-to-back pipelined pair of
// transfers is also run.
module apb_bridge_tb;
  import rcs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, t_hsel;
  ahb_m2s_t m2s; ahb_s2m_t t_s2m;
  apb_m2s_t apb; logic [2:0] psel; logic [31:0] prdata [3];
  logic [31:0] regs [3][16];
  logic [31:0] model [3][16];
  int checks = 0, failures = 0, proto_err = 0;

  apb_bridge dut (.clk, .rst, .hsel (t_hsel), .hready (t_s2m.hreadyout), .m2s, .s2m (t_s2m),
                  .apb, .psel, .prdata);

  `include "ahb_tasks.svh"

  // APB slaves
  logic [2:0] psel_q; logic pen_q;
  always_comb for (int s = 0; s < 3; s++) prdata[s] = regs[s][apb.paddr[5:2]];
  always @(posedge clk) begin
    for (int s = 0; s < 3; s++)
      if (psel[s] && apb.penable && apb.pwrite) regs[s][apb.paddr[5:2]] <= apb.pwdata;
    // every ACCESS cycle follows a SETUP cycle with the same select
    if (apb.penable && !(pen_q == 1'b0 && psel_q == psel && psel != 0)) proto_err++;
    psel_q <= psel; pen_q <= apb.penable;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    logic [31:0] rd;
    m2s = '0; t_hsel = 0;
    foreach (regs[s, r]) begin regs[s][r] = 0; model[s][r] = 0; end
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    for (int n = 0; n < 400; n++) begin
      int s, r;
      logic [31:0] v;
      s = $urandom % 3; r = $urandom % 16; v = $urandom;
      if ($urandom % 2) begin
        ahb_wr(32'h8000_0000 | 32'(s << 12) | 32'(r << 2), v);
        model[s][r] = v;
        chk(t_wait == 1, "write wait states");
      end else begin
        ahb_rd(32'h8000_0000 | 32'(s << 12) | 32'(r << 2), rd);
        chk(rd == model[s][r], $sformatf("read slave %0d reg %0d", s, r));
        chk(t_wait == 1, "read wait states");
      end
    end
    // pipelined: write then read the same register back to back
    @(negedge clk);
    m2s.haddr = 32'h8000_2008; m2s.htrans = HTRANS_NONSEQ; m2s.hwrite = 1; m2s.hsize = 3'd2; t_hsel = 1;
    @(negedge clk);
    m2s.hwdata = 32'hDEAD_BEEF; m2s.hwrite = 0;     // read address phase, held while waiting
    while (!t_s2m.hreadyout) @(negedge clk);
    @(negedge clk);
    m2s.htrans = HTRANS_IDLE; t_hsel = 0;
    while (!t_s2m.hreadyout) @(negedge clk);
    chk(t_s2m.hrdata == 32'hDEAD_BEEF, "back-to-back read");
    @(posedge clk);
    chk(proto_err == 0, "APB setup/access sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
