// Self-checking test of ahb_interconnect with four model slaves.  Each slave
// returns its own tag in the read data, and slave 1 adds a wait state.  The
// test checks the decoder (exactly the addressed, enabled slave is
// selected), the routing of the data-phase response, and the default
// slave's two-cycle ERROR response for unmapped regions and for disabled
// slaves.
module ahb_interconnect_tb;
  import rcs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, t_hsel, hready;
  logic [3:0] slave_en, hsel;
  ahb_m2s_t m2s; ahb_s2m_t s2m_slv [4]; ahb_s2m_t t_s2m;
  int checks = 0, failures = 0, errors_seen = 0;

  ahb_interconnect dut (.clk, .rst, .m2s, .slave_en, .hsel, .s2m_slv, .s2m (t_s2m), .hready);

  `include "ahb_tasks.svh"

  // model slaves: tag 0xC0DE_000s plus the word address; slave 1 waits once
  logic [3:0] dval; logic [31:0] daddr; logic wst;
  always_ff @(posedge clk) begin
    if (rst) begin dval <= 0; wst <= 0; end
    else if (hready) begin
      dval <= hsel & {4{m2s.htrans[1]}}; daddr <= m2s.haddr; wst <= hsel[1] & m2s.htrans[1];
    end else wst <= 0;
  end
  always_comb
    for (int s = 0; s < 4; s++) begin
      s2m_slv[s].hrdata    = 32'hC0DE_0000 + 32'(s << 12) + {20'd0, daddr[11:0]};
      s2m_slv[s].hresp     = HRESP_OKAY;
      s2m_slv[s].hreadyout = !(s == 1 && wst);
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
    logic [3:0] region;
    m2s = '0; t_hsel = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    for (int n = 0; n < 600; n++) begin
      int s;
      logic [11:0] off;
      slave_en = (n < 100) ? 4'hF : 4'($urandom) | 4'b0011;
      region = (n % 5 == 4) ? 4'($urandom) : AHB_REGION[$urandom % 4];
      off = 12'($urandom) & 12'hFFC;
      s = -1;
      for (int i = 0; i < 4; i++) if (AHB_REGION[i] == region && slave_en[i]) s = i;
      // decoder
      @(negedge clk);
      m2s.haddr = {region, 16'd0, off}; m2s.htrans = HTRANS_NONSEQ;
      #1 chk(hsel == ((s >= 0) ? (4'b1 << s) : 4'b0), $sformatf("decode %h en %b -> %b", m2s.haddr, slave_en, hsel));
      m2s.htrans = HTRANS_IDLE;
      ahb_rd({region, 16'd0, off}, rd);
      if (s >= 0) begin
        chk(rd == 32'hC0DE_0000 + 32'(s << 12) + 32'(off), "routed read data");
        chk(t_wait == (s == 1 ? 1 : 0), "wait states routed");
        chk(t_s2m.hresp == HRESP_OKAY, "okay");
      end else begin
        chk(t_wait == 1 && t_s2m.hresp == HRESP_ERROR, "default slave two-cycle error");
        errors_seen++;
      end
    end
    chk(errors_seen > 20, "error responses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
