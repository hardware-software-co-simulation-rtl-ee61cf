// Self-checking test of mem_ctrl on a small SRAM.  Random streams of
// back-to-back (pipelined) byte, halfword and word reads and writes are run
// against a byte-array model, with every address phase overlapping the
// previous data phase; reads that follow a write to the same word must see
// the new bytes through the bypass, which must occur.  Zero wait states are
// checked on every beat.
module mem_ctrl_tb;
  import rcs_pkg::*;
  localparam int unsigned W = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, hsel, bypass_hit;
  ahb_m2s_t m2s; ahb_s2m_t s2m;
  logic [7:0] model [4*W];
  int checks = 0, failures = 0, bypasses = 0;

  mem_ctrl #(.WORDS(W)) dut (.clk, .rst, .hsel, .hready (s2m.hreadyout), .m2s, .s2m, .bypass_hit);

  always @(posedge clk) if (bypass_hit) bypasses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  typedef struct { bit wr; logic [31:0] a; logic [2:0] sz; logic [31:0] d; } op_t;

  initial begin
    op_t ops[$];
    m2s = '0; hsel = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    // initialise memory with word writes (pipelined)
    for (int i = 0; i < W; i++) ops.push_back('{1'b1, 32'(4*i), 3'd2, $urandom});
    for (int n = 0; n < 3000; n++) begin
      op_t o;
      o.sz = 3'($urandom % 3);
      o.a  = 32'($urandom % (4*W)) & ~((32'd1 << o.sz) - 1);
      o.wr = $urandom % 2;
      o.d  = $urandom;
      // often read right back what was just written
      if (n > 0 && !o.wr && ops[$].wr && $urandom % 2) begin o.a = ops[$].a & ~32'd3; o.sz = 3'd2; end
      ops.push_back(o);
    end
    begin
      op_t dph; bit dv;
      dv = 0;
      foreach (ops[k]) begin
        @(negedge clk);
        // data phase of the previous op
        if (dv) begin
          if (dph.wr) m2s.hwdata = dph.d;
        end
        // address phase of this op
        m2s.haddr = ops[k].a; m2s.htrans = HTRANS_NONSEQ; m2s.hwrite = ops[k].wr;
        m2s.hsize = ops[k].sz; hsel = 1;
        #1;
        chk(s2m.hreadyout, "zero wait");
        if (dv && !dph.wr) begin
          logic [31:0] exp;
          for (int b = 0; b < 4; b++) exp[8*b +: 8] = model[(dph.a & ~32'd3) + 32'(b)];
          for (int b = 0; b < 4; b++)
            if (b >= int'(dph.a[1:0]) && b < int'(dph.a[1:0]) + (1 << dph.sz))
              chk(s2m.hrdata[8*b +: 8] == exp[8*b +: 8], $sformatf("read %h lane %0d", dph.a, b));
        end
        if (dv && dph.wr)
          for (int b = 0; b < 4; b++)
            if (b >= int'(dph.a[1:0]) && b < int'(dph.a[1:0]) + (1 << dph.sz))
              model[(dph.a & ~32'd3) + 32'(b)] = dph.d[8*b +: 8];
        dph = ops[k]; dv = 1;
      end
      @(negedge clk);
      if (dph.wr) m2s.hwdata = dph.d;
      m2s.htrans = HTRANS_IDLE; hsel = 0;
      @(negedge clk);
    end
    chk(bypasses > 50, $sformatf("bypass used %0d times", bypasses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
