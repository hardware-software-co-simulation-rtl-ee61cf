// Self-checking test of ahb_master_if against a model AHB memory slave that
// inserts random wait states and answers ERROR above 0xE000_0000.  Random
// L2 line reads and write-backs (INCR16) and NC accesses (single words and
// two-beat double words) are issued; read lines and the memory contents are
// checked against a model, bursts are checked for correct HTRANS/HBURST and
// incrementing addresses, an NC request that waits together with an L2
// request must be served first, an ERROR cancels the rest of a burst, and
// the skip count must never exceed the cycles the request really still
// takes.
module ahb_master_if_tb;
  import rcs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, l2_valid, l2_ready, nc_valid, nc_take, done, done_nc, done_write, error;
  bus_req_t l2_req; line_t l2_wdata, rdata; nc_req_t nc_req;
  logic [4:0] skip_count;
  ahb_m2s_t m2s; ahb_s2m_t s2m;
  int checks = 0, failures = 0, prio_wins = 0, proto_err = 0, errors = 0, skip_bad = 0;

  ahb_master_if dut (.*);

  // ---------------- model slave
  logic [31:0] mem [4096];
  logic        dv, dw, derr; logic [31:0] da; int wcnt; int err_state;
  logic [31:0] last_a;
  always_comb begin
    s2m.hrdata    = mem[da[13:2]];
    s2m.hresp     = (dv && derr) ? HRESP_ERROR : HRESP_OKAY;
    s2m.hreadyout = !dv || (derr ? err_state == 1 : wcnt == 0);
  end
  always @(posedge clk) begin
    if (rst) begin dv <= 0; wcnt <= 0; err_state <= 0; end
    else begin
      if (dv && !derr && wcnt > 0) wcnt <= wcnt - 1;
      if (dv && derr && err_state == 0) err_state <= 1;
      if (s2m.hreadyout) begin
        if (dv && dw && !derr) mem[da[13:2]] <= m2s.hwdata;
        dv <= m2s.htrans[1];
        da <= m2s.haddr; dw <= m2s.hwrite; derr <= m2s.haddr[31:28] == 4'hE;
        wcnt <= ($urandom % 3 == 0) ? 1 + $urandom % 2 : 0;
        err_state <= 0;
        if (m2s.htrans == HTRANS_SEQ && m2s.haddr != last_a + 4) proto_err++;
        if (m2s.htrans[1]) last_a <= m2s.haddr;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  logic [31:0] model [4096];
  int active_cycles;

  // skip count must be a lower bound of the cycles the request still takes
  // (sampled mid-cycle; requests ended early by ERROR are not counted)
  int sk_hist [$];
  always @(negedge clk) begin
    if (!rst && skip_count != 0) sk_hist.push_back(int'(skip_count));
    if (done) begin
      if (!error)
        for (int i = 0; i < sk_hist.size(); i++)
          if (sk_hist[i] > sk_hist.size() - i) skip_bad++;
      sk_hist = {};
    end
  end

  task automatic wait_done(output bit nc, output bit wr, output bit er);
    while (!done) @(posedge clk);
    nc = done_nc; wr = done_write; er = error;
    @(negedge clk);
  endtask

  initial begin
    bit nc, wr, er;
    foreach (mem[i]) begin mem[i] = 32'(i) * 7; model[i] = 32'(i) * 7; end
    l2_valid = 0; nc_valid = 0; l2_req = '0; l2_wdata = '0; nc_req = '0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    for (int n = 0; n < 300; n++) begin
      int kind;
      kind = $urandom % 5;
      @(negedge clk);
      if (kind < 2) begin                            // L2 line
        l2_req.write = kind == 1; l2_req.addr = 32'($urandom % 256) << 6;
        l2_req.hsize = HSIZE_WORD; l2_req.nbeats = 5'd16;
        foreach (l2_wdata[i]) l2_wdata[i] = $urandom;
        l2_valid = 1;
        #1 chk(l2_ready, "l2 accepted when idle");
        @(negedge clk); l2_valid = 0;
        chk(m2s.hburst == HBURST_INCR16 && m2s.htrans == HTRANS_NONSEQ, "INCR16 start");
        wait_done(nc, wr, er);
        chk(!nc && wr == l2_req.write && !er, "l2 completion");
        if (l2_req.write) for (int i = 0; i < 16; i++) model[l2_req.addr[13:2] + i] = l2_wdata[i];
        else for (int i = 0; i < 16; i++) chk(rdata[i] == model[l2_req.addr[13:2] + i], "line read");
      end else if (kind < 4) begin                   // NC, and an L2 request at the same time
        nc_req.write = $urandom % 2; nc_req.addr = 32'($urandom % 4096) << 2;
        nc_req.dword = $urandom % 2; nc_req.hsize = HSIZE_WORD;
        if (nc_req.dword) nc_req.addr[2] = 1'b0;
        nc_req.wdata = {$urandom, $urandom};
        nc_valid = 1;
        l2_req.write = 0; l2_req.addr = 32'($urandom % 256) << 6; l2_req.nbeats = 5'd16;
        l2_req.hsize = HSIZE_WORD;
        l2_valid = (kind == 3);
        #1 chk(nc_take && !l2_ready, "NC has priority");
        if (kind == 3) prio_wins++;
        @(negedge clk); nc_valid = 0;
        wait_done(nc, wr, er);
        chk(nc && wr == nc_req.write && !er, "nc completion first");
        if (nc_req.write) begin
          model[nc_req.addr[13:2]] = nc_req.wdata[0];
          if (nc_req.dword) model[nc_req.addr[13:2] + 1] = nc_req.wdata[1];
        end else begin
          chk(rdata[0] == model[nc_req.addr[13:2]], "nc read");
          if (nc_req.dword) chk(rdata[1] == model[nc_req.addr[13:2] + 1], "nc dword read");
        end
        if (kind == 3) begin
          @(negedge clk); l2_valid = 0;
          wait_done(nc, wr, er);
          chk(!nc, "l2 served after nc");
          for (int i = 0; i < 16; i++) chk(rdata[i] == model[l2_req.addr[13:2] + i], "line read after nc");
        end
      end else begin                                 // error region: burst cancelled
        int beats;
        l2_req.write = 0; l2_req.addr = 32'hE000_0000; l2_req.nbeats = 5'd16; l2_req.hsize = HSIZE_WORD;
        l2_valid = 1;
        @(negedge clk); l2_valid = 0;
        beats = 0;
        while (!done) begin @(posedge clk); if (m2s.htrans[1] && s2m.hreadyout) beats++; #1; end
        chk(error, "error reported");
        chk(beats <= 2, $sformatf("burst cancelled after %0d beats", beats));
        errors++;
        @(negedge clk);
      end
      for (int i = 0; i < 4096; i++) if (mem[i] != model[i]) begin chk(0, $sformatf("mem %0d", i)); break; end
    end
    chk(prio_wins > 10 && errors > 10, "priority and error cases exercised");
    chk(proto_err == 0, "burst addresses");
    chk(skip_bad == 0, "skip count is a lower bound");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
