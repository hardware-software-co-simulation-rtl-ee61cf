// Self-checking test of nc_queue: NC requests come out in program order, the
// queue fills and stalls, and load_issue_ok stays low from the push of an NC
// store until its bus completion is reported.
module nc_queue_tb;
  import rcs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, push, full, valid, take, store_done, load_issue_ok;
  nc_req_t req_in, head;
  logic [3:0] stores_outstanding;
  nc_req_t q[$];
  int checks = 0, failures = 0, inflight_st = 0, blocked = 0;

  nc_queue #(.DEPTH(8)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  int pend_done[$];   // cycles until each taken store completes
  initial begin
    int outstanding = 0;
    rst = 1; push = 0; take = 0; store_done = 0; req_in = '0;
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      chk(valid == (q.size() > 0), "valid");
      if (q.size() > 0) chk(head == q[0], "order");
      chk(int'(stores_outstanding) == outstanding, "store count");
      chk(load_issue_ok == (outstanding == 0), "load_issue_ok");
      // bus side: take the head now and then; a taken store completes later
      store_done = 0;
      foreach (pend_done[i]) pend_done[i]--;
      if (pend_done.size() > 0 && pend_done[0] <= 0) begin
        void'(pend_done.pop_front()); store_done = 1; outstanding--;
      end
      take = valid && ($urandom % 3 == 0);
      if (take) begin
        if (q[0].write) pend_done.push_back(2 + $urandom % 5);
        void'(q.pop_front());
      end
      // LSU side: a load only when the ordering rule allows it
      req_in = '0;
      req_in.write = $urandom % 2;
      req_in.addr  = $urandom;
      req_in.wdata = {$urandom, $urandom};
      req_in.dword = $urandom % 2;
      if (!req_in.write && !load_issue_ok) begin push = 0; blocked++; end
      else push = ($urandom % 2 == 0);
      if (push && !full) begin
        q.push_back(req_in);
        if (req_in.write) outstanding++;
      end
    end
    chk(blocked > 0, "loads were held back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
