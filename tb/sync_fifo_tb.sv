// Self-checking test of sync_fifo: random pushes and pops against a queue
// model, filling it to full and draining it to empty, checking data order,
// the count and the full/empty flags.
module sync_fifo_tb;
  localparam int unsigned D = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, push, pop, full, empty; logic [7:0] wdata, rdata; logic [4:0] count;
  logic [7:0] q[$];
  int checks = 0, failures = 0, fulls = 0, empties = 0;

  sync_fifo #(.WIDTH(8), .DEPTH(D)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    rst = 1; push = 0; pop = 0; wdata = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 4000; n++) begin
      int bias;
      bias = (n / 500) % 2 == 0 ? 70 : 30;     // phases that fill, then drain
      @(negedge clk);
      chk(count == 5'(q.size()), "count");
      chk(full == (q.size() == D), "full");
      chk(empty == (q.size() == 0), "empty");
      if (q.size() > 0) chk(rdata == q[0], "data");
      if (full) fulls++;
      if (empty) empties++;
      push = ($urandom % 100) < bias; wdata = 8'($urandom);
      pop  = ($urandom % 100) >= bias;
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && !full) q.push_back(wdata);
    end
    chk(fulls > 0 && empties > 0, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
