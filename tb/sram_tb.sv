// Self-checking test of sram: random byte-masked writes and reads on a small
// instance against a reference array, including the one-cycle read latency
// and read-before-write when both ports hit the same word.
module sram_tb;
  localparam int unsigned W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re; logic [5:0] raddr, waddr; logic [31:0] rdata, wdata; logic [3:0] we;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  sram #(.WORDS(W)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] exp;
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    // initialise every word
    for (int i = 0; i < W; i++) begin
      @(negedge clk); we = 4'hF; waddr = 6'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      re = 1; raddr = 6'($urandom); exp = model[raddr];
      we = 4'($urandom); waddr = ($urandom % 4 == 0) ? raddr : 6'($urandom); wdata = $urandom;
      for (int b = 0; b < 4; b++) if (we[b]) model[waddr][8*b +: 8] = wdata[8*b +: 8];
      @(negedge clk); re = 0; we = 0;
      checks++;
      if (rdata !== exp) begin failures++; $display("read %0d got %h exp %h", raddr, rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
