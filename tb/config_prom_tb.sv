// Self-checking test of config_prom: programs a pattern through the
// programming port and streams it back one word per cycle, checking the
// one-cycle read latency.
module config_prom_tb;
  localparam int unsigned W = 1024;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re, prog_we; logic [9:0] addr, prog_addr; logic [31:0] rdata, prog_wdata;
  int checks = 0, failures = 0;

  config_prom #(.WORDS(W)) dut (.*);

  function automatic logic [31:0] pat(int i); return 32'(i) * 32'h9E3779B1 ^ 32'h5A5A0000; endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    re = 0; prog_we = 0; addr = 0; prog_addr = 0; prog_wdata = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_wdata = pat(i);
    end
    @(negedge clk); prog_we = 0;
    // streaming read: address i in cycle i, data i in cycle i+1
    @(negedge clk); re = 1; addr = 0;
    for (int i = 1; i <= W; i++) begin
      @(negedge clk);
      checks++;
      if (rdata !== pat(i-1)) begin failures++; $display("word %0d got %h", i-1, rdata); end
      addr = 10'(i);
      if (i == W) re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
