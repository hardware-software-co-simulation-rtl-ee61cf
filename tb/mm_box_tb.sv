// Self-checking test of mm_box: random signed 16-element vectors, the dot
// product against a reference sum, and the five-cycle latency from start to
// the registered sum.
module mm_box_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, start, valid;
  logic signed [15:0] row [16], col [16];
  logic signed [31:0] sum;
  int checks = 0, failures = 0;

  mm_box dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; start = 0;
    foreach (row[i]) begin row[i] = 0; col[i] = 0; end
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 300; n++) begin
      logic signed [31:0] exp;
      int lat;
      exp = 0;
      foreach (row[i]) begin
        row[i] = (n < 5) ? 16'sh7FFF - 16'(n) : 16'($urandom);
        col[i] = (n < 5) ? -16'sh8000 + 16'(n) : 16'($urandom);
        exp += 32'(row[i]) * 32'(col[i]);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;     // edge t=0 has passed
      lat = 0;                       // clock edges after t=0
      while (!valid && lat < 20) begin @(negedge clk); lat++; end
      // valid is seen in the cycle after edge t=5
      checks++;
      if (lat != 5) begin failures++; $display("latency %0d", lat); end
      checks++;
      if (sum !== exp) begin failures++; $display("sum %0d exp %0d", sum, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
