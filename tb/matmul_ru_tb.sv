// Self-checking test of matmul_ru at its default size (four boxes, 64-element
// vectors).  For each box count 1..4 it loads a row of A, writes columns of
// B into the prefetch buffer, starts the unit and reads back the output row
// buffer, comparing each element with a reference dot product.  It checks
// the six-cycle latency from the start write to the written element, and
// that a column written while the unit computes does not disturb the running
// computation but is used by the next one.
module matmul_ru_tb;
  import rcs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, t_hsel, busy, t_psel;
  ahb_m2s_t m2s; ahb_s2m_t t_s2m;
  apb_m2s_t apb; logic [31:0] t_prdata;
  int checks = 0, failures = 0, overlap = 0;

  matmul_ru dut (.clk, .rst, .hsel (t_hsel), .hready (t_s2m.hreadyout), .m2s, .s2m (t_s2m),
                 .psel (t_psel), .apb, .prdata (t_prdata), .busy);

  `include "ahb_tasks.svh"
  `include "apb_tasks.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  logic signed [15:0] a [64];
  logic signed [15:0] b [16][64];
  logic signed [31:0] exp [16];

  task automatic write_col(int c);
    for (int i = 0; i < 64; i++) ahb_wr(32'h9000_1000 + 32'(4*i), 32'(b[c][i]));
  endtask

  initial begin
    logic [31:0] rd;
    int lat;
    m2s = '0; t_hsel = 0; apb = '0; t_psel = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    for (int nb = 1; nb <= 4; nb++) begin
      apb_wr(16'h008, 32'(nb));
      apb_rd(16'h008, rd); chk(rd == 32'(nb), "SIZE readback");
      foreach (a[i]) a[i] = 16'($urandom);
      foreach (b[c, i]) b[c][i] = (nb == 4 && c == 0) ? -16'sh8000 : 16'($urandom);
      if (nb == 4) foreach (a[i]) a[i] = -16'sh8000;
      for (int c = 0; c < 16; c++) begin
        exp[c] = 0;
        for (int i = 0; i < 16 * nb; i++) exp[c] += 32'(a[i]) * 32'(b[c][i]);
      end
      for (int i = 0; i < 64; i++) ahb_wr(32'h9000_0000 + 32'(4*i), 32'(a[i]));
      ahb_rd(32'h9000_0000 + 32'(4*5), rd); chk(rd[15:0] == a[5], "row readback");
      write_col(0);
      for (int c = 0; c < 16; c++) begin
        apb_wr(16'h000, {16'd0, 8'(c), 8'h01});
        lat = 0;
        while (busy) begin @(posedge clk); #1; lat++; end
        chk(lat == 6, $sformatf("latency %0d", lat));
        // fill the next column while this one runs (it is already done here
        // for lat 6 unless writes overlap; overlap is forced below)
        if (c < 15) write_col(c + 1);
      end
      // a column written during a computation: start, then write immediately
      for (int j = 0; j < 16; j++) begin
        ahb_rd(32'h9000_2000 + 32'(4*j), rd);
        chk($signed(rd) == exp[j], $sformatf("C[%0d] nb=%0d got %0d exp %0d", j, nb, $signed(rd), exp[j]));
      end
      apb_rd(16'h004, rd); chk(rd[1:0] == 2'b10, "status done");
    end
    // prefetch during computation
    write_col(3);
    apb_wr(16'h000, {16'd0, 8'd0, 8'h01});
    chk(busy, "busy after start");
    ahb_wr(32'h9000_1000, 32'd12345);            // lands in the other bank
    if (busy) overlap++;
    while (busy) @(posedge clk);
    ahb_rd(32'h9000_2000, rd);
    chk($signed(rd) == exp[3], "prefetch write did not disturb");
    chk(overlap > 0, "write overlapped computation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
