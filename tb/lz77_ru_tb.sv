// Self-checking test of lz77_ru at the document's sizes (256-byte search
// window, 16-byte lookahead, 512-byte FIFO).  Input bytes from a small
// alphabet (so that long matches occur) are pushed through the AHB FIFO
// port; rounds of shift-and-match are started over APB, and each round's
// match length and pointer are compared with a software longest-match
// search over a model of the data buffer.  It checks the round time of
// SHIFT + 1 + P cycles, a push held off while the FIFO is full, and a shift
// that waits for data while the FIFO is empty.
module lz77_ru_tb;
  import rcs_pkg::*;
  localparam int P = 256, Q = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, t_hsel, busy, t_psel, fifo_full_wait, fifo_empty_wait;
  ahb_m2s_t m2s; ahb_s2m_t t_s2m;
  apb_m2s_t apb; logic [31:0] t_prdata;
  int checks = 0, failures = 0, full_waits = 0, empty_waits = 0;

  lz77_ru dut (.clk, .rst, .hsel (t_hsel), .hready (t_s2m.hreadyout), .m2s, .s2m (t_s2m),
               .psel (t_psel), .apb, .prdata (t_prdata), .busy, .fifo_full_wait, .fifo_empty_wait);

  `include "ahb_tasks.svh"
  `include "apb_tasks.svh"

  always @(posedge clk) begin
    if (fifo_full_wait)  full_waits++;
    if (fifo_empty_wait) empty_waits++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  logic [7:0] dref [P+Q];
  logic [7:0] pending [$];      // bytes pushed but not yet shifted in

  function automatic logic [7:0] next_byte(int n);
    // runs of a repeating phrase mixed with random bytes of a 4-symbol alphabet
    string phrase;
    phrase = "ABCDEFGHIJKLMNOPQRS";
    return (n % 97 < 40) ? 8'(phrase[n % 19]) : 8'(65 + $urandom % 4);
  endfunction

  int produced = 0;
  task automatic push_bytes(int n);
    for (int i = 0; i < n; i++) begin
      logic [7:0] v;
      v = next_byte(produced++);
      pending.push_back(v);
      ahb_wr(32'hA000_0000, 32'(v));
    end
  endtask

  task automatic model_shift(int n);
    for (int s = 0; s < n; s++) begin
      for (int k = 0; k < P + Q - 1; k++) dref[k] = dref[k+1];
      dref[P+Q-1] = pending.pop_front();
    end
  endtask

  task automatic model_match(output int blen, output int bptr);
    blen = 0; bptr = 0;
    for (int i = 0; i < P; i++) begin
      int l;
      l = 0;
      while (l < Q - 1 && dref[i + l] == dref[P + l]) l++;
      if (l > blen) begin blen = l; bptr = i; end
    end
  endtask

  task automatic round(int n, bit late_push, int late_n);
    int lat, blen, bptr;
    logic [31:0] rd;
    apb_wr(16'h000, (32'(n) << 16) | 32'h1);
    lat = 0;
    if (late_push) begin
      repeat (5) @(posedge clk);
      push_bytes(late_n);
      lat = -1;
    end
    while (busy) begin @(posedge clk); #1; if (lat >= 0) lat++; end
    if (lat >= 0) chk(lat == n + 1 + P, $sformatf("round time %0d for shift %0d", lat, n));
    model_shift(n);
    model_match(blen, bptr);
    apb_rd(16'h008, rd); chk(int'(rd) == blen, $sformatf("length %0d exp %0d", rd, blen));
    apb_rd(16'h00C, rd); chk(int'(rd) == bptr, $sformatf("pointer %0d exp %0d", rd, bptr));
    ahb_rd(32'hA000_0004, rd); chk(int'(rd) == blen, "length on AHB");
    ahb_rd(32'hA000_0008, rd); chk(int'(rd) == bptr, "pointer on AHB");
    apb_rd(16'h004, rd); chk(rd[1:0] == 2'b10, "status done");
  endtask

  initial begin
    int n, long_matches;
    logic [31:0] rd;
    m2s = '0; t_hsel = 0; apb = '0; t_psel = 0;
    foreach (dref[k]) dref[k] = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    // fill the whole data buffer
    push_bytes(P + Q);
    round(P + Q, 0, 0);
    long_matches = 0;
    for (int r = 0; r < 60; r++) begin
      logic [31:0] len;
      apb_rd(16'h008, len);
      if (len >= 4) long_matches++;
      n = int'(len) + 1;                       // consume the match and one literal
      if (r % 10 == 5) round(n, 1, n);         // data arrives after the start
      else begin push_bytes(n); round(n, 0, 0); end
    end
    chk(long_matches > 5, "long matches occurred");
    // overflow: fill the FIFO, then a push must wait until a round drains it
    push_bytes(512);
    apb_rd(16'h004, rd); chk(rd[25:16] == 10'd512, "FIFO count 512");
    fork
      push_bytes(1);
      begin repeat (20) @(posedge clk); apb_wr(16'h000, (32'(P + Q) << 16) | 32'h1); end
    join
    while (busy) @(posedge clk);
    model_shift(P + Q);
    chk(full_waits > 0, "push held off while FIFO full");
    chk(empty_waits > 0, "shift waited for data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
