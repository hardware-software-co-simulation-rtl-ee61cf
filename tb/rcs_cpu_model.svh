// Processor-side model shared by the workload testbenches of rcs_top.
//
// Included inside a testbench module.  It declares the top's signals,
// instantiates rcs_top at its default parameters and gives the software
// routines a processor would run on this system, each built only from the
// top's request ports:
//   nc_store / nc_load     non-cacheable word accesses through the NC queue
//                          (a load waits until no NC store is outstanding)
//   l2_line                a 16-word L2 line fill or write-back
//   reconfig_start/_wait   program the configuration controller and poll it
//   lz_*                   LZ77 compression of a byte stream with the LZ77 RU;
//                          every length/pointer pair is checked against a
//                          search in the testbench, and the codewords are
//                          decoded again and compared with the input
//   mm_*                   C = A*B for any N up to 64 on an RU with 1..4
//                          boxes of 16 elements; vectors longer than the RU
//                          are split and the partial sums added in software
// The including module declares nothing with these names.

  import rcs_pkg::*;
  localparam int P = 256, Q = 16;
  localparam int MAXN = 64;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  logic l2_valid, l2_ready, nc_push, nc_full, nc_load_issue_ok;
  bus_req_t l2_req; line_t l2_wdata, bus_rdata; nc_req_t nc_req;
  logic [3:0] nc_stores_outstanding;
  logic bus_done, bus_done_nc, bus_done_write, bus_error; logic [4:0] bus_skip_count;
  logic prom_prog_we; logic [19:0] prom_prog_addr; logic [31:0] prom_prog_wdata;
  logic cfg_cs, cfg_we, cfg_partial; logic [31:0] cfg_data; logic [3:0] cfg_target;
  logic [1:0] ru_present;
  logic mem_bypass_hit, matmul_busy, lz_busy, lz_fifo_full_wait, lz_fifo_empty_wait;

  rcs_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s at %0t", m, $time); end
  endtask

  longint cycle = 0;
  always @(posedge clk) cycle++;

  // ------------------------------------------------------------ reconfiguration monitor
  // PROM word a holds {12'h1AC, a} ^ 32'h0F0F0000, so every delivered word
  // can be checked against its PROM address.
  function automatic logic [31:0] prom_word(logic [19:0] a);
    return {12'h1AC, a} ^ 32'h0F0F_0000;
  endfunction

  int cur_src = 0, cs_cycles = 0, we_words = 0, cfg_bad = 0, overlap = 0;
  always @(posedge clk) begin
    if (cfg_cs) cs_cycles++;
    if (cfg_cs && cfg_partial && (lz_busy || matmul_busy)) overlap++;
    if (cfg_we) begin
      if (cfg_data !== prom_word(20'(cur_src + we_words))) cfg_bad++;
      we_words++;
    end
  end

  task automatic reset_system();
    l2_valid = 0; l2_req = '0; l2_wdata = '0; nc_push = 0; nc_req = '0;
    prom_prog_we = 0; prom_prog_addr = 0; prom_prog_wdata = 0;
    rst = 1; repeat (4) @(negedge clk); rst = 0;
  endtask

  task automatic prom_program(int first, int words);
    for (int a = first; a < first + words; a++) begin
      @(negedge clk); prom_prog_we = 1; prom_prog_addr = 20'(a); prom_prog_wdata = prom_word(20'(a));
    end
    @(negedge clk); prom_prog_we = 0;
  endtask

  // ------------------------------------------------------------ bus accesses
  task automatic nc_store(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    while (nc_full) @(negedge clk);
    nc_req = '0; nc_req.write = 1; nc_req.addr = a; nc_req.hsize = HSIZE_WORD; nc_req.wdata[0] = d;
    nc_push = 1;
    @(negedge clk); nc_push = 0;
  endtask

  task automatic nc_load(logic [31:0] a, output logic [31:0] d, output bit err);
    @(negedge clk);
    while (!nc_load_issue_ok || nc_full) @(negedge clk);
    nc_req = '0; nc_req.write = 0; nc_req.addr = a; nc_req.hsize = HSIZE_WORD;
    nc_push = 1;
    @(negedge clk); nc_push = 0;
    while (!(bus_done && bus_done_nc && !bus_done_write)) @(negedge clk);
    d = bus_rdata[0]; err = bus_error;
  endtask

  task automatic nc_rd(logic [31:0] a, output logic [31:0] d);
    bit err;
    nc_load(a, d, err);
    chk(!err, $sformatf("NC load %h", a));
  endtask

  task automatic l2_line(bit wr, logic [31:0] a, input line_t w, output line_t r);
    @(negedge clk);
    l2_req.write = wr; l2_req.addr = a; l2_req.hsize = HSIZE_WORD; l2_req.nbeats = 5'd16;
    l2_wdata = w; l2_valid = 1;
    while (!l2_ready) @(negedge clk);
    @(negedge clk); l2_valid = 0;
    while (!(bus_done && !bus_done_nc)) @(negedge clk);
    r = bus_rdata;
    chk(!bus_error, "L2 transfer");
  endtask

  // ------------------------------------------------------------ reconfiguration
  int rc_len = 0;
  task automatic reconfig_start(int src, int len, bit partial, int target);
    cs_cycles = 0; we_words = 0; cfg_bad = 0; cur_src = src; rc_len = len;
    nc_store(32'h8000_0004, 32'(src));
    nc_store(32'h8000_0008, 32'(len));
    nc_store(32'h8000_0000, {24'd0, 4'(target), 2'b00, partial, 1'b1});
  endtask

  function automatic bit reconfig_busy_now();
    return cfg_cs;
  endfunction

  task automatic reconfig_poll(output bit busy);
    logic [31:0] st;
    nc_rd(32'h8000_000C, st);
    busy = st[0];
  endtask

  task automatic reconfig_check();
    chk(we_words == rc_len, $sformatf("configuration words %0d of %0d", we_words, rc_len));
    chk(cs_cycles == rc_len + 1, $sformatf("reconfiguration cycles %0d for %0d words", cs_cycles, rc_len));
    chk(cfg_bad == 0, "configuration data");
  endtask

  task automatic reconfig_wait();
    bit busy;
    do reconfig_poll(busy); while (busy);
    reconfig_check();
  endtask

  // ------------------------------------------------------------ LZ77 compression
  // The data buffer model dref mirrors the RU's P+Q bytes; lz_in is the
  // stream, lz_shifted the bytes moved into the RU, lz_cur the first byte of
  // the lookahead window.  Codewords are (length, pointer, next byte).
  logic [7:0] dref [P+Q];
  logic [7:0] lz_in [$];
  logic [7:0] lz_out [$];
  int lz_shifted = 0, lz_cur = 0, lz_next_shift = 0, lz_codewords = 0, lz_rounds = 0;

  task automatic lz_begin(int nbytes, int seed);
    foreach (dref[k]) dref[k] = 0;
    lz_in = {}; lz_out = {};
    for (int i = 0; i < nbytes; i++) begin
      // text-like data: words from a small vocabulary with some noise
      int w;
      w = (i / 7 + seed) % 5;
      lz_in.push_back((i % 7 == 6) ? 8'h20 :
                      ((($urandom % 16) == 0) ? 8'(8'h61 + $urandom % 26) : 8'(8'h61 + (w * 3 + i % 7) % 26)));
    end
    lz_shifted = 0; lz_cur = 0; lz_codewords = 0;
    lz_next_shift = Q;                       // first fill the lookahead window
  endtask

  function automatic bit lz_done();
    return lz_cur >= lz_in.size();
  endfunction

  function automatic logic [7:0] lz_stream(int i);
    return (i >= 0 && i < lz_in.size()) ? lz_in[i] : 8'h00;
  endfunction

  // one RU round: push the new bytes, start, wait, read length and pointer,
  // form one codeword and decode it again
  task automatic lz_step();
    logic [31:0] st, len, ptr;
    int blen, bptr, avail, l;
    int n;
    n = lz_next_shift;
    for (int i = 0; i < n; i++) nc_store(32'hA000_0000, 32'(lz_stream(lz_shifted + i)));
    nc_store(32'h8000_2000, (32'(n) << 16) | 32'h1);
    for (int s = 0; s < n; s++) begin
      for (int k = 0; k < P + Q - 1; k++) dref[k] = dref[k+1];
      dref[P+Q-1] = lz_stream(lz_shifted + s);
    end
    lz_shifted += n;
    do nc_rd(32'h8000_2004, st); while (st[0]);
    nc_rd(32'hA000_0004, len);
    nc_rd(32'hA000_0008, ptr);
    blen = 0; bptr = 0;
    for (int i = 0; i < P; i++) begin
      l = 0;
      while (l < Q - 1 && dref[i + l] == dref[P + l]) l++;
      if (l > blen) begin blen = l; bptr = i; end
    end
    chk(int'(len) == blen && int'(ptr) == bptr,
        $sformatf("LZ77 byte %0d: length %0d pointer %0d, expected %0d %0d", lz_cur, len, ptr, blen, bptr));
    // software side: the match may not run past the end of the input
    avail = lz_in.size() - lz_cur;
    l = int'(len);
    if (l > avail - 1) l = avail - 1;
    // decode: copy l bytes from the search window, then the next byte
    for (int k = 0; k < l; k++) begin
      int src;
      src = lz_cur - P + int'(ptr) + k;
      lz_out.push_back(src < 0 ? 8'h00 : lz_out[src]);
    end
    lz_out.push_back(dref[P + l]);
    lz_cur += l + 1;
    lz_next_shift = l + 1;
    lz_codewords++;
    lz_rounds++;
  endtask

  task automatic lz_finish_check();
    bit same;
    same = (lz_out.size() == lz_in.size());
    for (int i = 0; same && i < lz_in.size(); i++) if (lz_out[i] != lz_in[i]) same = 0;
    chk(same, $sformatf("LZ77 decode of %0d bytes gives the input", lz_in.size()));
  endtask

  // ------------------------------------------------------------ matrix multiplication
  // A is kept in SRAM, one 32-bit word per element, rows padded to whole
  // L2 lines, and fetched as L2 lines; B's columns come from the processor.
  localparam logic [31:0] A_BASE = 32'h0000_1000;
  logic signed [15:0] A [MAXN][MAXN], B [MAXN][MAXN];
  logic signed [31:0] C [MAXN][MAXN];
  int mm_prefetch = 0;

  function automatic int mm_stride(int n);
    return 16 * ((n + 15) / 16);
  endfunction

  task automatic mm_load(int n);
    line_t w, r;
    foreach (A[i, j]) begin
      A[i][j] = (i < n && j < n) ? 16'($urandom % 2001) - 16'sd1000 : 16'sd0;
      B[i][j] = (i < n && j < n) ? 16'($urandom % 2001) - 16'sd1000 : 16'sd0;
    end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        C[i][j] = 0;
        for (int k = 0; k < n; k++) C[i][j] += 32'(A[i][k]) * 32'(B[k][j]);
      end
    for (int i = 0; i < n; i++)
      for (int l = 0; l < mm_stride(n) / 16; l++) begin
        for (int e = 0; e < 16; e++) w[e] = 32'(A[i][16 * l + e]);
        l2_line(1, A_BASE + 32'(4 * (i * mm_stride(n) + 16 * l)), w, r);
      end
  endtask

  task automatic mm_col(int seg, int h, int j);
    for (int e = 0; e < seg; e++)
      nc_store(32'h9000_1000 + 32'(4 * e), 32'((h * seg + e < MAXN) ? B[h * seg + e][j] : 16'sd0));
  endtask

  // C = A*B on an RU using `boxes` boxes; with lz_interleave one LZ77 round
  // runs after each row while compression is not finished
  task automatic mm_run(int n, int boxes, bit lz_interleave);
    logic [31:0] st, d;
    int seg, passes;
    seg = 16 * boxes;
    passes = (n + seg - 1) / seg;
    nc_store(32'h8000_1008, 32'(boxes));
    for (int i = 0; i < n; i++) begin
      logic signed [15:0] arow [MAXN];
      logic signed [31:0] acc [MAXN];
      line_t z, r;
      z = '0;
      foreach (arow[k]) arow[k] = 0;
      for (int l = 0; l < mm_stride(n) / 16; l++) begin
        l2_line(0, A_BASE + 32'(4 * (i * mm_stride(n) + 16 * l)), z, r);
        for (int e = 0; e < 16; e++) arow[16 * l + e] = r[e][15:0];
      end
      foreach (acc[j]) acc[j] = 0;
      for (int h = 0; h < passes; h++) begin
        for (int e = 0; e < seg; e++)
          nc_store(32'h9000_0000 + 32'(4 * e), 32'((h * seg + e < MAXN) ? arow[h * seg + e] : 16'sd0));
        for (int jb = 0; jb < n; jb += 16) begin
          int je;
          je = (jb + 16 < n) ? jb + 16 : n;
          mm_col(seg, h, jb);
          for (int j = jb; j < je; j++) begin
            nc_store(32'h8000_1000, 32'(((j - jb) << 8) | 1));
            if (j + 1 < je) begin
              mm_col(seg, h, j + 1);        // next column while this one computes
              mm_prefetch++;
            end
            do nc_rd(32'h8000_1004, st); while (st[0]);
          end
          for (int j = jb; j < je; j++) begin
            nc_rd(32'h9000_2000 + 32'(4 * (j - jb)), d);
            acc[j] += $signed(d);
          end
        end
      end
      for (int j = 0; j < n; j++)
        chk(acc[j] == C[i][j], $sformatf("N=%0d C[%0d][%0d] = %0d, expected %0d (%0d boxes)", n, i, j, acc[j], C[i][j], boxes));
      if (lz_interleave && !lz_done()) lz_step();
    end
  endtask
