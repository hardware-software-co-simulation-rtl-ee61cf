// End-to-end test of rcs_top at its default sizes.  The testbench plays the
// processor: it issues L2 line transfers and non-cacheable (NC) accesses
// through the top's request ports and runs the reconfiguration scenario of
// an LZ77 base configuration to which a matrix-multiplication RU is added:
//   1. LZ77 string matching on the base configuration;
//   2. partial reconfiguration (half a device, 95746 words) that loads a
//      16x16 matmul RU while LZ77 rounds go on;
//   3. a 32x32 matrix product on the one-box RU, partial sums added in
//      software, with A and B kept in SRAM and fetched as L2 lines;
//   4. full reconfiguration (a whole XCV-1000, 191492 words) to a
//      32x32 matmul RU and the same product on two boxes;
//   5. full reconfiguration back to LZ77 and more LZ77 rounds.
// Results are checked against models in the testbench: every C element,
// every LZ77 length/pointer pair, every reconfiguration's word count and
// duration (one word per clock).  It also counts, and requires, the
// mechanisms of the design: NC priority over L2, NC loads held back behind
// NC stores, APB wait states, ERROR from an RU that is not configured,
// column prefetch during computation, LZ77 waiting for FIFO data, RU
// computation overlapping a partial reconfiguration, and a double-word NC
// access.
module rcs_top_tb;
  import rcs_pkg::*;
  localparam int P = 256, Q = 16, N = 32;
  localparam int FULL_WORDS = 191492, HALF_WORDS = 95746, LZ_WORDS = 9575;
  localparam int SRC_FULL = 0, SRC_HALF = FULL_WORDS, SRC_LZ = FULL_WORDS + HALF_WORDS;

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
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int m_nc_priority = 0, m_load_held = 0, m_apb_wait = 0, m_absent_error = 0, m_prefetch = 0;
  int m_fifo_wait = 0, m_overlap = 0, m_full = 0, m_partial = 0, m_skip = 0, m_dword = 0;
  int cur_src = 0, apb_lat = 1000, ahb_lat = 1000;
  int cs_cycles = 0, we_words = 0, cfg_bad = 0, store_errors = 0;
  always @(posedge clk) begin
    if (lz_fifo_empty_wait) m_fifo_wait++;
    if (cfg_cs && cfg_partial && (lz_busy || matmul_busy)) m_overlap++;
    if (matmul_busy && bus_done && bus_done_nc && bus_done_write) m_prefetch++;
    if (bus_skip_count > 1) m_skip++;
    if (bus_done && bus_error && bus_done_write) store_errors++;
    if (cfg_cs) cs_cycles++;
    if (cfg_we) begin
      if (cfg_data !== prom_word(20'(cur_src + we_words))) cfg_bad++;
      we_words++;
    end
  end

  function automatic logic [31:0] prom_word(logic [19:0] a);
    return {12'h1AC, a} ^ 32'h0F0F_0000;
  endfunction

  // ------------------------------------------------------------ processor side
  task automatic nc_store(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    while (nc_full) @(negedge clk);
    nc_req = '0; nc_req.write = 1; nc_req.addr = a; nc_req.hsize = HSIZE_WORD; nc_req.wdata[0] = d;
    nc_push = 1;
    @(negedge clk); nc_push = 0;
  endtask

  task automatic nc_load(logic [31:0] a, output logic [31:0] d, output bit err);
    int lat;
    @(negedge clk);
    if (!nc_load_issue_ok) m_load_held++;
    while (!nc_load_issue_ok || nc_full) @(negedge clk);
    nc_req = '0; nc_req.write = 0; nc_req.addr = a; nc_req.hsize = HSIZE_WORD;
    nc_push = 1;
    @(negedge clk); nc_push = 0;
    lat = 0;
    while (!(bus_done && bus_done_nc && !bus_done_write)) begin @(negedge clk); lat++; end
    d = bus_rdata[0]; err = bus_error;
    // the shortest load to an APB register against one to an AHB slave
    if (!err && a[31:28] == 4'h8 && lat < apb_lat) apb_lat = lat;
    if (!err && a[31:28] == 4'hA && lat < ahb_lat) ahb_lat = lat;
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
  task automatic reconfig(int src, int len, bit partial, int target, bit lz_during);
    logic [31:0] st;
    bit err;
    cs_cycles = 0; we_words = 0; cfg_bad = 0; cur_src = src;
    nc_store(32'h8000_0004, 32'(src));
    nc_store(32'h8000_0008, 32'(len));
    nc_store(32'h8000_0000, {24'd0, 4'(target), 2'b00, partial, 1'b1});
    do begin
      if (lz_during) lz_round(lz_last_len + 1);
      nc_rd(32'h8000_000C, st);
      if (!partial && st[0]) begin
        logic [31:0] d;
        nc_load(32'hA000_0004, d, err);      // no RU is configured now
        if (err) m_absent_error++;
      end
    end while (st[0]);
    chk(we_words == len, $sformatf("configuration words %0d of %0d", we_words, len));
    chk(cs_cycles == len + 1, $sformatf("reconfiguration cycles %0d for %0d words", cs_cycles, len));
    chk(cfg_bad == 0, "configuration data");
    if (partial) m_partial++; else m_full++;
  endtask

  // ------------------------------------------------------------ LZ77
  logic [7:0] dref [P+Q];
  logic [7:0] pending [$];
  int produced = 0, lz_last_len = 0, lz_rounds = 0;
  string phrase = "THE QUICK BROWN FOX ";

  task automatic lz_reset_model();
    foreach (dref[k]) dref[k] = 0;
    pending = {};
  endtask

  task automatic lz_round(int n);
    logic [31:0] st, len, ptr;
    int blen, bptr;
    // start first when the FIFO is empty, so the shift waits for data
    nc_store(32'h8000_2000, (32'(n) << 16) | 32'h1);
    for (int i = 0; i < n; i++) begin
      logic [7:0] v;
      v = (produced % 50 < 30) ? 8'(phrase[produced % 20]) : 8'(97 + $urandom % 3);
      produced++;
      pending.push_back(v);
      nc_store(32'hA000_0000, 32'(v));
    end
    do nc_rd(32'h8000_2004, st); while (st[0]);
    for (int s = 0; s < n; s++) begin
      for (int k = 0; k < P + Q - 1; k++) dref[k] = dref[k+1];
      dref[P+Q-1] = pending.pop_front();
    end
    blen = 0; bptr = 0;
    for (int i = 0; i < P; i++) begin
      int l;
      l = 0;
      while (l < Q - 1 && dref[i + l] == dref[P + l]) l++;
      if (l > blen) begin blen = l; bptr = i; end
    end
    nc_rd(32'hA000_0004, len);
    nc_rd(32'hA000_0008, ptr);
    chk(int'(len) == blen && int'(ptr) == bptr,
        $sformatf("LZ77 round %0d: length %0d pointer %0d, expected %0d %0d", lz_rounds, len, ptr, blen, bptr));
    lz_last_len = int'(len);
    lz_rounds++;
  endtask

  // ------------------------------------------------------------ matrices
  logic signed [15:0] A [N][N], B [N][N];
  logic signed [31:0] C [N][N];
  localparam logic [31:0] A_BASE = 32'h0000_1000, B_BASE = 32'h0000_3000;

  // fetch a row of A or a column of B from SRAM as L2 lines (elements stored
  // as one 32-bit word each, row-major)
  task automatic fetch_row(int i, output logic signed [15:0] v [N]);
    line_t r, z;
    z = '0;
    for (int l = 0; l < N / 16; l++) begin
      l2_line(0, A_BASE + 32'(4 * (i * N + 16 * l)), z, r);
      for (int e = 0; e < 16; e++) v[16 * l + e] = r[e][15:0];
    end
  endtask

  task automatic matmul(int boxes);
    logic [31:0] st, d;
    logic signed [15:0] arow [N];
    int seg;
    seg = 16 * boxes;                      // elements per RU pass
    nc_store(32'h8000_1008, 32'(boxes));
    for (int i = 0; i < N; i++) begin
      logic signed [31:0] acc [N];
      fetch_row(i, arow);
      foreach (acc[j]) acc[j] = 0;
      for (int h = 0; h < N / seg; h++) begin
        for (int e = 0; e < seg; e++) nc_store(32'h9000_0000 + 32'(4 * e), 32'(arow[h * seg + e]));
        for (int jb = 0; jb < N; jb += 16) begin
          for (int e = 0; e < seg; e++) nc_store(32'h9000_1000 + 32'(4 * e), 32'(B[h * seg + e][jb]));
          for (int j = jb; j < jb + 16; j++) begin
            nc_store(32'h8000_1000, 32'(((j - jb) << 8) | 1));
            // prefetch the next column while this one is computed
            if (j + 1 < jb + 16)
              for (int e = 0; e < seg; e++) nc_store(32'h9000_1000 + 32'(4 * e), 32'(B[h * seg + e][j + 1]));
            do nc_rd(32'h8000_1004, st); while (st[0]);
          end
          for (int j = jb; j < jb + 16; j++) begin
            nc_rd(32'h9000_2000 + 32'(4 * (j - jb)), d);
            acc[j] += $signed(d);
          end
        end
      end
      for (int j = 0; j < N; j++)
        chk(acc[j] == C[i][j], $sformatf("C[%0d][%0d] = %0d, expected %0d (%0d boxes)", i, j, acc[j], C[i][j], boxes));
    end
  endtask

  // ------------------------------------------------------------ scenario
  initial begin
    line_t w, r;
    logic [31:0] d;
    bit err;
    l2_valid = 0; l2_req = '0; l2_wdata = '0; nc_push = 0; nc_req = '0;
    prom_prog_we = 0; prom_prog_addr = 0; prom_prog_wdata = 0;
    rst = 1; repeat (4) @(negedge clk); rst = 0;

    // bitstreams into the configuration PROM
    for (int a = 0; a < SRC_LZ + LZ_WORDS; a++) begin
      @(negedge clk); prom_prog_we = 1; prom_prog_addr = 20'(a); prom_prog_wdata = prom_word(20'(a));
    end
    @(negedge clk); prom_prog_we = 0;

    // matrices into SRAM through L2 write-backs, checked by reading back
    foreach (A[i, j]) begin A[i][j] = 16'($urandom % 401) - 16'sd200; B[i][j] = 16'($urandom % 401) - 16'sd200; end
    foreach (C[i, j]) begin
      C[i][j] = 0;
      for (int k = 0; k < N; k++) C[i][j] += 32'(A[i][k]) * 32'(B[k][j]);
    end
    for (int l = 0; l < N * N / 16; l++) begin
      for (int e = 0; e < 16; e++) w[e] = 32'(A[(16 * l + e) / N][(16 * l + e) % N]);
      l2_line(1, A_BASE + 32'(64 * l), w, r);
      for (int e = 0; e < 16; e++) w[e] = 32'(B[(16 * l + e) / N][(16 * l + e) % N]);
      l2_line(1, B_BASE + 32'(64 * l), w, r);
    end
    w = '0;
    l2_line(0, B_BASE + 64, w, r);
    for (int e = 0; e < 16; e++) chk(r[e] == 32'(B[(16 + e) / N][(16 + e) % N]), "SRAM line");

    // NC request and L2 request waiting together: the NC one goes first.
    // An L2 write-back keeps the bus busy while both are queued.
    @(negedge clk);
    l2_req.write = 1; l2_req.addr = 32'h0000_8000; l2_req.hsize = HSIZE_WORD; l2_req.nbeats = 5'd16;
    l2_wdata = '0; l2_valid = 1;
    while (!l2_ready) @(negedge clk);
    @(negedge clk); l2_valid = 0;
    nc_req = '0; nc_req.write = 0; nc_req.addr = 32'h8000_000C; nc_req.hsize = HSIZE_WORD;
    nc_push = 1;
    @(negedge clk); nc_push = 0;
    l2_req.write = 0; l2_req.addr = A_BASE; l2_valid = 1;
    while (!bus_done) @(negedge clk);                 // the write-back
    chk(!bus_done_nc && bus_done_write, "write-back done");
    @(negedge clk);
    while (!bus_done) @(negedge clk);
    chk(bus_done_nc, "NC load served before the waiting L2 line");
    if (bus_done_nc) m_nc_priority++;
    while (!l2_ready) @(negedge clk);                 // the line read is taken next
    @(negedge clk); l2_valid = 0;
    while (!bus_done) @(negedge clk);
    r = bus_rdata;
    chk(!bus_done_nc, "L2 line served after the NC load");
    for (int e = 0; e < 16; e++) chk($signed(r[e][15:0]) == A[e / N][e % N], "L2 line after NC");

    // 1. base configuration: LZ77 only; the matmul region answers ERROR
    nc_rd(32'h8000_000C, d);
    chk(d[9:8] == 2'b10, "base configuration is LZ77");
    nc_load(32'h9000_2000, d, err);
    chk(err, "absent matmul RU answers ERROR");
    if (err) m_absent_error++;
    lz_reset_model();
    lz_round(P + Q);
    for (int k = 0; k < 6; k++) lz_round(lz_last_len + 1);

    // 2. partial reconfiguration to add the 16x16 matmul RU, LZ77 continuing
    reconfig(SRC_HALF, HALF_WORDS, 1'b1, RU_MATMUL, 1'b1);
    nc_rd(32'h8000_000C, d);
    chk(d[9:8] == 2'b11, "both RUs present after partial reconfiguration");

    // 3. 32x32 product on the one-box RU
    matmul(1);
    lz_round(lz_last_len + 1);

    // 4. full reconfiguration to the 32x32 matmul RU
    reconfig(SRC_FULL, FULL_WORDS, 1'b0, RU_MATMUL, 1'b0);
    nc_rd(32'h8000_000C, d);
    chk(d[9:8] == 2'b01, "only matmul present after full reconfiguration");
    matmul(2);

    // a double-word NC load (two beats) of two output elements
    begin
      logic [31:0] d0, d1;
      nc_rd(32'h9000_2000, d0);
      nc_rd(32'h9000_2004, d1);
      @(negedge clk);
      while (!nc_load_issue_ok || nc_full) @(negedge clk);
      nc_req = '0; nc_req.addr = 32'h9000_2000; nc_req.hsize = HSIZE_WORD; nc_req.dword = 1;
      nc_push = 1;
      @(negedge clk); nc_push = 0;
      while (!(bus_done && bus_done_nc && !bus_done_write)) @(negedge clk);
      chk(!bus_error && bus_rdata[0] == d0 && bus_rdata[1] == d1, "double-word NC load");
      if (!bus_error) m_dword++;
    end

    // 5. back to LZ77
    reconfig(SRC_LZ, LZ_WORDS, 1'b0, RU_LZ77, 1'b0);
    lz_reset_model();
    lz_round(P + Q);
    for (int k = 0; k < 3; k++) lz_round(lz_last_len + 1);

    nc_store(32'h9000_0000, 32'd1);                 // posted store to the absent matmul RU
    nc_rd(32'h8000_000C, d);
    chk(store_errors > 0, "posted store to an absent RU ends in ERROR");

    m_apb_wait = apb_lat - ahb_lat;
    $display("mechanisms: nc_priority=%0d load_held=%0d apb_wait=%0d absent_error=%0d prefetch=%0d fifo_wait=%0d overlap=%0d full=%0d partial=%0d skip=%0d dword=%0d lz_rounds=%0d",
             m_nc_priority, m_load_held, m_apb_wait, m_absent_error, m_prefetch, m_fifo_wait, m_overlap, m_full, m_partial, m_skip, m_dword, lz_rounds);
    chk(m_nc_priority > 0, "NC priority over L2 happened");
    chk(m_load_held > 0, "NC load held behind NC stores happened");
    chk(m_apb_wait == 1, $sformatf("APB access costs one wait state (%0d)", m_apb_wait));
    chk(m_absent_error > 1, "ERROR from absent RU happened");
    chk(m_prefetch > 0, "column prefetch during computation happened");
    chk(m_fifo_wait > 0, "LZ77 waited for FIFO data");
    chk(m_overlap > 0, "RU computation during partial reconfiguration happened");
    chk(m_full == 2 && m_partial == 1, "full and partial reconfigurations happened");
    chk(m_skip > 0, "multi-cycle skip counts reported");
    chk(m_dword > 0, "double-word NC access happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
