// Combined LZ77 and 64x64 matrix-multiplication workload on rcs_top at its
// default sizes, on an e-FPGA twice the size of an XCV-1000: a full
// bitstream is 382984 words, half of it 191492 words.  Two cases run from
// the same start, the LZ77 RU as base configuration and 1100 bytes to
// compress:
//   1. LZ77 compression to the end, full reconfiguration to a 64x64 matmul
//      RU (four boxes), then the 64x64 product;
//   2. LZ77 compression started, partial reconfiguration to a 32x32 matmul
//      RU (two boxes) while compression continues, then the 64x64 product in
//      two halves per element, interleaved with the rest of the compression.
// Each case checks the compression (length/pointer pairs and decoding), every
// element of C, the number of configuration words and the one-word-per-clock
// reconfiguration time, and prints its total cycles.  The PROM holds the two
// bitstreams one after the other.
module rcs_table4_tb;
  `include "rcs_cpu_model.svh"

  localparam int FULL_WORDS = 382984, HALF_WORDS = 191492;
  localparam int SRC_FULL = 0, SRC_HALF = FULL_WORDS;
  localparam int N = 64, LZ_BYTES = 1100;

  initial begin
    repeat (30000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint t0;
    bit busy;
    reset_system();
    prom_program(0, FULL_WORDS + HALF_WORDS);
    mm_load(N);

    // case 1: full reconfiguration
    reset_system();
    chk(ru_present == 2'b10, "LZ77 base configuration");
    t0 = cycle;
    lz_begin(LZ_BYTES, 1);
    while (!lz_done()) lz_step();
    lz_finish_check();
    reconfig_start(SRC_FULL, FULL_WORDS, 1'b0, RU_MATMUL);
    reconfig_wait();
    chk(ru_present == 2'b01, "only the matmul RU after full reconfiguration");
    mm_run(N, 4, 1'b0);
    $display("full reconfiguration: %0d configuration words, %0d cycles in all", FULL_WORDS, cycle - t0);

    // case 2: partial reconfiguration, LZ77 going on meanwhile
    reset_system();
    t0 = cycle;
    overlap = 0;
    lz_begin(LZ_BYTES, 1);
    for (int k = 0; k < 20; k++) lz_step();
    reconfig_start(SRC_HALF, HALF_WORDS, 1'b1, RU_MATMUL);
    do begin
      if (!lz_done()) lz_step();
      reconfig_poll(busy);
    end while (busy);
    reconfig_check();
    chk(ru_present == 2'b11, "LZ77 and matmul RUs after partial reconfiguration");
    chk(overlap > 0, "LZ77 ran during the partial reconfiguration");
    mm_run(N, 2, 1'b1);
    while (!lz_done()) lz_step();
    lz_finish_check();
    $display("partial reconfiguration: %0d configuration words, %0d cycles in all", HALF_WORDS, cycle - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
