// Matrix-multiplication workload on rcs_top at its default sizes: C = A*B
// for every matrix dimension N = 4, 8, ..., 32, 48, 56, 64, the range over
// which the design's speedup was measured.  The matmul RU is first loaded
// by a partial reconfiguration next to the LZ77 base configuration; each
// product then uses ceil(N/16) boxes, so one RU pass covers a whole row and
// column.  A is read from SRAM as L2 lines, B's columns are written into the
// RU's column buffer while the previous column computes, and every element
// of C is checked against a product formed in the testbench.  The cycles
// taken by each size are printed.
module rcs_matmul_sizes_tb;
  `include "rcs_cpu_model.svh"

  localparam int CFG_WORDS = 1024;          // a short bitstream: the RU is
                                            // taken as pre-loaded
  int sizes [11] = '{4, 8, 12, 16, 20, 24, 28, 32, 48, 56, 64};

  initial begin
    repeat (20000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint t0;
    reset_system();
    prom_program(0, CFG_WORDS);
    reconfig_start(0, CFG_WORDS, 1'b1, RU_MATMUL);
    reconfig_wait();
    chk(ru_present == 2'b11, "matmul RU configured");
    foreach (sizes[s]) begin
      int n, boxes;
      n = sizes[s];
      boxes = (n + 15) / 16;
      mm_load(n);
      t0 = cycle;
      mm_run(n, boxes, 1'b0);
      $display("matmul N=%0d on %0d box(es): %0d cycles", n, boxes, cycle - t0);
    end
    chk(mm_prefetch > 0, "column prefetch during computation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
