// LZ77 workload on rcs_top at its default sizes: complete compression of
// inputs of 800, 1100, 1300 and 1600 bytes, the sizes over which the
// design's speedup was measured, on the LZ77 base configuration.  For each
// input the system is reset (a fresh, zeroed search window), the lookahead
// window is filled, and then one RU round runs per codeword, shifting in as
// many bytes as the codeword consumed.  Every length/pointer pair is checked
// against a search in the testbench, and the codewords are decoded again and
// compared with the input.  Codeword count and cycles are printed per size.
module rcs_lz77_sizes_tb;
  `include "rcs_cpu_model.svh"

  int sizes [4] = '{800, 1100, 1300, 1600};

  initial begin
    repeat (20000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint t0;
    foreach (sizes[s]) begin
      reset_system();
      chk(ru_present == 2'b10, "LZ77 base configuration");
      lz_begin(sizes[s], s);
      t0 = cycle;
      while (!lz_done()) lz_step();
      lz_finish_check();
      $display("LZ77 %0d bytes: %0d codewords, %0d cycles", sizes[s], lz_codewords, cycle - t0);
      chk(lz_codewords < sizes[s], "compression found matches");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
