// Self-checking test of config_ctrl with a configuration PROM.  It programs
// the PROM with a known pattern, runs full and partial reconfigurations over
// APB and checks that the e-FPGA receives exactly LEN words from the right
// PROM addresses at one word per clock, that the start-to-done time is
// LEN + 1 cycles, that the status register reports busy and done, and that
// the RU-present mask follows the full/partial rules.
module config_ctrl_tb;
  import rcs_pkg::*;
  localparam int unsigned PW = 4096;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, t_psel, prom_re, cfg_cs, cfg_we, cfg_partial, prog_we;
  apb_m2s_t apb; logic [31:0] t_prdata, prom_rdata, cfg_data, prog_wdata;
  logic [11:0] prom_addr, prog_addr;
  logic [3:0] cfg_target;
  logic [NUM_RUS-1:0] ru_present;
  int checks = 0, failures = 0;

  config_prom #(.WORDS(PW)) u_prom (.clk, .re (prom_re), .addr (prom_addr), .rdata (prom_rdata),
                                    .prog_we, .prog_addr, .prog_wdata);
  config_ctrl #(.PROM_WORDS(PW)) dut (.clk, .rst, .psel (t_psel), .apb, .prdata (t_prdata),
                                      .prom_re, .prom_addr, .prom_rdata,
                                      .cfg_cs, .cfg_we, .cfg_data, .cfg_target, .cfg_partial, .ru_present);

  `include "apb_tasks.svh"

  function automatic logic [31:0] pat(int i); return 32'(i) * 32'h01000193 + 32'hC0FFEE; endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  // collect the configuration stream
  int got, bad, gaps; int exp_src; bit prev_we;
  always @(posedge clk) begin
    if (cfg_we) begin
      if (cfg_data !== pat(exp_src + got)) bad++;
      got++;
    end
    if (cfg_cs && prev_we && !cfg_we && got != 0) gaps++;
    prev_we <= cfg_we;
  end

  task automatic reconfig(int src, int len, bit partial, int target,
                          logic [1:0] mask_start, logic [1:0] mask_end);
    int lat;
    logic [31:0] rd;
    got = 0; bad = 0; gaps = 0; exp_src = src;
    apb_wr(16'h004, 32'(src));
    apb_wr(16'h008, 32'(len));
    apb_wr(16'h000, {24'd0, 4'(target), 2'b00, partial, 1'b1});
    chk(ru_present == mask_start, $sformatf("mask at start %b", ru_present));
    lat = 0;
    while (cfg_cs) begin @(posedge clk); #1; lat++; end
    chk(lat == len + 1, $sformatf("reconfiguration time %0d for %0d words", lat, len));
    chk(got == len, $sformatf("words delivered %0d", got));
    chk(bad == 0, "word contents");
    chk(gaps == 0, "one word per clock");
    chk(ru_present == mask_end, $sformatf("mask at end %b", ru_present));
    apb_rd(16'h00C, rd);
    chk(rd[1:0] == 2'b10 && rd[9:8] == mask_end, "status");
    apb_rd(16'h010, rd);
    chk(rd == 32'(len), "count register");
  endtask

  initial begin
    logic [31:0] rd;
    t_psel = 0; apb = '0; prog_we = 0; prog_addr = 0; prog_wdata = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < PW; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 12'(i); prog_wdata = pat(i);
    end
    @(negedge clk); prog_we = 0;
    apb_rd(16'h00C, rd); chk(rd[9:8] == 2'b10, "base configuration LZ77");
    reconfig(0,    2000, 1'b0, RU_MATMUL, 2'b00, 2'b01);   // full
    reconfig(2000, 1000, 1'b1, RU_LZ77,   2'b01, 2'b11);   // partial
    reconfig(100,  1,    1'b1, RU_MATMUL, 2'b10, 2'b11);   // partial, one word
    reconfig(3000, 777,  1'b0, RU_LZ77,   2'b00, 2'b10);   // full
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
