// Configuration controller of the e-FPGA, with its APB registers.
//
// The processor only starts a reconfiguration; this controller moves the
// bitstream from the configuration PROM to the e-FPGA over a separate 32-bit
// path at one word per clock, and reports completion in a status register
// that the processor polls.  It also keeps the mask of RU regions that hold a
// valid configuration: a full reconfiguration clears the whole mask at start
// (the whole fabric stops), a partial one clears only the target's bit (the
// other RUs keep running), and the target's bit is set when the last word has
// been delivered.  The mask gates each RU onto the bus and holds an absent
// RU in reset.
//
// Registers (APB, word offsets): 0x00 CTRL (write: bit0 start, bit1 partial,
// bits 7:4 target RU), 0x04 SRC (first PROM word), 0x08 LEN (words to move),
// 0x0C STATUS (bit0 busy, bit1 done, bits 15:8 RU-present mask),
// 0x10 COUNT (words delivered so far).
// Timing: the start write ends in cycle 0; PROM reads are issued in cycles
// 1..LEN, words appear on cfg_data with cfg_we in cycles 2..LEN+1, and from cycle
// LEN+2 busy is low, done is high and the target's present bit is set.  The word rate, the 32-bit path and the
// start/poll sequence follow the document; the register layout, the reset
// mask (LZ77 as the base configuration) and the mask behaviour are this
// design's choices.
module config_ctrl
  import rcs_pkg::*;
#(
  parameter int unsigned PROM_WORDS = 1048576,
  parameter logic [NUM_RUS-1:0] BASE_PRESENT = NUM_RUS'(1) << RU_LZ77,
  localparam int unsigned AW = $clog2(PROM_WORDS)
) (
  input  logic               clk,
  input  logic               rst,
  // APB slave
  input  logic               psel,
  input  apb_m2s_t           apb,
  output logic [31:0]        prdata,
  // PROM read port
  output logic               prom_re,
  output logic [AW-1:0]      prom_addr,
  input  logic [31:0]        prom_rdata,
  // e-FPGA configuration port
  output logic               cfg_cs,      // a configuration is in progress
  output logic               cfg_we,      // cfg_data holds a configuration word
  output logic [31:0]        cfg_data,
  output logic [3:0]         cfg_target,
  output logic               cfg_partial,
  // RU regions holding a valid configuration
  output logic [NUM_RUS-1:0] ru_present
);
  logic          busy, done_flag;
  logic [AW-1:0] src_q;
  logic [31:0]   len_q;
  logic [31:0]   issued, delivered;
  logic          rd_pend;
  logic          wr_ctrl;

  assign wr_ctrl = psel && apb.penable && apb.pwrite && apb.paddr[11:0] == 12'h000;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy        <= 1'b0;
      done_flag   <= 1'b0;
      src_q       <= '0;
      len_q       <= '0;
      issued      <= '0;
      delivered   <= '0;
      rd_pend     <= 1'b0;
      cfg_target  <= '0;
      cfg_partial <= 1'b0;
      ru_present  <= BASE_PRESENT;
    end else begin
      if (psel && apb.penable && apb.pwrite && !busy) begin
        unique case (apb.paddr[11:0])
          12'h004: src_q <= AW'(apb.pwdata);
          12'h008: len_q <= apb.pwdata;
          default: ;
        endcase
      end
      rd_pend <= 1'b0;
      if (!busy) begin
        if (wr_ctrl && apb.pwdata[0] && len_q != 0) begin
          busy        <= 1'b1;
          done_flag   <= 1'b0;
          issued      <= '0;
          delivered   <= '0;
          cfg_partial <= apb.pwdata[1];
          cfg_target  <= apb.pwdata[7:4];
          if (apb.pwdata[1]) ru_present[apb.pwdata[4 +: $clog2(NUM_RUS)]] <= 1'b0;
          else               ru_present <= '0;
        end
      end else begin
        if (issued != len_q) begin
          issued  <= issued + 1;
          rd_pend <= 1'b1;
        end
        if (rd_pend) delivered <= delivered + 1;
        if (rd_pend && delivered == len_q - 1) begin
          busy      <= 1'b0;
          done_flag <= 1'b1;
          if (32'(cfg_target) < NUM_RUS) ru_present[cfg_target[$clog2(NUM_RUS)-1:0]] <= 1'b1;
        end
      end
    end
  end

  assign prom_re   = busy && (issued != len_q);
  assign prom_addr = src_q + AW'(issued);
  assign cfg_cs    = busy;
  assign cfg_we    = rd_pend;
  assign cfg_data  = prom_rdata;

  always_comb begin
    unique case (apb.paddr[11:0])
      12'h000: prdata = {24'd0, cfg_target, 2'b00, cfg_partial, busy};
      12'h004: prdata = 32'(src_q);
      12'h008: prdata = len_q;
      12'h00C: prdata = {16'd0, 8'(ru_present), 6'd0, done_flag, busy};
      12'h010: prdata = delivered;
      default: prdata = '0;
    endcase
  end

  a_rate: assert property (@(posedge clk) disable iff (rst)
    (busy && $past(busy) && $past(issued) != len_q) |-> rd_pend);
endmodule
