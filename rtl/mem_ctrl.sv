// Memory controller: AHB slave in front of the system SRAM.
//
// Zero-wait-state: a read address phase presents the word address to the
// SRAM's synchronous read port, so the word is ready in the data phase; a
// write is latched in its address phase and written, with byte enables from
// HSIZE and HADDR[1:0], at the end of its data phase when HWDATA is valid.
// A read whose address phase coincides with the data phase of a write to the
// same word would see the old word, so the written bytes are kept for one
// cycle and merged into the read data (a write-to-read bypass).  Bursts are
// handled beat by beat.  The document shows the controller and SRAM only as
// boxes on the AHB; everything here is this design's choice.
module mem_ctrl
  import rcs_pkg::*;
#(
  parameter int unsigned WORDS = 65536,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     hsel,
  input  logic     hready,
  input  ahb_m2s_t m2s,
  output ahb_s2m_t s2m,
  output logic     bypass_hit      // a read took bytes from the write bypass
);
  logic          accept;
  logic          w_pend;
  logic [AW-1:0] w_addr;
  logic [3:0]    w_strb;
  logic          byp_v;
  logic [3:0]    byp_strb;
  logic [31:0]   byp_data;
  logic [31:0]   ram_q;
  logic [AW-1:0] a_word;

  assign accept = hsel && hready && m2s.htrans[1];
  assign a_word = m2s.haddr[AW+1:2];

  sram #(.WORDS(WORDS)) u_sram (
    .clk,
    .re    (accept && !m2s.hwrite),
    .raddr (a_word),
    .rdata (ram_q),
    .we    (w_pend ? w_strb : 4'b0000),
    .waddr (w_addr),
    .wdata (m2s.hwdata)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      w_pend <= 1'b0;
      w_addr <= '0;
      w_strb <= '0;
      byp_v  <= 1'b0;
      byp_strb <= '0;
      byp_data <= '0;
    end else begin
      if (hready) begin
        w_pend <= accept && m2s.hwrite;
        w_addr <= a_word;
        w_strb <= byte_strobe(m2s.haddr[1:0], m2s.hsize);
        byp_v  <= accept && !m2s.hwrite && w_pend && (w_addr == a_word);
        byp_strb <= w_strb;
        byp_data <= m2s.hwdata;
      end
    end
  end

  always_comb begin
    s2m.hreadyout = 1'b1;
    s2m.hresp     = HRESP_OKAY;
    for (int b = 0; b < 4; b++)
      s2m.hrdata[8*b +: 8] = (byp_v && byp_strb[b]) ? byp_data[8*b +: 8] : ram_q[8*b +: 8];
  end

  assign bypass_hit = byp_v;
endmodule
