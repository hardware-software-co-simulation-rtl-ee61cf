// Matrix-multiplication reconfigurable unit (RU).
//
// Computes one element of C = A*B per command: the dot product of a row of A
// (held in the row buffer) and a column of B (held in the column buffer).
// The vector is split over NBOX boxes of N elements (mm_box, four MACs
// each); a final adder sums the box results into one element, which is
// written to the output row buffer.  One box suffices for 16x16 matrices and
// four are needed for 64x64; SIZE says how many boxes take part, so the unit
// can serve smaller vectors, and longer ones are split into parts whose
// partial results software adds.  A second column buffer lets the processor
// write the next column while the current one is in use: writes always go
// to the bank that is not being computed on, and each start makes the bank
// just written the active one.
//
// AHB slave (buffers, byte offsets in the region): 0x0000+4i row element i,
// 0x1000+4i next-column element i (write bank), 0x2000+4j output element j.
// Zero wait states; elements use the low DATA_W bits of a word.
// APB registers: 0x00 CTRL (write: bit0 start, bits 15:8 output index),
// 0x04 STATUS (bit0 busy, bit1 done), 0x08 SIZE (boxes used, 1..NBOX).
// Timing: with the start write's APB access cycle ending at t=0, the boxes
// accumulate on t=1..4, register their sums on t=5, and the output element
// is written and busy drops on t=6, one element per six cycles as in the
// document.  Buffers, box structure and latency follow the document; the
// address layout, register fields and data widths are this design's choice.
module matmul_ru
  import rcs_pkg::*;
#(
  parameter int unsigned NBOX      = 4,
  parameter int unsigned N         = 16,
  parameter int unsigned OUT_DEPTH = 16,
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned ACC_W     = 32,
  localparam int unsigned LEN = NBOX * N
) (
  input  logic        clk,
  input  logic        rst,
  // AHB slave
  input  logic        hsel,
  input  logic        hready,
  input  ahb_m2s_t    m2s,
  output ahb_s2m_t    s2m,
  // APB slave
  input  logic        psel,
  input  apb_m2s_t    apb,
  output logic [31:0] prdata,
  output logic        busy
);
  localparam int unsigned OW = (OUT_DEPTH > 1) ? $clog2(OUT_DEPTH) : 1;

  logic signed [DATA_W-1:0] row_buf [LEN];
  logic signed [DATA_W-1:0] col_buf [2][LEN];
  logic signed [ACC_W-1:0]  out_buf [OUT_DEPTH];
  logic                     act_bank;
  logic                     done_flag;
  logic [7:0]               out_idx;
  logic [$clog2(NBOX+1)-1:0] size_q;

  // ---------------------------------------------------------------- AHB side
  logic        d_pend, d_write;
  logic [15:0] d_addr;
  logic        accept;

  assign accept = hsel && hready && m2s.htrans[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      d_pend  <= 1'b0;
      d_write <= 1'b0;
      d_addr  <= '0;
    end else if (hready) begin
      d_pend  <= accept;
      d_write <= m2s.hwrite;
      d_addr  <= m2s.haddr[15:0];
    end
  end

  localparam int unsigned LIW = $clog2(LEN);
  logic [9:0]     d_idx;      // word index within a buffer
  logic [LIW-1:0] d_li;
  logic [OW-1:0]  d_oi;
  assign d_idx = d_addr[11:2];
  assign d_li  = d_idx[LIW-1:0];
  assign d_oi  = d_idx[OW-1:0];

  always_comb begin
    s2m.hreadyout = 1'b1;
    s2m.hresp     = HRESP_OKAY;
    s2m.hrdata    = '0;
    unique case (d_addr[13:12])
      2'd0: if (32'(d_idx) < LEN)       s2m.hrdata = 32'(row_buf[d_li]);
      2'd1: if (32'(d_idx) < LEN)       s2m.hrdata = 32'(col_buf[!act_bank][d_li]);
      2'd2: if (32'(d_idx) < OUT_DEPTH) s2m.hrdata = 32'(out_buf[d_oi]);
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- control
  logic wr_start;
  assign wr_start = psel && apb.penable && apb.pwrite && apb.paddr[11:0] == 12'h000
                    && apb.pwdata[0] && !busy;

  logic signed [DATA_W-1:0] row_slice [NBOX][N];
  logic signed [DATA_W-1:0] col_slice [NBOX][N];
  logic signed [ACC_W-1:0]  box_sum [NBOX];
  logic [NBOX-1:0]          box_valid;
  logic signed [ACC_W-1:0]  total;

  always_comb
    for (int b = 0; b < NBOX; b++)
      for (int e = 0; e < N; e++) begin
        row_slice[b][e] = row_buf[b*N + e];
        col_slice[b][e] = col_buf[act_bank][b*N + e];
      end

  for (genvar b = 0; b < NBOX; b++) begin : g_box
    mm_box #(.N(N), .NMAC(4), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_box (
      .clk, .rst,
      .start (wr_start),
      .row   (row_slice[b]),
      .col   (col_slice[b]),
      .sum   (box_sum[b]),
      .valid (box_valid[b])
    );
  end

  always_comb begin
    total = '0;
    for (int b = 0; b < NBOX; b++)
      if (b < int'(size_q)) total += box_sum[b];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      done_flag <= 1'b0;
      act_bank  <= 1'b0;
      out_idx   <= '0;
      size_q    <= ($clog2(NBOX+1))'(NBOX);
      for (int i = 0; i < LEN; i++) begin
        row_buf[i]    <= '0;
        col_buf[0][i] <= '0;
        col_buf[1][i] <= '0;
      end
      for (int j = 0; j < OUT_DEPTH; j++) out_buf[j] <= '0;
    end else begin
      // buffer writes in the AHB data phase
      if (d_pend && d_write && 32'(d_idx) < LEN) begin
        if (d_addr[13:12] == 2'd0) row_buf[d_li] <= m2s.hwdata[DATA_W-1:0];
        if (d_addr[13:12] == 2'd1) col_buf[!act_bank][d_li] <= m2s.hwdata[DATA_W-1:0];
      end
      if (psel && apb.penable && apb.pwrite && apb.paddr[11:0] == 12'h008 && !busy
          && apb.pwdata != 0 && apb.pwdata <= NBOX)
        size_q <= ($clog2(NBOX+1))'(apb.pwdata);
      if (wr_start) begin
        busy      <= 1'b1;
        done_flag <= 1'b0;
        act_bank  <= !act_bank;
        out_idx   <= apb.pwdata[15:8];
      end
      if (box_valid[0]) begin
        out_buf[out_idx[OW-1:0]] <= total;
        busy      <= 1'b0;
        done_flag <= 1'b1;
      end
    end
  end

  always_comb begin
    unique case (apb.paddr[11:0])
      12'h000: prdata = {16'd0, out_idx, 8'd0};
      12'h004: prdata = {30'd0, done_flag, busy};
      12'h008: prdata = 32'(size_q);
      default: prdata = '0;
    endcase
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (rst)
    wr_start |-> !busy);
endmodule
