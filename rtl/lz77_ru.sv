// LZ77 string-matching reconfigurable unit (RU).
//
// Finds, for the current lookahead window, the longest matching string that
// starts in the search window, so that software only has to form the
// codeword.  A data buffer of P+Q bytes holds the search window (bytes
// 0..P-1) and the lookahead window (bytes P..P+Q-1); new input bytes enter
// at the right end from the input FIFO, shifting the buffer left.  For a
// search, the data buffer is copied into an encoding buffer of the same size
// which then shifts left by one byte per cycle.  Q-1 comparators compare
// lookahead byte j with encoding-buffer byte j, so in the cycle with index i
// they test the string starting at search position i (the string may run on
// into the lookahead window).  The match-length encoder counts the leading
// matches; when that length exceeds the length register, the length
// register takes it and the pointer register takes the index, so the
// pointer names the first position with the longest match.
//
// Commands: a write to CTRL with bit0 set starts a round: first SHIFT (bits
// 24:16, 0..P+Q) bytes are moved from the FIFO into the data buffer (one per
// cycle, waiting while the FIFO is empty), then the encoding buffer is
// loaded, then P match cycles run.  With the FIFO holding the bytes, a round
// takes SHIFT + 1 + P cycles.
// AHB slave (byte offsets): 0x0 write pushes hwdata[7:0] into the FIFO and
// is held with wait states while the FIFO is full; 0x4 reads LENGTH, 0x8
// reads POINTER, 0xC reads STATUS.
// APB registers: 0x00 CTRL, 0x04 STATUS (bit0 busy, bit1 done, bits 25:16
// FIFO count), 0x08 LENGTH, 0x0C POINTER.
// The buffers, comparators, registers, window sizes (P=256, Q=16) and FIFO
// depth (512 = 2P) follow the document; the shift-count command, the
// register layout and the wait-state flow control are this design's choice.
module lz77_ru
  import rcs_pkg::*;
#(
  parameter int unsigned P          = 256,
  parameter int unsigned Q          = 16,
  parameter int unsigned FIFO_DEPTH = 512,
  localparam int unsigned LW = $clog2(Q),
  localparam int unsigned PW = $clog2(P),
  localparam int unsigned NW = $clog2(P + Q + 1),
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1)
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
  // observation
  output logic        busy,
  output logic        fifo_full_wait,   // an AHB push is being held off
  output logic        fifo_empty_wait   // a shift is waiting for input data
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_LOAD, S_MATCH} state_e;
  state_e state;

  logic [7:0]    dbuf [P+Q];
  logic [7:0]    ebuf [P+Q];
  logic [LW-1:0] length_q;
  logic [PW-1:0] index_q, pointer_q;
  logic [NW-1:0] shift_left;
  logic          done_flag;

  // ---------------------------------------------------------------- FIFO
  logic          f_push, f_pop, f_full, f_empty;
  logic [7:0]    f_rdata;
  logic [CW-1:0] f_count;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .push  (f_push),
    .wdata (m2s.hwdata[7:0]),
    .pop   (f_pop),
    .rdata (f_rdata),
    .full  (f_full),
    .empty (f_empty),
    .count (f_count)
  );

  // ---------------------------------------------------------------- AHB side
  logic       d_pend, d_write;
  logic [3:0] d_addr;
  logic       accept, d_push;

  assign accept = hsel && hready && m2s.htrans[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      d_pend  <= 1'b0;
      d_write <= 1'b0;
      d_addr  <= '0;
    end else if (hready) begin
      d_pend  <= accept;
      d_write <= m2s.hwrite;
      d_addr  <= m2s.haddr[3:0];
    end
  end

  assign d_push         = d_pend && d_write && d_addr[3:2] == 2'd0;
  assign f_push         = d_push && !f_full;
  assign fifo_full_wait = d_push && f_full;

  logic [31:0] status_w;
  assign status_w = {6'd0, 10'(f_count), 14'd0, done_flag, busy};

  always_comb begin
    s2m.hreadyout = !fifo_full_wait;
    s2m.hresp     = HRESP_OKAY;
    unique case (d_addr[3:2])
      2'd1:    s2m.hrdata = 32'(length_q);
      2'd2:    s2m.hrdata = 32'(pointer_q);
      2'd3:    s2m.hrdata = status_w;
      default: s2m.hrdata = '0;
    endcase
  end

  // ---------------------------------------------------------------- matching
  logic [Q-2:0]  eq;
  logic [LW-1:0] match_length;
  logic          length_valid;
  logic          better;

  always_comb
    for (int j = 0; j < Q - 1; j++) eq[j] = (ebuf[j] == dbuf[P + j]);

  match_len_enc #(.Q(Q)) u_enc (
    .eq, .en (state == S_MATCH),
    .match_length, .length_valid
  );

  assign better = length_valid && (match_length > length_q);

  logic wr_start;
  assign wr_start = psel && apb.penable && apb.pwrite && apb.paddr[11:0] == 12'h000
                    && apb.pwdata[0] && state == S_IDLE;

  assign f_pop           = (state == S_SHIFT) && shift_left != '0;
  assign fifo_empty_wait = f_pop && f_empty;
  assign busy            = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      length_q   <= '0;
      index_q    <= '0;
      pointer_q  <= '0;
      shift_left <= '0;
      done_flag  <= 1'b0;
      for (int k = 0; k < P + Q; k++) begin
        dbuf[k] <= '0;
        ebuf[k] <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: if (wr_start) begin
          shift_left <= NW'(apb.pwdata[16 +: NW]);
          done_flag  <= 1'b0;
          state      <= (apb.pwdata[16 +: NW] == '0) ? S_LOAD : S_SHIFT;
        end
        S_SHIFT: if (!f_empty) begin
          for (int k = 0; k < P + Q - 1; k++) dbuf[k] <= dbuf[k+1];
          dbuf[P+Q-1] <= f_rdata;
          shift_left  <= shift_left - 1'b1;
          if (shift_left == NW'(1)) state <= S_LOAD;
        end
        S_LOAD: begin
          for (int k = 0; k < P + Q; k++) ebuf[k] <= dbuf[k];
          length_q  <= '0;
          index_q   <= '0;
          pointer_q <= '0;
          state     <= S_MATCH;
        end
        S_MATCH: begin
          if (better) begin
            length_q  <= match_length;
            pointer_q <= index_q;
          end
          for (int k = 0; k < P + Q - 1; k++) ebuf[k] <= ebuf[k+1];
          ebuf[P+Q-1] <= '0;
          index_q <= index_q + 1'b1;
          if (index_q == PW'(P - 1)) begin
            state     <= S_IDLE;
            done_flag <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (apb.paddr[11:0])
      12'h004: prdata = status_w;
      12'h008: prdata = 32'(length_q);
      12'h00C: prdata = 32'(pointer_q);
      default: prdata = {7'd0, 9'(shift_left), 15'd0, busy};
    endcase
  end

  a_shift_range: assert property (@(posedge clk) disable iff (rst)
    wr_start |-> apb.pwdata[16 +: NW] <= NW'(P + Q));
endmodule
