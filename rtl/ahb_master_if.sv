// AHB master interface of the processor.
//
// Accepts the processor's bus requests and runs them as AHB transfers.  Two
// request sources exist: the L2 cache (line fills and write-backs, 16 words
// as an INCR16 burst) and the non-cacheable (NC) queue (single accesses of up
// to eight bytes: a byte, halfword or word as SINGLE, a double word as a
// two-beat INCR burst).  When both are waiting, the NC request wins, as the
// document gives NC transfers priority over L2 transfers.  The processor is
// the only master, so the bus is always granted and no arbiter is modelled.
//
// Timing: a request is taken in a cycle with the interface idle; its first
// address phase is driven in the next cycle, address and data phases then
// overlap beat by beat, and done pulses for one cycle after the last data
// phase with the read words on rdata (beat i in rdata[i]).  An ERROR response
// ends the request at once (the remaining beats are cancelled by driving
// IDLE during the first error cycle) and done is accompanied by error.
// skip_count gives, while a request runs, the number of data phases still to
// come: each needs at least one cycle, so it is a safe lower bound on the
// cycles the bus will stay busy, the estimate the co-simulation hands to the
// processor model so that it can run that many cycles without talking to the
// bus.  The request formats and the cancel-on-error behaviour are this
// design's choice.
module ahb_master_if
  import rcs_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  // L2 cache port
  input  logic     l2_valid,
  input  bus_req_t l2_req,
  input  line_t    l2_wdata,
  output logic     l2_ready,
  // NC queue port
  input  logic     nc_valid,
  input  nc_req_t  nc_req,
  output logic     nc_take,
  // completion
  output logic     done,
  output logic     done_nc,     // 1: the completed request came from the NC queue
  output logic     done_write,
  output logic     error,
  output line_t    rdata,
  output logic [4:0] skip_count,
  // AHB
  output ahb_m2s_t m2s,
  input  ahb_s2m_t s2m          // selected slave's response (HREADY = s2m.hreadyout)
);
  logic     active;
  bus_req_t cur;
  logic     cur_nc;
  line_t    wbuf;
  logic [4:0] abeat;      // beats whose address phase has been accepted
  logic [4:0] dcnt;       // beats whose data phase has completed
  logic       dph_valid;
  logic [3:0] dph_idx;
  logic       addr_ph;
  logic       err_now;

  bus_req_t nc_as_req;
  line_t    nc_as_line;

  always_comb begin
    nc_as_req.write  = nc_req.write;
    nc_as_req.addr   = nc_req.addr;
    nc_as_req.hsize  = nc_req.dword ? HSIZE_WORD : nc_req.hsize;
    nc_as_req.nbeats = nc_req.dword ? 5'd2 : 5'd1;
    nc_as_line       = '0;
    nc_as_line[0]    = nc_req.wdata[0];
    nc_as_line[1]    = nc_req.wdata[1];
  end

  assign nc_take  = !active && nc_valid;
  assign l2_ready = !active && !nc_valid;

  assign err_now = dph_valid && (s2m.hresp == HRESP_ERROR);
  assign addr_ph = active && (abeat < cur.nbeats) && !err_now;

  always_comb begin
    m2s.haddr  = cur.addr + (32'(abeat) << cur.hsize);
    m2s.htrans = !addr_ph ? HTRANS_IDLE : (abeat == '0) ? HTRANS_NONSEQ : HTRANS_SEQ;
    m2s.hwrite = cur.write;
    m2s.hsize  = cur.hsize;
    unique case (cur.nbeats)
      5'd1:    m2s.hburst = HBURST_SINGLE;
      5'd4:    m2s.hburst = HBURST_INCR4;
      5'd8:    m2s.hburst = HBURST_INCR8;
      5'd16:   m2s.hburst = HBURST_INCR16;
      default: m2s.hburst = HBURST_INCR;
    endcase
    m2s.hwdata = wbuf[dph_idx];
  end

  assign skip_count = active ? (cur.nbeats - dcnt) : 5'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      active    <= 1'b0;
      cur       <= '0;
      cur_nc    <= 1'b0;
      wbuf      <= '0;
      abeat     <= '0;
      dcnt      <= '0;
      dph_valid <= 1'b0;
      dph_idx   <= '0;
      done      <= 1'b0;
      done_nc   <= 1'b0;
      done_write <= 1'b0;
      error     <= 1'b0;
      rdata     <= '0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (nc_valid) begin
          active <= 1'b1; cur <= nc_as_req; wbuf <= nc_as_line; cur_nc <= 1'b1;
        end else if (l2_valid) begin
          active <= 1'b1; cur <= l2_req; wbuf <= l2_wdata; cur_nc <= 1'b0;
        end
        abeat     <= '0;
        dcnt      <= '0;
        dph_valid <= 1'b0;
        error     <= 1'b0;
      end else if (s2m.hreadyout) begin
        // address phase
        if (addr_ph) begin
          abeat     <= abeat + 1'b1;
          dph_valid <= 1'b1;
          dph_idx   <= abeat[3:0];
        end else begin
          dph_valid <= 1'b0;
        end
        // data phase
        if (dph_valid) begin
          dcnt <= dcnt + 1'b1;
          if (s2m.hresp == HRESP_ERROR) begin
            active <= 1'b0; done <= 1'b1; error <= 1'b1;
            done_nc <= cur_nc; done_write <= cur.write;
            dph_valid <= 1'b0;
          end else begin
            if (!cur.write) rdata[dph_idx] <= s2m.hrdata;
            if (5'(dph_idx) == cur.nbeats - 1'b1) begin
              active <= 1'b0; done <= 1'b1;
              done_nc <= cur_nc; done_write <= cur.write;
            end
          end
        end
      end
    end
  end

  // AHB master rules: address and control stay stable while HREADY is low.
  a_stable: assert property (@(posedge clk) disable iff (rst)
    (m2s.htrans != HTRANS_IDLE && !s2m.hreadyout && !err_now) |=>
      (err_now || (m2s.haddr == $past(m2s.haddr) && m2s.htrans == $past(m2s.htrans))));
  a_beats: assert property (@(posedge clk) disable iff (rst)
    l2_valid |-> (l2_req.nbeats >= 5'd1 && l2_req.nbeats <= 5'(LINE_WORDS)));
endmodule
