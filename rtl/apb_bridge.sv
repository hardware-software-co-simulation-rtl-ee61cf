// AHB-to-APB bridge: a slave on the AHB and the only master on the APB.
//
// Each AHB transfer to the bridge becomes one APB transfer (AMBA 2 APB, no
// PREADY).  The AHB address phase is latched; the data phase then lasts two
// cycles: the APB SETUP cycle (PSEL high, PENABLE low, HREADYOUT low, write
// data taken from HWDATA) and the APB ACCESS cycle (PSEL and PENABLE high,
// HREADYOUT high, read data passed from PRDATA to HRDATA).  So every APB
// access costs the AHB one wait state.  PSEL is decoded from PADDR[15:12].
// The document describes the bridge's role; its timing is the usual AMBA 2
// one and the decoding is this design's choice.
module apb_bridge
  import rcs_pkg::*;
#(
  parameter int unsigned NP = NUM_APB_SLAVES
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          hsel,
  input  logic          hready,
  input  ahb_m2s_t      m2s,
  output ahb_s2m_t      s2m,
  output apb_m2s_t      apb,
  output logic [NP-1:0] psel,
  input  logic [31:0]   prdata [NP]
);
  typedef enum logic [1:0] {B_IDLE, B_SETUP, B_ACCESS} bstate_e;
  bstate_e     state;
  logic [15:0] addr_q;
  logic        write_q;
  logic [31:0] wdata_q;
  logic        accept;
  logic [3:0]  sel_idx;

  assign accept  = hsel && hready && m2s.htrans[1];
  assign sel_idx = addr_q[15:12];

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= B_IDLE;
      addr_q  <= '0;
      write_q <= 1'b0;
      wdata_q <= '0;
    end else begin
      unique case (state)
        B_IDLE:   if (accept) state <= B_SETUP;
        B_SETUP:  begin state <= B_ACCESS; wdata_q <= m2s.hwdata; end
        B_ACCESS: state <= accept ? B_SETUP : B_IDLE;
        default:  state <= B_IDLE;
      endcase
      if (accept) begin
        addr_q  <= m2s.haddr[15:0];
        write_q <= m2s.hwrite;
      end
    end
  end

  always_comb begin
    apb.paddr   = addr_q;
    apb.pwrite  = write_q;
    apb.penable = (state == B_ACCESS);
    apb.pwdata  = (state == B_SETUP) ? m2s.hwdata : wdata_q;
    psel = '0;
    if (state != B_IDLE && 32'(sel_idx) < NP) psel[sel_idx[$clog2(NP)-1:0]] = 1'b1;
  end

  always_comb begin
    s2m.hreadyout = (state != B_SETUP);
    s2m.hresp     = HRESP_OKAY;
    s2m.hrdata    = '0;
    for (int i = 0; i < NP; i++)
      if (32'(sel_idx) == i) s2m.hrdata = prdata[i];
  end
endmodule
