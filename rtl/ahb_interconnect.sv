// AHB interconnect: address decoder, slave-to-master multiplexer and default
// slave.
//
// The decoder selects a slave from HADDR[31:28] against the hard-coded region
// table of rcs_pkg (the document hard-codes each RU's address range in the
// bus decoder, which is what limits how many RUs can be active at once).  A
// slave whose slave_en bit is low counts as absent: this is how an RU region
// of the e-FPGA that is not configured, or is being reconfigured, drops off
// the bus.  A transfer to an absent slave or to an unmapped address is taken
// by the built-in default slave, which gives the two-cycle AHB ERROR
// response; IDLE transfers to it get a zero-wait OKAY.  The multiplexer
// routes the response of the slave that owns the current data phase; the
// data-phase owner is registered whenever HREADY is high.  HREADY is the
// multiplexed HREADYOUT and is returned to the master and to every slave.
// The region table and the error behaviour are this design's choice.
module ahb_interconnect
  import rcs_pkg::*;
#(
  parameter int unsigned NS = NUM_AHB_SLAVES
) (
  input  logic           clk,
  input  logic           rst,
  input  ahb_m2s_t       m2s,
  input  logic [NS-1:0]  slave_en,
  output logic [NS-1:0]  hsel,
  input  ahb_s2m_t       s2m_slv [NS],
  output ahb_s2m_t       s2m,
  output logic           hready
);
  localparam int unsigned IW = $clog2(NS + 1);
  localparam logic [IW-1:0] DEF = IW'(NS);

  logic [IW-1:0] asel, dsel;
  logic          active;
  typedef enum logic [1:0] {D_IDLE, D_ERR1, D_ERR2} dstate_e;
  dstate_e dstate;
  ahb_s2m_t def_rsp;

  assign active = m2s.htrans[1];

  always_comb begin
    hsel = '0;
    asel = DEF;
    for (int i = 0; i < NS; i++)
      if (m2s.haddr[31:28] == AHB_REGION[i] && slave_en[i]) begin
        hsel[i] = 1'b1;
        asel    = IW'(i);
      end
  end

  // default slave
  always_ff @(posedge clk) begin
    if (rst) dstate <= D_IDLE;
    else unique case (dstate)
      D_IDLE:  if (hready && active && asel == DEF) dstate <= D_ERR1;
      D_ERR1:  dstate <= D_ERR2;
      D_ERR2:  dstate <= (hready && active && asel == DEF) ? D_ERR1 : D_IDLE;
      default: dstate <= D_IDLE;
    endcase
  end

  always_comb begin
    def_rsp.hrdata    = '0;
    def_rsp.hreadyout = (dstate != D_ERR1);
    def_rsp.hresp     = (dstate == D_IDLE) ? HRESP_OKAY : HRESP_ERROR;
  end

  always_ff @(posedge clk) begin
    if (rst)         dsel <= DEF;
    else if (hready) dsel <= asel;
  end

  always_comb begin
    s2m = def_rsp;
    for (int i = 0; i < NS; i++)
      if (dsel == IW'(i)) s2m = s2m_slv[i];
  end

  assign hready = s2m.hreadyout;

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(hsel));
endmodule
