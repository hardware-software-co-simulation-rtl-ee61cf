// Bus-based reconfigurable system: the hardware side of a processor coupled
// to reconfigurable units (RUs) over an on-chip AMBA bus.
//
// The processor (outside this module) reaches the bus through its AHB master
// interface in two ways: L2 cache line transfers and non-cacheable (NC)
// accesses, which bypass the caches through the NC queue and win over L2
// transfers.  On the AHB sit the memory controller with the system SRAM, the
// APB bridge and the buffers of two RUs on the e-FPGA: the
// matrix-multiplication RU and the LZ77 string-matching RU.  Control and
// status registers of the RUs and of the configuration controller sit on the
// APB.  The configuration controller streams bitstreams from the
// configuration PROM to the e-FPGA, one 32-bit word per clock, and keeps the
// mask of RUs that are configured; an RU outside the mask is held in reset
// and its AHB region answers with ERROR.
//
// Address map: 0x0xxx_xxxx SRAM, 0x8000_0xxx configuration controller,
// 0x8000_1xxx matmul RU registers, 0x8000_2xxx LZ77 RU registers,
// 0x9xxx_xxxx matmul RU buffers, 0xAxxx_xxxx LZ77 RU FIFO and results.
// The processor and its caches, and the e-FPGA's own configuration logic,
// are outside: their connections are this module's ports.  The system
// structure follows the document; the address map is this design's choice.
module rcs_top
  import rcs_pkg::*;
#(
  parameter int unsigned MEM_WORDS  = 65536,
  parameter int unsigned PROM_WORDS = 1048576,
  parameter int unsigned NC_DEPTH   = 8,
  parameter int unsigned MM_NBOX    = 4,
  parameter int unsigned LZ_P       = 256,
  parameter int unsigned LZ_Q       = 16,
  parameter int unsigned LZ_FIFO    = 512,
  localparam int unsigned PAW = $clog2(PROM_WORDS),
  localparam int unsigned NCW = $clog2(NC_DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst,
  // L2 cache requests
  input  logic           l2_valid,
  input  bus_req_t       l2_req,
  input  line_t          l2_wdata,
  output logic           l2_ready,
  // NC requests from the load/store unit
  input  logic           nc_push,
  input  nc_req_t        nc_req,
  output logic           nc_full,
  output logic           nc_load_issue_ok,
  output logic [NCW-1:0] nc_stores_outstanding,
  // completion of bus requests
  output logic           bus_done,
  output logic           bus_done_nc,
  output logic           bus_done_write,
  output logic           bus_error,
  output line_t          bus_rdata,
  output logic [4:0]     bus_skip_count,
  // configuration PROM programming port
  input  logic           prom_prog_we,
  input  logic [PAW-1:0] prom_prog_addr,
  input  logic [31:0]    prom_prog_wdata,
  // e-FPGA configuration port
  output logic           cfg_cs,
  output logic           cfg_we,
  output logic [31:0]    cfg_data,
  output logic [3:0]     cfg_target,
  output logic           cfg_partial,
  output logic [NUM_RUS-1:0] ru_present,
  // observation
  output logic           mem_bypass_hit,
  output logic           matmul_busy,
  output logic           lz_busy,
  output logic           lz_fifo_full_wait,
  output logic           lz_fifo_empty_wait
);
  // ---------------------------------------------------------------- master
  nc_req_t  nc_head;
  logic     nc_valid, nc_take;
  ahb_m2s_t m2s;
  ahb_s2m_t s2m;
  logic     hready;

  nc_queue #(.DEPTH(NC_DEPTH)) u_ncq (
    .clk, .rst,
    .push          (nc_push),
    .req_in        (nc_req),
    .full          (nc_full),
    .head          (nc_head),
    .valid         (nc_valid),
    .take          (nc_take),
    .store_done    (bus_done && bus_done_nc && bus_done_write),
    .load_issue_ok (nc_load_issue_ok),
    .stores_outstanding (nc_stores_outstanding)
  );

  ahb_master_if u_mif (
    .clk, .rst,
    .l2_valid, .l2_req, .l2_wdata, .l2_ready,
    .nc_valid, .nc_req (nc_head), .nc_take,
    .done       (bus_done),
    .done_nc    (bus_done_nc),
    .done_write (bus_done_write),
    .error      (bus_error),
    .rdata      (bus_rdata),
    .skip_count (bus_skip_count),
    .m2s, .s2m
  );

  // ---------------------------------------------------------------- AHB
  logic [NUM_AHB_SLAVES-1:0] hsel, slave_en;
  ahb_s2m_t                  s2m_slv [NUM_AHB_SLAVES];

  assign slave_en[SLV_MEM]    = 1'b1;
  assign slave_en[SLV_APB]    = 1'b1;
  assign slave_en[SLV_MATMUL] = ru_present[RU_MATMUL];
  assign slave_en[SLV_LZ77]   = ru_present[RU_LZ77];

  ahb_interconnect u_ic (
    .clk, .rst, .m2s, .slave_en, .hsel, .s2m_slv, .s2m, .hready
  );

  mem_ctrl #(.WORDS(MEM_WORDS)) u_mem (
    .clk, .rst, .hsel (hsel[SLV_MEM]), .hready, .m2s,
    .s2m (s2m_slv[SLV_MEM]), .bypass_hit (mem_bypass_hit)
  );

  // ---------------------------------------------------------------- APB
  apb_m2s_t                  apb;
  logic [NUM_APB_SLAVES-1:0] psel;
  logic [31:0]               prdata [NUM_APB_SLAVES];

  apb_bridge u_bridge (
    .clk, .rst, .hsel (hsel[SLV_APB]), .hready, .m2s,
    .s2m (s2m_slv[SLV_APB]), .apb, .psel, .prdata
  );

  // ---------------------------------------------------------------- configuration
  logic           prom_re;
  logic [PAW-1:0] prom_addr;
  logic [31:0]    prom_rdata;

  config_prom #(.WORDS(PROM_WORDS)) u_prom (
    .clk, .re (prom_re), .addr (prom_addr), .rdata (prom_rdata),
    .prog_we (prom_prog_we), .prog_addr (prom_prog_addr), .prog_wdata (prom_prog_wdata)
  );

  config_ctrl #(.PROM_WORDS(PROM_WORDS)) u_cfg (
    .clk, .rst,
    .psel (psel[APB_CFG]), .apb, .prdata (prdata[APB_CFG]),
    .prom_re, .prom_addr, .prom_rdata,
    .cfg_cs, .cfg_we, .cfg_data, .cfg_target, .cfg_partial,
    .ru_present
  );

  // ---------------------------------------------------------------- RUs
  logic mm_rst, lz_rst;
  assign mm_rst = rst || !ru_present[RU_MATMUL];
  assign lz_rst = rst || !ru_present[RU_LZ77];

  matmul_ru #(.NBOX(MM_NBOX)) u_mm (
    .clk, .rst (mm_rst),
    .hsel (hsel[SLV_MATMUL]), .hready, .m2s, .s2m (s2m_slv[SLV_MATMUL]),
    .psel (psel[APB_MATMUL]), .apb, .prdata (prdata[APB_MATMUL]),
    .busy (matmul_busy)
  );

  lz77_ru #(.P(LZ_P), .Q(LZ_Q), .FIFO_DEPTH(LZ_FIFO)) u_lz (
    .clk, .rst (lz_rst),
    .hsel (hsel[SLV_LZ77]), .hready, .m2s, .s2m (s2m_slv[SLV_LZ77]),
    .psel (psel[APB_LZ77]), .apb, .prdata (prdata[APB_LZ77]),
    .busy (lz_busy),
    .fifo_full_wait (lz_fifo_full_wait),
    .fifo_empty_wait (lz_fifo_empty_wait)
  );
endmodule
