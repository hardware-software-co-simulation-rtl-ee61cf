// Shared types and constants of the bus-based reconfigurable system.
//
// The system is a single-master AMBA AHB backbone with an APB peripheral bus
// behind a bridge.  The AHB signals travel in two packed structs: one from the
// master to every slave (address/control/write data) and one from each slave
// back to the multiplexer (read data, ready, response).  The AHB and APB
// encodings follow AMBA 2.  The address map, the register offsets of the
// reconfigurable units (RUs) and of the configuration controller, and the
// processor-side request format are choices of this design; the document
// fixes only that every slave is memory mapped and that the RU address ranges
// are hard-coded in the bus decoder.
package rcs_pkg;

  // ---------------------------------------------------------------- AHB
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_INCR4  = 3'b011,
    HBURST_INCR8  = 3'b101,
    HBURST_INCR16 = 3'b111
  } hburst_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01
  } hresp_e;

  // HSIZE: 0 = byte, 1 = halfword, 2 = word
  localparam logic [2:0] HSIZE_BYTE = 3'd0;
  localparam logic [2:0] HSIZE_HALF = 3'd1;
  localparam logic [2:0] HSIZE_WORD = 3'd2;

  typedef struct packed {
    logic [31:0] haddr;
    htrans_e     htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    hburst_e     hburst;
    logic [31:0] hwdata;
  } ahb_m2s_t;

  typedef struct packed {
    logic [31:0] hrdata;
    logic        hreadyout;
    hresp_e      hresp;
  } ahb_s2m_t;

  // ---------------------------------------------------------------- map
  // AHB slaves, decoded on HADDR[31:28].
  localparam int unsigned NUM_AHB_SLAVES = 4;
  localparam int unsigned SLV_MEM    = 0;  // 0x0xxx_xxxx  memory controller / SRAM
  localparam int unsigned SLV_APB    = 1;  // 0x8xxx_xxxx  APB bridge
  localparam int unsigned SLV_MATMUL = 2;  // 0x9xxx_xxxx  matrix-multiplication RU buffers
  localparam int unsigned SLV_LZ77   = 3;  // 0xAxxx_xxxx  LZ77 RU input FIFO and results
  localparam logic [3:0] AHB_REGION [NUM_AHB_SLAVES] = '{4'h0, 4'h8, 4'h9, 4'hA};

  // APB slaves, decoded on PADDR[15:12] (addresses 0x8000_0000 + offset).
  localparam int unsigned NUM_APB_SLAVES = 3;
  localparam int unsigned APB_CFG    = 0;  // 0x8000_0xxx  configuration controller
  localparam int unsigned APB_MATMUL = 1;  // 0x8000_1xxx  matmul RU control/status
  localparam int unsigned APB_LZ77   = 2;  // 0x8000_2xxx  LZ77 RU control/status

  // RU identifiers used by the configuration controller (bit index in the
  // "RU present" mask).
  localparam int unsigned NUM_RUS = 2;
  localparam int unsigned RU_MATMUL = 0;
  localparam int unsigned RU_LZ77   = 1;

  // ---------------------------------------------------------------- APB
  typedef struct packed {
    logic [15:0] paddr;
    logic        penable;
    logic        pwrite;
    logic [31:0] pwdata;
  } apb_m2s_t;

  // ---------------------------------------------------------------- CPU side
  // One bus request of the processor: an L2 line fill or write-back (16 words
  // of 32 bits, 64-byte L2 lines) or a non-cacheable access of at most eight
  // bytes (two words).
  localparam int unsigned LINE_WORDS = 16;

  typedef struct packed {
    logic        write;
    logic [31:0] addr;
    logic [2:0]  hsize;   // size of each beat
    logic [4:0]  nbeats;  // 1 .. LINE_WORDS
  } bus_req_t;

  typedef logic [LINE_WORDS-1:0][31:0] line_t;

  // Non-cacheable request as it waits in the NC queue.
  typedef struct packed {
    logic        write;
    logic [31:0] addr;
    logic [2:0]  hsize;
    logic        dword;     // 1: double-word access, two beats
    logic [1:0][31:0] wdata;
  } nc_req_t;

  // Byte-lane strobes of a transfer on a 32-bit little-endian bus.
  function automatic logic [3:0] byte_strobe(input logic [1:0] a, input logic [2:0] size);
    unique case (size)
      HSIZE_BYTE: byte_strobe = 4'b0001 << a;
      HSIZE_HALF: byte_strobe = a[1] ? 4'b1100 : 4'b0011;
      default:    byte_strobe = 4'b1111;
    endcase
  endfunction

endpackage
