// System SRAM behind the memory controller.
//
// A word-wide memory with one synchronous read port and one write port with
// byte enables.  The read address is sampled on the rising clock edge and the
// word appears on rdata in the following cycle; a write in the same cycle to
// the same word is not seen by that read (read-before-write), which the
// memory controller resolves with a bypass.  The document shows the SRAM only
// as a box in the system drawing; its size and port structure are this
// design's choice (64 Ki words = 256 KiB holds the 64x64 matrices and the
// LZ77 input data of the evaluated programs).
module sram #(
  parameter int unsigned WORDS = 65536,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata,
  input  logic [3:0]    we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    for (int b = 0; b < 4; b++)
      if (we[b]) mem[waddr][8*b +: 8] <= wdata[8*b +: 8];
  end
endmodule
