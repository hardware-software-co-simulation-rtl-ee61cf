// Configuration PROM holding the bitstreams of the reconfigurable units.
//
// One 32-bit word is read per clock: the address is sampled on the rising
// edge and the word is on rdata one cycle later, so the configuration
// controller can stream a word every cycle.  The document places all RU
// configuration data in a separate PROM feeding the e-FPGA over a 32-bit bus;
// its contents (vendor bitstreams) are not given, so the PROM has a
// programming port (prog_we/prog_addr/prog_wdata) through which it is loaded
// before use.  The default depth of 2^20 words is this design's choice: it
// holds together the bitstreams of the largest scenario, a full bitstream
// for a device twice the size of an XCV-1000 (382984 words), a half-device
// partial bitstream (191492 words) and the LZ77 unit's bitstream.
module config_prom #(
  parameter int unsigned WORDS = 1048576,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] addr,
  output logic [31:0]   rdata,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [31:0]   prog_wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[addr];
    if (prog_we) mem[prog_addr] <= prog_wdata;
  end
endmodule
