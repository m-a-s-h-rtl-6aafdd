// Sector buffer: the memory shared by the CompactFlash control logic and the
// FAT16 layer.
//
// A simple dual-port RAM holding one 512-byte sector as DEPTH 16-bit words.
// The control logic writes through port A as words arrive from the card; the
// FAT16 layer reads through port B. Reads are synchronous: the word at
// `raddr` appears on `rdata` one clock later, as in a block RAM. A read of
// the address written in the same clock returns the old word.
// The document calls for a memory buffer between the two layers; the size
// of one sector and the word width of the card's data bus are this design's
// choices.
module sector_buffer #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
