// Attribute memory: the local copy of the card's configuration information.
//
// During start-up the CompactFlash control logic reads the card information
// structure (CIS) from the card's attribute space and writes it here byte by
// byte through the write port. `loaded` rises when the last byte (address
// DEPTH-1) has been written and stays high until reset, so the rest of the
// system knows the copy is complete. The host reads bytes through a
// synchronous read port (data one clock after the address).
// The document asks for an attribute memory holding the card configuration;
// its depth and the completion flag are this design's choices.
module cf_attr_mem #(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata,
  output logic          loaded
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   loaded <= 1'b0;
    else if (we && 32'(waddr) == DEPTH - 1)       loaded <= 1'b1;
  end

endmodule
