// local_mem: one local memory of the tile, 512 words of 16 bits by default.
//
// A plain synchronous SRAM with one write port and one read port. A write takes effect
// at the clock edge; a read returns the word one cycle after the address is presented
// (rdata is registered and holds its value while re is low). The size follows the
// document; the separate read and write ports are this design's choice, the document
// does not give the port structure. Contents are not initialised: the decoder never
// reads a word it has not written, except where it masks the value out.
module local_mem #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
