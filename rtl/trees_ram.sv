// trees_ram: node memory local to one class module.
//
// Holds every tree of one class as 64-bit node words. One synchronous write
// port (used while the host loads the trees) and one asynchronous read port:
// the memory is meant to map onto FPGA LUT (distributed) RAM, so a node word
// is available in the same cycle as its address, which lets the class module
// visit one node per clock. The depth is this design's choice (about what the
// LUT budget of the original implementation holds per class); contents are
// not reset.
module trees_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 64,
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
  end

  assign rdata = mem[raddr];

endmodule
