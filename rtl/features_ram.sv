// features_ram: the features of the pixel being classified.
//
// The pixel arrives on the 64-bit stream with four 16-bit features per beat
// (feature 4k+i in bits [16i+15:16i] of beat k; this packing is this
// design's choice). Each class module has its own asynchronous read port, so
// all classes look up features in parallel in the same cycle. Depth 256
// matches the 8-bit split-feature field of a node. Contents are not reset.
module features_ram #(
  parameter int unsigned NUM_FEATURES  = 256,
  parameter int unsigned NUM_PORTS     = 6,
  parameter int unsigned FEAT_W        = 16,
  parameter int unsigned FEAT_PER_BEAT = 4,
  localparam int unsigned FA = $clog2(NUM_FEATURES),
  localparam int unsigned BA = $clog2(NUM_FEATURES / FEAT_PER_BEAT)
) (
  input  logic                            clk,
  input  logic                            we,
  input  logic [BA-1:0]                   wbeat,
  input  logic [FEAT_PER_BEAT*FEAT_W-1:0] wdata,
  input  logic [FA-1:0]                   raddr [NUM_PORTS],
  output logic [FEAT_W-1:0]               rdata [NUM_PORTS]
);

  logic [FEAT_W-1:0] mem [NUM_FEATURES];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < FEAT_PER_BEAT; i++)
        mem[FA'(wbeat) * FA'(FEAT_PER_BEAT) + FA'(i)] <= wdata[i*FEAT_W +: FEAT_W];
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) rdata[p] = mem[raddr[p]];
  end

endmodule
