// debug_readback: holds a tree word read back from a class module.
//
// On `capture` it stores the node word the control unit has selected (one
// class's trees RAM at the debug address) so the host can read it through the
// DBG_LO/DBG_HI registers and compare it with what it loaded. Reading back one
// word per command is this design's choice.
module debug_readback (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        capture,
  input  logic [63:0] word_in,
  output logic [63:0] word
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word <= '0;
    end else if (capture) begin
      word <= word_in;
    end
  end

endmodule
