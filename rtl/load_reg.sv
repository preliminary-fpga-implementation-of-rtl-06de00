// load_reg: holding register between the stream and the class modules.
//
// When `en` is high it captures a tree word from the stream together with the
// trees-RAM address it is to be written to; the held pair drives the addr and
// data inputs of every class module, and the control unit raises the `load`
// strobe of one class in the following clock. Registering here keeps the long
// stream-to-RAM fan-out off one path. Reset clears it. The original design
// only shows a register at this place; using it for the word and its address
// (and for the debug address) is this design's reading.
module load_reg
  import gbdt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr_in,
  input  logic [NODE_W-1:0] data_in,
  output logic [ADDR_W-1:0] addr,
  output logic [NODE_W-1:0] data
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr <= '0;
      data <= '0;
    end else if (en) begin
      addr <= addr_in;
      data <= data_in;
    end
  end

endmodule
