// checksum: running checksum of the tree words received from the host.
//
// Each accepted 64-bit tree word adds its two 32-bit halves into a 32-bit
// wrap-around sum (algorithm chosen by this design). The host computes the
// same sum over the words it sent and compares it with the CHECKSUM register
// to detect a transfer error. `clear` (start of a tree-load command) has
// priority over `en`. `count` is the number of words summed since the clear.
module checksum (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  logic [63:0] word,
  output logic [31:0] sum,
  output logic [15:0] count
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      sum   <= '0;
      count <= '0;
    end else if (en) begin
      sum   <= sum + word[63:32] + word[31:0];
      count <= count + 16'd1;
    end
  end

endmodule
