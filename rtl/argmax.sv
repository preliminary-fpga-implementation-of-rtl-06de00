// argmax: index of the highest class score.
//
// Combinational linear scan over N signed scores. On a tie the lowest class
// index wins (this design's choice). `max` is the winning score.
module argmax #(
  parameter int unsigned N = 6,
  parameter int unsigned W = 32,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic signed [W-1:0] scores [N],
  output logic [IW-1:0]       idx,
  output logic signed [W-1:0] max
);

  always_comb begin
    idx = '0;
    max = scores[0];
    for (int i = 1; i < N; i++) begin
      if (scores[i] > max) begin
        max = scores[i];
        idx = IW'(i);
      end
    end
  end

endmodule
