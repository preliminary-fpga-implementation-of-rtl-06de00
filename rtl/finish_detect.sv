// finish_detect: tells when every class module has reached its final tree.
//
// all_done is high while all `fin` inputs are high (an AND over the classes,
// as the classification is only complete once every class has finished).
// done_pulse is high for one clock when all_done rises; the control unit uses
// it to latch the argmax result. The pulse is this design's addition.
module finish_detect #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] fin,
  output logic         all_done,
  output logic         done_pulse
);

  logic all_q;

  assign all_done = &fin;

  always_ff @(posedge clk) begin
    if (!rst_n) all_q <= 1'b0;
    else        all_q <= all_done;
  end

  assign done_pulse = all_done && !all_q;

endmodule
