// tb_argmax: random signed scores (including negative values and forced
// ties) against a reference scan; the lowest index must win a tie.
module tb_argmax;
  localparam int N = 6;
  logic signed [31:0] scores [N];
  logic [2:0] idx;
  logic signed [31:0] max;
  int checks = 0, failures = 0;
  logic clk = 0;

  argmax #(.N(N), .W(32)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int ri;
      logic signed [31:0] rm;
      foreach (scores[i]) scores[i] = (t % 3 == 0) ? 32'($signed($urandom_range(0, 6)) - 3) : 32'($urandom);
      #1;
      ri = 0; rm = scores[0];
      for (int i = 1; i < N; i++) if (scores[i] > rm) begin rm = scores[i]; ri = i; end
      checks++;
      if (idx != 3'(ri) || max != rm) begin
        failures++;
        if (failures < 10) $display("t%0d got idx %0d max %0d want %0d %0d", t, idx, max, ri, rm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
