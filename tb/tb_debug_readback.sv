// tb_debug_readback: the held word must change only on capture and clear on
// reset.
module tb_debug_readback;
  logic clk = 0, rst_n, capture;
  logic [63:0] word_in, word, ew;
  int checks = 0, failures = 0;

  debug_readback dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; capture = 0; word_in = '1;
    @(negedge clk); @(negedge clk);
    checks++;
    if (word != 0) failures++;
    rst_n = 1; ew = 0;
    for (int t = 0; t < 2000; t++) begin
      capture = ($urandom_range(0, 3) == 0); word_in = {$urandom, $urandom};
      if (capture) ew = word_in;
      @(negedge clk);
      checks++;
      if (word != ew) begin
        failures++;
        if (failures < 10) $display("t%0d got %h want %h", t, word, ew);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
