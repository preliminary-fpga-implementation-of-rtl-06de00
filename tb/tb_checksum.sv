// tb_checksum: random words with random enables and occasional clears,
// compared with a reference 32-bit sum of both word halves and a word count.
module tb_checksum;
  logic clk = 0, rst_n, clear, en;
  logic [63:0] word;
  logic [31:0] sum, rs;
  logic [15:0] count, rc;
  int checks = 0, failures = 0;

  checksum dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; en = 0; word = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1; rs = 0; rc = 0;
    for (int t = 0; t < 3000; t++) begin
      clear = ($urandom_range(0, 200) == 0);
      en = 1'($urandom); word = {$urandom, $urandom};
      if (clear) begin rs = 0; rc = 0; end
      else if (en) begin rs = rs + word[63:32] + word[31:0]; rc = rc + 1; end
      @(negedge clk);
      checks++;
      if (sum != rs || count != rc) begin
        failures++;
        if (failures < 10) $display("t%0d got %h/%0d want %h/%0d", t, sum, count, rs, rc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
