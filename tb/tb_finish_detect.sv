// tb_finish_detect: random finish patterns; all_done must equal the AND of
// the inputs and done_pulse must be high exactly in the first cycle of each
// all-finished interval.
module tb_finish_detect;
  localparam int N = 6;
  logic clk = 0, rst_n;
  logic [N-1:0] fin;
  logic all_done, done_pulse;
  bit prev_all;
  int checks = 0, failures = 0, pulses = 0;

  finish_detect #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; fin = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1; prev_all = 0;
    for (int t = 0; t < 3000; t++) begin
      fin = ($urandom_range(0, 2) == 0) ? '1 : N'($urandom);
      #1;
      checks++;
      if (all_done != (&fin) || done_pulse != ((&fin) && !prev_all)) begin
        failures++;
        if (failures < 10) $display("t%0d fin %b all %b pulse %b", t, fin, all_done, done_pulse);
      end
      if (done_pulse) pulses++;
      prev_all = &fin;
      @(negedge clk);
    end
    checks++;
    if (pulses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
