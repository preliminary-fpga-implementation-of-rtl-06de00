// tb_load_reg: the register must take address and word only when enabled,
// hold them otherwise, and clear on reset.
module tb_load_reg;
  logic clk = 0, rst_n, en;
  logic [15:0] addr_in, addr;
  logic [63:0] data_in, data;
  logic [15:0] ea;
  logic [63:0] ed;
  int checks = 0, failures = 0;

  load_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 0; addr_in = '1; data_in = '1;
    @(negedge clk); @(negedge clk);
    checks++;
    if (addr != 0 || data != 0) failures++;
    rst_n = 1; ea = 0; ed = 0;
    for (int t = 0; t < 2000; t++) begin
      en = 1'($urandom); addr_in = 16'($urandom); data_in = {$urandom, $urandom};
      if (en) begin ea = addr_in; ed = data_in; end
      @(negedge clk);
      checks++;
      if (addr != ea || data != ed) begin
        failures++;
        if (failures < 10) $display("t%0d got %h/%h want %h/%h", t, addr, data, ea, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
