// tb_trees_ram: writes random 64-bit words to random addresses of trees_ram,
// keeps a shadow copy, and checks that the asynchronous read port returns the
// shadow value in the same cycle the address is applied, for written words
// and after overwrites.
module tb_trees_ram;
  localparam int DEPTH = 2048;
  logic clk = 0;
  logic we;
  logic [10:0] waddr, raddr;
  logic [63:0] wdata, rdata;
  logic [63:0] shadow [DEPTH];
  bit written [DEPTH];
  int checks = 0, failures = 0;

  trees_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1;
      waddr = 11'($urandom_range(0, DEPTH-1));
      wdata = {$urandom, $urandom};
      shadow[waddr] = wdata;
      written[waddr] = 1;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      if (!written[a]) continue;
      raddr = 11'(a);
      #1;
      checks++;
      if (rdata !== shadow[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %h want %h", a, rdata, shadow[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
