// tb_axi_lite_regs: acts as an AXI4-lite master with random response delays
// and with write address and write data sometimes presented in different
// clocks. Checks that a CTRL write yields one cmd_valid pulse carrying the
// written fields, that DBG_ADDR reads back, that every status register reads
// the value driven on its input, that unmapped addresses read 0, and that
// responses stay valid until taken.
module tb_axi_lite_regs;
  import gbdt_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n;
  logic [7:0] s_axil_awaddr, s_axil_araddr;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0] s_axil_wstrb;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic cmd_valid;
  cmd_e cmd;
  logic [7:0] cmd_class, pred_class;
  logic [15:0] cmd_len, dbg_addr, cs_count;
  logic busy, done, all_done;
  logic [31:0] checksum, cycles, max_score;
  logic [63:0] dbg_word;
  logic [31:0] scores [N];
  int checks = 0, failures = 0, cmd_pulses = 0;

  axi_lite_regs #(.NUM_CLASSES(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (cmd_valid) cmd_pulses++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  task automatic axi_write(input logic [7:0] a, input logic [31:0] d);
    int gap = $urandom_range(0, 2);
    s_axil_awaddr = a; s_axil_awvalid = 1;
    s_axil_wdata = d; s_axil_wstrb = 4'hF;
    s_axil_wvalid = (gap == 0);
    for (int i = 0; i < gap; i++) begin
      #1 check(!s_axil_awready, "address taken without data");
      @(negedge clk);
    end
    s_axil_wvalid = 1;
    #1;
    while (!s_axil_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axil_awvalid = 0; s_axil_wvalid = 0;
    repeat ($urandom_range(0, 3)) begin
      #1 check(s_axil_bvalid, "bvalid dropped");
      @(negedge clk);
    end
    s_axil_bready = 1;
    #1 check(s_axil_bvalid && s_axil_bresp == 2'b00, "no write response");
    @(negedge clk);
    s_axil_bready = 0;
  endtask

  task automatic axi_read(input logic [7:0] a, output logic [31:0] d);
    s_axil_araddr = a; s_axil_arvalid = 1;
    #1;
    while (!s_axil_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axil_arvalid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    s_axil_rready = 1;
    #1 check(s_axil_rvalid && s_axil_rresp == 2'b00, "no read response");
    d = s_axil_rdata;
    @(negedge clk);
    s_axil_rready = 0;
  endtask

  initial begin
    logic [31:0] r, w;
    rst_n = 0;
    s_axil_awaddr = 0; s_axil_awvalid = 0; s_axil_wdata = 0; s_axil_wstrb = 0; s_axil_wvalid = 0;
    s_axil_bready = 0; s_axil_araddr = 0; s_axil_arvalid = 0; s_axil_rready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      int n_before;
      busy = 1'($urandom); done = 1'($urandom); all_done = 1'($urandom);
      pred_class = 8'($urandom_range(0, N-1)); cs_count = 16'($urandom);
      checksum = $urandom; cycles = $urandom; max_score = $urandom;
      dbg_word = {$urandom, $urandom};
      foreach (scores[k]) scores[k] = $urandom;
      // command register
      w = {16'($urandom), 8'($urandom_range(0, N-1)), 6'd0, 2'($urandom)};
      n_before = cmd_pulses;
      axi_write(REG_CTRL, w);
      check(cmd_pulses == n_before + 1, "CTRL write did not give exactly one command");
      check(cmd == cmd_e'(w[1:0]) && cmd_class == w[15:8] && cmd_len == w[31:16], "command fields");
      // debug address
      w = $urandom;
      axi_write(REG_DBG_ADDR, w);
      check(dbg_addr == w[15:0], "dbg_addr");
      axi_read(REG_DBG_ADDR, r);  check(r == {16'd0, w[15:0]}, "DBG_ADDR read");
      axi_read(REG_STATUS, r);
      check(r == {cs_count, pred_class, 5'd0, all_done, done, busy}, "STATUS read");
      axi_read(REG_CHECKSUM, r);  check(r == checksum, "CHECKSUM read");
      axi_read(REG_DBG_LO, r);    check(r == dbg_word[31:0], "DBG_LO read");
      axi_read(REG_DBG_HI, r);    check(r == dbg_word[63:32], "DBG_HI read");
      axi_read(REG_CYCLES, r);    check(r == cycles, "CYCLES read");
      axi_read(REG_MAXSCORE, r);  check(r == max_score, "MAXSCORE read");
      for (int k = 0; k < N; k++) begin
        axi_read(8'(REG_SCORE0 + 4 * k), r);
        check(r == scores[k], $sformatf("SCORE%0d read", k));
      end
      axi_read(8'hF0, r);         check(r == 0, "unmapped read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
