// axi_lite_regs: AXI4-lite slave register file seen by the host processor.
//
// Register map (byte offsets, 32-bit registers):
//   0x00 CTRL     W  [1:0] command (gbdt_pkg::cmd_e), [15:8] class,
//                    [31:16] length (tree words, or features of a pixel).
//                    A write issues the command (cmd_valid for one clock).
//   0x04 DBG_ADDR RW trees-RAM address for CMD_DEBUG_READ
//   0x08 STATUS   R  [0] busy, [1] done, [2] all classes finished,
//                    [15:8] predicted class,
//                    [31:16] tree words counted by the checksum
//   0x0C CHECKSUM R  checksum of the tree words of the last load
//   0x10 DBG_LO   R  read-back node word [31:0]
//   0x14 DBG_HI   R  read-back node word [63:32]
//   0x18 CYCLES   R  clocks taken by the last classification
//   0x1C MAXSCORE R  highest class score (the winner's)
//   0x20+4k SCORE R  accumulated score of class k
// Unmapped reads return 0. A write needs its address and data together (both
// are accepted in the same clock); one write and one read can be in flight.
// Responses are always OKAY. Byte strobes are ignored: every write is taken as
// a full word. The map and these rules are this design's own.
module axi_lite_regs
  import gbdt_pkg::*;
#(
  parameter int unsigned NUM_CLASSES = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-lite slave
  input  logic [7:0]        s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [7:0]        s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // command to the control unit
  output logic              cmd_valid,
  output cmd_e              cmd,
  output logic [7:0]        cmd_class,
  output logic [15:0]       cmd_len,
  output logic [ADDR_W-1:0] dbg_addr,
  // status from the accelerator
  input  logic              busy,
  input  logic              done,
  input  logic              all_done,
  input  logic [31:0]       max_score,
  input  logic [7:0]        pred_class,
  input  logic [15:0]       cs_count,
  input  logic [31:0]       checksum,
  input  logic [63:0]       dbg_word,
  input  logic [31:0]       cycles,
  input  logic [31:0]       scores [NUM_CLASSES]
);

  logic wr_fire, rd_fire;
  logic [31:0] rd_val;

  assign s_axil_awready = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_wready  = s_axil_awready;
  assign wr_fire        = s_axil_awready;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_arready = !s_axil_rvalid;
  assign rd_fire        = s_axil_arvalid && s_axil_arready;
  assign s_axil_rresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axil_bvalid <= 1'b0;
      cmd_valid     <= 1'b0;
      cmd           <= CMD_NOP;
      cmd_class     <= '0;
      cmd_len       <= '0;
      dbg_addr      <= '0;
    end else begin
      cmd_valid <= 1'b0;
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (wr_fire) begin
        s_axil_bvalid <= 1'b1;
        unique case (s_axil_awaddr & 8'hFC)
          REG_CTRL: begin
            cmd_valid <= 1'b1;
            cmd       <= cmd_e'(s_axil_wdata[1:0]);
            cmd_class <= s_axil_wdata[15:8];
            cmd_len   <= s_axil_wdata[31:16];
          end
          REG_DBG_ADDR: dbg_addr <= s_axil_wdata[ADDR_W-1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rd_val = '0;
    unique case (s_axil_araddr & 8'hFC)
      REG_CTRL:     rd_val = {cmd_len, cmd_class, 6'd0, cmd};
      REG_DBG_ADDR: rd_val = 32'(dbg_addr);
      REG_STATUS:   rd_val = {cs_count, pred_class, 5'd0, all_done, done, busy};
      REG_CHECKSUM: rd_val = checksum;
      REG_DBG_LO:   rd_val = dbg_word[31:0];
      REG_DBG_HI:   rd_val = dbg_word[63:32];
      REG_CYCLES:   rd_val = cycles;
      REG_MAXSCORE: rd_val = max_score;
      default: begin
        for (int k = 0; k < NUM_CLASSES; k++)
          if ((s_axil_araddr & 8'hFC) == REG_SCORE0 + 8'(4 * k)) rd_val = scores[k];
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (rd_fire) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= rd_val;
      end
    end
  end

  // AXI rule: a response, once valid, stays valid and unchanged until taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));

  logic unused_wstrb;
  assign unused_wstrb = ^s_axil_wstrb;

endmodule
