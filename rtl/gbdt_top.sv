// gbdt_top: FPGA accelerator for Gradient Boosting Decision Tree inference.
//
// One-vs-all GBDT: every class has its own set of trees, and the class whose
// trees sum to the highest score is the prediction. NUM_CLASSES class modules
// run in parallel, one per class, each walking its own trees one node per
// clock and accumulating leaf values. They share one feature RAM that holds
// the pixel being classified. When all have finished, an argmax picks the
// class.
//
// The host talks to it through an AXI4-lite register file (commands, status,
// checksum, debug read-back, scores; map in axi_lite_regs) and feeds tree
// words and pixels through a 64-bit AXI-stream input (from a DMA engine).
// gbdt_uc sequences the three commands: load the trees of one class, load a
// pixel and classify it, and read back a stored tree word. Tree words pass
// through the holding register (load_reg) on their way to the class RAMs and
// through the checksum; debug_readback holds a word read back from a class.
// irq_done mirrors the STATUS done bit.
//
// The partition into blocks (AXI block, control unit, checksum, debug,
// holding register, feature RAM, parallel class modules, finish detection,
// argmax) follows the original accelerator; the register map, commands and
// stream format are this design's own.
//
// Timing: loading costs one clock per stream beat; a classification costs
// ceil(features/4) beats plus 1 + (most nodes visited by any class) clocks,
// plus two clocks of command and status hand-off.
module gbdt_top
  import gbdt_pkg::*;
#(
  parameter int unsigned NUM_CLASSES  = 6,
  parameter int unsigned TREE_DEPTH   = 2048,
  parameter int unsigned NUM_FEATURES = 256,
  localparam int unsigned CW = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1,
  localparam int unsigned BA = $clog2(NUM_FEATURES / FEAT_PER_BEAT)
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
  // AXI-stream slave
  input  logic [AXIS_W-1:0] s_axis_tdata,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  // completion
  output logic              irq_done
);

  // command / status
  logic              cmd_valid;
  cmd_e              cmd;
  logic [7:0]        cmd_class;
  logic [15:0]       cmd_len;
  logic [ADDR_W-1:0] dbg_addr;
  logic              busy, done;
  logic [CW-1:0]     pred_class, sel_class, argmax_idx;
  logic [31:0]       cycles, cs_sum;
  logic [15:0]       cs_count;
  logic [63:0]       dbg_word;

  // datapath
  logic              lr_en, cs_clear, cs_en, fr_we, dbg_capture, start;
  logic [ADDR_W-1:0] lr_addr_in, lr_addr;
  logic [NODE_W-1:0] lr_data;
  logic [BA-1:0]     fr_beat;
  logic [NUM_CLASSES-1:0] class_load, fin;
  logic              all_done, all_done_pulse;
  logic [FIDX_W-1:0] fidx   [NUM_CLASSES];
  logic [FEAT_W-1:0] fval   [NUM_CLASSES];
  logic signed [31:0] score [NUM_CLASSES];
  logic [31:0]       score_u [NUM_CLASSES];
  logic [NODE_W-1:0] node_data [NUM_CLASSES];
  logic signed [31:0] max_score;

  axi_lite_regs #(.NUM_CLASSES(NUM_CLASSES)) u_axi (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .cmd_valid, .cmd, .cmd_class, .cmd_len, .dbg_addr,
    .busy, .done, .all_done, .max_score (32'(max_score)),
    .pred_class (8'(pred_class)),
    .cs_count, .checksum (cs_sum), .dbg_word, .cycles,
    .scores (score_u)
  );

  gbdt_uc #(.NUM_CLASSES(NUM_CLASSES), .NUM_FEATURES(NUM_FEATURES)) u_uc (
    .clk, .rst_n,
    .cmd_valid, .cmd, .cmd_class, .cmd_len, .dbg_addr,
    .s_tvalid (s_axis_tvalid), .s_tready (s_axis_tready),
    .lr_en, .lr_addr (lr_addr_in), .cs_clear, .cs_en, .fr_we, .fr_beat,
    .dbg_capture, .sel_class,
    .class_load, .start, .all_done_pulse, .argmax_idx,
    .busy, .done, .pred_class, .cycles
  );

  checksum u_checksum (
    .clk, .rst_n, .clear (cs_clear), .en (cs_en), .word (s_axis_tdata),
    .sum (cs_sum), .count (cs_count)
  );

  load_reg u_reg (
    .clk, .rst_n, .en (lr_en), .addr_in (lr_addr_in), .data_in (s_axis_tdata),
    .addr (lr_addr), .data (lr_data)
  );

  features_ram #(
    .NUM_FEATURES (NUM_FEATURES), .NUM_PORTS (NUM_CLASSES),
    .FEAT_W (FEAT_W), .FEAT_PER_BEAT (FEAT_PER_BEAT)
  ) u_features (
    .clk, .we (fr_we), .wbeat (fr_beat), .wdata (s_axis_tdata),
    .raddr (fidx), .rdata (fval)
  );

  for (genvar c = 0; c < NUM_CLASSES; c++) begin : g_class
    class_module #(.TREE_DEPTH(TREE_DEPTH), .ACC_W(32)) u_class (
      .clk, .rst_n,
      .start         (start),
      .load          (class_load[c]),
      .addr          (lr_addr),
      .data          (lr_data),
      .feature_index (fidx[c]),
      .feature       (fval[c]),
      .result        (score[c]),
      .busy          (),
      .finish        (fin[c]),
      .node_data     (node_data[c])
    );
    assign score_u[c] = score[c];
  end

  finish_detect #(.N(NUM_CLASSES)) u_finish (
    .clk, .rst_n, .fin, .all_done, .done_pulse (all_done_pulse)
  );

  argmax #(.N(NUM_CLASSES), .W(32)) u_argmax (
    .scores (score), .idx (argmax_idx), .max (max_score)
  );

  debug_readback u_debug (
    .clk, .rst_n, .capture (dbg_capture), .word_in (node_data[sel_class]),
    .word (dbg_word)
  );

  assign irq_done = done;

endmodule
