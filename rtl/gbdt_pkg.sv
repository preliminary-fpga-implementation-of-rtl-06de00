// gbdt_pkg: shared types and constants of the GBDT inference accelerator.
//
// Every tree node is one 64-bit word with a fixed layout, so that each field
// can be wired straight into the datapath. Two layouts share the word and are
// told apart by the low byte (is_leaf):
//   non-leaf: feature[63:56] threshold[55:40] left[39:24] right[23:8] is_leaf[7:0]
//   leaf:     unused[63:56] prediction[55:40] unused[39:32] last_tree[31:24]
//             next_tree[23:8] is_leaf[7:0]
// The field names and widths are those of the original node formats; placing
// the first-listed field in the most significant bits is this design's choice,
// as is reading a non-zero flag byte as "true". Predictions are signed 16-bit
// fixed-point values whose scale is chosen by whoever converts the model.
package gbdt_pkg;

  localparam int unsigned NODE_W   = 64;  // node word
  localparam int unsigned FEAT_W   = 16;  // hyperspectral band value
  localparam int unsigned FIDX_W   = 8;   // split feature index
  localparam int unsigned ADDR_W   = 16;  // child / next-tree address
  localparam int unsigned PRED_W   = 16;  // leaf prediction value
  localparam int unsigned AXIS_W   = 64;  // stream data width
  localparam int unsigned FEAT_PER_BEAT = AXIS_W / FEAT_W;

  typedef struct packed {
    logic [FIDX_W-1:0] feature;
    logic [FEAT_W-1:0] threshold;
    logic [ADDR_W-1:0] left;
    logic [ADDR_W-1:0] right;
    logic [7:0]        is_leaf;
  } split_node_t;

  typedef struct packed {
    logic [7:0]        unused_hi;
    logic signed [PRED_W-1:0] prediction;
    logic [7:0]        unused_lo;
    logic [7:0]        last_tree;
    logic [ADDR_W-1:0] next_tree;
    logic [7:0]        is_leaf;
  } leaf_node_t;

  // Host commands written to the CTRL register.
  typedef enum logic [1:0] {
    CMD_NOP        = 2'd0,
    CMD_LOAD_TREES = 2'd1,  // next LEN stream beats are tree words of one class
    CMD_CLASSIFY   = 2'd2,  // next ceil(LEN/4) beats are a pixel; then classify
    CMD_DEBUG_READ = 2'd3   // read back tree word DBG_ADDR of one class
  } cmd_e;

  // AXI-lite register offsets (byte addresses).
  localparam logic [7:0] REG_CTRL     = 8'h00;
  localparam logic [7:0] REG_DBG_ADDR = 8'h04;
  localparam logic [7:0] REG_STATUS   = 8'h08;
  localparam logic [7:0] REG_CHECKSUM = 8'h0C;
  localparam logic [7:0] REG_DBG_LO   = 8'h10;
  localparam logic [7:0] REG_DBG_HI   = 8'h14;
  localparam logic [7:0] REG_CYCLES   = 8'h18;
  localparam logic [7:0] REG_MAXSCORE = 8'h1C;
  localparam logic [7:0] REG_SCORE0   = 8'h20;  // score of class k at 0x20 + 4k

  function automatic logic [NODE_W-1:0] make_split(
      input logic [FIDX_W-1:0] f, input logic [FEAT_W-1:0] thr,
      input logic [ADDR_W-1:0] l, input logic [ADDR_W-1:0] r);
    split_node_t n;
    n = '{feature: f, threshold: thr, left: l, right: r, is_leaf: 8'd0};
    return n;
  endfunction

  function automatic logic [NODE_W-1:0] make_leaf(
      input logic signed [PRED_W-1:0] p, input logic last, input logic [ADDR_W-1:0] nxt);
    leaf_node_t n;
    n = '{unused_hi: 8'd0, prediction: p, unused_lo: 8'd0,
          last_tree: {7'd0, last}, next_tree: nxt, is_leaf: 8'd1};
    return n;
  endfunction

endpackage
