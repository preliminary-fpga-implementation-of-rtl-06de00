// class_module: evaluates all the trees of one class for the current pixel.
//
// The trees of the class sit in a local trees_ram as 64-bit node words (see
// gbdt_pkg for the layout). REG0 holds the address of the current node. Each
// clock in RUN the node word is read (asynchronously), its split feature is
// sent out on feature_index and the value comes back on `feature` in the same
// cycle; if feature <= threshold the left child is taken, otherwise the right
// one. On a leaf the prediction is added into REG1 and the walk continues at
// the leaf's next-tree address, unless the leaf carries the last-tree mark, in
// which case the class is finished. So a pixel costs exactly one clock per
// node visited, plus the start cycle. The first tree's root is at address 0.
//
// While idle, `addr` drives the RAM address: `load` writes `data` there, and
// node_data shows the word stored there (used for debug read-back).
// The datapath (REG0, address mux, <= comparator, child mux, next-tree mux,
// adder and REG1) follows the original class diagram; the 32-bit score width,
// unsigned comparison and the root-at-0 convention are this design's choices.
module class_module
  import gbdt_pkg::*;
#(
  parameter int unsigned TREE_DEPTH = 2048,
  parameter int unsigned ACC_W      = 32,
  localparam int unsigned AW        = $clog2(TREE_DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    load,
  input  logic [ADDR_W-1:0]       addr,
  input  logic [NODE_W-1:0]       data,
  output logic [FIDX_W-1:0]       feature_index,
  input  logic [FEAT_W-1:0]       feature,
  output logic signed [ACC_W-1:0] result,
  output logic                    busy,
  output logic                    finish,
  output logic [NODE_W-1:0]       node_data
);

  logic [ADDR_W-1:0]       reg0;          // current node address
  logic signed [ACC_W-1:0] reg1;          // accumulated score
  logic [NODE_W-1:0]       rdata;
  split_node_t             split;
  leaf_node_t              leaf;
  logic                    is_leaf, last_tree, go_left;
  logic [ADDR_W-1:0]       child, next_node, raddr;
  logic                    we, sel_ext, load_node, clear, acc_en;

  assign raddr = sel_ext ? addr : reg0;

  trees_ram #(.DEPTH(TREE_DEPTH), .WIDTH(NODE_W)) u_ram (
    .clk   (clk),
    .we    (we),
    .waddr (addr[AW-1:0]),
    .wdata (data),
    .raddr (raddr[AW-1:0]),
    .rdata (rdata)
  );

  assign split     = split_node_t'(rdata);
  assign leaf      = leaf_node_t'(rdata);
  assign is_leaf   = |split.is_leaf;
  assign last_tree = |leaf.last_tree;

  assign feature_index = split.feature;
  assign go_left       = (feature <= split.threshold);
  assign child         = go_left ? split.left : split.right;
  assign next_node     = is_leaf ? leaf.next_tree : child;

  class_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .load      (load),
    .is_leaf   (is_leaf),
    .last_tree (last_tree),
    .we        (we),
    .sel_ext   (sel_ext),
    .load_node (load_node),
    .clear     (clear),
    .acc_en    (acc_en),
    .busy      (busy),
    .finish    (finish)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      reg0 <= '0;
      reg1 <= '0;
    end else begin
      if (load_node) reg0 <= next_node;
      if (acc_en)    reg1 <= reg1 + ACC_W'(leaf.prediction);
    end
  end

  assign result    = reg1;
  assign node_data = rdata;

endmodule
