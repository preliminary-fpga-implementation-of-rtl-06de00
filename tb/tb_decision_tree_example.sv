// tb_decision_tree_example: runs a small worked example through one class
// module. The tree tests feature 3 at the root. On the left it tests feature
// 5 and then feature 0; on the right it tests feature 1 and then feature 0.
// Its six leaves are 0.24, 0.15, 0.43, 0.68, 0.74 and 0.56.
//
// Each feature is compared only with thresholds of its own feature, so each
// can be scaled to integers on its own:
//   features 0 and 5 are scaled by 10000;
//   features 1 and 3 are rounded down;
//   leaf values are scaled by 100.
// The pixel (0.013, 6215.48, 724.2, 12738.6, 2.27, 0.002) must reach the
// leaf 0.15 in 4 nodes (5 clocks). Changing feature 3 to 15000 must reach
// 0.74. Two copies of the tree chained as tree 1 and tree 2 must add up
// to 0.30.
module tb_decision_tree_example;
  logic clk = 0, rst_n, start, load;
  logic [15:0] addr;
  logic [63:0] data, node_data;
  logic [7:0]  feature_index;
  logic [15:0] feature;
  logic signed [31:0] result;
  logic busy, finish;
  logic [15:0] feat [256];
  int checks = 0, failures = 0;

  class_module #(.TREE_DEPTH(64)) dut (.*);

  always #5 clk = ~clk;
  assign feature = feat[feature_index];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] split_w(int f, int thr, int l, int r);
    return {8'(f), 16'(thr), 16'(l), 16'(r), 8'h00};
  endfunction
  function automatic logic [63:0] leaf_w(int p, bit last, int nxt);
    return {8'h00, 16'(p), 8'h00, 7'd0, last, 16'(nxt), 8'h01};
  endfunction

  // the example tree at base address b; leaves continue at nxt or stop
  task automatic put_tree(int b, bit last, int nxt);
    logic [63:0] t [11];
    t[0]  = split_w(3, 14300, b + 1, b + 6);
    t[1]  = split_w(5, 15, b + 2, b + 3);
    t[2]  = leaf_w(24, last, nxt);
    t[3]  = split_w(0, 150, b + 4, b + 5);
    t[4]  = leaf_w(15, last, nxt);
    t[5]  = leaf_w(43, last, nxt);
    t[6]  = split_w(1, 6150, b + 7, b + 8);
    t[7]  = leaf_w(68, last, nxt);
    t[8]  = split_w(0, 200, b + 9, b + 10);
    t[9]  = leaf_w(74, last, nxt);
    t[10] = leaf_w(56, last, nxt);
    for (int i = 0; i < 11; i++) begin
      load = 1; addr = 16'(b + i); data = t[i];
      @(negedge clk);
    end
    load = 0;
  endtask

  task automatic run(input int want, input int want_clocks, input string name);
    int cyc;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!finish && cyc < 1000) begin @(negedge clk); cyc++; end
    checks += 2;
    if (result != want) begin failures++; $display("%s: score %0d want %0d", name, result, want); end
    if (cyc != want_clocks) begin failures++; $display("%s: %0d clocks want %0d", name, cyc, want_clocks); end
    @(negedge clk);
  endtask

  initial begin
    rst_n = 0; start = 0; load = 0; addr = 0; data = 0;
    foreach (feat[i]) feat[i] = 0;
    feat[0] = 130; feat[1] = 6215; feat[2] = 724; feat[3] = 12738; feat[4] = 2; feat[5] = 20;
    repeat (2) @(negedge clk);
    rst_n = 1;
    put_tree(0, 1'b1, 0);
    run(15, 5, "example pixel");
    feat[3] = 15000;
    run(74, 5, "feature 3 above threshold");
    feat[3] = 12738;
    put_tree(0, 1'b0, 11);
    put_tree(11, 1'b1, 0);
    run(30, 9, "two chained trees");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
