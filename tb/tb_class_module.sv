// tb_class_module: loads 100 random, unbalanced trees (up to depth 3) into a
// class module through its load port, reads a few words back through
// node_data, then classifies random pixels. For each pixel the score must
// equal a reference walk of the same trees, and the time from start to
// finish must be exactly one clock per node visited plus the start clock.
// Odd pixels copy node thresholds into the features they test, so that
// equality (which goes left) is exercised. It also counts left turns, right turns, tree-to-tree jumps and last-tree
// stops, and fails if any of them never happened.
module tb_class_module;
  logic clk = 0, rst_n, start, load;
  logic [15:0] addr;
  logic [63:0] data, node_data;
  logic [7:0]  feature_index;
  logic [15:0] feature;
  logic signed [31:0] result;
  logic busy, finish;
  logic [15:0] feat [256];
  logic [63:0] mem [$];
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_jump = 0, n_last = 0, n_equal = 0;

  class_module #(.TREE_DEPTH(2048)) dut (.*);

  always #5 clk = ~clk;
  assign feature = feat[feature_index];

  // mechanism counters, sampled while running
  always @(posedge clk) if (busy) begin
    if (node_data[7:0] == 0) begin
      if (feature <= node_data[55:40]) n_left++; else n_right++;
      if (feature == node_data[55:40]) n_equal++;
    end else if (node_data[31:24] != 0) n_last++;
    else n_jump++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference tree model (independent of the RTL) ----
  // Node word layout: see gbdt_pkg. Built here by explicit bit placement.
  function automatic logic [63:0] ref_split(int f, int thr, int l, int r);
    return {8'(f), 16'(thr), 16'(l), 16'(r), 8'h00};
  endfunction
  function automatic logic [63:0] ref_leaf(int p, bit last, int nxt);
    return {8'h00, 16'(p), 8'h00, 7'd0, last, 16'(nxt), 8'h01};
  endfunction

  // Appends a random tree rooted at mem.size(); returns the root index.
  // Leaves get next-tree address 0 for now and are patched later.
  function automatic int gen_node(ref logic [63:0] mem[$], input int depth,
                                  input int max_depth, input int nfeat);
    int me, l, r;
    me = mem.size();
    if (depth >= max_depth || (depth > 0 && $urandom_range(0, 3) == 0)) begin
      mem.push_back(ref_leaf($signed($urandom_range(0, 2000)) - 1000, 0, 0));
      return me;
    end
    mem.push_back(64'd0);
    l = gen_node(mem, depth + 1, max_depth, nfeat);
    r = gen_node(mem, depth + 1, max_depth, nfeat);
    mem[me] = ref_split($urandom_range(0, nfeat - 1), $urandom_range(0, 65535), l, r);
    return me;
  endfunction

  // Builds ntrees trees back to back from address 0 and links them.
  function automatic void gen_trees(ref logic [63:0] mem[$], input int ntrees,
                                    input int max_depth, input int nfeat);
    int starts[$];
    mem.delete();
    for (int t = 0; t < ntrees; t++) begin
      starts.push_back(mem.size());
      void'(gen_node(mem, 0, max_depth, nfeat));
    end
    for (int t = 0; t < ntrees; t++) begin
      int hi = (t + 1 < ntrees) ? starts[t + 1] : mem.size();
      for (int a = starts[t]; a < hi; a++)
        if (mem[a][7:0] != 0) begin
          mem[a][23:8]  = (t + 1 < ntrees) ? 16'(starts[t + 1]) : 16'd0;
          mem[a][31:24] = (t + 1 < ntrees) ? 8'd0 : 8'd1;
        end
    end
  endfunction

  // Walks the trees for one pixel: returns the score, and the node count.
  function automatic int ref_eval(const ref logic [63:0] mem[$],
                                  const ref logic [15:0] feat[256], output int nodes);
    int a = 0, acc = 0;
    nodes = 0;
    forever begin
      logic [63:0] w = mem[a];
      nodes++;
      if (w[7:0] != 0) begin
        acc += int'($signed(w[55:40]));
        if (w[31:24] != 0) break;
        a = int'(w[23:8]);
      end else begin
        a = (feat[w[63:56]] <= w[55:40]) ? int'(w[39:24]) : int'(w[23:8]);
      end
    end
    return acc;
  endfunction
  // ---- end of reference model ----

  initial begin
    int nodes, want, cyc;
    rst_n = 0; start = 0; load = 0; addr = 0; data = 0;
    foreach (feat[i]) feat[i] = 0;
    do gen_trees(mem, 100, 3, 256); while (mem.size() > 2048);
    $display("%0d nodes in 100 trees", mem.size());
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (mem[a]) begin
      load = 1; addr = 16'(a); data = mem[a];
      @(negedge clk);
    end
    load = 0;
    for (int k = 0; k < 20; k++) begin
      int a;
      a = $urandom_range(0, mem.size() - 1);
      addr = 16'(a); #1;
      checks++;
      if (node_data !== mem[a]) begin
        failures++;
        $display("read-back %0d: %h want %h", a, node_data, mem[a]);
      end
      @(negedge clk);
    end
    for (int px = 0; px < 30; px++) begin
      foreach (feat[i]) feat[i] = 16'($urandom);
      // on odd pixels make many features equal a threshold that uses them,
      // so the "equal goes left" rule is exercised
      if (px % 2 == 1)
        for (int k = 0; k < 200; k++) begin
          logic [63:0] w;
          w = mem[$urandom_range(0, mem.size() - 1)];
          if (w[7:0] == 0) feat[w[63:56]] = w[55:40];
        end
      want = ref_eval(mem, feat, nodes);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!finish && cyc < 100000) begin
        @(negedge clk);
        cyc++;
      end
      checks += 2;
      if (result !== want) begin
        failures++;
        $display("pixel %0d: score %0d want %0d", px, result, want);
      end
      if (cyc != nodes + 1) begin
        failures++;
        $display("pixel %0d: %0d clocks, want %0d nodes + 1", px, cyc, nodes);
      end
      @(negedge clk);
    end
    checks++;
    if (n_left == 0 || n_right == 0 || n_jump == 0 || n_last == 0 || n_equal == 0) begin
      failures++;
    end
    $display("left %0d right %0d equal %0d jumps %0d last %0d", n_left, n_right, n_equal, n_jump, n_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
