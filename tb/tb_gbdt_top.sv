// tb_gbdt_top: end-to-end test of the accelerator at its default size
// (6 classes, 2048-word trees RAM per class, 256-entry feature RAM), acting
// as the host processor and its DMA engine.
//
// Workload: 100 random, unbalanced trees (depth up to 4) per class, and
// NUM_PIXELS random pixels of 204 features each (the band count of the
// hyperspectral scene the accelerator targets). Steps:
//  1. load the trees of every class over the stream and check the checksum
//     and word count against the host's own;
//  2. read back random tree words through the debug path;
//  3. classify every pixel: scores, predicted class (argmax, lowest index on
//     a tie) and the cycle count (1 + most nodes visited by any class) are
//     compared with a reference walk of the same trees.
// The stream driver inserts random gaps and presents data before the command
// arrives, so the stream also stalls. Mechanisms counted, each must occur:
// left and right turns, leaf-to-next-tree jumps, last-tree stops, classes
// waiting for a slower class, stream stalls and gaps, checksum and debug
// read-back matches.
module tb_gbdt_top;
  import gbdt_pkg::*;
  localparam int N = 6;
  localparam int NTREES = 100;
  localparam int NFEAT = 204;
  localparam int NUM_PIXELS = 2276;

  logic clk = 0, rst_n;
  logic [7:0] s_axil_awaddr, s_axil_araddr;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0] s_axil_wstrb;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic [63:0] s_axis_tdata;
  logic s_axis_tvalid, s_axis_tready;
  logic irq_done;

  gbdt_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_jump = 0, n_last = 0, n_wait = 0;
  int n_stall = 0, n_gap = 0, n_csum = 0, n_debug = 0, n_pixels = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

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

  // ---- stream driver (DMA model): sends queued beats with random gaps ----
  logic [63:0] beats [$];
  bit took = 0;
  always @(posedge clk) took <= s_axis_tvalid && s_axis_tready;
  always @(negedge clk) begin
    if (!rst_n) begin
      s_axis_tvalid <= 0;
    end else begin
      if (took) void'(beats.pop_front());
      if (beats.size() > 0 && $urandom_range(0, 4) != 0) begin
        s_axis_tvalid <= 1;
        s_axis_tdata  <= beats[0];
      end else begin
        if (beats.size() > 0) n_gap++;
        s_axis_tvalid <= 0;
      end
    end
  end
  always @(posedge clk) if (s_axis_tvalid && !s_axis_tready) n_stall++;

  // Values are sampled at the clock edge the handshake completes.
  task automatic axi_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1; s_axil_wdata = d; s_axil_wstrb = 4'hF;
    s_axil_wvalid = 1; s_axil_bready = 1;
    do @(posedge clk); while (!s_axil_awready);
    @(negedge clk);
    s_axil_awvalid = 0; s_axil_wvalid = 0;
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk);
    s_axil_bready = 0;
  endtask

  task automatic axi_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1; s_axil_rready = 1;
    do @(posedge clk); while (!s_axil_arready);
    @(negedge clk);
    s_axil_arvalid = 0;
    while (!s_axil_rvalid) @(negedge clk);
    d = s_axil_rdata;
    @(negedge clk);
    s_axil_rready = 0;
  endtask

  task automatic wait_idle(output logic [31:0] st);
    do axi_read(REG_STATUS, st); while (st[0]);
  endtask

  logic [63:0] trees [N][$];
  logic [15:0] feat [256];

  initial begin
    logic [31:0] r, st, lo, hi;
    rst_n = 0;
    s_axil_awaddr = 0; s_axil_awvalid = 0; s_axil_wdata = 0; s_axil_wstrb = 0; s_axil_wvalid = 0;
    s_axil_bready = 0; s_axil_araddr = 0; s_axil_arvalid = 0; s_axil_rready = 0;
    s_axis_tdata = 0;
    foreach (feat[i]) feat[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. load trees
    for (int c = 0; c < N; c++) begin
      logic [31:0] sum;
      do gen_trees(trees[c], NTREES, 4, NFEAT); while (trees[c].size() > 2048);
      sum = 0;
      foreach (trees[c][a]) begin
        beats.push_back(trees[c][a]);
        sum = sum + trees[c][a][63:32] + trees[c][a][31:0];
      end
      axi_write(REG_CTRL, {16'(trees[c].size()), 8'(c), 6'd0, CMD_LOAD_TREES});
      wait_idle(st);
      axi_read(REG_CHECKSUM, r);
      check(r == sum && st[31:16] == 16'(trees[c].size()), $sformatf("class %0d checksum %h want %h", c, r, sum));
      if (r == sum) n_csum++;
      $display("class %0d: %0d nodes", c, trees[c].size());
    end

    // 2. debug read-back
    for (int k = 0; k < 24; k++) begin
      int c, a;
      c = k % N;
      a = $urandom_range(0, trees[c].size() - 1);
      axi_write(REG_DBG_ADDR, 32'(a));
      axi_write(REG_CTRL, {16'd0, 8'(c), 6'd0, CMD_DEBUG_READ});
      wait_idle(st);
      axi_read(REG_DBG_LO, lo);
      axi_read(REG_DBG_HI, hi);
      check({hi, lo} == trees[c][a], $sformatf("debug class %0d addr %0d", c, a));
      if ({hi, lo} == trees[c][a]) n_debug++;
    end

    // 3. classify
    for (int px = 0; px < NUM_PIXELS; px++) begin
      int want [N];
      int nodes [N];
      int maxn, minn, best;
      longint unsigned t0;
      for (int i = 0; i < 256; i++) feat[i] = (i < NFEAT) ? 16'($urandom) : 16'd0;
      for (int c = 0; c < N; c++) begin
        want[c] = ref_eval(trees[c], feat, nodes[c]);
      end
      maxn = 0; minn = 1 << 30; best = 0;
      for (int c = 0; c < N; c++) begin
        if (nodes[c] > maxn) maxn = nodes[c];
        if (nodes[c] < minn) minn = nodes[c];
        if (want[c] > want[best]) best = c;
      end
      if (minn != maxn) n_wait++;
      for (int b = 0; b < (NFEAT + 3) / 4; b++)
        beats.push_back({feat[4*b+3], feat[4*b+2], feat[4*b+1], feat[4*b]});
      t0 = cyc;
      axi_write(REG_CTRL, {16'(NFEAT), 8'd0, 6'd0, CMD_CLASSIFY});
      wait_idle(st);
      check(st[1] && irq_done, "done not set");
      check(st[15:8] == 8'(best), $sformatf("pixel %0d: class %0d want %0d", px, st[15:8], best));
      for (int c = 0; c < N; c++) begin
        axi_read(8'(REG_SCORE0 + 4 * c), r);
        check($signed(r) == want[c], $sformatf("pixel %0d class %0d: score %0d want %0d", px, c, $signed(r), want[c]));
      end
      axi_read(REG_MAXSCORE, r);
      check($signed(r) == want[best], "max score");
      axi_read(REG_CYCLES, r);
      check(r == 32'(maxn + 1), $sformatf("pixel %0d: %0d cycles want %0d", px, r, maxn + 1));
      n_pixels++;
      if (px < 3) $display("pixel %0d: class %0d, %0d compute cycles, %0d cycles with transfer and polling",
                           px, st[15:8], r, cyc - t0);
    end
    // count the tree-walk events of the reference on the last pixel set
    for (int c = 0; c < N; c++) begin
      int a;
      a = 0;
      forever begin
        logic [63:0] w;
        w = trees[c][a];
        if (w[7:0] != 0) begin
          if (w[31:24] != 0) begin n_last++; break; end
          n_jump++; a = int'(w[23:8]);
        end else if (feat[w[63:56]] <= w[55:40]) begin n_left++; a = int'(w[39:24]); end
        else begin n_right++; a = int'(w[23:8]); end
      end
    end

    $display("mechanisms: left %0d right %0d jump %0d last %0d wait %0d stall %0d gap %0d checksum %0d debug %0d pixels %0d",
             n_left, n_right, n_jump, n_last, n_wait, n_stall, n_gap, n_csum, n_debug, n_pixels);
    check(n_left > 0 && n_right > 0 && n_jump > 0 && n_last > 0, "tree walk mechanism missing");
    check(n_wait > 0, "no class ever waited for a slower one");
    check(n_stall > 0 && n_gap > 0, "stream never stalled or paused");
    check(n_csum == N && n_debug > 0, "checksum / debug path never matched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
