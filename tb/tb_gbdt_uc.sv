// tb_gbdt_uc: drives the main control unit with the three commands and a
// stream whose valid signal drops at random (so stream back-pressure and
// gaps both occur), and checks cycle by cycle:
//  - tree load: checksum cleared once, every accepted beat captured with
//    addresses 0..len-1 and written into the selected class one clock later;
//  - classify: ceil(len/4) feature beats written in order, one start pulse,
//    the argmax index latched when all classes finish, done set, the cycle
//    count equal to the clocks from start to finish;
//  - debug read: the debug address captured, then one capture strobe for the
//    selected class;
//  - a command issued while busy is ignored.
module tb_gbdt_uc;
  import gbdt_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n;
  logic cmd_valid;
  cmd_e cmd;
  logic [7:0] cmd_class;
  logic [15:0] cmd_len, dbg_addr;
  logic s_tvalid, s_tready;
  logic lr_en, cs_clear, cs_en, fr_we, dbg_capture, start;
  logic [15:0] lr_addr;
  logic [5:0] fr_beat;
  logic [2:0] sel_class, argmax_idx, pred_class;
  logic [N-1:0] class_load;
  logic all_done_pulse, busy, done;
  logic [31:0] cycles;
  int checks = 0, failures = 0;

  gbdt_uc #(.NUM_CLASSES(N), .NUM_FEATURES(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  task automatic issue(input cmd_e c, input int cls, input int len);
    cmd_valid = 1; cmd = c; cmd_class = 8'(cls); cmd_len = 16'(len);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  initial begin
    int got, pend, cls;
    rst_n = 0; cmd_valid = 0; cmd = CMD_NOP; cmd_class = 0; cmd_len = 0;
    dbg_addr = 0; s_tvalid = 0; all_done_pulse = 0; argmax_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int rep = 0; rep < 4; rep++) begin
      int len;
      // ---- tree load ----
      cls = $urandom_range(0, N-1);
      len = $urandom_range(1, 40);
      cmd_valid = 1; cmd = CMD_LOAD_TREES; cmd_class = 8'(cls); cmd_len = 16'(len);
      #1 check(cs_clear == 1, "checksum not cleared at tree load");
      @(negedge clk); cmd_valid = 0;
      got = 0; pend = -1;
      while (got < len) begin
        s_tvalid = 1'($urandom);
        #1;
        check(s_tready == 1, "not ready during tree load");
        check(class_load == ((pend >= 0) ? N'(1) << cls : '0), "load strobe wrong");
        check(busy == 1, "not busy during load");
        if (s_tvalid) begin
          check(lr_en && cs_en && lr_addr == 16'(got), "beat not captured");
          pend = got; got++;
        end else begin
          check(!lr_en && !cs_en, "capture without beat");
          pend = -1;
        end
        @(negedge clk);
      end
      s_tvalid = 0; #1;
      check(class_load == (N'(1) << cls), "last word not written");
      check(s_tready == 0, "ready after load");
      @(negedge clk);
      check(!busy && class_load == 0, "still busy after load");

      // ---- classify ----
      begin
        int nf, beats, m, w;
        nf = $urandom_range(1, 256);
        beats = (nf + 3) / 4;
        issue(CMD_CLASSIFY, 0, nf);
        got = 0;
        while (got < beats) begin
          s_tvalid = 1'($urandom);
          #1;
          check(s_tready == 1, "not ready during pixel load");
          check(fr_we == s_tvalid && (!s_tvalid || fr_beat == 6'(got)), "feature beat wrong");
          check(!start, "start too early");
          if (s_tvalid) got++;
          @(negedge clk);
        end
        s_tvalid = 0; #1;
        check(start == 1 && s_tready == 0, "no start after pixel");
        @(negedge clk);
        // a command while running is ignored
        issue(CMD_LOAD_TREES, 1, 3);
        m = $urandom_range(3, 60);
        w = $urandom_range(0, N-1);
        argmax_idx = 3'(w);
        for (int k = 2; k < m; k++) begin
          #1 check(!start && !done && busy && !s_tready, "state wrong while running");
          @(negedge clk);
        end
        all_done_pulse = 1;
        @(negedge clk);
        all_done_pulse = 0;
        argmax_idx = 3'(N - 1 - w);
        #1;
        check(done && !busy && pred_class == 3'(w), "result not latched");
        check(cycles == 32'(m), $sformatf("cycles %0d want %0d", cycles, m));
      end

      // ---- debug read ----
      cls = $urandom_range(0, N-1);
      dbg_addr = 16'($urandom);
      cmd_valid = 1; cmd = CMD_DEBUG_READ; cmd_class = 8'(cls);
      #1 check(lr_en && lr_addr == dbg_addr && !cs_en, "debug address not captured");
      @(negedge clk); cmd_valid = 0; #1;
      check(dbg_capture && sel_class == 3'(cls), "no debug capture");
      @(negedge clk);
      check(!dbg_capture && !busy, "debug capture too long");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
