// tb_class_ctrl: random start/load/is_leaf/last_tree stimulus against a
// reference model of the three-state control (idle, run, done). Every
// output is compared every clock.
module tb_class_ctrl;
  logic clk = 0, rst_n, start, load, is_leaf, last_tree;
  logic we, sel_ext, load_node, clear, acc_en, busy, finish;
  int checks = 0, failures = 0, runs = 0, loads = 0;
  int st; // 0 idle, 1 run, 2 done

  class_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_we, e_sel, e_ln, e_clr, e_acc;
    rst_n = 0; start = 0; load = 0; is_leaf = 0; last_tree = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1; st = 0;
    for (int t = 0; t < 5000; t++) begin
      start = ($urandom_range(0, 9) == 0);
      load = 1'($urandom);
      is_leaf = 1'($urandom);
      last_tree = ($urandom_range(0, 5) == 0);
      #1;
      e_we  = (st != 1) && load;
      e_sel = (st != 1);
      e_ln  = (st == 1);
      e_clr = (st != 1) && start;
      e_acc = (st == 1) && is_leaf;
      checks++;
      if (we != e_we || sel_ext != e_sel || load_node != e_ln || clear != e_clr ||
          acc_en != e_acc || busy != (st == 1) || finish != (st == 2)) begin
        failures++;
        if (failures < 10) $display("t%0d st %0d: we%b sel%b ln%b clr%b acc%b busy%b fin%b", t, st,
                                    we, sel_ext, load_node, clear, acc_en, busy, finish);
      end
      if (e_we) loads++;
      if (st != 1 && start) begin st = 1; runs++; end
      else if (st == 1 && is_leaf && last_tree) st = 2;
      @(negedge clk);
    end
    checks++;
    if (runs == 0 || loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
