// class_ctrl: control unit of one class module.
//
// Three states. IDLE: the trees RAM address comes from outside (sel_ext), and
// `load` writes the word presented there (we). `start` clears the node pointer
// (REG0) and the score (REG1) and enters RUN. RUN: every clock the node pointer
// takes the next address (load_node) and, on a leaf, the score adds the
// prediction (acc_en); a leaf whose last-tree mark is set ends the walk in
// DONE, where `finish` stays high until the next `start`. DONE behaves like
// IDLE for loads and read-back. The start/load inputs and the RAM
// write-enable / load_node outputs follow the original class diagram; the
// state encoding is this design's own. A `start` during RUN is ignored, and
// so is `load`.
module class_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic load,
  input  logic is_leaf,
  input  logic last_tree,
  output logic we,
  output logic sel_ext,
  output logic load_node,
  output logic clear,
  output logic acc_en,
  output logic busy,
  output logic finish
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state, state_nx;

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;
  end

  // Outputs are decoded separately from the next-state logic: sel_ext steers
  // the RAM address whose data feeds is_leaf/last_tree back in, so keeping it
  // a function of the state alone avoids even an apparent combinational loop.
  assign sel_ext   = (state != S_RUN);
  assign we        = sel_ext && load;
  assign clear     = sel_ext && start;
  assign load_node = (state == S_RUN);
  assign acc_en    = (state == S_RUN) && is_leaf;

  always_comb begin
    state_nx = state;
    unique case (state)
      S_IDLE, S_DONE: if (start) state_nx = S_RUN;
      S_RUN:          if (is_leaf && last_tree) state_nx = S_DONE;
      default:        state_nx = S_IDLE;
    endcase
  end

  assign busy   = (state == S_RUN);
  assign finish = (state == S_DONE);

endmodule
