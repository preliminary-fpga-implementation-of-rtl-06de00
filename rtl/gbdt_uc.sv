// gbdt_uc: main control unit of the accelerator.
//
// Executes one host command at a time (commands are ignored while busy):
//  CMD_LOAD_TREES  accepts `len` stream beats, each a node word for class
//                  `cls`, written to trees-RAM addresses 0..len-1. Every
//                  accepted word goes into the holding register (lr_en, with
//                  its address) and the checksum; one clock later the class's
//                  load strobe writes it. The checksum is cleared first.
//  CMD_CLASSIFY    accepts ceil(len/4) beats of pixel features into the
//                  feature RAM, then pulses `start` to all class modules and
//                  waits for all of them to finish; the argmax index is then
//                  latched in pred_class and `done` is set. `cycles` holds the
//                  clocks from start to finish of the last classification.
//  CMD_DEBUG_READ  places dbg_addr in the holding register, then captures the
//                  word that class `cls` stores there (dbg_capture).
// Stream ready is high only while a load command expects data; the stream's
// last-beat marker is not needed because the length comes with the command.
// The processing is strictly sequential: a pixel is loaded, then classified.
// The command set and sequencing are this design's own.
module gbdt_uc
  import gbdt_pkg::*;
#(
  parameter int unsigned NUM_CLASSES  = 6,
  parameter int unsigned NUM_FEATURES = 256,
  localparam int unsigned CW = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1,
  localparam int unsigned BA = $clog2(NUM_FEATURES / FEAT_PER_BEAT)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // command from the register file
  input  logic                   cmd_valid,
  input  cmd_e                   cmd,
  input  logic [7:0]             cmd_class,
  input  logic [15:0]            cmd_len,
  input  logic [ADDR_W-1:0]      dbg_addr,
  // stream
  input  logic                   s_tvalid,
  output logic                   s_tready,
  // holding register, checksum, feature RAM, debug
  output logic                   lr_en,
  output logic [ADDR_W-1:0]      lr_addr,
  output logic                   cs_clear,
  output logic                   cs_en,
  output logic                   fr_we,
  output logic [BA-1:0]          fr_beat,
  output logic                   dbg_capture,
  output logic [CW-1:0]          sel_class,
  // class modules
  output logic [NUM_CLASSES-1:0] class_load,
  output logic                   start,
  input  logic                   all_done_pulse,
  input  logic [CW-1:0]          argmax_idx,
  // status
  output logic                   busy,
  output logic                   done,
  output logic [CW-1:0]          pred_class,
  output logic [31:0]            cycles
);

  typedef enum logic [2:0] {
    U_IDLE, U_LOAD_TREES, U_LOAD_PIX, U_START, U_RUN, U_DBG
  } ustate_e;

  ustate_e       state;
  logic [15:0]   cnt, len;
  logic          load_pending;
  logic [CW-1:0] cls;
  logic          accept, take;

  assign s_tready = (state == U_LOAD_TREES) || (state == U_LOAD_PIX);
  assign accept   = s_tready && s_tvalid;
  assign take     = (state == U_IDLE) && cmd_valid && !load_pending;

  assign lr_en    = ((state == U_LOAD_TREES) && accept) || (take && cmd == CMD_DEBUG_READ);
  assign lr_addr  = (state == U_LOAD_TREES) ? ADDR_W'(cnt) : dbg_addr;
  assign cs_en    = (state == U_LOAD_TREES) && accept;
  assign cs_clear = take && (cmd == CMD_LOAD_TREES);
  assign fr_we    = (state == U_LOAD_PIX) && accept;
  assign fr_beat  = BA'(cnt);
  assign start    = (state == U_START);
  assign dbg_capture = (state == U_DBG);
  assign sel_class   = cls;
  assign busy        = (state != U_IDLE) || load_pending;

  always_comb begin
    class_load = '0;
    if (load_pending) class_load[cls] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= U_IDLE;
      cnt          <= '0;
      len          <= '0;
      cls          <= '0;
      load_pending <= 1'b0;
      done         <= 1'b0;
      pred_class   <= '0;
      cycles       <= '0;
    end else begin
      load_pending <= cs_en;
      unique case (state)
        U_IDLE: begin
          if (take) begin
            cls <= CW'(cmd_class);
            cnt <= '0;
            unique case (cmd)
              CMD_LOAD_TREES: begin
                len   <= cmd_len;
                state <= (cmd_len == 16'd0) ? U_IDLE : U_LOAD_TREES;
              end
              CMD_CLASSIFY: begin
                len   <= (cmd_len + 16'd3) >> 2;
                done  <= 1'b0;
                state <= (cmd_len == 16'd0) ? U_START : U_LOAD_PIX;
              end
              CMD_DEBUG_READ: state <= U_DBG;
              default: ;
            endcase
          end
        end
        U_LOAD_TREES, U_LOAD_PIX: begin
          if (accept) begin
            cnt <= cnt + 16'd1;
            if (cnt + 16'd1 == len)
              state <= (state == U_LOAD_PIX) ? U_START : U_IDLE;
          end
        end
        U_START: begin
          cycles <= 32'd1;
          state  <= U_RUN;
        end
        U_RUN: begin
          if (!all_done_pulse) cycles <= cycles + 32'd1;
          if (all_done_pulse) begin
            pred_class <= argmax_idx;
            done       <= 1'b1;
            state      <= U_IDLE;
          end
        end
        U_DBG: state <= U_IDLE;
        default: state <= U_IDLE;
      endcase
    end
  end

endmodule
