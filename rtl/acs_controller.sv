// acs_controller: step sequencer of the four parallel ACS lanes.
//
// Accepts one command at a time on a valid/ready handshake and walks through
// the steps that execute it on all enabled lanes at once:
//   add / subtract : ST_ARI (opcode 000000 / 100000), ST_WB
//   max*           : ST_MS1 (101100), ST_MS2 (110010), ST_MS3 (110001),
//                    ST_MS4 (000000), ST_WB
//   max / min      : ST_MS1 (101100), ST_SEL (000000), ST_WB
// The opcodes and their order are the published max* decomposition; the command
// format, the handshake and the separate write-back step are this design's
// choices, and so are the plain max and min commands (OP1's flag C0 picks p or
// q, to which zero is added), used for clipping. In ST_ARI, ST_MS1, ST_MS4 and
// ST_SEL the lane result is captured in the
// register bank (max_we); in ST_WB it is copied to the main memory (wb_we) and
// done pulses. cmd_ready is high only in ST_IDLE, so an add or subtract takes 2
// cycles, a max or min 3 cycles and a max* 5 cycles from acceptance to done,
// with 1, 2 and 4 ACS cycles.
module acs_controller
  import acs_pkg::*;
#(
  parameter int unsigned NLANES = LANES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  cmd_t              cmd,
  output cmd_t              cur,       // command being executed
  output step_e             step,
  output opcode_t           op,        // opcode driven to every lane
  output logic [NLANES-1:0] max_we,
  output logic [NLANES-1:0] wb_we,
  output logic              done
);

  step_e step_q, step_d;
  cmd_t  cur_q;

  always_comb begin
    step_d = step_q;
    unique case (step_q)
      ST_IDLE: if (cmd_valid) step_d = (cmd.op inside {CMD_ADD, CMD_SUB}) ? ST_ARI : ST_MS1;
      ST_ARI:  step_d = ST_WB;
      ST_MS1:  step_d = (cur_q.op == CMD_MAXSTAR) ? ST_MS2 : ST_SEL;
      ST_SEL:  step_d = ST_WB;
      ST_MS2:  step_d = ST_MS3;
      ST_MS3:  step_d = ST_MS4;
      ST_MS4:  step_d = ST_WB;
      ST_WB:   step_d = ST_IDLE;
      default: step_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step_q <= ST_IDLE;
      cur_q  <= '0;
    end else begin
      step_q <= step_d;
      if (step_q == ST_IDLE && cmd_valid) cur_q <= cmd;
    end
  end

  always_comb begin
    op     = OP_ADD;
    max_we = '0;
    wb_we  = '0;
    done   = 1'b0;
    unique case (step_q)
      ST_ARI: begin
        op     = (cur_q.op == CMD_SUB) ? OP_SUB : OP_ADD;
        max_we = cur_q.lane_en;
      end
      ST_MS1: begin
        op     = OP_MS1;
        max_we = cur_q.lane_en;
      end
      ST_MS2: op = OP_MS2;
      ST_MS3: op = OP_MS3;
      ST_MS4, ST_SEL: begin
        op     = OP_ADD;
        max_we = cur_q.lane_en;
      end
      ST_WB: begin
        wb_we = cur_q.lane_en;
        done  = 1'b1;
      end
      default: ;
    endcase
  end

  assign cmd_ready = (step_q == ST_IDLE);
  assign step      = step_q;
  assign cur       = cur_q;

  // done only closes a command; only defined commands are issued.
  a_done_only_in_wb: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (step_q == ST_WB));
  a_no_unknown_op: assert property (@(posedge clk) disable iff (!rst_n)
    (step_q == ST_IDLE && cmd_valid) |-> (cmd.op inside {CMD_ADD, CMD_SUB, CMD_MAXSTAR, CMD_MAX, CMD_MIN}));

endmodule
