// lut_log_bcjr_processor: the LUT-Log-BCJR architecture built from 2^m ACS units.
//
// Instead of separate hardware for the gamma, alpha, beta and extrinsic
// computations, every add, subtract and max* of the Log-BCJR algorithm runs on
// four identical ACS units in parallel (m = 2 memory elements, 4 trellis
// states). The main memory supplies the operands, the register bank holds the
// LUT constants and each lane's intermediate result, and the controller walks
// each command through its ACS steps:
//   max*(p,q) = max(p,q) + {0.75, 0.5, 0.25, 0} chosen by |p-q| against 0, 0.75, 2
// in four ACS cycles (OP1: |p-q| and C0; OP2: C1 = |p-q|>0.75; OP3: C2 = |p-q|>0
// or >2; OP4: max + correction), then one write-back cycle. A plain max or min
// (OP1, then the operand picked by C0 plus zero) is added for clipping, in two
// ACS cycles. This partitioning and
// the max* steps follow the published architecture. The operand routing below
// reads OP2/OP3 as comparing the constants with the stored |p-q|.
//
// Interface: the host loads LLRs through mem_in_*, reads results through
// mem_out_*, may rewrite constants through reg_in_*, and issues commands on
// cmd_valid/cmd_ready (cmd_t: operation, lane mask, per-lane p, q and
// destination addresses). done pulses when the results are in the main memory;
// max_out and c_out show each lane's MAX register and C0..C2 flags.
// Timing: add/subtract 2 cycles, max/min 3, max* 5, accept-to-done; one
// command in flight, and the next is accepted the cycle after done.
module lut_log_bcjr_processor
  import acs_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // 'mem in' / 'mem out'
  input  logic                  mem_in_we,
  input  addr_t                 mem_in_addr,
  input  llr_t                  mem_in_data,
  input  addr_t                 mem_out_addr,
  output llr_t                  mem_out_data,
  // 'reg in' / 'reg out'
  input  logic                  reg_in_we,
  input  kidx_e                 reg_in_sel,
  input  llr_t                  reg_in_data,
  input  kidx_e                 reg_out_sel,
  output llr_t                  reg_out_data,
  // commands
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  cmd_t                  cmd,
  output logic                  done,
  // observation
  output opcode_t [LANES-1:0]   acs_op,
  output llr_t    [LANES-1:0]   max_out,
  output logic    [LANES-1:0][2:0] c_out
);

  cmd_t              cur;
  step_e             step;
  opcode_t           op;
  logic [LANES-1:0]  max_we, wb_we;
  llr_t [LANES-1:0]  rd_p, rd_q, acs_p, acs_q, acs_r, max_q;
  llr_t              k_cmp1, k_cmp0, k_cmp2;
  llr_t [3:0]        k_cor;

  acs_controller u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd,
    .cur, .step, .op, .max_we, .wb_we, .done
  );

  main_memory u_mem (
    .clk,
    .mem_in_we, .mem_in_addr, .mem_in_data,
    .mem_out_addr, .mem_out_data,
    .rd_addr_p (cur.pa),
    .rd_addr_q (cur.qa),
    .rd_p, .rd_q,
    .wb_we,
    .wb_addr   (cur.da),
    .wb_data   (max_q)
  );

  register_bank u_rb (
    .clk, .rst_n,
    .max_we, .max_d (acs_r), .max_q,
    .reg_in_we, .reg_in_sel, .reg_in_data,
    .reg_out_sel, .reg_out_data,
    .k_cmp1, .k_cmp0, .k_cmp2, .k_cor
  );

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [2:0] c;  // {C2, C1, C0}

    // Operand selection per step.
    always_comb begin
      unique case (step)
        ST_MS2: begin
          acs_p[l] = k_cmp1;
          acs_q[l] = max_q[l];
        end
        ST_MS3: begin
          acs_p[l] = c[1] ? k_cmp2 : k_cmp0;
          acs_q[l] = max_q[l];
        end
        ST_MS4: begin
          acs_p[l] = c[0] ? rd_q[l] : rd_p[l];
          acs_q[l] = k_cor[{c[1], c[2]}];
        end
        ST_SEL: begin
          acs_p[l] = (c[0] ^ (cur.op == CMD_MIN)) ? rd_q[l] : rd_p[l];
          acs_q[l] = k_cmp0;
        end
        default: begin
          acs_p[l] = rd_p[l];
          acs_q[l] = rd_q[l];
        end
      endcase
    end

    acs_unit u_acs (
      .clk, .rst_n,
      .op (op),
      .p  (acs_p[l]),
      .q  (acs_q[l]),
      .r  (acs_r[l]),
      .c  (c)
    );

    assign acs_op[l] = op;
    assign c_out[l]  = c;
  end

  assign max_out = max_q;

endmodule
