// tb_acs_controller: self-checking test of the ACS step sequencer.
//
// Issues random add, subtract, max, min and max* commands with random gaps and checks,
// cycle by cycle, the opcode sequence (000000 or 100000 for add/subtract;
// 101100, 110010, 110001, 000000 for max*; 101100, 000000 for max/min), the register-bank and write-back
// enables, the latched command, the done pulse and the accept-to-done latency
// (2 cycles for add/subtract, 3 for max/min, 5 for max*: four ACS cycles plus
// write-back).
module tb_acs_controller;
  import acs_pkg::*;

  logic clk = 1'b0, rst_n;
  logic cmd_valid, cmd_ready, done;
  cmd_t cmd, cur;
  step_e step;
  opcode_t op;
  logic [LANES-1:0] max_we, wb_we;
  int checks = 0, failures = 0;
  int n_ms = 0, n_ari = 0, n_mm = 0;

  acs_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    cmd_t c;
    opcode_t exp_ops [$];
    rst_n = 0; cmd_valid = 0; cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 800; i++) begin
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        check("idle ready", int'(cmd_ready), 1);
        check("idle done", int'(done), 0);
      end
      c.op = cmd_op_e'($urandom_range(0, 4));
      c.lane_en = LANES'($urandom);
      for (int l = 0; l < LANES; l++) begin
        c.pa[l] = addr_t'($urandom); c.qa[l] = addr_t'($urandom); c.da[l] = addr_t'($urandom);
      end
      cmd = c; cmd_valid = 1;
      #1 check("ready", int'(cmd_ready), 1);
      @(negedge clk);
      cmd_valid = 0; cmd = '0;
      exp_ops.delete();
      if (c.op == CMD_MAXSTAR) begin
        exp_ops = '{OP_MS1, OP_MS2, OP_MS3, OP_ADD};
        n_ms++;
      end else if (c.op inside {CMD_MAX, CMD_MIN}) begin
        exp_ops = '{OP_MS1, OP_ADD};
        n_mm++;
      end else begin
        exp_ops.push_back(c.op == CMD_SUB ? OP_SUB : OP_ADD);
        n_ari++;
      end
      foreach (exp_ops[s]) begin
        check("busy", int'(cmd_ready), 0);
        check("opcode", int'(op), int'(exp_ops[s]));
        check("cur", int'(cur == c), 1);
        check("max_we", int'(max_we),
              (c.op == CMD_MAXSTAR && (s == 1 || s == 2)) ? 0 : int'(c.lane_en));
        check("wb_we early", int'(wb_we), 0);
        check("done early", int'(done), 0);
        @(negedge clk);
      end
      // write-back cycle: latency 1 + number of ACS steps
      check("done", int'(done), 1);
      check("wb_we", int'(wb_we), int'(c.lane_en));
      check("max_we in wb", int'(max_we), 0);
      @(negedge clk);
      check("back to idle", int'(cmd_ready), 1);
    end
    check("all command kinds seen", int'(n_ms > 0 && n_ari > 0 && n_mm > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
