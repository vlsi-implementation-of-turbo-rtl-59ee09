// tb_lut_log_bcjr_processor: self-checking test of the four-lane ACS processor.
//
// Loads random LLRs through 'mem in', issues random add, subtract and max*
// commands with random lane masks and addresses, and compares every written
// word (read back through 'mem out') and the MAX registers with a model:
// add/subtract wrap modulo 2^7; max and min follow the sign of the wrapped
// difference; max*(p,q) = max + 0.75 / 0.5 / 0.25 / 0 for
// |p-q| = 0, <= 0.75, <= 2, > 2, where max and |p-q| follow the wrapped
// difference. Checks the latency (accept to done: 2 cycles add/subtract, 3
// max/min, 5 max*, of which 4 are ACS cycles) and that a constant rewritten through
// 'reg in' changes the result (all corrections set to 0 gives plain max).
module tb_lut_log_bcjr_processor;
  import acs_pkg::*;

  localparam int DEPTH = 1 << AW;

  logic clk = 1'b0, rst_n;
  logic mem_in_we; addr_t mem_in_addr, mem_out_addr; llr_t mem_in_data, mem_out_data;
  logic reg_in_we; kidx_e reg_in_sel, reg_out_sel; llr_t reg_in_data, reg_out_data;
  logic cmd_valid, cmd_ready, done; cmd_t cmd;
  opcode_t [LANES-1:0] acs_op;
  llr_t [LANES-1:0] max_out;
  logic [LANES-1:0][2:0] c_out;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_ms = 0, n_mm = 0;
  int cor [4] = '{3, 2, 1, 0};
  llr_t model [DEPTH];

  lut_log_bcjr_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic llr_t maxstar(llr_t p, llr_t q);
    int d, m, ad, c;
    d  = int'(llr_t'(int'(p) - int'(q)));
    m  = (d >= 0) ? int'(p) : int'(q);
    ad = (d >= 0) ? d : -d;
    if (ad == 0)      c = cor[0];
    else if (ad <= 3) c = cor[1];
    else if (ad <= 8) c = cor[2];
    else              c = cor[3];
    return llr_t'(m + c);
  endfunction

  task automatic run_cmd(cmd_t c);
    int lat;
    llr_t res [LANES];
    for (int l = 0; l < LANES; l++) begin
      unique case (c.op)
        CMD_ADD: res[l] = llr_t'(int'(model[c.pa[l]]) + int'(model[c.qa[l]]));
        CMD_SUB: res[l] = llr_t'(int'(model[c.pa[l]]) - int'(model[c.qa[l]]));
        CMD_MAX: res[l] = (llr_t'(int'(model[c.pa[l]]) - int'(model[c.qa[l]])) < 0) ? model[c.qa[l]] : model[c.pa[l]];
        CMD_MIN: res[l] = (llr_t'(int'(model[c.pa[l]]) - int'(model[c.qa[l]])) < 0) ? model[c.pa[l]] : model[c.qa[l]];
        default: res[l] = maxstar(model[c.pa[l]], model[c.qa[l]]);
      endcase
    end
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    check("latency", lat, (c.op == CMD_MAXSTAR) ? 5 : (c.op inside {CMD_MAX, CMD_MIN}) ? 3 : 2);
    for (int l = 0; l < LANES; l++) if (c.lane_en[l]) begin
      check("max_out", int'(max_out[l]), int'(res[l]));
      model[c.da[l]] = res[l];
    end
    @(negedge clk);
    for (int l = 0; l < LANES; l++) if (c.lane_en[l]) begin
      mem_out_addr = c.da[l];
      #1 check("result in memory", int'(mem_out_data), int'(model[c.da[l]]));
    end
    unique case (c.op)
      CMD_ADD: n_add++;
      CMD_SUB: n_sub++;
      CMD_MAX, CMD_MIN: n_mm++;
      default: n_ms++;
    endcase
  endtask

  initial begin
    cmd_t c;
    rst_n = 0; mem_in_we = 0; mem_in_addr = '0; mem_in_data = '0; mem_out_addr = '0;
    reg_in_we = 0; reg_in_sel = KI_CMP1; reg_in_data = '0; reg_out_sel = KI_CMP1;
    cmd_valid = 0; cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      mem_in_we = 1; mem_in_addr = addr_t'(a);
      mem_in_data = llr_t'($urandom_range(0, 60) - 30);
      model[a] = mem_in_data;
      @(negedge clk);
    end
    mem_in_we = 0;
    for (int i = 0; i < 1200; i++) begin
      if (i == 900) begin
        // set all corrections to 0 through 'reg in': max* becomes max
        for (int k = 3; k < 7; k++) begin
          reg_in_we = 1; reg_in_sel = kidx_e'(k); reg_in_data = '0;
          @(negedge clk);
        end
        reg_in_we = 0;
        cor = '{0, 0, 0, 0};
        reg_out_sel = KI_COR00;
        #1 check("reg out", int'(reg_out_data), 0);
      end
      c.op = cmd_op_e'($urandom_range(0, 4));
      c.lane_en = LANES'($urandom_range(1, 15));
      for (int l = 0; l < LANES; l++) begin
        c.pa[l] = addr_t'($urandom); c.qa[l] = addr_t'($urandom);
        c.da[l] = addr_t'(l * (DEPTH / LANES) + $urandom_range(0, DEPTH / LANES - 1));
      end
      run_cmd(c);
    end
    // max* with equal operands must add 0.75 (reset constants)
    rst_n = 0; @(negedge clk); rst_n = 1;
    cor = '{3, 2, 1, 0};
    c.op = CMD_MAXSTAR; c.lane_en = '1;
    for (int l = 0; l < LANES; l++) begin c.pa[l] = addr_t'(l); c.qa[l] = addr_t'(l); c.da[l] = addr_t'(l + 8); end
    run_cmd(c);
    check("add seen", int'(n_add > 0), 1);
    check("sub seen", int'(n_sub > 0), 1);
    check("max* seen", int'(n_ms > 0), 1);
    check("max/min seen", int'(n_mm > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
