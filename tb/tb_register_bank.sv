// tb_register_bank: self-checking test of the register bank.
//
// Checks the reset values of the LUT constants (0.75, 0, 2 and 0.75, 0.5,
// 0.25, 0 in Q5.2), rewrites and reads them through 'reg in' / 'reg out', and
// loads the per-lane MAX registers with random write enables against a model.
module tb_register_bank;
  import acs_pkg::*;

  logic clk = 1'b0, rst_n;
  logic [LANES-1:0] max_we;
  llr_t [LANES-1:0] max_d, max_q;
  logic reg_in_we;
  kidx_e reg_in_sel, reg_out_sel;
  llr_t reg_in_data, reg_out_data, k_cmp1, k_cmp0, k_cmp2;
  llr_t [3:0] k_cor;
  int checks = 0, failures = 0;
  llr_t kmodel [7];
  llr_t mmodel [LANES];

  register_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic check_consts();
    check("k_cmp1", int'(k_cmp1), int'(kmodel[0]));
    check("k_cmp0", int'(k_cmp0), int'(kmodel[1]));
    check("k_cmp2", int'(k_cmp2), int'(kmodel[2]));
    for (int i = 0; i < 4; i++) check("k_cor", int'(k_cor[i]), int'(kmodel[3+i]));
    for (int i = 0; i < 7; i++) begin
      reg_out_sel = kidx_e'(i);
      #1 check("reg out", int'(reg_out_data), int'(kmodel[i]));
    end
  endtask

  initial begin
    rst_n = 0; max_we = '0; max_d = '0; reg_in_we = 0;
    reg_in_sel = KI_CMP1; reg_out_sel = KI_CMP1; reg_in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    kmodel = '{7'sd3, 7'sd0, 7'sd8, 7'sd3, 7'sd2, 7'sd1, 7'sd0};
    for (int l = 0; l < LANES; l++) mmodel[l] = '0;
    check_consts();
    for (int l = 0; l < LANES; l++) check("max reset", int'(max_q[l]), 0);
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      reg_in_we   = 1'($urandom_range(0, 1));
      reg_in_sel  = kidx_e'($urandom_range(0, 6));
      reg_in_data = llr_t'($urandom);
      for (int l = 0; l < LANES; l++) begin
        max_we[l] = 1'($urandom_range(0, 1));
        max_d[l]  = llr_t'($urandom);
      end
      if (reg_in_we) kmodel[reg_in_sel] = reg_in_data;
      for (int l = 0; l < LANES; l++) if (max_we[l]) mmodel[l] = max_d[l];
      @(negedge clk);
      reg_in_we = 0; max_we = '0;
      for (int l = 0; l < LANES; l++) check("max", int'(max_q[l]), int'(mmodel[l]));
      check_consts();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
