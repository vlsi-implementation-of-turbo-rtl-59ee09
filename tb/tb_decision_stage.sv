// tb_decision_stage: self-checking test of the hard-decision read-out.
//
// Connects the stage to a small memory model holding random LLRs and checks
// that after start it reads BASE..BASE+N-1 in order, emits bit 1 exactly for
// negative LLRs, keeps out_valid high for N consecutive cycles with out_last on
// the final one, and then falls idle.
module tb_decision_stage;
  import acs_pkg::*;

  localparam int N = 32, BASE = 192;

  logic clk = 1'b0, rst_n, start, busy, out_valid, out_bit, out_last;
  addr_t rd_addr;
  llr_t rd_data;
  llr_t mem [1 << AW];
  int checks = 0, failures = 0;

  decision_stage #(.N(N), .BASE(BASE)) dut (.*);

  assign rd_data = mem[rd_addr];

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

  initial begin
    rst_n = 0; start = 0;
    foreach (mem[a]) mem[a] = llr_t'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      foreach (mem[a]) mem[a] = llr_t'($urandom);
      mem[BASE] = '0;    // zero LLR decides 0
      #1 check("idle", int'(out_valid), 0);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int i = 0; i < N; i++) begin
        check("valid", int'(out_valid), 1);
        check("address", int'(rd_addr), BASE + i);
        check("bit", int'(out_bit), int'(mem[BASE + i] < 0));
        check("last", int'(out_last), int'(i == N - 1));
        @(negedge clk);
      end
      check("done", int'(busy), 0);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
