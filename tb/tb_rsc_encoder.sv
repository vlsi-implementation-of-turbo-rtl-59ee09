// tb_rsc_encoder: self-checking test of the 4-state RSC encoder.
//
// Encodes random bit streams and compares parity and state with a model of the
// (7,5) recursive systematic code written as a state table: from state
// {s2,s1} with input x, a = x^s1^s2, parity = a^s2, next state {s1,a}. Also
// checks that clr returns the encoder to state 0 and that en=0 holds the state.
module tb_rsc_encoder;
  logic clk = 1'b0, rst_n, clr, en, x, parity;
  logic [1:0] state;
  int checks = 0, failures = 0;

  rsc_encoder dut (.*);

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

  // next state and parity tables indexed by {state, x}
  localparam logic [1:0] NEXT [8] = '{2'd0, 2'd1, 2'd3, 2'd2, 2'd1, 2'd0, 2'd2, 2'd3};
  localparam logic       PAR  [8] = '{1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0};

  initial begin
    logic [1:0] s;
    rst_n = 0; clr = 0; en = 0; x = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    s = 2'd0;
    for (int i = 0; i < 3000; i++) begin
      en  = ($urandom_range(0, 9) != 0);
      clr = ($urandom_range(0, 49) == 0);
      x   = 1'($urandom_range(0, 1));
      #1;
      check("state", int'(state), int'(s));
      check("parity", int'(parity), int'(PAR[{s, x}]));
      if (clr)     s = 2'd0;
      else if (en) s = NEXT[{s, x}];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
