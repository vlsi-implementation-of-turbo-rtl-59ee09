// tb_turbo_encoder: self-checking test of the rate-1/3 turbo encoder.
//
// Sends random frames, collects the code word stream and compares sys, par1 and
// par2 with a model: par1 is the (7,5) RSC parity of the frame, par2 that of the
// frame permuted by pi(i) = (i mod ROWS)*COLS + i div ROWS, both encoders
// starting from state 0. Checks that the output takes exactly N consecutive
// cycles, that out_last marks the final bit, and that input is refused then.
module tb_turbo_encoder;
  localparam int ROWS = 4, COLS = 8, N = ROWS * COLS;
  logic clk = 1'b0, rst_n, in_valid, in_ready, in_bit;
  logic out_valid, out_last, sys, par1, par2;
  logic [1:0] state1, state2;
  int checks = 0, failures = 0;

  turbo_encoder #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  function automatic void rsc(input logic u [N], output logic p [N]);
    logic s1, s2, a;
    s1 = 0; s2 = 0;
    for (int i = 0; i < N; i++) begin
      a = u[i] ^ s1 ^ s2;
      p[i] = a ^ s2;
      s2 = s1; s1 = a;
    end
  endfunction

  initial begin
    logic u [N], ui [N], p1 [N], p2 [N];
    rst_n = 0; in_valid = 0; in_bit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      for (int i = 0; i < N; i++) u[i] = 1'($urandom_range(0, 1));
      for (int i = 0; i < N; i++) ui[i] = u[(i % ROWS) * COLS + i / ROWS];
      rsc(u, p1);
      rsc(ui, p2);
      for (int i = 0; i < N; i++) begin
        in_valid = 1; in_bit = u[i];
        #1 check("in_ready", int'(in_ready), 1);
        check("no output while filling", int'(out_valid), 0);
        @(negedge clk);
      end
      in_valid = 0;
      for (int i = 0; i < N; i++) begin
        check("out_valid", int'(out_valid), 1);
        check("in_ready low", int'(in_ready), 0);
        check("sys", int'(sys), int'(u[i]));
        check("par1", int'(par1), int'(p1[i]));
        check("par2", int'(par2), int'(p2[i]));
        check("out_last", int'(out_last), int'(i == N - 1));
        @(negedge clk);
      end
      check("frame ended", int'(out_valid), 0);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
