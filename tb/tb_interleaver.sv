// tb_interleaver: self-checking test of the row-column block interleaver.
//
// Writes random frames and reads every position, comparing nat_bit, perm_bit
// and perm_idx with pi(i) = (i mod ROWS)*COLS + i div ROWS computed here, and
// checks that pi is a permutation of 0..N-1.
module tb_interleaver;
  localparam int ROWS = 4, COLS = 8, N = ROWS * COLS, IW = $clog2(N);
  logic clk = 1'b0, wr_en, wr_bit, nat_bit, perm_bit;
  logic [IW-1:0] wr_addr, rd_idx, perm_idx;
  logic [N-1:0] frame, seen;
  int checks = 0, failures = 0;

  interleaver #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

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
    wr_en = 0; wr_bit = 0; wr_addr = '0; rd_idx = '0;
    for (int f = 0; f < 20; f++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        frame[i] = 1'($urandom_range(0, 1));
        wr_en = 1; wr_addr = IW'(i); wr_bit = frame[i];
        @(negedge clk);
      end
      wr_en = 0;
      seen = '0;
      for (int i = 0; i < N; i++) begin
        int pi;
        pi = (i % ROWS) * COLS + i / ROWS;
        rd_idx = IW'(i);
        #1;
        check("perm_idx", int'(perm_idx), pi);
        check("nat_bit", int'(nat_bit), int'(frame[i]));
        check("perm_bit", int'(perm_bit), int'(frame[pi]));
        seen[perm_idx] = 1'b1;
      end
      check("permutation", int'(&seen), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
