// tb_acs_unit: self-checking test of the ACS unit.
//
// Drives the five operation codes of the ACS operation table with random and
// corner operands and compares r and C0..C2 with an arithmetic model of the
// table (not of the gates). Then runs complete four-step max* operations, routing
// the operands as the processor does, and compares with
//   max(p,q) + 0.75 / 0.5 / 0.25 / 0 for |p-q| = 0, <= 0.75, <= 2, > 2.
// Also replays the vector p=0001001, q=0000101, O=101100 -> r=0000100, C0=0.
module tb_acs_unit;
  import acs_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n;
  opcode_t op;
  llr_t    p, q, r;
  logic [2:0] c;
  int checks = 0, failures = 0;

  acs_unit dut (.clk, .rst_n, .op, .p, .q, .r, .c);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic llr_t wrap(int v);
    return llr_t'(v);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (op=%b p=%0d q=%0d)", what, got, exp, op, p, q);
    end
  endtask

  // apply one operation, check r before the edge, flags after it
  task automatic do_op(opcode_t o, llr_t a, llr_t b, output llr_t res);
    logic [2:0] c_before, c_exp;
    int d;
    llr_t rexp;
    op = o; p = a; q = b;
    #1;
    c_before = c;
    c_exp    = c;
    unique case (o)
      OP_ADD: rexp = wrap(int'(a) + int'(b));
      OP_SUB: rexp = wrap(int'(a) - int'(b));
      OP_MS1: begin
        d = int'(wrap(int'(a) - int'(b)));
        if (d >= 0) begin rexp = llr_t'(d);        c_exp[0] = 1'b0; end
        else        begin rexp = wrap(-d - 1);     c_exp[0] = 1'b1; end
      end
      OP_MS2, OP_MS3: begin
        rexp = wrap(int'(a) - int'(b) - int'(c_before[0]));
        if (o == OP_MS2) c_exp[1] = rexp[W-1];
        else             c_exp[2] = rexp[W-1];
      end
      default: rexp = r;
    endcase
    check("r", int'(r), int'(rexp));
    res = r;
    @(posedge clk); #1;
    check("flags", int'(c), int'(c_exp));
  endtask

  function automatic int lut_maxstar(int a, int b);
    int m, ad;
    m  = (a > b) ? a : b;
    ad = (a > b) ? a - b : b - a;
    if (ad == 0)      return m + 3;
    else if (ad <= 3) return m + 2;
    else if (ad <= 8) return m + 1;
    else              return m;
  endfunction

  initial begin
    llr_t res, r1;
    opcode_t ops [5];
    ops = '{OP_ADD, OP_SUB, OP_MS1, OP_MS2, OP_MS3};
    op = OP_ADD; p = '0; q = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset flags", int'(c), 0);

    // published waveform vector
    do_op(OP_MS1, 7'b0001001, 7'b0000101, res);
    check("fig vector r", int'(res), int'(7'b0000100));
    check("fig vector C0", int'(c[0]), 0);

    // random single operations
    for (int i = 0; i < 2000; i++) begin
      do_op(ops[$urandom_range(0, 4)], llr_t'($urandom), llr_t'($urandom), res);
    end

    // full max* on operands whose difference stays in range
    for (int i = 0; i < 1500; i++) begin
      int a, b;
      a = $urandom_range(0, 60) - 32;
      b = a + $urandom_range(0, 24) - 12;
      if (b < -64) b = -64;
      if (b > 63)  b = 63;
      a = a / 2; b = b / 2;   // keep max + 0.75 inside Q5.2
      do_op(OP_MS1, llr_t'(a), llr_t'(b), r1);
      do_op(OP_MS2, K_0P75, r1, res);
      do_op(OP_MS3, c[1] ? K_TWO : K_ZERO, r1, res);
      begin
        llr_t corr;
        unique case ({c[1], c[2]})
          2'b00: corr = K_0P75;
          2'b01: corr = K_0P50;
          2'b10: corr = K_0P25;
          default: corr = K_ZERO;
        endcase
        do_op(OP_ADD, c[0] ? llr_t'(b) : llr_t'(a), corr, res);
      end
      check("max*", int'(res), lut_maxstar(a, b));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
