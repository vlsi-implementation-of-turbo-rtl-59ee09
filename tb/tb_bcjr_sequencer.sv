// tb_bcjr_sequencer: one component-decoder pass, checked word by word.
//
// Drives the command program of the sequencer into a four-lane ACS processor
// whose memory holds random systematic, parity and a-priori LLRs and the
// constant words. After a pass of decoder 1 (half 0) and of decoder 2 (half 1)
// it compares every forward metric alpha, every extrinsic and posterior word
// and the final backward metrics with a software LUT-Log-BCJR model using the
// same 7-bit wrapping arithmetic, and checks that the pass issues exactly the
// expected number of commands of each kind.
module tb_bcjr_sequencer;
  import acs_pkg::*;
  import turbo_pkg::*;

  localparam int ROWS = 4, COLS = 8, N = ROWS * COLS;
  localparam int NEG = -24, CLIP = 6;
  localparam int A_LS = 0, A_EXT = 3 * N, A_POST = 6 * N, A_ALPHA = 7 * N;
  localparam int SB = 11 * N + 4;

  logic clk = 1'b0, rst_n;
  logic start, half, busy, fin, cmd_valid, cmd_ready, proc_done;
  cmd_t cmd;
  logic mem_in_we; addr_t mem_in_addr, mem_out_addr; llr_t mem_in_data, mem_out_data;
  llr_t reg_out_data;
  int checks = 0, failures = 0;
  int n_op [5];

  bcjr_sequencer #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst_n, .start, .half, .busy, .fin, .cmd_valid, .cmd_ready, .cmd, .proc_done
  );

  lut_log_bcjr_processor u_proc (
    .clk, .rst_n, .mem_in_we, .mem_in_addr, .mem_in_data, .mem_out_addr, .mem_out_data,
    .reg_in_we (1'b0), .reg_in_sel (KI_CMP1), .reg_in_data ('0), .reg_out_sel (KI_CMP1),
    .reg_out_data, .cmd_valid, .cmd_ready, .cmd, .done (proc_done),
    .acs_op (), .max_out (), .c_out ()
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && cmd_valid && cmd_ready) n_op[int'(cmd.op)]++;

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

  function automatic int wrap(int x);
    return int'(llr_t'(x));
  endfunction

  function automatic int maxstar(int p, int q);
    int d, m, ad, c;
    d  = wrap(p - q);
    m  = (d >= 0) ? p : q;
    ad = (d >= 0) ? d : -d;
    if (ad == 0)      c = 3;
    else if (ad <= 3) c = 2;
    else if (ad <= 8) c = 1;
    else              c = 0;
    return wrap(m + c);
  endfunction

  function automatic int perm(int i);
    return (i % ROWS) * COLS + i / ROWS;
  endfunction

  int m_ls [N], m_lp [2][N], m_ext [N], m_post [N], m_alpha [N+1][4], m_beta [4];

  function automatic void model_half(int h);
    int yh [N], lp [N], g [N];
    int u [2][4], d [2][4], m1 [4], m2 [2];
    for (int k = 0; k < N; k++) begin
      int pos;
      pos   = (h != 0) ? perm(k) : k;
      lp[k] = m_lp[h][k];
      yh[k] = wrap(m_ls[pos] + m_ext[pos]);
      g[k]  = wrap(yh[k] + lp[k]);
    end
    m_alpha[0] = '{0, wrap(NEG), wrap(NEG), wrap(NEG)};
    for (int k = 0; k < N; k++) begin
      for (int s = 0; s < 4; s++) begin
        int cand [2];
        for (int j = 0; j < 2; j++) begin
          int f, y, c, gm;
          f = j * 2 + (s >> 1);
          y = (s & 1) ^ (s >> 1) ^ j;
          c = y ^ (f & 1);
          gm = (y == 0) ? ((c == 0) ? g[k] : yh[k]) : ((c == 0) ? lp[k] : 0);
          cand[j] = wrap(m_alpha[k][f] + gm);
        end
        m_alpha[k+1][s] = maxstar(cand[0], cand[1]);
      end
    end
    m_beta = '{0, 0, 0, 0};
    for (int k = N - 1; k >= 0; k--) begin
      int pos, ext;
      pos = (h != 0) ? perm(k) : k;
      for (int s = 0; s < 4; s++) begin
        for (int y = 0; y < 2; y++) begin
          int c, t, gm;
          c  = y ^ (s & 1);
          t  = ((s & 1) << 1) | (y ^ (s & 1) ^ (s >> 1));
          gm = (y == 0) ? ((c == 0) ? g[k] : yh[k]) : ((c == 0) ? lp[k] : 0);
          u[y][s] = wrap(gm + m_beta[t]);
          d[y][s] = wrap(wrap(m_alpha[k][s] + ((c == 0) ? lp[k] : 0)) + m_beta[t]);
        end
      end
      m1[0] = maxstar(d[0][0], d[0][1]);
      m1[1] = maxstar(d[0][2], d[0][3]);
      m1[2] = maxstar(d[1][0], d[1][1]);
      m1[3] = maxstar(d[1][2], d[1][3]);
      m2[0] = maxstar(m1[0], m1[1]);
      m2[1] = maxstar(m1[2], m1[3]);
      ext = wrap(m2[0] - m2[1]);
      if (ext > CLIP)  ext = CLIP;
      if (ext < -CLIP) ext = -CLIP;
      m_ext[pos]  = ext;
      m_post[pos] = wrap(yh[k] + ext);
      for (int s = 0; s < 4; s++) m_beta[s] = maxstar(u[0][s], u[1][s]);
    end
  endfunction

  task automatic write_word(int a, int v);
    @(negedge clk);
    mem_in_we = 1; mem_in_addr = addr_t'(a); mem_in_data = llr_t'(v);
    @(negedge clk);
    mem_in_we = 0;
  endtask

  task automatic read_check(string what, int a, int v);
    mem_out_addr = addr_t'(a);
    #1 check(what, int'(mem_out_data), v);
  endtask

  initial begin
    rst_n = 0; start = 0; half = 0; mem_in_we = 0; mem_in_addr = '0; mem_in_data = '0;
    mem_out_addr = '0;
    foreach (n_op[i]) n_op[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    write_word(SB + OFS_ZERO, 0);
    write_word(SB + OFS_NEG, NEG);
    write_word(SB + OFS_CLP, CLIP);
    write_word(SB + OFS_CLN, -CLIP);
    for (int i = 0; i < N; i++) begin
      m_ls[i] = $urandom_range(0, 16) - 8;    write_word(A_LS + i, m_ls[i]);
      m_lp[0][i] = $urandom_range(0, 16) - 8; write_word(N + i, m_lp[0][i]);
      m_lp[1][i] = $urandom_range(0, 16) - 8; write_word(2 * N + i, m_lp[1][i]);
      m_ext[i] = $urandom_range(0, 12) - 6;   write_word(A_EXT + i, m_ext[i]);
    end
    for (int h = 0; h < 2; h++) begin
      int cyc;
      foreach (n_op[i]) n_op[i] = 0;
      model_half(h);
      @(negedge clk);
      start = 1; half = h[0];
      @(negedge clk);
      start = 0;
      check("busy", int'(busy), 1);
      cyc = 0;
      while (!fin) begin @(negedge clk); cyc++; end
      @(negedge clk);
      check("idle after fin", int'(busy), 0);
      for (int i = 0; i < N; i++) begin
        read_check("extrinsic", A_EXT + i, m_ext[i]);
        read_check("posterior", A_POST + i, m_post[i]);
      end
      for (int k = 0; k <= N; k++)
        for (int s = 0; s < 4; s++) read_check("alpha", A_ALPHA + 4 * k + s, m_alpha[k][s]);
      for (int s = 0; s < 4; s++) read_check("beta_0", SB + OFS_BETA + s, m_beta[s]);
      check("add commands", n_op[0], 2 + N / 2 + 2 * N + 7 * N);
      check("sub commands", n_op[1], N);
      check("max* commands", n_op[2], 4 * N);
      check("max commands", n_op[3], N);
      check("min commands", n_op[4], N);
      $display("half %0d took %0d cycles", h, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
