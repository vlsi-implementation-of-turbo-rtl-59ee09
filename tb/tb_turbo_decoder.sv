// tb_turbo_decoder: self-checking end-to-end test of the iterative turbo decoder.
//
// For each frame: random bits are encoded by a software rate-1/3 turbo encoder
// ((7,5) RSC codes, row-column interleaver), sent over a BPSK channel with
// Gaussian noise, turned into Q5.2 LLRs 2y/sigma^2 (rounded, clamped to +-3.75)
// and loaded into the decoder, which saturates them at +-2.0. After the run the testbench compares
//  * every extrinsic and posterior word in the decoder memory and every decoded
//    bit with a bit-exact software model of the LUT-Log-BCJR turbo decoder
//    (7-bit wrapping arithmetic, the same max* look-up table, start values and
//    extrinsic clipping),
//  * the decoded bits with the transmitted bits: no error allowed at low noise,
//    and at higher noise no more errors than a hard decision on the channel,
//  * the run time, against the count of processor commands of the schedule.
module tb_turbo_decoder;
  import acs_pkg::*;
  import turbo_pkg::*;

  localparam int ROWS = 4, COLS = 8, N = ROWS * COLS, IW = $clog2(N);
  localparam int ITER = 8, NEG = -24, CLAMP = 8, CLIP = 6;
  localparam int A_EXT = 3 * N, A_POST = 6 * N;

  logic clk = 1'b0, rst_n;
  logic ld_we; logic [1:0] ld_sel; logic [IW-1:0] ld_idx; llr_t ld_data;
  logic start, busy, done; logic [7:0] iter;
  logic dec_valid, dec_bit, dec_last;
  addr_t mem_out_addr; llr_t mem_out_data;
  logic reg_in_we; kidx_e reg_in_sel, reg_out_sel; llr_t reg_in_data, reg_out_data;
  int checks = 0, failures = 0;

  turbo_decoder #(.ROWS(ROWS), .COLS(COLS), .ITER(ITER), .NEG_INIT(NEG), .CH_CLAMP(CLAMP), .EXT_CLIP(CLIP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
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

  // ---------------- software model ----------------
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

  int m_ls [N], m_lp [2][N], m_ext [N], m_post [N];

  function automatic void model_half(int h);
    int yh [N], lp [N], g [N];
    int alpha [N+1][4], beta [4], u [2][4], d [2][4], m1 [4], m2 [2];
    for (int k = 0; k < N; k++) begin
      int pos;
      pos   = (h != 0) ? perm(k) : k;
      lp[k] = m_lp[h][k];
      yh[k] = wrap(m_ls[pos] + m_ext[pos]);
      g[k]  = wrap(yh[k] + lp[k]);
    end
    alpha[0] = '{0, wrap(NEG), wrap(NEG), wrap(NEG)};
    for (int k = 0; k < N; k++) begin
      for (int s = 0; s < 4; s++) begin
        int cand [2];
        for (int j = 0; j < 2; j++) begin
          int f, y, c, gm;
          f = j * 2 + (s >> 1);               // previous state {j, s1'}
          y = (s & 1) ^ (s >> 1) ^ j;
          c = y ^ (f & 1);
          gm = (y == 0) ? ((c == 0) ? g[k] : yh[k]) : ((c == 0) ? lp[k] : 0);
          cand[j] = wrap(alpha[k][f] + gm);
        end
        alpha[k+1][s] = maxstar(cand[0], cand[1]);
      end
    end
    beta = '{0, 0, 0, 0};
    for (int k = N - 1; k >= 0; k--) begin
      int pos, ext;
      pos = (h != 0) ? perm(k) : k;
      for (int s = 0; s < 4; s++) begin
        for (int y = 0; y < 2; y++) begin
          int c, t, gm;
          c  = y ^ (s & 1);
          t  = ((s & 1) << 1) | (y ^ (s & 1) ^ (s >> 1));
          gm = (y == 0) ? ((c == 0) ? g[k] : yh[k]) : ((c == 0) ? lp[k] : 0);
          u[y][s] = wrap(gm + beta[t]);
          d[y][s] = wrap(wrap(alpha[k][s] + ((c == 0) ? lp[k] : 0)) + beta[t]);
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
      for (int s = 0; s < 4; s++) beta[s] = maxstar(u[0][s], u[1][s]);
    end
  endfunction

  // ---------------- channel ----------------
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(0, 999999)) + 1.0) / 1000001.0;
    u2 = real'($urandom_range(0, 999999)) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic int to_llr(real y, real sigma);
    real l;
    int q;
    l = 2.0 * y / (sigma * sigma) * 4.0;     // Q5.2
    q = (l >= 0.0) ? int'(l + 0.5) : -int'(-l + 0.5);
    if (q > 15)  q = 15;
    if (q < -15) q = -15;
    return q;
  endfunction

  int cycles_expected;
  int ld_ls [N], ld_lp [2][N];

  function automatic int sat(int x);
    return (x > CLAMP) ? CLAMP : (x < -CLAMP) ? -CLAMP : x;
  endfunction

  task automatic run_frame(real sigma, output int dec_err, output int hard_err);
    logic u [N], ui [N], p [2][N];
    logic s1, s2, a;
    int cyc, nbits;
    logic got [N];
    for (int i = 0; i < N; i++) u[i] = 1'($urandom_range(0, 1));
    for (int i = 0; i < N; i++) ui[i] = u[perm(i)];
    for (int e = 0; e < 2; e++) begin
      s1 = 0; s2 = 0;
      for (int i = 0; i < N; i++) begin
        a = ((e != 0) ? ui[i] : u[i]) ^ s1 ^ s2;
        p[e][i] = a ^ s2;
        s2 = s1; s1 = a;
      end
    end
    hard_err = 0;
    for (int i = 0; i < N; i++) begin
      m_ls[i]    = to_llr((u[i] ? -1.0 : 1.0) + sigma * gauss(), sigma);
      m_lp[0][i] = to_llr((p[0][i] ? -1.0 : 1.0) + sigma * gauss(), sigma);
      m_lp[1][i] = to_llr((p[1][i] ? -1.0 : 1.0) + sigma * gauss(), sigma);
      m_ext[i]   = 0;
      ld_ls[i]   = m_ls[i];
      ld_lp[0][i] = m_lp[0][i];
      ld_lp[1][i] = m_lp[1][i];
      m_ls[i]    = sat(m_ls[i]);
      m_lp[0][i] = sat(m_lp[0][i]);
      m_lp[1][i] = sat(m_lp[1][i]);
      if ((m_ls[i] < 0) != u[i]) hard_err++;
    end
    // load
    for (int sel = 0; sel < 3; sel++) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        ld_we = 1; ld_sel = 2'(sel); ld_idx = IW'(i);
        ld_data = llr_t'((sel == 0) ? ld_ls[i] : ld_lp[sel-1][i]);
      end
    end
    @(negedge clk);
    ld_we = 0;
    for (int it = 0; it < ITER; it++) begin
      model_half(0);
      model_half(1);
    end
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1; nbits = 0;
    while (!done) begin
      if (dec_valid) begin
        got[nbits] = dec_bit;
        check("decision vs model", int'(dec_bit), int'(m_post[nbits] < 0));
        check("dec_last", int'(dec_last), int'(nbits == N - 1));
        nbits++;
      end
      @(negedge clk);
      cyc++;
    end
    check("bits delivered", nbits, N);
    check("iterations", int'(iter), ITER);
    // the schedule: per half 2+10.5N adds/subs at 3 cycles, 2N max/min at 4,
    // 4N max* at 6
    checks++;
    if (cyc < cycles_expected || cyc > cycles_expected + 20 * ITER + N + 8) begin
      failures++;
      $display("FAIL cycles %0d, schedule needs %0d", cyc, cycles_expected);
    end
    dec_err = 0;
    for (int i = 0; i < N; i++) if (got[i] != u[i]) dec_err++;
    for (int i = 0; i < N; i++) begin
      mem_out_addr = addr_t'(A_EXT + i);
      #1 check("extrinsic", int'(mem_out_data), m_ext[i]);
      mem_out_addr = addr_t'(A_POST + i);
      #1 check("posterior", int'(mem_out_data), m_post[i]);
    end
  endtask

  initial begin
    int de, he, tot_de, tot_he;
    rst_n = 0; ld_we = 0; ld_sel = '0; ld_idx = '0; ld_data = '0; start = 0;
    mem_out_addr = '0; reg_in_we = 0; reg_in_sel = KI_CMP1; reg_out_sel = KI_CMP1; reg_in_data = '0;
    cycles_expected = 2 * ITER * (3 * (2 + N / 2 + 2 * N + 8 * N) + 4 * (2 * N) + 6 * (4 * N)) + N;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // low noise: every frame must decode without error
    tot_de = 0;
    for (int f = 0; f < 4; f++) begin
      run_frame(0.5, de, he);
      tot_de += de;
    end
    check("errors at sigma 0.5", tot_de, 0);
    // higher noise: iterative decoding must beat a hard decision
    tot_de = 0; tot_he = 0;
    for (int f = 0; f < 6; f++) begin
      run_frame(0.9, de, he);
      tot_de += de; tot_he += he;
    end
    $display("sigma 0.9: %0d decoded bit errors, %0d hard-decision errors in %0d bits",
             tot_de, tot_he, 6 * N);
    check("decoder beats hard decision", int'(tot_de < tot_he), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
