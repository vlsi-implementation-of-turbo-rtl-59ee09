// tb_turbo_wsn_top: end-to-end test of the turbo-coded link at default size.
//
// Each frame of random bits goes through the encoder of the top (its code word
// stream is checked against a software turbo encoder), over a BPSK channel with
// Gaussian noise, into the decoder of the top as Q5.2 LLRs, and back out as
// decoded bits. Frames at low noise must decode without error; frames at
// higher noise must have fewer errors than a hard decision on the channel.
// One frame runs with all max* corrections rewritten to 0 through 'reg in'
// (the processor then computes Max-Log-BCJR), and must still decode at low
// noise. The test counts how often each mechanism of the design occurred and
// fails if one never did: add, subtract, max*, max and min commands; each of
// the four max* look-up outcomes; input LLR saturation; extrinsic clipping;
// both component decoders; all iterations; the decision stream.
module tb_turbo_wsn_top;
  import acs_pkg::*;

  localparam int ROWS = 4, COLS = 8, N = ROWS * COLS, IW = $clog2(N), ITER = 8;
  localparam int A_EXT = 3 * N;

  logic clk = 1'b0, rst_n;
  logic enc_in_valid, enc_in_ready, enc_in_bit, enc_out_valid, enc_out_last;
  logic enc_sys, enc_par1, enc_par2;
  logic [1:0] enc_state1, enc_state2;
  logic ld_we; logic [1:0] ld_sel; logic [IW-1:0] ld_idx; llr_t ld_data;
  logic dec_start, dec_busy, dec_done, dec_valid, dec_bit, dec_last;
  logic [7:0] dec_iter;
  addr_t mem_out_addr; llr_t mem_out_data;
  logic reg_in_we; kidx_e reg_in_sel, reg_out_sel; llr_t reg_in_data, reg_out_data;
  int checks = 0, failures = 0;

  turbo_wsn_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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

  // ---------------- mechanism counters ----------------
  int n_cmd [5];
  int n_lut [4];
  int n_half [2];
  int n_sat, n_clip, n_bits;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_dec.u_proc.cmd_valid && dut.u_dec.u_proc.cmd_ready)
      n_cmd[int'(dut.u_dec.u_proc.cmd.op)]++;
    if (dut.u_dec.u_proc.step == ST_MS4 && dut.u_dec.u_proc.cur.lane_en[0])
      n_lut[{dut.u_dec.u_proc.g_lane[0].c[1], dut.u_dec.u_proc.g_lane[0].c[2]}]++;
    if (dut.u_dec.u_seq.start) n_half[int'(dut.u_dec.u_seq.half)]++;
  end

  // ---------------- channel ----------------
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(0, 999999)) + 1.0) / 1000001.0;
    u2 = real'($urandom_range(0, 999999)) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic int to_llr(logic b, real sigma);
    real l;
    int q;
    l = 2.0 * ((b ? -1.0 : 1.0) + sigma * gauss()) / (sigma * sigma) * 4.0;
    q = (l >= 0.0) ? int'(l + 0.5) : -int'(-l + 0.5);
    if (q > 15)  q = 15;
    if (q < -15) q = -15;
    return q;
  endfunction

  task automatic run_frame(real sigma, output int dec_err, output int hard_err);
    logic u [N], sys [N], p1 [N], p2 [N], ui [N], ep1 [N], ep2 [N];
    logic s1, s2, a;
    int llr [3][N];
    int nb;
    for (int i = 0; i < N; i++) u[i] = 1'($urandom_range(0, 1));
    // software reference encoder
    for (int i = 0; i < N; i++) ui[i] = u[(i % ROWS) * COLS + i / ROWS];
    s1 = 0; s2 = 0;
    for (int i = 0; i < N; i++) begin a = u[i] ^ s1 ^ s2; ep1[i] = a ^ s2; s2 = s1; s1 = a; end
    s1 = 0; s2 = 0;
    for (int i = 0; i < N; i++) begin a = ui[i] ^ s1 ^ s2; ep2[i] = a ^ s2; s2 = s1; s1 = a; end
    // encoder of the top
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      while (!enc_in_ready) @(negedge clk);
      enc_in_valid = 1; enc_in_bit = u[i];
    end
    @(negedge clk);
    enc_in_valid = 0;
    nb = 0;
    while (nb < N) begin
      if (enc_out_valid) begin
        sys[nb] = enc_sys; p1[nb] = enc_par1; p2[nb] = enc_par2;
        check("encoder last", int'(enc_out_last), int'(nb == N - 1));
        nb++;
      end
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) begin
      check("encoder sys", int'(sys[i]), int'(u[i]));
      check("encoder par1", int'(p1[i]), int'(ep1[i]));
      check("encoder par2", int'(p2[i]), int'(ep2[i]));
    end
    // channel and load
    hard_err = 0;
    for (int i = 0; i < N; i++) begin
      llr[0][i] = to_llr(sys[i], sigma);
      llr[1][i] = to_llr(p1[i], sigma);
      llr[2][i] = to_llr(p2[i], sigma);
      if ((llr[0][i] < 0) != u[i]) hard_err++;
    end
    for (int sel = 0; sel < 3; sel++) begin
      for (int i = 0; i < N; i++) begin
        ld_we = 1; ld_sel = 2'(sel); ld_idx = IW'(i); ld_data = llr_t'(llr[sel][i]);
        if (llr[sel][i] > 8 || llr[sel][i] < -8) n_sat++;
        @(negedge clk);
      end
    end
    ld_we = 0;
    // the saturated values are what the decoder holds
    for (int sel = 0; sel < 3; sel++) begin
      int i;
      i = $urandom_range(0, N - 1);
      mem_out_addr = addr_t'(sel * N + i);
      #1 check("saturated load", int'(mem_out_data),
               (llr[sel][i] > 8) ? 8 : (llr[sel][i] < -8) ? -8 : llr[sel][i]);
    end
    @(negedge clk);
    dec_start = 1;
    @(negedge clk);
    dec_start = 0;
    dec_err = 0; nb = 0;
    while (!dec_done) begin
      if (dec_valid) begin
        if (dec_bit != u[nb]) dec_err++;
        nb++; n_bits++;
      end
      @(negedge clk);
    end
    check("decoded bits", nb, N);
    check("iterations", int'(dec_iter), ITER);
    for (int i = 0; i < N; i++) begin
      mem_out_addr = addr_t'(A_EXT + i);
      #1;
      if (mem_out_data == 7'sd6 || mem_out_data == -7'sd6) n_clip++;
      checks++;
      if (mem_out_data > 7'sd6 || mem_out_data < -7'sd6) begin
        failures++;
        $display("FAIL extrinsic %0d outside the clip level", mem_out_data);
      end
    end
  endtask

  initial begin
    int de, he, tot_de, tot_he;
    rst_n = 0;
    enc_in_valid = 0; enc_in_bit = 0;
    ld_we = 0; ld_sel = '0; ld_idx = '0; ld_data = '0; dec_start = 0; mem_out_addr = '0;
    reg_in_we = 0; reg_in_sel = KI_CMP1; reg_in_data = '0; reg_out_sel = KI_CMP1;
    n_sat = 0; n_clip = 0; n_bits = 0;
    foreach (n_cmd[i]) n_cmd[i] = 0;
    foreach (n_lut[i]) n_lut[i] = 0;
    n_half = '{0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    tot_de = 0;
    for (int f = 0; f < 3; f++) begin
      run_frame(0.5, de, he);
      tot_de += de;
    end
    check("errors at sigma 0.5", tot_de, 0);
    tot_de = 0; tot_he = 0;
    for (int f = 0; f < 4; f++) begin
      run_frame(0.9, de, he);
      tot_de += de; tot_he += he;
    end
    $display("sigma 0.9: %0d decoded bit errors, %0d hard-decision errors in %0d bits",
             tot_de, tot_he, 4 * N);
    check("decoder beats hard decision", int'(tot_de < tot_he), 1);
    // Max-Log mode: all corrections 0
    for (int k = 3; k < 7; k++) begin
      @(negedge clk);
      reg_in_we = 1; reg_in_sel = kidx_e'(k); reg_in_data = '0;
    end
    @(negedge clk);
    reg_in_we = 0;
    reg_out_sel = KI_COR00;
    #1 check("reg out after reg in", int'(reg_out_data), 0);
    run_frame(0.5, de, he);
    check("max-log frame errors at sigma 0.5", de, 0);

    $display("commands: add %0d sub %0d max* %0d max %0d min %0d",
             n_cmd[0], n_cmd[1], n_cmd[2], n_cmd[3], n_cmd[4]);
    $display("max* corrections used: 0.75 %0d, 0.5 %0d, 0.25 %0d, 0 %0d",
             n_lut[0], n_lut[1], n_lut[2], n_lut[3]);
    $display("saturated inputs %0d, clipped extrinsics %0d, halves %0d/%0d, bits %0d",
             n_sat, n_clip, n_half[0], n_half[1], n_bits);
    foreach (n_cmd[i]) check("command kind used", int'(n_cmd[i] > 0), 1);
    foreach (n_lut[i]) check("max* table entry used", int'(n_lut[i] > 0), 1);
    check("input saturation happened", int'(n_sat > 0), 1);
    check("extrinsic clipping happened", int'(n_clip > 0), 1);
    check("decoder 1 runs", n_half[0], 8 * ITER);
    check("decoder 2 runs", n_half[1], 8 * ITER);
    check("decision stream", n_bits, 8 * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
