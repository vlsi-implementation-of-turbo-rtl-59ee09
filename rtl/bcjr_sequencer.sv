// bcjr_sequencer: runs one LUT-Log-BCJR component decoder on the ACS processor.
//
// The component decoder has no arithmetic of its own: it is a command program
// for the four-lane processor, one lane per trellis state. For one frame of N
// steps it issues, in order:
//   INIT  alpha_0 = {0, NEG, NEG, NEG}, beta_N = {0, 0, 0, 0}
//   YH    yh[k]  = La[k] + Ls[k]          uncoded-bit input (a-priori + systematic)
//   G     g00[k] = yh[k] + Lp[k]          branch metric of a (y=0, c=0) branch
//   FWD   per step k, per state S:        alpha_{k+1}(S) = max*(alpha_k(fr) + gamma) over
//                                         the two branches into S (2 adds, 1 max*)
//   BWD   per step k = N-1 .. 0:          delta of the 8 branches (6 adds), two max*
//                                         levels per bit value, the extrinsic LLR
//                                         ext[k] = max*_{y=0} - max*_{y=1} (1 sub),
//                                         clipped to +-CLIP (1 min, 1 max), the
//                                         posterior yh[k] + ext (1 add) and
//                                         beta_k(S) = max*(gamma + beta_{k+1}) (1 max*)
// The branch metric of a branch with uncoded bit y and coded bit c is
// (1-y)*yh + (1-c)*Lp, so only yh, Lp, g00 and a zero word are ever needed; the
// delta of a branch leaves out the yh term, so the result is extrinsic. This
// follows the published recursions; the command order, the memory map, the
// start values and the extrinsic clipping are this design's choices. The clip
// is needed because the 7-bit words wrap: the max* of the delta terms is only
// right while the spread of alpha + beta stays below 16, which unbounded
// extrinsic LLRs would break after a few iterations.
//
// half = 0 runs decoder 1 (natural order, parity 1); half = 1 runs decoder 2,
// which reads the systematic and a-priori words and writes its extrinsic and
// posterior words at pi(k): interleaving and deinterleaving are done by address.
// Interface: start (pulse, while idle) -> commands on cmd_valid/cmd_ready ->
// fin pulses when the last command's results are written (proc_done).
module bcjr_sequencer
  import acs_pkg::*;
  import turbo_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 8,
  localparam int unsigned N   = ROWS * COLS,
  // memory map (word addresses)
  localparam int unsigned A_LS    = 0,
  localparam int unsigned A_LP1   = N,
  localparam int unsigned A_LP2   = 2 * N,
  localparam int unsigned A_EXT   = 3 * N,
  localparam int unsigned A_YH    = 4 * N,
  localparam int unsigned A_G00   = 5 * N,
  localparam int unsigned A_POST  = 6 * N,
  localparam int unsigned A_ALPHA = 7 * N,
  localparam int unsigned A_BETA  = scratch_base(N) + OFS_BETA,
  localparam int unsigned A_T0    = scratch_base(N) + OFS_T0,
  localparam int unsigned A_T1    = scratch_base(N) + OFS_T1,
  localparam int unsigned A_A0    = scratch_base(N) + OFS_A0,
  localparam int unsigned A_A1    = scratch_base(N) + OFS_A1,
  localparam int unsigned A_D0    = scratch_base(N) + OFS_D0,
  localparam int unsigned A_D1    = scratch_base(N) + OFS_D1,
  localparam int unsigned A_M1    = scratch_base(N) + OFS_M1,
  localparam int unsigned A_M2    = scratch_base(N) + OFS_M2,
  localparam int unsigned A_ZERO  = scratch_base(N) + OFS_ZERO,
  localparam int unsigned A_NEG   = scratch_base(N) + OFS_NEG,
  localparam int unsigned A_E     = scratch_base(N) + OFS_E,
  localparam int unsigned A_CLP   = scratch_base(N) + OFS_CLP,
  localparam int unsigned A_CLN   = scratch_base(N) + OFS_CLN,
  localparam int unsigned A_END   = scratch_base(N) + SCRATCH_WORDS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic half,
  output logic busy,
  output logic fin,
  output logic cmd_valid,
  input  logic cmd_ready,
  output cmd_t cmd,
  input  logic proc_done
);

  localparam int unsigned KW = $clog2(N + 1);

  typedef enum logic [2:0] {
    PH_IDLE, PH_INIT, PH_YH, PH_G, PH_FWD, PH_BWD, PH_WAIT
  } phase_e;

  phase_e        phase_q;
  logic          half_q;
  logic [KW-1:0] k_q;      // step (or group of four steps in YH and G)
  logic [3:0]    sub_q;    // command within the step
  logic          last_cmd;
  logic          accept;

  // ---- addresses ---------------------------------------------------------

  function automatic addr_t ad(int unsigned a);
    return addr_t'(a);
  endfunction

  // word holding position k of a frame stored in natural order, seen by this half
  function automatic int unsigned nat_pos(logic h, int unsigned k);
    return h ? il_perm(k, ROWS, COLS) : k;
  endfunction

  function automatic int unsigned lp_addr(logic h, int unsigned k);
    return (h ? A_LP2 : A_LP1) + k;
  endfunction

  // gamma of a branch with uncoded bit y and coded bit c at step k
  function automatic int unsigned gam_addr(logic h, int unsigned k, logic y, logic c);
    unique case ({y, c})
      2'b00:   return A_G00 + k;
      2'b01:   return A_YH + k;
      2'b10:   return lp_addr(h, k);
      default: return A_ZERO;
    endcase
  endfunction

  // ---- command generation --------------------------------------------------

  always_comb begin
    int unsigned k, kk;
    logic       j, y, c;
    logic [1:0] f, t;
    k  = int'(k_q);
    kk = 0;
    j  = 1'b0;
    y  = 1'b0;
    c  = 1'b0;
    f  = 2'd0;
    t  = 2'd0;
    cmd = '0;
    cmd.op = CMD_ADD;
    cmd.lane_en = 4'b1111;
    last_cmd = 1'b0;
    unique case (phase_q)
      PH_INIT: begin
        for (int s = 0; s < 4; s++) begin
          if (sub_q == 4'd0) begin
            cmd.pa[s] = ad((s == 0) ? A_ZERO : A_NEG);
            cmd.qa[s] = ad(A_ZERO);
            cmd.da[s] = ad(A_ALPHA + s);
          end else begin
            cmd.pa[s] = ad(A_ZERO);
            cmd.qa[s] = ad(A_ZERO);
            cmd.da[s] = ad(A_BETA + s);
          end
        end
      end
      PH_YH, PH_G: begin
        for (int l = 0; l < 4; l++) begin
          kk = 4 * k + l;
          if (phase_q == PH_YH) begin
            cmd.pa[l] = ad(A_LS + nat_pos(half_q, kk));
            cmd.qa[l] = ad(A_EXT + nat_pos(half_q, kk));
            cmd.da[l] = ad(A_YH + kk);
          end else begin
            cmd.pa[l] = ad(A_YH + kk);
            cmd.qa[l] = ad(lp_addr(half_q, kk));
            cmd.da[l] = ad(A_G00 + kk);
          end
        end
      end
      PH_FWD: begin
        for (int s = 0; s < 4; s++) begin
          j = sub_q[0];
          f = pred_state(2'(s), j);
          y = pred_input(2'(s), j);
          if (sub_q != 4'd2) begin
            cmd.pa[s] = ad(A_ALPHA + 4 * k + int'(f));
            cmd.qa[s] = ad(gam_addr(half_q, k, y, parity_bit(f, y)));
            cmd.da[s] = ad((j ? A_T1 : A_T0) + s);
          end else begin
            cmd.op    = CMD_MAXSTAR;
            cmd.pa[s] = ad(A_T0 + s);
            cmd.qa[s] = ad(A_T1 + s);
            cmd.da[s] = ad(A_ALPHA + 4 * (k + 1) + s);
          end
        end
      end
      PH_BWD: begin
        for (int s = 0; s < 4; s++) begin
          y = sub_q[0];                      // branch y = 0 or 1 for subs 0..5
          c = parity_bit(2'(s), y);
          t = next_state(2'(s), y);
          unique case (sub_q)
            4'd0, 4'd1: begin                // gamma + beta_{k+1}
              cmd.pa[s] = ad(gam_addr(half_q, k, y, c));
              cmd.qa[s] = ad(A_BETA + int'(t));
              cmd.da[s] = ad((y ? A_T1 : A_T0) + s);
            end
            4'd2, 4'd3: begin                // alpha_k + gamma_c
              cmd.pa[s] = ad(A_ALPHA + 4 * k + s);
              cmd.qa[s] = ad(c ? A_ZERO : lp_addr(half_q, k));
              cmd.da[s] = ad((y ? A_A1 : A_A0) + s);
            end
            4'd4, 4'd5: begin                // delta = (alpha + gamma_c) + beta_{k+1}
              cmd.pa[s] = ad((y ? A_A1 : A_A0) + s);
              cmd.qa[s] = ad(A_BETA + int'(t));
              cmd.da[s] = ad((y ? A_D1 : A_D0) + s);
            end
            4'd6: begin                      // first max* level, two per bit value
              cmd.op    = CMD_MAXSTAR;
              cmd.pa[s] = ad(((s < 2) ? A_D0 : A_D1) + 2 * (s % 2));
              cmd.qa[s] = ad(((s < 2) ? A_D0 : A_D1) + 2 * (s % 2) + 1);
              cmd.da[s] = ad(A_M1 + s);
            end
            4'd7: begin                      // second level: lane 0 y=0, lane 1 y=1
              cmd.op      = CMD_MAXSTAR;
              cmd.lane_en = 4'b0011;
              cmd.pa[s]   = ad(A_M1 + 2 * (s % 2));
              cmd.qa[s]   = ad(A_M1 + 2 * (s % 2) + 1);
              cmd.da[s]   = ad(A_M2 + (s % 2));
            end
            4'd8: begin                      // extrinsic LLR
              cmd.op      = CMD_SUB;
              cmd.lane_en = 4'b0001;
              cmd.pa[s]   = ad(A_M2);
              cmd.qa[s]   = ad(A_M2 + 1);
              cmd.da[s]   = ad(A_E);
            end
            4'd9: begin                      // clip from above
              cmd.op      = CMD_MIN;
              cmd.lane_en = 4'b0001;
              cmd.pa[s]   = ad(A_E);
              cmd.qa[s]   = ad(A_CLP);
              cmd.da[s]   = ad(A_E);
            end
            4'd10: begin                     // clip from below
              cmd.op      = CMD_MAX;
              cmd.lane_en = 4'b0001;
              cmd.pa[s]   = ad(A_E);
              cmd.qa[s]   = ad(A_CLN);
              cmd.da[s]   = ad(A_EXT + nat_pos(half_q, k));
            end
            4'd11: begin                      // posterior LLR for the decision
              cmd.lane_en = 4'b0001;
              cmd.pa[s]   = ad(A_YH + k);
              cmd.qa[s]   = ad(A_EXT + nat_pos(half_q, k));
              cmd.da[s]   = ad(A_POST + nat_pos(half_q, k));
            end
            default: begin                   // beta_k
              cmd.op    = CMD_MAXSTAR;
              cmd.pa[s] = ad(A_T0 + s);
              cmd.qa[s] = ad(A_T1 + s);
              cmd.da[s] = ad(A_BETA + s);
            end
          endcase
        end
        last_cmd = (k_q == '0) && (sub_q == 4'd12);
      end
      default: ;
    endcase
  end

  assign cmd_valid = (phase_q inside {PH_INIT, PH_YH, PH_G, PH_FWD, PH_BWD});
  assign accept    = cmd_valid && cmd_ready;
  assign busy      = (phase_q != PH_IDLE);

  // ---- program counter -------------------------------------------------------

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q <= PH_IDLE;
      half_q  <= 1'b0;
      k_q     <= '0;
      sub_q   <= '0;
      fin     <= 1'b0;
    end else begin
      fin <= 1'b0;
      unique case (phase_q)
        PH_IDLE: if (start) begin
          phase_q <= PH_INIT;
          half_q  <= half;
          k_q     <= '0;
          sub_q   <= '0;
        end
        PH_INIT: if (accept) begin
          if (sub_q == 4'd1) begin phase_q <= PH_YH; sub_q <= '0; end
          else sub_q <= sub_q + 1'b1;
        end
        PH_YH, PH_G: if (accept) begin
          if (k_q == KW'(N / 4 - 1)) begin
            k_q     <= '0;
            phase_q <= (phase_q == PH_YH) ? PH_G : PH_FWD;
          end else begin
            k_q <= k_q + 1'b1;
          end
        end
        PH_FWD: if (accept) begin
          if (sub_q == 4'd2) begin
            sub_q <= '0;
            if (k_q == KW'(N - 1)) phase_q <= PH_BWD;  // k stays N-1
            else k_q <= k_q + 1'b1;
          end else begin
            sub_q <= sub_q + 1'b1;
          end
        end
        PH_BWD: if (accept) begin
          if (last_cmd) begin
            phase_q <= PH_WAIT;
          end else if (sub_q == 4'd12) begin
            sub_q <= '0;
            k_q   <= k_q - 1'b1;
          end else begin
            sub_q <= sub_q + 1'b1;
          end
        end
        PH_WAIT: if (proc_done) begin
          phase_q <= PH_IDLE;
          fin     <= 1'b1;
        end
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

  initial begin
    assert (A_END <= (1 << AW)) else $fatal(1, "memory map does not fit the main memory");
    assert (N % 4 == 0) else $fatal(1, "frame length must be a multiple of 4");
  end

endmodule
