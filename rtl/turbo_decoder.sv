// turbo_decoder: iterative turbo decoder on the four-lane ACS processor.
//
// The two component decoders of the classic turbo decoder take turns on one
// LUT-Log-BCJR processor. Decoder 1 works on the frame in natural order with
// parity 1; decoder 2 works in interleaved order with parity 2, reading the
// extrinsic LLRs of decoder 1 as a-priori information and writing its own back
// de-interleaved, so the exchange between them needs no separate buffers. One
// iteration is decoder 1 followed by decoder 2; after ITER iterations the
// decision stage streams out the decoded bits.
//
// Operation: while idle the host writes the channel LLRs (Q5.2) with ld_we,
// ld_sel (0 systematic, 1 parity 1, 2 parity 2) and ld_idx (bit position k in
// the order the encoder produced it); they saturate at +-CH_CLAMP on the way
// in. start clears the extrinsic words (no a-priori information in the first
// pass) and writes the constant words (0, NEG_INIT, +-EXT_CLIP), then
// runs the iterations; busy stays high until the last decoded bit has been sent
// on dec_valid / dec_bit / dec_last, and done pulses with it. mem_out_* reads
// any memory word while idle. The iterative structure, the use of the ACS
// processor and the about-8 iterations follow the published design; the
// shared processor, the in-memory interleaving, the start value NEG_INIT of the
// non-zero states, the LLR saturation and clipping levels and the host
// interface are this design's choices. The two levels keep every metric
// difference inside the 7-bit range, without which the wrapping arithmetic of
// the ACS units gives wrong max* decisions.
module turbo_decoder
  import acs_pkg::*;
  import turbo_pkg::*;
#(
  parameter int unsigned ROWS     = 4,
  parameter int unsigned COLS     = 8,
  parameter int unsigned ITER     = 8,
  parameter int          NEG_INIT = -24,          // -6.0 in Q5.2
  parameter int          CH_CLAMP = 8,            // channel LLRs saturate at +-2.0
  parameter int          EXT_CLIP = 6,            // extrinsic LLRs clip at +-1.5
  localparam int unsigned N       = ROWS * COLS,
  localparam int unsigned IW      = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // channel LLR load
  input  logic          ld_we,
  input  logic [1:0]    ld_sel,
  input  logic [IW-1:0] ld_idx,
  input  llr_t          ld_data,
  // control
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [7:0]    iter,
  // decoded bits
  output logic          dec_valid,
  output logic          dec_bit,
  output logic          dec_last,
  // inspection and constants
  input  addr_t         mem_out_addr,
  output llr_t          mem_out_data,
  input  logic          reg_in_we,
  input  kidx_e         reg_in_sel,
  input  llr_t          reg_in_data,
  input  kidx_e         reg_out_sel,
  output llr_t          reg_out_data
);

  localparam int unsigned A_EXT  = 3 * N;
  localparam int unsigned A_POST = 6 * N;
  localparam int unsigned A_ZERO = scratch_base(N) + OFS_ZERO;
  localparam int unsigned A_NEG  = scratch_base(N) + OFS_NEG;
  localparam int unsigned A_CLP  = scratch_base(N) + OFS_CLP;
  localparam int unsigned A_CLN  = scratch_base(N) + OFS_CLN;

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_RUN, S_WAIT, S_DEC} state_e;

  state_e        st_q;
  logic [IW+1:0] clr_q;
  logic          half_q;
  logic [7:0]    iter_q;
  logic          seq_start_q, seq_busy, seq_fin;
  logic          cmd_valid, cmd_ready, proc_done;
  cmd_t          cmd;
  logic          dec_start_q, dec_busy;
  addr_t         dec_addr, p_mem_out_addr;
  llr_t          p_mem_out_data;
  logic          mem_in_we;
  addr_t         mem_in_addr;
  llr_t          mem_in_data;

  // ---- LLR memory write port: host load while idle, clearing at start ----
  always_comb begin
    mem_in_we   = 1'b0;
    mem_in_addr = '0;
    mem_in_data = '0;
    if (st_q == S_IDLE) begin
      mem_in_we   = ld_we && (ld_sel != 2'd3);
      mem_in_addr = addr_t'(int'(ld_sel) * N + int'(ld_idx));
      if (int'(ld_data) > CH_CLAMP)       mem_in_data = llr_t'(CH_CLAMP);
      else if (int'(ld_data) < -CH_CLAMP) mem_in_data = llr_t'(-CH_CLAMP);
      else                                mem_in_data = ld_data;
    end else if (st_q == S_CLR) begin
      mem_in_we = 1'b1;
      if (int'(clr_q) < N) begin
        mem_in_addr = addr_t'(A_EXT + int'(clr_q));
      end else if (int'(clr_q) == N) begin
        mem_in_addr = addr_t'(A_ZERO);
      end else if (int'(clr_q) == N + 1) begin
        mem_in_addr = addr_t'(A_NEG);
        mem_in_data = llr_t'(NEG_INIT);
      end else if (int'(clr_q) == N + 2) begin
        mem_in_addr = addr_t'(A_CLP);
        mem_in_data = llr_t'(EXT_CLIP);
      end else begin
        mem_in_addr = addr_t'(A_CLN);
        mem_in_data = llr_t'(-EXT_CLIP);
      end
    end
  end

  // ---- iteration control ---------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q        <= S_IDLE;
      clr_q       <= '0;
      half_q      <= 1'b0;
      iter_q      <= '0;
      seq_start_q <= 1'b0;
      dec_start_q <= 1'b0;
      done        <= 1'b0;
    end else begin
      seq_start_q <= 1'b0;
      dec_start_q <= 1'b0;
      done        <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          st_q   <= S_CLR;
          clr_q  <= '0;
          iter_q <= '0;
        end
        S_CLR: begin
          clr_q <= clr_q + 1'b1;
          if (int'(clr_q) == N + 3) begin
            st_q        <= S_RUN;
            half_q      <= 1'b0;
            seq_start_q <= 1'b1;
          end
        end
        S_RUN: if (seq_fin) begin
          if (!half_q) begin
            half_q      <= 1'b1;
            seq_start_q <= 1'b1;
          end else if (iter_q == 8'(ITER - 1)) begin
            iter_q      <= iter_q + 1'b1;
            st_q        <= S_DEC;
            dec_start_q <= 1'b1;
          end else begin
            iter_q      <= iter_q + 1'b1;
            half_q      <= 1'b0;
            seq_start_q <= 1'b1;
          end
        end
        S_DEC: if (dec_last) begin
          st_q <= S_IDLE;
          done <= 1'b1;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (st_q != S_IDLE);
  assign iter = iter_q;

  // ---- component decoder program and processor ----------------------------
  bcjr_sequencer #(.ROWS(ROWS), .COLS(COLS)) u_seq (
    .clk, .rst_n,
    .start     (seq_start_q),
    .half      (half_q),
    .busy      (seq_busy),
    .fin       (seq_fin),
    .cmd_valid, .cmd_ready, .cmd,
    .proc_done (proc_done)
  );

  lut_log_bcjr_processor u_proc (
    .clk, .rst_n,
    .mem_in_we, .mem_in_addr, .mem_in_data,
    .mem_out_addr (p_mem_out_addr),
    .mem_out_data (p_mem_out_data),
    .reg_in_we, .reg_in_sel, .reg_in_data,
    .reg_out_sel, .reg_out_data,
    .cmd_valid, .cmd_ready, .cmd,
    .done      (proc_done),
    .acs_op    (),
    .max_out   (),
    .c_out     ()
  );

  decision_stage #(.N(N), .BASE(A_POST)) u_dec (
    .clk, .rst_n,
    .start     (dec_start_q),
    .busy      (dec_busy),
    .rd_addr   (dec_addr),
    .rd_data   (p_mem_out_data),
    .out_valid (dec_valid),
    .out_bit   (dec_bit),
    .out_last  (dec_last)
  );

  assign p_mem_out_addr = dec_busy ? dec_addr : mem_out_addr;
  assign mem_out_data   = p_mem_out_data;

  a_load_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    ld_we |-> (st_q == S_IDLE));
  a_seq_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n)
    seq_start_q |-> !seq_busy);

endmodule
