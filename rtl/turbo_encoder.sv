// turbo_encoder: rate-1/3 parallel concatenated convolutional encoder.
//
// Two identical RSC encoders, the second fed through the interleaver, produce
// for every input bit a systematic bit and two parity bits. The frame is first
// collected into the interleaver (FILL: in_ready high, one bit per in_valid),
// then sent out at one code bit triple per clock (ENC: out_valid high for N
// consecutive cycles, out_last on the final one). Both RSC encoders start every
// frame in state 0 and are not terminated. The parallel concatenation follows
// the published encoder; the two-phase frame handling is this design's choice.
module turbo_encoder #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 8,
  localparam int unsigned N   = ROWS * COLS,
  localparam int unsigned IW  = $clog2(N)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  output logic out_last,
  output logic sys,
  output logic par1,
  output logic par2,
  output logic [1:0] state1,  // register contents of RSC encoder I
  output logic [1:0] state2   // register contents of RSC encoder II
);

  typedef enum logic {FILL = 1'b0, ENC = 1'b1} phase_e;

  phase_e        phase_q;
  logic [IW-1:0] idx_q;
  logic          nat_bit, perm_bit;
  logic [IW-1:0] perm_idx;
  logic          last;
  logic          clr_enc;

  assign last     = (idx_q == IW'(N - 1));
  assign in_ready = (phase_q == FILL);
  assign clr_enc  = (phase_q == FILL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q <= FILL;
      idx_q   <= '0;
    end else begin
      unique case (phase_q)
        FILL: if (in_valid) begin
          idx_q <= last ? '0 : idx_q + 1'b1;
          if (last) phase_q <= ENC;
        end
        ENC: begin
          idx_q <= last ? '0 : idx_q + 1'b1;
          if (last) phase_q <= FILL;
        end
        default: phase_q <= FILL;
      endcase
    end
  end

  interleaver #(.ROWS(ROWS), .COLS(COLS)) u_il (
    .clk,
    .wr_en   (in_valid && in_ready),
    .wr_addr (idx_q),
    .wr_bit  (in_bit),
    .rd_idx  (idx_q),
    .nat_bit, .perm_bit, .perm_idx
  );

  rsc_encoder u_enc1 (
    .clk, .rst_n, .clr (clr_enc), .en (phase_q == ENC),
    .x (nat_bit), .parity (par1), .state (state1)
  );

  rsc_encoder u_enc2 (
    .clk, .rst_n, .clr (clr_enc), .en (phase_q == ENC),
    .x (perm_bit), .parity (par2), .state (state2)
  );

  assign out_valid = (phase_q == ENC);
  assign out_last  = out_valid && last;
  assign sys       = nat_bit;

endmodule
