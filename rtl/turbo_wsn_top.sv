// turbo_wsn_top: both ends of a turbo-coded sensor link.
//
// The transmitting sensor needs only the cheap rate-1/3 turbo encoder; the
// receiver carries the expensive part, an iterative turbo decoder whose
// LUT-Log-BCJR arithmetic runs entirely on four parallel add-compare-select
// units. The two halves meet only through the radio channel (modulation, noise
// and soft demodulation are outside this design), so they share nothing but
// clock and reset and each brings out its own ports: enc_* for the encoder,
// ld_* / start / dec_* and the inspection ports for the decoder. Both use the
// same frame length ROWS*COLS and interleaver. Timing is that of the two blocks:
// the encoder takes N cycles to fill and N to send, the decoder about
// 2*ITER*(63.5*N + 6) cycles per frame (32.6k for the defaults).
module turbo_wsn_top
  import acs_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 8,
  parameter int unsigned ITER = 8,
  localparam int unsigned N   = ROWS * COLS,
  localparam int unsigned IW  = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // turbo encoder
  input  logic          enc_in_valid,
  output logic          enc_in_ready,
  input  logic          enc_in_bit,
  output logic          enc_out_valid,
  output logic          enc_out_last,
  output logic          enc_sys,
  output logic          enc_par1,
  output logic          enc_par2,
  output logic [1:0]    enc_state1,
  output logic [1:0]    enc_state2,
  // turbo decoder
  input  logic          ld_we,
  input  logic [1:0]    ld_sel,
  input  logic [IW-1:0] ld_idx,
  input  llr_t          ld_data,
  input  logic          dec_start,
  output logic          dec_busy,
  output logic          dec_done,
  output logic [7:0]    dec_iter,
  output logic          dec_valid,
  output logic          dec_bit,
  output logic          dec_last,
  input  addr_t         mem_out_addr,
  output llr_t          mem_out_data,
  input  logic          reg_in_we,
  input  kidx_e         reg_in_sel,
  input  llr_t          reg_in_data,
  input  kidx_e         reg_out_sel,
  output llr_t          reg_out_data
);

  turbo_encoder #(.ROWS(ROWS), .COLS(COLS)) u_enc (
    .clk, .rst_n,
    .in_valid  (enc_in_valid),
    .in_ready  (enc_in_ready),
    .in_bit    (enc_in_bit),
    .out_valid (enc_out_valid),
    .out_last  (enc_out_last),
    .sys       (enc_sys),
    .par1      (enc_par1),
    .par2      (enc_par2),
    .state1    (enc_state1),
    .state2    (enc_state2)
  );

  turbo_decoder #(.ROWS(ROWS), .COLS(COLS), .ITER(ITER)) u_dec (
    .clk, .rst_n,
    .ld_we, .ld_sel, .ld_idx, .ld_data,
    .start     (dec_start),
    .busy      (dec_busy),
    .done      (dec_done),
    .iter      (dec_iter),
    .dec_valid, .dec_bit, .dec_last,
    .mem_out_addr, .mem_out_data,
    .reg_in_we, .reg_in_sel, .reg_in_data,
    .reg_out_sel, .reg_out_data
  );

endmodule
