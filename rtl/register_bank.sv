// register_bank: LUT constants and per-lane intermediate results.
//
// Holds the seven constants of the max* look-up table (0.75 for the OP2 test,
// 0 and 2 for the OP3 test, and the corrections 0.75, 0.5, 0.25, 0 added in
// OP4) and one result register per ACS lane (MAX1..MAX4). The constants reset to
// the published values, in Q5.2, and may be rewritten through 'reg in' and read
// through 'reg out', both addressed by kidx_e. A MAX register loads its lane's
// ACS result at the clock edge when max_we is set; it holds |p-q| between OP1
// and OP4 of a max*, and the final result until the write-back. The index
// encoding and the reset are this design's choices.
module register_bank
  import acs_pkg::*;
#(
  parameter int unsigned NLANES = LANES
) (
  input  logic              clk,
  input  logic              rst_n,
  // per-lane results
  input  logic [NLANES-1:0] max_we,
  input  llr_t [NLANES-1:0] max_d,
  output llr_t [NLANES-1:0] max_q,
  // 'reg in' / 'reg out'
  input  logic              reg_in_we,
  input  kidx_e             reg_in_sel,
  input  llr_t              reg_in_data,
  input  kidx_e             reg_out_sel,
  output llr_t              reg_out_data,
  // constants to the operand muxes
  output llr_t              k_cmp1,   // 0.75
  output llr_t              k_cmp0,   // 0
  output llr_t              k_cmp2,   // 2
  output llr_t [3:0]        k_cor     // index {C1,C2}: 0.75, 0.5, 0.25, 0
);

  llr_t kreg [7];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kreg[KI_CMP1]  <= K_0P75;
      kreg[KI_CMP0]  <= K_ZERO;
      kreg[KI_CMP2]  <= K_TWO;
      kreg[KI_COR00] <= K_0P75;
      kreg[KI_COR01] <= K_0P50;
      kreg[KI_COR10] <= K_0P25;
      kreg[KI_COR11] <= K_ZERO;
    end else if (reg_in_we && reg_in_sel <= KI_COR11) begin
      kreg[reg_in_sel] <= reg_in_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      max_q <= '0;
    end else begin
      for (int l = 0; l < NLANES; l++) begin
        if (max_we[l]) max_q[l] <= max_d[l];
      end
    end
  end

  always_comb begin
    reg_out_data = (reg_out_sel <= KI_COR11) ? kreg[reg_out_sel] : '0;
    k_cmp1   = kreg[KI_CMP1];
    k_cmp0   = kreg[KI_CMP0];
    k_cmp2   = kreg[KI_CMP2];
    k_cor[0] = kreg[KI_COR00];
    k_cor[1] = kreg[KI_COR01];
    k_cor[2] = kreg[KI_COR10];
    k_cor[3] = kreg[KI_COR11];
  end

endmodule
