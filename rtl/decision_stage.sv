// decision_stage: hard decisions from the posterior LLRs.
//
// After the last iteration the posterior LLR of every bit, La + Ls + Le with
// LLR = ln(P(bit=0)/P(bit=1)), sits in the main memory at BASE + i in natural
// order. On start the stage reads them one per clock through the memory's
// combinational read port and emits the decoded bit, 1 where the LLR is
// negative, on out_valid for N consecutive cycles, with out_last on the final
// bit. The sign rule follows from the LLR convention of the recursions; the
// streaming read-out is this design's choice.
module decision_stage
  import acs_pkg::*;
#(
  parameter int unsigned N    = 32,
  parameter int unsigned BASE = 192
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  busy,
  output addr_t rd_addr,
  input  llr_t  rd_data,
  output logic  out_valid,
  output logic  out_bit,
  output logic  out_last
);

  localparam int unsigned IW = $clog2(N);

  logic          run_q;
  logic [IW-1:0] i_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      i_q   <= '0;
    end else if (!run_q) begin
      if (start) begin
        run_q <= 1'b1;
        i_q   <= '0;
      end
    end else begin
      i_q <= i_q + 1'b1;
      if (i_q == IW'(N - 1)) run_q <= 1'b0;
    end
  end

  assign busy      = run_q;
  assign rd_addr   = addr_t'(BASE + int'(i_q));
  assign out_valid = run_q;
  assign out_bit   = run_q && rd_data[W-1];
  assign out_last  = run_q && (i_q == IW'(N - 1));

endmodule
