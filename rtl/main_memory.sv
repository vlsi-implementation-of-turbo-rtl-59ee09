// main_memory: LLR and metric store of the LUT-Log-BCJR processor.
//
// A register-file style RAM of 2^AW words of 7-bit Q5.2. It is loaded from
// outside through the 'mem in' write port and read through the 'mem out' port,
// feeds a p and a q operand to each ACS lane, and takes each lane's result back
// from the register bank. Reads are combinational; writes happen at the clock
// edge. If several writes hit one word in the same cycle, the write-back of the
// highest-numbered lane wins, then lower lanes, then 'mem in'. The memory's role
// follows the published architecture; the depth (512 words), the port list and
// the write priority are this design's choices. Contents are not reset.
module main_memory
  import acs_pkg::*;
#(
  parameter int unsigned DEPTH_AW = AW,
  parameter int unsigned NLANES   = LANES
) (
  input  logic                           clk,
  // 'mem in'
  input  logic                           mem_in_we,
  input  logic [DEPTH_AW-1:0]            mem_in_addr,
  input  llr_t                           mem_in_data,
  // 'mem out'
  input  logic [DEPTH_AW-1:0]            mem_out_addr,
  output llr_t                           mem_out_data,
  // operand reads
  input  logic [NLANES-1:0][DEPTH_AW-1:0] rd_addr_p,
  input  logic [NLANES-1:0][DEPTH_AW-1:0] rd_addr_q,
  output llr_t [NLANES-1:0]              rd_p,
  output llr_t [NLANES-1:0]              rd_q,
  // write-back from the register bank
  input  logic [NLANES-1:0]              wb_we,
  input  logic [NLANES-1:0][DEPTH_AW-1:0] wb_addr,
  input  llr_t [NLANES-1:0]              wb_data
);

  localparam int unsigned DEPTH = 1 << DEPTH_AW;

  llr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (mem_in_we) mem[mem_in_addr] <= mem_in_data;
    for (int l = 0; l < NLANES; l++) begin
      if (wb_we[l]) mem[wb_addr[l]] <= wb_data[l];
    end
  end

  always_comb begin
    mem_out_data = mem[mem_out_addr];
    for (int l = 0; l < NLANES; l++) begin
      rd_p[l] = mem[rd_addr_p[l]];
      rd_q[l] = mem[rd_addr_q[l]];
    end
  end

endmodule
