// interleaver: frame buffer with natural and permuted read-out.
//
// Stores a frame of N = ROWS*COLS bits written at wr_addr. Reading position i
// returns bit i (nat_bit) and bit pi(i) (perm_bit) in the same cycle, where the
// permutation is the row-column block interleaver
//   pi(i) = (i mod ROWS) * COLS + (i div ROWS),
// i.e. the frame is written row by row into a ROWS x COLS array and read column
// by column. The permutation and the frame length are this design's choices.
// Writes take effect at the clock edge; reads are combinational.
module interleaver #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 8,
  localparam int unsigned N   = ROWS * COLS,
  localparam int unsigned IW  = $clog2(N)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_addr,
  input  logic          wr_bit,
  input  logic [IW-1:0] rd_idx,
  output logic          nat_bit,
  output logic          perm_bit,
  output logic [IW-1:0] perm_idx
);

  logic [N-1:0] buf_q;

  always_ff @(posedge clk) begin
    if (wr_en) buf_q[wr_addr] <= wr_bit;
  end

  always_comb begin
    perm_idx = IW'((int'(rd_idx) % ROWS) * COLS + int'(rd_idx) / ROWS);
    nat_bit  = buf_q[rd_idx];
    perm_bit = buf_q[perm_idx];
  end

endmodule
