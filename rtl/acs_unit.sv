// acs_unit: low-complexity add-compare-select unit.
//
// One 7-bit adder does all the work. Operand q passes through an XOR with O0,
// so O0=1 turns the adder into a subtractor when the carry-in is 1. The carry-in
// is O0 when O1=0 and NOT C0 when O1=1, which subtracts a further 0.25 (one LSB)
// after an OP1 that found p<q. The sum's MSB, gated by O2, inverts the sum
// (one's complement), giving |p-q| - 0.25 for a negative difference. The sum's
// MSB is loaded into C0, C1 or C2 when O3, O4 or O5 is 1. This gate netlist and
// the operation table are the published design; the synchronous reset of the
// flags is this design's choice.
//
// Interface: op = {O0..O5} (O0 in bit 5), p and q in Q5.2, r combinational.
// Timing: r is valid in the same cycle as op/p/q; C0..C2 update at the clock
// edge ending that cycle, so one ACS operation takes one clock. The adder wraps
// modulo 2^7 like the drawn adder; no saturation.
module acs_unit
  import acs_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  opcode_t op,
  input  llr_t    p,
  input  llr_t    q,
  output llr_t    r,
  output logic [2:0] c   // {C2, C1, C0}
);

  logic o0, o1, o2, o3, o4, o5;
  assign {o0, o1, o2, o3, o4, o5} = op;

  logic       c0_q, c1_q, c2_q;
  logic [W-1:0] q_x, sum;
  logic       cin, msb;

  always_comb begin
    q_x = q ^ {W{o0}};
    cin = o1 ? ~c0_q : o0;
    sum = p + q_x + {{(W-1){1'b0}}, cin};
    msb = sum[W-1];
    r   = sum ^ {W{msb & o2}};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c0_q <= 1'b0;
      c1_q <= 1'b0;
      c2_q <= 1'b0;
    end else begin
      if (o3) c0_q <= msb;
      if (o4) c1_q <= msb;
      if (o5) c2_q <= msb;
    end
  end

  assign c = {c2_q, c1_q, c0_q};

endmodule
