// rsc_encoder: recursive systematic convolutional encoder, m = 2 (4 states).
//
// The feedback bit a = x ^ (taps of FB_POLY on the two registers) enters the
// shift register, and the parity bit is the FF_POLY combination of a and the
// registers. The defaults give the 4-state (7,5) octal code: feedback
// 1 + D + D^2, feedforward 1 + D^2. The two memory elements follow the published
// decoder (m = 2); the polynomials are this design's choice.
//
// Interface: with en high, x is encoded in that cycle: parity is combinational
// from x and the current state, and the state advances at the clock edge. clr
// returns the register to state 0 for the next frame (it wins over en).
module rsc_encoder #(
  parameter logic [2:0] FB_POLY = 3'b111,  // bit k = tap on D^k, bit 0 is the input
  parameter logic [2:0] FF_POLY = 3'b101
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       en,
  input  logic       x,
  output logic       parity,
  output logic [1:0] state   // {D^2 register, D^1 register}
);

  logic s1, s2;   // s1 holds a delayed by 1, s2 by 2
  logic a;

  always_comb begin
    a      = x ^ (FB_POLY[1] & s1) ^ (FB_POLY[2] & s2);
    parity = (FF_POLY[0] & a) ^ (FF_POLY[1] & s1) ^ (FF_POLY[2] & s2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else if (en) begin
      s1 <= a;
      s2 <= s1;
    end
  end

  assign state = {s2, s1};

endmodule
