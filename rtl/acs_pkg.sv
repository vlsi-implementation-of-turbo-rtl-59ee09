// acs_pkg: types and constants shared by the LUT-Log-BCJR ACS processor.
//
// All soft values are 7-bit two's complement fixed point with 5 integer and
// 2 fractional bits (Q5.2), so one LSB is 0.25 and the range is -16 .. +15.75.
// The 6-bit ACS operation codes are written as the string O0..O5 with O0 on the
// left, and stored here with O0 in bit 5, so the literal reads like the code.
package acs_pkg;

  localparam int unsigned W     = 7;  // word width
  localparam int unsigned FRAC  = 2;  // fractional bits
  localparam int unsigned LANES = 4;  // 2^m ACS units, m = 2
  localparam int unsigned AW    = 9;  // main memory address width (512 words)

  typedef logic signed [W-1:0] llr_t;
  typedef logic [AW-1:0]       addr_t;

  // Operation code O = {O0,O1,O2,O3,O4,O5}; O0 is bit 5.
  typedef logic [5:0] opcode_t;
  localparam opcode_t OP_ADD  = 6'b000000;  // r = p + q      (also max* step 4)
  localparam opcode_t OP_SUB  = 6'b100000;  // r = p - q
  localparam opcode_t OP_MS1  = 6'b101100;  // r = |p - q| (-0.25 if p<q), C0 = (p<q)
  localparam opcode_t OP_MS2  = 6'b110010;  // r = p - q - 0.25*C0, C1 = (r<0)
  localparam opcode_t OP_MS3  = 6'b110001;  // r = p - q - 0.25*C0, C2 = (r<0)

  // Q5.2 constants of the max* look-up table.
  localparam llr_t K_0P75 = 7'sd3;
  localparam llr_t K_0P50 = 7'sd2;
  localparam llr_t K_0P25 = 7'sd1;
  localparam llr_t K_ZERO = 7'sd0;
  localparam llr_t K_TWO  = 7'sd8;

  // Commands accepted by the processor.
  typedef enum logic [2:0] {
    CMD_ADD     = 3'd0,
    CMD_SUB     = 3'd1,
    CMD_MAXSTAR = 3'd2,  // max*(p,q), LUT approximation, 4 ACS steps
    CMD_MAX     = 3'd3,  // max(p,q), 2 ACS steps
    CMD_MIN     = 3'd4   // min(p,q), 2 ACS steps
  } cmd_op_e;

  // Step the controller is in; selects the ACS operands.
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,
    ST_ARI  = 3'd1,  // single add or subtract
    ST_MS1  = 3'd2,
    ST_MS2  = 3'd3,
    ST_MS3  = 3'd4,
    ST_MS4  = 3'd5,
    ST_WB   = 3'd6,  // register bank -> main memory
    ST_SEL  = 3'd7   // max / min: select p or q by C0
  } step_e;

  typedef struct packed {
    cmd_op_e                op;
    logic [LANES-1:0]       lane_en;
    addr_t [LANES-1:0]      pa;   // operand p address per lane
    addr_t [LANES-1:0]      qa;   // operand q address per lane
    addr_t [LANES-1:0]      da;   // destination address per lane
  } cmd_t;

  // Register bank constant index for 'reg in' / 'reg out'.
  typedef enum logic [2:0] {
    KI_CMP1  = 3'd0,  // 0.75, OP2 threshold
    KI_CMP0  = 3'd1,  // 0,    OP3 threshold when |p-q| <= 0.75
    KI_CMP2  = 3'd2,  // 2,    OP3 threshold when |p-q| >  0.75
    KI_COR00 = 3'd3,  // correction for C1=0,C2=0 (0.75)
    KI_COR01 = 3'd4,  // correction for C1=0,C2=1 (0.5)
    KI_COR10 = 3'd5,  // correction for C1=1,C2=0 (0.25)
    KI_COR11 = 3'd6   // correction for C1=1,C2=1 (0)
  } kidx_e;

endpackage
