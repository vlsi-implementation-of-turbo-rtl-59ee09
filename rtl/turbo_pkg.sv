// turbo_pkg: trellis and interleaver functions of the turbo code.
//
// The constituent code is the 4-state recursive systematic (7,5) code. A state
// is written {s2, s1}, s1 being the most recent register. With input y the
// feedback bit is a = y ^ s1 ^ s2, the parity bit a ^ s2 and the next state
// {s1, a}. Every state has two incoming and two outgoing transitions; the
// incoming ones of state S come from {0, S[1]} and {1, S[1]}. The interleaver is
// the row-column permutation pi(i) = (i mod ROWS) * COLS + i div ROWS.
package turbo_pkg;

  function automatic logic [1:0] next_state(logic [1:0] s, logic y);
    logic a;
    a = y ^ s[0] ^ s[1];
    return {s[0], a};
  endfunction

  function automatic logic parity_bit(logic [1:0] s, logic y);
    return y ^ s[0];   // a ^ s2 = y ^ s1 ^ s2 ^ s2
  endfunction

  // predecessor number j (0 or 1) of state s, and the input bit on that branch
  function automatic logic [1:0] pred_state(logic [1:0] s, logic j);
    return {j, s[1]};
  endfunction

  function automatic logic pred_input(logic [1:0] s, logic j);
    return s[0] ^ s[1] ^ j;
  endfunction

  function automatic int unsigned il_perm(int unsigned i, int unsigned rows, int unsigned cols);
    return (i % rows) * cols + i / rows;
  endfunction

  // Memory map of the decoder for a frame of n bits. Regions of n words:
  // systematic, parity 1, parity 2, extrinsic, yh, g00, posterior (k*n for
  // k = 0..6); then alpha (4*(n+1) words) and the scratch area, whose word
  // offsets are given below.
  function automatic int unsigned scratch_base(int unsigned n);
    return 11 * n + 4;
  endfunction

  localparam int unsigned OFS_BETA = 0;   // 4 words
  localparam int unsigned OFS_T0   = 4;   // gamma + beta or alpha candidates, y/j = 0
  localparam int unsigned OFS_T1   = 8;   // the same for y/j = 1
  localparam int unsigned OFS_A0   = 12;  // alpha + gamma_c, y = 0
  localparam int unsigned OFS_A1   = 16;
  localparam int unsigned OFS_D0   = 20;  // delta, y = 0
  localparam int unsigned OFS_D1   = 24;
  localparam int unsigned OFS_M1   = 28;  // first max* level
  localparam int unsigned OFS_M2   = 32;  // second max* level (2 words)
  localparam int unsigned OFS_ZERO = 34;  // constant 0
  localparam int unsigned OFS_NEG  = 35;  // start value of alpha for states 1..3
  localparam int unsigned OFS_E    = 36;  // unclipped extrinsic
  localparam int unsigned OFS_CLP  = 37;  // +clip level
  localparam int unsigned OFS_CLN  = 38;  // -clip level
  localparam int unsigned SCRATCH_WORDS = 39;

endpackage
