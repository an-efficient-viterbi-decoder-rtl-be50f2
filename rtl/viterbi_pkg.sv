// viterbi_pkg: sizes and trellis shared by the decoder modules.
//
// The decoder works on a 4-state, rate-1/2 convolutional code with constraint
// length 3. Path metrics are 3 bits, branch metrics 2 bits and candidate sums
// 4 bits, the widths printed on the unit schematics. The generator polynomials
// are this design's choice: the common (7,5) octal pair.
//
// Trellis convention: the state is the encoder shift register {s1, s0}, newest
// bit in s1. An input bit u moves state {s1, s0} to {u, s1}. So next state ns
// has the two predecessors {ns[0], x}, x = 0 or 1, and ns[1] is the input bit
// that led to it. The survivor decision for ns is the chosen x.
package viterbi_pkg;

  localparam int unsigned NUM_STATES = 4;  // four metric registers
  localparam int unsigned STATE_W    = 2;
  localparam int unsigned PM_W       = 3;  // path metric width
  localparam int unsigned BM_W       = 2;  // branch metric width
  localparam int unsigned SUM_W      = 4;  // path + branch metric
  localparam int unsigned SYM_W      = 2;  // received symbol, two code bits

  typedef logic [PM_W-1:0]    pm_t;
  typedef logic [BM_W-1:0]    bm_t;
  typedef logic [SUM_W-1:0]   sum_t;
  typedef logic [STATE_W-1:0] state_t;

  // Encoder output {g0, g1} for input u leaving state {s1, s0}:
  // g0 = u ^ s1 ^ s0 (polynomial 7), g1 = u ^ s0 (polynomial 5).
  function automatic logic [SYM_W-1:0] branch_code(input logic u, input logic s1,
                                                   input logic s0);
    return {u ^ s1 ^ s0, u ^ s0};
  endfunction

endpackage
