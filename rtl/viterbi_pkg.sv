// viterbi_pkg: shared constants, types and trellis helpers for the K=7, rate-1/2
// soft-decision Viterbi codec.
//
// The code is the one the design is built around: constraint length 7, generator
// polynomials G1 = 1111001 and G0 = 1011011 (the leftmost digit taps the current input
// bit, the rightmost the oldest delayed bit), which gives 64 trellis states.
//
// State convention: a state is the content of the six delay cells, the most recent
// bit in bit 5 and the oldest in bit 0. With input u, state s moves to {u, s[5:1]},
// so states 2j and 2j+1 both lead to states j and j+32 (one butterfly).
//
// Soft symbols are 3-bit codes: code 000 is the strongest 0 (+3) and 111 the strongest
// 1 (-4); the signed level is 3 - code. Branch and path metrics are correlations:
// larger is better. Path metrics are kept modulo 2^PM_W and compared by the sign of
// their difference, so they never need rescaling (a choice of this design).
package viterbi_pkg;

  localparam int unsigned K        = 7;              // constraint length
  localparam int unsigned M        = K - 1;          // delay cells
  localparam int unsigned NSTATES  = 1 << M;         // 64 trellis states
  localparam int unsigned NBFLY    = NSTATES / 2;    // 32 butterflies
  localparam int unsigned SOFT_W   = 3;              // soft symbol width
  localparam int unsigned BM_W     = 5;              // branch metric width, range -8..+8
  localparam int unsigned PM_W     = 10;             // path metric width (modulo)

  localparam logic [K-1:0] G1 = 7'b1111001;          // first encoder output
  localparam logic [K-1:0] G0 = 7'b1011011;          // second encoder output

  typedef logic [SOFT_W-1:0]       soft_t;           // 3-bit soft code
  typedef logic signed [BM_W-1:0]  bm_t;             // branch metric
  typedef logic [PM_W-1:0]         pm_t;             // path metric, modulo 2^PM_W
  typedef logic [M-1:0]            state_t;          // trellis state

  // The four branch metrics, indexed by the expected code pair {g1, g0}.
  typedef bm_t bm_vec_t [4];

  // Expected encoder output {g1, g0} for input u leaving state s.
  function automatic logic [1:0] branch_code(input state_t s, input logic u);
    logic [K-1:0] taps;
    taps = {u, s};
    return {^(taps & G1), ^(taps & G0)};
  endfunction

  // Signed level of a soft code: 000 -> +3 ... 111 -> -4.
  function automatic logic signed [3:0] soft_level(input soft_t c);
    return 4'sd3 - $signed({1'b0, c});
  endfunction

  // True when path metric a beats b (a - b > 0 in modulo arithmetic).
  function automatic logic pm_greater(input pm_t a, input pm_t b);
    pm_t d;
    d = a - b;
    return (d != '0) && !d[PM_W-1];
  endfunction

endpackage
