// acs_butterfly: one add-compare-select butterfly of the 64-state trellis.
//
// Present states 2j (upper) and 2j+1 (lower) both lead to next states j and j+32.
// The two branches that cross straight (2j -> j and 2j+1 -> j+32) carry the same
// expected code pair, and the two crossing branches carry its complement, so one
// butterfly needs only two branch metrics: bm_a for the straight branches and bm_b for
// the others. Four adders form the candidate metrics, two comparators keep the larger
// one per next state, and each comparator emits a decision bit: 0 when the upper path
// wins, 1 when the lower path wins or the two are equal. This structure and the
// decision-bit rule follow the original architecture; the modulo comparison of path
// metrics is this
// implementation's choice (see viterbi_pkg).
//
// Purely combinational.
module acs_butterfly
  import viterbi_pkg::*;
(
  input  pm_t  pm_up,     // path metric of state 2j
  input  pm_t  pm_lo,     // path metric of state 2j+1
  input  bm_t  bm_a,      // metric of branches 2j -> j and 2j+1 -> j+32
  input  bm_t  bm_b,      // metric of branches 2j+1 -> j and 2j -> j+32
  output pm_t  pm_j,      // new path metric of state j
  output pm_t  pm_j32,    // new path metric of state j+32
  output logic dec_j,     // decision bit of state j
  output logic dec_j32    // decision bit of state j+32
);

  pm_t ext_a, ext_b;
  pm_t up_j, lo_j, up_j32, lo_j32;

  always_comb begin
    ext_a  = pm_t'(signed'(bm_a));          // sign-extend to the path metric width
    ext_b  = pm_t'(signed'(bm_b));
    up_j   = pm_up + ext_a;
    lo_j   = pm_lo + ext_b;
    up_j32 = pm_up + ext_b;
    lo_j32 = pm_lo + ext_a;
    dec_j   = !pm_greater(up_j, lo_j);
    dec_j32 = !pm_greater(up_j32, lo_j32);
    pm_j    = dec_j   ? lo_j   : up_j;
    pm_j32  = dec_j32 ? lo_j32 : up_j32;
  end

endmodule
