// branch_metric_unit: the four branch metrics of one received symbol pair.
//
// Each soft code is turned into its signed level (+3 .. -4). The metric of a branch
// whose expected code pair is {x, y} adds the level of G1 when x is 0 and its two's
// complement when x is 1, and likewise for G0 and y:
//   BM_00 = G1 + G0,   BM_01 = G1 - G0,   BM_10 = -G1 + G0,   BM_11 = -G1 - G0.
// These four adders and the use of two's complements follow the original architecture. A large value
// means a good match. The range is -8..+8, hence 5-bit results.
//
// Purely combinational. bm[i] is the metric for expected pair i = {g1, g0}.
module branch_metric_unit
  import viterbi_pkg::*;
(
  input  soft_t   g1_code,   // soft code of the first code bit
  input  soft_t   g0_code,   // soft code of the second code bit
  output bm_vec_t bm         // bm[0]=BM_00, bm[1]=BM_01, bm[2]=BM_10, bm[3]=BM_11
);

  bm_t l1, l0;

  always_comb begin
    l1 = bm_t'(soft_level(g1_code));
    l0 = bm_t'(soft_level(g0_code));
    bm[0] =  l1 + l0;
    bm[1] =  l1 - l0;
    bm[2] = -l1 + l0;
    bm[3] = -l1 - l0;
  end

endmodule
