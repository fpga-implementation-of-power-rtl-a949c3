// acs_unit: the full add-compare-select stage, 32 butterflies side by side.
//
// For every butterfly j (present states 2j and 2j+1, next states j and j+32) the
// expected code pair of branch 2j -> j is worked out at elaboration time from the
// generator polynomials, and the matching branch metric and its complement's metric
// are routed in. All 64 new path metrics and the 64-bit decision vector (the survivor
// vector of this trellis stage, bit s for next state s) are produced in the same
// cycle. A fully parallel stage of 32 butterflies follows the original architecture.
//
// Purely combinational: pm_in and bm in, pm_out and decisions out.
module acs_unit
  import viterbi_pkg::*;
(
  input  pm_t                pm_in  [NSTATES],  // path metrics of the present states
  input  bm_vec_t            bm,                // BM_00, BM_01, BM_10, BM_11
  output pm_t                pm_out [NSTATES],  // path metrics of the next states
  output logic [NSTATES-1:0] decisions          // bit s: 1 if state s came from its odd predecessor
);

  for (genvar j = 0; j < NBFLY; j++) begin : g_bfly
    localparam logic [1:0] CODE_A = branch_code(state_t'(2 * j), 1'b0);
    localparam logic [1:0] CODE_B = ~CODE_A;

    acs_butterfly u_bfly (
      .pm_up   (pm_in[2*j]),
      .pm_lo   (pm_in[2*j+1]),
      .bm_a    (bm[CODE_A]),
      .bm_b    (bm[CODE_B]),
      .pm_j    (pm_out[j]),
      .pm_j32  (pm_out[j+NBFLY]),
      .dec_j   (decisions[j]),
      .dec_j32 (decisions[j+NBFLY])
    );
  end

endmodule
