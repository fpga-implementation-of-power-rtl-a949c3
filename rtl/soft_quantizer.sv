// soft_quantizer: 3-bit soft decision of one received sample.
//
// The received sample is a signed fixed-point number in which a transmitted 0 is
// positive and a transmitted 1 negative (antipodal signalling), with the nominal
// amplitude of a clean symbol at +/- 2^(FRAC_W) * 3.5. The sample is divided into
// eight uniform levels, +3 (strongest 0) down to -4 (strongest 1), and each level is
// emitted as its 3-bit code: 000 for +3, 001 for +2, 010 for +1, 011 for 0, 100 for -1,
// 101 for -2, 110 for -3 and 111 for -4. The level-to-code table comes from the original architecture; the
// sample format and the uniform thresholds (level = floor(sample / 2^FRAC_W), clamped
// to -4..+3) are choices of this implementation.
//
// Purely combinational: code follows sample in the same cycle.
module soft_quantizer
  import viterbi_pkg::*;
#(
  parameter int unsigned SAMPLE_W = 8,   // width of the signed received sample
  parameter int unsigned FRAC_W   = 4    // fraction bits: one level = 2^FRAC_W
) (
  input  logic signed [SAMPLE_W-1:0] sample,
  output soft_t                      code
);

  logic signed [SAMPLE_W-1:0] level;

  always_comb begin
    level = sample >>> FRAC_W;                       // floor division
    if (level > 3)       code = 3'b000;
    else if (level < -4) code = 3'b111;
    else                 code = 3'(3 - level);       // level +3..-4 -> code 0..7
  end

endmodule
