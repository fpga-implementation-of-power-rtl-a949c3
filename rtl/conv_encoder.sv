// conv_encoder: K=7, rate-1/2 convolutional encoder.
//
// Six one-bit delay cells hold the last six input bits. Each accepted input bit k
// produces two code bits, G1(n) and G0(n), as the XOR of the taps selected by the
// generator polynomials 1111001 and 1011011 over {input, delay 1 .. delay 6}. The tap
// positions and polynomials follow the original architecture; registering the two outputs is a
// choice of this implementation.
//
// Interface: when en is high, din is encoded on that rising clock edge; g1/g0 and
// out_valid appear one cycle later. The delay line clears to the all-zero state on
// rst (synchronous, active high), which is the known start state the decoder assumes.
module conv_encoder
  import viterbi_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic din,
  output logic g1,
  output logic g0,
  output logic out_valid
);

  state_t sr;   // sr[5] = delay 1 (newest), sr[0] = delay 6 (oldest)

  always_ff @(posedge clk) begin
    if (rst) begin
      sr        <= '0;
      g1        <= 1'b0;
      g0        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        {g1, g0} <= branch_code(sr, din);
        sr       <= {din, sr[M-1:1]};
      end
    end
  end

endmodule
