// viterbi_top: the complete codec of the design, transmit and receive side by side.
//
// Transmit side: conv_encoder turns the data bit stream (enc_in, strobed by en_gen)
// into the two code bits G1/G0 per data bit. Between the two sides lies the channel
// (modulation, noise), which is not part of this design: the code bits leave on
// enc_g1/enc_g0 and the received, noisy samples come back on rx_g1/rx_g0.
//
// Receive side: two soft_quantizer instances turn the received samples into 3-bit soft
// codes, and viterbi_decoder decodes them. See viterbi_decoder for framing (frames of
// D stages, each ending in state 0), rate (one stage per 2 clocks) and latency
// (3*D + 1 cycles). The signal names rst, en_gen, out_en and dec_out echo the
// design's board-level test; the sample format is this implementation's choice.
module viterbi_top
  import viterbi_pkg::*;
#(
  parameter int unsigned D        = 64,
  parameter int unsigned SAMPLE_W = 8,
  parameter int unsigned FRAC_W   = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  // transmit side
  input  logic                       en_gen,     // encode enc_in this cycle
  input  logic                       enc_in,
  output logic                       enc_g1,
  output logic                       enc_g0,
  output logic                       enc_valid,
  // receive side
  input  logic                       rx_valid,
  input  logic signed [SAMPLE_W-1:0] rx_g1,      // received sample of G1 (0 -> positive)
  input  logic signed [SAMPLE_W-1:0] rx_g0,      // received sample of G0
  output logic                       rx_ready,
  output logic                       dec_out,
  output logic                       out_en,
  output logic                       wr_bank,
  output logic                       sleep
);

  soft_t q1, q0;

  conv_encoder u_enc (
    .clk       (clk),
    .rst       (rst),
    .en        (en_gen),
    .din       (enc_in),
    .g1        (enc_g1),
    .g0        (enc_g0),
    .out_valid (enc_valid)
  );

  soft_quantizer #(.SAMPLE_W(SAMPLE_W), .FRAC_W(FRAC_W)) u_q1 (.sample(rx_g1), .code(q1));
  soft_quantizer #(.SAMPLE_W(SAMPLE_W), .FRAC_W(FRAC_W)) u_q0 (.sample(rx_g0), .code(q0));

  viterbi_decoder #(.D(D)) u_dec (
    .clk      (clk),
    .rst      (rst),
    .in_valid (rx_valid),
    .g1_code  (q1),
    .g0_code  (q0),
    .in_ready (rx_ready),
    .dec_out  (dec_out),
    .out_en   (out_en),
    .wr_bank  (wr_bank),
    .sleep    (sleep)
  );

endmodule
