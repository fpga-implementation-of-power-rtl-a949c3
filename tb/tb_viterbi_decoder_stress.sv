// tb_viterbi_decoder_stress: bit-exact comparison of the decoder with the integer
// reference decoder on inputs that carry no code structure at all.
//
// The soft codes are drawn per frame from one of three sources: uniformly random codes,
// long runs of the strongest 0 or strongest 1 (the fastest possible path metric
// growth, so the 10-bit metrics wrap around many times), and random mixtures of
// strong and erased (011/100) symbols. The reference keeps unbounded integer metrics,
// so any error of the modulo comparison or of metric saturation shows up as a
// mismatch. Frames are not terminated; both decoders still trace back from state 0.
module tb_viterbi_decoder_stress;
  import viterbi_pkg::*;
  import viterbi_ref_pkg::*;

  localparam int D = 64;
  localparam int FRAMES = 40;
  localparam int N = FRAMES * D;

  logic  clk = 0, rst = 1, in_valid = 0;
  soft_t g1_code = 0, g0_code = 0;
  logic  in_ready, dec_out, out_en, wr_bank, sleep;
  int checks = 0, failures = 0;

  viterbi_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit [2:0] s1[], s0[];
  bit ref_out[];
  int outputs = 0;

  always @(posedge clk) begin
    if (!rst && out_en) begin
      checks++;
      if (outputs >= N || dec_out != ref_out[outputs]) begin
        failures++;
        if (failures < 10) $display("FAIL bit %0d", outputs);
      end
      outputs++;
    end
  end

  initial begin
    s1 = new[N];
    s0 = new[N];
    for (int f = 0; f < FRAMES; f++) begin
      automatic int kind = f % 3;
      automatic bit [2:0] strong_code = $urandom_range(0, 1) ? 3'b111 : 3'b000;
      for (int t = f * D; t < (f + 1) * D; t++) begin
        case (kind)
          0: begin s1[t] = 3'($urandom_range(0, 7)); s0[t] = 3'($urandom_range(0, 7)); end
          1: begin s1[t] = strong_code; s0[t] = strong_code; end
          default: begin
            s1[t] = $urandom_range(0, 1) ? 3'($urandom_range(3, 4)) : 3'b000;
            s0[t] = $urandom_range(0, 1) ? 3'b111 : 3'($urandom_range(3, 4));
          end
        endcase
      end
    end
    ref_decode(s1, s0, D, ref_out);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      in_valid = 1; g1_code = s1[i]; g0_code = s0[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    wait (outputs == N);
    repeat (4 * D) @(posedge clk);
    checks++;
    if (outputs != N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
