// tb_soft_quantizer: sweeps every 8-bit sample and compares the 3-bit code with the
// level table (+3 -> 000 ... -4 -> 111) under uniform steps of 16 (4 fraction bits).
module tb_soft_quantizer;
  import viterbi_ref_pkg::*;

  logic signed [7:0] sample;
  logic [2:0] code;
  int checks = 0, failures = 0;

  soft_quantizer dut (.sample(sample), .code(code));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      int lvl;
      sample = 8'(v);
      #1;
      lvl = (v >= 0) ? v / 16 : -((-v + 15) / 16);   // floor(v / 16)
      checks++;
      if (code != ref_code_of(lvl)) begin
        failures++;
        $display("FAIL sample %0d code %b", v, code);
      end
    end
    // spot values from the level table
    sample = 8'sd56;  #1; checks++; if (code != 3'b000) failures++;  // +3.5 -> strongest 0
    sample = -8'sd56; #1; checks++; if (code != 3'b111) failures++;  // -3.5 -> strongest 1
    sample = 8'sd5;   #1; checks++; if (code != 3'b011) failures++;  // weakest 0
    sample = -8'sd5;  #1; checks++; if (code != 3'b100) failures++;  // weakest 1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
