// tb_conv_encoder: checks the K=7 encoder against a bit-by-bit reference, including
// its impulse response (which must equal the generator polynomials 1111001 and
// 1011011 read left to right), the one-cycle output latency and the hold when en is low.
module tb_conv_encoder;
  import viterbi_ref_pkg::*;

  logic clk = 0, rst = 1, en = 0, din = 0;
  logic g1, g0, out_valid;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit [6:1] h = '0;
    bit e1, e0;
    bit imp1 [7] = '{1,1,1,1,0,0,1};
    bit imp0 [7] = '{1,0,1,1,0,1,1};
    repeat (2) @(posedge clk);
    rst <= 0;
    // impulse response
    for (int i = 0; i < 7; i++) begin
      en <= 1; din <= (i == 0);
      @(posedge clk);
      #1;
      check(out_valid, "out_valid after en");
      check(g1 == imp1[i] && g0 == imp0[i], $sformatf("impulse step %0d got %b%b", i, g1, g0));
    end
    // random stream with pauses
    rst <= 1; en <= 0; @(posedge clk); rst <= 0; h = '0; e1 = 0; e0 = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic bit u = $urandom_range(0, 1);
      automatic bit go = ($urandom_range(0, 3) != 0);
      en <= go; din <= u;
      @(posedge clk);
      #1;
      check(out_valid == go, "out_valid follows en");
      if (go) begin
        ref_code(u, h, e1, e0);
        check(g1 == e1 && g0 == e0, $sformatf("step %0d", i));
        h = {h[5:1], u};
      end else begin
        check(g1 == e1 && g0 == e0, "outputs hold while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
