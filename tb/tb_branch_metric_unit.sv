// tb_branch_metric_unit: all 64 pairs of soft codes against the correlation formula,
// plus the worked example: weak 1 (100) and strong 0 (000) give BM_00 = 2,
// BM_01 = -4, BM_10 = 4 and BM_11 = -2.
module tb_branch_metric_unit;
  import viterbi_pkg::*;
  import viterbi_ref_pkg::*;

  soft_t g1_code, g0_code;
  bm_vec_t bm;
  int checks = 0, failures = 0;

  branch_metric_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        g1_code = 3'(a); g0_code = 3'(b);
        #1;
        for (int p = 0; p < 4; p++) begin
          checks++;
          if (int'(bm[p]) != ref_bm(p[1], p[0], ref_level(3'(a)), ref_level(3'(b)))) begin
            failures++;
            $display("FAIL codes %b %b pair %0d got %0d", a, b, p, bm[p]);
          end
        end
      end
    g1_code = 3'b100; g0_code = 3'b000;
    #1;
    checks++;
    if (!(bm[0] == 2 && bm[1] == -4 && bm[2] == 4 && bm[3] == -2)) begin
      failures++;
      $display("FAIL worked example");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
