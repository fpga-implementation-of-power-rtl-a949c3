// tb_acs_unit: one full trellis stage against a per-state reference. For next state
// s the predecessors are {s[4:0],0} and {s[4:0],1}; the expected code pair of each
// branch comes from the reference encoder's tap lists, not from the RTL package.
module tb_acs_unit;
  import viterbi_pkg::*;
  import viterbi_ref_pkg::*;

  pm_t                pm_in  [NSTATES];
  pm_t                pm_out [NSTATES];
  bm_vec_t            bm;
  logic [NSTATES-1:0] decisions;
  int checks = 0, failures = 0;

  acs_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pmi [64];
    int bmi [4];
    for (int iter = 0; iter < 300; iter++) begin
      automatic int base = $urandom_range(0, 2047);
      for (int s = 0; s < 64; s++) begin
        pmi[s] = base + $urandom_range(0, (iter < 10) ? 0 : 100);  // first runs: all equal
        pm_in[s] = pm_t'(pmi[s]);
      end
      for (int p = 0; p < 4; p++) begin
        bmi[p] = int'($urandom_range(0, 16)) - 8;
        bm[p]  = bm_t'(bmi[p]);
      end
      #1;
      for (int s = 0; s < 64; s++) begin
        automatic int m [2];
        automatic bit want_d;
        for (int k = 0; k < 2; k++) begin
          automatic int p = ((s & 31) << 1) | k;
          bit [6:1] h;
          bit g1, g0;
          for (int b = 1; b <= 6; b++) h[b] = p[6-b];
          ref_code(s[5], h, g1, g0);
          m[k] = pmi[p] + bmi[{g1, g0}];
        end
        want_d = !(m[0] > m[1]);
        checks++;
        if (decisions[s] != want_d || pm_out[s] != pm_t'(want_d ? m[1] : m[0])) begin
          failures++;
          if (failures < 10) $display("FAIL iter %0d state %0d got %0d/%b want %0d %0d bm %p", iter, s, pm_out[s], decisions[s], m[0], m[1], bmi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
