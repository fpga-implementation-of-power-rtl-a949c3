// tb_acs_butterfly: random and corner cases against an integer add-compare-select.
// Metrics are drawn close to each other (as they are in a running decoder) but may
// sit anywhere in the modulo range, including across the wrap-around. Ties must pick
// the lower path with decision bit 1.
module tb_acs_butterfly;
  import viterbi_pkg::*;

  pm_t  pm_up, pm_lo, pm_j, pm_j32;
  bm_t  bm_a, bm_b;
  logic dec_j, dec_j32;
  int checks = 0, failures = 0;

  acs_butterfly dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int base, input int du, input int dl, input int a, input int b);
    int up = base + du, lo = base + dl;
    int cj_u = up + a, cj_l = lo + b, c32_u = up + b, c32_l = lo + a;
    int ej, e32;
    bit dj, d32;
    pm_up = pm_t'(up); pm_lo = pm_t'(lo); bm_a = bm_t'(a); bm_b = bm_t'(b);
    #1;
    dj  = !(cj_u > cj_l);
    d32 = !(c32_u > c32_l);
    ej  = dj ? cj_l : cj_u;
    e32 = d32 ? c32_l : c32_u;
    checks++;
    if (dec_j != dj || dec_j32 != d32 || pm_j != pm_t'(ej) || pm_j32 != pm_t'(e32)) begin
      failures++;
      $display("FAIL up=%0d lo=%0d a=%0d b=%0d: got %0d/%b %0d/%b want %0d/%b %0d/%b",
               up, lo, a, b, pm_j, dec_j, pm_j32, dec_j32, pm_t'(ej), dj, pm_t'(e32), d32);
    end
  endtask

  initial begin
    // Fig. 4 case: S0 better on the straight branch
    run(0, 10, 0, 4, -4);
    checks++; if (dec_j != 0 || dec_j32 != 0) failures++;
    // exact tie -> lower path, decision 1
    run(100, 0, 0, 2, 2);
    checks++; if (dec_j != 1 || dec_j32 != 1) failures++;
    for (int i = 0; i < 20000; i++)
      run($urandom_range(0, 4095), $urandom_range(0, 120), $urandom_range(0, 120),
          int'($urandom_range(0, 16)) - 8, int'($urandom_range(0, 16)) - 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
