// tb_state_metric_storage: reset values (state 0 at 0, the others at -64 modulo
// 2^10), loading of all 64 metrics at once, and holding when load is low.
module tb_state_metric_storage;
  import viterbi_pkg::*;

  logic clk = 0, rst = 1, load = 0;
  pm_t  pm_in [NSTATES];
  pm_t  pm_out [NSTATES];
  pm_t  want [NSTATES];
  int checks = 0, failures = 0;

  state_metric_storage dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int s = 0; s < NSTATES; s++) begin
      checks++;
      if (pm_out[s] != want[s]) begin
        failures++;
        $display("FAIL %s state %0d got %0d want %0d", what, s, pm_out[s], want[s]);
      end
    end
  endtask

  initial begin
    foreach (pm_in[s]) pm_in[s] = '0;
    @(posedge clk); @(posedge clk);
    #1;
    for (int s = 0; s < NSTATES; s++) want[s] = (s == 0) ? pm_t'(0) : pm_t'(1024 - 64);
    compare("reset");
    rst = 0;
    for (int i = 0; i < 50; i++) begin
      automatic bit ld = $urandom_range(0, 1);
      foreach (pm_in[s]) pm_in[s] = pm_t'($urandom);
      load = ld;
      @(posedge clk);
      #1;
      if (ld) want = pm_in;
      compare(ld ? "load" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
