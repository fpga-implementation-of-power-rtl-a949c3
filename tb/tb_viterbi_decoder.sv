// tb_viterbi_decoder: the decoder at its default size (64 states, D = 64) against the
// integer reference decoder of viterbi_ref_pkg, bit for bit.
//
// Random frames of D bits, each ending in six zeros, are encoded, turned into soft
// levels (+3 for 0, -3 for 1), disturbed by random noise strong enough to flip some
// hard decisions, and quantized to 3-bit codes. Symbols are offered back to back
// except for one pause in the middle. Checked: every decoded bit against the
// reference, the decoded data against the transmitted data, one accepted symbol per
// two cycles, a first-bit latency of 3*D + 1 cycles, and gap-free output (one bit
// every two cycles) while the input runs back to back.
module tb_viterbi_decoder;
  import viterbi_pkg::*;
  import viterbi_ref_pkg::*;

  localparam int D = 64;
  localparam int FRAMES = 24;
  localparam int N = FRAMES * D;
  localparam int PAUSE_AT = 10 * D + 17;   // stage before which the input pauses

  logic  clk = 0, rst = 1, in_valid = 0;
  soft_t g1_code = 0, g0_code = 0;
  logic  in_ready, dec_out, out_en, wr_bank, sleep;
  int checks = 0, failures = 0;

  viterbi_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit data[], c1[], c0[], ref_out[];
  bit [2:0] s1[], s0[];
  int cycle = 0, accepted = 0, outputs = 0, first_acc = -1, first_out = -1;
  int last_acc = -1, last_out = -1, chan_err = 0, data_err = 0, ref_err = 0;
  int sleep_cycles = 0, gap_ok = 0;
  bit paused = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  function automatic bit [2:0] noisy(input bit b);
    int lvl = b ? -3 : 3;
    if ($urandom_range(0, 3) == 0) lvl += int'($urandom_range(0, 8)) - 4;
    return ref_code_of(lvl);
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      cycle <= cycle + 1;
      if (sleep) sleep_cycles++;
      if (in_valid && in_ready) begin
        if (first_acc < 0) first_acc = cycle;
        if (last_acc >= 0 && !paused) check(cycle - last_acc >= 2, "at most one symbol per 2 cycles");
        last_acc = cycle;
        accepted++;
      end
      if (out_en) begin
        if (first_out < 0) begin
          first_out = cycle;
          check(cycle - first_acc == 3 * D + 1, $sformatf("latency %0d", cycle - first_acc));
        end else if (outputs < (PAUSE_AT / D) * D) begin
          check(cycle - last_out == 2, "continuous output");
          gap_ok++;
        end
        if (outputs < N) begin
          check(dec_out == ref_out[outputs], $sformatf("bit %0d vs reference", outputs));
          if (dec_out != data[outputs]) data_err++;
          if (ref_out[outputs] != data[outputs]) ref_err++;
        end else check(0, "extra output");
        last_out = cycle;
        outputs++;
      end
    end
  end

  initial begin
    data = new[N];
    foreach (data[i]) data[i] = (i % D < D - 6) ? 1'($urandom_range(0, 1)) : 1'b0;
    ref_encode(data, c1, c0);
    s1 = new[N];
    s0 = new[N];
    foreach (data[i]) begin
      s1[i] = noisy(c1[i]);
      s0[i] = noisy(c0[i]);
      if ((ref_level(s1[i]) < 0) != c1[i]) chan_err++;
      if ((ref_level(s0[i]) < 0) != c0[i]) chan_err++;
    end
    ref_decode(s1, s0, D, ref_out);

    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      if (i == PAUSE_AT) begin
        in_valid = 0; paused = 1;
        repeat (37) @(negedge clk);
      end
      in_valid = 1; g1_code = s1[i]; g0_code = s0[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      paused = 0;
    end
    in_valid = 0;
    wait (outputs == N);
    repeat (4 * D) @(posedge clk);
    check(outputs == N, "output count");
    check(accepted == N, "accepted count");
    check(chan_err > 0, "channel produced hard-decision errors");
    check(data_err == 0, "all channel errors corrected");
    check(sleep_cycles > 0, "traceback slept");
    check(gap_ok > 0, "continuous output observed");
    $display("channel errors=%0d decoded errors=%0d reference errors=%0d latency=%0d sleep=%0d",
             chan_err, data_err, ref_err, first_out - first_acc, sleep_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
