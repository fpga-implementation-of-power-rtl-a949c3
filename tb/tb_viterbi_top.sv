// tb_viterbi_top: end-to-end test of the whole codec at its default size.
//
// A data source writes frames of D random bits, each ending in six zeros, into the
// encoder. Its code bits go through a testbench channel model: antipodal amplitude
// +/-56 (3.5 quantizer steps, 0 -> positive) plus noise made of four uniform terms
// (roughly Gaussian, sigma about 23), saturated to 8 bits. The noisy samples go back
// into the decoder side of the top, which paces them with rx_ready.
//
// Checked: every decoded bit against the reference decoder fed with independently
// quantized samples, the decoded data against the source, the first-bit latency
// (3*D + 1 cycles), and the rate (one bit per two cycles). Each mechanism of the
// design must occur at least once and is counted: channel errors that get corrected,
// survivor bank switches, traceback sleep periods, frame handovers through the FILO
// buffer (frames delivered), input stalls (rx_ready low while data waits) and a pause
// in the input stream.
module tb_viterbi_top;
  import viterbi_ref_pkg::*;

  localparam int D = 64;
  localparam int FRAMES = 20;
  localparam int N = FRAMES * D;
  localparam int PAUSE_AT = 7 * D + 5;

  logic clk = 0, rst = 1;
  logic en_gen = 0, enc_in = 0, enc_g1, enc_g0, enc_valid;
  logic rx_valid = 0, rx_ready, dec_out, out_en, wr_bank, sleep;
  logic signed [7:0] rx_g1 = 0, rx_g0 = 0;
  int checks = 0, failures = 0;

  viterbi_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic int noise();
    int v = 0;
    for (int k = 0; k < 4; k++) v += int'($urandom_range(0, 40)) - 20;
    return v;
  endfunction

  function automatic logic signed [7:0] channel(input bit b, input int n);
    int v = (b ? -56 : 56) + n;
    if (v > 127)  v = 127;
    if (v < -128) v = -128;
    return 8'(v);
  endfunction

  function automatic bit [2:0] quant(input int v);
    int lvl = (v >= 0) ? v / 16 : -((-v + 15) / 16);
    return ref_code_of(lvl);
  endfunction

  bit data[], ref_out[], c1[], c0[];
  int n1[], n0[];
  bit [2:0] s1[], s0[];
  logic signed [7:0] q1 [$], q0 [$];
  int produced = 0;
  int cycle = 0, first_acc = -1, first_out = -1, last_out = -1, outputs = 0;
  int chan_err = 0, data_err = 0, bank_switches = 0, sleep_periods = 0, stalls = 0;
  int gaps_ok = 0, pauses = 0;
  logic last_bank = 0, last_sleep = 1;

  // monitor
  always @(posedge clk) begin
    if (!rst) begin
      cycle <= cycle + 1;
      if (wr_bank != last_bank) bank_switches++;
      if (sleep && !last_sleep) sleep_periods++;
      last_bank <= wr_bank;
      last_sleep <= sleep;
      if (rx_valid && !rx_ready) stalls++;
      if (rx_valid && rx_ready && first_acc < 0) first_acc = cycle;
      if (out_en) begin
        if (first_out < 0) begin
          first_out = cycle;
          check(cycle - first_acc == 3 * D + 1, $sformatf("latency %0d", cycle - first_acc));
        end else if (outputs < (PAUSE_AT / D) * D) begin
          check(cycle - last_out == 2, "one bit every two cycles");
          gaps_ok++;
        end
        if (outputs < N) begin
          check(dec_out == ref_out[outputs], $sformatf("bit %0d vs reference", outputs));
          if (dec_out != data[outputs]) data_err++;
        end else check(0, "extra output");
        last_out = cycle;
        outputs++;
      end
    end
  end

  // source and encoder: keep a few symbols ahead of the decoder
  initial begin
    data = new[N];
    s1 = new[N];
    s0 = new[N];
    n1 = new[N];
    n0 = new[N];
    foreach (data[i]) begin
      data[i] = (i % D < D - 6) ? 1'($urandom_range(0, 1)) : 1'b0;
      n1[i] = noise();
      n0[i] = noise();
    end
    ref_encode(data, c1, c0);
    foreach (data[i]) begin
      s1[i] = quant(int'(channel(c1[i], n1[i])));
      s0[i] = quant(int'(channel(c0[i], n0[i])));
      if (c1[i] != (channel(c1[i], n1[i]) < 0)) chan_err++;
      if (c0[i] != (channel(c0[i], n0[i]) < 0)) chan_err++;
    end
    ref_decode(s1, s0, D, ref_out);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      while (q1.size() >= 4) @(negedge clk);
      en_gen = 1; enc_in = data[i];
      @(negedge clk);
      en_gen = 0;
      begin
        check(enc_valid && enc_g1 == c1[i] && enc_g0 == c0[i], "encoder output");
        q1.push_back(channel(enc_g1, n1[i]));
        q0.push_back(channel(enc_g0, n0[i]));
        produced++;
      end
    end
  end

  // receiver feed
  initial begin
    wait (!rst);
    for (int i = 0; i < N; i++) begin
      while (q1.size() == 0) @(negedge clk);
      if (i == PAUSE_AT) begin
        rx_valid = 0;
        repeat (29) @(negedge clk);
        pauses++;
      end
      rx_valid = 1; rx_g1 = q1.pop_front(); rx_g0 = q0.pop_front();
      @(posedge clk);
      while (!rx_ready) @(posedge clk);
      @(negedge clk);
      rx_valid = 0;
    end
  end

  initial begin
    wait (produced == N);
    wait (outputs == N);
    repeat (4 * D) @(posedge clk);
    check(outputs == N, "output count");
    check(chan_err > 0, "channel errors occurred");
    check(data_err == 0, "all channel errors corrected");
    check(bank_switches >= FRAMES - 1, "survivor banks alternated");
    check(sleep_periods >= FRAMES - 1, "traceback sleep periods");
    check(outputs / D == FRAMES, "frames handed over through the FILO");
    check(stalls > 0, "input stalls");
    check(pauses > 0, "input pause");
    check(gaps_ok > 0, "continuous output");
    $display("channel errors=%0d decoded errors=%0d bank switches=%0d sleep periods=%0d stalls=%0d frames=%0d latency=%0d",
             chan_err, data_err, bank_switches, sleep_periods, stalls, outputs / D, first_out - first_acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
