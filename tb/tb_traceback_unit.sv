// tb_traceback_unit: the one-pointer survivor management on its own, with the survivor
// memory modelled in the testbench (one synchronous read port).
//
// Frames of D random bits, each ending in six zeros, define a trellis path. The survivor
// vector of every stage holds random bits except at the path's state, where it holds
// the correct predecessor bit, so a correct traceback from state 0 must retrace exactly
// that path. Checked: write addresses (column 0..D-1, then the other bank), the decoded
// bits (last of the frame first), push_last on column 0, the timing (first bit two
// cycles after the write of column D-1, then one bit per cycle), and that the read
// pointer sleeps between frames.
module tb_traceback_unit;
  localparam int D = 64;
  localparam int FRAMES = 12;

  logic        clk = 0, rst = 1, stage_valid = 0;
  logic        mem_we, mem_wbank, mem_re, mem_rbank;
  logic [5:0]  mem_wcol, mem_rcol;
  logic [63:0] mem_rdata, wdata;
  logic        push, push_bit, push_last, wr_bank, sleep;
  logic [63:0] mem [2][D];
  int checks = 0, failures = 0;
  int cycle = 0;

  traceback_unit dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (mem_we) mem[mem_wbank][mem_wcol] <= wdata;
    if (mem_re) mem_rdata <= mem[mem_rbank][mem_rcol];
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  // expected pushes
  bit exp_bit [$];
  bit exp_last [$];
  int frame_end [$];
  int wr_seen = 0, pushes = 0, sleep_cycles = 0, bank_switches = 0;
  logic last_wr_bank = 0;

  always @(posedge clk) begin
    if (!rst) begin
      cycle <= cycle + 1;
      if (sleep) sleep_cycles++;
      if (wr_bank != last_wr_bank) bank_switches++;
      last_wr_bank <= wr_bank;
      check(mem_we == stage_valid, "write enable follows stage_valid");
      if (stage_valid) begin
        check(mem_wcol == 6'(wr_seen % D), "write column");
        check(mem_wbank == 1'((wr_seen / D) % 2), "write bank");
        if (wr_seen % D == D - 1) frame_end.push_back(cycle);
        wr_seen++;
      end
      if (push) begin
        if (exp_bit.size() == 0) check(0, "unexpected push");
        else begin
          check(push_bit == exp_bit.pop_front(), "decoded bit");
          check(push_last == exp_last.pop_front(), "push_last");
          check(frame_end.size() > pushes / D &&
                cycle == frame_end[pushes / D] + 2 + pushes % D, "push timing");
          pushes++;
        end
      end else begin
        check(!push_last, "push_last without push");
      end
      check(sleep == !(mem_re || push), "sleep flag");
    end
  end

  initial begin
    bit [5:0] st = '0;
    bit u [D];
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < FRAMES; f++) begin
      for (int t = 0; t < D; t++) u[t] = (t < D - 6) ? 1'($urandom_range(0, 1)) : 1'b0;
      for (int t = 0; t < D; t++) begin
        automatic bit [5:0] nst = {u[t], st[5:1]};
        automatic logic [63:0] v = {$urandom, $urandom};
        v[nst] = st[0];
        // gap of 1..3 idle cycles before each stage (2..4 clocks per stage)
        repeat ($urandom_range(1, 3)) @(posedge clk);
        stage_valid <= 1; wdata <= v;
        if (t == D - 1) begin
          for (int k = 0; k < D; k++) begin
            exp_bit.push_back(u[D - 1 - k]);
            exp_last.push_back(k == D - 1);
          end
        end
        @(posedge clk);
        stage_valid <= 0;
        st = nst;
      end
    end
    repeat (2 * D) @(posedge clk);
    check(exp_bit.size() == 0, "all frames decoded");
    check(pushes == FRAMES * D, "push count");
    check(sleep_cycles > 0, "read pointer slept");
    check(bank_switches >= FRAMES - 1, "bank switches");
    $display("pushes=%0d sleep_cycles=%0d bank_switches=%0d", pushes, sleep_cycles, bank_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
