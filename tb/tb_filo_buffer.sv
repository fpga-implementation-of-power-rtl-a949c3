// tb_filo_buffer: frames of D random bits are pushed and must pop out in reverse
// order. The next frame is pushed while the current one is still being popped, and
// its final push lands either after the output has emptied or in the very cycle of
// the last pop, the tightest case the decoder produces.
module tb_filo_buffer;
  localparam int D = 64;

  logic clk = 0, rst = 1, push = 0, din = 0, push_last = 0, pop = 0;
  logic dout, avail;
  int checks = 0, failures = 0;

  filo_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit frames [$][D];
  int popped = 0, same_cycle_loads = 0;

  // popper: one bit every 2 cycles while available, checked against the reversed frame
  always @(posedge clk) begin
    if (!rst && pop && avail) begin
      checks++;
      if (dout != frames[0][D - 1 - popped]) begin
        failures++;
        if (failures < 10) $display("FAIL frame bit %0d", popped);
      end
      popped = popped + 1;
      if (popped == D) begin frames.pop_front(); popped = 0; end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    checks++; if (avail) failures++;          // empty after reset
    for (int f = 0; f < 10; f++) begin
      bit fr [D];
      for (int i = 0; i < D; i++) fr[i] = 1'($urandom_range(0, 1));
      // wait until the output has at most D/2 bits left, then push quickly
      wait (!avail || dut.ocount <= D / 2);
      @(negedge clk);
      for (int i = 0; i < D; i++) begin
        // hold the final push until the output is empty or pops its last bit now
        if (i == D - 1) begin
          while (avail && !(dut.ocount == 1 && pop)) @(negedge clk);
          if (avail) same_cycle_loads++;
        end
        push = 1; din = fr[i]; push_last = (i == D - 1);
        if (i == D - 1) frames.push_back(fr);
        @(negedge clk);
        push = 0; push_last = 0;
      end
    end
    wait (frames.size() == 0);
    repeat (3) @(posedge clk);
    checks++; if (avail) failures++;          // empty at the end
    checks++; if (same_cycle_loads == 0) begin failures++; $display("FAIL no same-cycle load"); end
    $display("same_cycle_loads=%0d", same_cycle_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pop every other cycle
  always @(posedge clk) pop <= !rst && !pop;
endmodule
