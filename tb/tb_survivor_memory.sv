// tb_survivor_memory: fills both banks with random survivor vectors, then runs random
// interleavings of writes and reads and checks every read against a model array: the
// data appears one cycle after the read and holds while re is low.
module tb_survivor_memory;
  localparam int D = 64;

  logic clk = 0, we = 0, wbank = 0, re = 0, rbank = 0;
  logic [5:0]  wcol = 0, rcol = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] model [2][D];
  int checks = 0, failures = 0;

  survivor_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] expect_q;
    bit pend = 0;
    for (int b = 0; b < 2; b++)
      for (int c = 0; c < D; c++) begin
        we <= 1; wbank <= b[0]; wcol <= 6'(c); wdata <= {$urandom, $urandom};
        @(posedge clk);
        #1;
        model[wbank][wcol] = wdata;
      end
    we <= 0;
    for (int i = 0; i < 4000; i++) begin
      automatic bit w = 1'($urandom_range(0, 1)), r = 1'($urandom_range(0, 1));
      automatic int wb = $urandom_range(0, 1), wc = $urandom_range(0, D - 1);
      automatic int rb = $urandom_range(0, 1), rc = $urandom_range(0, D - 1);
      automatic logic [63:0] wd = {$urandom, $urandom};
      // the decoder never reads the column written in the same cycle
      if (w && r && wb == rb && wc == rc) w = 0;
      we <= w; wbank <= wb[0]; wcol <= 6'(wc); wdata <= wd;
      re <= r; rbank <= rb[0]; rcol <= 6'(rc);
      @(posedge clk);
      #1;
      if (r) begin expect_q = model[rb][rc]; pend = 1; end
      if (pend) begin
        checks++;
        if (rdata != expect_q) begin failures++; $display("FAIL read %0d", i); end
      end
      if (w) model[wb][wc] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
