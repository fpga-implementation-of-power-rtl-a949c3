// traceback_unit: one-pointer survivor memory management and decode read.
//
// Write side: every trellis stage (stage_valid) the ACS survivor vector is written
// into column wcol of bank wr_bank; the write pointer runs from column 0 to D-1 and
// then moves to the other bank. Filling a bank ends a frame of D stages.
//
// Decode-read side: as soon as a bank is full, a single read pointer walks that bank
// from column D-1 back to column 0, one column per clock. Because a trellis stage
// lasts two clocks, the read pointer runs at twice the speed of the write pointer and
// finishes the bank in D/2 stage times; for the remaining D/2 stage times it sleeps
// (no memory reads) until the other bank is full. The traceback starts in state 0 at
// the end of the frame (the frame is assumed to end in state 0), so no separate
// traceback-read pass is made: every column read yields one decoded bit directly. In
// state s the decoded bit is s[5] (the input that entered s), and the predecessor is
// {s[4:0], d} where d is bit s of the column just read. Decoded bits come out last
// first and are pushed into the FILO buffer. The two banks, the double-speed single
// read pointer, the sleep period and the start in state 0 follow the original architecture; the exact
// cycle timing is this implementation's.
//
// Timing: the read of column c is issued in one cycle and its bit is pushed in the
// next (synchronous memory). The first column is read the cycle after the write of
// column D-1; push_last marks the bit of column 0, D cycles after that write.
// The memory write enable is stage_valid itself: every stage is written, so mem_we is
// a plain copy of that input.
module traceback_unit
  import viterbi_pkg::*;
#(
  parameter int unsigned D     = 64,
  parameter int unsigned COL_W = $clog2(D)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               stage_valid,   // a survivor vector is written this cycle
  // survivor memory ports
  output logic               mem_we,
  output logic               mem_wbank,
  output logic [COL_W-1:0]   mem_wcol,
  output logic               mem_re,
  output logic               mem_rbank,
  output logic [COL_W-1:0]   mem_rcol,
  input  logic [NSTATES-1:0] mem_rdata,
  // decoded bits, last bit of the frame first
  output logic               push,
  output logic               push_bit,
  output logic               push_last,     // this push is column 0 of the frame
  // status
  output logic               wr_bank,       // bank being written
  output logic               sleep          // read pointer idle
);

  logic [COL_W-1:0] wcol;
  logic             rd_busy;     // read pointer is issuing reads
  logic             rd_bank;
  logic [COL_W-1:0] rcol;
  logic             rd_pend;     // a read was issued last cycle
  logic             rd_pend_last;
  state_t           tb_state;
  logic             dbit;

  // write pointer
  always_ff @(posedge clk) begin
    if (rst) begin
      wcol    <= '0;
      wr_bank <= 1'b0;
    end else if (stage_valid) begin
      if (wcol == COL_W'(D - 1)) begin
        wcol    <= '0;
        wr_bank <= !wr_bank;
      end else begin
        wcol <= wcol + 1'b1;
      end
    end
  end

  assign mem_we    = stage_valid;
  assign mem_wbank = wr_bank;
  assign mem_wcol  = wcol;

  // decode read pointer
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_busy      <= 1'b0;
      rd_bank      <= 1'b0;
      rcol         <= '0;
      rd_pend      <= 1'b0;
      rd_pend_last <= 1'b0;
    end else begin
      rd_pend      <= rd_busy;
      rd_pend_last <= rd_busy && (rcol == '0);
      if (stage_valid && wcol == COL_W'(D - 1)) begin
        rd_busy <= 1'b1;                 // bank full: start decode read
        rd_bank <= wr_bank;
        rcol    <= COL_W'(D - 1);
      end else if (rd_busy) begin
        if (rcol == '0) rd_busy <= 1'b0; // back at the frame start: sleep
        else            rcol    <= rcol - 1'b1;
      end
    end
  end

  assign mem_re    = rd_busy;
  assign mem_rbank = rd_bank;
  assign mem_rcol  = rcol;
  assign sleep     = !rd_busy && !rd_pend;

  // decode: one bit per column read
  assign dbit      = mem_rdata[tb_state];
  assign push      = rd_pend;
  assign push_bit  = tb_state[M-1];
  assign push_last = rd_pend_last;

  always_ff @(posedge clk) begin
    if (rst)                                     tb_state <= '0;
    else if (stage_valid && wcol == COL_W'(D-1)) tb_state <= '0;   // frame ends in state 0
    else if (rd_pend)                            tb_state <= {tb_state[M-2:0], dbit};
  end

  // The read of a bank must finish before the write pointer comes back to it.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    !(stage_valid && wcol == COL_W'(D - 1) && (rd_busy || rd_pend)));
  a_no_collision: assert property (@(posedge clk) disable iff (rst)
    !(stage_valid && rd_busy && wr_bank == rd_bank));

endmodule
