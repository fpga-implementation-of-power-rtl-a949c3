// filo_buffer: first-in last-out reversal of the decoded bits of one frame.
//
// The traceback produces the bits of a frame from the last to the first. They are
// pushed into a D-bit stack register; with the frame's final push (push_last) the
// whole stack is moved into an output register, from which the bits are popped in the
// reverse order of pushing, i.e. in the order they were encoded. The output register
// frees the stack for the next frame while the current one is still being emitted. A
// D-bit (64-bit) FILO register follows the original architecture; the second, output register is this
// implementation's choice, needed because the next frame is decoded before the current
// one has fully left.
//
// Interface: push/din/push_last write the stack at the clock edge. avail is high while
// the output register holds bits; dout is the next bit, and pop removes it at the edge.
module filo_buffer #(
  parameter int unsigned D     = 64,
  parameter int unsigned CNT_W = $clog2(D + 1)
) (
  input  logic clk,
  input  logic rst,
  input  logic push,
  input  logic din,
  input  logic push_last,
  input  logic pop,
  output logic dout,
  output logic avail
);

  logic [D-2:0]     stack;     // the D-th bit of a frame goes straight to obuf
  logic [D-1:0]     obuf;
  logic [CNT_W-1:0] ocount;

  always_ff @(posedge clk) begin
    if (rst) begin
      stack  <= '0;
      obuf   <= '0;
      ocount <= '0;
    end else begin
      if (push) stack <= {stack[D-3:0], din};
      if (push && push_last) begin
        obuf   <= {stack, din};
        ocount <= CNT_W'(D);
      end else if (pop && avail) begin
        obuf   <= {1'b0, obuf[D-1:1]};
        ocount <= ocount - 1'b1;
      end
    end
  end

  assign avail = (ocount != '0);
  assign dout  = obuf[0];

  // A new frame may only arrive once the previous one has left (or leaves now).
  a_no_overwrite: assert property (@(posedge clk) disable iff (rst)
    (push && push_last) |-> (ocount == '0 || (ocount == CNT_W'(1) && pop)));

endmodule
