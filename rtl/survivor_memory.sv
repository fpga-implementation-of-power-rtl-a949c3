// survivor_memory: the survivor memory unit, two banks of D columns.
//
// Each column holds the 64-bit survivor (decision) vector of one trellis stage. Two
// separate banks of D columns each are used, so that one bank can be filled by the ACS
// stage while the other is read by the traceback; each bank maps onto one block RAM.
// The two-bank organisation and the bank size follow the original architecture; one write port and
// one synchronous read port shared by both banks are this implementation's choice.
//
// Interface: a write (we, wbank, wcol, wdata) is stored at the rising edge. A read
// (re, rbank, rcol) returns rdata one cycle later; rdata holds its value while re is
// low, so an idle reader toggles nothing.
module survivor_memory
  import viterbi_pkg::*;
#(
  parameter int unsigned D     = 64,               // columns per bank (traceback depth)
  parameter int unsigned COL_W = $clog2(D)
) (
  input  logic               clk,
  input  logic               we,
  input  logic               wbank,
  input  logic [COL_W-1:0]   wcol,
  input  logic [NSTATES-1:0] wdata,
  input  logic               re,
  input  logic               rbank,
  input  logic [COL_W-1:0]   rcol,
  output logic [NSTATES-1:0] rdata
);

  logic [NSTATES-1:0] bank0 [D];
  logic [NSTATES-1:0] bank1 [D];

  always_ff @(posedge clk) begin
    if (we && !wbank) bank0[wcol] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (we && wbank) bank1[wcol] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= rbank ? bank1[rcol] : bank0[rcol];
  end

endmodule
