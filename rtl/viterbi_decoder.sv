// viterbi_decoder: K=7, rate-1/2, 64-state soft-decision Viterbi decoder.
//
// Data path, one trellis stage per received symbol pair:
//   branch_metric_unit  four correlation metrics from the two 3-bit soft codes;
//   acs_unit            32 butterflies produce 64 new path metrics and a 64-bit
//                       survivor vector, both in the cycle the symbol is accepted;
//   state_metric_storage  holds the path metrics between stages;
//   survivor_memory     two banks of D survivor vectors;
//   traceback_unit      one-pointer management: while one bank is written, the other
//                       is traced back from state 0 at twice the write speed;
//   filo_buffer         turns the backward-decoded bits of a frame forward again.
// This partitioning follows the original architecture.
//
// Framing: the decoder works frame by frame, a frame being the D stages that fill one
// bank. The traceback of every frame starts in state 0, so the transmitter must bring
// the encoder back to state 0 at the end of each frame (the last six information bits
// of every D-bit frame are zeros). Frames follow each other without gaps; the path
// metrics carry over from frame to frame.
//
// Rate and timing: a trellis stage lasts CLK_PER_STAGE = 2 clocks, so in_ready is high
// at most every other cycle and the throughput is half the clock rate. With symbols
// offered back to back, the first decoded bit appears (out_en high) 3*D + 1 cycles
// after the first symbol was accepted, i.e. 3D/2 stage times, and then one decoded
// bit follows every 2 cycles without gaps. Output bits are emitted at the same pace
// even if the input pauses. The two-clock stage, the 3D/2 latency and the continuous
// output follow the original architecture; the handshake (in_valid/in_ready) is this
// implementation's choice.
//
// Reset is synchronous and active high; it puts the trellis in state 0.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int unsigned D             = 64,   // traceback depth = frame = bank size
  parameter int unsigned CLK_PER_STAGE = 2     // clocks per trellis stage
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  soft_t g1_code,
  input  soft_t g0_code,
  output logic  in_ready,
  output logic  dec_out,
  output logic  out_en,
  output logic  wr_bank,   // survivor bank being written
  output logic  sleep      // traceback read pointer idle
);

  localparam int unsigned COL_W = $clog2(D);
  localparam int unsigned PCE_W = $clog2(CLK_PER_STAGE + 1);

  bm_vec_t            bm;
  pm_t                pm_cur [NSTATES];
  pm_t                pm_nxt [NSTATES];
  logic [NSTATES-1:0] decisions;
  logic               stage_valid;

  logic [PCE_W-1:0]   in_wait, out_wait;

  logic               mem_we, mem_wbank, mem_re, mem_rbank;
  logic [COL_W-1:0]   mem_wcol, mem_rcol;
  logic [NSTATES-1:0] mem_rdata;
  logic               push, push_bit, push_last;
  logic               filo_dout, filo_avail, pop;

  // input pacing: one stage every CLK_PER_STAGE clocks at most
  assign in_ready    = (in_wait == '0);
  assign stage_valid = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (rst)              in_wait <= '0;
    else if (stage_valid) in_wait <= PCE_W'(CLK_PER_STAGE - 1);
    else if (in_wait != '0) in_wait <= in_wait - 1'b1;
  end

  branch_metric_unit u_bmu (
    .g1_code (g1_code),
    .g0_code (g0_code),
    .bm      (bm)
  );

  acs_unit u_acs (
    .pm_in     (pm_cur),
    .bm        (bm),
    .pm_out    (pm_nxt),
    .decisions (decisions)
  );

  state_metric_storage u_sms (
    .clk    (clk),
    .rst    (rst),
    .load   (stage_valid),
    .pm_in  (pm_nxt),
    .pm_out (pm_cur)
  );

  survivor_memory #(.D(D)) u_smu (
    .clk   (clk),
    .we    (mem_we),
    .wbank (mem_wbank),
    .wcol  (mem_wcol),
    .wdata (decisions),
    .re    (mem_re),
    .rbank (mem_rbank),
    .rcol  (mem_rcol),
    .rdata (mem_rdata)
  );

  traceback_unit #(.D(D)) u_tbu (
    .clk         (clk),
    .rst         (rst),
    .stage_valid (stage_valid),
    .mem_we      (mem_we),
    .mem_wbank   (mem_wbank),
    .mem_wcol    (mem_wcol),
    .mem_re      (mem_re),
    .mem_rbank   (mem_rbank),
    .mem_rcol    (mem_rcol),
    .mem_rdata   (mem_rdata),
    .push        (push),
    .push_bit    (push_bit),
    .push_last   (push_last),
    .wr_bank     (wr_bank),
    .sleep       (sleep)
  );

  filo_buffer #(.D(D)) u_filo (
    .clk       (clk),
    .rst       (rst),
    .push      (push),
    .din       (push_bit),
    .push_last (push_last),
    .pop       (pop),
    .dout      (filo_dout),
    .avail     (filo_avail)
  );

  // output pacing: one decoded bit every CLK_PER_STAGE clocks
  assign pop = filo_avail && (out_wait == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_wait <= '0;
      out_en   <= 1'b0;
      dec_out  <= 1'b0;
    end else begin
      out_en <= pop;
      if (pop) begin
        dec_out  <= filo_dout;
        out_wait <= PCE_W'(CLK_PER_STAGE - 1);
      end else if (out_wait != '0) begin
        out_wait <= out_wait - 1'b1;
      end
    end
  end

endmodule
