# Low-latency soft-decision Viterbi codec, K = 7, rate 1/2

This is a forward-error-correction pair for the widely used constraint-length-7,
rate-1/2 convolutional code. Its generators are G1 = 1111001 and G0 = 1011011, which are
171/133 in octal. The transmit side is a six-cell shift-register encoder. The receive side
is a 64-state Viterbi decoder. It takes 3-bit soft decisions and decodes them frame by
frame.

The decoder aims at low power and low latency. It does this by how it manages the
survivor memory:

- There are only two memory banks.
- One read pointer traces back a full bank at twice the speed the other bank is being
  written.
- The read pointer sleeps for the rest of the time.
- Each traceback starts from a known state, state 0, so every column read produces a
  decoded bit. There is no separate "convergence" pass.

The first decoded bit appears 3D/2 trellis-stage times after the first symbol. D is the
number of trellis stages per bank, 64 by default. After that the output runs without gaps.

Throughput is one decoded bit per two clocks: 48.5 Mbit/s at 97 MHz.

## The one constraint a user must respect: frames end in state 0

The decoder treats every 64 consecutive trellis stages (one bank) as a frame. It starts the
traceback of each frame in state 0. So the transmitter must return the encoder to state 0
at the end of every frame: **the last six of every 64 data bits must be zeros**. That leaves
58 information bits per frame.

The encoder in this RTL does not insert these tail bits itself. The data source does.
Frames follow each other with no gaps, and the path metrics carry over from one frame to
the next. If a frame does not end in state 0, its last bits are decoded along the wrong
path.

## Trellis conventions

A state is the content of the six delay cells. Bit 5 holds the newest bit and bit 0 the
oldest. With input `u`, state `s` moves to `{u, s[5:1]}`. So present states `2j` and `2j+1`
both lead to next states `j` and `j+32`. These four branches form one *butterfly*.

Both generators tap the input and the oldest cell. As a result:

- The two "straight" branches (`2j -> j` and `2j+1 -> j+32`) expect the same code pair.
- The two "crossing" branches expect its complement.

For butterfly 0 these are 00 and 11.

`viterbi_pkg::branch_code(s, u)` computes the expected pair `{g1, g0}` from the
polynomials. `acs_unit` evaluates it at elaboration time to route branch metrics to each
of its 32 butterflies.

## Soft symbols and branch metrics

Each received code bit is quantized to a 3-bit code. The code is read as a signed level:

| code | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|------|-----|-----|-----|-----|-----|-----|-----|-----|
| level | +3 | +2 | +1 | 0 | -1 | -2 | -3 | -4 |

A positive level means "probably 0". `soft_quantizer` maps a signed 8-bit sample with
4 fraction bits (one level per 16 LSB) to this code:
`level = floor(sample / 16)`, clamped to -4..+3.

The branch metric is a correlation, so larger is better. For an expected pair `{x, y}` it
is `(x ? -L1 : L1) + (y ? -L0 : L0)`, which gives four values, BM_00 to BM_11, in -8..+8.

Example: weak 1 (100) and strong 0 (000) give BM_00 = 2, BM_01 = -4, BM_10 = 4 and
BM_11 = -2. The transmitted pair, 10, scores highest.

## Add-compare-select and path metrics

`acs_unit` instantiates 32 `acs_butterfly` blocks. All 64 states are updated in the cycle
a symbol is accepted.

Each butterfly works as follows:

- Four adders form the candidate metrics.
- Two comparators keep the larger candidate for each next state.
- Each comparator emits a decision bit: 0 when the upper (even) predecessor wins, and 1
  when the lower (odd) predecessor wins or the two are equal.

The 64 decision bits form the stage's *survivor vector*.

Path metrics are 10 bits wide and are never rescaled. They are compared by the sign of
their modulo-1024 difference. This works because the metrics of a K = 7 code with these
branch metrics never spread by more than about 6 x 16 + 16. That is far below 512.
(Simulation with structureless input shows that 8 bits would already be enough.)

`state_metric_storage` holds the 64 metrics. At reset, state 0 gets metric 0 and every
other state gets -64, so decoding starts from state 0.

## Survivor memory and the one-pointer traceback

`survivor_memory` has two banks, each D = 64 columns of 64 bits. Each bank maps onto one
FPGA block RAM. There is one write port and one synchronous read port.

`traceback_unit` runs the two pointers:

- **Write pointer.** It writes the survivor vector of each stage into the next column of
  the current bank. After column D-1 it switches to the other bank. Filling a bank ends a
  frame.
- **Decode-read pointer.** It starts the cycle after a bank fills. It walks that bank from
  column D-1 down to column 0, one column per clock. A stage lasts two clocks, so this is
  twice the write speed: the bank is finished after D/2 stage times.
- **Sleep.** The read pointer then sleeps, issuing no memory reads, until the other bank is
  full.

Timeline, in stage times, for back-to-back input:

| time      | bank A                | bank B                |
|-----------|-----------------------|-----------------------|
| 0 .. D    | written (frame n)     | read, then asleep     |
| D .. 3D/2 | read (frame n)        | written (frame n+1)   |
| 3D/2 .. 2D| asleep                | written (frame n+1)   |
| 2D .. 5D/2| written (frame n+2)   | read (frame n+1)      |

The traceback state starts at 0 for every frame. For each column read:

- The decoded bit is `s[5]`, the input that entered state `s`.
- The predecessor state is `{s[4:0], d}`, where `d` is bit `s` of the column.

The column address does not depend on the state; only the bit select does. So the
synchronous read can be issued one cycle ahead, and one column is retired every clock.
Decoded bits come out last first, one per clock.

Two assertions guard the schedule:

- No bank is refilled while it is still being read.
- The write pointer never enters the bank under traceback.

## FILO output and timing

`filo_buffer` reverses each frame:

- The backward-decoded bits are pushed into a 64-bit first-in last-out register.
- With the frame's last push, the whole register moves into an output register.
- The output register releases the bits in transmission order.

The output register is needed because the next frame is decoded during the last D/2 stage
times in which the current frame is still leaving.

`viterbi_decoder` pops one bit every two clocks onto `dec_out`/`out_en`. The timing is
exact when symbols are offered back to back:

- symbol `i` is accepted in cycle `2i`;
- the write of column 63 happens in cycle 126;
- the bank is read in cycles 127..190 and the bits are pushed in cycles 128..191;
- the first decoded bit is valid (`out_en` high) in **cycle 193 = 3D + 1**;
- after that, one bit follows every two cycles, without gaps, because each following
  frame is handed over exactly when the previous one has left.

If the input pauses, the output keeps its pace until the buffered frame is empty.

## Interfaces

`viterbi_top` (parameters `D = 64`, `SAMPLE_W = 8`, `FRAC_W = 4`) contains the encoder
and the decoder side by side. The channel between them is left to the user.

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst` | in | clock; synchronous active-high reset (encoder and trellis go to state 0) |
| `en_gen`, `enc_in` | in | encode `enc_in` this cycle |
| `enc_g1`, `enc_g0`, `enc_valid` | out | code bits, one cycle after `en_gen` |
| `rx_valid`, `rx_g1`, `rx_g0` | in | received samples, signed, 0 -> positive, nominal +/-56 |
| `rx_ready` | out | the pair is taken when `rx_valid && rx_ready`; high at most every other cycle |
| `dec_out`, `out_en` | out | decoded bit and its valid |
| `wr_bank`, `sleep` | out | status: bank being written; traceback read pointer idle |

`viterbi_decoder` has the same receive interface but takes 3-bit codes (`g1_code`,
`g0_code`) instead of samples. Its parameter `CLK_PER_STAGE` (2) sets the clocks per
trellis stage.

## Files

| file | content |
|------|---------|
| `rtl/viterbi_pkg.sv` | constants, types, `branch_code`, `soft_level`, `pm_greater` |
| `rtl/viterbi_top.sv` | encoder + quantizers + decoder |
| `rtl/conv_encoder.sv` | K = 7 encoder |
| `rtl/soft_quantizer.sv` | sample to 3-bit soft code |
| `rtl/viterbi_decoder.sv` | decoder integration, input/output pacing |
| `rtl/branch_metric_unit.sv` | four branch metrics |
| `rtl/acs_unit.sv`, `rtl/acs_butterfly.sv` | 32 butterflies |
| `rtl/state_metric_storage.sv` | 64 path metric registers |
| `rtl/survivor_memory.sv` | two banks of survivor vectors |
| `rtl/traceback_unit.sv` | write pointer, decode-read pointer, traceback |
| `rtl/filo_buffer.sv` | frame reversal and output register |
| `tb/viterbi_ref_pkg.sv` | reference encoder and integer-metric reference decoder |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every module has a self-checking testbench. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models in
`tb/viterbi_ref_pkg.sv` share no code with the RTL:

- the encoder is written from tap lists;
- the decoder uses unbounded integer metrics and explicit predecessor enumeration.

What the testbenches cover:

- **`tb_viterbi_top`** runs the whole codec at default parameters. The test stream is
  20 frames of random data with zero tails. The channel adds noise to an antipodal signal
  (about 0.6 % hard-decision errors). The test checks:
  - the encoder output;
  - every decoded bit against the reference decoder;
  - the decoded data against the source, which must be error-free;
  - the 193-cycle latency and the 2-cycle output spacing.

  It also counts bank switches, sleep periods, input stalls, an input pause and frame
  handovers. Each of these must happen at least once.
- **`tb_viterbi_decoder`** does the same on the decoder alone, with 3-bit codes and
  24 frames.
- **`tb_viterbi_decoder_stress`** feeds the decoder input with no code structure: random
  codes, long runs of the strongest 0 or 1, and strong/erased mixtures. It compares the
  decoder bit for bit with the unbounded-integer reference. This is the test of the
  modulo path metrics. It fails with 7-bit metrics and passes with 8 bits, so the 10 bits
  used leave a margin.
- **`tb_traceback_unit`** builds survivor vectors around a known path with random
  off-path bits and random stage spacing. It checks the write addresses, the decoded bits,
  `push_last`, the exact push timing and sleep.
- The remaining testbenches cover each module exhaustively or with random vectors:
  - all 256 samples of the quantizer;
  - all 64 code pairs of the branch metric unit;
  - ties and wrap-around in the butterfly;
  - full ACS stages;
  - reset values of the metric storage;
  - memory read latency;
  - FILO order, including a handover in the same cycle as the last pop.

To simulate, for example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_viterbi_top \
  -y rtl -y tb +libext+.sv rtl/viterbi_pkg.sv tb/viterbi_ref_pkg.sv tb/tb_viterbi_top.sv
./obj_dir/Vtb_viterbi_top
```

Any other testbench runs the same way with its own name. The simulations take a few
seconds.

## Where this RTL makes its own choices

The following are not fixed by the underlying description. They are decisions of this
implementation:

- **D = 64.** The frame length and bank depth follow from the 64-bit FILO register; no
  traceback depth is stated otherwise.
- **Latency.** A published board measurement of this architecture shows 222 clock cycles
  from the first input to the first output (4.44 us at 50 MHz). This RTL has 193 cycles:
  3D/2 stage times plus one output register. The additional 29 cycles of that measurement
  are not accounted for and are not reproduced.
- **Branch metric.** Soft correlation with maximum selection. One passage of the
  description mentions Hamming distances computed by XOR (hard decision). It was not
  followed, because the rest of the design, and its classification as a soft-decision
  decoder, uses correlation metrics.
- **Quantizer.** The thresholds, the sample format and the reset values are this design's
  own choices.
- **Path metrics.** The modulo path metrics (10 bits) are this design's own choice.
- **Handshake.** The `in_valid`/`in_ready` handshake is this design's own choice.
- **FILO output register.** The second register behind the FILO is this design's own
  choice.
- **Tail bits.** Tail-bit insertion is left to the data source. How the described system
  terminates frames is not stated.
- **Not built:**
  - the register-exchange survivor method, which is discussed only as the higher-power
    alternative;
  - traceback from the best-metric state ("sliding window");
  - the board's test-data and noise generators, whose behaviour is not described. The
    testbench channel stands in for them.
- **Timing closure.** Clock frequency was not evaluated. The ACS update is a single
  combinational stage from the received symbol to the metric registers. A design aiming
  at 100 MHz or more may want to register the branch metrics first. That changes the
  latency by one cycle.

## Changing the design

- **Frame length / traceback depth.** Change `D` on `viterbi_top` or `viterbi_decoder`.
  It must be at least 8 (simulated at 16 and 64). The tail rule then becomes "six zeros at the end of
  every D bits", and the latency becomes 3D + 1.
- **Code.** Change `K`, `G1` and `G0` in `viterbi_pkg`. The butterfly pairing assumes both
  polynomials tap the input and the oldest cell, as all good rate-1/2 codes do.
  `PM_W` must grow with K.
- **Sample format.** Change `SAMPLE_W`/`FRAC_W`. A clean symbol should sit near +/-3.5
  levels.
