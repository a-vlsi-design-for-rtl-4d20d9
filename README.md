# Systolic trace-back Viterbi decoder

A Viterbi decoder has to do two things for every received code frame: pick,
for every trellis state, the best path that ends there (add-compare-select),
and follow the best path backwards far enough that its oldest bit can be
trusted (trace-back). A plain trace-back decoder stores the survivor
decisions for a whole window and then spends about one clock per window
step walking back through them, so each decoded bit costs a window's worth
of cycles.

This design turns the trace-back into a systolic pipeline. The survivor
decisions move down a chain of registers one stage per time unit, while the
state being traced moves down the same chain two stages per time unit.
Because the traced state overtakes the decisions at a relative speed of one
stage per time unit, it meets exactly the decision vector it needs for the
next backward step at every stage. Every clock the pipeline takes one new
frame, advances every trace-back in flight by one step, and emits one
decoded bit. No controller and no memory addressing are involved: all
connections are to the next stage.

The default configuration decodes the rate-1/2, constraint-length-3
convolutional code with generators G(x) = (x^2+x+1, x^2+1), hard decisions,
a decoding window of L = 10 time units and 19 trace-back stages. The
encoder for that code is included.

## The code and its states

The encoder (`conv_encoder`) is a two-stage shift register A = (A1, A0),
two modulo-2 adder trees and a two-way output multiplexer:

    v1 = u ^ A1 ^ A0     (x^2 + x + 1, sent first)
    v2 = u ^ A0          (x^2 + 1)
    A  <= {u, A1}

A state is written as the bit vector {A1, A0}, newest input bit first, so
state S_k has k = 2*A1 + A0: S2 is `10`, S1 is `01`. Input bit u takes state
{a1, a0} to {u, a1}. Two facts follow that the whole decoder rests on:

* The first (most significant) bit of a state is the information bit that
  produced it. Decoding a time unit means knowing the survivor state at
  that time unit and reading its first bit.
* The state {u, b} has exactly two predecessors, {b, 0} and {b, 1}. They
  differ only in their last bit, which is lost from the shift register on
  the transition. Storing that one bit, y(k), for every state is enough to
  step backwards: the previous state is the current state without its first
  bit, followed by y(k). This step is written DMSB(X) * y(X) below.

For example, the message 0,0,1,0,1,0,0,0,1,1,0,1,0,0,1,0,0,1,1,0 encodes to
00,00,11,10,00,10,11,00,11,01,01,00,10,11,11,10,11,11,01,01; the testbenches
use this pair, and a received version of it with four bit errors, as a
fixed reference.

## Selection unit: choosing survivors

`selection_unit` holds one survivor metric P(k) per state, the number of bit
disagreements along the best path into S_k. For every time unit and every
state k = {u, b}, in parallel:

    c0 = P({b,0}) + hamming(r, frame({b,0} -> k))
    c1 = P({b,1}) + hamming(r, frame({b,1} -> k))
    P'(k) = min(c0, c1)        y(k) = 1 if c1 < c0, else 0

It also finds m, the state with the smallest new metric, from which the
trace-back starts. The decision vector y (one bit per state) and m are
combinational outputs; the first path unit registers them in the same
clock edge that stores P'.

Choices made here:

* **Ties.** Between two equal entering paths the one from the predecessor
  with last bit 0 wins. Among states with equal smallest metric the
  highest-numbered one is taken as m. Both rules reproduce the reference
  example exactly (decision vectors and the chosen start states).
* **Metric growth.** Metrics are W = 6-bit saturating values. After each
  update the smallest new metric is subtracted from all of them. A common
  offset changes no comparison, and for this code the normalised spread
  stays at a few units, far below 63.
* **Start state.** Reset loads P(S0) = 0 and every other metric with the
  all-ones value, which stands for infinity: the encoder starts in S0, so
  other states are unreachable until a path from S0 enters them.
* **Erased time units.** With `erase` high all branch metrics are zero, so
  the unit just extends the existing survivors. The decoder uses this to
  flush its pipeline after the last received frame.

## Systolic trace-back

This is the part worth reading slowly.

The trace-back array is a chain of `path_unit`s numbered 1 to 2L-1. Every
unit has a 2^M-bit register Y_i; odd-numbered units also have an M-bit state
register X_i. On each time unit t:

    Y_1     <= y_t                      (decisions of time unit t)
    Y_i     <= Y_{i-1}                  (i = 2 .. 2L-1)
    X_1     <= m_t                      (best state at time unit t)
    X_{i+2} <= DMSB(X_i) * Y_i[X_i]     (odd i)
    Z       <= first bit of X_{2L-1}

Follow one trace-back, the one that starts at time unit t. At time unit t,
X_1 receives m_t, the state at time t, and Y_1 receives y_t. One time unit
later X_1 and Y_1 are combined into the state at time t-1, which goes to X_3.
In the meantime y_t has moved to Y_2 and y_{t-1} has moved into Y_3. So at
time unit t+1, X_3 holds the state at time t-1 and Y_3 holds y_{t-1}: exactly
the pair needed for the next step. In general, at time unit t+n,

    X_{2n+1} = survivor state at time t-n  (traced from m_t)
    Y_{2n+1} = y_{t-n}

so every odd unit performs one backward step of a different trace-back, and
2L-1 = 19 units hold L = 10 trace-backs in flight, each at a different depth.
X_{2L-1} holds the state L-1 steps back, at the first time unit t-L+1 of the
window; its first bit is the information bit of that time unit, and it is
loaded into Z at time unit t+L.

Timing that follows from this: the bit of time unit j leaves at time unit
j + 2L - 1. The first valid bit (j = 1) comes out at time unit 2L = 20, then
one bit per time unit. Compared with a block trace-back, the y storage
roughly doubles (19 x 4 = 76 bits instead of 10 x 4 = 40, plus 10 two-bit
state registers), because each decision vector must stay available while
trace-backs started up to L time units later pass it.

Two options are built in, both parameters of `systolic_viterbi_decoder` and
the top:

* **`REDUCED = 1`: shorter array.** Since each step only shifts the state
  left and appends one bit, the first bit of X_{2L-1} is already present as
  the last bit of X_{2(L-M)+1}, M-1 time units earlier. Z takes it from there,
  and the last 2(M-1) path units disappear: 17 units instead of 19 for the
  default code, and the first bit comes out at time unit 19 instead of 20.
  The decoded stream is identical.
* **`TRACE_FROM_BEST = 0`: start from a fixed state.** With a window of 5M
  time units all survivors have very probably merged by the end of the
  window, so any start state gives the same result with high probability.
  X_1 then always takes S0 and the smallest-metric search becomes
  unnecessary (it stays in the selection unit but is not used).

## Interfaces and timing

All logic is on one clock, `clk`, with a synchronous active-low reset
`rst_n`.

`systolic_viterbi_decoder` (and the `dec_*` ports of the top):

| port | dir | width | meaning |
|---|---|---|---|
| `r` | in | 2 | received frame, `r[1]` is the first code bit |
| `r_valid` | in | 1 | `r` holds a frame; this clock is one time unit |
| `flush` | in | 1 | time unit with no received data (erased frame) |
| `z` | out | 1 | decoded bit (register Z) |
| `z_valid` | out | 1 | one-cycle pulse after each time unit that produced a valid bit |
| `best_state` | out | M | smallest-metric state of the current time unit |
| `metric` | out | 2^M x W | survivor metrics, normalised |

A time unit may be issued on every clock. To recover the last bits of a
message, issue 2L-1 = 19 flush time units after the last frame (one fewer
with `REDUCED = 1`); the output keeps coming at one bit per time unit.

`conv_encoder` (the `enc_*` ports of the top) runs at the code-bit rate. It
takes an information bit when `u_valid` and `u_ready` are high (at most every
second clock), shows the new frame on `v` from the next clock, and puts its
two bits out on `ser_bit` in consecutive clocks, with `ser_first` marking
the first.

`viterbi_codec_top` places the encoder and the decoder side by side with
separate ports; the channel lies between them. To loop them back, pair two
consecutive `enc_ser_bit` values (or use `enc_v`) and present them on `dec_r`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M` | 2 | encoder memory; 2^M trellis states |
| `G0`, `G1` | `3'b111`, `3'b101` | generator taps over {u, A_{M-1} .. A_0}; G0 gives the first code bit |
| `W` | 6 | metric width (own choice) |
| `L` | 5M = 10 | decoding window; the array has 2L-1 path units |
| `REDUCED` | 0 | drop the last M-1 trace-back steps (see above) |
| `TRACE_FROM_BEST` | 1 | start trace-backs at the smallest-metric state, else at S0 |

Other codes of rate 1/2 work by changing `M`, `G0` and `G1` (the testbenches
also run the memory-3 code with octal generators 15 and 13, window 15).
Rates other than 1/2 and soft decisions are not supported. For larger `M`
check that `W` leaves room for the normalised metric spread.

## Where this departs from the original description

The add-compare-select internals, the metric width and normalisation, the
tie rules, the valid/ready handshake of the encoder, the `r_valid`/`flush`
time-unit strobes, `z_valid` and the reset values are this design's own;
the original only states what the selection unit computes. Further points:

* Trace-back registers are never gated by "time unit at least 5M". They
  always shift; `z_valid` simply stays low until the first bit whose
  trace-back started at time unit L or later reaches Z, which gives the same
  output stream.
* In the full array the last Y register, Y_{2L-1}, is never read. It is kept
  because the structure has it; synthesis removes it.
* In the reference example one listed decision vector (time unit 6) has a 0
  for state S3 where the metric recursion gives 1 (from S3 with metric 2
  against 4 from S2). The hardware follows the recursion; the traced path
  of the example does not use that entry and the decoded message is
  unchanged.
* A published walk-through of the first window's trace-back lists the
  states at time units 3 and 2 as 01 and 10; applying the step rule to the
  decision vectors gives 10 and 00, which is also the encoder's real state
  sequence. The hardware follows the step rule; the decoded bit is 0 either
  way, and the testbench checks every X register of both example windows
  against the step rule.
* The reduced form is described for the default code by dropping Y_18, Y_19
  and X_19 and taking Z from the last bit of X_17. Here it is generalised to
  any M as Z taking the last bit of X_{2(L-M)+1}.

## Verification

Each testbench checks against values computed independently of the RTL:
the known example code word and message, or `tb/viterbi_ref_pkg.sv`, a
behavioural decoder with unbounded integer metrics and a plain block
trace-back over a stored decision history. Each ends by printing
`TB_RESULT checks=N failures=F`.

| testbench | what it covers |
|---|---|
| `tb_conv_encoder` | example code word, 400 random bits with gaps, one code bit per clock |
| `tb_selection_unit` | example decision vectors, metrics and best states; 400 random time units (some erased) for the default and a memory-3 code |
| `tb_path_unit` | register transfers and the DMSB(X)*Y[X] step, odd/even/memory-3 units |
| `tb_systolic_viterbi_decoder` | default, reduced, fixed-start and memory-3 decoders: example message recovered through 4 channel errors, state registers X_1..X_19 checked for the first two windows; 600 random bits through a 3% bit-error channel; every output bit and its time unit checked |
| `tb_viterbi_codec_top` | encoder to channel to three top-level variants, 500 bits; counts that every mechanism (both survivor choices, non-zero best state, renormalisation, unreachable start states, flush, channel errors, each variant's output) occurs |
| `tb_viterbi_codec_full` | the default top, untouched: encode the example, decode its corrupted version, first bit at time unit 20, final metrics |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
        rtl/viterbi_pkg.sv tb/viterbi_ref_pkg.sv tb/tb_viterbi_codec_top.sv \
        --top-module tb_viterbi_codec_top -o sim
    ./obj_dir/sim

Every testbench runs in well under a second. Lint with
`verilator --lint-only -Wall -y rtl rtl/viterbi_pkg.sv rtl/viterbi_codec_top.sv`.
The remaining warnings are unused parameters of the package and the unused
last Y register described above.

## Files

* `rtl/viterbi_pkg.sv`: default code constants and the 2-bit Hamming weight
* `rtl/conv_encoder.sv`: encoder with output multiplexer
* `rtl/selection_unit.sv`: add-compare-select, minimum search, metrics
* `rtl/path_unit.sv`: one trace-back stage (Y, optional X, trace step)
* `rtl/systolic_viterbi_decoder.sv`: selection unit, path-unit chain, Z
* `rtl/viterbi_codec_top.sv`: encoder and decoder side by side
* `tb/`: the testbenches above and the reference model package
