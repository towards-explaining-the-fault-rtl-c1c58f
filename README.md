# Fault-sensitivity study vehicle: QDI dual-rail multipliers with interchangeable pipeline buffers

Clockless quasi-delay-insensitive (QDI) circuits tolerate any gate delay.
The price is that they are always listening. There is no clock edge that
samples data at one instant and ignores it for the rest of the cycle.
A short voltage pulse (a single-event transient, SET) that hits a wire at
the wrong moment can therefore be captured, turned into a wrong value or an
illegal code, or stop the handshake for good. How much of that happens
depends strongly on the pipeline buffer (half buffer) used between logic
stages.

This repository is synthesizable SystemVerilog for a family of circuits
built to compare those buffers:

* one 8×8-bit shift-and-add multiplier in dual-rail four-phase logic, in
  two organisations:
  * a **linear pipeline**: one partial product per stage;
  * an **iterative ring**: one shared stage, with a token that circulates
    eight times;
* five interchangeable **buffer styles**, selected by a parameter;
* **doubled-up, double-checking (DD)** versions of both multipliers, in
  which every buffer votes over two copies of the circuit;
* testbenches, including a small **fault-injection campaign**. It inverts
  one internal signal per run and sorts what reaches the output into
  effect classes.

Everything is clockless. The only storage is C-elements and, in one buffer
style, D latches.

## Dual-rail four-phase signalling

Each bit travels on two wires, a *true* rail `x_t` and a *false* rail
`x_f`:

| `x_t x_f` | meaning |
|-----------|---------|
| 10        | 1 |
| 01        | 0 |
| 00        | null (spacer) |
| 11        | illegal (only after a fault) |

A channel carries a word of such bits plus one acknowledge (`ack`) running
backwards. One transfer has four phases:

1. The sender raises one rail per bit. The word becomes a valid token.
2. The receiver's completion detector sees every bit valid and raises `ack`.
3. The sender lowers all rails (the spacer).
4. The receiver sees every bit null and lowers `ack`.

Every `ack` port in this design follows this convention: high means "I hold
data", low means "I am empty". A consumer-side `ack_in` therefore enables a
buffer when it is low.

**C-element** (`c_element`): the output follows the inputs when they all
agree and holds otherwise. It is written as a level latch (`always_latch`)
with an optional reset value. Every state-holding point of the design is
one.

**Completion detector** (`completion_detector`): an OR of the two rails of
each bit, followed by one wide C-element. It rises only when all bits are
valid and falls only when all are null.

**DIMS logic** (`dims_and2`, `dims_half_adder`, `dims_full_adder`,
`dims_rca`) is built from delay-insensitive minterms:
* there is one C-element per input combination;
* each output rail is the OR of the minterms where that rail is 1;
* every output is valid only after every input is, and null only after
  every input is.

The ripple-carry adder chains full adders, with a half adder in bit 0.

## The five buffer styles

Every buffer has the same ports: `in_t/in_f/ack_out` towards the producer
and `out_t/out_f/ack_in` towards the consumer. `ack_out` is always the
completion detector of the buffer's own output. The styles differ in how
each output rail is stored.

| `buf_style_e`      | module             | storage of a rail | what it changes |
|--------------------|--------------------|-------------------|-----------------|
| `BUF_WCHB`         | `buf_wchb`         | `C(in, ~ack_in)` | Plain weak-conditioned half buffer. |
| `BUF_INTERLOCKING` | `buf_interlocking` | C-element with the other rail as an extra input that only blocks the *rising* edge | Once one rail of a bit is high, a pulse on the other rail cannot be taken in. This masks glitches that would otherwise make an illegal `11`. |
| `BUF_DEADLOCKING`  | `buf_deadlocking`  | C-element with the other rail as an extra input that only blocks the *falling* edge | If a fault has created `11`, the bit can never return to null. The buffer stops, which turns a silent code error into a visible deadlock. |
| `BUF_DUALCD`       | `buf_dualcd`       | `C(in, en)` with `en = C(CD(in), ~ack_in)` | A second completion detector on the input keeps the storage closed until the whole input word is valid (or null). This shortens the window in which a stray pulse is accepted. |
| `BUF_MTD`          | `buf_mtd`          | D latch, `en = XNOR(ack_out, ack_in)` | Mousetrap-style: transparent while waiting for the next phase, closed as soon as the output completes. This style is not strictly QDI. |

`qdi_buffer` wraps the five styles behind one parameter. A buffer can be
reset empty or reset holding a token (parameters `RST_T`, `RST_F`).

`buf_dd_wchb` is the sixth style. It has two copies of every channel:
* each storage C-element of copy A also takes copy B's rail and copy B's
  enable (and vice versa);
* each completion detector checks both copies bit by bit.

A fault in one copy therefore stalls the buffer until the copies agree
again. It cannot be stored.

Read these two mechanisms carefully:
* **Interlocking and deadlocking cross-couple the rails of a bit in
  opposite directions.** Interlocking is "do not rise while the other rail
  is high". Deadlocking is "do not fall while the other rail is high".
* **The MTD buffer uses an XNOR.** The latches are open while the output's
  completion state equals the consumer's acknowledge, that is, while the
  buffer waits for the next phase.

## Pipelined multiplier (`mul_pipelined`)

`N` stages (default 8) follow each other. Stage *k* is a buffer followed by
`mul_pp_stage` logic that adds the partial product `(a & b[k]) << k` to a
running sum `acc`:

```
 a,b ─▶[buf 0]─▶ pp0 ─▶[buf 1]─▶ +pp1 ─▶ … ─▶[buf N-1]─▶ +pp(N-1) ─▶[out buf]─▶ p
       {b,a}           {acc,b,a}                {acc,b,a}                  {p}
```

* Stage 0 has no adder. It produces `a & b[0]` and dual-rail zeros for the
  upper half.
* Stages 1..N-1 add with an N-bit DIMS ripple-carry adder into bits
  `K..K+N-1` of `acc`. The carry goes to bit `K+N`.
* Operands `a` and `b` travel along with every token.

`OPS` (operations per stage) removes buffers. Only stages with
`k % OPS == 0` keep theirs; at the others the wires pass straight through.
With `OPS = 2` and `N = 8`, buffers remain at stages 0, 2, 4, 6 and the
output, and two adders sit between consecutive buffers.

A token needs one spacer behind it, so an `N+1`-buffer half-buffer
pipeline holds at most about `(N+1)/2` tokens. The testbenches see up to 5
in flight at `N = 8`.

## Iterative multiplier (`mul_iterative`)

This is the hardest part of the design. One add-and-shift stage is reused
`N` times, so a token has to loop. Looping in a QDI circuit needs a control
token that tells the merge where its next input comes from.

```
              in (a,b)                       ┌──────────▶ out buf BO ─▶ p
                 │                           │ (mark[0]=1)
 sel ─▶ ┌────────▼──┐   ┌────┐  ┌──────┐  ┌──┴──┐
  ┌────▶│  merge    ├──▶│ B1 ├─▶│ step ├─▶│ B2  ├──split
  │     └────────▲──┘   └────┘  └──────┘  └──┬──┘
  │              │                           │ (mark[0]=0)
  │              └───────── B3 ◀─────────────┘
  └── S (1-bit select buffer) ◀── inverted mark[0] of B2's output
```

**Token.** One token, dual-rail, is `{mark[N], p[2N], b[N], a[N]}`.
* The merge builds it from the input with `p = 0` and `mark = 1`.
* Each pass of `mul_iter_step` does four things:
  * adds `a & b[0]` to the upper half of `p`;
  * shifts `p` right by one, with the adder carry entering at the top;
  * rotates `b` right;
  * rotates `mark` left.
* After `N` passes, `p = a*b` and `mark` is back at bit 0.

**Split.** This is the output side of B2. Two banks of C-elements gate
B2's data with a rail of `mark[0]`:
* the `mark[0]`-false rail passes the whole token to B3 (feedback);
* the `mark[0]`-true rail passes `p` to the output buffer BO.

Only one side fires for each token. The split's acknowledge is the OR of
B3's and BO's acknowledges.

**Select loop.** The select buffer S is one dual-rail bit. It is fed with
the *inverse* of `mark[0]`: 1 means "the next token comes from the
feedback path", 0 means "take new operands".
* S resets holding 0, so the first token is taken from the input.
* B2's consumer acknowledge is a C-element join of the split acknowledge
  and S's acknowledge. This join resets **high**, because S starts full.
  B2 must see S empty before it can deliver the next select bit. Without
  this, the first pass deadlocks.

**Merge** (`mul_iter_merge`). Each data channel is gated by a C-element
with the matching select rail. The selected source receives an
acknowledge from a C-element of B1's acknowledge and its select rail. The
select channel is acknowledged by the OR of those two data acknowledges,
not by B1's acknowledge. Otherwise the select bit could be withdrawn
before the data acknowledge had fired, and the ring would deadlock.

Counting the buffers: the data ring has B1, B2 and B3, so there is room for
the one token plus its spacer. S and the reset-high join make the control
ring live. All ring buffers use the same `STYLE`.

## DD multipliers (`mul_pipelined_dd`, `mul_iterative_dd`)

`mul_pipelined_dd` is the pipeline of `mul_pipelined` (with `OPS`), with
both copies of every token:
* all buffers are `buf_dd_wchb`;
* each stage's DIMS logic is instantiated twice, one instance per copy.

`mul_iterative_dd` is the ring of `mul_iterative`, built twice:
* each copy has its own merge, add/shift logic, split gates, acknowledge
  joins and select bit;
* the five ring buffers (B1, B2, B3, S and BO) are `buf_dd_wchb` buffers
  shared by both copies;
* S is a DD buffer that resets to a token. For this, `buf_dd_wchb` has
  the same `RST_T`/`RST_F` parameters as the other buffers.

Ports come in pairs with suffixes `_a` and `_b`. A source must drive both
copies with the same data and should join the two input acknowledges. The
testbenches do that with a C-element.

## Top level (`qdi_mul_top`)

The pipelined, iterative, DD pipelined and DD iterative multipliers stand
side by side. They share only `rst`. Port prefixes are `pipe_`, `iter_`,
`dd_` and `iterdd_`.

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 8 (`qdi_pkg::MUL_WIDTH`) | operand width |
| `OPS`     | 1 | operations per stage of both pipelines |
| `STYLE`   | `BUF_WCHB` | buffer style of the two single-copy multipliers |

`rst` is a level reset:
* every buffer is emptied;
* the select token is loaded into S.

Keep `rst` high until all channel inputs are null. Afterwards use the
four-phase protocol above on every channel. There is no clock and no
latency in cycles. Throughput is set by the handshakes alone.

## Where this design follows its source and where it chooses

**Taken from the source study:**
* the five buffer styles and their gate structure, following the
  source's gate drawings of the interlocking, deadlocking, dual-CD and
  Mousetrap buffers;
* the DD technique;
* DIMS logic with ripple-carry adders;
* a pipelined multiplier with one partial product per stage plus an output
  buffer;
* the `OPS` parameter;
* 4- and 8-bit widths;
* an iterative multiplier that reuses one stage in a loop driven by a
  control part;
* the effect classes used by the injection campaign.

**Own choices:**
* the reset scheme;
* the WCHB enable `~ack_in`;
* the bit-level arrangement of the partial-product stages (which bits the
  adder covers, how stage 0 makes its zeros);
* the whole structure of the iterative ring: token format, right-shifting
  accumulator, marker, merge/split/select circuit, buffer count;
* the width of the 1-bit select buffer.

**Departures:**
* **MTD enable.** The source's text calls the MTD control "a single XOR
  gate", but its drawing shows an XOR with an inverted output. The XNOR is
  used here because it is the version that closes the latch once the
  output completes.
* **DD checking granularity.** In both DD multipliers, the two copies are
  compared at every buffer, not at every gate as the original technique
  does. A fault inside one copy's logic, merge or split is still stopped
  at the next buffer, but it is caught later than in a fully interlocked
  circuit. A fault that leaves a C-element of one copy's merge in the
  wrong state can stall the ring instead of being masked.
* **No timing model.** The study simulated gate-level netlists with
  randomised inertial gate delays and a large automated injection flow
  (database, job scheduler, golden-run comparison). None of that is
  hardware, and it is not reproduced. The RTL has zero gate delays, so
  injection results here are qualitative.

**Tool warnings.** Linters report the handshake loops as circular
combinational logic and the C-elements as latches. Both are the nature of
a clockless circuit, and each module's header comment says so.

## Testbenches

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

| testbench | what it exercises |
|-----------|-------------------|
| `tb_c_element`, `tb_completion_detector` | exhaustive input sequences, hold behaviour, reset |
| `tb_buf_wchb`, `tb_buf_interlocking`, `tb_buf_deadlocking`, `tb_buf_dualcd`, `tb_buf_mtd` | streaming, half-buffer capacity, and forced glitches on a held word and on an empty buffer. Each style must show its own characteristic mask/propagate signature (shared code in `tb_buf_common.svh`) |
| `tb_qdi_buffer` | all five styles through the wrapper, including reset to a token |
| `tb_buf_dd_wchb` | both copies, a pulse on one copy must not be stored |
| `tb_dims_full_adder`, `tb_dims_rca` | all input codes, null/valid ordering |
| `tb_mul_pp_stage` | stage logic against `acc + ((a & b[K]) << K)` |
| `tb_mul_pipelined` | 8 bits with every style, OPS 2, and 4 bits; products, tokens in flight |
| `tb_mul_iterative` | every style; products, at least one feedback pass and one new-input selection |
| `tb_mul_pipelined_dd`, `tb_mul_iterative_dd` | products while pulses hit one copy; the copies must never disagree at the output |
| `tb_qdi_mul_top` | the top at its default parameters: 40 products per multiplier. It counts input stalls, overlapping tokens, input and feedback selections of both rings, and pulses into one DD copy; it fails if any never happens |
| `tb_set_campaign` (+ `tb_set_env`) | SET-injection campaign, described below |

`tb_mul_driver` is a shared four-phase source, sink and scoreboard.

### The injection campaign

`tb_set_campaign` runs 24 environments:
* all six styles at 4 bits, once token-limited (slow source) and once
  bubble-limited (slow sink);
* all six styles at 8 bits, bubble-limited, once with one and once with two
  operations per stage.

Each environment makes 150 runs. Every run streams six products. At a
random moment one internal signal is inverted for 1 ns:
* two thirds of the runs hit a data signal: a sum rail before or after a
  buffer;
* one third hit a control signal: a buffer acknowledge.

Each run is then classified once per class: value fault, code fault
(`11`), glitch (protocol violation on the output), deadlock, and
wrong token count.

The checks:
* the fault-free reference run of every environment is clean;
* the DD version never lets an effect through;
* the WCHB shows effects;
* the deadlocking buffer deadlocks.

The printed counts show the expected tendencies:
* control faults are almost always masked when the pipeline is
  token-limited;
* the Mousetrap buffer passes more glitches in token-limited operation;
* the interlocking buffer produces no code faults;
* the DD style produces no effects at all.

These are trends from a zero-delay model, not calibrated rates.

## Simulating

With plain Verilator 5, from the repository root:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb \
    rtl/qdi_pkg.sv rtl/*.sv tb/tb_mul_driver.sv tb/tb_qdi_mul_top.sv \
    --top-module tb_qdi_mul_top
./obj_dir/Vtb_qdi_mul_top
```

Other tests work the same way:
* swap in the testbench file and `--top-module`;
* add `tb/tb_mul_driver.sv` for the multiplier tests;
* add `tb/tb_set_env.sv` for the campaign.

The buffer tests include `tb/tb_buf_common.svh` through `-Itb`.

All delays in the testbenches are in nanoseconds. The circuit itself has
none, so Verilator settles every zero-delay loop within a time step. The
`UNOPTFLAT` warnings it prints for the handshake loops are expected.

To try another buffer style on the whole top, give the `qdi_mul_top`
instance in `tb_qdi_mul_top` a `STYLE` parameter, for example
`#(.STYLE(BUF_DUALCD))`, or change the default in `qdi_mul_top`. To change
the width, change `qdi_pkg::MUL_WIDTH` or pass `N` the same way.
