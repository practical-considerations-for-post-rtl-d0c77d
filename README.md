# BackSpace on-chip debug architecture

A chip that crashes in the lab shows its final state but not how it got
there. BackSpace recovers that history one state at a time. From the crash
state, an off-chip program computes every state that could have come just
before it (the *pre-image*). It narrows the set down with a little recorded
information, the *signature*. It then re-runs the chip with a breakpoint on
each candidate until one is actually reached. That candidate becomes the new
"current" state, and the process repeats. After a few hundred iterations the
engineer has a cycle-accurate trace of the states that led to the crash,
with no trace buffer of that depth on the chip.

This repository holds the on-chip half: synthesizable SystemVerilog for the
logic that sits beside the flip-flops of a circuit under debug (CUD). It is
sized by default for a 32-bit RISC processor core with 3007 state
flip-flops. The hardware has three jobs:

1. **Stop the chip at a chosen state**, even when runs are not repeatable.
   This is done by the breakpoint circuit.
2. **Record a signature** of each state, i.e. some function of the state bits.
   This is done by signature creation.
3. **Keep the signatures of the last few cycles** before the stop, so the host
   can read them. This is done by signature collection.

The host reaches all of this through a small bank of 32-bit software
registers.

```
                 state_bits (N_MON)
   CUD  ───────────────┬─────────────────┬─────────────────────┐
    ▲                  ▼                 ▼                     ▼
    │ freeze   two_partial_breakpoint  signature creation   hamming_monitor
    └──────────  (A, B, mode, ext_bp)  (wires / conc / hash)   (measurement)
                       │                 ▼
                       │           signature_collection (C_CYCLES deep)
                       ▼                 ▼                     ▼
                     debug_regs  ◄── host register port (wr_en/addr/wdata/rdata)
```

## Why the breakpoint is the hard part

In a deterministic chip, a 64-bit cycle counter would be a perfect
breakpoint. Real chips are not deterministic from run to run: memory
latencies, clock-domain crossings and uninitialised state differ. A given
state may come at a different cycle, or not come at all (a *spurious run*).
The breakpoint must therefore compare real state. Comparing all 3007 bits
costs a register and a comparator as wide as the state. This design
compares only a chosen subset of bits, the **partial breakpoint**. The other
bits are masked off.

A partial compare creates two kinds of false match:

* **Temporal false match.** The execution passes through a state that agrees
  on the breakpoint bits *before* it reaches the real one, e.g. the same
  loop position one iteration earlier. This is handled by a **match
  counter**. The circuit fires only on its n-th match, where n is held in a
  counter match register.
* **Spatial false match.** On a spurious run, a different state agrees on the
  breakpoint bits. The host catches this by scanning out the frozen state and
  comparing it with the candidate. It then simply re-runs.

### One partial breakpoint circuit (`partial_breakpoint`)

Each circuit holds:

* a target state register and a mask register (W bits each);
* the comparator (`bp_comparator`);
* a 32-bit match counter and a 32-bit counter match register;
* a flip-flop holding the partial match of the previous cycle (the
  *delayed* match).

It raises `brk` when the partial match is true and `count + 1 >= n`. The test
is *greater than or equal*, not equal. This matters because the number of
matches before the real breakpoint can differ between runs. With `>=` a run
that sees more early matches still stops at its first suitable match, instead
of running past it. The counter stops once the chip is frozen, so the host
reads how many matches happened up to and including the breakpoint.

### Two circuits and three modes (`two_partial_breakpoint`)

Scanning out after every candidate run is slow. A second circuit removes the
need to scan out to detect temporal false matches. Circuit A is loaded with
the state just confirmed, and circuit B with the candidate before it. Each
circuit's breakpoint is ANDed with the *other* circuit's delayed match. A
therefore fires only on a cycle whose predecessor matched B, which pins down
the exact pair of consecutive states. A 2-bit mode register selects the
source of the breakpoint:

| mode | stops the chip | the other circuit |
|------|----------------|-------------------|
| 1 (`MODE_A`) | A's counted match AND B's delayed match | B counts its matches |
| 2 (`MODE_B`) | B's counted match AND A's delayed match | A counts its matches |
| 3 (`MODE_EXT`) | the `ext_bp` input (e.g. a crash detector) | both count |

Mode value 0 behaves as mode 3. A circuit loaded with an all-zero mask
matches every cycle, which switches off the cross AND. The flow uses this
when it needs a single counted breakpoint. Once taken, the breakpoint is
sticky until the host writes the "reset breakpoint" register. In the cycle
the breakpoint is taken, the counters and the delayed flags freeze, so the
host can read them afterwards.

### The debug flow these modes support

The end-to-end testbench plays this flow exactly:

1. **Crash run, mode 3.** The chip stops on the crash. The host scans out the
   crash state and the signature, then computes the pre-image.
2. **Count run.** A candidate goes into the free circuit X, with the
   breakpoint bits in its mask and n set to the maximum, so X only counts.
   The other circuit Y holds the last confirmed state and its count, and is
   the active one. The first step uses mode 3 instead, with the crash
   detector as the stop. Y stops the chip only if X matched in the cycle
   before. The host reads X's match count, or sees a timeout or a cleared
   delayed flag, which rules the candidate out.
3. **Confirm run.** Y is made transparent (mask 0) and X becomes active with
   the count just read. The chip stops on the candidate. The scanned-out
   state confirms it (a mismatch means a spurious run, so re-run). The new
   signature gives the next pre-image.
4. The roles of A and B swap, and the modes alternate 1, 2, 1, ... .

### Pipelining and the frozen state

A comparator over thousands of bits, and a stop signal that must reach every
flip-flop of the chip, may not fit in one cycle. The comparator can be
pipelined. With `PIPE = 1`, each `GROUP_W`-bit group is XORed and ORed into
a flip-flop, and the final OR follows in the next cycle. The stop signal can
also pass through `DIST_STAGES` flip-flops on its way to the CUD. The
external breakpoint is delayed by the same `PIPE` cycles, so it lines up
with the comparators.

The state the chip freezes in, the *frozen state*, is then
`PIPE + DIST_STAGES` cycles after the *breakpoint state*, the one that
matched. With a pipeline, the host no longer compares the frozen state with
the candidate. It compares it with the state that far down the trace it has
already built. The trace buffer must also be deep enough
(`C_CYCLES > PIPE + DIST_STAGES`) for the signature of the candidate's
predecessor to still be there. For the first few states before the crash,
the frozen state lies past the crash, where there is no trace to compare it
with (the blind spot). There the host can still check the trace entries,
because they reach back past the breakpoint state. The default is no
pipeline (`PIPE = 0`, `DIST_STAGES = 0`), so frozen state = breakpoint state,
as in the single-cycle flow above.

## Signatures

`SIG_SCHEME` on the top selects one of three creation schemes:

* **`SIG_HARDWIRED`** (default): the low `S_WIDTH` state bits, with no logic.
  The default `S_WIDTH = N_MON = 3007` records every state bit. The off-chip
  program can then pick any subset of them as its signature. This is the
  reference configuration, and it needs no decision at design time.
* **`SIG_CONC`**: an (N, M) *concentrator* (`concentrator`, `conc_net`) routes
  any M of the N state bits to the outputs. The bits are chosen at run time.
  It is built recursively:
  * the first N-2 inputs go in pairs through 2x2 crossbars;
  * each crossbar sends one output to each of two (N/2, M/2) concentrators;
  * the last two inputs go straight to one half each;
  * odd sizes are rounded up.

  At two outputs or fewer, each output is a programmable multiplexer.
  Every crossbar and multiplexer select has a configuration flip-flop. These
  flip-flops form a shift chain loaded through `conc_cfg_*`. The
  configuration length is `bs_pkg::conc_cfg_w(N, M)`, which is 16193 bits
  for N = 3007, M = 1024. The coarse-grained variant (`K > 1`) routes K-bit
  groups instead of single bits. The concentrator does not compute its own
  configuration: the host (and the testbench) must route. M must be a power
  of two.
* **`SIG_HASH`**: `hash_signature`. Each output bit is the XOR of the state
  bits selected by one row of a sparse 0/1 matrix. By default the matrix has
  about 1.5 % ones and 281 rows. It comes from the seeded function
  `bs_pkg::hash_entry(seed, row, col, ppm)`: an entry is one when a 32-bit
  integer mix of (seed, row, col), taken modulo 10^6, is below `ppm`. An
  explicit matrix can be given instead (`EXPLICIT`, `MATRIX`).

`signature_collection` is a circular buffer of `C_CYCLES` entries. It writes
the current signature and advances its pointer every cycle until `stop`
(the freeze) rises. The host then reads entries by age, where 0 is the
signature of the cycle just before the frozen state. With the default
`C_CYCLES = 1` it is a single `S_WIDTH` register, which holds the complete
previous state.

## Hamming monitor

`hamming_monitor` is a measurement aid, not part of the breakpoint. Each
cycle it counts how many unmasked bits differ between the state and the
target of the selected circuit. It keeps the smallest count of the run, and
the state at which that minimum first occurred (the Hamstate register). A
minimum of zero means the target was reached. A small non-zero minimum
measures how far a spurious run missed it. This is the data used to choose
which bits are worth putting into the breakpoint mask.

## Register map (`debug_regs`, 32-bit registers, `addr` = register number)

Wide registers are accessed 64 bits at a time: a low/high data pair plus a
one-hot 64-bit word select split over two registers. Loading a 3007-bit
target therefore takes 47 word loads. The select is level-sensitive: every
word whose select bit is set takes the data each cycle, so clear the select
before changing the data.

| reg | function |
|-----|----------|
| 0 | minimum Hamming value of the run |
| 1, 2 (22) | 64-bit cycle counter of the run, low/high (22 = low again) |
| 3, 4 | trace entry, selected 64-bit word, low/high |
| 5, 6 | state read word select (one-hot) |
| 7, 8 | target data word to load |
| 9, 10 | target/mask load word select (one-hot) |
| 11, 12 | mask data word to load |
| 13, 14 | target of the selected circuit, word selected by 19/20 |
| 15 | write 1: clear breakpoint, counters, trace, Hamming minimum, cycle counter (start of a run) |
| 16, 17 | current state, word selected by 5/6 |
| 18 | {freeze, delayed B, delayed A, breakpoint} |
| 19, 20 | trace / target read word select (one-hot) |
| 21 | trace entry age (0 = newest) |
| 24, 25 | Hamstate register, word selected by 5/6 |
| 26 | bits 1:0 mode (reset 3), bit 2 selects circuit B for loads and reads |
| 27 | counter match register n of the selected circuit (write/read) |
| 28 | match counter of the selected circuit |

Writes take effect at the clock edge. `rdata` is combinational in `addr`.

## Files

| file | content |
|------|---------|
| `rtl/bs_pkg.sv` | widths, mode/scheme enums, register numbers, hash matrix and concentrator-size functions |
| `rtl/bp_comparator.sv` | masked equality comparator, optional pipeline stage |
| `rtl/partial_breakpoint.sv` | one partial breakpoint circuit |
| `rtl/two_partial_breakpoint.sv` | A, B, modes, sticky breakpoint, freeze distribution |
| `rtl/signature_collection.sv` | circular trace buffer |
| `rtl/concentrator.sv`, `rtl/conc_net.sv` | programmable concentrator and its recursive network |
| `rtl/hash_signature.sv` | XOR-matrix hash |
| `rtl/hamming_monitor.sv` | Hamming value, minimum, Hamstate |
| `rtl/debug_regs.sv` | host register bank |
| `rtl/backspace_debug_top.sv` | the whole architecture |
| `tb/tb_*.sv` | one self-checking testbench per block |
| `tb/cud_model.sv` | small behavioural processor used as the circuit under debug |
| `tb/tb_backspace_debug_top.sv` | the BackSpace flow at full default size |
| `tb/tb_delayed_flow.sv` | the same flow with a pipelined breakpoint and 4 cycles of trace |
| `tb/tb_sig_schemes.sv`, `tb/sig_scheme_run.sv` | the top with hash and concentrator signatures, trace depth > 1 and pipelining |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. It has a watchdog that counts a failure if the test hangs. To
build one with Verilator 5:

```
verilator --binary --timing --assert rtl/bs_pkg.sv rtl/*.sv tb/cud_model.sv \
  tb/tb_backspace_debug_top.sv --top-module tb_backspace_debug_top -Mdir obj
./obj/Vtb_backspace_debug_top
```

For another testbench, replace its file and top name. `tb_sig_schemes` also
needs `tb/sig_scheme_run.sv`. Add `-Wno-fatal` if lint warnings should not
stop the build.

`tb_backspace_debug_top` runs the top at its defaults: 3007 state bits, full
hard-wired signature, one cycle of trace. The CUD is `cud_model`, a small
loop processor whose 38 core bits are replicated up to 3007 bits. In one
run out of three, chosen at random, one memory load stalls a cycle longer,
which makes runs non-repeatable. The breakpoint mask holds 46 bits: the program counter and
stall bits, and copies of them. The testbench:

* runs the crash, then steps back 8 states, each time trying the true
  predecessor and a decoy candidate in random order;
* checks every scanned-out state, signature, register read-back and Hamming
  minimum;
* checks that the recovered trace is a valid path of the model;
* counts mode 1, 2 and 3 breakpoints, temporal false matches skipped by the
  counter, spatial false matches caught by the scan-out, timeouts, rejected
  decoys and non-repeatable runs. Each count must be non-zero.

It takes a few seconds.

## Choices of this design, and where it departs from the described hardware

* **One clock.** The CUD and the debug logic share one clock. The `freeze`
  output stands for the hold/scan control of the CUD's flip-flops. The
  scan-out itself is modelled as a read of the state through registers
  16/17.
* **Host bus.** The host bus is a plain synchronous register port, not a
  processor peripheral bus. Registers 26–28 (mode, A/B select, counter match
  value, match counter) are additions. The register table they extend has no
  entries for these values. The external memory, UART and processor
  registers of a board-level system are not included.
* **Word loads.** Target, mask and counter match values are written in
  parallel words (64-bit target/mask words, one 32-bit counter match word).
  They are not shifted in serially.
* **Mask in the comparator.** The mask is applied by ANDing the XOR of each
  bit. Target and mask reset to 0 and all ones. The counter match register
  resets to 1.
* **Hard-wired bits.** The hard-wired signature takes the *low* `S_WIDTH`
  bits. A real design would wire a chosen subset.
* **Concentrator.** The default output width is 1024: the 40 % signature
  width of 1203 bits, rounded down to a power of two. The leaf multiplexers
  and the serial configuration chain are this design's construction.
* **Hash matrix.** The hash matrix is pseudo-random with the stated density.
  No particular matrix is specified.
* **Pipeline defaults.** `PIPE` and `DIST_STAGES` default to 0. The
  pipelined forms are tested in `tb_two_partial_breakpoint` and
  `tb_sig_schemes`. `tb_delayed_flow` runs the whole delayed scan-out flow
  at 152 state bits with `PIPE = 1`, `DIST_STAGES = 1` and `C_CYCLES = 4`.
  In that flow the frozen state is checked against the trace state two
  steps nearer the crash, and the trace entries are checked against the
  states they must hold. Near the crash (the blind spot) only the entries
  are checked.
* **Area.** The cost-per-bit area model used to size these circuits is not
  reproduced. A generic synthesis of the top at the defaults gives roughly
  42 k cells and 15.7 k flip-flop bits. Most of these are the two 3007-bit
  target/mask pairs and the Hamstate register. The 3007-bit trace entry adds
  a 3007-bit memory on top.
