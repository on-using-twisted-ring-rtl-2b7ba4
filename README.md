# Twisted-ring-counter BIST: test-set embedding by reseeding

A test-per-clock built-in self-test (BIST) pattern generator that needs no
logic between the pattern source and the circuit under test (CUT). The CUT's
own n-bit input scan register is turned into a *twisted-ring counter* (TRC,
a Johnson counter) by one multiplexer and one inverter at its serial input.
Starting from a few carefully chosen *seeds*, the register then steps
through a long, fixed sequence of patterns. The sequence contains every
pattern of a precomputed deterministic test set, so the test set is
"embedded" in it. Only the seeds need storing: in a small on-chip ROM, or in
the memory of a slow external tester that scans them in. Each stored bit
expands into about 2n patterns, so a seed set is much smaller than the
compacted test set it replaces.

Because the register feeds the CUT directly, the critical paths see nothing
beyond ordinary scan. The generator is independent of the CUT; moving it to
another CUT only changes n and the seeds.

## How one seed becomes 2n² + n patterns

Write the register as flip-flops F_1 … F_n and a pattern as b_1 … b_n, where
b_1 is held in F_1. Two register moves are used:

| move  | F_1 receives | other bits       | period                        |
|-------|--------------|------------------|-------------------------------|
| shift | F_n          | F_i ← F_(i-1)    | n: a plain rotation           |
| twist | NOT F_n      | F_i ← F_(i-1)    | 2n: n twists invert the pattern, 2n restore it |

For every seed the controller runs this schedule:

1. **Load**, n cycles. The seed enters serially, b_n first.
2. **Twist**, 2n cycles. The register runs as a Johnson counter through its
   whole twist cycle. At the end it holds the pattern it started with.
3. **Shift**, 1 cycle. One rotation by one place gives a new start pattern.
4. Steps 2 and 3 repeat until n shifts are done. The register then holds the
   seed again, and the next seed is loaded.

The CUT sees one pattern per clock in every Twist and Shift cycle. That is
n(2n + 1) = 2n² + n patterns per seed, against n load cycles. The pattern
efficiency is therefore

    eta = (2n² + n) / (2n² + 2n) = 1 / (1 + 1/(2n+1))

This gives 0.917 for n = 5 and 0.980 for n = 24, and it tends to 1 as n
grows. If a tester that is f_s/f_ext times slower loads the seeds, the
formula becomes 1 / (1 + (f_s/f_ext)/(2n+1)). The pattern cycles do not
involve the tester, so they still run at the full clock rate.

A pattern may repeat within a seed's sequence. For example, the Shift cycle
applies the round's start pattern for a second time. The count 2n² + n
counts clock cycles, not distinct patterns.

### Worked example: c17, n = 5, seed 01100

The first round, starting from the seed, is its twist cycle:

    01100 10110 11011 01101 00110 10011 01001 00100 10010 11001   (Twist)
    01100                                                          (Shift)

The shift gives 00110, whose twist cycle comes next. The shift after that
gives 00011, whose cycle is 00011 00001 00000 10000 11000 11100 11110 11111
01111 … . The deterministic test set of the benchmark c17 has ten test
cubes (X = don't care):

    0110X 0111X X101X 000XX 100XX X00X0 XX111 X10X0 101XX X00X1

All ten are matched within the first 31 pattern cycles. The last one,
0111X, is matched by 01111. This example is the default configuration of
the RTL.

## Control logic

The controller (`bist_control`) is a four-state Moore machine
(`test_control_fsm`) plus two modulo-n counters (`bist_counter`):

    Load (00) --TE--> Twist1 (01) --TE--> Twist2 (10) --TE--> Shift (11)
      ^                  ^                                       |
      |                  +--------------- SE = 0 ----------------+
      +----------------------------------- SE = 1 ---------------+

- **Twist counter.** Counts Load cycles and twist cycles modulo n. TE
  ("twist enable") is high on its n-th count. It is held while SCE is high.
  The Twist state is split into two halves of n cycles each, so this counter
  only ever needs to count to n, not to 2n.
- **Shift counter.** Advanced by SCE ("shift-counter enable"), which is high
  exactly in the one-cycle Shift state. SE ("shift enable") is high once
  n−1 shifts are done. SE therefore marks the n-th Shift cycle, which sends
  the FSM back to Load.
- **Multiplexer select.** Decoded from the state. Load selects the ROM, or
  the scan-in pin when `ext_seed` is set. Twist1 and Twist2 select NOT F_n.
  Shift selects F_n.

Timing per seed, with `bist_en` held high and seeds from the ROM:

| cycles (from seed start) | state            | `pattern_valid` |
|--------------------------|------------------|-----------------|
| 0 … n−1                  | Load             | 0               |
| then n times: 2n cycles  | Twist1, Twist2   | 1               |
| then 1 cycle             | Shift            | 1               |

That is 2n² + 2n clocks per seed. A top-level seed counter stops the
generator after `NUM_SEEDS` seeds and raises `done`.

All counters are modulo-n counters with an equality compare, so n does not
need to be a power of two. The alternative, ANDing the k = ⌈log₂ n⌉ counter
bits, is exact only for powers of two. Any n ≥ 2 works without changing the
counters.

## Seed sources

- **On-chip ROM** (`seed_rom`). The ROM is one bit wide and `NUM_SEEDS*N`
  deep, with its own address counter. The counter advances once per Load
  cycle, so the ROM is read at the scan rate. Its contents are the `SEEDS`
  parameter. The ROM becomes constant logic; no memory macro is needed.
- **External tester** (`ext_seed = 1`). The tester presents a bit on
  `scan_in` and pulses `scan_strobe` for one clock per bit, b_n first. The
  Load state waits for each strobe; Twist and Shift run at full speed without
  the tester. Everything is in one clock domain. The strobe stands for the
  slower tester clock and must be synchronous to `clk`.

## Blocks

| module             | role |
|--------------------|------|
| `trc_bist`         | top: wires the blocks, counts seeds, `done` |
| `bist_control`     | twist counter, shift counter, FSM, multiplexer select and enables |
| `test_control_fsm` | Load / Twist1 / Twist2 / Shift state machine, SCE |
| `bist_counter`     | enabled modulo counter with terminal-count flag (twist, shift, ROM and seed counters) |
| `trc_mux`          | 4-to-1 serial-input multiplexer: ROM, scan-in, F_n, NOT F_n |
| `scan_register`    | the n-bit CUT input register F_1 … F_n |
| `seed_rom`         | 1-bit-wide seed ROM and its address counter |
| `response_monitor` | R-bit MISR that compacts the CUT responses |
| `trc_bist_pkg`     | state and select enums, counter width function |

The CUT lies outside `trc_bist`. `cut_in` drives the CUT inputs and the CUT
outputs return on `cut_resp`. The top also brings out `state`, TE, SE, SCE,
the ROM address and the seed count, for observation.

## Parameters and seed format

| parameter   | default    | meaning |
|-------------|------------|---------|
| `N`         | 5          | CUT inputs = register length (n ≥ 2) |
| `NUM_SEEDS` | 1          | number of seeds s |
| `SEEDS`     | `5'b01100` | seed i in bits `[i*N +: N]`, written b_1 … b_n from MSB to LSB |
| `R`         | 2          | response width (R ≥ 2) |
| `RESP_POLY` | `2'b11`    | MISR feedback, the coefficients of x^(R−1) … x^0 (x² + x + 1) |

`cut_in[N-1]` is b_1 (F_1) and `cut_in[0]` is b_n. A seed therefore reads in
the source exactly as the pattern is written: `5'b01100` is 01100. Because
b_n is loaded first, the flat `SEEDS` vector read from bit 0 upwards is
exactly the ROM's load order.

Seeds are chosen offline by a heuristic search; no seed-selection logic is
on chip. The search starts from a test cube and walks its twist and shift
cycles. At each step it binds the seed's don't-care bits to match as many
uncovered cubes as possible, and it opens a new seed when the current one's
cycles are used up. Published seed counts for the ISCAS-89 benchmarks
range from 2 to 70 seeds, for circuits with 13 to 1664 inputs. Storage is n × s bits,
for example 72 bits for a 24-input circuit with three seeds. Only the c17
seed is known here. Any other configuration needs its seeds from such a
search.

## Verification

Each module has a self-checking testbench in `tb/`, whose name is the module
name with a `tb_` prefix. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The results:

- `tb_trc_bist` runs the top at its default parameters, with a c17 model
  (`tb/c17_model.sv`) as the CUT.
  - It rebuilds the expected sequence from the seed and compares every
    applied pattern and the final signature.
  - It checks the counts: 5 load cycles, 55 pattern cycles and 60 clocks.
  - It checks that all ten c17 cubes are embedded, the last at pattern
    cycle 31.
  - It repeats the run with the seed from a tester that delivers one bit
    per 10 clocks, and again with random pauses of `bist_en`.
  - It counts each mechanism and fails if one never occurs: ROM load,
    tester load, waiting for a strobe, Twist1, Twist2, Shift, return to
    Twist1, return to Load, pause and done.
- `tb_trc_bist_tables` runs eleven ISCAS-89 sizes, from n = 13 with s = 6 up
  to n = 54 with s = 8. Each size runs with ROM seeds and again with tester
  seeds. The runs reproduce the published clock counts:
  - 2n²s + 2ns clocks with on-chip seeds, for example 3600 for n = 24, s = 3.
  - 2n²s + ns BIST cycles and ns tester bits with tester seeds, for example
    3528 and 72.

  `tb_trc_bist_large` does the same for a 247-input register with 33 seeds:
  4,042,896 clocks, of which 4,034,745 apply patterns (efficiency 0.998).
  It takes about half a minute in Verilator.

  The seeds in these runs are pseudo-random stand-ins. Every pattern is
  still checked against a closed-form reference of the sequence.
- The remaining testbenches check one block each against a model written
  independently in the testbench.

Simulate with Verilator 5, for example:

    verilator --binary --timing --assert --top-module tb_trc_bist \
      -Irtl -Itb -y rtl -y tb +libext+.sv rtl/trc_bist_pkg.sv tb/tb_trc_bist.sv
    ./obj_dir/Vtb_trc_bist

To compile for lint or synthesis, read `rtl/trc_bist_pkg.sv` first and then
the modules in `rtl/`. The RTL also carries assertions on the counter
invariants (concurrent `assert property`).

## Where this design makes its own choices

These points are not fixed by the architecture. They are this
implementation's choices:

- **Multiplexer select.** The select is decoded from the FSM state rather
  than taken from the state bits directly. The multiplexer's input codes
  (00 ROM, 01 F_n, 10 NOT F_n, 11 scan-in) do not line up with the state
  codes (01 and 10 both twist, 11 shift).
- **SCE.** SCE is taken as the decode of the Shift state. The Twist1 →
  Twist2 step is taken on TE after n twists. The FSM is written
  behaviourally, not as a gate netlist.
- **Counters.** All counters are modulo-n counters with a compare, not
  ANDs of their bits.
- **Stopping.** The generator stops after `NUM_SEEDS` seeds and raises
  `done`. It resets asynchronously, into Load with everything at zero.
- **Tester interface.** Tester seeds arrive through a synchronous strobe,
  not through a second clock.
- **Response monitor.** Only its role is given: capture one response per
  clock. The MISR, its width and its polynomial are choices. Multiple
  CUTs, response comparison against a golden signature, and the ROM
  technology are out of scope.
- **Default size.** The default is the five-input c17 example, the one
  configuration whose seed is known. Larger circuits only need `N`,
  `NUM_SEEDS` and `SEEDS` set.

The same generator also handles two-pattern (delay-fault) tests in an
enhanced-scan setting. There, a 2n-bit TRC embeds the concatenated pattern
pairs; this is simply `N` = 2n and needs no other change.
