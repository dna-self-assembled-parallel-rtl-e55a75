# Self-assembled parallel architectures in SystemVerilog: the DAMP and two oracles

DNA-guided self-assembly could, in principle, build circuits from 10^12 or more
devices. However, each assembly step has a real chance of failing, so only very
small, very simple circuits come out reliably. This RTL models two architectures
designed for that constraint. They sit at the two ends of a spectrum: one
computes at run time, the other at assembly time.

* **DAMP, the decoupled array multi-processor.** It resembles a SIMD machine made of a
  huge number of tiny bit-serial processors that never talk to each other. A single
  node controller broadcasts every control line to all processors. The
  processors answer only through a "ringer": an oscillator that the controller
  can detect, node by node. Random constants fixed during assembly make
  each processor look at a different point of a problem space. The controller then
  finds the best processor by asking yes/no questions bit by bit through the ringers.
* **Oracles.** These are content-addressable memories whose contents were computed while they
  assembled. Each *string* of *tiles* is one question together with its answer. Tiles
  join only where their interfaces match, the way jigsaw pieces do, so only correct
  question/answer strings form. At run time a question is shifted into every string at once, and only
  the matching string responds. Two oracles are built:
  * addition, the worked example;
  * Hamiltonian path, which answers the NP-complete question "does this directed
    graph have a path through every node exactly once?" for any graph.

Both designs are in `dna_top`. They stand side by side and share only clock and reset.

## DAMP

### Structure

```
 host ──prog/start──► damp_ctrl ──pe_ctrl_t (one word per clock)──► damp_node × NNODES
                          ▲                                            │  damp_pe × NPROC
                          └──────────── ring_vec[NNODES] ◄─────────────┘  (ringer OR)
```

`damp_system` wires one `damp_ctrl` to `NNODES` instances of `damp_node`. Each node holds `NPROC`
instances of `damp_pe`. The control network is plain nets: every processor sees the same
word in the same clock.

### The processor (`damp_pe`)

Each processor has six 16-bit shift registers: the accumulator ACC and R0-R4.
Operands move least-significant bit first. A shift moves every bit toward
bit 0, and the new bit enters at bit 15. ACC shifts under its own control,
separately from R0-R4, so two operands can be offset against each other.

* **Operation unit.** A full adder (`full_adder`).
  * Operand A is ACC's bit 0.
  * Operand B is bit 0 of a chosen Rk, or the controller's data bit `cbit`, or a constant 0 or 1.
  * The carry-in is status bit C, or a constant.
* **ACC input.** On a shift ACC takes one of: the adder's sum, its carry, its own bit 0 (rotate), or `cbit`.
* **Rk input.** On a shift each Rk takes either its own bit 0 (rotate) or ACC's bit 0.
* **Random constants.** ACC, R0 and R1 can load a 16-bit constant that was fixed at assembly time.
  * In RTL these are parameters of `damp_pe`.
  * `damp_node` sets them from `damp_pkg::rand_const(SEED, node, index, register)`, a fixed integer hash.
* **Status bits B C D R S W.**

  | bit | role in this design |
  |-----|---------------------|
  | C | carry, fed back as carry-in |
  | S | last sum bit (the sign after a 16-bit operation) |
  | D | sticky OR of sum bits (non-zero result) |
  | B | free bit |
  | R | ringer enable |
  | W | wait |

  Any status bit can be set, complemented, ORed, ANDed or AND-NOTed with a source. The source is
  another status bit, ACC's bit 0, operand B, `cbit` or 1.
* **Conditional execution.** A word with `cond` set is ignored by every processor whose W is 1. A word
  without `cond` always executes, so a waiting processor can be released by clearing W.
* **Ringer.** `ringer` toggles every clock while R is 1 and is 0 otherwise.

A 16-bit add (`ACC = ACC + R0`) is a single word held for 16 clocks:
`acc_shift`, `acc_src=ACC_SUM`, `opb=OPB_R0`, `cin=CIN_C`, `flags_we`,
and `r_shift[0]` (so R0 rotates back into place). C must be cleared first.
There is no subtract path. Subtraction is done as `~(~ACC + R)`, where the
inversion is an add of constant 1 with carry-in 0 (sum = NOT a).

### The control word (`damp_pkg::pe_ctrl_t`)

Processors decode nothing: every field of the word drives a multiplexer or an enable directly.

* `cond`: ignored by processors whose W is set.
* Accumulator: `acc_shift`, `acc_src`.
* Registers: `r_shift[4:0]`, `r_from_acc[4:0]`.
* Full adder: `opb`, `cin`, and `flags_we` (update C, S and D).
* `rand_ld[2:0]`: load the random constant into ACC, R0 or R1.
* Status operation: `st_dst`, `st_op`, `st_src`.
* `cbit`: the controller's data bit.

The all-zero word does nothing.

### Ring detection and its timing (`damp_node`)

The node ORs its processors' ringer outputs and keeps the last two samples.
An oscillating ringer is high in one of any two consecutive clocks, so their
OR (`ring_detect`) is steady while any processor rings. Timing:

* `ring_detect` rises two clocks after the edge that sets R.
* It is low again at most three clocks after the edge that clears the last R.

### The node controller (`damp_ctrl`)

The program memory holds `PROG_DEPTH` words of `ci_instr_t`: `{op, any, count[15:0], target[7:0], word}`.

| op | action |
|----|--------|
| EXEC | broadcast `word` for `count+1` clocks |
| SETLOOP | loop counter = `count` |
| LOOP | if counter ≠ 0: decrement, jump to `target` |
| BRRING / BRQUIET | jump if the watched ring is on / off |
| SAMPLE | shift the watched ring into `result`, copy all node rings to `ring_snap` |
| HALT | stop, pulse `done` |

The "watched ring" is node `count`'s detection, or the OR over all nodes when `any` is set.
Before BRRING, BRQUIET and SAMPLE act, they stall for `RING_WAIT` (3) clocks, broadcasting the
no-op word, so the detection has caught up with the preceding EXEC. `stalls` counts these clocks
and `cycles` counts the clocks of the run.

Host side:
1. Write the program through `prog_we/prog_addr/prog_wdata` while the controller is idle.
2. Pulse `start`. The program begins at address 0.
3. `busy` stays high until HALT. `done` then pulses and `result` is valid.

Each non-stalling instruction takes one clock. EXEC takes `count+1` clocks. BRRING, BRQUIET and SAMPLE take `RING_WAIT+1` clocks.

### MIN-QUERY: finding the smallest value across all processors

This is the step that ties the DAMP together. Each processor holds a candidate value y,
and the controller learns the smallest y without reading any processor. It asks, from the most
significant bit down, "does any processor still in the race have a 0 here?":

```
W = 0, R = 0 everywhere; rotate ACC right 15 (bit 15 now at bit 0)
repeat 16 times:
    [cond]  R = ~ACC[0]           -- racers with a 0 in this bit ring
    SAMPLE                        -- result bit = "someone rang"
    BRQUIET skip
    [cond]  W = W | ACC[0]        -- someone had a 0: racers with a 1 drop out
skip:
            R = 0
            rotate ACC right 15   -- next lower bit to bit 0
rotate ACC right 1                -- ACC back in place
```

After the loop, `~result[15:0]` is the minimum. The processors still holding W = 0 are exactly the
ones that have it. The controller can then question them further: for example, shift out a random
constant one bit at a time with the same ring-and-drop pattern. This binary search over the winner's
input space recovers the exact point the winner evaluated.
`tb/damp_prog_pkg.sv` builds this program (preceded by loading the random constants and
`ACC = ACC + R0`). A query over one node instead of all uses `any = 0, count = node`.
The run takes `36 + 16·26 + d + 2` clocks, where d is the number of bits at which some racer dropped out.

## Oracles

### Addition tiles and strings (`add_tile`, `add_string`)

Each line of the full-adder truth table becomes one tile, with carry-in/out as the jigsaw interface and
operand bits a, b and sum bit s as constants. A string for "QA + QB" is N tiles:

* Tile 0, the least significant bit, is at the top.
* Tile i is the line with carry-in `f(i-1)` and operands `QA[i]`, `QB[i]`, where
  `f = carry(f, a, b)` and `f(-1) = 0`.
* `add_string` makes this choice at elaboration with `oracle_pkg::add_f/add_g`. At run time the
  carries do not exist as signals: they only decided which tiles could join.

In each tile:

* The query bits are shifted through latches Ai, Bi along the string.
* The input enable runs down the string: `ie_out = ie_in & (Ai == a) & (Bi == b)`.
* At the bottom of the string the input enable is reflected upward as the output enable, the string's `hit`.
* While the output enable is high, every tile loads s into its latch Si.
* The Si latches then shift down the string, so the sum leaves at the bottom, most significant bit first.

### The addition oracle (`add_oracle`)

All 2^(2N) strings, one per question, are fed in parallel. Bit `{QB,QA}` of `FORMED` says whether a
string formed during assembly; a question whose string is missing gets no answer. A query runs:

| clocks | step |
|--------|------|
| 1 | clear all Si |
| N | shift `qa`, `qb` into every string, MSB first |
| 1 | raise the input enable; the matching string loads its sum; `hit` registered |
| N | shift the sums out; the receiver ORs all strings' outputs into `sum` |
| 1 | `done` |

That is 2N+3 clocks from the clock that samples `start` to the one that shows `done`.
Only the matching string can hold ones, so the OR gives its answer. The sum is modulo 2^N:
the last tile's carry-out is not reported.

### The Hamiltonian-path oracle (`ham_oracle`, `ham_string`)

The oracle holds one string per path through the complete directed graph on `NODES` nodes. Each
path is a permutation of the nodes (`oracle_pkg::perm_node`, lexicographic order), so each string
visits every node once by construction. A string is `NODES-1` edge tiles; each tile passes the input
enable only if its edge exists in the problem graph.

1. Shift the problem graph in on `edge_in`/`edge_shift`: `NODES*NODES` bits, where bit `u*NODES+v`
   means "edge u→v exists", highest bit first.
2. Pulse `eval`. One clock later `valid` pulses, and `hit` says whether some string survived, that
   is, whether the graph has a Hamiltonian path.

## Sizes

| parameter | here | original proposal | why it differs |
|-----------|------|-------------------|----------------|
| DAMP nodes `NNODES` | 1,024 | 4,096 | memory: two files elaborate the whole array; 16,384 processors needed about 7.5 GB to lint and about 13 GB to synthesise, per file |
| processors per node `NPROC` | 4 | 2^28 | every processor is elaborated hardware; ~0.43 MB of verilator memory each |
| register width / count | 16 / ACC + 5 | 16 / ACC + 5 | same |
| status bits | 6 | 6 | same |
| addition oracle `N` | 4 | a 4-bit example | same as the example |
| HAM-PATH `NODES` | 7 | 15 | 15! ≈ 1.3·10^12 strings; verilator's generate-loop limit (16,384) already rejects 8 nodes (40,320) |
| `PROG_DEPTH`, `RING_WAIT` | 256, 3 | not given | |

At the defaults (4,096 processors), verilator lints `dna_top` in under a minute using about 2 GB; yosys synthesis takes several minutes and about 3 GB. A cycle-accurate
simulation of the default size was not run. The largest sizes simulated are:
* 4 nodes × 8 processors in `damp_system_tb` and `dna_top_tb`;
* a 5-node HAM-PATH oracle;
* the full 4-bit addition oracle.

## What follows the proposal and what is this design's own

Taken from the proposal:
* the DAMP structure (controller, nodes, broadcast control, ringers as the only output);
* the register set and width, and LSB-first bit-serial order;
* the independent ACC shift, and the full adder with sum or carry into ACC;
* the own-LSB-or-ACC inputs of R0-R4, and the random constants in ACC, R0 and R1;
* the names of the six status bits, and wait-bit conditional execution;
* MIN-QUERY as a bit-by-bit search through the ringers;
* the addition tiles, strings, equations, IE/OE reflection and serial query;
* the downward shift of the sum;
* incomplete assembly;
* one string per path for HAM-PATH, with edges deleted at run time.

This design's own choices:
* the roles of status bits B C D R S (only W is defined by the source);
* the status-operation set, the controller-bit data paths and all encodings;
* the controller instruction set, its program memory, loop counter and ring-wait stall;
* the two-sample ring detector, and the ringer as a clocked toggle instead of an analog oscillator;
* the hash standing in for random assembly;
* flip-flops instead of latches in the tiles, the clear step and query sequencer of the addition oracle, and a wired-OR receiver instead of per-string ringers;
* the HAM-PATH tile circuit: the source does not give it, so it is the simplest one that does the job.

Not built:
* HAM-PATH graphs with fewer nodes than `NODES`;
* reporting which path responded;
* the analog ringer and the silicon-rod devices;
* the problem-specific objective and constraint programs of the pattern-search example.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module dna_top_tb \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/damp_pkg.sv rtl/oracle_pkg.sv \
  tb/damp_prog_pkg.sv tb/dna_top_tb.sv
./obj_dir/Vdna_top_tb
```

Substitute another `*_tb` to test one block. The packages are listed first, and `-y` finds the modules.

| testbench | what it checks |
|-----------|----------------|
| `full_adder_tb` | all 8 truth-table rows |
| `ringer_tb` | silent / toggling / stop |
| `damp_pe_tb` | random loads; 16-clock add with C/S/D flags; subtract; copy to R2; controller bits; status operations; wait-bit gating; ringer |
| `damp_node_tb` | ring detection for every ACC bit against the assembled constants, and its latency |
| `damp_ctrl_tb` | exact broadcast sequence; loops; both branch outcomes; sample; stalls; clock counts |
| `damp_system_tb` | add + MIN-QUERY, global and per node, against a reference minimum; exact clock count |
| `add_tile_tb`, `add_string_tb` | tile logic; the 3 + 5 = 8 string and near-miss questions |
| `add_oracle_tb` | all 256 questions; 2N+3 latency; a missing string stays silent |
| `ham_oracle_tb` | 200+ random directed graphs against a depth-first search |
| `dna_top_tb` | all of the above end to end, with a count of every mechanism (stalls, rings, drop-outs, oracle hits, misses, both HAM answers) |

## Files

* `rtl/damp_pkg.sv`: control-word and instruction types; the random-constant hash.
* `rtl/oracle_pkg.sv`: the addition F/G functions and the permutation function.
* `rtl/full_adder.sv`, `ringer.sv`, `damp_pe.sv`, `damp_node.sv`, `damp_ctrl.sv`, `damp_system.sv`: the DAMP.
* `rtl/add_tile.sv`, `add_string.sv`, `add_oracle.sv`, `ham_string.sv`, `ham_oracle.sv`: the oracles.
* `rtl/dna_top.sv`: top level.
* `tb/`: testbenches:
  * `damp_prog_pkg.sv` builds controller programs;
  * `dna_top_tb_body.svh` holds the end-to-end checks.
