# Genetic-algorithm error detection for a network-on-chip router

A router in a dynamic network-on-chip has to decide which of its neighbours to
route data through, and must stop using a neighbour that has been damaged. This
design makes both decisions with a small hardware genetic algorithm (GA). The
16-bit words waiting on the router's four direction ports (north, south, west,
east) are treated as chromosomes. Two of them are taken as parents. They are bred
through crossover and mutation, scored by a fitness function, and one offspring is
chosen by roulette-wheel selection. The same fitness scores serve as an error
check:

- a path whose word has collapsed to all zeros or all ones is reported as
  *stuck*;
- a path whose fitness falls from one evaluation to the next is reported as
  *damaged*.

Either finding blocks the direction that path's data came from. Later reads go
around a blocked direction, so traffic moves through the routers that are still
fault-free.

All of it is synthesizable SystemVerilog (IEEE 1800-2017). Nine modules and one
package make up the design, and every module has a self-checking testbench.

## Block chain

```
  n s w e ──► router_arrangement ──► crossover ──► mutation ──► fitness
   (ports)      ▲  (parents)                                     │ fit1, fit2
                │                                                ├──► stuck_at_fault  (path choice, stuck words)
                │ wr: offspring                                  ├──► fault_analysis  (fitness drops)
                │                                                └──► roulette_wheel  (picks one offspring)
                └────────────────────────────────────────────────────────┘
  blocked[3:0] ◄── stuck / damaged findings, by source direction
  ga_controller sequences every stage
```

| module | role |
|---|---|
| `ga_pkg` | widths (`CHROM_W` = 16, `FIT_W` = 4), `chrom_t`, `fit_t`, the direction code `dir_e`, and the one-count fitness function |
| `router_arrangement` | reads two parent words from the ports, skips blocked directions, takes the written-back offspring |
| `crossover` | single-point crossover with a stepping split point |
| `mutation` | LFSR-driven single-bit flip at a low rate |
| `fitness` | 4-bit fitness of both mutated words |
| `roulette_wheel` | decelerating 00..99 wheel; fitness-proportionate pick |
| `stuck_at_fault` | chooses the better path and detects stuck words |
| `fault_analysis` | compares each fitness with the previous one through a generate/propagate comparator (`gp_compare`) |
| `ga_controller` | the state machine that runs one operation |
| `ga_noc_top` | wires all of the above together and keeps the `blocked` mask |

## One operation, clock by clock

A `start` pulse in the idle state begins an operation. The operation runs `GENS`
generations (4 by default). Each stage takes one clock, except the wheel:

| state | what happens at the end of the clock |
|---|---|
| LOAD | the router captures parent 1 from direction `sel1` and parent 2 from `sel2` |
| BREED | mutation captures the crossover children, and the crossover split point steps |
| FIT | `fit1`/`fit2` take the fitness of the two mutated words |
| EVAL | `stuck_at_fault` and `fault_analysis` evaluate, and the wheel starts spinning |
| SPIN | wait for the wheel (4905 clocks with the default wheel) |
| SELECT | the wheel registers its pick |
| WB | the chosen offspring is written into the router as the new parent 1 |

After WB the controller returns to BREED until `GENS` generations are done. It
then pulses `done` and goes back to idle.

Timing:

- The path decision of the first generation appears on `path1`/`path2`
  exactly four clocks after `start` was taken.
- A generation lasts 4911 clocks.
- A full default operation lasts 2 + 4 × 4911 clocks, about 19,650.

Parent 2 stays the same word for the whole operation, and parent 1 is always the
most recent winner. Each generation therefore breeds the current winner with the
second port word. The split point keeps advancing across generations and across
operations, so each generation exchanges a different number of low bits.

## The genetic operators

**Crossover.** With split point *k*, the two parents exchange bits *k*..0:

- `child1` = parent 1 above bit *k*, parent 2 from bit *k* down;
- `child2` is the mirror image.

Example: the parents `0010100110101011` and `0010100001010100` give:

| *k* | `child1` | `child2` |
|---|---|---|
| 0 | `0010100110101010` | `0010100001010101` |
| 1 | `0010100110101000` | `0010100001010111` |
| 2 | `0010100110101100` | `0010100001010011` |

The children are combinational in the parents and the split register. The split
steps on every clock with `en` high, and wraps from 15 to 0.

**Mutation.** A 16-bit maximal-length LFSR (x^16 + x^14 + x^13 + x^11 + 1, seed
`16'hACE1`) steps on every clock. On an enabled clock:

- bits [15:8] decide whether the words mutate: they do when that byte is below
  `MUT_RATE`, i.e. with probability 8/256 by default;
- bits [3:0] and [7:4] are the bit positions to flip in child 1 and child 2;
- each position is decoded into a one-hot mask, which is XORed into its child.

**Fitness.** `fit` = the number of one bits in the word, saturated at 15. It is
computed in one clock whenever the enable (`spin`) is high.

**Roulette wheel.** The wheel is a two-digit BCD counter, `digit1:digit0`:

1. A hidden phase counter cycles 0..99 on every clock. A spin loads the wheel
   from it, so where the wheel stops depends on when it was spun.
2. The wheel then steps once every `spintime` clocks. `spintime` starts at 10
   and grows by 1 per step. When it reaches 100 the wheel stops: 90 steps in
   4905 clocks.
3. At the stop position *v*, individual 1 is picked when
   *v*·(fit1 + fit2) < 100·fit1, and individual 2 otherwise. Individual 1 is
   picked when both fitness values are 0.

Each individual is therefore chosen with a chance proportional to its fitness.
While idle, the wheel keeps showing where it stopped.

## Error detection and port blocking

This part needs the most care when the design is reused, because its rules are
simple and strict.

**Stuck words (`stuck_at_fault`).** The fitness is a one count, so fitness 0
means an all-zeros word and fitness 15 means at least 15 one bits. These are the
words a router output stuck at 0 or at 1 would deliver. At each evaluation:

- a path with such a fitness is *stuck*;
- `fault_enable` reports that either path is stuck;
- `path1` is set when path 1 is not stuck, and either path 2 is stuck or
  `fit1 >= fit2`;
- `path2` is set when path 2 is not stuck and path 1 was not chosen;
- both are 0 when both paths are stuck.

Ties go to path 1. A higher fitness counts as the better (shorter) path.

**Fitness drops (`fault_analysis`).** The block keeps the previous fitness of
each path, and compares the new value with it through a 4-bit comparator built
from generate (`a & ~b`) and propagate (`~(a ^ b)`) terms:

- a path whose fitness fell is *damaged*, which drives `damaged` on the top;
- `temp` reports that neither value changed;
- the first evaluation after reset only records the values.

**Blocking.** One clock after an evaluation, the top marks the source direction
of every stuck or damaged path in `blocked` (bit index = select code). The
router then redirects a read of a blocked direction to the next unblocked code
(east → west → north → south → east). When all four directions are blocked, a
read fails: the operation ends with `done` and `failed` high. `clear_blocked` or
reset unblocks every direction.

Be aware that the fitness-drop rule is sensitive. The fitness of GA offspring
goes down as often as it goes up, so on ordinary traffic `damaged` fires often
and the `blocked` mask fills within a few operations. The end-to-end test relies
on this to reach the all-blocked case. A deployment would likely want a
tolerance (for example, a drop of more than *d*), or a count of repeated drops,
before it blocks a port. The comparison is in `fault_analysis.sv` (`lt1`/`lt2`)
and easy to change.

## Top-level interface (`ga_noc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | rising-edge clock; synchronous, active-high reset |
| `start` | in | 1 | begin an operation (ignored while busy) |
| `clear_blocked` | in | 1 | unblock all directions |
| `sel1`, `sel2` | in | 2 | requested directions of the two parents: 00 east, 01 west, 10 north, 11 south |
| `n`, `s`, `w`, `e` | in | 16 | port words |
| `busy`, `done`, `failed` | out | 1 | operation status; `done` is a one-clock pulse |
| `result` | out | 16 | the last offspring chosen (the router's parent 1) |
| `fit1`, `fit2` | out | 4 | fitness of the last two offspring |
| `path1`, `path2` | out | 1 | path choice of the last evaluation |
| `fault_enable`, `damaged` | out | 1 | stuck / fitness-drop finding of the last evaluation |
| `blocked` | out | 4 | blocked directions |
| `digit1`, `digit0` | out | 4 | wheel position, BCD |
| `gen` | out | 8 | generations finished in this operation |

| parameter | default | meaning |
|---|---|---|
| `GENS` | 4 | generations (wheel spins) per operation |
| `MUT_RATE` | 8 | mutation probability, out of 256 |
| `SPIN_START` | 10 | wheel step time at the start of a spin, in clocks |
| `MAX_SPIN` | 100 | step time at which the wheel stops |
| `SPIN_INC` | 1 | growth of the step time per step |

Lowering `MAX_SPIN` or raising `SPIN_INC` shortens a generation, at the cost of
a less varied stop position.

## What is specified and what is chosen here

The following are fixed by the original description:

- the block chain;
- the 16-bit words and 4-bit fitness values;
- the port names of every block;
- the crossover rule (the example above is reproduced bit-exactly);
- the east select code `00`;
- the wheel's start and stop step times, 10 and 100;
- the mutation rate value 8.

The following are this design's own choices, and each is also noted at the top
of its source file:

- the fitness formula (one count);
- the LFSR used as the mutation's random source;
- reading 8 as a rate out of 256;
- the wheel's deceleration by one clock per step, and its pick rule;
- select codes 01–11;
- the second parent output, and `wr` as offspring write-back;
- the stuck-word and fitness-drop rules;
- port blocking, and the fixed generation count;
- synchronous resets;
- the controller's state sequence.

Some published example values are not reproduced, because no rule is given that
produces them:

- the mutated words;
- the fitness values;
- the second path-choice case and the `temp` values of the stuck-at block;
- the generate/propagate values and outputs of the fault-analysis block.

For the fault-analysis inputs (fitness 1010/1001 followed by 1100/0011), this
design reports a drop on path 2 where the reference shows no fault.

Not built:

- the mesh links between routers: the number of routers, the link width and
  the flow control are unspecified, so the router's ports are brought out
  instead;
- power estimation, which is a property of the FPGA implementation rather than
  of the logic.

The description reports about 4 clock cycles of average latency for a 4-switch
network, and a small FPGA footprint (140 flip-flops). This design decides a path
in 4 clocks and uses 182 flip-flop bits.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. With
Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/ga_pkg.sv tb/tb_ga_noc_top.sv \
          --top-module tb_ga_noc_top --Mdir obj_top -o sim
obj_top/sim
```

Replace `tb_ga_noc_top` with any other testbench in `tb/`. All of them finish in
seconds.

Add `--assert` to enable the concurrent assertions in the RTL. They cover the
controller/wheel handshake, the wheel's `done` pulse, and the router's
blocked-direction and `rd_fail` rules.

| testbench | what it checks |
|---|---|
| `tb_ga_noc_top` | The whole design at default parameters, against a transaction-level model: parents, every generation's fitness, path choice, fault flags, wheel stop and offspring, and the blocking mask. Also checks the 4-clock decision latency. Runs with normal, stuck-at-0/1 and random port words until every direction is blocked and an operation fails, then after a clear. Counts that mutation, both wheel picks, stuck paths, drops, blocking, redirection, failure and clearing each occurred. |
| `tb_router_arrangement` | the east read of the reference words, all select pairs, write-back priority, hold, blocked-direction skipping, `rd_fail` |
| `tb_crossover` | the three published crossover cases, random parents at every split, wrap, hold, reset |
| `tb_mutation` | bit-exact against an LFSR model at rate 8 and rate 256, one-bit flips, observed rate |
| `tb_fitness` | one counts with saturation, hold, reset |
| `tb_roulette_wheel` | start phase, the 4905-clock spin, stop position, the pick rule, both picks |
| `tb_stuck_at_fault` | choice and stuck rules against a model, gating by `enable`/`spin` |
| `tb_fault_analysis` | drop/unchanged flags, the g/p terms, the first-evaluation rule |
| `tb_ga_controller` | the strobe order for several operations, `done`/`gen`, the failed-read exit |
