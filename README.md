# Evolving a non-uniform cellular automaton in hardware

This RTL evolves a ring of 256 small automata so that, together, they
compute a global function. Each automaton (a *cell*) has its own transition
table, so the automaton is *non-uniform*. The ring is trained by cellular
programming, and the whole evolutionary loop runs in hardware. For each
generation the machine:

1. starts the ring from 256 stored initial configurations (*seeds*), one
   after the other;
2. runs the ring 256 steps on each seed;
3. has each cell count on how many seeds it ended in its awaited state;
4. lets each cell replace its transition table with the table of a fitter
   neighbour, or with a random mix of both neighbours' tables.

Evolution is local and co-operative. No cell sees the global score: a cell
learns only from its left and right neighbours. In software, one generation
of this loop takes about a minute. The same work in hardware takes 66,304
clock cycles, so the loop can run for the thousands of generations that
cellular programming needs.

The design follows a system first built on a logic emulator. It keeps that
system's block structure, memory sizes and cycle budget. Where that system
left a detail open, this RTL makes a choice, and each choice is listed in
[Choices and departures](#choices-and-departures).

## The cell

Each cell holds:

- a **2-bit state** (a 4-state automaton);
- a **64 x 2-bit rule table**. A neighbourhood of radius 1 gives a 6-bit
  address `{left, self, right}`, so the table has 2^6 = 64 entries. Entry
  `{l,s,r}` is the next state of a cell whose left neighbour is in state
  `l`, whose own state is `s` and whose right neighbour is in state `r`;
- an **8-bit fitness counter**, which saturates at 255;
- a one-bit **match latch**.

The rule table has a single address. Two sources share it:

| `rule_global` | address | what the output is |
|---|---|---|
| 0 (working and fitness cycles) | `{left, state, right}` | next state S_T+1 |
| 1 (all other cycles) | broadcast `rule_addr` | entry `rule_addr`, offered to both neighbours |

The broadcast address reaches all 256 cells. In the original system this
address bus was the hardest net to route.

**Fitness.** In the compare cycle, a cell latches a match when both of these
equal its awaited result:

- its state S_T;
- the next state S_T+1 that its table would produce.

A match therefore means that the cell is at the awaited value and would stay
there: it has reached a fixed point. In the following cycle, every matching
cell adds one to its fitness.

**Rule modification.** For each table entry, all cells act in the same
clock cycle. "Fitter" means strictly greater fitness.

| left fitter | right fitter | new entry |
|---|---|---|
| no | no | unchanged (no write) |
| yes | no | left neighbour's entry |
| no | yes | right neighbour's entry |
| yes | yes | `rnd_bit ? right : left` (cross-over) |

Each cell reads its neighbours' old entries and writes its own entry on the
same edge. So every cell reads the pre-modification tables, and the order in
which cells act does not matter. Over the 64 entries, cross-over is
*uniform*: each entry comes from a randomly chosen neighbour. It does not
take a prefix from one neighbour and a suffix from the other. A ring of
cells that share one table forms a cluster. Cells at the border between two
clusters mix the two tables.

The ring is closed. Cell 0's left neighbour is cell 255, and cell 255's
right neighbour is cell 0.

## One generation, cycle by cycle

The `evolver` sequences everything. Each cycle it sends one command word,
`cell_ctrl_t` in `ca_pkg`, to all cells. The word has these flags:

- `init_load`
- `step`
- `rule_global`
- `fit_clear`
- `fit_compare`
- `fit_inc`
- `rule_wr`

A generation with the default parameters runs as follows.

| phase | cycles | commands | notes |
|---|---|---|---|
| LOAD | 1 (first generation of a run only) | `init_load`, `fit_clear` | seed at `pat_addr` enters the cells |
| DYN | 256 per pattern | `step` | one CA iteration per clock |
| FIT, cycle 1 | 1 per pattern | `fit_compare` | RESULTS is read at the same `pat_addr`; `pat_addr` then advances |
| FIT, cycle 2 | 1 per pattern | `fit_inc`, and `init_load` unless this was the last pattern | next seed loads while the fitness increments |
| EVOL | 64 entries x 4 = 256 | `rule_wr` in every 4th cycle | one RANDOM byte is read per cycle |

Total per generation: 256 x (256 + 2) + 256 = **66,304 cycles**. The first
generation of a run takes one cycle more.

The last EVOL cycle opens the next generation. In that cycle it:

- writes the last rule entry, using the old fitness;
- clears the fitness counters;
- loads the first seed of the next generation.

All three happen on the same clock edge. This is why a later generation
needs no LOAD cycle.

**The four cycles of one rule entry.** `evolution_ctrl` reads one byte from
RANDOM in each of the four cycles and shifts it into a register. In the
fourth cycle it writes the entry. At that point the 32 bits read for the
entry are on `rnd_word`, with the newest byte in the low bits. Cell `i`
uses bit `i mod 32`, so cells 32 apart make the same left/right choice.

**Global test and stopping.** The first EVOL cycle comes before any rule is
written. In that cycle the evolver tests `global_ok`, which is the AND over
all cells of `fitness >= fit_threshold`. If the test passes, the run stops
with `ok` set and the tables are left as they were. If it fails, evolution
proceeds. A run also stops after `max_gens` generations. With
`max_gens = 0` it runs until the global test passes. `done` pulses for one
cycle when a run ends.

**Addresses keep running.**

- The SEEDS/RESULTS address does not return to zero at a new generation.
  Each generation sees the next 256 seeds, and the 8K-word memories hold 32
  generations' worth before the seeds repeat. Showing the same patterns
  every generation is known to freeze evolution at a fitness equilibrium.
- The RANDOM address likewise runs through its 32K bytes, which cover 128
  generations.

## Memories and host interface

| memory | size | content | read by |
|---|---|---|---|
| SEEDS | 8192 x 512 | initial configuration, cell `i` in bits `[2i+1:2i]` | `pat_addr` |
| RESULTS | 8192 x 512 | awaited final configuration for the seed at the same address | `pat_addr` |
| RANDOM | 32768 x 8 | noise for cross-over | `rand_addr` |

All three memories have an asynchronous read port, like the static RAMs
they stand for, and a synchronous write port for the host. The noise is
stored rather than generated, so a run with the same memory contents
repeats exactly. A pseudo-random generator would cut the global wiring, but
a run could then no longer be repeated exactly.

The host can use the following ports of `evolvable_ca`, and only while
`busy` is low:

- `seed_*`, `res_*`, `rnd_*`: fill the memories.
- `rule_we`, `rule_addr`, `rule_wdata`: write entry `rule_addr` of all 256
  tables at once, with cell `i` in bits `[2i+1:2i]`. Use this to load the
  initial tables, which are normally random.
- `rule_rdata`: all 256 tables' entry at `rule_addr`. Step `rule_addr`
  through 0 to 63 to dump every table.
- `cell_state`, `cell_fitness`, `pat_addr`, `rand_addr`, `pat_idx`,
  `dyn_count`, `ev_state`, `gen_count`: observation outputs, always valid.

A run is: fill the memories, write the tables, set `max_gens` and
`fit_threshold`, then pulse `start`.

## Parameters

The defaults are the original system's sizes. `ca_pkg` holds them.

| name | default | meaning |
|---|---|---|
| `N_CELLS` / `N` | 256 | cells in the ring |
| `STATE_W` | 2 | state bits (4 states) |
| `RULE_DEPTH` | 64 | rule entries (2^(3 x STATE_W)) |
| `FIT_W` / `FW` | 8 | fitness counter bits (saturating) |
| `N_PATTERNS` / `N_PAT` | 256 | patterns per generation |
| `DYN_CYCLES` / `DYN` | 256 | working cycles per pattern |
| `PAT_DEPTH` | 8192 | SEEDS / RESULTS words |
| `RAND_DEPTH`, `RAND_W` | 32768, 8 | RANDOM size |
| `RULE_PHASES` | 4 | cycles per rule entry (must be at least 2) |
| `GEN_W` | 16 | generation counter bits |

`evolvable_ca` exposes `N`, `FW`, `N_PAT`, `DYN`, `PAT_DEPTH_P` and
`RAND_DEPTH_P`. `STATE_W` is fixed by the package.

## Choices and departures

Taken from the original system:

- the block structure: a sequencer with initialization, dynamics, fitness
  and evolution parts; SEEDS, RESULTS and RANDOM memories; 256 cells;
- all memory and array sizes;
- the cell's datapath, with comparators on the next state and greater-than
  comparators against both neighbours' fitness;
- the three selection rules and uniform cross-over;
- the circular boundary;
- the cycle budget of 256 working cycles, 2 fitness cycles per pattern and
  256 cycles of rule modification.

This design's own decisions:

- **Working cycles per pattern.** The original flow describes 300
  iterations, while its cycle accounting uses 256. This RTL uses 256 as the
  default of `DYN_CYCLES`.
- **Generation length.** The original quotes 66,048 cycles per generation,
  which counts only the working and fitness cycles. This RTL also counts
  the 256 rule-modification cycles, giving 66,304.
- **Fitness test.** The original compares the next state with the awaited
  result, and asks for a fixed point to hold for two iterations. This RTL
  requires both S_T and S_T+1 to match. The compare and the increment use
  one cycle each.
- **Fitness width.** The counter is 8 bits, the width seen in the original
  design's probed signals. With 256 patterns a perfect cell would score
  256, so the counter saturates at 255.
- **Global test.** The original only names its global test. Here it is
  "every cell at or above `fit_threshold`". The `max_gens` limit is added.
- **Use of the random bytes.** The use of the 4 cycles per rule entry, the
  assignment of random bits to cells and the cross-over polarity (1 =
  right) are this design's own.
- **Host ports and reset.** The memory and rule-table host ports, the
  asynchronous active-low reset of all registers and the asynchronous
  memory reads are this design's own. The memories are not reset.

Not built:

- **Mutation.** The original system had none.
- **Evolution of the neighbourhood.** The original mentions that which
  neighbours take part could also be evolved, but gives no mechanism. The
  cells here always use their nearest neighbours.
- **Fitness on cyclic attractors.** The synchronization ("counter") tasks
  end in a cycle of period 2, 4 or 8, not in a fixed point. This RTL checks
  one awaited configuration held for two iterations. It can therefore
  evolve fixed-point tasks such as density and ordering, but not the
  counters.
- **The emulator's probing and host software.** The observation ports
  replace them.

## Files

| file | block |
|---|---|
| `rtl/ca_pkg.sv` | sizes, `cell_ctrl_t`, `ev_state_e` |
| `rtl/evolvable_ca.sv` | top level: evolver + memories + cell array |
| `rtl/evolver.sv` | generation sequencer, global test, stopping |
| `rtl/initialization_ctrl.sv` | pattern address/count, seed-load command |
| `rtl/dynamics_ctrl.sv` | working-cycle counter |
| `rtl/fitness_ctrl.sv` | compare / increment cycles |
| `rtl/evolution_ctrl.sv` | rule-entry walk, RANDOM reads, write strobe |
| `rtl/seeds_mem.sv`, `rtl/results_mem.sv`, `rtl/random_mem.sv` | the three memories |
| `rtl/cell_array.sv` | ring of cells, global test |
| `rtl/ca_cell.sv` | one automaton |
| `rtl/rule_table.sv` | 64 x 2 rule memory |
| `rtl/fitness_counter.sv` | saturating fitness counter |

Each module has a testbench `tb/tb_<module>.sv`. Each testbench checks its
block against values computed independently, and ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_evolvable_ca` runs the whole system at its default size. It covers one
  complete generation stopped by the generation limit, then a second run
  stopped by the global test. It checks every cell's fitness and all
  16,384 rule entries against a behavioural model of the automaton and of
  the selection rules. It also checks the exact cycle counts: 66,305 for
  the first run and 66,050 for the second. It counts every mechanism (seed
  loads, steps, saturation, keep/copy-left/copy-right/cross-over, both stop
  conditions) and fails if one never occurred.
- `tb_evolver` compares the sequencer's command word cycle by cycle with the
  generation schedule, at a reduced size.
- `tb_fixed_point_tasks` evolves the ring on two fixed-point tasks at full
  size, for four back-to-back generations each:
  - **density**: settle to all ones if the majority of the seed is 1,
    otherwise to all zeros;
  - **ordering**: settle to the seed with its ones moved to the
    high-numbered cells.

  It checks every generation's fitness and the final tables against the
  model, and prints the mean fitness per generation. From random tables,
  the mean fitness rises steadily over the four generations: from about 17
  to about 31 (of 256) for density, and from about 18 to about 32 for
  ordering.
- `tb_density_evolution` runs the density task for 100 generations at full
  size, which is about 6.6 million cycles and about one minute of
  simulation. The seeds fill all 8192 SEEDS words, so the seed set repeats
  every 32 generations. The testbench reads the tables after every
  generation and checks every entry against the selection rules, using the
  sampled fitness and that generation's RANDOM bytes. In the first and the
  last generation it also checks the fitness against the reference model.
  In the run as shipped, the mean fitness per cell climbs from 17.6 to
  about 103 by generation 10, about 236 by generation 30, and 254.8 (of a
  saturating 255) by generation 99. The ring learns to settle every cell
  to the majority value on nearly all of these seeds. Seed densities here
  are drawn uniformly, so most seeds are far from 50% and easy to classify.
  Seeds concentrated near 50% are a harder test, which this bench does not run.

## Simulating

All sources are plain SystemVerilog-2017. Simulate with Verilator 5, for
example:

```
verilator --binary --timing --assert -Irtl rtl/ca_pkg.sv tb/tb_evolvable_ca.sv \
          --top-module tb_evolvable_ca -Mdir obj_top
./obj_top/Vtb_evolvable_ca
```

`-Irtl` lets Verilator find each module in `rtl/<name>.sv`. Replace the
testbench name to run any other block. The full-size test builds in about
15 seconds and simulates its roughly 132,000 cycles in a few seconds.

Lint gives two kinds of warning:

- unused constants of the shared package;
- a note that `rst_n` is used both as an asynchronous reset and in the
  `disable iff` of the evolver's assertions.

Both are expected.
