# Pipelined genetic-algorithm engine with rotating subpopulations

A genetic algorithm (GA) improves a population of candidate solutions
("chromosomes", here bit vectors) generation by generation. Each generation
goes through four steps: score every member, choose parents by score, make
children by crossover, and mutate them. A large population costs hardware:
either one copy of the step logic per group of members (fast, large) or one
copy used in turn by every step (small, slow).

This engine takes a third route. The population is split into **four
subpopulations**, and one **four-stage pipeline** serves them all in turn:

| stage | name | work in one time slot |
|-------|------|-----------------------|
| M  | working memory | build a subpopulation: the children made for it in the previous slot, plus immigrants |
| E  | evaluation | score every member, keep the best `P_BEST`, stop the run if a member solves the problem |
| S  | selection | pick `SUB_SIZE` parents by binary tournament |
| CM | crossover and mutation | make `SUB_SIZE` children from the parent pairs and mutate them |

In every time slot, each stage works on a different subpopulation, so once
the pipeline is full all four stages are busy. Each subpopulation goes
through M, E, S and CM in four consecutive slots, and then comes back to M as
its next generation. Four subpopulations keep a four-stage pipeline exactly
full.

The subpopulations are not isolated from each other. When M builds a
subpopulation, it appends the best `P_BEST` members of the subpopulation that
E scored in the slot just before. Good material therefore spreads through
the whole population. This **transfer** (immigration) step is the second idea
of the design.

## The slot schedule

`P1`..`P4` are the four subpopulations. `P1'` is the next generation of `P1`,
and `+bPk` means "plus the best members of `Pk`".

```
slot   M           E     S     CM
 0     P1+rnd
 1     P2+rnd      P1
 2     P3+bP1      P2    P1
 3     P4+bP2      P3    P2    P1
 4     P1'+bP3     P4    P3    P2
 5     P2'+bP4     P1'   P4    P3
 6     P3'+bP1'    P2'   P1'   P4      <- first full generation counted here
 7     P4'+bP2'    P3'   P2'   P1'
```

- **Slots 0 to 3.** M fills the four subpopulations with random
  chromosomes. This is the initial population.
- **Slots 0 and 1.** No subpopulation has been scored yet, so the
  immigrants are random chromosomes.
- **From slot 4 on.** M copies the children that CM wrote in the previous
  slot.

### How the memory works

A subpopulation never moves between buffers. There are four memory banks,
one per subpopulation, and the stages move over them instead. In slot `t`:

| stage | bank it uses |
|-------|--------------|
| M  | `t mod 4`       |
| E  | `(t-1) mod 4`   |
| S  | `(t-2) mod 4`   |
| CM | `(t-3) mod 4`   |

CM writes its children into the same bank that M reads in the next slot,
because `(t-3) mod 4 = (t+1) mod 4`. This is why the design needs exactly
four subpopulations (`ga_pkg::STAGES`).

Each bank has four parts. Each part is written by one stage and read by the
stage that comes after it:

| part | written by | read by | words per bank |
|------|------------|---------|----------------|
| members | M | E, then CM (two ports) | `SUB_SIZE + P_BEST` |
| scores | E | S (two ports) | `SUB_SIZE + P_BEST` |
| parent indices | S | CM (two ports) | `SUB_SIZE` |
| children | CM | M | `SUB_SIZE` |

All four parts are instances of `ga_bank_ram`. Each has one synchronous
write port and combinational read ports, like distributed RAM.

### Slot timing

A slot lasts `GROUP = SUB_SIZE + P_BEST` clocks.

- M writes one member per clock and E scores one member per clock, for the
  whole slot.
- S writes one parent per clock and CM writes one child per clock, during
  the first `SUB_SIZE` clocks of the slot.

On the first clock of every slot, the transfer unit inside M captures the
best-`P_BEST` list that E finished in the previous slot. M writes the
immigrants only at member positions `SUB_SIZE` and above, which always come
after that capture. On the same first clock, E starts a new best list.

## The stages in detail

**E: evaluation** (`ga_stage_e`, with `ga_fitness`)

- The score counts the adjustments still needed to solve the problem. Lower
  is better, and 0 means solved.
- The problem built in here is the simplest one of that form: reach the
  `target` bit pattern. The score is then the Hamming distance
  `popcount(chrom ^ target)`.
- To solve another problem, replace `ga_fitness`. The rest of the engine only
  needs a score of `$clog2(CHROM_W+1)` bits where 0 means solved.
- The best-`P_BEST` list is a small sorted register file. Each member is
  inserted behind every entry whose score is lower or equal, so on a tie the
  earlier member stays ahead.

**S: selection** (`ga_stage_s`)

- Selection is a binary tournament.
- Each of two random numbers `r` is mapped to a member index by
  `(r * GROUP) >> Q`.
- The member with the lower score wins. On a tie, the first candidate wins.

**CM: crossover and mutation** (`ga_stage_cm`)

- Children `2k` and `2k+1` come from parents `2k` and `2k+1`.
- Crossover is uniform. A random mask, drawn on the even clock, picks the
  parent of each bit. The odd child uses the complement of that mask, so a
  pair of parents gives two complementary children.
- Mutation toggles `MUT_BITS` bits (default 1) at the random positions
  `(r * CHROM_W) >> Q`.
- Mutation happens when an 8-bit random number is below `MUT_THRESH`. The
  default of 256 means every child is mutated: one random bit of each new
  chromosome is toggled.

**M: working memory and transfer** (`ga_stage_m`, `ga_transfer`)

- M writes `SUB_SIZE` children, or random chromosomes while the initial
  population is built.
- It then writes `P_BEST` immigrants, or random chromosomes during the first
  two slots.

**Best-solution comparator** (`ga_best_keeper`)

- It watches every member that E scores and keeps the best one since
  `start`.
- If the generation limit ends a run without an exact solution, this is the
  answer to use.

## Random numbers

All random numbers come from one linear cellular automaton (`ga_prbg`) of
`2Q+1` flip-flops (33 by default).

- Each cell computes the XOR of its two neighbours. Cells marked in the rule
  vector also XOR in their own value: rule 90 or rule 150, with null
  boundaries.
- The default rule vector `33'h1_6509_b4f4` was chosen so that the
  automaton's characteristic polynomial is primitive. Every non-zero state
  therefore recurs only after 2^33-1 clocks.

The state is read cyclically as `2Q+1` overlapping Q-bit windows: window `i`
holds cells `i .. i+Q-1 (mod 2Q+1)`. One clock therefore gives many random
numbers at once. The top level wires them up as follows:

| consumer | window(s) |
|----------|-----------|
| M: random chromosome | 0 |
| S: tournament candidates | 4 and 21 (disjoint) |
| CM: crossover mask | 10 |
| CM: mutation position `k` | `(27 + 5k) mod 33` |
| CM: mutation probability | low 8 bits of 26 |

Numbers used by different stages may overlap. They act on different
subpopulations.

`start` loads `seed` into the automaton. A zero seed is replaced by 1,
because the all-zero state never changes.

## Interface and timing of `ga_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-clock pulse that begins a run (and restarts a running one) |
| `seed` | in | 2Q+1 | generator seed, loaded at `start` |
| `target` | in | CHROM_W | problem instance; hold it during the run |
| `busy` | out | 1 | a run is in progress |
| `done` | out | 1 | the last run has ended; stays high until the next `start` |
| `solved` | out | 1 | the run ended because a member scored 0 |
| `slot` | out | `$clog2(4*GN+4)+1` | current time slot |
| `generation` | out | `$clog2(GN+1)` | generations completed |
| `best_valid`, `best_chrom`, `best_fit` | out | 1, CHROM_W, `$clog2(CHROM_W+1)` | best member seen in this run, and its score |

A run ends in one of two ways:

- **A solution is found.** The run stops on the clock after E scores a
  member 0. `best_chrom` is then the solution.
- **The generation limit is reached.** A generation is counted whenever CM
  finishes the fourth subpopulation, at the end of slots 6, 10, 14 and so
  on. The run stops when `GN` generations have been counted. A run that
  reaches the limit lasts exactly `(4*GN + 3) * (SUB_SIZE + P_BEST)` clocks:
  4662 clocks with the defaults.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `CHROM_W` | 16 | bits per chromosome (must not exceed `Q`) |
| `SUB_SIZE` | 16 | children per subpopulation (even); the population is `4*SUB_SIZE` |
| `P_BEST` | 2 | immigrants per subpopulation |
| `Q` | 16 | generator has `2Q+1` cells and delivers Q-bit numbers |
| `RULE` | `33'h1_6509_b4f4` | rule-150 cells of the generator; change it together with `Q`, and keep its polynomial primitive |
| `GN` | 64 | generation limit |
| `MUT_THRESH` | 256 | mutation probability, `MUT_THRESH/256` |
| `MUT_BITS` | 1 | bits toggled per mutation |

The number of subpopulations is fixed at four (`ga_pkg::STAGES`).

After coarse synthesis with the defaults, the whole engine comes to about:

- 342 word-level cells
- 174 flip-flop bits
- 2856 memory bits

## Where this design makes its own choices

The method fixes these things:

- the four stages and their slot schedule
- one subpopulation per stage
- immigration of the best `p` from the previously scored subpopulation, with
  random immigrants for the first two subpopulations
- the cellular-automaton generator read as cyclic windows
- stopping on a solution or after `gn` generations
- the best-solution comparator
- the list of user parameters

It does not fix the following, and this RTL chooses them:

- **Sizes.** Chromosome width, subpopulation size, immigrant count,
  generator size, generation limit.
- **The problem.** Distance to a target pattern.
- **The operators.** Binary tournament selection, uniform crossover with
  complementary children, and the mutation-probability encoding.
- **Memory and timing.** The banked memory organisation, one item per clock
  per stage, and the slot length.
- **The generator.** Its rule vector and the wiring of its windows.
- **Subpopulation size.** An immigrant is added to the subpopulation, so M
  holds `SUB_SIZE + P_BEST` members, and CM again makes `SUB_SIZE` children.
  The population therefore keeps a constant size.

Not built:

- **Pipelines of five or more stages.** These would need a different
  schedule, so `STAGES` is not a free parameter.
- **An LFSR or an external random source** in place of the cellular
  automaton.
- **A parameter for the number of crossover bits.** Crossover always mixes
  all bits uniformly.

## Files

| file | content |
|------|---------|
| `rtl/ga_pkg.sv` | default sizes shared by all modules |
| `rtl/ga_top.sv` | the engine |
| `rtl/ga_ctrl.sv` | slot timer, bank rotation, stage enables, generation count, stop |
| `rtl/ga_prbg.sv` | cellular-automaton random generator |
| `rtl/ga_bank_ram.sv` | banked memory, 1 write and N combinational read ports |
| `rtl/ga_stage_m.sv`, `rtl/ga_transfer.sv` | stage M and the transfer unit inside it |
| `rtl/ga_stage_e.sv`, `rtl/ga_fitness.sv` | stage E and the fitness function |
| `rtl/ga_stage_s.sv` | stage S |
| `rtl/ga_stage_cm.sv` | stage CM |
| `rtl/ga_best_keeper.sv` | best-solution comparator |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/ga_top_checker.sv` | clock-by-clock scoreboard for the complete engine |
| `tb/tb_ga_top.sv` | end-to-end test: default engine plus a `GN = 1` engine |
| `tb/tb_ga_top_full.sv` | two complete runs of the default engine |
| `tb/tb_ga_schedule.sv` | the slot table t1..t8 observed on the default engine |

## Verification

Each module has a self-checking testbench. Every testbench compares the
module's outputs with values it computes itself, and ends by printing
`TB_RESULT checks=N failures=M`. The unit testbenches check the following:

| testbench | what it checks |
|-----------|----------------|
| `tb_ga_prbg` | a 5-cell generator against a reference automaton; its period is exactly 31; the full-size generator for 500 clocks; windows, seed loading, the zero-seed substitute; the default rule vector's characteristic polynomial is primitive, which gives period 2^33-1 (checked by polynomial arithmetic over GF(2), not by simulation) |
| `tb_ga_fitness` | the score against `$countones` |
| `tb_ga_bank_ram` | random traffic against a model array, including read-during-write |
| `tb_ga_transfer` | capture only on the capture clock; the random substitute |
| `tb_ga_stage_m` | member order, the children source, the capture of immigrants at the slot's first clock, random phases |
| `tb_ga_stage_e` | scores, the solution flag, the sorted best list with ties, the restart of the list per slot |
| `tb_ga_stage_s` | the index mapping and the tournament winner |
| `tb_ga_stage_cm` | crossover, complementary masks, one- and two-bit mutation, mutation probability |
| `tb_ga_ctrl` | the whole slot schedule clock by clock; stopping on a solution; run length at default size |
| `tb_ga_best_keeper` | the running minimum, ties, clear |

The full-engine testbenches use `ga_top_checker`, which checks every clock
of a run against the rules above:

- the bank rotation
- children returning to M
- immigrants equal to an independently computed best list
- scores
- tournament winners
- children whose bits come from their two parents, except the mutated bit
- the stop conditions and the run length
- the comparator result

`tb_ga_top` also counts each mechanism and fails if one never happened.
Over three default-size runs (all solved within 6 generations) and two runs
stopped at a limit of one generation, it saw:

- random initial members and random immigrants
- transferred immigrants
- children returned to M
- selections, crossovers and mutations
- stops on a solution and stops at the limit
- best-solution updates

`tb_ga_schedule` runs the default engine through its first eight slots. For
each slot it names the subpopulation and generation that every stage works on
(`P0_j` for subpopulation j of the initial population, `P0_jk` for its k-th
new generation) and compares the names with the schedule table above. It
also checks two more things:

- every immigrant is a member that E scored in the slot before;
- the whole population has been scored once by the end of the fifth slot.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_ga_top \
    -y rtl -y tb rtl/ga_pkg.sv tb/tb_ga_top.sv -o sim
./obj_dir/sim
```

Every run takes well under a second. The simulations are two-state, so every
testbench pulses `rst_n` low: the asynchronous resets need a falling edge.
