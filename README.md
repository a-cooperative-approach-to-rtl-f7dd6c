# Cooperative compact genetic algorithm (CoCGA) in SystemVerilog

A compact genetic algorithm (CGA) does not store a population. It stores a
*probability vector*: one probability per chromosome bit. Every generation it
draws two individuals from the vector and lets them compete. It then nudges
each probability one step toward the winner's bit wherever the two
individuals differ. It stops when every probability has reached 0 or 1. In
hardware that is one small register and a little logic per chromosome bit,
with no RAM.

The cooperative CGA runs several such CGAs side by side and lets them share
what they learn:

* Each **normal cell** is a complete CGA. It also has a 5-bit **confident
  counter** (CC). The CC goes up each time the cell's tournament winner beats
  the best fitness that cell has seen. The count therefore says how
  productive the cell's current vector has been.
* A **group leader** runs no GA. It holds one vector, **BestPV**. After an
  improvement, a cell sends its vector to the leader. The leader compares the
  confident counters of all its neighbours. If the sender has the highest
  count, the leader keeps the sender's vector as BestPV. It then sends the
  new BestPV to all neighbours, and they continue from it.

This RTL builds the configuration that the paper "A Cooperative Approach to
Compact Genetic Algorithm for Evolvable Hardware" builds and measures: two
normal cells and one leader. The benchmarks are One-Max and De Jong's F1, F2
and F3. The block structure, the 8-bit probability entries, the 5-bit
counter, the 8-bit package link and the four-clock machine cycle all come
from that paper. The handshakes, the arbitration, the encodings and the
rules for the corner cases are this design's own choices. The section
[Where this design makes its own choices](#where-this-design-makes-its-own-choices)
lists them.

## Structure

```
cocga_top
├── g_cell[0..1].u_cell : cocga_cell      normal cell (a full compact GA)
│   ├── g_bit[0..L-1]   : cga_bit_module  PV entry, GEN_A, GEN_B, UPDATE PV
│   │   └── u_rng       : rng             8 random bits per clock
│   ├── u_fev_a/u_fev_b : fev             fitness of individuals a and b
│   ├── u_cmp           : cmp             tournament, best-so-far record
│   ├── u_cc            : cc_counter      confident counter (5 bits)
│   ├── u_comm          : comm            vector <-> 8-bit packages
│   └── u_ctrl          : fsm_main_ctrl   cell controller
└── u_leader            : leader_cell     CC #1/#2, BestPV, COMM #1/#2, main control
    └── g_comm[0..1]    : comm
```

`cocga_pkg` holds the shared widths and the state enums. It also holds the
benchmark selector `func_e`, the chromosome length for each benchmark
(`chrom_len`) and the seed hash for the random sources.

## One generation: the machine cycle

A cell spends four clocks on each generation. The paper counts time in these
"machine cycles" (one machine cycle = four clock cycles).

| clock | state     | strobe  | what happens |
|-------|-----------|---------|--------------|
| 1     | `CS_GA`   | `ga`    | each bit module sets `a[i] = (rnd < pv[i])`. Before it does, the controller checks convergence: if every entry is 0 or 255, it goes to `CS_DONE` instead |
| 2     | `CS_GB`   | `gb`    | `b[i] = (rnd < pv[i])`, using the next random byte |
| 3     | `CS_EVAL` | `eval`  | FEV_A and FEV_B compute the costs, which are combinational. CMP registers the winner and whether the winner beat the best so far |
| 4     | `CS_UP`   | `up_pv` | where `a[i] != b[i]`, `pv[i]` moves one count toward the winner's bit, saturating at 0 and 255. On an improvement, `inc` bumps the CC and the COMM send starts |

Probabilities are 8-bit counts. 128 stands for 0.5 and is the reset value.
Each step is one count, so the population size is effectively N = 256. Entry
255 generates only ones, so a converged entry stays converged.

Each bit module has its own random source: a 16-bit Galois LFSR with
polynomial x^16 + x^14 + x^13 + x^11 + 1. The LFSR advances eight steps per
clock, so the two draws for a and b share no bits. Seeds are a hash of the
cell number and the bit number (`rng_seed`). The design is therefore fully
deterministic from reset.

## The cooperation protocol

This is the part of the design that is hardest to follow.

### The link

Each cell is joined to the leader by three things:

* **`cc`**: a plain 5-bit wire carrying the cell's confident counter.
* **up channel** (`up_valid`, `up_data[7:0]`, `up_ready`): carries the
  cell's vector to the leader.
* **down channel** (`dn_valid`, `dn_data[7:0]`, `dn_ready`): carries the
  leader's vector to the cell.

A vector is sent as L packages of 8 bits, entry 0 first. One package moves
on each clock in which valid and ready are both high. Both ends use the same
`comm` unit. The cell has one and the leader has one per neighbour. An
assertion in `comm` checks that an offered package stays offered, unchanged,
until it is taken.

### What a cell does

1. After an improvement (`CS_UP` with `improved`), the cell enters `CS_SEND`
   and offers its vector. The GA pauses until the send ends, so the vector
   cannot change while it is being sent.
2. The cell serves a package arriving on the down channel by entering
   `CS_RECV`. Each received package is loaded straight into its bit module
   (`load`). The cell checks for such a package at three points:
   * at the end of each generation;
   * while it waits in `CS_DONE`;
   * while a send has not yet had its first package taken.

   In the last case the send is dropped (`tx_abort`), because the vector it
   would carry is about to be replaced.
3. Once both cells are converged and no transfer is pending, `done` rises.

### What the leader does

The leader's main control (`LS_IDLE → LS_RECV → LS_BCAST → LS_IDLE`) works
as follows:

1. **IDLE.** The leader waits for a neighbour to offer a vector. An offer
   means that neighbour's counter has just gone up. If several neighbours
   offer at once, the leader picks one round robin. It samples every
   neighbour's `cc` into its CC registers. It then decides to accept the
   offer if the sender's count is the highest in the group; ties go to the
   sender.
2. **RECV.** The leader takes the L packages. If it accepted the offer, it
   writes them into BestPV. If not, it takes the packages and drops them, so
   BestPV still holds the vector of the neighbour that last held the top
   count. The leader pulses `accepted` or `rejected` once per vector.
3. **BCAST.** This step runs only after an accept. The leader sends the new
   BestPV to every neighbour in parallel, each over its own COMM. That
   includes the sender, which loses L clocks getting its own vector back.
   The leader returns to IDLE when all sends are finished. After a reject it
   goes straight back to IDLE, because BestPV has not changed.

### Why it cannot deadlock

The leader serves one transaction at a time. A cell can therefore be in the
middle of a send only while the leader is receiving from that same cell, and
the leader never broadcasts during a receive. A cell that is waiting to send
(its first package not yet taken) gives way to a broadcast. A cell that is
computing serves a broadcast within four clocks.

## Benchmarks and fitness encoding

`fev` is combinational. It returns a 72-bit **cost**, where smaller is better,
so one comparator serves every benchmark. Every scaling is exact, so the cost
orders chromosomes exactly as the real-valued function would. Field k uses
bits `[k*W +: W]`, read as an unsigned number r.

| `FUNC`      | L  | fields     | variable              | cost |
|-------------|----|------------|-----------------------|------|
| `FN_ONEMAX` | 32 | –          | –                     | L − (number of ones) |
| `FN_F1`     | 30 | 3 × 10 bit | x = (r − 512)/100     | Σ (r−512)² = 10⁴·F1 |
| `FN_F2`     | 30 | 2 × 15 bit | x = (r − 16384)/8000  | 100(X1² − 8000·X2)² + 8000²(8000 − X1)² = 8000⁴·F2, with X = r − 16384 |
| `FN_F3`     | 50 | 5 × 10 bit | x = (r − 512)/100     | Σ ⌊(r+88)/100⌋ = F3 + 30 |

The benchmark definitions are:

* F1 = Σ xᵢ² over three variables;
* F2 = 100(x₁² − x₂)² + (1 − x₁)²;
* F3 = Σ ⌊xᵢ⌋ over five variables.

The chromosome lengths are the paper's. The field encodings are this design's
own.

## Parameters

| module        | parameter | default              | meaning |
|---------------|-----------|----------------------|---------|
| `cocga_top`   | `FUNC`    | `FN_ONEMAX`          | benchmark computed by the fitness evaluators |
| `cocga_top`   | `L`       | `chrom_len(FUNC)`    | chromosome length: 32 / 30 / 30 / 50 |
| `leader_cell` | `M`       | 2                    | number of neighbours. The top always uses 2 |
| `cocga_pkg`   | `PV_W`, `CC_W`, `FIT_W` | 8, 5, 72 | entry, counter and cost widths |

## Measured behaviour

These figures come from the included testbenches. The design is deterministic,
so they repeat exactly. A generation is one machine cycle, which is four
clocks.

| benchmark | result                         | generations of cell 0 | vectors accepted |
|-----------|--------------------------------|-----------------------|------------------|
| One-Max   | optimum (all ones)             | 2,149 (9,751 clocks in total) | 12 (3 rejected) |
| F1        | 0.0003 (optimum 0)             | 5,159                 | 22 |
| F2        | 0.000002 (optimum 0)           | 9,019                 | 16 |
| F3        | −30 (optimum)                  | 43,822                | 14 |

The paper reports 11,492 / 25,542 / 27,757 / 9,407 machine cycles for its
CoCGA. It does not give its population size or random sources, so these
counts cannot be compared one to one. F3 reaches its optimum early (about
2,000 generations). It then takes long to converge because F3 is flat almost
everywhere, so nothing pulls the remaining entries toward 0 or 255.

### Cooperative against plain

The paper also claims that the cooperative group is 2.9 to 5 times faster
than a single plain CGA. `tb_cga_vs_cocga` runs both from the same reset:
one `cocga_cell` with an unused link, and one group. It reports the number
of machine cycles each needs. The speedup is the plain CGA's time divided by
the group's.

| benchmark | plain CGA: end / time to best | CoCGA: end / time to best | speedup to end |
|-----------|-------------------------------|---------------------------|----------------|
| One-Max   | 2,180 / 995                   | 2,438 / 1,196             | 0.89 |
| F1        | 4,272 / 2,590 (best 0.0001)   | 5,430 / 3,568 (best 0.0003) | 0.79 |
| F2        | 7,348 / 480 (best 0.006)      | 9,199 / 3,111 (best 0.0000018) | 0.80 |
| F3        | 45,156 / 1,603                | 49,561 / 1,952            | 0.91 |

With this design's choices and seeds the group is **not** faster. It is
slightly slower, because:

* every transfer pauses the GA of the cells involved for at least L clocks;
* an accepted vector overwrites the other cell's vector, whatever progress
  that cell had made.

On F2 the group does find a markedly better solution. These are single runs
with one set of seeds, so they say little about an average. The paper's
speedup is not reproduced here. Several details of the paper's design that
would affect it are not known, among them:

* whether its COMM transfers overlap the GA;
* its population size;
* how its leader handles a vector from a neighbour that is not the top one.

After synthesis, the top uses about 2,200 flip-flop bits. Each cell uses about
960 of them, and about half of those are the per-bit 16-bit LFSRs. The leader
uses about 290 of them.

## Where this design makes its own choices

These points do not come from the paper:

* **Link.** The paper draws a single bidirectional 8-bit path. This design
  uses two one-way 8-bit channels with valid/ready handshakes.
* **What the leader stores.** The leader's pseudocode says to copy the vector
  of the neighbour with the highest counter. The leader stores only BestPV,
  so it can copy the vector actually offered and nothing else. The paper's
  rule is followed exactly whenever the sender holds the highest count. When
  the sender does not, BestPV is left as it is. Nothing is broadcast then,
  because the leader pseudocode sends only "new updated" vectors. The other
  reading, a broadcast after a reject as well, makes the group slower in
  simulation on all four benchmarks, because it throws away the sender's
  progress.
* **Counter overflow.** The confident counter saturates at 31 instead of
  wrapping. A cell that has improved often never looks worse than one that
  has improved rarely. A cell still sends after an improvement even when its
  counter is already saturated.
* **When the counter moves.** The counter is bumped in the update clock,
  which is one clock after the evaluation that produced the improvement.
* **Final answer.** The top reports the best individual either cell has
  evaluated (`best_cost`, `best_chrom`). BestPV is the vector the leader last
  accepted. It need not be converged when the search ends, because the cells
  go on to converge without further improvements.
* **Fixed details.** Tournament ties go to individual a. The reset is
  asynchronous and active low, and the search starts when it is released.
* **Configuration.** The paper's topology figure sketches a larger grid of
  cells. This design builds only the configuration the paper measures: one
  leader with two neighbours. The standalone (non-cooperative) CGA the paper
  compares against is not a separate top. It is a `cocga_cell` with `up_ready` tied
  high and `dn_valid` tied low. Each improvement then costs L idle clocks,
  spent on a send that goes nowhere.
* **Other random choices.** The random source, the seed hash and the
  fitness encodings are all this design's own.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
also has a watchdog.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  rtl/cocga_pkg.sv tb/tb_cocga_top.sv --top-module tb_cocga_top -o sim
./obj_dir/sim
```

| testbench            | what it checks |
|----------------------|----------------|
| `tb_cocga_top`       | the full default design (One-Max, 32 bits) from reset to `done`: optimum reached, cost matches a reference, four clocks per generation, and every mechanism occurs (CC increment, accept, reject, dropped send, broadcast to each cell) |
| `tb_cga_vs_cocga`    | plain CGA against the CoCGA group on all four benchmarks: costs checked against references, times and speedups printed (helper `cga_vs_cocga_pair`) |
| `tb_cocga_workloads` | F1, F2 and F3 groups run to the end, with costs checked against real-arithmetic references and results near the optimum |
| `tb_cocga_cell`      | one cell against a model leader: each vector sent equals its PV, one vector per CC increment, a broadcast vector is loaded exactly, and a converged vector stops the cell |
| `tb_leader_cell`     | accept, reject, ties, simultaneous offers, broadcast contents, the CC registers and the converged flag |
| `tb_comm`, `tb_fsm_main_ctrl`, `tb_cmp`, `tb_cc_counter`, `tb_cga_bit_module`, `tb_fev`, `tb_rng` | the individual blocks against reference models |

To run another benchmark, set `FUNC` on `cocga_top` (for example
`cocga_top #(.FUNC(cocga_pkg::FN_F3))`). The chromosome length follows
automatically.
