# PLGA: a hardware pipeline for genetic-algorithm function optimisation

A genetic algorithm (GA) improves a population of candidate solutions by repeating
four operations: **selection**, **crossover**, **mutation** and **evaluation** of
the objective function. In a classical GA these steps cannot overlap. Roulette-wheel
selection needs the fitness of the whole generation before it can pick anything.

This design uses a *stochastic selection* that judges each chromosome only against
the best fitness seen so far:

```
Sel(x) = x       if f_x >  f_max                      (x also becomes the new best)
       = x       if f_x <= f_max and P >  P1
       = x_max   if f_x <= f_max and P <= P1
P  = exp(-(f_max - f_x) / T),   P1 uniform in [0,1)
T  = T0 (1 - alpha)^k,          k = floor(100 g / G)   (g = generation, G = last one)
```

A chromosome can therefore be selected as soon as it has been evaluated. The four
operations become the stages of a ring pipeline, and every stage works on a
different chromosome in the same cycle. The generations overlap as well.

The RTL follows the pipelined GA (PLGA) and the stack-based evaluation unit of the
paper *"A Hardware Pipeline for Function Optimization using Genetic Algorithms"*.
Where the paper leaves a detail open, this implementation makes its own choice; the
section "Departures and own choices" lists them.

## The pipeline

```
              +---- S1 ----+             +-- M1 M2 --+        +-- E1  E2 --+
 population   |            |             |  M3 M4    |        |   ...      |
 pool (FIFO) -+            +--> C ------>+  M5 M6    +------->+   ...      +--+
     ^        |            |             |  M7 M8    |        |  E11 E12   |  |
     |        +---- S2 ----+             +-----------+        +------------+  |
     +------------------------------------------------------------------------+
```

| stage | module | units | time per operation |
|---|---|---|---|
| population pool | `pool_fifo` | 1 FIFO, 64 entries | 1 write and 1 pair read per cycle |
| selection | `sel_stage` (2 x `sel_unit`) | S1, S2 | 1 cycle per pair |
| crossover | `xover_unit` | C | 1 cycle per pair (this defines the T-cycle) |
| mutation | `mut_stage` (8 x `mut_unit`) | 4 pairs | 1 cycle per 25-bit gene: 10 cycles for 10 variables |
| evaluation | `eval_stage` (12 x `eval_unit`) | 6 pairs | depends on the program: 159 cycles for the 10-variable test function |

The unit counts are those of the paper's example pipeline (s = 1, m = 4, e = 6 pairs
of units per crossover unit). With 10 variables and real objective functions, mutation
and, above all, evaluation are slower than that example assumes. The built pipeline
is therefore a *reduced* pipeline: the evaluation stage sets the rate. For the
10-variable test function, 12 evaluation units take about 13.3 cycles per
chromosome.

Stages are joined by valid/ready handshakes, and there is no central scheduler. When
all evaluation units are busy, finished mutation units hold their results. The
crossover and selection registers then fill, and selection stops taking pairs from
the pool. Exactly `POP_SIZE` chromosomes circulate, so the pool cannot overflow. The
pool runs dry only when the population is not much larger than the number of
chromosomes the stages can hold at once, which is about 30 with the default unit
counts.

## Running an optimisation (`plga_top`)

1. **Program.** Write the objective function in postfix form through
   `prog_we`/`prog_addr`/`prog_data` (at most `PF_LEN` = 64 entries), and hold its
   length on `prog_len`. The function must return the *fitness*, which the pipeline
   maximises. To minimise `f`, program `0 <f> -`.
2. **INIT.** Send `POP_SIZE` chromosomes on `init_valid`/`init_chrom`
   (`init_ready` handshake). They go straight into the evaluation stage, so the
   initial pool is evaluated before the run starts.
3. **RUN** starts by itself once the whole evaluated population is in the pool.
   Pairs circulate. Every `POP_SIZE` selected chromosomes close one generation;
   `gen` counts generations and the temperature drops in 100 steps over `G_MAX`
   generations.
4. **DONE** (`done`, `mode` = 2) after `G_MAX` generations. If `stop_en` is set, it
   comes as soon as `best_f >= stop_fit`. No new pairs are taken after that;
   children still in flight return to the pool. `best_x`/`best_f` hold the best
   chromosome of the whole run.

`eval_error` is sticky. It is set when an evaluation hits a stack error, an unknown
variable or a division by zero. The `push_*` and `ev_*` outputs report internal
events for observation: pool writes, selection outcomes, crossovers, bit flips,
stalls, generation ends, temperature steps and divisions.

## Data formats (`plga_pkg`)

* **Chromosome:** `NVAR` genes of 25 bits; gene *i* (variable x_(i+1)) is at bits
  `[25*i +: 25]`. A gene `b` stands for `v = -5.12 + b * 10.24 / (2^25 - 1)`, the
  variable range of all the benchmark functions.
* **Numbers** in the evaluation units and the fitness: signed fixed point, 48 bits
  with 24 fraction bits (`fix_t`, range about +-8.4e6, resolution 6e-8).
* **Postfix entries** are 50 bits: a 2-bit tag and a 48-bit payload.

  | tag | meaning | payload |
  |---|---|---|
  | `00` TAG_NUM | numeric constant | `fix_t` value |
  | `01` TAG_VAR | variable symbol | variable index, 0-based |
  | `10` TAG_OP | operator | `0` +, `1` -, `2` *, `3` / in bits [1:0] |

  The separate operator tag means a numeric operand can never look like an operator
  to the comparator. `pf_num`, `pf_var` and `pf_op` in the package build entries.
* **Probabilities and temperature:** P and P1 are unsigned Q0.16 (P is Q1.16 so that
  it can reach 1.0); T and 1/T are unsigned Q16.16.

## The evaluation unit (`eval_unit`)

Each evaluation unit is a small stack machine that runs the postfix program on one
chromosome. Its parts:

* **Postfix string buffer:** a right-shift register. The program is copied into it
  when a chromosome arrives. The rightmost cell is the current symbol, and each
  completed symbol shifts the register one place.
* **Chromosome-value buffer** (`chrom_value_buf`): holds the genes and their decoded
  values. Its **associative mapper** replaces a variable symbol by its value as the
  symbol reaches the rightmost cell.
* **Comparator** (`op_detect`): XORs the symbol with each of the four operator codes
  and ORs each result's bits. An OR output of 0 means a match. An AND of the four OR
  outputs is 1 for an operand.
* **Stack** (`eval_stack`): a left/right shift register whose leftmost cell is the
  top, plus an up/down counter as the top pointer. A push shifts right and counts up;
  a pop shifts left and counts down.
* **Arithmetic unit** (`arith_unit`): + - * take one cycle. Division is a restoring
  divider that needs 74 cycles.

Operand: push, 1 cycle. Operator: pop the right operand, wait `D1` cycles, pop the
left operand and start the arithmetic unit, wait at least `D2` cycles and until the
result is ready, then push it. With `D1 = D2 = 1` that is 3 cycles for + - * and
76 cycles for /. One more cycle after the last entry, `out_valid` rises with the
fitness, which is the top of the stack. An error is flagged when the stack does not
hold exactly one value at that point.

Example: the test function `-(x1^2 + ... + x10^2)/2` is

```
0  x1 x1 *  x2 x2 * +  ...  x10 x10 * +  -  2 /         (43 entries)
```

That is 22 operands, 20 fast operators and one division: 22 + 60 + 76 + 1 =
159 cycles.

The four operators cannot express cos, exp, sqrt, |x|, max or an integer part, and
the program set has no duplicate operator, so a square of a sub-expression must be
written out twice. Of the paper's eight benchmarks, only the sphere (f1),
Rosenbrock (f4) and Schwefel's second function (f7) can be programmed. They fit the
64 entries for f1 up to 15 variables, f4 up to 3 and f7 up to 5.

## The selection stage (`sel_stage`, `sel_unit`)

Both selection units share one best-so-far register (`best_x`, `best_f`). S1 judges
the first chromosome of the pair against it. S2 judges the second against the best
as S1 left it. The register keeps its value across generations, so the best
chromosome of the run is never lost; it plays the part of the elite. After reset
`best_f` is the most negative number.

P is computed without a divider or an exp unit. The unit forms
`d = (f_max - f_x) * (1/T)` and `y = d * log2(e)`. It then takes
`P = 2^-y = (2^-frac(y)) >> floor(y)`, with the fractional power read from a
32-entry table `round(65536 * 2^(-i/32))`, which is built at elaboration. Truncating
`y` to 1/32 makes P at most about 2 % too large. P1 for S1 and S2 are the two
halves of one xorshift32 word. The temperature unit (`temp_sched`) supplies 1/T and updates
it by multiplication, so no division is needed anywhere.

## Crossover and mutation

* `xover_unit`: with probability `PC` the pair swaps tails at one random cut point
  (1..CW-1). Otherwise the pair passes unchanged.
* `mut_unit`: flips each bit independently with probability `PM`, using an 8-bit
  random number per bit against `round(PM*256)` (13, so the true rate is 0.0508).
  The unit handles 25 bits per cycle. `mut_stage` sends a pair to a pair of idle
  units and returns finished chromosomes one per cycle, round-robin.

## Parameters (`plga_top`)

| parameter | default | from |
|---|---|---|
| `POP_SIZE` | 50 | paper's runs |
| `G_MAX` | 2000 | paper's runs |
| `NVAR` | 10 | paper's runs (dimension 10) |
| `T0`, `ALPHA` | 50.0, 0.05 | paper's runs |
| `PC`, `PM` | 0.6, 0.05 | paper's runs |
| `NM_PAIRS`, `NE` | 4, 12 | paper's example pipeline |
| `PF_LEN` | 64 | own choice |
| `STACK_DEPTH` | 16 | own choice |
| `POOL_DEPTH` | 64 | own choice (at least `POP_SIZE`) |
| `MUT_BPC` | 25 | own choice (one gene per cycle) |

The evaluation delays `D1`/`D2` are parameters of `eval_stage`/`eval_unit`
(default 1 each).

## Departures and own choices

* **Elitism.** The paper keeps the best chromosome in the first location of the
  pool. A FIFO pool has no fixed first location, so the best chromosome is kept in
  the selection stage's best register instead. Selection uses it in place of every
  rejected chromosome.
* **Initial population.** The host supplies it, and the pipeline's own evaluation
  units evaluate it.
* **Generation boundary.** A generation is `POP_SIZE` selected chromosomes. Since
  generations overlap, some children of generation g are still in flight when
  generation g+1 begins selecting.
* **Crossover type** (single point), **mutation granularity**, **random number
  generators**, **fixed-point formats**, **entry encoding**, **handshakes**,
  **dispatch/arbitration** in the parallel stages, and **overflow behaviour**
  (wrap-around; division by zero saturates) are this design's choices.
* **Stage times** differ from the paper's example (see the pipeline table), so the
  paper's speedup formulas are not reproduced cycle for cycle.
* The paper's experiments were software simulations of the algorithm. Its tables
  of speedups and solution quality are not something this RTL is meant to match.
  Still, the 10-variable sphere run with stopping value 0.005 ends after 181
  generations in the workload test, near the paper's mean of about 180 for that
  case.

## Simulation

All code is SystemVerilog-2017 and is accepted by Verilator 5 (lint and
simulation) and by slang. Each testbench prints
`TB_RESULT checks=N failures=M`. Example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/plga_pkg.sv tb/tb_ref_pkg.sv \
    rtl/*.sv tb/tb_plga_top_full.sv --top-module tb_plga_top_full
./obj_dir/Vtb_plga_top_full
```

| testbench | what it shows |
|---|---|
| `tb_plga_top_full` | whole design at default parameters: 50 chromosomes, 10 variables, 2000 generations (about 1.35 M cycles, a few seconds). Every pool write is checked against a real-number reference. |
| `tb_plga_top` | reduced run (20 chromosomes, 4 variables, 30 generations). Every mechanism must occur: all three selection outcomes, crossed and uncrossed pairs, mutation, evaluation backpressure, pool starvation, generation ends, temperature steps, divisions and the INIT-to-RUN switch. |
| `tb_plga_workloads` | f1 (10 variables, stopping value 0.005), f1 (3), f4 Rosenbrock (3) and f7 (5) through the full pipeline |
| `tb_eval_unit` | sphere program and 300 random postfix expressions against a real-number stack machine, with exact cycle counts |
| `tb_eval_stage`, `tb_mut_stage` | parallel stages: every item exactly once, all units busy, backpressure |
| `tb_sel_stage` | P against exp(-d/T), the six-chromosome example sequence, acceptance rates |
| `tb_xover_unit`, `tb_temp_sched`, `tb_pool_fifo`, `tb_eval_stack`, `tb_arith_unit`, `tb_op_detect`, `tb_chrom_value_buf` | the individual blocks |

`tb_ref_pkg` holds the testbenches' real-number reference (gene decoding, test
function, program builder). Random tests use `$urandom`. The simulator is
two-state, and every register that is read has a reset.

## Files

`rtl/`: `plga_pkg` (types, constants), `plga_top`, `pool_fifo`, `temp_sched`,
`sel_stage`, `sel_unit`, `xover_unit`, `mut_stage`, `mut_unit`, `rng_xorshift`,
`eval_stage`, `eval_unit`, `chrom_value_buf`, `op_detect`, `eval_stack`,
`arith_unit`. `tb/`: one testbench per block, plus `tb_plga_top_full`,
`tb_plga_workloads` and `tb_ref_pkg`.
