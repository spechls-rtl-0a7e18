# Speculative loop accelerators

A pipelined loop can start one iteration per clock cycle only if each
iteration's inputs are ready one cycle after the previous iteration started.
Loops with data-dependent control flow rarely allow this. In
`if (C(x)) x = S(x); else x = F(x);` the next `x` depends on a condition and a
slow path that take several cycles, even though the fast path `F` takes one.

Speculative loop pipelining gets around this. The hardware guesses the
outcome of the conditional (a *gamma node*, i.e. a multiplexer whose select
is the condition) and starts the next iteration at once with the fast
value. Delay lines keep the values needed to recover. A small controller
checks every guess when its condition arrives. It commits the iteration
when the guess was right. When it was wrong, it throws away the younger
iterations and restarts from the slow value. A guess need not be very
reliable to pay off: if a mispeculation costs no more than the
non-speculative iteration, a 50 % hit rate already lowers the average
cycles per iteration.

This RTL implements that scheme, the controllers used when several guesses
interact, and five accelerators built with them. The accelerators are the
speculation approach of the SpecHLS high-level-synthesis flow, written here
as hand-made SystemVerilog:

| module | what it is |
|---|---|
| `slp_loop` | generic loop `do { if (C(x,z)) x = S(x); else x = F(x); } while (!x)` with C = 3 cycles, S = 5, F = 1, at one iteration per cycle |
| `binsearch_spec` | binary search that guesses "go right": 1 cycle per correct step, 2 per wrong one |
| `binsearch_unrolled` | binary search doing two steps per iteration with two nested guesses: 1, 2 or 3 cycles per iteration |
| `cd_controller` | control for two gamma nodes where the result of one feeds the condition of the other |
| `ska_gridding` | radio-astronomy gridding update `grid[p] += kernel[k]*v` that guesses "no memory alias" and stalls when there is one |
| `riscv_opstall` | RV32IM pipeline that guesses "branch not taken" and stalls on multiply/divide |
| `spechls_top` | all of the above side by side, sharing only clock and reset |

## The speculation FSM (`spec_fsm`)

Everything else builds on this controller, so it is worth reading first.
Take one speculated gamma node. Its condition is known `CTRL_LAT` cycles
after an iteration was issued, and its slow value `SLOW_LAT` cycles after.
The defaults are 3 and 5. The FSM has four working states and a small down
counter:

```
            start                      c reaches 0
   Idle ---------> Fill (c = CTRL_LAT-1) ----------> Proceed
                     ^                                 |  mispec
                     |                                 v
                 Rollback <---------- Stall (c = SLOW_LAT-CTRL_LAT-1)
                  sel_slow  c reaches 0
```

* **Fill**: right after a start or a rollback, no condition of a live
  iteration has come back yet. Iterations are issued with the fast value.
* **Proceed**: in each cycle the condition of the iteration issued
  `CTRL_LAT` cycles earlier arrives. If it says "fast", the guess was right
  and the iteration commits. If it says "slow", that is a mispeculation.
  The `CTRL_LAT-1` younger iterations all used a wrong `x`, so nothing more
  is issued.
* **Stall**: waits until the slow value of the mispredicted iteration comes
  out of its delay line. This state is skipped when `SLOW_LAT = CTRL_LAT+1`.
* **Rollback**: one cycle. The gamma node selects the slow value
  (`sel_slow`), which is issued as the next iteration. Then Fill starts
  again.

With the defaults, the state sequence around one mispeculation is
`F F P P(mispec) S RB F F P ...`. A fast iteration costs 1 cycle and a slow
one `SLOW_LAT` = 5 cycles, which is exactly its latency without speculation.
All outputs are decoded combinationally from the registered state and the
`mispec` input of the same cycle. `issue` tells the datapath whether an
iteration enters this cycle. `flush` puts the FSM back into a fresh Fill. It
is used when an outer controller rolls back (see control domination below).

### The generic loop (`slp_loop`)

`slp_loop` wraps the FSM into a complete loop. The issued value goes through
three operators, and each is followed by a `delay_line` of its latency:

* the fast result, with taps at 1 cycle (next issue) and `CTRL_LAT` cycles
  (commit);
* the slow result, `SLOW_LAT` cycles;
* the condition bit, `CTRL_LAT` cycles.

The FSM never resolves a slot in which nothing was issued, so the delay
lines need no valid bits. Every iteration result leaves the loop once, in
program order, on `commit_valid`/`x_commit`. Fast results leave in Proceed
and slow results in Rollback. The loop ends at the first result whose top
bit is set: `done` pulses one cycle later with `x_result`.

F, S and C are meant to be replaced. The ones in `spechls_pkg` are example
operators:

* F adds 1 to a 15-bit counter;
* S adds 3 and scrambles the upper bits;
* C is true on about one iteration in eight.

"`x` is zero" is read as "stop bit (bit 31) clear". `z` is loop-invariant.
If your `z` changes per iteration, it needs its own delay line, rolled back
like `x`.

## Binary search with one and two guesses

`binsearch_spec` runs the classic loop (`k=(i+j)/2`, go right if
`a[k]<value`, left if greater, return on equal, `size` if not found). It
has two stages:

* stage 0 computes `k` and reads the synchronous RAM;
* stage 1 compares.

In the cycle after an iteration is issued, the next one is already issued
with `i=k+1` (the guess "go right"). If stage 1 finds `a[k]>value`, the
younger iteration is dropped and `(i, k-1)` is issued. The cost is 1 or 2
cycles per step, so 1.5 on random data, against 2 without speculation.

`binsearch_unrolled` does two search steps per iteration:

* probes `a[k2]` with `k2=(i+j)/2`;
* then probes `a[kp]` with `kp` either `(3i+j)/4` or `(i+3j)/4`, depending on
  the first comparison `c1`;
* the second comparison is `c2`.

Its stages and guesses:

* Stage 0 computes `k1`, `k2`, `k3` and reads `a[k2]` (RAM port A).
* Stage 1 gets `c1`, picks `kp` and reads `a[kp]` (port B).
* Stage 2 gets `c2`.
* The first guess is `c1 && c2` (`i=k3+1`), issued one cycle after the
  iteration.
* When stage 1 sees `!c1`, it replaces that guess by `!c1 && c2`
  (`i=k1+1, j=k2-1`), issued at cycle 2.
* When stage 2 sees `!c2`, it drops everything younger and issues the exact
  update, at cycle 3.

Decisions of stage 2 (the older iteration) override those of stage 1. On
uniform data, 25 % of iterations take 1 cycle, 25 % take 2 and 50 % take 3.
That averages 2.25 cycles per two steps, i.e. 1.125 per step. Measured
over 400 searches of a random sorted 1024-word array (`tb_binsearch_workload`),
the plain search takes 1.50 cycles per step and the unrolled one 1.05: in
the last iterations of a search the probes fall on the same or neighbouring
elements, so the two outcomes are no longer independent coin flips. The two
guesses form one combined controller (a *data-domination* pattern). Here it
is written as valid bits and per-stage decisions instead of a product of two
`spec_fsm`s; the behaviour is the same.

Both searches use signed 32-bit words and arrays of up to `DEPTH` = 1024
elements, loaded through `wr_*` while idle. `result` is the index found or
`size`.

## Control domination (`cd_controller`)

When the output of gamma node A feeds the *condition* of gamma node B, each
node gets its own FSM. In this design A is assumed to have the longer
condition (`CTRL_LAT_A` > `CTRL_LAT_B`; defaults 4 and 2, slow paths 6
and 4). Two rules keep the FSMs consistent:

* **A mispeculates**: everything B has guessed since then is void. B is
  held in a fresh Fill while A is in its mispeculation cycle, Stall and
  Rollback. B therefore refills together with A's re-issued iteration. A
  B signal in the same cycle as an A mispeculation is ignored, because A's
  iteration is older.
* **B mispeculates in cycle u**: B discards `CTRL_LAT_B` iterations. Their A
  conditions arrive later, in cycles `u+LA-LB+1 … u+LA`, and they are
  computed from wrong data. A's mispeculation signal is masked in exactly
  that window (`masked_pulse` shows it). A shift register of B's past
  mispeculations implements the mask.

`issue` is the AND of both FSMs' issue, except while A restarts. `commit`
is the AND of both commits.

## Memory speculation: gridding (`ska_gridding`)

The gridding kernel adds `kernel[k]*v` to the grid pixel `(x,y)` of each
incoming sample. The read-modify-write goes through memory at a
data-dependent address. The unit guesses that consecutive updates hit
different pixels and accepts one update per cycle:

```
S0  alias check, read grid[idx] and kernel[k]   (synchronous RAMs)
S1  multiply
S2  add
S3  write grid[idx]
```

A read in cycle t+4 sees the write of the update read in cycle t. The alias
check compares the incoming pixel index with the three updates in S1–S3 and
holds the input while one matches. In other words, it stalls whenever the
read-after-write reuse distance is below 4 updates. Updates arrive through
`scc_fifo`, a valid/ready circular buffer. The same FIFO is the standard way
to decouple two loops that each speculate on their own. The grid (32×32
words of 32 bits) and kernel table (16 words of 16 bits) are loaded and read
through `host_*` and `kw_*` while the unit is idle.

## RV32IM processor (`riscv_opstall`)

The processor shows that the same two ideas — guess the gamma node, stall
on the rest — give an ordinary in-order pipeline when applied to an
instruction-set simulator's main loop:

* The next-pc gamma node is guessed as "not taken": fetch runs at `pc+4`
  every cycle.
* Branches and jumps are resolved in execute. A taken one discards the one
  wrongly fetched instruction (1 lost cycle).
* Multiplications and divisions are not speculated. The pipeline stalls
  while one is in execute (`MD_LAT` = 2 cycles, so 1 stall).
* The instruction just ahead is bypassed from write-back, so there are no
  register stalls.

The stages are F (instruction RAM read), X (decode, register read, ALU,
branch, data RAM access, mul/div) and W (load alignment, register write).
Cycle count = 1 + instructions + taken branches/jumps + mul/div count ×
(MD_LAT−1).

Using the core:

* With `run` low, the host writes both 4 KiB RAMs (word addresses,
  `host_imem` picks the instruction RAM) and reads the data RAM.
* Raising `run` clears the registers and starts at pc 0.
* ECALL/EBREAK set `halted` until `run` falls.
* FENCE and CSR instructions are no-ops. Misaligned accesses are not
  trapped.

Measured cycles per instruction: gcd 1.40, 4×4 matmul 1.14, median of nine
1.15.

## How far to trust it, and where it departs

Every module has a self-checking testbench that compares against an
independent sequential model. The checks cover:

* every committed value;
* final results;
* the exact cycle count, derived from the cost rules above;
* for the processor, the whole data memory against an instruction-set
  simulator in the testbench.

The latencies 1/3/5, the FSM states and counter loads, the binary-search
kernels and their 1/2 and 1/2/3 cycle costs, the control-domination rules,
the alias distance of 4 and the OpStall policy follow the published
SpecHLS scheme. This design chose the following:

* the example operators of `slp_loop`, and reading `while(!x)` as a stop
  bit;
* reporting slow results as committed in Rollback;
* all widths and memory sizes, and the latencies in `cd_controller`;
* stalling instead of forwarding on a gridding alias;
* the FMA's third operand (the sample `v`);
* one gridding unit rather than several in parallel;
* the processor's three-stage split, 2-cycle mul/div, memory sizes and
  halting rule.

Not built:

* the HMMER sequence-comparison accelerator (its recurrence is not
  available);
* the "RegStall" processor variant, which speculates on register-file
  aliases instead of bypassing;
* the compiler itself.

The accelerators reproduce the cycle behaviour of the speculative designs.
They are not tuned for clock frequency: for example, the unrolled search's
stage-1 comparison drives a RAM address in the same cycle.

## Simulating

Packages first, then the modules. For example, the whole design and its
end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top tb_spechls_top \
  rtl/spechls_pkg.sv rtl/rv32_pkg.sv rtl/*.sv tb/tb_spechls_top.sv
./obj_dir/Vtb_spechls_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and ends. Testbenches:

* `tb_spec_fsm`, `tb_slp_loop`, `tb_binsearch_spec`,
  `tb_binsearch_unrolled`, `tb_cd_controller`, `tb_scc_fifo`,
  `tb_ska_gridding`: one block each;
* `tb_binsearch_workload`: both searches on a full 1024-word array,
  checking their average cycles per search step;
* `tb_riscv_opstall`: the processor, running an instruction-coverage
  program, gcd, matmul and median;
* `tb_spechls_top`: everything at once, at the default sizes. It also
  counts that every recovery mechanism (rollback, stall, both levels of the
  unrolled search, mask, restart, alias stall, FIFO full, branch redirect,
  mul/div stall) actually occurred.

To plug your own loop into `slp_loop`, replace the `slp_*` functions in
`spechls_pkg.sv`. Then set `CTRL_LAT`/`SLOW_LAT` to their pipeline depths
(`SLOW_LAT > CTRL_LAT ≥ 1`).
