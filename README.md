# LU decomposition and generator-update kernels for power-system simulation

A transient-stability simulation of a power network advances in small time
steps (here 1 ms). Each step does two expensive things:

* it solves the network equations `Y · V = I` for the bus voltages, where `Y`
  is the complex bus admittance matrix (11 × 11 for the 4-machine, 2-area
  benchmark system), which starts with an LU decomposition of `Y`;
* it integrates the differential equations of every generator one step
  forward (explicit Euler), applying the same arithmetic to each machine.

This RTL implements both as hardware kernels in the style of a statically
scheduled dataflow engine: an **LU decomposition kernel** (`lu_kernel`) and a
**machine-update kernel** (`machine_update`), placed side by side in
`psim_accel_top`. A host streams the admittance matrix and the generator
records in, and takes the L/U factors and the updated states back; forward
and back substitution and the rest of the simulation stay on the host.

## The LU decomposition

The factorisation has no pivoting and puts the diagonal in L:

```
L[x][y] = A[x][y] - Σ_{i<y} L[x][i]·U[i][y]                 (x >= y)
U[x][y] = (A[x][y] - Σ_{i<x} L[x][i]·U[i][y]) / L[x][x]     (x <  y)
U[x][x] = 1
```

Element `(x, y)` therefore needs `z = min(x, y)` multiply-accumulate steps and
one final step. If the elements are processed in row-major order, every value
an element reads (`L[x][i]`, `U[i][y]`, `L[x][x]`) belongs to an earlier
element. The admittance matrix of a power network is diagonally dominant, so
running without pivoting is safe in practice.

### Loops, ticks and slots

The kernel's clock cycles are called *ticks*. Ticks are grouped into *loops*
of `LOOP_LEN` ticks (128 by default), and tick `t` of a loop is *slot* `t`.
An element of A enters a slot with its carried sum at zero. It then comes back
to the same slot once per loop, and each visit performs one step:

```
visit i (i = 0, 1, ...):   if i < z:  sum += L[x][i] · U[i][y]
                           if i == last: result = A - sum        (x >= y)
                                         result = (A - sum)/L[x][x] (x < y)
                                         write it to L or U, send it out
```

Between visits an element's state (row, column, step, A value, carried sum)
sits in a `LOOP_LEN`-deep circular buffer indexed by the tick counter. So
each slot's state comes back exactly one loop later. This mirrors how a deep
floating-point pipeline of `LOOP_LEN` stages would carry a running sum, and
it is why the loop length appears in every timing formula below. The
arithmetic itself completes within one tick (`lu_datapath`).

L and U live in two on-chip memories (`cplx_fmem`) of N·N complex words. Each
has two combinational read ports and one write port. A word written on one
tick can be read on any later tick, including a later slot of the same loop.

### The three schedules

The schedules differ only in when an element enters, and they are chosen by
the `SCHED` parameter:

| `SCHED` | element enters | slot | steps | ticks to last result (N = 11, 128-tick loop) |
|---|---|---|---|---|
| `LU_MULTI_TICK` | every N loops, at tick 0 | 0 | always N | (N³ − 1)·128 + 1 = 170 241 |
| `LU_PIPE1` (default) | every loop, when tick = loop mod N | a mod N | z + 1 | [(N² − 1) + (N − 1)]·128 + N = 16 651 |
| `LU_PIPE2` | row x: columns 0..x on loop 2x, columns x+1..N−1 on loop 2x+1 | a (its own address) | z + 1 | 3(N − 1)·128 + N² = 3 961 |

(`a = x·N + y` is the row-major address.)

* **Multi-tick** processes one element at a time and always runs N steps,
  adding zero once `i >= z`. It is regular and simple, but it leaves
  `LOOP_LEN − 1` slots of every loop idle.
* **Pipeline 1** starts a new element every loop. Element `a` enters in loop
  `a` and finishes in loop `a + z`, so up to N elements are in flight, in
  slots `0..N−1`. It is dependency-safe: step `i` of `(x, y)` happens in loop
  `xN + y + i`, and the values it reads were finished in loops `xN + 2i` (the
  L value) and `iN + y + i` (the U value). Both are strictly earlier. The
  divisor `L[x][x]` is finished in loop `xN + 2x`, also before it is needed.
  A slot is reused only after N loops, and an element never stays longer
  than that.
* **Pipeline 2** starts a whole half-row in one loop: on loop `2r` the
  lower-triangle entries of row r (ticks `rN .. r(N+1)`), and on loop `2r+1`
  its upper entries (ticks strictly between `r(N+1)` and `(r+1)N`). Each
  element sits in the slot equal to its own address, so `LOOP_LEN` must be at
  least N² (128 ≥ 121). Its step 0 reads `L[x][0]` from a separate N-word
  memory that the host loads with A's first column beforehand (`fc_*`
  port). Later steps that read an L entry of the same row written earlier in
  the same loop rely on slots running in tick order. That ordering is
  exactly what the one-tick arithmetic of this implementation provides.

`lu_sched` holds the counters: tick, loop mod N, loop number, and the
address/row/column of the next input. It also computes the input condition
for each schedule.

### Stream interface and stalls

`start` (one-cycle pulse) begins a decomposition. A is then streamed on
`a_valid/a_ready/a_data` in row-major order. `a_ready` is high on the ticks
where the schedule wants the next element. Results leave on
`out_valid/out_ready` with `out_lower`, `out_x`, `out_y` and `out_data`,
through a one-entry output register, so a result appears one tick after the
tick that forms it. U's unit diagonal is not sent. The kernel is statically
scheduled: when an element is due and `a_valid` is low, or a result is due
and the output register is still full, the **whole kernel stalls** (no
counter moves). The schedule, and therefore the results, are the same
whatever the stalls. `done` pulses together with the last result on the
output. Tick counts in the table assume no stalls. They are counted from the
first busy tick to the tick that forms the last result.

## The machine-update kernel

`machine_update` takes one generator record (`mach_in_t`) per tick and gives
the updated rotor angle and flux states (`mach_out_t`) one tick later:

```
delta   += (omega - 377) · h
eq_dash += ( -eq_dash - (X_d - X_d')·( -I_d - k_d·(psid - (X_d' - X_ls)·I_d - eq_dash) ) + E_fd ) / T_do' · h
psid    += ( -psid + eq_dash + (X_d' - X_ls)·I_d ) / T_do'' · h
ed_dash += -( ed_dash + (X_q - X_q')·( I_q - k_q·( -psiq + I_q·(X_q' - X_ls) - ed_dash ) ) ) / T_qo' · h
k_d = (X_d' - X_d'') / (X_d' - X_ls)²,   k_q = (X_q' - X_q'') / (X_q' - X_ls)²,   h = 0.001 s
```

The signs are those of the reference simulation code this design follows.
When the record's `enable` field is not positive, the states pass through
unchanged. The four machines of the benchmark system are simply four records
in a row. The synchronous speed and the step size are the parameters
`OMEGA_SYNCH` and `STEP_SIZE`.

## Number format

All values are IEEE-754 double precision (`psim_pkg::num_t`, 64 bits), as in
the original. A complex number (`cplx_t`) is a pair of them. The operators
(`fadd`, `fsub`, `fmul`, `fdiv`) are plain functions on the bit patterns,
built from integer logic, and round to nearest with ties to even. Subnormal
results are flushed to zero and overflow gives infinity; NaN inputs are not
given special treatment. Complex products are formed from four real products
and two sums. Complex division is `n·conj(d)/|d|²`, rounding after each real
operation. The testbenches compare against `real` arithmetic with a relative
tolerance of 1e-9, since the order of rounding differs slightly.

## Where this design departs from the reference design

* **Subnormals:** flushed to zero rather than handled in full (see above).
* **Arithmetic latency:** one tick here, against the deep floating-point
  pipelines of the original. The loop structure and the tick counts are
  kept; the buffer of carried state plays the role of the pipeline.
* **L/U initialisation:** the original first fills L and U with an identity
  matrix. Here every word is written before it is first read, so no clearing
  pass is run, and U's unit diagonal is implied.
* **Multi-tick timing:** counted to the last result, which is 127 ticks less
  than the original's N³·LOOP_LEN, because the final loop is not run to its
  end.
* **Extra LU input:** the original's kernel also took an N × N real-valued
  input whose use is not described. It is not included.
* **Machine kernel record:** it holds the 19 quantities and the enable flag
  that the update rules use, and returns the 4 updated states. The original
  streamed 28 inputs and 6 outputs, but not all of them are described.
* **Handshakes, reset and memory ports:** valid/ready streams, an active-low
  asynchronous reset, and two read ports per memory are this design's own
  choices.
* **Not included:** the host processor and the PCI Express link with its
  stream manager; the top brings the kernels' streams out as ports instead.

## Files

| file | contents |
|---|---|
| `rtl/psim_pkg.sv` | number formats, complex arithmetic functions, `lu_sched_e`, machine record types |
| `rtl/cplx_fmem.sv` | on-chip complex memory |
| `rtl/lu_sched.sv` | loop counters and input condition |
| `rtl/lu_datapath.sv` | one tick of LU arithmetic |
| `rtl/lu_kernel.sv` | LU kernel |
| `rtl/machine_update.sv` | generator-update kernel |
| `rtl/psim_accel_top.sv` | both kernels |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/lu_run.sv` | helper that runs and checks one full decomposition |
| `tb/tb_lu_sizes.sv` | the LU kernel at other matrix sizes |

## Verification

Every testbench compares against values computed independently, in real
arithmetic, inside the testbench. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

* `tb_lu_kernel`: all three schedules at N = 11 with 128-tick loops. It
  checks every L and U entry (relative tolerance 10⁻⁹) and the exact tick
  count of each schedule. It then runs the two pipelined schedules again
  under random input gaps and output back-pressure.
* `tb_lu_sizes`: pipeline 1 at N = 4, 16 and 24, and pipeline 2 at N = 6
  and at N = 16 with a 256-tick loop. It checks the values and the tick
  formulae at each size.
* `tb_lu_sched`: checks the loop and tick at which each of the 121 elements
  enters, for each schedule, under random stalls.
* `tb_lu_datapath`, `tb_cplx_fmem`, `tb_machine_update`: unit tests with
  random operands. The machine test also checks the one-tick latency and the
  disabled-record path.
* `tb_psim_accel_top`: two simulation steps at the default parameters. It
  checks the exact pipeline-1 tick count on the first step and random stalls
  on the second, with the machine records streamed at the same time. It
  checks that input stalls, output stalls, L and U results, enabled updates
  and disabled records each occur.

Run one with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/psim_pkg.sv tb/tb_lu_kernel.sv \
          --top-module tb_lu_kernel -Mdir obj_lu
./obj_lu/Vtb_lu_kernel
```

Each testbench finishes in a few seconds at full size.

## Changing the design

* `N` sets the matrix size. The memories, counters and address widths follow
  from it. `LOOP_LEN` must be at least N, and at least N² for `LU_PIPE2`
  (an assertion checks this).
* `SCHED` on `lu_kernel` or `psim_accel_top` selects the schedule.
* The pipelined tick count grows as about N²·LOOP_LEN. The on-chip memories
  hold 2·N² complex words, so very large networks (thousands of buses)
  would need off-chip storage, which this design does not have.
