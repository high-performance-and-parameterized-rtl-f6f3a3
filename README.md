# Parameterized floating-point LU decomposition array

This is a synthesizable SystemVerilog design that factors a dense n x n
matrix A into a unit lower-triangular L and an upper-triangular U
(A = L·U, no pivoting). It uses IEEE-754 double precision. The hardware is a
ring of P + 1 processing elements (PEs). The number of PEs does not depend
on the matrix size:

* PE_0 holds the only divider, and the control unit.
* PE_1 … PE_P each hold one multiplier, one adder/subtractor and two local
  memories.

With P PEs doing one multiply-add per cycle each, the array factors a
matrix in about n³/(3P) cycles. That is the lower bound for P multipliers,
because LU needs about n³/3 multiply-adds. The defaults are P = 17
(18 PEs) and matrices of up to NMAX = 1000.

The matrix stays in external memory and is read exactly once. L and U are
written back exactly once. Everything in between lives on chip as
*partial sums*:

    a'(x,y) = Σ_{i<k} l(x,i) · u(i,y)

This costs (n−1)² words spread over the PEs, plus n words for the diagonal
of U.

## The algorithm the array runs

Iteration k (k = 0 … n−1) produces row k of U and column k of L in three
stages:

| stage | what enters | who works | result |
|---|---|---|---|
| 1 | a(k,y), y > k, from memory | owner of column y | u(k,y) = a(k,y) − a'(k,y), kept in that PE's S2 and written to memory |
| 2 | a(x,k), x ≥ k, from memory | owner of column k, then PE_0 | a(x,k) − a'(x,k). For x = k this is u(k,k), kept in S0. For x > k, PE_0 divides it by u(k,k), giving l(x,k) |
| 3 | l(x,k), x > k, from PE_0 | every PE, for each column y > k it owns | a'(x,y) += l(x,k) · u(k,y), in S1 |

Column y ≥ 1 belongs to PE_j with j = ((y−1) mod P) + 1, at local column
c = (y−1) div P. The columns are dealt round-robin, so every PE has work
in every iteration until fewer than P columns remain. This is why the
array reaches n³/(3P). A layout with blocks of consecutive columns per PE
would leave most PEs idle early on and take about twice as long.

In iteration 0 no partial sums exist yet. Tokens of that iteration carry a
`first` flag, and the PEs use zero instead of reading S1, so S1 never needs
clearing.

The stages run one after another. Stage 2 is the exception: it follows
Stage 1 straight away, because they do not depend on each other. Stage 3 of
iteration k must end in every PE before Stage 1 of iteration k+1 reads any
partial sum. No partial sum is ever read while it is being updated, so the
array has no data hazards and needs no interleaving of several matrices.

## Structure

```
            memory reads                                   wr_u (u above diagonal)
                 |                                                   ^
  lu_ctrl --tok--> PE_0.inU -> PE_0.outU -> PE_1.inU -> ... -> PE_P.outU
                    PE_0.outL -> PE_1.inL -> ... -> PE_P.outL --+
                    ^   |                                        |
                    |   +--> wr_l (u_kk and L)                   |
                    +--------------------------------------------+   (L ring)
```

| module | role |
|---|---|
| `lu_top` | The array: `lu_ctrl`, `lu_pe0` and P instances of `lu_pe`, with their U chain and L ring. |
| `lu_ctrl` | Control unit of PE_0. Runs iterations and stages, reads A, and tags every element. |
| `lu_pe0` | Datapath of PE_0. Holds S0 (diagonal of U), the 58-stage divider and the L buffer, and issues the Stage-3 l stream. |
| `lu_pe` | PE_j. Holds S1_j (partial sums), S2_j (current row of U), the multiplier, the adder and a small output queue. |
| `fp_add`, `fp_mul`, `fp_div` | Pipelined 64-bit floating-point units. Their depths are 11, 8 and 58 stages. |
| `lu_ram` | Simple dual-port RAM (one write port, one registered read port), used for S0, S1, S2 and the L buffer. |
| `lu_pkg` | Token type, unit latencies, field widths. |

### Tokens instead of control wires

Each PE talks only to its neighbours. So the control unit does not drive
control signals into the PEs. Instead, every matrix element travels as a
`tok_t` that describes itself:

* `kind`: one of
  * `T_ROW_A`: Stage 1 input.
  * `T_COL_A`: Stage 2 input.
  * `T_U_OUT`: finished u on its way to memory.
  * `T_COL_P`: Stage 2 result on its way to PE_0.
  * `T_L`: Stage 3 multiplier.
* `pe`: owner PE.
* `x`, `y`: matrix row and column. For `T_L`, `y` holds the iteration k.
* `c`: local column.
* `sbase`: S1 address of local column 0 of row x, which is (x−1)·CMAX with
  CMAX = ceil((NMAX−1)/P).
* `first`, `last`: the iteration-0 flag and the end-of-stream flag.

`lu_ctrl` computes all of these with counters, without dividers. A PE:

* takes the inU tokens whose `pe` is its own;
* forwards everything else with one cycle of delay;
* forwards every `T_L` token one cycle after it arrives, and also uses it.

### Inside PE_j

* **Stages 1 and 2.** The PE reads S1 in the cycle the token arrives and
  subtracts in the adder 11 cycles later.
  * A Stage-1 result goes into S2 and into a 32-entry queue. The queue
    puts it back on outU in the next empty slot: either the slot of a token
    some PE consumed, or the gap after the stream.
  * A Stage-2 result leaves on outL towards PE_0.
* **Stage 3.** When l(x,k) arrives, the PE multiplies it with each of its
  u(k,y), y > k, one per cycle:
  * S2 read: 1 cycle.
  * Multiplier: 8 cycles.
  * Product register, while S1 is read: 1 cycle.
  * Adder: 11 cycles.
  * Write back to S1.

  Within one iteration, each S1 word is touched only once, so this
  pipeline never needs a forward.
* **Which columns in Stage 3.** The PE learns its Stage-3 columns from
  Stage 1. When row k's elements pass, it records the first local column it
  owns and how many it owns. Those are exactly the columns y > k that
  Stage 3 updates.

### PE_0 and the pacing of Stage 3

PE_0 handles the Stage-2 stream that arrives on inL:

* The first element, a'(k,k) = u(k,k), goes to S0 and to memory.
* Each later element waits one register while u(k,k) is read back from S0,
  and then enters the divider.
* The quotients l(x,k) go to memory and into the L buffer.

When the controller starts Stage 3, PE_0 sends the buffered l one every D
cycles, with D = ceil((n−k−1)/P). D is the largest number of columns any
PE has to update, so a PE is always done with one l before the next
arrives. The controller counts D while it issues Stage 1.

When the last l comes back round the ring from PE_P, PE_0 waits
D + `PE_MAC_DRAIN` cycles for PE_P's pipeline to empty. It then reports
`s3_done`.

## Timing

Per iteration k, with m = n−k−1:

* Stages 1 and 2 take about 2m + P + 11 + 58 cycles.
* Stage 3 takes about ceil(m/P)·m + 8 + 11 cycles.

This design adds a small constant per iteration on top of that: memory
latency, the register hops of the l stream, and the drain margin.

Measured from `start` to `done` with a 2-cycle memory:

| n | P | cycles | n³/(3P) | published latency at 110 MHz, in cycles |
|---|---|---|---|---|
| 100 | 17 | 45,620 | 19,607 | 36,300 |
| 300 | 17 | 680,262 | 529,411 | 605,000 |
| 500 | 17 | 2,823,000 | 2,450,980 | 2,497,000 |
| 800 | 17 | 10,922,367 | 10,039,215 | 10,076,000 |
| 1000 | 17 | 20,954,511 | 19,607,843 | 18,810,000 |

The published implementation is 8–26 % faster, most of all for small n.
Its numbers lie below the stage-by-stage schedule. That fits a variant in
which Stage 3 of one iteration overlaps Stage 1 of the next, with zero
padding so that Stage 3 lasts at least l1 + l2 cycles. That variant is not
built here (see *Departures*).

Memory traffic is n² words read and n² words written.

## Floating point

The three units are IEEE-754 double precision and round to nearest even.
Like the units the architecture was characterised with, they are only
partly compliant:

* denormal inputs count as zero;
* results below the normal range flush to zero;
* overflow gives ±infinity;
* invalid operations give a quiet NaN.

`fp_add` and `fp_mul` compute in their first stage. Their remaining stages
are a register chain, meant to be retimed by synthesis.

`fp_div` is a real pipeline, a radix-2 restoring divider with one quotient
bit per stage:

* 1 unpack stage;
* 54 quotient stages;
* 1 rounding stage;
* 2 delay stages.

Each unit carries a user tag alongside the data, so callers need no delay
line of their own. The latencies are set in `lu_pkg`. To swap in other
floating-point units, keep the ports and change `LAT_*`: the array's timing
follows from those constants.

## Interfaces of `lu_top`

* **Start.** Hold `n` (1 … NMAX) and pulse `start`. `busy` stays high until
  `done` pulses.
* **Reads.** `rd_req_valid`/`rd_req_ready` with `rd_req_row`/`rd_req_col`.
  Read data return in request order on `rd_rsp_valid`/`rd_rsp_data`, with
  any latency. At most 16 requests may be outstanding.
* **Writes.** Two ports, with no back-pressure:
  * `wr_u_*` comes from the end of the U chain and carries u(k,y) for y > k.
  * `wr_l_*` comes from PE_0 and carries u(k,k) and l(x,k).

  Together they write every element of the combined L\U matrix exactly
  once.
* **Reset.** `rst_n` is an asynchronous, active-low reset of the control
  state. The RAM contents are not reset and are never read before they are
  written.

## Departures and choices

Taken from the architecture description:

* the ring of P+1 PEs and its ports inU, outU, inL and outL;
* the contents of PE_0 and PE_j, and the sizes of S0, S1_j and S2_j;
* the column ownership and the three stages;
* the unit depths 8, 11 and 58, and the default P = 17.

Design choices where the description is silent:

* the token format and the tag-based control;
* the memory interface;
* the u output queue;
* the L buffer and the D-spaced l stream;
* the Stage-3 end detection by a returning token plus a fixed drain time;
* reset behaviour;
* the internal structure of the floating-point units.

Departures:

* **No Stage 3 / Stage 1 overlap.** The lower-latency variant is not
  implemented. Latency is therefore 8–26 % above the published figures
  (table above).
* **Iteration n−1 is run** to produce u(n−1,n−1).
* **n−1 need not be a multiple of P.** Ownership is simply ceil-based.
* **NMAX = 1000 sizes S1 at 999 × 59 words per PE.** That is about 8 MB in
  all, far more than the roughly 1 MB of on-chip RAM of the FPGA the
  architecture was evaluated on, which holds n ≈ 360. Set `NMAX` to fit the
  target device.
* **Block LU is not included.** This is the mode for matrices larger than
  on-chip storage, where the array is the b × b LU engine next to separate
  matrix-multiply PEs. The same goes for pivoting.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each one has a watchdog.

| testbench | what it runs |
|---|---|
| `tb_fp_add`, `tb_fp_mul`, `tb_fp_div` | 4000 random operations, one per cycle, compared bit for bit with the simulator's `real` arithmetic. Also special values and the exact pipeline depth. |
| `tb_lu_ram` | Random fill and read-back, read-during-write and hold behaviour. |
| `tb_lu_ctrl` | Request order, every token tag against independently computed owner, column and address, D per iteration, and no reads while a stage drains. |
| `tb_lu_pe` | One PE through two iterations of Stages 1 and 3 and three Stage-2 columns, with values checked against `real` arithmetic. |
| `tb_lu_pe0` | Division, S0, write timing, the D-spaced l stream and `s3_done` timing. |
| `tb_lu_top` | P = 4, NMAX = 24, matrices of size 1, 2, 5, 13 and 24, with a memory that refuses some requests. |
| `tb_lu_workloads` | Default size, n = 100, 300, 500 and 800. |
| `tb_lu_full` | Default size, n = 1000: about 21 M cycles, about 2 minutes. |

The last three use `lu_bench`. It provides:

* a memory model;
* random diagonally dominant matrices;
* a reference LU computed in `real` arithmetic in the same order of
  operations as the array, so that L and U are compared bit for bit;
* a check that every element is written exactly once;
* a latency bound;
* counters that fail the test if a mechanism never occurs: Stage 1/2/3
  traffic, D = 1 and D > 1, u waiting for a slot, ownership wrapping, and
  memory refusals.

Example with plain Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_lu_top \
  rtl/lu_pkg.sv rtl/fp_add.sv rtl/fp_mul.sv rtl/fp_div.sv rtl/lu_ram.sv \
  rtl/lu_pe.sv rtl/lu_pe0.sv rtl/lu_ctrl.sv rtl/lu_top.sv \
  tb/lu_bench.sv tb/tb_lu_top.sv -o sim
./obj_dir/sim
```

The package must come first and appear only once. `tb_lu_full` and
`tb_lu_workloads` take the same file list with their own top. For a single
unit, list only the package, the unit and its testbench, e.g.
`rtl/lu_pkg.sv rtl/fp_add.sv tb/tb_fp_add.sv` with `--top-module tb_fp_add`.
The bench `lu_bench` raises `finished` after printing its result, and the
testbench around it then ends the simulation. Uninitialised state is never read, so the result does not
depend on `+verilator+rand+reset`.
