# Sparse triangular solvers in three organisations: decoupled kernels and NDRange work-groups

This RTL solves a sparse lower-triangular system **L x = b** in single
precision (the SPTRSV kernel, the usual bottleneck of incomplete-LU
preconditioned iterative solvers). It holds three solver organisations, built
the way an FPGA OpenCL design would structure them, side by side in one top
(`sptrsv_top`). None of them is best for every matrix, so all three are kept:

* **Channel-based solver** (`sptrsv_swi_hash`, ports `swi_*`). Two cooperating
  "kernels": a **memory kernel** that makes every access to global memory, and
  a **compute kernel** that does all the arithmetic and never touches memory.
  They talk only through FIFO channels. A small on-chip **x store** keeps part
  of the solution vector so that most reads of already-solved unknowns never go
  to DRAM. This is the fastest organisation for the larger matrices.
* **NDRange solver, per level** (`sptrsv_ndr` with `WAIT = 0`, ports `ndrm_*`).
  Each row is solved by a **work-group** of BS work-items on a **compute
  unit**; two compute units share the memory port. The host launches it once
  per level.
* **NDRange solver, waiting** (`sptrsv_ndr` with `WAIT = 1`, ports `ndrw_*`).
  The same engine, launched once over all rows. x is preset to +infinity, and
  a work-group that meets an unknown still equal to +infinity waits for it.

All three rely on a **level schedule**. Row *i* depends on every row
*j* with a stored entry l_ij. Rows are grouped into levels, where
level(i) = 1 + max level(j) over those entries. Rows in the same level are
independent, so the channel-based memory kernel streams a whole level without
waiting for any result. It waits only at the end of each level, until the last
result of that level has been written back. This wait is the **level
barrier**. The per-level NDRange solver gets the same barrier from the host,
which starts the next launch only after `done`; the waiting one needs no
barrier at all, only the rows in level order.

## Data the host provides

Everything lives in word-addressed global memory. The host passes the base
word address of each array and the sizes as kernel arguments.

| array     | entries      | content |
|-----------|--------------|---------|
| `row_ptr` | n + 1        | CSR row starts |
| `col_idx` | nnz          | column of each stored entry. Within a row, entries are in column order, so the diagonal is last |
| `val`     | nnz          | float value of each entry |
| `b`       | n            | right-hand side (float) |
| `iorder`  | n            | row numbers sorted by level |
| `ilevels` | n_levels + 1 | position in `iorder` of the first row of each level. The last entry marks the end |
| `x`       | n            | result, written by the solver |

Every row must store its diagonal entry. The host does the level analysis
(`tb/sptrsv_harness.sv` shows it in a few lines). Pulse `start`, and wait for
`done`: at that point all of `x` is in global memory. The NDRange solvers do
not read `ilevels`; instead each launch is given a range `first` … `last`
of positions in `iorder` (one level, or 0 … n for the waiting solver), and
the waiting solver needs `x` filled with +inf (0x7f800000) before its launch.

## Channel-based solver: structure

```
                 +-------------------- sptrsv_swi_hash --------------------+
 global  <-----> | swi_mem_kernel --row--> [channel] --> swi_compute_kernel |
 memory   port   |   |  ^          --coef-> [channel] -->   UF x fp32_mul    |
                 |   |  |          --x----> [channel] -->   UF x fp32_add    |
                 |   v  |          <-res--- [channel] <--   fp32_add (b-s)   |
                 |  x_hash                                  fp32_div         |
                 +---------------------------------------------------------+
```

* **Row channel**: carries the row number and its entry count.
* **Coefficient channel**: UF entry values per beat, with a lane-valid flag
  and a diagonal flag for each lane.
* **x channel**: UF values per beat, lane-aligned with the coefficient
  channel: x_j for an off-diagonal lane and b_i for the diagonal lane.
* **Result channel**: (i, x_i) pairs going back to the memory kernel, which
  writes them.

The coefficient and x channels always move together. The memory kernel offers
a beat on each only when the other can also take it.

## Memory kernel (`swi_mem_kernel`)

The memory kernel runs three nested loops:

1. **Levels.** Read `ilevels[l+1]` to find the level's end.
2. **Rows of the level.** Read `iorder[p]`, `row_ptr[i]`, `row_ptr[i+1]` and
   `b[i]`, then send the row beat.
3. **Entries of the row.** Read `col_idx[k]` and `val[k]`, then fetch x[col].
   The value comes from b[i] if the entry is the diagonal, from the x store if
   col < HASH_DEPTH, or from global memory otherwise. UF entries are packed
   into one beat. The last beat of a row may be partly filled.

When a level's rows have all been sent, the kernel enters the barrier state.
It stays there until the write-back counter equals the number of rows issued
and no result is waiting. Only then does it start the next level.

A separate **write-back** path drains the result channel:

* Unknowns with index < HASH_DEPTH go into the x store in one cycle.
* Other unknowns are written to global memory. Write-back has priority on the
  memory port.

With `WRITE_THROUGH = 0` (the default), the x store is copied to `x` in
global memory after the last level; `done` follows the copy. With
`WRITE_THROUGH = 1`, every unknown is written to both places as it is solved,
and there is no copy at the end. `USE_HASH = 0` removes the x store, so every
x read goes to global memory.

The kernel keeps **one read outstanding**, so it takes a few cycles per word.
A fully pipelined load unit would issue one read per cycle. The kernel is
therefore correct but slower than a compiled OpenCL kernel. Making its loads
overlap is the obvious next step.

## Compute kernel (`swi_compute_kernel`)

The compute kernel handles one row at a time:

1. Take the row beat.
2. Accept one coefficient/x beat pair per cycle until `nnz` entries have
   arrived. Each beat goes through two stages:
   * **Stage 1:** UF multipliers form l_ij·x_j. A lane that is not valid, or
     that holds the diagonal, produces +0. The diagonal lane's l_ii and b_i
     are kept aside.
   * **Stage 2:** a chain of UF adders adds the products to the running sum in
     lane order.

   So the sum is built in column order, exactly as the serial loop
   `s += l_ij * x_j` would build it. The result is therefore bit-identical to
   single-precision serial forward substitution, for any UF.
3. Form b_i − s, divide it by l_ii in the bit-serial divider, and send
   (i, x_i) down the result channel.

**Timing.** With beats arriving back to back, the result appears
**nb + 32 cycles** after the row beat is taken, where nb = ⌈nnz/UF⌉. The
next row is taken two cycles after the result leaves. Division of one row is
not overlapped with the next row's products.

## NDRange solvers (`sptrsv_ndr`)

```
               +------------------------ sptrsv_ndr ------------------------+
               | ndr_row_dispatcher   (next position in iorder, +1 per grant) |
               |      |  grant             |  grant                         |
               |  ndr_wg_engine #0  ...  ndr_wg_engine #CU-1                |
               |      |                    |                                |
 global <----> |  ndr_mem_arbiter  (round robin, read responses in order)   |
 memory        +------------------------------------------------------------+
```

**Work-group engine (`ndr_wg_engine`).** One engine is one compute unit. It
asks the dispatcher for a position p, reads `iorder[p]` = i, the row bounds,
b[i] and the diagonal (the last entry of the row). Work-item t of the group
then handles entries t, t+BS, t+2BS, … of the row, multiplying each
l_ij by x_j and adding it to its own partial sum. The BS work-items do not
run in parallel: like the pipeline an OpenCL compiler builds for an NDRange
kernel, the engine processes them one after the other through a single
multiplier and a single adder. It goes round the group in **steps**: in each
step every work-item takes its next entry. After the last step the BS partial
sums are combined by a **tree reduction** (stride BS/2, BS/4, …, 1; BS must be
a power of two), then x_i = (b_i − s) / l_ii is written to global memory.

**Waiting on unsolved x (WAIT = 1).** Each work-item has a flag. If the x_j
it reads is still +inf, the flag stays clear and the partial sum is left as it
was; the engine repeats the step, reading x_j again, until every flag in the
group is set (the `spin` output pulses each time). Because rows are handed
out in level order, every row a work-group waits on is already held by some
unit, so the wait always ends. With one compute unit the earlier rows are
always finished first and no step is ever repeated; waiting happens with two
or more units.

**Dispatcher (`ndr_row_dispatcher`).** A counter loaded with `first` at
launch. It grants one request per cycle, lowest unit first, and hands out the
current position; when it reaches `last` it answers "no rows left" and the
unit goes idle. A single counter with one grant per cycle gives the same
guarantee as an atomic increment in global memory, without the round trip.

**Memory arbiter (`ndr_mem_arbiter`).** A round-robin arbiter on the one
memory port. It records the owner of every read in a small queue and routes
the in-order responses back to their owners.

`done` pulses when a launch was running and all units are idle again.

**Result order.** An NDRange solver adds the products in a different order
from the channel-based solver (strided partial sums, then a tree), so its
single-precision results may differ from serial substitution in the last
bits. They are exactly reproducible for a given BS.

## Floating point

The three units (`fp32_mul`, `fp32_add`, `fp32_div`) follow IEEE-754 single
precision, with these rules:

* Rounding is to nearest, ties to even.
* Denormal inputs count as zero, and results that would be denormal are
  flushed to signed zero.
* Overflow gives ±inf.
* Invalid operations give the quiet NaN 0x7fc00000.

The multiplier and adder are combinational. The compute kernel registers
around them, but the adder chain of stage 2 is UF adders deep in one cycle.
Deep-pipelining it would need the usual accumulator interleaving and would
change the summation order. The divider produces one quotient bit per clock
and pulses `done` 28 cycles after `start`. The NDRange engine uses the same
three units, one of each per compute unit.

## Interfaces

`sptrsv_top` brings out each solver's signals with its prefix (`swi_`,
`ndrm_`, `ndrw_`); only `clk` and `rst_n` are shared. In a system the three
memory ports would meet at one DRAM controller. The channel-based solver
`sptrsv_swi_hash`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | launch; the arguments below must stay stable until `done` |
| `busy`, `done` | out | 1 | solve in progress; one-cycle pulse when `x` is complete |
| `n_rows`, `n_levels` | in | 32 | system size and number of levels |
| `ilevels_base` … `x_base` | in | 28 | word base addresses of the seven arrays |
| `gm_req_valid/ready` | out/in | 1 | request handshake |
| `gm_req_we`, `gm_req_addr`, `gm_req_wdata` | out | 1, 28, 32 | write enable, word address, write data |
| `gm_rsp_valid`, `gm_rsp_data` | in | 1, 32 | read data, in request order. Writes get no response |

`sptrsv_ndr` has the same launch and memory signals, no `n_rows`,
`n_levels` or `ilevels_base`, and instead:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `first`, `last` | in | 32 | range of positions in `iorder` solved by this launch |
| `spin` | out | 1 | some work-group repeated a step waiting for an unknown |

The memory must answer reads in the order they were issued, and must apply
writes in order with reads. The level barrier relies on a write accepted
before a read being visible to that read.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `UF` | 4 | unroll factor: entries per beat, multipliers and adders in the compute kernel |
| `USE_HASH` | 1 | keep x[0 .. HASH_DEPTH-1] on chip |
| `WRITE_THROUGH` | 0 | 0: copy the x store out at the end; 1: write every unknown to global memory as well |
| `HASH_DEPTH` | 8192 | entries of the x store (32 KB of block RAM) |
| `CH_DEPTH` | 16 | depth of the coefficient, x and result channels |
| `ROW_CH_DEPTH` | `CH_DEPTH` | depth of the row channel |

UF = 4 with the x store and end-of-solve copy-out is the configuration that
ran fastest on most large test matrices. UF = 2 was best for some mid-sized
ones. With `USE_HASH = 0` and UF = 1, the design is the plain channel
organisation.

`sptrsv_ndr`:

| parameter | default | in `sptrsv_top` | meaning |
|-----------|---------|-----------------|---------|
| `BS` | 1 | 1 (per level), 4 (waiting) | work-items per work-group (power of two) |
| `CU` | 2 | 2 (per level), 1 (waiting) | compute units |
| `WAIT` | 0 | 0, 1 | wait on +inf unknowns |

The top's settings are the fastest ones found for each NDRange organisation:
BS = 1 with two units for the per-level solver on the matrix with the fewest
stored entries, and BS = 4 with one unit for the waiting solver, whose every
winning case used that setting.

## What is this design's own choice

The design follows the source description in these respects:

* the two kernels and their channels;
* the three nested loops of the memory kernel, the level order and the level
  barrier;
* the unrolled inner loop;
* a local array holding part of x, with both write-back policies;
* one work-group per row in `iorder` order, BS-strided work-items, partial
  sums and flags per work-item, a manual reduction, x preset to +inf for the
  waiting solver and one launch per level for the other;
* work-items of a group processed one after the other, and compute units as
  replicated engines.

The source description does not specify the following, so this design chose:

* **Single precision.** This is inferred from the solver working on floats.
  The rounding and flush rules are listed above.
* **How b_i, l_ii and x_i travel.** b_i goes in the x channel's diagonal lane,
  and solved x_i returns through a fourth FIFO. Only three channels are named
  (row sizes, x values, coefficients).
* **The x store.** It holds the index window 0 … HASH_DEPTH−1 with no tags,
  and HASH_DEPTH is 8192.
* **Channel depths.** All channels are 16 entries deep by default.
* **The memory port.** One in-order port, with one read in flight.
* **The divider and timing.** A bit-serial divider, and no overlap of
  division with the next row.
* **Level ranges for the per-level solver.** The host reads `ilevels` and
  passes each level's range as `first` and `last`; the kernel itself does not
  read `ilevels`.
* **NDRange details.** The tree shape of the reduction, the row counter kept
  beside the units instead of in global memory, the round-robin memory
  arbiter and one outstanding read per engine. SIMD vectorisation of
  work-items and loop unrolling inside the engine are not built: neither
  improved the measured runtimes, and the waiting kernel cannot be unrolled.

## Test matrices the defaults can hold

The nine evaluation matrices have 17 k to 30 k rows, 33 k to 6.8 M stored
entries and 6 to 5621 levels. The largest needs 4n + 2nnz + levels + 2 ≈
13.6 M words of global memory, far below the 2^28 words the 28-bit address
reaches. The x store holds 8192 unknowns, between a quarter and a half of x
for these matrices; the rest are read from DRAM. The NDRange solvers keep no
part of x on chip and need the same global memory, so they hold every matrix
too; the per-level solver needs one launch per level, up to 5621 launches.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. They all stop
themselves through a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_fp32_mul`, `tb_fp32_add`, `tb_fp32_div` | tens of thousands of random operands and the special cases, bit-exact against double arithmetic rounded once to single precision (correct for these operations). For the divider, also the 28-cycle latency |
| `tb_channel_fifo` | random traffic against a queue model: order, full/empty flags, fill level and the hold rule for stalled writers |
| `tb_x_hash` | random reads and writes, one-cycle read latency, read data held while idle |
| `tb_swi_compute_kernel` | random rows with gaps and back-pressure, bit-exact results, and the nb + 32 latency |
| `tb_swi_mem_kernel` | the memory kernel against a behavioural compute kernel that checks every beat and returns results late. A result that is read before it was written means the barrier failed |
| `tb_sptrsv_swi_hash` | five complete solvers side by side (default organisation with a small store, write-through, no store, UF = 2 with one-entry channels, UF = 1 with one-entry beat channels). Bit-exact x, plus counts of every mechanism: local and global x reads and writes, copy-out, barrier waits, full and empty channels, partial beats, multi-beat rows, memory stalls |
| `tb_ndr_row_dispatcher`, `tb_ndr_mem_arbiter` | grants, positions and "no rows left" against a model; arbitration fairness and response routing with three random units |
| `tb_ndr_wg_engine` | one waiting engine with BS = 4 solving a 120-row system bit-exact |
| `tb_sptrsv_ndr` | four NDRange solvers: per level with BS 1 / 2 units and BS 2 / 2 units, waiting with BS 4 / 1 unit and BS 4 / 2 units. Counts launches, repeated steps, reduction adds, port contention and "no rows left" |
| `tb_sptrsv_top` | the top at its default parameters, all three solvers on 9000-row systems (more than the x store holds), with every mechanism counted |
| `tb_sptrsv_full` | the top at its default parameters, all three solvers on random 30237-row systems (the size of the smallest test matrix), about 3.2 M cycles |

The reference solution is forward substitution in which every operation is
rounded to single precision, summed in the order the solver uses (serial for
the channel-based solver, strided then tree for the NDRange solvers), so `x`
must match **bit for bit**, not just within a tolerance. `tb/gmem_model.sv` stands in for DRAM. It applies random
latencies and random stalls of `req_ready`.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    tb/fp_ref_pkg.sv rtl/sptrsv_pkg.sv tb/tb_sptrsv_swi_hash.sv \
    --top-module tb_sptrsv_swi_hash
./obj_dir/Vtb_sptrsv_swi_hash
```

Replace the last file and the top module to run another testbench.
