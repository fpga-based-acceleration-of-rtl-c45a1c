# SOM training accelerator in SystemVerilog

A Self-Organizing Map (SOM) maps high-dimensional data onto a small 2-D grid
of neurons. Each neuron holds a weight vector of the same dimension as the
data. Training presents the input vectors one after another. For each input
it finds the neuron whose weights are closest: the Best Matching Unit, or BMU.
It then pulls the BMU and its grid neighbours towards the input, more weakly
the further they are from the BMU. Nearly all the work is two sweeps over
the whole map per input: one computes distances, the other updates weights.

This RTL implements that training loop as two accelerator kernels, in the
form of an OpenCL FPGA design (Stratix V / Arria 10 boards) that was
originally built with high-level synthesis:

* **SOMComp** does one complete training pass. It copies the map, the whole
  input set and a small coefficient vector from off-chip memory into on-chip
  memory. For every input it finds the BMU and updates the map. At the end
  it writes the map back.
* **NeigRed** runs between passes. It shrinks the neighbourhood and the
  learning rate by shifting the coefficient vector.

A host, which is not part of this RTL, launches SOMComp, then NeigRed, once
per training iteration. It chooses how many iterations to run.

The default size is the reference configuration: a 16x16 map (256 neurons),
5120 input vectors and dimension 3. All arithmetic is IEEE-754 single
precision (binary32).

## The two ideas that shape the datapath

**Manhattan distance instead of Euclidean.** The BMU is the neuron with the
smallest `sum_i |x_i - w_i|`. This needs no multiplier and no square root.
SOMs usually use the Euclidean distance, but choosing the minimum works the
same way with either.

**A distance-indexed coefficient vector (NR) instead of a neighbourhood
function.** The neighbourhood-reduction vector `NR` has `MAP_SIDE` entries.
The grid distance between a neuron and the BMU is the Chebyshev distance
`max(|dx|, |dy|)`, a value from 0 to `MAP_SIDE-1`. That distance selects the
coefficient `NR[distance]`, and every lane of the neuron becomes

    w <- w - (w - x) * NR[max(|dx|,|dy|)]

`NR` combines the learning rate with the shape of the neighbourhood, for
example a Gaussian scaled by the learning rate. The host computes it once.
NeigRed then does `NR[i-1] <- NR[i]` and `NR[MAP_SIDE-1] <- 0`, so after
each iteration:

* every distance gets the coefficient that used to belong to the next ring
  out, so both the learning rate and the neighbourhood shrink;
* one more outer ring of neurons gets a zero coefficient and stops moving.

The hardware never evaluates an exponential. Decay is a shift of a
16-entry vector.

## Block structure

```
                 som_accel_top
 bank 1 <──┬── gmem_mux ──┬── somcomp_kernel ── m2 ──> bank 2 (inputs, read only)
 (map, NR) │              │     ├ local_ram  map     (T x DIM floats)
           │              │     ├ local_ram  inputs  (INPUT_SIZE x DIM floats)
           │              │     ├ NR registers       (MAP_SIDE floats)
           │              │     ├ manhattan_dist ─> bmu_search
           │              │     └ weight_update
           │              └── neigred_kernel
```

| module | role |
|---|---|
| `som_pkg` | binary32 type, global-memory port structs, `f32_abs`, `f32_lt` |
| `fp_add`, `fp_mul` | combinational binary32 add/subtract and multiply |
| `manhattan_dist` | `DIM` parallel lanes of \|w-x\|, summed by a balanced adder tree |
| `bmu_search` | running minimum over a stream of distances; ties keep the lower index |
| `weight_update` | Chebyshev index, NR lookup and the update of all `DIM` lanes of one neuron |
| `local_ram` | on-chip memory, one whole vector per word, lane write enables, 1-cycle read |
| `somcomp_kernel` | SOMComp: load, per-input distance and update sweeps, write-back |
| `neigred_kernel` | NeigRed: load NR, shift, store NR |
| `gmem_mux` | shares the bank-1 port between the two kernels |
| `som_accel_top` | the kernel system; memory banks and host control are its ports |

Parameters: `MAP_SIDE` (default 16), `INPUT_SIZE` (5120) and `DIM` (3). The
map has `T = MAP_SIDE*MAP_SIDE` neurons. The sizes are fixed when the design
is built, just as the original kernels were recompiled for each size.

## SOMComp in detail

**Buffers.** The kernel takes three word addresses: `map_base`, `input_base`
and `nr_base`. One address holds one float.

* Map: neuron `a` sits at grid position `x = a % MAP_SIDE`,
  `y = a / MAP_SIDE`. Its `DIM` weights are stored at `map_base + a*DIM + i`.
* Inputs: stored the same way from `input_base`.
* NR: `MAP_SIDE` consecutive floats from `nr_base`.

The map and NR are read and written through bank 1. The inputs are only
read, through bank 2.

**Load.** Reads are issued on both banks at once, one float per accepted
request:

* bank 1: `T*DIM` map words, then `MAP_SIDE` NR words;
* bank 2: `INPUT_SIZE*DIM` input words.

Each response is written into the right lane of the local memory. The load
ends when every response has arrived.

**Per input** (input `n`), the schedule takes `2*T + 7` cycles when nothing
stalls:

1. `FETCH_X` (1 cycle): the input RAM is addressed with `n`. Its output
   stays equal to input `n` for the rest of the iteration.
2. `DIST` (`T + 3` cycles): one neuron is read per cycle. A cycle later the
   neuron's row and the input enter `manhattan_dist`. The registered
   distance goes to `bmu_search`. The first neuron starts a new search, and
   each later neuron replaces the winner only if it is strictly smaller.
   After the two-stage pipeline drains, the BMU appears for one cycle on
   `bmu_valid`, `bmu_idx` and `bmu_dist`.
3. `UPDATE` (`T + 2` cycles): one neuron is read per cycle. A cycle later
   `weight_update` computes the new row and writes it back. Row `j-1` is
   written in the same cycle as row `j` is read, so the two never collide.
   The BMU's x and y come from `best_idx % MAP_SIDE` and
   `best_idx / MAP_SIDE`.
4. `NEXT` (1 cycle): move to the next input, or go to the write-back after
   the last one.

**Write-back.** Each map row is read from local memory and written to bank 1
one float per accepted request, plus one cycle per row to read it. `done`
then pulses for one cycle.

The full-size pass (16x16 map, 5120 inputs, D=3) takes 2,675,464 cycles in
simulation. The memory models there refuse 10 % of requests and answer
after 6 cycles. Of these cycles, 5120 x 519 = 2,657,280 are the per-input
sweeps.

## Sizes and cycle counts

The original design was evaluated at these sizes:

* map sizes 8x8 to 24x24;
* 1024 to 5120 inputs;
* dimensions 3 to 6, with the 16x16 map and 5120 inputs.

Each size is a separate build. A SOMComp pass takes about
`INPUT_SIZE * (2*T + 7)` cycles, plus loading and write-back. The
simulated counts below include memory models that refuse 10 % of requests:

| configuration | T | on-chip RAM bits | SOMComp pass (cycles) |
|---|---|---|---|
| 8x8, 5120 inputs, D=3 | 64 | 497,664 | 708,525 |
| 12x12, 5120, D=3 | 144 | 505,344 | 1,528,106 |
| 16x16, 5120, D=3 (default) | 256 | 516,096 | 2,675,464 |
| 20x20, 5120, D=3 | 400 | 529,920 | 4,150,679 |
| 24x24, 5120, D=3 | 576 | 546,816 | 5,953,732 |
| 16x16, 5120, D=4 | 256 | 688,128 | 2,681,398 |
| 16x16, 5120, D=5 | 256 | 860,160 | 2,687,430 |
| 16x16, 5120, D=6 | 256 | 1,032,192 | 2,693,363 |
| 12x12, 2048, D=3 | 144 | 210,432 | 611,592 |

The dimension adds almost no cycles, because all `DIM` lanes work in
parallel. It costs adders and RAM width instead. The map size sets the
time, because every input sweeps the whole map twice.

## Arithmetic

* Binary32 throughout, with round to nearest, ties to even.
* Subnormal inputs count as zero, and subnormal results become zero.
  Overflow gives infinity. NaN and infinity inputs are not handled
  specially. The data (0 to 10000) and the coefficients (0 to 1) never come
  near these cases.
* The lane terms `|w-x|` are added in a balanced tree: neighbours are added
  pairwise level by level, and an odd last term moves up a level unchanged.
  For `DIM = 3` this is `(t0 + t1) + t2`, the same order as a plain
  left-to-right sum.
* The update is computed as `w - ((w - x) * c)`, rounding after each
  operation.
* `fp_add` aligns the smaller operand with 26 extra bits plus a sticky bit.
  It adds or subtracts exactly, normalises with a leading-zero count and
  rounds once.

## Interfaces and timing

**Kernel launch.** Pulse `comp_start` or `neig_start` for one cycle while
the base addresses are valid. They are captured at that moment. `*_busy`
is high from the cycle after the start pulse and falls in the cycle where
the one-cycle `*_done` pulse is high. The host
must not start the next kernel until the previous one is done.

**Global-memory port** (`som_pkg::gmem_req_t` / `gmem_rsp_t`):

* Request: `req`, `we`, a 32-bit word address `addr` and `wdata`.
* A request is accepted in a cycle where `req` and `gnt` are both high.
* Read data comes back later on `rvalid`/`rdata`, in request order, with
  any latency.
* A write is complete once it is accepted.

**`gmem_mux`.** Only one kernel owns the bank-1 port at a time. Ownership
passes to the other kernel when three things are true: the owner is idle,
it has no read outstanding, and the other kernel is requesting. The switch
costs one cycle. `mux_owner` and `mux_switched` show the arbitration.

**Reset.** `rst` is synchronous and active high. The local memories are not
reset; everything that is read before it is written is reset.

## Where this RTL departs from the original design, or fills gaps

* **BMU search.** The original kernel code starts the search from
  neuron 0's distance, but it never resets the winner index between inputs.
  So when neuron 0 is the nearest, it would keep the previous input's BMU.
  Here every input starts a fresh search at neuron 0, which is what the SOM
  algorithm prescribes.
* **Memory width.** The original load and store loops were unrolled
  `MAP_SIDE` times, so they probably used wide memory accesses. Here the
  port moves one float per access. A wider port would shorten the load and
  store phases only.
* **Schedule.** The micro-architecture is a plain state machine that
  handles one neuron per cycle, with `DIM` lanes in parallel. The HLS tool
  produced its own pipeline, which is not known.
* **Own design choices.** The port protocol, the arbitration, the bank
  assignment, the reset and the handling of rounding corner cases are all
  choices made for this RTL. The exact rounding of the original "fused"
  floating-point option is unknown.
* **Not part of this RTL.** These are represented by ports, and in the
  testbenches by `tb/gmem_model.sv` and by the host's role:
  * the DDR3 memory and its controller;
  * PCIe/DMA;
  * the board support logic;
  * the host program, which creates the dataset and the NR vector and
    chooses the number of iterations.
* **Sizes.** Configurations other than the default (map 8x8 to 24x24, 1024
  to 5120 inputs, dimension 3 to 6) need a rebuild with other parameter
  values. On-chip storage is `(T + INPUT_SIZE) * DIM * 32` bits plus
  `MAP_SIDE` registers, which is 516,096 RAM bits at the default size.

## Verification

Every testbench checks its results on its own and ends by printing
`TB_RESULT checks=N failures=M`. The reference model (`tb/fp_ref_pkg.sv`,
`tb/som_ref_pkg.sv`) does every operation in double precision, then rounds
the result to binary32 by bit manipulation. For +, - and * on binary32
operands this gives exactly the correctly rounded binary32 result. The
model shares no code with the RTL.

| testbench | what it checks |
|---|---|
| `tb_fp_add`, `tb_fp_mul` | 40,000 random and directed operations each, including cancellation and ties |
| `tb_manhattan_dist` | DIM = 3, 4 and 6 trees against the reference |
| `tb_bmu_search` | streams with ties, minima first and last, idle cycles |
| `tb_weight_update` | Chebyshev index and new weights; zero coefficients |
| `tb_local_ram` | lane writes and read-during-write |
| `tb_gmem_mux` | response routing with two random masters and ownership changes |
| `tb_neigred_kernel` | five shifts of a 16-entry vector under back-pressure |
| `tb_somcomp_kernel` | two passes on a 4x4 map: BMU of each input, map, tie to lower index, 2T+7 cycles per input |
| `tb_som_accel_top` | 5x5 map, DIM 4, four SOMComp+NeigRed iterations. It counts back-pressure on both banks, owner changes, a BMU tie, BMUs away from neuron 0, frozen neurons and the per-input schedule, and requires each to happen |
| `tb_som_workloads` | one iteration on each configuration in the table above (about 45 s) |
| `tb_som_full` | the default size: one full pass over 5120 inputs and one NeigRed, checked bit for bit (about 4 s of simulation) |

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/som_pkg.sv tb/fp_ref_pkg.sv tb/som_ref_pkg.sv tb/tb_som_accel_top.sv \
  --top-module tb_som_accel_top
./obj_dir/Vtb_som_accel_top
```

To change the size, override `MAP_SIDE`, `INPUT_SIZE` and `DIM` on
`som_accel_top`. The testbenches set these as local parameters at their
top. `bmu_idx` is `log2(MAP_SIDE^2)` bits wide.
