# Jacobi sweep engine with a binary-tree floating-point datapath

This is synthesizable SystemVerilog for one Jacobi iteration step on a dense
linear system `A x = b` in IEEE-754 double precision:

    x_i(new) = ( b_i - sum_{j != i} a_ij * x_j ) / a_ii        for every row i

Its core is a **binary tree datapath**. Each clock it takes `k` consecutive
elements of one matrix row (a *sub-row*) and the matching `k` elements of
`x`. It multiplies them in `k` pipelined multipliers and adds the `k`
products in a tree of `k-1` pipelined adders. Out comes one partial sum per
clock. At the default `k = 8` that is 15 double-precision operations per
clock: 1.5 GFLOPS at 100 MHz. Around the tree sit the parts of a complete
sweep:

- stores for `x` and `b`;
- the row and sub-row counters;
- a *reduce* circuit that adds the partial sums of each row;
- a reciprocal unit for `1/a_ii`;
- a subtracter and an output multiplier.

```
 a_subrow (k x 64) ──► reg ───────────────┐
                                          ▼
 x_store ──(k elements, word j)──► [k x MUL]─►[adder tree, lg k levels]─► reduce_row ─┐
   ▲                                 ▲ lanes zeroed on the diagonal                   │ row sum
 jacobi_ctrl (counters i, j) ────────┘                                                ▼
   └─► diag_select ─► fp64_recip ─► 1/a_ii FIFO ──────────────►  jacobi_update: (b_i - sum) * 1/a_ii ─► x_valid/x_idx/x_data
                                         b_store ── b_i ────────►
```

## How a sweep proceeds

1. **Load.** `x` and `b` are written one element per clock into `x_store`
   and `b_store`, through the `x_wr_*` and `b_wr_*` ports.
2. **Start.** Pulse `start` with `n`. `n` must be a multiple of `k`, and
   `k <= n <= N_MAX`.
3. **Stream the matrix.** Send `A` in row-major order, one sub-row of `k`
   elements per beat, with a valid/ready handshake (`a_valid`, `a_ready`).
   Lane `l` of a beat is column `j*k + l`. A row takes `m = n/k` beats.
4. **Fetch `x`.** The sub-row counter `j` addresses `x_store`. That store
   is built as `k` banks (element `e` lives in bank `e mod k`), so the `k`
   matching elements are read in one clock. The sub-row is held in a register
   for that clock, so both reach the multipliers together.
5. **Remove the diagonal.** In the sub-row `j = i/k` that holds the diagonal
   element, the row counter `i` marks lane `i mod k`. The tree forces both
   operands of that lane to +0, so `a_ii * x_i` drops out of the sum. Forcing
   both operands keeps an infinite `x_i` from turning the sum into NaN.
6. **Reciprocal of the diagonal.** From the same sub-row, `diag_select`
   takes `a_ii` and sends it to `fp64_recip`. The 20-cycle reciprocal is done
   long before the row sum, so `1/a_ii` waits in a FIFO in `jacobi_update`.
7. **Add up the row.** The tree emits one partial sum per sub-row.
   `reduce_row` adds the `m` partial sums of a row into the row sum.
8. **Update.** `jacobi_update` counts rows as they arrive from reduce. For
   row `i` it reads `b_i`, forms `b_i - sum` (an adder with the sign of the
   sum inverted), and multiplies the difference by `1/a_ii`. The result goes
   out on `x_valid` / `x_idx` / `x_data`, in index order.
9. **Finish.** `done` pulses with the last element, and `busy` falls.

One `start` performs one sweep. To iterate, write the outputs back into the
`x` store (`x_wr_*`) and start again. The testbench runs 25 sweeps this way
on a diagonally dominant 64x64 system and converges to the known solution.
Writing the stores while `busy` is high is not allowed.

## The tree datapath (`tree_datapath`)

The tree follows the reference design most closely. It has `K` multipliers
(10-cycle latency) and a balanced tree of `K-1` adders (14-cycle latency)
in `lg K` levels. Node `n` of the tree adds nodes `2n` and `2n+1`; the
leaves `K..2K-1` are the products. Every path therefore has the same length,
and the latency is

    10 + 14 * lg K = 52 cycles for K = 8

The testbench checks this number. A new sub-row may enter every clock and
the tree never stalls. Some ports keep the trace names of the original
design: `clk_ip`, `valid_ip`, `fp_ipr` (the sub-row, lanes 1..8),
`valid_op` and `tree_opv` (the partial sum). `fp_ipx` (the `x` elements),
`zero_ip` (the diagonal lane) and `rst_ip` are this implementation's names.
Results are bit-exact against a software model that adds in the same
pairwise order: lanes 0+1, 2+3, and so on.

## The reduce circuit and flow control (the part to understand)

The partial sums of a row arrive up to one per clock. They must be added with
a single adder that has a 14-cycle latency. A plain accumulator would need 14
cycles per input. `reduce_row` instead keeps a pool of operands:

- the head of its input FIFO;
- the value now leaving the adder;
- one holding register per row in progress.

Each clock it pairs two operands of the same row and sends them into the
adder. A lone operand is parked in its row's register. One register per row
is enough, because a third operand of a row only exists when two others are
being added.

Every operand carries a one-bit row tag, and the tag of each addition travels
beside the adder in a delay line. So a new row can start taking inputs while
the previous row is still pairing off its last values. This drain takes about
14 x (1 + lg 14), roughly 70 cycles at `ADD_LAT = 14`. Two rules bound the
overlap:

- A third row waits until the oldest row has been emitted.
- A FIFO value that can be neither added nor parked waits a clock. This
  happens when both registers are full and the adder is taken.

A row is finished when all its `m = n/k` inputs have been taken, none of its
additions is in flight, and one value is left. Rows leave in order.

Partial sums queue in a 64-entry FIFO in front of the circuit. `jacobi_ctrl`
counts sub-rows that are dispatched but not yet taken from that FIFO. With 64
of them outstanding, it drops `a_ready` and the matrix stream stalls. How
often that happens depends on the row length:

- **Rows of one sub-row (`n = k`).** These finish one per clock, with no
  stall.
- **Short rows of a few sub-rows.** Drains overlap only pairwise, so the
  matrix stream stalls often.
- **`n = 1024`, `m = 128`.** A full sweep took 135,312 cycles for 131,072
  sub-rows. The datapath is busy 97 % of the time, about 14.5 operations per
  clock against the peak of 15.

The reference design uses dedicated reduction circuits, published
separately. Those are not reproduced here; this one is this design's own.

Because the order of additions depends on timing, a row sum can differ from
a strictly sequential sum in the last bits. Data whose sums are exact, such
as small integers, gives bit-identical results.

## Floating-point units

`fp64_mul` (10 cycles), `fp64_add` (14 cycles) and `fp64_recip` (20
cycles) wrap the combinational functions of `fp64_pkg` in a fixed-latency
pipeline. Each function's result is registered and then shifted along, and
synthesis is expected to retime those registers into the logic. All three
units follow the same rules:

- They round to nearest, ties to even.
- Subnormal inputs count as zero, and results that would be subnormal are
  flushed to a signed zero.
- Infinities and signed zeros follow IEEE-754.
- Every NaN result is `0x7FF8_0000_0000_0000`.

The reciprocal divides the significand by restoring division. It computes
55 quotient bits plus a remainder sticky bit, so it is correctly rounded.
The testbenches compare every unit bit for bit against the simulator's own
double-precision arithmetic. They use random operands, near-cancellations
and special values, and they check that every result appears exactly after
the unit's latency.

Note that `x_i = (b_i - sum) * (1/a_ii)` rounds twice, once in the
reciprocal and once in the multiply. A true division rounds only once.

## Interface of `jacobi_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `x_wr_en`, `x_wr_addr`, `x_wr_data` | in | 1, log2 N_MAX, 64 | write element of x(delta) |
| `b_wr_en`, `b_wr_addr`, `b_wr_data` | in | 1, log2 N_MAX, 64 | write element of b |
| `start`, `n` | in | 1, log2(N_MAX+1) | start a sweep of length n (taken while `busy` is low) |
| `busy`, `done` | out | 1 | sweep in progress; pulse with the last output |
| `a_valid`, `a_ready`, `a_subrow` | in/out/in | 1, 1, K x 64 | matrix stream, one sub-row per accepted beat |
| `x_valid`, `x_idx`, `x_data` | out | 1, log2 N_MAX, 64 | new element x_i(delta+1) |

Latency from the last sub-row of a row to its output:

- 1 cycle: operand register and `x` store read;
- 52 cycles: tree;
- the reduce time: 1 cycle for one-sub-row rows, otherwise about 70
  cycles;
- 25 cycles: `b` read, subtracter and multiplier.

## Parameters

| parameter | default | origin |
|---|---|---|
| `K` | 8 | widest tree that fit the original FPGA target |
| `MUL_LAT` | 10 | original multiplier latency |
| `ADD_LAT` | 14 | original adder latency |
| `N_MAX` | 1024 | this design's choice (largest `n`) |
| `RECIP_LAT` | 20 | this design's choice; must be below the tree latency |
| `RED_FIFO` | 64 | this design's choice (reduce FIFO, and stall credits) |
| `RFIFO_DEPTH` | 128 | this design's choice (1/a_ii FIFO) |

`K` must be a power of two and `N_MAX` a multiple of `K`.

## What follows the original design and what is added

Taken from the original design:

- the tree of `k` multipliers and `k-1` adders;
- its 52-cycle latency at `k = 8`;
- the sub-row streaming;
- counter `i` zeroing the diagonal product and selecting `a_ii` and `b_i`;
- counter `j` addressing the `x` store;
- the reduce, subtract and multiply-by-`1/a_ii` order of the final steps.

The original work builds and measures only the tree datapath. It shows the
rest of the solver as a block diagram. So everything around the tree is this
implementation's own construction from that description:

- the reduce circuit;
- the reciprocal unit;
- the banked store organisation;
- the valid/ready matrix stream and the credit-based stall;
- the FIFO for `1/a_ii`;
- the one-sweep-per-start control.

The arithmetic inside the floating-point units is also this implementation's
own; only their latencies are given. The following are not provided:

- subnormal support;
- other rounding modes;
- a convergence test and iteration control in hardware;
- a sparse-matrix version.

The original figures come from a Virtex-II Pro FPGA: about 20,000 slices
and 581 I/O for the `k = 8` tree, with a clock period of 9.4 to 9.7 ns.
They are not claimed for this RTL. It has only been simulated and
lint-checked, not placed and routed.

## Files

- `rtl/fp64_pkg.sv`: binary64 type, multiply/add/reciprocal functions.
- `rtl/fp64_mul.sv`, `rtl/fp64_add.sv`, `rtl/fp64_recip.sv`: pipelined
  units.
- `rtl/tree_datapath.sv`: the binary tree datapath.
- `rtl/reduce_row.sv`: the reduce circuit.
- `rtl/x_store.sv`, `rtl/b_store.sv`: vector stores.
- `rtl/jacobi_ctrl.sv`: counters `i` and `j`, diagonal marking, stall
  credits.
- `rtl/diag_select.sv`: `a_ii` multiplexer.
- `rtl/jacobi_update.sv`: subtracter and output multiplier.
- `rtl/jacobi_top.sv`: the complete sweep engine.
- `rtl/sync_fifo.sv`, `rtl/delay_line.sv`: helpers.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/tb_jacobi_top.sv`: end-to-end at `N_MAX = 64`. It runs exact sweeps
  for n = 8 to 64 and a 25-sweep converging iteration. It counts stalls,
  host gaps, zeroed diagonal lanes and multi-sub-row rows.
- `tb/tb_jacobi_top_full.sv`: one exact 1024x1024 sweep at the default
  parameters, with a check on the sustained rate.
- `tb/jacobi_host.svh`: the host side shared by the two top-level benches.
  It produces the matrices from a hash of (i, j) and computes the reference.

## Simulating

From the repository root, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_jacobi_top \
    -I. -Irtl -yrtl -ytb +libext+.sv rtl/fp64_pkg.sv tb/tb_jacobi_top.sv
./obj_dir/Vtb_jacobi_top
```

Replace `tb_jacobi_top` with any other testbench name. Each prints
`TB_RESULT checks=N failures=M` and stops. Each also has a watchdog that
counts a failure if the simulation hangs. The full-size sweep runs in under
a second of simulation time once built.

All the testbenches pass. Each one also fails when its module is replaced by
a copy with a single deliberate defect. The defects include a sign error, a
lost low-order bit, a latency one cycle short, a wrong diagonal lane, a
subtraction turned into an addition, and the diagonal mask left off.
