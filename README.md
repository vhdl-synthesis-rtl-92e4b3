# Three ways to build a matrix-vector multiplier

This RTL computes `c = A * b` for an `N x N` matrix `A` and an `N`-element
vector `b`, all values 16-bit signed integers, in three different hardware
organisations. Each one matches a circuit that a high-level synthesis flow
produces from a short loop nest or recurrence. They sit side by side in
one top module (`matvec_top`), so the three approaches can be simulated,
synthesised and compared on equal terms:

| design | unit | parallelism | clocks for one product |
|---|---|---|---|
| row (`hls_row_matvec`) | one row of `A` per clock | `N` multipliers feeding an adder tree | `N` for `N < 16`, `N + 1` from `N = 16` |
| column (`hls_col_matvec`) | one column of `A` per clock | `N` multiplier-adders, one per element of `c` | `N` |
| recurrence (`mma_matvec`) | one column of `A` per clock | `N` accumulating cells, schedule set by a small controller | `N` |

The clock counts are measured from the clock in which the first matrix data
reach the arithmetic to the clock in which the last result element can be
read. They are the figures the testbenches check.

All arithmetic wraps modulo 2^16: every product and every sum keeps its low
16 bits. This matches what the generated VHDL these designs model does, and
the testbenches' integer reference models do the same.

The default size is `N = 256` (`matvec_pkg::MATSIZE`), the largest of the
evaluated sizes 8, 16, 32, 64, 128 and 256. Every module takes `N` as a
parameter. `N` must be a power of two. The whole top is checked at every
evaluated size.

## The arithmetic cells

* `mul16`: `p = a * b`, truncated to 16 bits.
* `mac16`: `dout = in0 * in1 + in2`, truncated to 16 bits. This is the
  multiply-add of a DSP slice, and all three designs are built from it.

Both cells are combinational.

## Partitioned matrix memory

The two HLS-style designs need `N` matrix elements in every clock, so their
matrix is not one memory but `N` banks (`partitioned_matrix`, built from
`mem_bank`). The matrix is a flat array, with element `k = i*N + j` holding
`A[i][j]`. There are two ways to split it:

* **cyclic** (row design): element `k` goes to bank `k mod N`, word
  `k div N`. Bank `j` then holds column `j`, and reading word `i` of every
  bank returns row `i`.
* **block** (column design): element `k` goes to bank `k div N`, word
  `k mod N`. Bank `i` then holds row `i`, and reading word `j` of every bank
  returns column `j`.

Both memories are written one element per clock, using the same row-major
index `k`. A read sends one address to all banks, and the `N` words come
back one clock later. In `matvec_top` a single loader (`a_load_*`) writes
both memories at once, so loading a matrix takes `N*N` clocks.

## Row design (`hls_row_matvec`)

This is the circuit obtained from a doubly nested loop in which:

* the inner loop, over the columns, is fully unrolled;
* the outer loop, over the rows, is pipelined with one iteration per clock;
* `b` is split into `N` separate inputs;
* `A` is split cyclically.

The pipeline has these stages:

1. **Issue.** The row counter `i` drives `a_address0` with `a_ce0` high,
   and `b` is captured into registers. When the counter reaches `N` the
   loop exits.
2. **Compute.** Row `i` arrives on `a_q0`. `row_dot_tree` forms the dot
   product. Without the extra stage, `c[i]` is written through
   `c_address0`, `c_we0` and `c_d0` in this same clock.
3. **Extra stage** (only when `EXTRA_STAGE = 1`). The second half of the
   adder tree finishes and `c[i]` is written.

The dot product (`row_dot_tree`) takes the lanes in pairs. Each pair uses
one `mul16` and one `mac16` (`a[2p+1]*b[2p+1] + a[2p]*b[2p]`), and a binary
tree of `log2(N/2)` adders then reduces the pair sums. The chain grows with
`log2 N`. From `N = 16` upward, a register is inserted after the pair level
to keep the combinational path short. This costs one clock: `N + 1` clocks
instead of `N`. `EXTRA_STAGE` defaults to `N >= 16` and can be overridden.

The controller implements a start/done block handshake:

* `ap_start` in the idle state starts a run.
* `ap_done` and `ap_ready` pulse together for one clock after the last
  write.
* `ap_idle` is high in the idle state while `ap_start` is low.

From start to done takes `N + 2` clocks (`N + 3` with the extra stage).
For `N = 4` this gives the 6-clock latency of the generated core this
design is modelled on. `ap_rst` is synchronous and active high.

## Column design (`hls_col_matvec`)

This design comes from the same product with the loops swapped:

* the loop over the columns `j` is pipelined;
* the loop over the rows is fully unrolled into `N` `mac16` cells;
* `c` is split into `N` accumulator registers.

In each clock, column `j` of `A` arrives from the block-partitioned banks.
One element `b[j]` arrives from a single vector memory and is broadcast to
all `N` multiplier-adders, which update every `c[i]` together. The
accumulators are cleared in the clock in which `ap_start` is accepted. The
datapath depth does not depend on `N`.

The handshake is the same as in the row design. The result stays on `c`
from the done clock until the next start, and `c_ap_vld` is high in the
done clock. Start to done takes `N + 2` clocks.

## Recurrence design (`mma_matvec`, `mma_controller`)

This design comes from the recurrence

```
d[i,0] = 0
d[i,j] = d[i,j-1] + A[i][j] * b[j]    for j = 1..N
c[i]   = d[i,N]
```

Time stands for `j`, and there is one cell per row `i`. Each cell keeps `d`
in a register and computes, combinationally:

```
dOut[i] = 0                                  while the control bit is set
dOut[i] = d_reg[i] + aMirrIn[i] * bMirrIn[i]  otherwise
```

The controller (`mma_controller`) is a counter plus four states: init,
true, false and final. It raises the control bit for exactly one clock,
the step `j = 0`.

How to drive it:

1. Hold `Rst` low with `CE` high for a clock. `Rst` is synchronous, active
   low, and only acts when `CE` is high.
2. Release `Rst`. The counter starts at 0. In the clock where it reads 2,
   the control bit is high (`j = 0`) and the inputs are ignored.
3. In the clock where the counter reads `2 + j`, drive column `j` of `A` on
   `aMirrIn`. Drive `b[j]` on every lane of `bMirrIn`: the user copies the
   vector element `N` times, because this design has one `b` input per
   cell.
4. In the clock where the counter reads `N + 2`, `dOut` holds `c` and
   `result_valid` is high.

`CE` low freezes every register, including the counter, so the input
stream can pause. `dOut` is combinational, so hold the current column on
the inputs during a pause if you want to read `dOut` then. The cells keep
accumulating after `j = N`, so `dOut` means something only while
`result_valid` is high.

## Top level (`matvec_top`)

`matvec_top` contains the three designs, each with its own ports:

* `row_*`: the row design and its cyclic matrix memory. `b` comes in as
  `N` parallel inputs. `c` goes out as a stream of memory writes
  (address, write enable, data).
* `col_*`: the column design, its block matrix memory and its vector
  memory. The vector memory is loaded through `col_b_load_*`. `c` goes out
  as `N` parallel outputs with `col_c_vld`.
* `mma_*`: the recurrence design, with its own `mma_ce` and active-low
  `mma_rst_n`.

The two HLS-style designs share `rst` and the matrix loader `a_load_*`.

## Where this RTL makes its own choices

The generated code these designs are modelled on is published only in part
(a size-4 example of the row design and of the recurrence design). Where
it says nothing, this RTL chooses as follows:

* **Row design, `N > 4`.** The adder tree is generalised from the size-4
  example: pairs of mul/mac cells, then a balanced tree. The extra
  register's position after the pair level is a choice here. The published
  design only says that a register is added from size 16 on, costing one
  clock.
* **Column design.** Its controller and its output interface are not
  published. The controller reuses the row design's handshake and
  two-stage pipeline. The output `c` is `N` registers plus one valid
  strobe.
* **Recurrence controller.** The true state lasts one clock, since
  `d[i,0]` covers one time step. The false-to-final count, 9 in the
  size-4 example, is taken as `2N + 1`. The final state changes no output,
  so this count has no visible effect. The counter is 32 bits wide and
  saturates instead of wrapping.
* **Recurrence design.** `result_valid` is added here; the original has no
  valid output. The `d` registers are cleared by `Rst`; the original
  leaves them unreset.
* **Bank ports.** A generated core gives every bank its own address and
  enable port, all driven by the same counter. Here they are merged into
  one shared address and one shared enable.
* **Memories.** A bank has a one-clock read and a separate write port. The
  shared loader is a convenience of this top level.
* **Reuse across sizes.** A smaller problem can run on the `N = 256` build
  by padding `A` and `b` with zeros, but it then takes 256 (or 257) clocks.
  Build with the smaller `N` to get the clock counts above.

The published comparison also reports timing slack and FPGA resource counts
(DSP blocks, flip-flops, LUTs) for each design. These depend on the vendor
flow and are not reproduced here.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops on its own, with a watchdog
that fails the run if it hangs. Stimulus is random (`$urandom`), and
results are compared with integer reference models.

Example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/matvec_pkg.sv tb/tb_matvec_top.sv --top-module tb_matvec_top
./obj_dir/Vtb_matvec_top
```

Replace the testbench name to run another one.

| testbench | what it covers |
|---|---|
| `tb_mul16`, `tb_mac16` | corner values and random operands |
| `tb_mem_bank` | read latency, hold with `ce` low, rewrite |
| `tb_partitioned_matrix` | cyclic and block mapping at `N = 8` |
| `tb_row_dot_tree` | `N = 8` (combinational) and `N = 16` (registered), including hold with `en` low |
| `tb_hls_row_matvec` | `N = 8` and `N = 16`, three runs each, through `tb/row_matvec_harness.sv`: every `c` write, single write per element, `N`/`N + 1` clocks, start-to-done latency, handshake pulses |
| `tb_hls_col_matvec` | `N = 8`, three runs: results, clear on start, `N` clocks, latency, handshake |
| `tb_mma_controller` | counter, one-clock control pulse, `CE` freeze, reset ignored while `CE` is low |
| `tb_mma_matvec` | `N = 8`, every partial sum `d[i,j]`, `result_valid` timing, random `CE` stalls |
| `tb_table1_sizes` | the whole top built at `N = 8, 16, 32, 64, 128` (through `tb/top_size_harness.sv`): results of all three designs and their clock counts, `N` at size 8 and `N + 1` from size 16 for the row design, `N` for the others |
| `tb_matvec_top` | the full `N = 256` top at its default parameters; see below |

`tb_matvec_top` does the following:

* Loads a random 256 x 256 matrix.
* Runs the row design and the column design one after the other, then both
  started in the same clock with a new vector.
* Feeds the recurrence design with random `CE` stalls.
* Checks all 256 results of every run and the clock counts (257, 256 and
  256).
* Counts each mechanism used (extra adder stage, handshakes, accumulator
  clear, stalls, control pulse, loads into both memories) and fails if any
  never happened.

It finishes in well under a second of simulation after a build of about
half a minute.
