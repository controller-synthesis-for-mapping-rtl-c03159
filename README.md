# Global/local control for a partitioned processor array

A processor array that runs a partitioned loop nest needs control signals. They
say, at every time step and in every processing element (PE), which branch of
each `if` in the loop body applies: take the operand from memory, from a
neighbour or from local storage; start or continue an accumulation; emit a
result. Partitioning makes these conditions depend on tile coordinates that a PE
cannot read off its own index and the clock. Solving for them per PE, or storing
them in tables, costs a lot of area.

This design splits the work three ways:

* **One global counter** scans the tile coordinates in schedule order, so no PE
  has to reconstruct them.
* **One global controller** evaluates, once, every condition that does not
  depend on the processor index.
* **A small local controller per PE** evaluates only the conditions that involve
  the processor index. It combines them with the global ones into a few mux
  selects.

Counter values and global signals are not broadcast. They travel PE to PE
through delay registers, so each PE receives them exactly when its own schedule
reaches the same point.

The repository holds two designs built on this idea. They stand side by side in
`ctrl_synth_top`:

1. **`mm_array`**: a 2 x 2 array that multiplies two 8 x 8 matrices under a
   two-level ("co-partitioned") tiling. This is the main design.
2. **`lsgp_counter`**: a counter with an *enable mechanism* for one skewed
   (parallelepiped) tile. Its schedule has time steps at which no point
   executes, so the scan must stall.

## 1. The matrix-multiplication array

### Index space and schedule

The product `c[i][j] = sum_k a[i][k] * b[k][j]` with `N = 8` is tiled twice:

| coordinate | range | meaning |
|---|---|---|
| `J = (j1, j2)` | 0..1 each | point inside a 2 x 2 *local-sequential* (LS) tile, run sequentially in one PE |
| `p = (p1, p2)` | 0..1 each | which LS tile of a *global-sequential* (GS) tile, i.e. which PE |
| `L = (l1, l2)` | 0..1 each | which 4 x 4 GS tile; GS tiles run one after another |
| `l3` | 0..7 | the summation index `k` |

The matrix indices are `i = j1 + 2 p1 + 4 l1`, `j = j2 + 2 p2 + 4 l2`, `k = l3`.
The schedule is

    t = 2 j1 + j2 + p1 + p2 + 8 l1 + 4 l2 + 16 l3 + 1

so PE `p` is busy for 128 consecutive cycles, starting `p1 + p2` cycles after
PE(0,0). The whole product takes 130 time steps. Each PE owns 16 elements of C.
Each element is accumulated across `l3`, one step every 16 cycles.

### What a PE computes

At every enabled cycle a PE picks its `a` and `b` operands. `z = a * b` is then
added to the partial sum from 16 cycles earlier, or starts a new sum when
`l3 = 0`:

| case | `a` comes from | `b` comes from |
|---|---|---|
| 0 | own register, 1 cycle old (`j2 > 0`) | own registers, 2 cycles old (`j1 > 0`) |
| 1 | west neighbour (`j2 = 0`, `p2 > 0`) | north neighbour (`j1 = 0`, `p1 > 0`) |
| 2 | own delay line, 4 cycles old (`j2 = p2 = 0`, `l2 > 0`) | own delay line, 8 cycles old (`j1 = p1 = 0`, `l1 > 0`) |
| 3 | memory A `[2p1+j1+4l1][l3]` (otherwise) | memory B `[l3][2p2+j2+4l2]` (otherwise) |

So each operand is fetched from memory once per GS row or column. It is then
reused inside the LS tile, passed on to the neighbour and, in border PEs, kept
for the next GS tile. Only PEs in column 0 have the memory-A port and the
4-deep line. Only PEs in row 0 have the memory-B port and the 8-deep line.
These are the four *PE types*. The `pe` module builds only what its type needs,
selected by its `P1`, `P2` parameters.

### The control path

* `copart_counter` produces `J` and `L` for PE(0,0). Because every tile takes as
  many cycles as it has points, the scan never stalls. The counter is therefore
  a plain carry chain: `j2` is the innermost digit, then `j1`, `l2`, `l1`, `l3`.
* `global_ctrl` evaluates `j2 > 0`, `j1 > 0`, `l3 > 0` and `l3 = 7`. These
  conditions contain no processor index.
* The bundle `{en, J, L, global signals}` (`ctrl_t`) enters PE(0,0). It reaches
  the other PEs through one register per hop (`ctrl_prop_reg`). PEs in column 0
  take it from the north, all others from the west.
  - This is the propagation choice that gives every PE the smallest delay from
    an earlier-starting neighbour.
  - PE(1,1) has a tie between its two neighbours. It is broken by taking the
    bundle from PE(1,0).
  - The delay per hop is one cycle, equal to the one-step start offset between
    neighbours. The bundle therefore arrives exactly in step with the PE's
    schedule.
* `local_ctrl` in each PE evaluates the conditions that involve `p`, such as
  `j2 + p2 = 0` or `j2 + p2 + l2 > 0`. It ANDs them with the global signals and
  encodes the four mutually exclusive cases into a 2-bit select (`sel_e`). The
  processor index is a parameter, so most terms fold to constants.
  - An assertion checks that exactly one case holds whenever the PE is enabled.
* The propagated `en` bit also gates every register in the PE, so a PE is idle
  outside its 128-cycle window.

### Memories and address generators

`matrix_mem` holds one matrix: 64 words, one write port and one asynchronous
read port per border PE. Each `addr_gen` turns the counter values seen by its
border PE into `row * 8 + col`. The address is therefore aligned with that PE's
schedule without extra delay.

### Interface and timing (`mm_array`, `mm_*` on the top)

1. Write A and B through `a_we/a_waddr/a_wdata` and `b_we/b_waddr/b_wdata`.
   Element `(r, c)` goes to address `r*8 + c`.
2. Pulse `start` for one clock while `busy` is low.
3. Read the results.
   - Time step `t` is the clock period that begins `t - 1` cycles after the
     edge that samples `start`.
   - Each element of C appears once, on the `c_valid / c_data / c_row / c_col`
     outputs of the PE that owns it.
   - It appears in the cycle of its `l3 = 7` step (times 113..130).
   - `done` pulses with the last point, at t = 130, and `busy` falls after it.

`c_data` is combinational from the PE's adder in that cycle. Register it if the
consumer is far away.

## 2. The tile counter with enable mechanism (`lsgp_counter`)

This counter scans one tile of 27 points whose schedule is `t = 3 j1 + 4 j2`
(schedule vector `(3 4)`).

The scan order is set by a skewed loop matrix `R = (-3 3; 3 6)`. A
lexicographic loop over `(j1, j2)` cannot produce that order. The
`scan_counter` therefore counts in a transformed, rectangular domain
`Y = T J` with `T = (-2 1; 1 1)`:

    for y2 = 0..8
      for y1 = (y2 mod 3) .. 8 step 3
        j1 = (y2 - y1) / 3
        j2 = (y1 + 2 y2) / 3

* The step of 3 is the lattice stride of `T`.
* The start value `y2 mod 3` skips the integer points of the rectangle that are
  not images of tile points.
* The divisions are exact. They are built as constant divisions, since `T` is
  fixed by parameters.

The tile takes 33 time steps for 27 points, so six steps (t = 3, 7, 14, 18, 25,
29) have nothing to execute. The enable mechanism handles them as follows:

* The `time_counter` counts `t = 0..32`.
* The conditional unit computes `s = 3 j1 + 4 j2`, the time at which the
  counter's current point is due.
* `enable` is `s == t`. Only then does the scan counter advance. In a stall step
  it waits on the next point, and `s > t`.
* At `t = 32` the `reset` output is high, and the next step restarts both
  counters.

`run` low holds the counter at the start of the tile. `DELTA` (the iteration
interval) stretches each time step over `DELTA` clocks.

## Parameters and sizes

All sizes of the array are in `rtl/mm_pkg.sv`:

| name | default | meaning |
|---|---|---|
| `N` | 8 | matrix size |
| `LS` | 2 | LS tile side |
| `PA` | 2 | array side |
| `DATA_W` | 16 | element width of A and B, unsigned |
| `ACC_W` | 35 | element width of C (2·16 bits plus 3 guard bits; cannot overflow) |

The schedule weights and delay-line depths are derived in the package.

* **Changing `N`:** `N = 8 * m` works without further changes, because the
  weights follow the same formulas. `N = 16` (a 16 x 16 product on the same
  2 x 2 array) has been simulated end to end with the top-level testbench,
  after raising its watchdog limit.
* **Changing `LS`, `PA` or the schedule:** these reshape the program and have
  not been simulated.
* **Tile counter:** its parameters (`LAM1`, `LAM2`, `T_TILE`, the scan bounds,
  the stride and the inverse transformation) describe the one example tile. A
  different tile needs new values derived from its loop matrix.

## Where this RTL makes its own choices

These points are not fixed by the method and were chosen here:

* data widths and unsigned arithmetic;
* the asynchronous active-low reset;
* the start/busy/done and memory-loading interfaces;
* the result row/column outputs;
* register-array memories with asynchronous reads;
* the link register between PEs placed at the sending PE's output;
* the `run` input of the tile counter;
* the counter holding after its last point.

Three points needed interpretation:

* **Lower bound of the scan loop.** The scan loop's lower bound is written as
  `y2 mod 3`. This is the smallest `y1 >= 0` on the lattice, and it yields the
  required point sequence.
* **`DELTA` greater than 1.** For `DELTA > 1` the time counter advances once
  per time step, not once per clock. Otherwise `s` and `t` would be in different
  units.
* **The global controller.** It is four combinational comparators. The method
  only requires that it evaluate these predicates once for the whole array.

Not modelled: the FPGA slice counts and clock rate reported for the method's
case study, which depend on the vendor flow.

## Files and simulation

`rtl/` contains one module or package per file:

* `mm_pkg`
* `copart_counter`, `global_ctrl`, `ctrl_prop_reg`, `local_ctrl`
* `pe`, `delay_line`, `matrix_mem`, `addr_gen`
* `mm_array`
* `scan_counter`, `time_counter`, `lsgp_counter`
* `ctrl_synth_top`

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`.

`tb_ctrl_synth_top` runs the whole top at default sizes:

* two complete matrix products, every result checked for value, owning PE and
  time step;
* the tile counter over two periods against its expected sequence;
* a count of how often each operand source, the accumulation, the stalls and
  the resets occurred.

To simulate, with the package read first:

    verilator --binary --timing --assert -Irtl -Itb rtl/mm_pkg.sv \
        tb/tb_ctrl_synth_top.sv --top-module tb_ctrl_synth_top -Mdir obj
    ./obj/Vtb_ctrl_synth_top

Replace the testbench name to run any other test. Every test finishes in well
under a second.
