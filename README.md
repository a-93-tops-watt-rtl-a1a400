# Near-memory reconfigurable SAD accelerator

Motion estimation in a video encoder (HEVC, AV1, JEM) compares each coding
unit (CU) of the current frame against every candidate position in a search
area of a reference frame. It keeps the position with the smallest sum of
absolute differences (SAD), which gives the motion vector. This work moves
heavy data and uses little logic, so this design puts the SAD engine right
next to an 8 MB SRAM. The SRAM has one 32-byte port, so each cycle the engine
gets one 32-pixel column segment of the search area.

The engine is a grid of 8x8 processing elements (PEs). Each PE computes a
4x4 SAD. A reconfigurable fabric groups the PEs in one of two ways:

* **All-CU mode** (traditional rate-distortion optimisation, where every CU
  size is tried). The whole grid holds one 32x32 CU. For every candidate
  position it produces the SAD of the 32x32 CU, of its four 16x16
  sub-blocks and of its sixteen 8x8 sub-blocks. One pass over the search
  area yields 21 best matches.
* **Specific-CU mode** (modern RDO, where the CU size is decided in
  advance). The grid is split into several *logical cores*: four of 16x16
  or sixteen of 8x8. Each core holds a copy of the same CU, and cores look
  at different rows of the broadcast column. This evaluates several
  vertical positions of one CU in the same cycle.

The architecture (PE structure, 8x8 mesh, 2:1 bus selection, output
routing, adders and comparator chains, set/load/compute phases, 8 MB /
32 B-per-cycle memory) follows the paper *"A 93 TOPS/Watt Near-Memory
Reconfigurable SAD Accelerator for HEVC/AV1/JEM Encoding"*. The paper
describes that structure but not every wire. This RTL makes its own choices
for:

* the PE pairing and adder tree;
* how logical cores are mapped onto the buses;
* the pass schedule;
* memory banking, the result format and the host interface.

Each of these is described below and marked as such.

## Data movement: one column per cycle

The search area and the CU are stored column by column: a column's pixels
sit at consecutive byte addresses. Every compute cycle the controller reads
the 32-byte segment of column `x` that starts at row `y0`. The data buffer
cuts the segment into eight 4-byte buses. Bus `k` carries rows
`y0+4k .. y0+4k+3`. PE row `r` sits between bus `r` (above) and bus `r+1`
(below) and picks one of them. Row 7 has no bus below it, so it sees bus 7
on both inputs.

A *pass* streams columns `x = 0 .. W-1` at a fixed `y0`, back to back with
no bubbles. Horizontal positions need no extra work: a CU at position `x`
finishes when column `x+N-1` arrives. So a single pass produces every
horizontal position for the rows it covers. Passes differ only in `y0`.

The SRAM (`nm_sram`) is built from 32 one-byte banks. Byte address `A` is in
bank `A mod 32`, row `A / 32`. A 32-byte access at any byte address touches
each bank once, so a column segment can start at any row. This banking is
this design's own way of getting 32 B per cycle at arbitrary `y0`.

## The PE: a four-stage column pipeline

This is the part that makes the rest work. A PE (`sad_pe`) holds a 4x4 CU
block as four 4-pixel columns (128 flip-flops). The flip-flops are written
only in the load phase; `src_write` stands in for the clock gate. It has
four vector SAD units (`vector_sad_unit`) in a chain:

```
 bus (4 pixels, same column to all four units)
   |            |            |            |
 [|.-CU0|]    [|.-CU1|]    [|.-CU2|]    [|.-CU3|]
 P --(+)-reg---(+)-reg-------(+)-reg-------(+)-reg--> out
```

Every unit sees the *same* reference column in a given cycle. Unit `k`
compares that column with CU column `k` and adds the registered sum of
unit `k-1`. That sum was formed one cycle earlier, on the previous
reference column. So the output after cycle `n` is

    out(n) = P(n-3) + sum_k |CU_k - ref(n-3+k)|

which is the 4x4 SAD of the window whose last column is `ref(n)`. The
pipeline registers do the sliding: no reference buffer beyond the current
column is needed.

PEs extend this naturally. Feed a PE's output into the `P` input of the
next PE in the row, and the second PE's unit 0 adds the first PE's 4-column
sum one cycle later, on the next column. The pair is an 8-wide, 4-tall SAD
kernel. The PE's output demultiplexer can send the result to the PE to its
right, above or below, or to the adder/comparator fabric. Unselected
outputs are zero, so a receiver simply ORs its possible sources.

## Clustering and the adder tree

`compute_grid` wires the 64 PEs in a fixed pattern that all modes share.
This pattern is this design's choice; the paper only says that outputs are
routed to neighbours, adders or comparators.

1. **PE pairs.** In each row, the even PE feeds the odd PE ("adjacent"
   output). The odd PE's output goes to the fabric. Each pair gives an
   8x4 strip SAD.
2. **8x8 adders.** One registered adder per 2x2 PE group adds the two
   strips. Both strips see the same column in the same cycle, because they
   come from different buses. This gives 16 8x8 SADs, at cycle T+2 for a
   column on the bus at cycle T.
3. **16x16 adders.** Each adds four 8x8 sums. The right-hand 8x8 block of
   a 16-wide CU finishes 8 columns after the left-hand one, so the left
   operands pass through 8-stage delay lines (`delay_line`). Result at T+3.
4. **32x32 adder.** Same idea with 16-stage delay lines. Result at T+4.

The mode decides what the groups hold and which bus each PE takes:

| mode | CU | logical cores | bus choice | rows of the 32-row column seen by the cores |
|---|---|---|---|---|
| `MODE_ALL` | 32x32 | 1 (the whole grid) | all PEs take the bus above | 0 (every sub-block at its place in the CU) |
| `MODE_SPEC16` | 16x16 | 4 quadrants | right quadrants take the bus below | 0, 4, 16; the 4th (20) would need a ninth bus and never reports |
| `MODE_SPEC8` | 8x8 | 16 groups of 2x2 | odd core columns take the bus below | 0, 4, 8, ..., 24; the core at 28 is masked |

For specific-CU modes the data buffer copies the CU column during the load:
bus `k` carries CU chunk `k mod (N/4)`. Every core then loads its copy
through its own bus. With a 2:1 input multiplexer, cores in one row can
only be 4 rows apart, so in the 8x8 mode core columns 2 and 3 duplicate
columns 0 and 1. This costs nothing in correctness. It does mean the
specific-CU modes get less parallelism than the grid size suggests (see
*Performance* below).

Each SAD leaves the grid as a *candidate*: the SAD value plus the CU
position `(mvx, mvy)` it belongs to. The position is derived from a tag
(column index `x`, pass base `y0`) that travels with the data. A candidate
is valid only when its whole window lies inside one pass and inside the
search range `0..W-N`, `0..H-N`.

## Pass schedule

A column segment serves K windows spaced 4 rows apart (K = 1, 2, 7 for
CU sizes 32, 16, 8). The controller therefore visits base rows

    y0 = G*g + j,  j = 0..3,  G = 4K (4, 8, 28)

and stops when `y0 > H - N`. For example, the 8x8 mode covers rows 0..27
with passes at y0 = 0, 1, 2, 3. Windows that fall below the search area are
masked. Positions covered twice are harmless.

A job takes `2 + N + passes*W + 10 + R` cycles from `start` to `done`:
set (1 cycle), load (N columns), compute, drain (10), write-back (R = 21
or 1 words), done (1). In all-CU mode, load plus compute is exactly
`W*(H-31) + 32`. This matches the paper's per-CU formula P·(P−N+1)+N for a
square area.

## Comparators and results

* **Specific-CU modes.** Each row of logical cores has a comparator chain
  (`row_comparator`, registered, four 8x8 rows plus one 16x16 row). The
  final comparator (`final_comparator`) reduces the rows and keeps a
  running minimum (`min_tracker`) over the whole search.
* **All-CU mode.** Each of the 21 sub-block results has its own running
  minimum.
* **Ties.** On equal SADs the candidate found first is kept: lower row
  index, then earlier in time.

Results are written back to `res_addr + 32*i`, one 32-byte word each:

| bits | field |
|---|---|
| 31:0 | SAD |
| 47:32 | mvx (top-left x of the CU in the search area) |
| 63:48 | mvy |
| 64 | valid |

In all-CU mode, `i = 0..15` are the 8x8 blocks (row-major, block `(r,c)` at
`4r+c`), `16..19` the 16x16 blocks (row-major), and `20` the 32x32 CU.
Sub-block positions are the positions of the whole CU, so a sub-block's
motion vector ranges over the 32x32 CU's search range. In specific-CU modes
only `i = 0` is written; it is also on the `best` output.

## Top level: `nmc_subsystem`

`nmc_subsystem` = `sad_accelerator` + `nm_sram` (default `MEM_BYTES` = 8 MB).

* **Host memory port.** `host_req`, `host_we`, `host_addr` (23-bit byte
  address) and `host_wdata` (256-bit). `host_rdata` arrives one cycle after
  the request. While the accelerator is `busy` it owns the single SRAM
  port: `host_grant` is low and host accesses are dropped. This
  arbitration is this design's choice; the paper only draws a system bus.
* **Offload.** Pulse `start` with the job fields:
  * `job_mode`;
  * `job_cu_addr`, `job_cu_stride`: address of CU column 0 and the distance
    between columns;
  * `job_sa_addr`, `job_sa_stride`: the same for the search area;
  * `job_sa_w`, `job_sa_h`: search area size, at least N;
  * `job_res_addr`.

  `done` pulses once when the results are in memory.

Inside `sad_accelerator`: `sad_controller` (phases, addresses, schedule,
write-back), `data_buffer`, `compute_grid` (containing `sad_pe` ->
`vector_sad_unit`, and `delay_line`), `row_comparator`,
`final_comparator`, `min_tracker`. Shared types (`cand_t`, `cu_mode_e`,
`pe_out_e`, widths) are in `sad_pkg`.

Widths chosen here: 8-bit pixels, 32-bit SAD port, 10-bit coordinates
(search areas up to 1023x1023), 23-bit byte addresses.

## Performance against the published numbers

At 500 MHz, a 3840x2160 30 fps stream gives 243,000 32x32 LCUs per second,
a budget of 2057 cycles per LCU. Measured cycle counts (these are what
`tb_workloads` checks):

| workload | this RTL | published |
|---|---|---|
| one 32x32 CU, 60x60 area, all-CU mode | 1805 (within budget) | 1712 |
| one 16x16 CU, 60x60 area | 1469 | 496 (implied by the real-time table) |
| one 8x8 CU, 60x60 area | 501 | 128 (implied by the real-time table) |
| 32x32 CU, 36x36 area | 245 | 144 |
| 8x8 CU, 128x128 area | 2581 | 384 |

The all-CU mode meets the real-time budget. Its single run also delivers
every 16x16 and 8x8 minimum, but only over the 32x32 CU's positions.

The specific-CU modes are correct but much slower than published. Tiling a
32-row column with 4-row-aligned windows allows at most 5 distinct 16x16
windows or 7 distinct 8x8 windows per pass. With a 2:1 bus multiplexer,
this mapping uses 2 (16x16) and 7 (8x8) of them. The published counts
imply more vertical positions per pass than a 32-pixel column can hold, and
the paper does not explain how they are reached. So the LCU split
configurations 2 to 6 of the paper's real-time table exceed the 2057-cycle
budget here. The paper's own formulas also disagree: its comparison table
gives P·(P−N+1)+N (1772 for 60x60), while its real-time table's 1712 equals
P·(P−N)+N. This RTL follows the former.

Not modelled:

* power, area and the 22 nm implementation;
* the process SRAM macro (the memory is a synthesizable array per bank);
* 4x4 CUs;
* the host processor and the system bus protocol.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_nmc_subsystem \
    rtl/sad_pkg.sv tb/sad_ref_pkg.sv tb/tb_nmc_subsystem.sv -o sim
./obj_dir/sim
```

Replace the top module and file for another testbench. Files are found by
module name through `-Irtl -Itb`. `sad_ref_pkg` is a direct, loop-based
SAD reference used by the testbenches.

| testbench | what it shows |
|---|---|
| `tb_vector_sad_unit`, `tb_sad_pe` | column arithmetic, the 4-cycle sliding window, input mux and demux |
| `tb_compute_grid` | every candidate in all three modes against the reference, and that every position is reported |
| `tb_row_comparator`, `tb_final_comparator` | minimum, tie rule, clear |
| `tb_data_buffer`, `tb_nm_sram` | tag alignment, load replication, unaligned 32-byte access |
| `tb_sad_controller` | every address of the schedule, write-back packing, exact cycle count |
| `tb_sad_accelerator` | whole searches against brute force, with a simple memory model |
| `tb_nmc_subsystem` | end to end at full size through the host port: all modes back to back, multi-pass jobs, host access blocked while busy |
| `tb_workloads` | the evaluated search sizes (60x60, 36x36, 128x128) with cycle counts and the 4K budget |

## Changing it

* **Mode mapping.** Mode-dependent choices live in three places:
  * bus selection: `compute_grid`, the `fabric_set` block;
  * candidate positions: `compute_grid`, `make_cand` calls;
  * schedule step `G` and CU size: `sad_controller`.

  A new core mapping must change all three consistently. `tb_compute_grid`
  will show at once if a position is missed or a SAD is misattributed.
* **Widths and grid constants.** These are in `sad_pkg`. `GRID`, `PE_DIM`
  and the 32-byte word are tied together: the adder tree and delay lines
  assume 8x8 PEs of 4x4 pixels.
* **Memory size.** `nm_sram.SIZE_BYTES` / `nmc_subsystem.MEM_BYTES` can be
  reduced freely for faster simulation, as long as it stays a multiple of
  32.
