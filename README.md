# Dual-edge deblocking filter for HEVC (H.265)

This is an HEVC in-loop deblocking filter for 8-bit 4:2:0 video. It works on
pictures cut into 16x16 units: 16x16 luma samples plus the matching 8x8 Cb
and 8x8 Cr. Each unit takes **45 clock cycles**, which is 720 cycles for a
64x64 largest coding unit (LCU). Units with no chroma edge of boundary
strength 2 take 37 cycles.

Three ideas get the cost down:

* **Two edges at a time.** Four edge filters work in parallel. Each one
  handles one 4-sample segment of an 8-sample edge. So one cycle filters two
  whole 8-sample edges, for example the upper and lower halves of the unit's
  left border.
* **Filter while reading.** Blocks arrive from external memory one 4x4 block
  (128 bits) per cycle, in column order. Vertical edges are filtered as soon as
  the blocks on both sides have arrived. No separate vertical pass is needed.
* **Transpose on the way into memory.** After vertical filtering, each block
  is stored transposed in a small internal memory. The memory has four
  dual-port RAMs, one per block row, each 4 x 128 bits. One read of all four
  RAMs at the same address then returns a full block column. That column holds
  both horizontal edges of an 8x8 column, already turned so that the same edge
  filters can work on it. No transpose buffer is needed.

The filtering follows the HEVC rules: boundary strength (BS), the beta and tC
tables, the on/off and strong/normal decision, the strong and normal luma
filters, and the chroma filter. The testbenches check every output sample
against an independent model of those rules.

## Edges of a unit

```
          x=0      x=8
           |        |
   y=0  ---+--H1----+--H2----      H1/H2: top border (against the unit above)
           |        |
           V1       V3             V1/V2: left border (against the unit on the left)
           |        |
   y=8  ---+--H3----+--H4----      H3/H4: y = 8 inside the unit
           |        |
           V2       V4             V3/V4: x = 8 inside the unit
           |        |
```

Each luma edge is 8 samples long. Each luma edge gets its own BS from the
host's edge information: one `dbf_bs_calc` per edge. The BS rules are:

| Condition | BS |
|---|---|
| Edge on the picture border (`frame_edge`) | 0 |
| Either side intra-coded | 2 |
| Either side has non-zero coefficients | 1 |
| A motion-vector component differs by 4 or more quarter samples | 1 |
| Otherwise | 0 |

`dbf_param_calc` turns the BS and the two QPs into beta and tC:

* luma uses QP = (QPp + QPq + 1) / 2;
* chroma maps that QP through the 4:2:0 chroma QP table;
* tC uses index QP + 2 when BS is 2.

The 8x8 chroma components have one vertical edge (V5 for Cb, V6 for Cr, at
x = 0) and one horizontal edge (H5/H6, at y = 0). Each is 8 chroma samples
long. The upper half takes the BS and QPs of V1 or H1, the lower half those of
V2 or H2. Chroma is filtered only where BS = 2. A unit where none of V1, V2,
H1 and H2 has BS 2 is in **skip mode**: its chroma is not written back.

## Data layout

Everything moves as 4x4 blocks of 128 bits. Sample (y, x) of a block sits in
bits `[8*(4*y+x) +: 8]`.

The block order within a unit is fixed. `rd_blk` and `wr_blk` carry the block
index:

```
 luma (block index)      Cb          Cr
  0  4  8 12            16 18       20 22
  1  5  9 13            17 19       21 23
  2  6 10 14
  3  7 11 15
```

Luma comes column by column. Block b lies in block column b/4, block row b%4.

**Buffers.** Eight 128-bit registers, P1..P4 and Q1..Q4, hold two block
columns: even columns go to Q, odd ones to P.

* Left border: when the first block of column 1 arrives, column 0 is complete
  in Q. V1/V2 are then filtered between Q and the left context (see below).
* Edge x = 8: when the first block of column 3 arrives, column 1 (in P) and
  column 2 (in Q) are both complete, and V3/V4 are filtered.

Each cycle that filters takes all four edge filters, one per block row. The
filtered blocks go transposed into the internal memory:

* RAM r holds block row r;
* the address is the block column.

Column 3 is never filtered vertically inside the unit, so it stays in P.

**Horizontal pass.** There are four cycles, one per block column k:

1. All four RAMs are read at address k. Column 3 comes from the P buffers
   instead.
2. Edge filter 0 works on H1/H2 (top context against block row 0).
3. Edge filter 1 works on H3/H4 (block row 1 against block row 2).
4. The column is written back on the same port.

Because the data is transposed, a horizontal edge looks to the filter exactly
like a vertical one.

**Chroma** reuses the same path:

* Cb column 0 goes to Q1,Q2 and column 1 to P1,P2; Cr uses Q3,Q4 and P3,P4.
* V5/V6 are filtered when the first Cr block of column 1 arrives.
* Chroma takes RAM addresses 0 and 1. Their luma has already been written out
  by then.
* The horizontal chroma pass takes two cycles.

## Cycle schedule

The luma write-out runs in parallel with the chroma read. This is why the RAMs
are dual-port: port A serves the filter passes and port B the write-out.

```
cycle   0      1 .............. 16   17..20   21 ............................ 36   37 ..... 44
        start  luma in (PH_LLD)       luma H   luma out, one block per cycle (lout) chroma out
               V1/V2 at 5             (PH_LH)  21..28 chroma in (PH_CLD), V5/V6     (PH_COUT)
               V3/V4 at 13                     29..30 chroma H (PH_CH)
                                               31..36 wait (PH_WAIT)
```

* Filtered unit: 1 + 16 + 4 + 16 + 8 = 45 cycles from the start cycle to the
  `done` cycle.
* Skip mode: the chroma write-out is dropped, giving 37 cycles.
* With input stalls: cycles = 21 + Sl + max(16, 10 + Sc) + (8 unless skipped)
  + the cycles with `dbf_en` low. Sl and Sc are the cycles without `in_valid`
  during the luma and chroma reads.
* The next unit may start in the cycle `done` is high, so units run back to
  back.

`dbf_control_unit` holds the schedule and sends one control word (`ctrl_t`)
per cycle to the filter unit. It asserts that:

* the luma block columns the chroma data overwrites have already left;
* the two write-outs never overlap.

## Neighbour context

Filtering the left and top borders of a unit needs the neighbouring samples.
This design keeps them itself:

* **Left context.** Four luma and four chroma block registers keep the
  previous unit's last block column. It is stored unfiltered, as it sits in
  the P buffers after the vertical pass.
* **Top context.** A line memory keeps the bottom block row of each unit
  column of the picture, after vertical filtering. That is 4 luma + 2 Cb +
  2 Cr blocks per column. It has `UNITS_W` entries, 512 by default, which
  covers pictures 8192 samples wide.

Units must therefore come in raster order along each picture row. For the
first unit of a row and the first unit row, the picture-border flag sets BS
to 0, so the stale context is never used.

Neighbour-side samples are used for the decisions and filtered, but **not
written back**. Each unit writes only its own 24 blocks. The up to three
samples on the far side of the left and top borders therefore keep the values
they had when their own unit was written out. The reference model in the
testbenches follows the same rule, so the checks are exact for this design.
Against a full HEVC decoder, however, pixels next to unit borders with an
active filter differ. This is the main limitation of the design; see the last
section.

## Interface (`dbf_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `dbf_en` | in | 1 | enable. Low freezes the whole filter (power save); it resumes where it stopped |
| `start` | in | 1 | start a unit. Sampled when the filter is idle, or in the `done` cycle |
| `unit_x` | in | log2(UNITS_W) | unit column in the picture. Addresses the top context |
| `edge_info[8]` | in | `edge_info_t` | per edge V1..V4, H1..H4: `frame_edge`, `intra_p/q`, `coef_p/q`, the motion vectors of both sides (16-bit signed, quarter samples), `qp_p/q` (6 bits) |
| `in_data`, `in_valid` | in | 128, 1 | the block named by `rd_blk`, when `in_ready` is high |
| `in_ready`, `rd_blk` | out | 1, 5 | block request; a block is taken when `in_ready && in_valid` |
| `out_data`, `out_valid`, `wr_blk` | out | 128, 1, 5 | filtered block and its index. There is no back-pressure |
| `busy`, `done` | out | 1 | unit in progress; one-cycle pulse at the end |
| `filt_mode[4]`, `filt_used` | out | `fmode_e`, 4 | what each edge filter did this cycle (none / weak / strong / chroma), for status |

`edge_info` and `unit_x` are registered in the start cycle and held for the
whole unit. All data paths are combinational between registers. The edge
filters sit between the buffer/RAM read and the write of the same cycle. The
shared types (`blk_t`, `edge_info_t`, `ctrl_t`, the phase and mode enums) live
in `dbf_pkg`.

## Modules

| Module | Role |
|---|---|
| `dbf_top` | control unit + 8 BS calculators + filter unit; chroma skip decision |
| `dbf_control_unit` | cycle schedule, block request/write handshakes, enable freeze |
| `dbf_bs_calc` | BS 0/1/2 of one edge |
| `dbf_param_calc` | beta and tC from BS and QPs (luma or chroma), table lookups |
| `dbf_filter_unit` | buffers, internal memory, 4 edge filters, 12 parameter calculators, neighbour context, step decoding |
| `dbf_edge_filter` | one 4-sample segment: decision + 4 strong + 4 normal filters + chroma path |
| `dbf_filter_decision` | on/off, strong/normal, and the dEp/dEq side flags from lines 0 and 3 |
| `dbf_strong_filter` | strong luma filter for one line, with shared partial sums, clipped to ±2tC |
| `dbf_weak_filter` | normal luma filter (and the chroma filter) for one line |
| `dbf_buffers` | P1..P4, Q1..Q4 |
| `dbf_int_mem`, `dbf_dp_ram` | four 4 x 128-bit dual-port RAMs, asynchronous read, synchronous write |

Each file opens with a comment on its function, interface and timing.

## Verification

Every module has a self-checking testbench in `tb/`. It prints a
`TB_RESULT checks=N failures=M` line and has a watchdog.

`tb/dbf_ref_pkg.sv` is a reference model written from the HEVC equations. It
shares no code with the RTL and has its own literal beta, tC and chroma QP
tables. The unit-level testbenches do the following:

* `tb_dbf_param_calc` runs every BS/QP combination.
* The filter testbenches compare random segments with the model.
* `tb_dbf_control_unit` checks:
  * the cycle formula above on 40 units with random stalls, pauses and skip
    modes;
  * the block order;
  * the overlap;
  * that a start is ignored while the filter is disabled.

Three testbenches run whole pictures through `dbf_top` and compare every
written block with the model. The model keeps the same context rules as the
design.

| Testbench | Picture | What it adds |
|---|---|---|
| `tb_dbf_top` | 4 x 3 units | Random stalls and enable pauses, checked cycle count per unit. Counts each mechanism (strong, normal, chroma, unfiltered, skip mode, stall, pause, BS 0/1/2, read/write overlap) and fails if one never occurs. Uses the default parameters. |
| `tb_dbf_lcu` | 5 x 5 units | Back to back with no stalls. The 16 units of rows and columns 1..4 form an LCU away from the border; they must take exactly 720 cycles. The whole picture takes 24 x 45 + 37 cycles, because the corner unit lies on two picture borders and is in skip mode. |
| `tb_dbf_8k_strip` | 512 x 2 units | A strip of an 8192-wide picture, using the full line memory. |

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dbf_pkg.sv tb/dbf_ref_pkg.sv tb/tb_dbf_top.sv --top-module tb_dbf_top
./obj_dir/Vtb_dbf_top
```

Substitute any other testbench name. The block testbenches need only the
package files and their block. The picture sizes, stall and pause rates are
`localparam`s at the top of each picture testbench.

## Throughput

At 45 cycles per unit, an LCU takes 720 cycles:

| Clock | LCU rate | Throughput |
|---|---|---|
| 333 MHz | 463 k LCU/s | about 56 pictures/s at 8192 x 4096 |
| 200 MHz | 278 k LCU/s | about 137 pictures/s at 3840 x 2160 |

The line memory is the only part that grows with the picture width. It holds
`UNITS_W` x 8 blocks, 64 KiB at the default 512.

## Where this design departs from the original architecture

* **Unit order.** The source architecture walks the sixteen 16x16 units inside
  each 64x64 LCU. This design takes units in raster order along the whole
  picture row, so that the left neighbour is always the previous unit and one
  line memory serves the top neighbour. The source does not say how
  neighbours are kept. The context registers and line memory are this
  design's own.
* **Neighbour-side samples** are not written back (see above). A
  standard-exact filter would need write-back of the left column and the top
  row of the neighbours, or an order that delays their output.
* **Skip mode** takes 37 cycles, not 35. The chroma blocks are still read and
  passed through, so that the chroma context stays current; only their
  write-out is skipped.
* **Pipeline stages.** The source names five stages: memory read, parameter
  calculation, decision, filtering and memory write. Here the parameters come
  from registered inputs once per unit. Decision and filtering are one
  combinational step between reads and writes, not separate register stages.
  The cycle count is the same; the reachable clock rate is likely lower.
* **Edge information** (`edge_info_t`) and the handshakes with external
  memory are this design's own. The source shows only "control signals" to
  and from external memory.
* The BS motion-vector test uses one motion vector per side and compares each
  component. Reference-picture differences are not modelled.
