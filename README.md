# Linear-array matrix multiplication with low data movement

This RTL multiplies two n x n matrices on a one-dimensional chain of
processing elements (PEs). The aim is to save energy by moving data as little
as possible. PE_j owns column j of the result. Every element of A and B
enters the chain once and passes through each PE exactly once. Every partial
sum stays in a small local memory next to the MAC that produces it, and
leaves the chip only once, when it is final. There is no two-dimensional
mesh and no partial sums travelling between PEs. There are only three
streams: A and B moving to the right and finished C moving to the left.

Two designs of the same family are included:

* **Block design (single MAC per PE).** NB PEs each hold one MAC. They
  multiply NB x NB blocks. A larger matrix, n = rb * NB, is multiplied as
  rb^3 block products that run back to back without gaps. A, B and C sit in
  on-chip block memories. This is the main configuration: NB = 12 and up to
  48 x 48.
* **Wide-PE design (r^2 MACs per PE).** NB PEs each hold R x R MACs and are
  fed by 3R streams (R for A, R for B, R for C). These are I/O ports in the
  off-chip form and banked on-chip memories in the on-chip form. An n = R * NB product finishes in
  about R * NB^2 cycles instead of R^3 * NB^2. Register count stays low
  because MACs in the same row share an A register and MACs in the same
  column share a B register set. The default is R = 4 and NB = 4, which
  gives 16 x 16 with 64 MACs.

Arithmetic is 8-bit two's-complement inputs and 16-bit results. Sums wrap
modulo 2^16 and there is no saturation.

## 1. The single-MAC PE and its dataflow

Each PE has these registers and memories:

* **A**: one element of A, passed on to the next PE after one cycle.
* **BU**: one element of B, passed on after one cycle.
* **BM and BL**: two copies of the element b_kj that this PE needs.
* **A MAC**.
* **Cbuf**: NB words that hold the running sums c'_ij for i = 1..NB.
* **CObuf**: NB words used to pass finished results from the right
  neighbour to the left.

B enters row by row, one element per cycle. A enters column by column, also
one per cycle, exactly NB cycles behind B. With PE-to-PE register delays,
element b_kj reaches PE_j in cycle (k-1)NB + 2j - 1 and a_ik reaches it in
cycle k*NB + i + j - 1. So when column k of A streams past PE_j, that PE
already holds b_kj. It then computes c'_ij += a_ik * b_kj for i = 1..NB, one
per cycle, at Cbuf address i.

**Why two B copies.** While column k of A is still streaming past PE_j
(using b_kj), row k+1 of B is already streaming past. PE_j must capture
b_(k+1)j before it has finished with b_kj. BM and BL therefore alternate:
even rows of B go into one and odd rows into the other. A select signal
tells the multiplier which copy belongs to the A column now passing. This
is the single trick that lets A and B stream continuously.

### Pipeline

Cycle t is the cycle in which words sit on a PE's inputs.

| Cycle | What happens |
|-------|--------------|
| t     | A <= a_in, BU <= b_in, and BM or BL <= b_in when the row-toggle signal changes |
| t+1   | Mult stage: product of A and the selected B copy, registered |
| t+2   | Acc stage: `sum = (flush ? 0 : Cbuf[i]) + product`, written back to Cbuf[i]; C_out is driven |

Cbuf and CObuf are written synchronously and read asynchronously. With that,
Cbuf[i] is read and written in the same cycle, and the next access to the
same address comes NB cycles later. There is no read-after-write hazard for
any NB >= 1, including block sizes 1 and 2.

### Getting results out: the CObuf delay line

When the last column of A has passed PE_j, the NB sums leaving its Acc stage
are the final column j of C, one per cycle. PE_j sends these straight to
C_out (out_mux = 1). At other times C_out carries the CObuf output.

CObuf is a circular NB-word buffer. It is written from C_in every cycle and
read NB-1 cycles later. PE_(j+1) starts its final column one cycle after PE_j
and sends it on C_in. PE_j finishes its own column NB-1 cycles after that.
The delay line holds PE_(j+1)'s column until then, and then releases it
immediately after PE_j's own. By induction, PE_1's C_out carries C in
column-major order: c_11, c_21, ..., c_NB,1, c_12, and so on. That is NB^2
consecutive words with no gaps.

The Cbuf is free again as soon as the final column has left. CObuf is only a
delay line, so the next block product can start accumulating while the
previous result is still draining to the left.

## 2. Control signals and their travel along the array

A central controller (`mm_ctrl`) drives six control signals into PE_1.
Each PE registers them and passes them to the next PE. They are bundled in
the packed struct `mm_pkg::ctrl_t`:

| Field | Meaning |
|-------|---------|
| `reg_load`    | Level that toggles once per B row. A PE loads b_in into BM when it becomes 0 and into BL when it becomes 1. Delayed **two** cycles per PE, because B advances one PE every cycle while each PE must catch the element one further along. |
| `mux_to_mult` | Chooses BL (1) or BM (0) for the multiplier. Follows `reg_load` one row later. |
| `mult_ce`     | The A word is valid: multiply it and advance the Cbuf row counter. |
| `ram_we`      | Write the sum back to Cbuf. |
| `flush`       | Start from 0 instead of Cbuf[i]. Set on the first A column of a new result block. |
| `out_mux`     | Send the sum to C_out instead of the CObuf word. Set on the last A column of a result block. |

All fields except `reg_load` are delayed one cycle per PE, matching the
one-cycle skew of A. Cbuf and CObuf addresses are generated inside each PE
from `mult_ce` and a free-running pointer. No address travels along the
array.

## 3. Block sequencing (controller)

For n = rb * NB, the controller runs rb^3 products C_xy += A_xk * B_ky. The
loops are nested x (outer), then y, then k (inner). The rb products that
build one C block therefore follow each other directly:

* k = 1 runs with `flush`, so the products accumulate from 0 in Cbuf.
* k = rb runs with `out_mux`, so that block leaves on C_out.

Time is divided into slots of NB cycles. In each slot the controller requests
one B row. One slot later it requests the matching A column. The product of
the next block pair starts in the very next slot. The last A column of one
product therefore overlaps the first B row of the next, and the array never
idles. The BM/BL toggle simply continues across product boundaries.

The controller requests A and B words and expects them one cycle later. That
is the read latency of the block memories (`mm_bsram`). The control word is
registered so that it reaches PE_1 together with the data. `c_valid`,
`c_row` and `c_col` name each word on the array's output. The first word of
a C block appears three cycles after the controller requests the first A
word of that block's final product.

**Latency of one job** (start sampled in cycle 0, done in the cycle of the
last result): **rb^3 * NB^2 + NB^2 + 3** cycles. The terms are:

* rb^3 * NB^2: the B rows and A columns of all products.
* NB^2: the last C block draining.
* 3: pipeline stages.

With the defaults:

| Matrix size | rb | Cycles |
|-------------|----|--------|
| 12 x 12     | 1  | 291    |
| 24 x 24     | 2  | 1299   |
| 48 x 48     | 4  | 9363   |

## 4. The on-chip top (`mm_top`)

`mm_top` holds three memories, each addressed row * N_MAX + col with
N_MAX = NB * RB_MAX:

* the A memory (8-bit words);
* the B memory (8-bit words);
* the C memory (16-bit words).

It also holds `mm_core` (controller plus array). A host does the following:

1. Loads A and B through `host_we`, `host_sel` (0 = A, 1 = B),
   `host_row`/`host_col` and `host_wdata`.
2. Pulses `start` with `rb` (1..RB_MAX). The top-left n x n corner is
   multiplied.
3. Waits for `done`. C is written into the C memory as it leaves the array.
4. Reads C through `host_c_re`/`host_c_row`/`host_c_col`. The word appears
   on `host_c_rdata` one cycle later.

`busy` is high while a job runs, and `start` is ignored while busy.

Beside it sits the on-chip wide-PE design (`thm2_onchip`, section 5). It is
used the same way through its own ports: `t2_host_*` for load and read-back,
and `t2_start`/`t2_busy`/`t2_done` for the job. The two designs share only
clock and reset.

## 5. The wide-PE design (R^2 MACs per PE)

The matrices are cut into R x R blocks of NB x NB, so n = R * NB. A job has
R stages, k = 1..R. In stage k:

* A port x carries block A_xk, column-major.
* B port y carries block B_ky, row-major.
* MAC_xy in PE_j multiplies A_xk by B_ky exactly as the single-MAC PE does,
  and accumulates column j of C_xy in its own Cbuf_xy.

All ports run in lock step. One controller (`thm2_ctrl`) generates a single
row/column index that every port uses, plus the same six control signals as
before. Stages follow each other without a gap. Computation takes
R * NB^2 + 2 * NB cycles.

**Register sharing.** PE_j holds one A register per A port, shared by the R
MACs of that row. It holds one BU/BM/BL set per B port, shared by the R MACs
of that column. That is 4R registers for R^2 MACs.

**The output problem, which is the hardest part.** At the end of stage R,
all R^2 MACs of PE_j finish their columns in the same NB cycles. There are
only R output ports. Port y carries, in this order, C_1y, C_2y, ..., C_Ry.
Each is a full NB^2-word block, column-major, so one port delivers R * NB^2
words. In PE_j:

* Column j of C_1y leaves directly from MAC_1y (out_mux), as in the single-MAC
  design.
* Column j of C_xy, for x >= 2, is written into a **hold buffer**, HOLD_xy,
  at the same time. It is sent (x-1) * NB^2 cycles later, in the slot where
  column j of block C_xy belongs in the port's stream.
* In all other cycles the port forwards, through the NB-word delay line
  CObuf_y, what PE_(j+1) sends on the same port. This is the same mechanism
  as in section 1.

A small sequencer inside each PE, started by the rising edge of `out_mux`,
counts through the R segments of NB^2 cycles. It switches port y to HOLD_xy
during the first NB cycles of segment x. Each PE therefore has:

* R^2 Cbufs;
* R delay lines;
* R(R-1) hold buffers.

That makes 2R^2 small memories of NB words each. The Cbufs are free again as
soon as stage R's last column has been read. The next job could reuse them
while the hold buffers drain. The controller here nevertheless waits for the
outputs to drain before accepting a new job, to keep the sequencing simple.

**Latency of one job: 2 * R * NB^2 + 3 cycles.** The last A column of stage
R starts to enter at cycle R * NB^2. The first result leaves 3 cycles later,
and the R * NB^2 result words per port follow without a gap. For the default 16 x 16
with R = 4, this is 131 cycles. NB must be at least 2.

### Feeding 3R streams from on-chip memory

`thm2_core` is the off-chip form of this design. Each cycle it requests one
word per A port and one per B port, and it expects the answers in the next
cycle. `thm2_onchip` wraps it with memories that meet this. A single memory
port cannot deliver R words per cycle, so each matrix is split into R banks
of NB * n words:

* A bank x holds block row x of A.
* B bank y holds block column y of B.
* C bank y holds block column y of C.

In every cycle of a job, A port x reads only bank x, B port y reads only bank
y, and C port y writes only bank y. No bank is ever asked for two words at
once.

The host writes A and B element by element; the bank is picked from the
row (A) or the column (B). It reads C back the same way, and a registered
bank index selects the right bank output. `done` comes one cycle after the
core's last result, when the last C word has been written. A job therefore
takes **2 * R * NB^2 + 4** cycles, or 132 at the defaults.

## 6. Where this RTL departs from the source design

* **Memories** are plain SystemVerilog arrays (`mm_bsram`: synchronous read;
  `mm_lmem`: asynchronous read). They are not vendor block-RAM or
  distributed-RAM primitives. Each matrix has its own memory; the source
  design does not fix a layout. A and B are stored as 8-bit words, C as
  16-bit words.
* **Memory binding** is left to synthesis. The asynchronous-read local
  memories map naturally to distributed RAM. The source design moves a
  local memory into block RAM when it has more than 64 entries; that needs a
  synchronous read and one more pipeline stage before the adder.
* **The pipeline** is three stages (register, multiply, accumulate and
  write). The source design has separate multiplexer, memory-write and
  memory-read stages. It reports a data hazard for block sizes <= 2, which
  cannot occur here because Cbuf is read asynchronously.
* **CObuf** is an NB-word circular delay line, chosen so that results leave
  in one gap-free column-major stream.
* **Latency.** Consecutive block products overlap, so a job takes
  rb^3 * NB^2 + NB^2 + 3 cycles including the drain of C. The source design
  quotes rn^2 + 2r^2n cycles for the same work (n = rb * NB, r = rb). That
  figure allows 2NB cycles of fill per block product; this design needs no
  such fill because the products overlap.
* **Block order** (x, y, k with k innermost) and accumulation across k
  inside Cbuf are choices of this design. The number of blocks per
  dimension, rb, is a run-time input, so one build runs 12 x 12, 24 x 24 and
  48 x 48 with NB = 12.
* **Wide-PE output order.** The source design's example for R = 2 parks
  the second row of result blocks in output buffers, and this design
  generalises that idea to any R. The example's exact alternation of
  buffers is not reproduced.
* **Banked memories** for the on-chip wide-PE design (R banks per matrix)
  are this design's own. The source design only counts the memories.
* **Host interface** for loading A and B and reading C, job `start`/`done`,
  and the request/one-cycle-answer memory interface are additions. The
  source design does not specify them.
* **Reset** is synchronous and active high. It resets control and pipeline
  registers but not memory contents.
* **Out of scope.** Energy, power and area models and the comparison
  baselines are not part of the RTL.

## 7. Parameters

| Module | Parameter | Default | Meaning |
|--------|-----------|---------|---------|
| `mm_top`, `mm_core`, `mm_ctrl` | `NB` | 12 | PEs = block size |
| `mm_top`, `mm_core`, `mm_ctrl` | `RB_MAX` | 4 | largest blocks per dimension (n up to NB * RB_MAX) |
| `mm_top` | `T2_NB`, `T2_R` | 4, 4 | wide-PE design: PEs (block size) and R |
| `thm2_*` | `NB`, `R` | 4, 4 | same, inside the wide-PE blocks |

Widths are set in `mm_pkg` (`DW = 8`, `CW = 16`). Changing them changes
every block.

## 8. Files

| File | Content |
|------|---------|
| `rtl/mm_pkg.sv` | widths, data types, control-word struct |
| `rtl/mm_mac.sv` | multiplier with registered product and accumulate adder |
| `rtl/mm_lmem.sv` | small PE-local memory (Cbuf, CObuf, hold buffers) |
| `rtl/mm_pe.sv` | single-MAC PE |
| `rtl/mm_array.sv` | chain of NB single-MAC PEs |
| `rtl/mm_ctrl.sv` | block sequencer, control signals, address generator |
| `rtl/mm_core.sv` | controller plus array, memory-request interface |
| `rtl/mm_bsram.sv` | on-chip matrix memory |
| `rtl/thm2_pe.sv` | R^2-MAC PE with hold buffers and output sequencer |
| `rtl/thm2_array.sv` | chain of NB wide PEs |
| `rtl/thm2_ctrl.sv` | wide-PE controller |
| `rtl/thm2_core.sv` | wide-PE controller plus array, 3R ports (off-chip form) |
| `rtl/thm2_onchip.sv` | wide-PE design with banked on-chip memories and host ports |
| `rtl/mm_top.sv` | top: on-chip block design plus wide-PE design |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_mm_top.sv` | end-to-end test at small sizes; counts every mechanism (BM and BL loads, flush, accumulation across k, direct and CObuf-forwarded output, output overlapping the next product, hold-buffer output) |
| `tb/tb_mm_top_full.sv` | end-to-end test of the top at its default parameters (48 x 48, 24 x 24, 12 x 12, two 16 x 16 jobs of the on-chip wide-PE design) |
| `tb/tb_workloads.sv`, `tb/wl_core_run.sv`, `tb/wl_thm2_run.sv` | the evaluated sizes: block design with NB = 3 (50 random pairs of 3 x 3 matrices), 6, 12, 15 and n up to 48; wide-PE design with (NB, R) = (2,3), (2,4), (2,6), (3,4), (4,3), (2,8), (4,4) |

Every testbench compares against a product computed in the testbench itself
from random matrices. It checks the cycle count against the latency formulas
above, prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a
watchdog.

## 9. Simulating with Verilator

With Verilator 5, from the directory that holds `rtl/` and `tb/` (for
example, the full-size test):

```sh
verilator --binary --timing --assert -Wno-fatal \
  rtl/mm_pkg.sv rtl/mm_lmem.sv rtl/mm_mac.sv rtl/mm_pe.sv rtl/mm_array.sv \
  rtl/mm_ctrl.sv rtl/mm_core.sv rtl/mm_bsram.sv \
  rtl/thm2_pe.sv rtl/thm2_array.sv rtl/thm2_ctrl.sv rtl/thm2_core.sv rtl/thm2_onchip.sv \
  rtl/mm_top.sv tb/tb_mm_top_full.sv --top-module tb_mm_top_full -o sim
./obj_dir/sim
```

For another test, replace the last file and `--top-module`. `tb_workloads`
also needs `tb/wl_core_run.sv` and `tb/wl_thm2_run.sv`. A test passes when
it prints `failures=0`. The full-size test finishes in a few seconds. To try
another size, change the parameters on the instance in a testbench (for
example `mm_top #(.NB(6), .RB_MAX(2))`). Keep NB >= 2 for the wide-PE
design.

The only lint warnings expected are unused bits of the PEs' Acc-stage control
word: `reg_load`, `mux_to_mult` and `mult_ce` are used one stage earlier, and
only the remaining fields matter in that stage.
