# Multithreaded sparse matrix–vector multiply (MT-FPGA SpMV) in SystemVerilog

Sparse matrix–vector multiplication (`out = A · vec`, with `A` in compressed
sparse row form) has no useful locality: every non-zero needs a read of
`vec[col]` at an address that only becomes known when the column index
arrives from memory. Caches do not help with this access pattern. This
design hides memory latency instead. Each matrix row is a *thread*. A
processing element (PE) issues the reads of one row, then takes the next row
without waiting for any data. Hundreds of reads from many rows are in
flight at once. Read data return in request order, so plain FIFOs put them
back together.

The accelerator is organised after the MT-FPGA SpMV kernel built for a
four-FPGA co-processor board (Convey HC-2ex class). Each FPGA is an
*application engine* (AE) with sixteen 8-byte memory channels at 150 MHz:

* **Five PEs per AE.** Each PE needs three channels: column indices,
  values, and vector elements.
* **One thread management unit (TMU) per AE.** It uses the sixteenth
  channel for the row pointers and for writing the results.
* **Four AEs** make 20 PEs and 64 channels, the design's main
  configuration.

The number of memory channels, not logic, limits how many PEs fit.

```
                  +------------------------- one AE (mtfpga_ae) -------------------------+
 host regs ---> ae_ctrl --job/start--> tmu --threads--> spmv_pe x5 --results--> tmu      |
                  |                    | ch15: row_ptr reads + out writes               |
                  |                    |            PE p: ch 3p col, 3p+1 val, 3p+2 vec  |
                  +----------------------------------------------------------------------+
 mtfpga_hc2ex = 4 x mtfpga_ae, side by side (one per FPGA)
```

## Data in memory

All arrays sit in the memory that every channel can reach. Addresses are
48-bit byte addresses, and each request moves one 8-byte word.

| array     | element                  | entries      |
|-----------|--------------------------|--------------|
| `row_ptr` | 32-bit index, two per word | rows + 1   |
| `col`     | 32-bit index, two per word | non-zeros  |
| `val`     | IEEE-754 double          | non-zeros    |
| `vec`     | IEEE-754 double          | columns      |
| `out`     | IEEE-754 double          | rows         |

Row `r` covers non-zeros `row_ptr[r] .. row_ptr[r+1]-1`. A 32-bit index is
read as the whole aligned word. The PE or TMU then picks the half from
address bit 2.

## Life of a thread

1. **Row pointers (TMU).** After start, the TMU reads `row_ptr[0..length]`,
   one read per entry. Reads return in order, so the i-th word to come back
   holds entry i. Each pair of neighbouring entries becomes a thread
   `(row, start, stop)`.
2. **Back-loading (TMU).** Threads queue in the thread buffer (`THR_DEPTH`
   entries), so a free PE gets its next row at once. A row-pointer read is
   only issued if the buffer has room for the thread it will create. The
   buffer must therefore cover the memory latency. With 16 entries and
   ~100-cycle memory, short rows ran at well under half speed. Hence 128.
3. **Dispatch (TMU).** The buffer head goes to a PE whose `busy` is low. The
   search is round robin from the PE served last, and at most one thread is
   handed out per cycle.
4. **Requests (PE, `pe_req_gen`).**
   * The PE raises `busy` and spends one cycle loading its counter.
   * It then issues one `col[b]` read and one `val[b]` read per cycle, for
     every non-zero `b` of the row.
   * `busy` drops right after the last pair is issued, while all of the
     row's data are still outstanding. This lets a PE run many rows at once.
     It also balances work: a long row keeps one PE busy while the others
     take many short rows.
5. **Data FIFOs (PE).**
   * Column words go into the column FIFO. Each one is turned into a read of
     `vec[col]`.
   * Values go into the value FIFO, and vector elements into the vector FIFO.
   * The thread id (row index) and a last-of-row flag of every element wait
     in the tag FIFO.
   * All channels return data in order, so the heads of the value, vector
     and tag FIFOs always belong to the same element.
6. **Multiply and sum (PE).** When a value and its vector element are both
   present, they are multiplied (`fp64_mul`). The product and its tag enter
   the summation unit (`sum_unit`), which emits `(row, sum)` when the row is
   complete.
7. **Output (TMU).** Each PE has an output buffer in the TMU. A control unit
   (`tmu_chan_arb`) merges the output writes and the row-pointer reads onto
   the TMU channel. **Writes always win.** Without that priority, reads
   could fill the thread buffer while results had nowhere to go, and the
   kernel would deadlock. Results may be written out of row order.
8. **Done.** The TMU raises `done` when all `length` results have been
   accepted by the channel.

A row with no non-zeros makes no reads. Its PE returns 0.0 directly.

## The summation unit

This is the least obvious block. A double-precision add takes `ADD_LAT`
(8) cycles, yet the unit must take a new product every cycle, from rows of
any length, with several rows in flight. It relies on one property: the PE
delivers all products of a row before the next row begins. The unit has two
parts.

**Accumulation loop.** One pipelined adder has its output fed back to its
input, and every adder slot carries a row tag.

* When a product of the open row arrives and a partial sum of the same row
  leaves the adder in that cycle, the two are added.
* When a product arrives and no partial of its row is leaving, the product
  starts a new partial (it is added to +0).
* When a partial of the open row leaves and no product arrives, it goes
  round again with +0.

So a row never owns more than `ADD_LAT` partial sums. Once the row's last
product has entered, its partials are *drained*: each one leaves the loop
the next time it comes out of the adder. A row's partials all drain before
any partial of the next row, because the next row's partials are created
later and cannot close earlier.

**Counting partials.** Each row gets a small local sequence number. A table
indexed by it counts how many partials the row created and how many have
drained. This marks the last partial of each row. Sequence numbers wrap
after `4·ADD_LAT` rows, long after any row has drained.

**Merge tree.** `ceil(log2 ADD_LAT)` levels follow, each a pipelined adder.
Every level adds consecutive partials of the same row in pairs. An odd one
out, which is always the row's last, is added to +0. Each level halves the
number of partials per row, and after the last level every row has one
value.

Rows stay in order throughout. The unit never stalls, and it reaches full
rate whatever the row lengths. The additions are regrouped, so a row sum
can differ in its last bits from a left-to-right sum. Rows with more than
`ADD_LAT` non-zeros are split into `ADD_LAT` interleaved partial sums.

The original kernel used a reduction circuit from the literature with the
same properties: one element per cycle and several rows at once. Its
structure is not reproduced here; this unit is this design's own.

## Flow control and the memory channel contract

Every channel is a valid/ready request port (`mem_req_t`: `write`, `addr`,
`wdata`) plus a read-data port (`rsp_valid`, `rsp_data`):

* Read data come back one word per cycle, in request order, any number of
  cycles later.
* The read-data port cannot be stalled.
* A write returns nothing.

The kernel therefore never issues a read without reserved room for its
data:

* Column and value reads stop when `FIFO_DEPTH` of them are issued but not
  yet consumed. The tag FIFO and the column half-select FIFO hold exactly
  those elements.
* Vector reads are counted the same way against the vector FIFO.
* A PE holds a credit count of its TMU output buffer (`RES_DEPTH`). It
  spends a credit when a row's last product enters the multiplier, or when
  it answers an empty row. The TMU returns the credit (`pe_res_free`) when
  it writes the result.

Assertions in `spmv_pe`, `tmu` and `sync_fifo` check that no FIFO ever
overflows.

A vector read can only start after its column index has returned. A PE
therefore runs at full rate only while `FIFO_DEPTH` covers about two memory
round trips. The default of 256 is sized for round trips of up to about 120
cycles each.

## Host interface (per AE, `ae_ctrl`)

| addr | register            | notes                                  |
|------|---------------------|----------------------------------------|
| 0    | LENGTH              | rows (threads) in this AE's job        |
| 1    | ROW_BASE            | address of this AE's first `row_ptr` entry |
| 2–4  | COL/VAL/VEC_BASE    | array bases (row pointers are absolute) |
| 5    | OUT_BASE            | address of `out` for this AE's first row |
| 6    | CTRL / STATUS       | write bit 0 = start; read `{busy, done}` |

To split a matrix over the four AEs, give AE `a` the rows `[r0, r1)`:

* `LENGTH = r1 - r0`
* `ROW_BASE = row_ptr + 4·r0`
* `OUT_BASE = out + 8·r0`
* the other three bases unchanged

Thread ids inside an AE are then local row numbers. Start is ignored while
busy. Job registers must not be written while busy, and an assertion checks
this.

## Parameters

| parameter   | default | meaning | origin |
|-------------|---------|---------|--------|
| `NAE`       | 4       | application engines | platform |
| `NPE`       | 5       | PEs per AE (3 channels each + 1 TMU channel = 16) | original design |
| `FIFO_DEPTH`| 256     | entries of each PE data/tag FIFO | chosen |
| `THR_DEPTH` | 128     | TMU thread buffer | chosen |
| `RES_DEPTH` | 16      | TMU output buffer per PE | chosen |
| `MUL_LAT`   | 6       | multiplier pipeline stages | chosen |
| `ADD_LAT`   | 8       | adder pipeline stages | chosen |

The arithmetic units compute in one combinational block followed by `LAT`
register stages, so retiming can spread the logic over the stages.

The floating point follows IEEE-754 binary64, with these limits:

* round to nearest even;
* subnormal inputs and results read as zero;
* infinities propagate, and NaN results are the quiet NaN.

## What follows the original kernel, and what does not

These parts follow the original kernel:

* 5 PEs + 1 TMU per AE, replicated on 4 AEs;
* 3 channels per PE and 1 shared TMU channel;
* in-order read return used to pair data through FIFOs;
* thread id = row index, carried with the data;
* the busy flag dropping once the last request is issued;
* back-loaded threads and dynamic assignment to free PEs;
* output buffering in the TMU;
* writes winning the shared channel;
* control registers holding the row count and array bases;
* double-precision arithmetic.

These are this design's own:

* the summation unit's structure;
* all buffer depths and arithmetic latencies;
* the credit scheme;
* 32-bit indices packed two per word;
* the register map;
* round-robin dispatch and arbitration;
* answering empty rows with 0.0;
* a one-cycle thread start-up;
* issuing a row's column and value reads in the same cycle.

The platform's memory controllers, crossbar, host processor and vendor
interface wrapper are not part of this RTL. The kernel's ports are plain
request/response channels where that wrapper would connect.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/mem_model.sv` is a
behavioural model of the memory system (not synthesizable):

* a sparse shared memory;
* random ready and back-pressure per channel;
* read latency `LAT..LAT+JIT`, returned in order.

| testbench | what it shows |
|-----------|---------------|
| `tb_fp64_add`, `tb_fp64_mul` | 20,000 random and edge-case operations (for the multiplier, many exact rounding ties), bit-exact against the simulator's IEEE double arithmetic; exact latency |
| `tb_sync_fifo` | random push/pop against a queue model, including full |
| `tb_sum_unit` | 3,000 rows of 1–28 elements, back to back and with gaps; exact sums, order, up to 9 rows in flight |
| `tb_pe_req_gen` | addresses, tags, start-up cycle, busy timing, empty rows |
| `tb_spmv_pe` | one PE on a random matrix; thread overlap, empty rows, credit exhaustion, buffer-full stalls |
| `tb_tmu_chan_arb` | write priority and round robin against a reference model |
| `tb_tmu` | TMU with five stand-in PEs: thread order and ranges, every result written, back-loading, write-over-read conflicts, two jobs |
| `tb_ae_ctrl` | register read-back, start pulse, busy/done |
| `tb_mtfpga_ae` | one AE, two jobs through the registers, all 16 channels used |
| `tb_mtfpga_hc2ex` | whole accelerator at default size: random sparse, dense, and very short rows with a slow TMU channel; every mechanism above counted |
| `tb_dense_workload` | 2,000 × 2,000 dense matrix (4 M non-zeros) at default size |
| `tb_pe_scaling` | one AE with 1, 2, 3, 4 and 5 PEs side by side on a dense 100 × 1,000 matrix: rate per PE and growth with PE count |
| `tb_suite1_workload` | six matrices with the row and non-zero counts of a small benchmark suite (dw8192 … torso2), synthesised with random columns |

Matrix values are small integers times powers of two, so every sum is exact
in any order of addition. Results are compared for equality.

Measured in simulation, all at 150 MHz:

* **Dense 2,000 × 2,000:** 0.997 multiply-adds per PE per cycle, i.e.
  5.98 GFLOPS for 20 PEs. The memory model is ideal, fully ready with
  80–100 cycles of latency. On the real board the original kernel sustained
  about 75 % of peak; the testbench requires at least that.
* **PE scaling, dense 100 × 1,000 on one AE:** 0.97–0.995 multiply-adds
  per PE per cycle for every PE count from 1 to 5, so throughput grows
  linearly with the number of PEs.
* **Synthetic suite matrices** (memory 90 % ready, 80–120 cycles):
  2.6–4.7 GFLOPS. The rate falls with short rows, because each row costs
  two cycles of PE start-up and two TMU channel operations.

Real benchmark matrices were not simulated.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mtfpga_pkg.sv tb/tb_mtfpga_hc2ex.sv --top-module tb_mtfpga_hc2ex
./obj_dir/Vtb_mtfpga_hc2ex
```

The larger testbenches take a few seconds. Some testbenches look inside the
design through hierarchical names (mechanism counters), so renaming
internal signals means updating them.

## Limits and open points

* Arithmetic latencies are register stages after one combinational block.
  Timing closure at 150 MHz needs retiming, or hand-pipelined units in
  their place.
* FP corner cases are simplified: flush-to-zero and a single quiet NaN.
* The memory interface is generic. Adapting it to a real platform's
  memory-controller protocol needs a wrapper per channel.
* Results are written out of order, one 8-byte write per row. Writes are
  posted: `done` means the last write has been accepted, not that it has
  completed.
* Indices are 32-bit, so a job (per AE) is limited to 2³² rows and
  non-zeros.

## Files

* `rtl/mtfpga_pkg.sv` — shared types: memory request, thread, result,
  job.
* `rtl/fp64_add.sv`, `rtl/fp64_mul.sv` — pipelined double-precision units.
* `rtl/sync_fifo.sv` — FIFO used for every buffer.
* `rtl/sum_unit.sv` — summation unit.
* `rtl/pe_req_gen.sv`, `rtl/spmv_pe.sv` — the processing element.
* `rtl/tmu_chan_arb.sv`, `rtl/tmu.sv` — the thread management unit.
* `rtl/ae_ctrl.sv` — the AE control registers.
* `rtl/mtfpga_ae.sv` — one AE.
* `rtl/mtfpga_hc2ex.sv` — the top level, with four AEs.
* `tb/` — testbenches and the memory model.
