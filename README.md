# BWA-MEM seed-extension accelerator

BWA-MEM aligns short DNA reads to a reference genome in three stages:
find seeds (exact matches), extend each seed with a dynamic-programming
alignment, and pick the best result. Extension is the arithmetic-heavy
part, and it is the only part this hardware does. A host processor keeps
seeding and output generation. For each seed it sends a query (the read's
bases beyond the seed), a target (the reference window beyond the seed)
and the seed score. It gets back the best extended score and how far the
extension reached in each string.

The RTL follows the architecture published as "High-Performance
FPGA-Based BWA-MEM Accelerator" (Kieu-Do-Nguyen, Pham-Quoc, Pham). That
work gives the main ideas:

- a chain of processing units, one per query base, through which the
  target string flows;
- a three-step scoring loop (preparing, scoring, writeback);
- restarting the chain from nonzero initial scores when the query is
  longer than the chain;
- two queues and an event-driven protocol between host and FPGA.

It does not give the bit-level details: word formats, register map,
scoring constants, memory sizes, band width. Those are this design's own
choices and are marked as such below and in each file's header.

## The scoring recurrence

Each cell (row `j` = target base, column `c` = query base) holds three
scores. It uses the affine-gap recurrence of Smith-Waterman/Gotoh, with
first-gap cost `o+e`:

```
E[j][c] = max(H[j-1][c] - (o+e), E[j-1][c] - e)      gap, coming from above
F[j][c] = max(H[j][c-1] - (o+e), F[j][c-1] - e)      gap, coming from the left
H[j][c] = max(0, H[j-1][c-1] + s(Q[c],T[j]), E[j][c], F[j][c])
```

- `s` is +MATCH or -MISMATCH.
- Defaults: MATCH 1, MISMATCH 4, o 6, e 1. These are the usual BWA-MEM
  settings. The published design does not state its constants.
- Edges are seeded from the seed score `h0`: `H[-1][-1] = h0`, and
  `k+1` steps along either edge the score is `max(0, h0 - o - e*(k+1))`.
  `E` and `F` start at minus infinity.
- Cells with `|j - c| > BAND_W` (default 100) are outside the band. They
  are forced to `H = 0` with no open gap.

The result has four fields:

- `score`: the highest H, or `h0` if no cell beats it.
- `qle`, `tle`: how many query and target bases that best cell uses (0 =
  no extension).
- `gscore`: the score of the last cell, for a global (end-to-end) choice
  by the host.

On ties the lowest query column wins, then the lowest target row.

## How the matrix is swept

`pu` (processing unit) owns one query column. `pu_array` chains `N_PU` of
them (30 by default). The target enters at PU[0], one base every
`ROW_PERIOD` cycles (default 2). Each PU passes it on one cycle later. So
PU[i] works on row `j` one cycle after PU[i-1]: the matrix is swept as a
diagonal wavefront. Time grows with `|Q| + |T|` instead of `|Q| * |T|`.

A PU computes one cell in three pipeline steps:

| step | cycle | work |
|---|---|---|
| preparing | t   | substitution score from the two bases; take own H/E of the row above as candidates |
| scoring   | t+1 | `H1 = diag + s`, `E1 = H_up - (o+e)`, `E2 = E_up - e` |
| writeback | t+2 | `F1 = H_left - (o+e)`, `F2 = F_left - e`, `E = max`, `F = max`, `H = max(0, H1, E, F)`; update the column best |

The one-cycle skew means a PU never needs extra storage for its left
neighbour. It reads the neighbour's H register directly:

- While this PU scores (t+1), the neighbour is writing back the same row.
  Its H register still holds the previous row, which is this PU's
  diagonal cell.
- While this PU writes back (t+2), the neighbour's H and F registers have
  just taken the current row, which is this PU's left cell.

For this reason the F candidates are formed in writeback, not in scoring.

Rows are issued every 2 cycles, so writeback of row `j` overlaps with
preparing of row `j+1`. The new row's "row above" candidates come straight
from the writeback logic (forwarding). Each PU's three stages therefore
run in parallel on two rows.

`ROW_PERIOD = 3` also works and removes the overlap. A period of 1 is not
possible, because a row's H is needed by the next row one step later.

PU[0]'s left neighbour is the boundary column. `seed_ext_core` drives it
as a register with the same timing: it loads `H[j][-1]`/`F[j][-1]` at the
end of PU[0]'s scoring cycle for row `j`.

## Queries longer than the chain

A query of `|Q| > N_PU` bases is scored in `ceil(|Q|/N_PU)` chunks. For
each chunk, `seed_ext_core` does this:

1. **LOAD**: loads every PU in one cycle with its query base, its column
   index and its top-edge score.
2. **RUN**: streams all target rows.
3. **DRAIN**: waits until the last PU has written back the last row.
   Meanwhile, the last PU's H and F of every row go into a boundary memory
   (`MAX_TLEN` entries).
4. **REDUCE**: merges the 30 column bests into the running best.

The next chunk uses the stored column as its left boundary in place of
the computed edge scores. This is the restart from nonzero initial values.
The result is bit-identical to a chain with one PU per query base, which
the testbenches check against a plain cell-by-cell model.

Reading row `j` of the boundary memory always happens before the last PU
overwrites that row, so one memory serves as both input and output.

Latency from the clock edge that accepts `start` to `done`:

```
1 + ceil(|Q|/N_PU) * (ROW_PERIOD*(|T|-1) + N_PU + 5)   cycles
```

At the defaults this gives about 150 cycles for a 30-base read and about
4,500 cycles for a 150–256-base read.

## Host interface and protocol

```
host bus -> comm_handler -> write queue -> job_loader -> seed_ext_core
               ^                                             |
               +---- read queue <-------- result_writer <----+
```

`bwa_accel_top` has one clock, an active-low asynchronous reset, a generic
register bus and one interrupt line per core. The bus is: select, write strobe,
read strobe, 16-bit address, 32-bit data, and read data returned with
`bus_rvalid` one cycle after the read strobe. Address bits [15:8] must
select the device. With `N_CORES` > 1 the top holds that many complete
accelerators (each with its own handler, queues, loader, core and result
writer). Core `k` answers to device number `DEVICE_ID + k` and drives
`irq[k]`. The cores run independently, and only the addressed one answers
a read. One core is the evaluated configuration and the default.

| offset | reg | access | content |
|---|---|---|---|
| 0x00 | ID | R | [7:0] device number, [31:16] PU count |
| 0x04 | CTRL | W | bit0 start request, bit1 clear event |
| 0x08 | STATUS | R | bit0 result valid, bit1 core busy, bit2 job loaded, bit3 event, bit4 start pending, bit5 write queue full, bit6 write overflow (sticky), [23:16] result words waiting, [31:24] job words waiting |
| 0x0C | DATA | W | next job word |
| 0x10 | RESULT | R | next result word (0 if none; check the valid flag first) |

A job is a sequence of words written to DATA:

1. `{tlen[15:0], qlen[15:0]}`
2. `{tag[15:0], h0[15:0]}`
3. `ceil(qlen/16)` query words
4. `ceil(tlen/16)` target words

Query and target words pack 16 bases each. Base `k` of a word is in bits
`[2k+1:2k]`, coded A=0, C=1, G=2, T=3.

A result is three words read from RESULT:

1. `{tag, score}`
2. `{tle, qle}`
3. `{16'h0, gscore}`

Event-driven use:

1. The host queues a job and writes the start request.
2. The host goes on preparing the next job. It may queue the next job
   while the core runs, because the loader leaves the queue alone until
   the core is idle.
3. The start request waits until the loader has unpacked the job, the
   core is idle and the previous result has been queued.
4. When the last result word is queued, the event flag rises and drives
   `irq`.
5. The host clears the event, checks the valid flag and reads the result.

Only one start request can be pending. Write the next one after STATUS
bit 4 has cleared.

If the read queue fills, the result writer stalls and no further job
starts. Nothing is lost.

## What follows the published design and what does not

These parts follow it:

- one PU per query base in a systolic chain, with the target flowing
  through;
- the preparing / scoring / writeback split of each cell;
- overlapping the three steps of successive rows (the two-cycle row
  interval is this design's reading of the published timing);
- 30 PUs;
- chunked scoring that restarts from stored nonzero boundary scores;
- a write queue and a read queue between bus and core;
- a control block with start request, event, valid flag and device
  number;
- several cores on one addressed bus;
- 200 MHz as the target clock on a Zynq-7020 (timing closure is not
  checked here).

These are this design's own choices:

- the exact cell recurrence and scoring constants;
- the edge formula;
- 16-bit scores;
- the band rule and its width;
- the result summary. The published loop writes the whole score matrix;
  here the host gets the best cell and the last cell instead.
- memory sizes (256 bases for query and target);
- queue depth (64 words);
- all word formats, the register map and the bus timing;
- single-clock operation. A real board bridge may need a clock-crossing
  queue.

Not built:

- the host processor, its memory and cache, and the platform bus;
- BWA-MEM's per-row band narrowing and early stop (z-drop), which the
  published design does not describe.

The reported speed-ups (about 4.5x for short reads and about 46x for long
reads over a 3.3 GHz Core i5) depend on the host software and board, and
are not reproduced here.

## Files

`rtl/`:

- `bwa_pkg.sv`: base coding, score type, result struct.
- `pu.sv`, `pu_array.sv`, `seed_ext_core.sv`: the scoring engine.
- `sync_fifo.sv`, `job_loader.sv`, `result_writer.sv`, `comm_handler.sv`:
  the host side of the FPGA.
- `bwa_accel_top.sv`: wires everything together.

`tb/`:

- `sw_ref_pkg.sv`: the cell-by-cell reference model.
- One self-checking testbench per module, named `tb_<module>.sv`.
- `tb_bwa_accel_top.sv`: end to end at the default size. It drives the
  register bus like a host, in event-driven fashion. It checks every
  result and the core's cycle count, and it requires each mechanism to
  occur at least once: chunked restart, partly used chain, start waiting
  for the loader, queueing during a run, full write queue, full read
  queue, interrupt, foreign device page.
- `tb_multi_core.sv`: two cores on one bus. It runs concurrent jobs and
  checks addressing and the separate interrupt lines.
- `tb_read_workloads.sv`: runs short (10–50), medium (50–120) and long
  (121–256 base) reads through the default-size core. It prints the
  average cycles per extension.

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops on a
watchdog if the design hangs.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bwa_pkg.sv tb/sw_ref_pkg.sv rtl/pu.sv rtl/pu_array.sv rtl/seed_ext_core.sv \
  rtl/sync_fifo.sv rtl/job_loader.sv rtl/result_writer.sv rtl/comm_handler.sv \
  rtl/bwa_accel_top.sv tb/tb_bwa_accel_top.sv --top-module tb_bwa_accel_top
./obj_dir/Vtb_bwa_accel_top
```

For a block testbench, list the package, the reference package and the
modules the block uses.

## Changing the design

All sizes and scores are parameters of `bwa_accel_top`, passed down to
the blocks: `N_CORES`, `N_PU`, `MAX_QLEN`, `MAX_TLEN`, `ROW_PERIOD` (2 or more),
`FIFO_DEPTH`, `DEVICE_ID`, `MATCH`, `MISMATCH`, `GAP_OPEN`, `GAP_EXT`,
`BAND_W`.

The chain's area grows linearly with `N_PU`; each PU holds about 200
flip-flops. Scores are 16-bit signed, which is ample for 256-base strings.
Keep `h0 + MAX_QLEN*MATCH` well below 16,384 if you raise the sizes or
the match score.
