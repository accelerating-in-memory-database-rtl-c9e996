# Multithreaded selection engine for in-memory databases

A relational selection (`SELECT ... WHERE <predicates>`) touches every row of a table,
but it seldom needs every column of it. Short-circuit evaluation of the predicates
(the "branching scan") reads only the columns whose values matter for a given row.
On a CPU, though, it pays heavily for mispredicted branches. This design evaluates the
predicates in hardware with *one lightweight thread per row*. A thread fetches one column,
applies one predicate and then either stops or fetches the next column. The branch becomes
data: the next column and the next predicate are looked up in a small table.
Hundreds of threads are kept in flight at once. While one thread waits a hundred
cycles or more for DRAM, the others keep the comparator busy, so memory latency is
hidden without caches.

The hardware has 64 *selection engines* (4 FPGAs, called application engines or AEs,
with 16 engines each). Each engine owns one 8-byte memory channel and a share of the
rows. All engines run the same query.

## The query as a table: the Predicate Control Block

A query in disjunctive normal form (an OR of AND-clauses) is compiled on the host
into a Predicate Control Block (PCB), one 64-bit record per predicate:

| bits  | field       | meaning                                                        |
|-------|-------------|----------------------------------------------------------------|
| 63:60 | `op`        | 0 `=`, 1 `<>`, 2 `<`, 3 `>`, 4 `<=`, 5 `>=`                      |
| 59:28 | `constant`  | 32-bit signed constant                                         |
| 27:21 | `col_true`  | column to fetch next if the predicate holds                    |
| 20:14 | `col_false` | column to fetch next if it does not                            |
| 13:7  | `pcb_true`  | PCB offset of the next predicate if it holds                   |
| 6:0   | `pcb_false` | PCB offset of the next predicate if it does not                |

Offset 127 (`PCB_TRUE`) means "the row qualifies" and 126 (`PCB_FALSE`) means "the
row is rejected". A query may therefore have up to 126 predicates over 128 columns.
Example: `(UnitPrice > 5 AND Quantity > 10) OR TotalPrice > 100`, with the columns
numbered 0, 1 and 2, becomes the following PCB (the engine's `start_col` register is 0):

| offset | op | const | col_true | col_false | pcb_true | pcb_false |
|--------|----|-------|----------|-----------|----------|-----------|
| 0      | >  | 5     | 1        | 2         | 1        | 2         |
| 1      | >  | 10    | –        | 2         | TRUE     | 2         |
| 2      | >  | 100   | –        | –         | TRUE     | FALSE     |

For a DNF the rule is simple. On true, go to the next predicate of the same clause, or
to TRUE after the clause's last predicate. On false, go to the first predicate of the next
clause, or to FALSE after the last clause. `tb/tb_pkg.sv` (`build_query`) applies that
rule. Column values are 64-bit. They are compared as signed numbers against the
sign-extended constant.

## Life of a thread

```
            new job <row, start_col, PCB 0>
                 │
   ┌──────── priority encoder: write > recycled > new ───────┐
   │                                                         │
   │  write job: out[k] <= row          read: addr(row,col), tag = row
   │                                    state FIFO <= PCB offset
   │                                         │
   │                                     memory (in order)
   │                                         │
   │                    response FIFO <row, value> + state FIFO head
   │                                         │
   │        processing unit: PCB[offset] → ALU(value op constant)
   │                                         │
   │                     job generator: next = result ? true : false
   │                   ┌──────────────┬──────┴──────────┐
   └── write queue ◄── TRUE        FALSE (thread ends)  other → recycled queue ──┘
```

* **Thread manager** (`thread_manager.sv`). After `start` it first reads the
  `num_pcb` PCB records from memory. Then it creates one *new job* per row of its range.
  Each cycle it turns one job into one memory request. A queued write job comes first,
  then a recycled job, then a new one. A thread that finishes therefore always makes
  room before a new thread starts. For each read, the PCB offset that the returning value
  must be checked against goes into the *state FIFO*. Memory returns reads in order, so
  the head of the response FIFO and the head of the state FIFO always belong together.
  The row id rides along as the request tag.
* **Processing unit** (`processing_unit.sv`). It is a three-stage pipeline that accepts
  one job per cycle:
  1. Take the paired response and state.
  2. Read the PCB record. A PCB-load response writes the record instead.
  3. Compare (`pred_alu.sv`) and decide (`job_generator.sv`).

  The outcome appears three cycles after the job entered: a write job, a recycled job
  `<row, next column, next offset>`, or the end of the thread.
* **Addresses.** A row-major table (`cfg.col_major = 0`) is read at
  `table_base + 8*(row*row_size + col)`. A column-major table is read at
  `table_base + 8*(col*num_tuples + row)`. The same engine runs on both layouts. It only
  ever reads the columns that a row's evaluation actually needs.
* **Write-back.** Each qualifying row id is written as an 8-byte word to the next
  free slot of the engine's own slice of `out[]`.

## Queues, back-pressure and why it cannot deadlock

Every queue is a 512-entry `sync_fifo`. Each queue raises `almost_full` when fewer than 8
slots are free:

| queue             | holds                          | when nearly full it stops                 |
|-------------------|--------------------------------|-------------------------------------------|
| memory requests   | requests not yet taken by the channel | all job issue                      |
| state             | PCB offset per read in flight  | reads (new and recycled)                  |
| memory responses  | `<row, value>`                 | never fills: it is as deep as the state queue, and every response has a state entry |
| recycled jobs     | threads waiting for their next read | the processing unit                  |
| write jobs        | qualified row ids              | the processing unit                       |

The state queue bounds the reads in flight per engine at about 500. Little's law asks
for about 90 to 180 reads in flight to cover the platform's DRAM latency at one request
per cycle.

Priority alone does not rule out a deadlock. Suppose the state queue is full of reads whose
results all want to recycle, and the recycled queue is full. Then the processing unit
stalls, responses stop draining, and recycled jobs can never issue. The thread manager
prevents this by admitting a new thread only while fewer than `MAX_THREADS` (512)
threads are alive. A thread is alive from its new job until its write job issues or it is
rejected. So the recycled and write queues can always take what the pipeline hands
them.

## Configuration and operation

The host fills `mtp_cfg_t` (`mtp_pkg.sv`) and pulses `start` on `mtp_top`:

| field        | meaning                                         |
|--------------|-------------------------------------------------|
| `table_base` | byte address of the relation                    |
| `out_base`   | byte address of `out[]`                         |
| `pcb_base`   | byte address of the PCB records                 |
| `num_tuples` | rows in the relation                            |
| `row_size`   | columns per row (row-major stride)              |
| `start_col`  | column of the first predicate                   |
| `num_pcb`    | number of PCB records (1..126)                  |
| `col_major`  | layout select                                   |

The rows are split into equal contiguous blocks twice:
1. `mtp_top` gives each AE a block.
2. Each `mtp_ae` gives each of its engines a block (`row_split.sv`).

Engine *j* writes its row ids from `eng_out[j]` (`out_base + 8*first_row_of_j`) onwards,
so every engine's slice is large enough for all of its rows. When `done` rises,
`qualified[j]` tells the host how many ids engine *j* wrote, and `total_qualified` sums
them. `stats` sums the engines' counters:
* memory reads (the column fetches);
* predicates evaluated;
* writes;
* recycled jobs;
* cycles in which a ready job was held back;
* cycles in which a new thread waited on the thread limit.

Timing. The AEs register `start` together with the row split, and the engines begin one
cycle later. In steady state each engine issues one memory request and evaluates one
predicate per cycle. A query takes about (reads + writes) per engine cycles, plus a
build-up of one memory latency. It also needs a drain-out of up to one latency per
dependent read of the last threads.

### Memory channel contract

Each engine has one channel (`mem_req_*`, `mem_rsp_*`, arrays indexed by global engine
number on `mtp_top`):
* A request is an 8-byte read or write with a 32-bit tag. It is taken in any cycle in which
  `mem_req_valid` is high.
* The channel holds requests off by raising `mem_req_stall`. The engine sees it in the
  same cycle.
* Reads must come back in request order, with their tag, on `mem_rsp_valid`.
* Writes return nothing.

This stands in for the platform's memory controllers and crossbar, which run in their
own clock domain. Their clock crossing, address translation and multi-channel
interleaving are not part of this RTL.

## Departures and open points

* **PCB bit positions.** The field widths and their order are fixed. The exact bit
  positions are this design's choice. So are the use of the 14-bit metadata field as two
  7-bit next-predicate offsets and the TRUE/FALSE codes 127/126.
* **Added registers.** `num_pcb` (how many records to load) and `col_major` (layout
  select) are added to the dispatch registers.
* **Row split and `out[]`.** The split and the per-engine slices of `out[]` are this
  design's. The host must gather the slices using `qualified[]`.
* **Thread limit.** The limit and the 8-entry almost-full margin are added for
  deadlock-freedom and pipeline slack.
* **Signedness.** Signed comparison and the coding of the operators are this design's
  choice.
* **Memory side.** The memory controllers, crossbar, DRAM, host software and PCIe
  transfer are outside the RTL. The testbenches model memory behaviourally.
* **Clocks.** Everything runs on one clock. The 150 MHz target frequency has not been
  checked with an FPGA flow.
* **String predicates.** String and variable-length predicates are not supported. The
  original proposal leaves them to future work too.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`:

| testbench              | what it establishes |
|------------------------|---------------------|
| `tb_sync_fifo`         | contents, empty/full/almost-full against a queue model |
| `tb_pred_alu`          | all 16 operator codes against SystemVerilog comparisons |
| `tb_pcb_bram`          | one-cycle read, read-during-write behaviour |
| `tb_job_generator`     | write / recycle / end decisions and fields |
| `tb_priority_encoder`  | write > recycled > new, exhaustively |
| `tb_thread_manager`    | PCB load first, address formulas for both layouts, write priority, `out[]` slots, each row ends once |
| `tb_processing_unit`   | a 10-predicate DNF loaded and evaluated; exact 3-cycle latency under back-pressure |
| `tb_selection_engine`  | whole queries against a reference; a stall-free run meets the one-job-per-cycle bound; a small-thread-limit engine exercises the thread limit and channel stalls |
| `tb_mtp_ae`            | row split with uneven ranges, per-engine slices and counts |
| `tb_mtp_top`           | the full 64-engine top at default parameters, 18 queries, described below |

`tb_mtp_top` runs the full 64-engine top at default parameters with 18 queries:
* conjunctive and disjunctive queries with 1 to 8 predicates;
* the mixed queries (C1)∨(C2∧…∧C8), (C1∧C2)∨(C3∧C4)∨(C5∧C6)∨(C7∧C8),
  (C1∧C2∧C3)∨(C4∧C5)∨(C6∧C7∧C8) and (C1∧…∧C4)∨(C5∧…∧C8). At 0 % selectivity they take
  the expected 2N, 4N, 3N and 2N evaluations;
* a TPC-H Q6-shaped five-predicate query on a 16-column table;
* a column-major run;
* an 820-cycle-latency run;
* a run on slow channels.

Every written id, every engine's count and the evaluation totals are compared with a
reference model. The reference decides each row by short-circuit evaluation of the DNF,
not by walking the PCB.

The memory model (`tb/mem_channel_model.sv`) does not store the relation. A column value
is a hash of its word address, reduced to 0..99:
`value = ((addr/8) * 0x9E3779B97F4A7C15 >> 32) mod 100`.
A predicate `col < t` therefore holds with probability of about t %.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mtp_pkg.sv tb/tb_pkg.sv \
          tb/tb_mtp_top.sv --top-module tb_mtp_top -o sim
./obj_dir/sim
```

Testbenches that do not use `tb_pkg` need only `rtl/mtp_pkg.sv` and their own file.
`-Irtl -Itb` lets Verilator find the rest by module name. The full-size top testbench
builds in about a minute and runs in about a second.

## Files

* `rtl/mtp_pkg.sv`: PCB record, job, memory and configuration types; the address
  formula.
* `rtl/sync_fifo.sv`, `rtl/pcb_bram.sv`: queues and PCB store.
* `rtl/pred_alu.sv`, `rtl/job_generator.sv`, `rtl/processing_unit.sv`: predicate
  evaluation.
* `rtl/priority_encoder.sv`, `rtl/thread_manager.sv`: job arbitration and memory side.
* `rtl/selection_engine.sv`: one engine.
* `rtl/row_split.sv`, `rtl/mtp_ae.sv`, `rtl/mtp_top.sv`: 16 engines per AE, 4 AEs.
* `tb/`: the testbenches, the reference model (`tb_pkg.sv`) and the memory channel model.
