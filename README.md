# Non-blocking PCM banks with write-aware scheduling and bit-level power budgeting

Phase change memory reads in about 50 ns but needs about 1 µs to write a
64-byte line. In a conventional bank one write blocks every request behind it
for that whole time, so a PCM rank delivers only a fraction of its potential
bandwidth. This RTL is the memory-side controller of one 2 GB PCM rank. It
raises throughput in three layers that depend on each other:

1. **Non-blocking banks.** Each bank is split into a left and a right half. Each
   half runs one write and one read at the same time, so a bank serves up to
   two writes and two reads. The shared row and array decoders are free again
   three cycles after an access starts. This works because the wordline and
   column selection of a running access is *held* locally: in latches at the
   array-enable crossings, in the local wordline drivers, and in a small
   V-line control cell per array column.
2. **Reordering inside the bank queue.** The slots only help if the queue offers
   requests that can use them. A PAR-BS batch scheduler (marking balanced
   between the two halves) decides which requests are eligible. RAWP
   (row-hit-aware write precedence) then picks one candidate per free slot.
   Writes go first, but row-buffer hits are kept. A read that collides with a
   running write is *inserted* between two write rounds instead of waiting
   for the write to end.
3. **Bit-level power budgeting (BPB).** More concurrent writes means more
   concurrent cell programming current. A global budget caps the number of
   cells being written at once. Before a write starts, its old line is read
   back. Only the cells that really change are counted (differential write),
   and Flip-N-Write may store a segment inverted. Each write then gets the
   split into 8, 4, 2 or 1 rounds that finishes earliest under the remaining
   budget. Rounds without a single changing cell are skipped.

The cell arrays themselves (cells, sense amplifiers, write drivers) are analog
and are not part of the RTL. The controller drives their array enables and
local wordlines, and exchanges cell words with them through per-half read and
write ports. A behavioural cell model in `tb/` stands in for them in
simulation.

## Organisation and address

| level | count | notes |
|---|---|---|
| rank | 8 chips in lock step | one 64 B line = one access to the same bank of all 8 chips |
| bank | 8 | each an 8 x 8 grid of 4 Mb cell arrays |
| half bank | 2 per bank | array columns 0-3 = left, 4-7 = right |
| array | 64 per bank | 2048 local wordlines; one array row = 2 KB across the rank |
| row buffer | 8 entries x 256 B per bank | write-through; only tags are modelled |

`pcm_addr_t` (25 bits, one 64 B line) is `{bank[2:0], arr_row[2:0],
arr_col[2:0], row[10:0], seg[2:0], line[1:0]}`:
- `arr_row` selects the H line and `arr_col` the V line. `arr_col[2]` is the half.
- `row` is the local wordline inside the array.
- `seg` selects the 256 B row-buffer piece of that wordline and `line` the 64 B line within it.

A 512-bit line is handled in eight 64-bit *segments*. In the 8-round
configuration one segment is written per round. Each segment has one extra
flag cell for Flip-N-Write (`cell_word_t = {flip[7:0], data[511:0]}`).

All times are in cycles of an assumed 400 MHz controller clock (2.5 ns, the
clock of a DDR2-800 channel):

| operation | ns | cycles | parameter |
|---|---|---|---|
| read, row-buffer miss | 50 | 20 | `T_MISS` |
| read, row-buffer hit | 10 | 4 | `T_HIT` |
| write set-up | 200 | 80 | `T_SET` |
| write round | 100 | 40 | `T_RND` |
| budgeting penalty per write | 100 | 40 | `T_PEN` |

An 8-round write therefore takes 80 + 8 x 40 = 400 cycles (1 µs), minus 40
cycles for every round it skips.

## Holding an access so the decoders can leave (the hard part)

Normally the row decoder holds a wordline high for the whole of a 1 µs write,
so nothing else can use the bank. Here every access is handed over to local
circuits in three steps. Each step frees one decoder.

```
cycle 0   row address   H decoder raises H[arr_row]; row decoder raises GWL[row]
cycle 1   column addr   V decoder raises V_out[arr_col]
cycle 2   command       W (or R) of the half rises; V_ctrl of the column
                        captures V_out and drives V; V and H close the
                        enable latch of the array -> EN; EN closes the LWL
                        drivers on the raised GWL -> LWL[row]
cycle 3+  decoders free for the next access; V is held by W/R, EN by V,
          LWL by EN, until the command drops at the end of the operation
```

- **`array_en_latch`** (one per array, 64 per bank) sits at the crossing of
  an H line and a V line. While V is low it follows H. While V is high it keeps
  what it had, and EN = V and the kept H. Because V holds every latch in its
  column, the other arrays of that column ignore later H activity: an inactive
  array stays closed, the active one stays open.
- **`lwl_driver`** (one set per array) follows the global wordlines while EN is
  low and drives nothing. When EN rises it keeps the raised GWL and drives that
  local wordline until EN falls. Only one GWL of an array row is ever high.
  The bundle is therefore carried as "which line, and whether one is high",
  and the driver stores that 12-bit value rather than 2048 separate latch bits.
- **`v_ctrl`** (one per column) has a write side and a read side. A side
  captures V_out when its command (W or R of the column's half) rises, and
  holds the column until the command falls. Each side can capture only while
  the other side does not own the column. A write and a read can therefore
  share one V line only if the write has given it up (see read insertion
  below). An assertion checks that a column never has two owners.
- **`bank_wl_ctrl`** wires the two 3:8 decoders, the shared row decoder, the 8
  V_ctrl cells, the 64 enable latches and the 64 driver sets. An assertion
  checks that at most one array per column is open.

All latches are modelled at the clock: the output is the live input while
the latch is open and a register value while it is closed, and the register
copies the output every cycle. This keeps the design free of real latches
and gives the same cycle-level behaviour.

What still cannot be shared is the **global bitline** of an array column,
which connects every array of the column to the half's sense amplifiers and
write drivers. Two accesses in the same array column *conflict*. Two accesses
in different columns of the same half can run together, one read and one
write, because a half has one read and one write circuit.

## One bank: slots, queue and read insertion (`nb_bank`)

Each half has a **write slot** and a **read slot**. One decoder sequencer
serves all four slots. Writes (start or resume) get it first, then inserted
reads, then new reads.

**Write slot**:
1. The write asks the power-budget manager for budgeting and waits for its grant.
2. It takes the decoders and raises W.
3. It spends `T_SET` cycles on set-up, then one `T_RND` round for each round that has bit changes.
4. In the last cycle the cell word is written (`arr_wr_en`) and `wr_done` returns the budget.

**Read slot**:
1. The read takes the decoders and raises R.
2. The cell word is read (`arr_rd_en`; the data arrive the next cycle).
3. Flip flags are undone.
4. The response is ready after `T_HIT` or `T_MISS` cycles.

A miss keeps its slot and column for `FILL x T_MISS` = 80 cycles because it
fills a 256 B row-buffer entry with four reads. The requested line is returned
first. The row buffer keeps tags only (`row_buffer_tags`, LRU, both reads and
writes allocate). Because the buffer is write-through, the data in the cells
are always current. Hit or miss changes timing only, and the line is always
read from the cells.

**Read insertion** (RAWP only):
- Trigger: a read of the same half and column as a running write.
- The read enters its slot and waits.
- At the write's next round boundary, the write pauses and drops W. V_ctrl releases the column.
- The read runs through the decoders.
- When the read slot is free again, or holds a different column, the write
  takes the decoders again and resumes with its remaining rounds.

With AWP, a conflicting read stays in the queue until the write ends.

**Bank queue.** The queue holds `Q` = 16 entries in arrival order.

At a `new_batch` pulse the oldest `MARK_CAP/2` = 2 requests of each thread in
each half are marked (PAR-BS/Half). Marking per half rather than per bank
keeps both halves supplied.

Whenever the previous issue group has been used up, `rawp_select` forms a
new group of up to four requests:

- **Step 1: one candidate per free slot, write slots first.**
  - A write is ranked by: marked, row hit, thread rank, fewest queued reads it conflicts with.
  - A read is ranked by: marked, row hit, free of conflict with running writes and
    with the write candidates just chosen, thread rank.
  - A read that conflicts with a running write counts as conflict-free, because it can be inserted.
  - Remaining ties go to the older request.
- **Step 2: order the group.** Write hits come first, then read hits, then write misses.
  - Write hits help both throughput and the hit rate.
  - Reads are short, and a write miss could evict the entry a read hit needs.
  - Read misses are not put in a group. If no group forms, the single request
    PAR-BS would issue (marked, row hit, rank, age) among those whose slot is
    free becomes the group. Read misses are thus served in PAR-BS order.

Group members leave the queue in group order, each as soon as its slot (and,
for a write, its column) is free. A waiting member holds back the ones behind
it.

`parbs_batcher` starts a batch when no marked request is left anywhere and
some queue is non-empty. It ranks threads by their largest per-bank count of
marked requests, fewest first, then by total count. This is PAR-BS's
shortest-job-first rule, and it keeps reordering from starving reads:
everything marked must issue before the next batch.

## Bit-level power budgeting (`power_budget_mgr`)

The budget is `BUDGET` = 1024 cells being programmed at once. All 16 write
slots of the rank share one manager:

1. It accepts one request per cycle (round robin). It then reads the old line
   through its own cell port (`pw_rd_*`, data the next cycle).
2. `dw_fnw_encoder`, per 64-bit segment:
   - counts the cells that change if the segment is stored plain and if it is
     stored inverted, the flag cell included in both counts;
   - stores inverted when that is cheaper.
   The result is the new cell word and the change count of each segment.
3. `bpb_config_select` evaluates each configuration:
   - 8 rounds of 64 bits, 4 of 128, 2 of 256, or 1 of 512;
   - demand = change count of its busiest round;
   - rounds performed = rounds with any change;
   - latency = `T_SET + rounds x T_RND`;
   - earliest start = now if the demand fits the free budget, otherwise the
     projected time when enough running writes will have finished
     (remaining-cycle counters of the running writes).
   Among configurations with demand ≤ `DCAP` = 64 it takes the earliest
   finish (start + latency). Ties go to more rounds, which need less power.
   If none is under the cap, it takes 8 rounds.
4. After `T_PEN` cycles, a pending write is granted as soon as its demand
   fits the free budget. Pending writes are scanned round robin, so a small
   write can pass a large one that does not fit. There is one grant per cycle.
   The grant carries the configuration, the number of rounds to perform, and
   the encoded cell word.
5. The write holds its demand until its slot reports `done`.

Worked example (the testbench uses it). A line whose eight segments change
0, 0, 4, 0, 0, 5, 8 and 10 bits gives these configurations:

| configuration | demand (busiest round) | rounds performed |
|---|---|---|
| 8-round | 10 | 4 |
| 4-round | 18 | 3 |

Note on the default size: 16 write slots x `DCAP` 64 = 1024. So with the
default budget no write ever waits for budget. Smaller budgets (256, 512, 768)
are set with `BUDGET`, and then the budget does limit writes. The end-to-end
testbench uses 128.

## Top level (`pcm_nb_top`)

`pcm_nb_top` instantiates 8 `nb_bank`s, one `parbs_batcher`, one
`power_budget_mgr` and a response arbiter.

| port | direction | meaning |
|---|---|---|
| `req_valid`, `req`, `req_ready` | in, in, out | one request per cycle. `pcm_req_t` = `{id, tid, we, addr, wdata}`. `req_ready` is the addressed bank queue's room. |
| `resp_valid`, `resp` | out | read data, one per cycle, round robin over the 16 read slots. Writes give no response. |
| `arr_rd_en/addr/data[b][h]` | out, out, in | cell read port of each half bank. Data are due the cycle after the enable. |
| `arr_wr_en/addr/data[b][h]` | out | cell write of each half bank, one cycle, at the end of a write |
| `pw_rd_en/addr/data` | out, out, in | pre-write read for budgeting |
| `en_o[b]`, `lwl_o[b][array]` | out | array enables and local wordlines (`lwl_o` is `ROWS` bits per array) |
| `ev_o[b]`, `budget_stall`, `budget_avail`, `batch_count` | out | event flags for performance counting (`bank_ev_t`) |

Requests reach their bank queue in arrival order; the host side (processor,
caches, the input queue in front of the banks, the channel) is outside.

**Same-line ordering.** The controller does not order requests to the same
line against each other. A read and a write to one line may be reordered,
so the requester must not send a request to a line that still has one
outstanding.

## Files

| file | what it is |
|---|---|
| `rtl/pcm_pkg.sv` | sizes, timing constants, address/request/cell-word types, event flags |
| `rtl/array_decoder.sv` | 3:8 decoder (array H and V decoders) |
| `rtl/array_en_latch.sv` | enable latch at an H/V crossing |
| `rtl/lwl_driver.sv` | local wordline drivers of one array |
| `rtl/v_ctrl.sv` | V-line hold cell of one array column |
| `rtl/bank_wl_ctrl.sv` | wordline/array-selection network of a bank |
| `rtl/row_buffer_tags.sv` | 8-entry LRU tag store with parallel lookups |
| `rtl/dw_fnw_encoder.sv` | differential write + Flip-N-Write encoder |
| `rtl/bpb_config_select.sv` | earliest-finish write configuration choice |
| `rtl/power_budget_mgr.sv` | budget accounting and admission for all write slots |
| `rtl/parbs_batcher.sv` | batch start and thread ranking |
| `rtl/rawp_select.sv` | issue-group selection, RAWP or AWP |
| `rtl/nb_bank.sv` | one bank: queue, slots, read insertion, decoder sequencing |
| `rtl/pcm_nb_top.sv` | the rank controller |
| `tb/pcm_cell_model.sv` | behavioural cell arrays (not synthesizable) |
| `tb/pcm_top_env.sv` | traffic, reference model and mechanism counters for the top |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_pcm_nb_full` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pcm_pkg.sv tb/tb_pcm_nb_top.sv --top-module tb_pcm_nb_top
./obj_dir/Vtb_pcm_nb_top +verilator+rand+reset+2
```

What the testbenches establish:

- **Block level.**
  - `array_decoder`, `array_en_latch`, `lwl_driver`, `v_ctrl`: exhaustive or
    directed checks of capture, hold and release.
  - `bank_wl_ctrl`: two writes and two reads opened one after another through
    the shared decoders. Each must keep its array enable, V line and local
    wordline while the decoders serve the next access, and must close alone
    when its command falls.
  - `row_buffer_tags`, `dw_fnw_encoder`, `bpb_config_select`: thousands of
    random cases against reference functions, plus the worked example above.
  - `power_budget_mgr`: 120 random writes under a small budget. Each grant
    must carry a cell word that decodes to the request data, and a demand and
    round count that match the cells really changed. Granted demand never
    exceeds the budget, no grant comes before the penalty, every write is
    granted, and at least one write waits for budget.
  - `rawp_select`: the ranking rules, group order, fallback and read
    insertion, including this example: queue W1\*, R2, R3\*, R4, W5, R6\*,
    R7, R8, where \* marks a row hit and W1, R3, R4 are in the left half. The
    group must be W1, R3, R6, W5.
- **`tb_nb_bank`.** One bank with a budgeting stub runs the queue W1 R2 R3 R4
  R5 W6 R7 R8.
  - Placement: W1, R2, R4, R5 and R8 are in the left half, and W1 shares a
    column with R5. R3 shares a column with W6.
  - Checked: all read data; the two writes overlap; reads run beside them;
    R5 is inserted into W1 and finishes before it.
  - The whole queue completes in 506 cycles. One write alone takes 400
    cycles, and two serial writes 800.
  - A read of a just-written row is a row-buffer hit with the `T_HIT`
    latency.
- **`tb_pcm_nb_top`** (reduced: 16 wordlines, 8-entry queues, short times,
  budget 128) and **`tb_pcm_nb_full`** (every parameter at its default, full
  timing). Both run random traffic from 4 threads and check:
  - every read's data and every committed cell word;
  - that every cell access happens under its raised local wordline;
  - that all lines hold their last data at the end.
  They count how often each mechanism happened, and a mechanism that never
  happened is a failure:
  - issue groups and fallback picks;
  - read/write hits and misses;
  - read insertions;
  - write-write, read-write and read-read overlap in a bank;
  - decoder and column waits, skipped rounds;
  - budget stalls (reduced run only);
  - new batches, inverted segments.

  The reduced run serves 3000 requests in about 4500 cycles. The full-size
  run serves 600 requests in about 4200 cycles.

## Where this design departs from, or goes beyond, the description it follows

- **Clock.** The 2.5 ns clock is assumed. All latencies are parameters in cycles.
- **Power demand of the worked example.** The prose attributes demand 10 to
  the 4-round configuration and 18 to the 8-round one. The figure, and the
  remark that fewer rounds need more power, say the opposite. This design
  follows the figure.
- **Fixed 4-round setting.** The throughput studies also use a setting in
  which every write takes 4 rounds (600 ns). Here the number of rounds is
  always chosen per write by BPB. There is no mode that fixes it.
- **Not built.** Baseline schemes used only for comparison are not built:
  blocking bank, read-while-write, read-first, write cancellation, write
  pausing, FnW-only budgeting, and Power Token.
- **This design's own choices.** The following are not specified by the
  description this design follows:
  - the queue depth (16);
  - the PAR-BS marking cap (4 per bank, 2 per half);
  - the 3-cycle decoder hand-over;
  - the arbitration among slots and responses;
  - the tie-breaks in ranking;
  - the fallback for groups without hits;
  - LRU replacement in the row buffer;
  - the separate pre-write read port;
  - 64-bit Flip-N-Write segments.
- **Penalty.** The 100 ns configuration penalty is charged to every write.
  Waiting for budget runs during the same time.
- **Tool warnings.** `rst_n` serves both as asynchronous reset and in
  assertion `disable iff` clauses, which Verilator reports as
  SYNCASYNCNET. The assertions are not part of the hardware.
- **Synthesis size.** At the default size the top's 8 x 64 x 2048 local
  wordline outputs dominate synthesis size and time. Reduce `ROWS` for quick
  experiments.
