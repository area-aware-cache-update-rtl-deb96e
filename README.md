# Greedy Interval-Table Cache Update Tracker

During postsilicon validation, a processor's whole state gets dumped off-chip again and again, and the large caches take up most of each dump. The processor is stalled while a dump runs. Stalls get shorter if only the cache lines written since the previous dump are sent. The obvious record of which lines those are is one bit per line. For a 4 MB L2 with 128-byte lines, that is 32768 bits of debug storage.

This RTL keeps the record in a small **Interval Table** instead. The table holds at most `k` pairs `<start, end>` of line numbers, and every written line falls inside one of them. Writes tend to cluster, so a few intervals cover most of them. When there are more runs of written lines than intervals, two intervals are joined, or one is stretched. Either way, some lines that were never written get included. They are dumped needlessly (the *dumping overhead*), but a written line is never missed. With `k = 32` and 15-bit line numbers, the table is 32 × 30 = 960 bits.

The design follows the Greedy online algorithm and its hardware organisation as published by Chandran, Sarangi and Panda ("Area-Aware Cache Update Trackers for Postsilicon Validation", IEEE TVLSI, 2016). Choices that publication leaves open are this design's own and are marked as such below.

## The Greedy rule

The table is kept sorted by start address. For each line number `L` reported by the cache:

1. **Covered.** If `L` is inside a stored interval, nothing changes.
2. **Free slot.** If the table is not full, `L` becomes a new interval `<L,L>` in its sorted position. The exception is a line right next to an interval: that interval is extended by one and no slot is used.
3. **Full table.** Two distances are compared:
   * **Local Gap:** the number of unwritten lines between `L` and its nearest interval. *minLocalGap* is the smallest of these.
   * **Global Gap:** the number of unwritten lines between two neighbouring intervals. *minGlobalGap* is the smallest of these.

   If `minLocalGap < minGlobalGap`, the nearest interval is stretched to reach `L`. Otherwise, the two intervals around the smallest Global Gap are joined, and `L` gets the freed slot as `<L,L>`. Either way the cheaper option is taken, measured in unwritten lines added.

Ties go to the lower interval, and an equal Local and Global Gap means a merge. Two worked examples with `k = 3` on 16 lines (both are directed tests):

* Table `<0,3> <9,10> <14,15>`, line 7 arrives. It is 1 line away from `<9,10>` and 3 away from `<0,3>`. The smallest Global Gap is 3, between `<9,10>` and `<14,15>`. Since 1 < 3, the table becomes `<0,3> <7,10> <14,15>`.
* Table `<0,2> <5,6> <10,10>`, line 14 arrives. Its Local Gap is 3 and the smallest Global Gap is 2. So `<0,2>` and `<5,6>` become `<0,6>`, `<10,10>` moves down one slot, and `<14,14>` goes into the last slot.

The published analysis shows that Greedy dumps at most twice as many lines as the best possible set of `k` intervals.

## Hardware organisation

```
 cache line number ─► update_buffer ─► greedy_controller ──────────────┐
 (valid/ready,        (4-entry FIFO;     │ rd_addr          we/wr_addr │
  ready low = Busy)    full = Busy)      ▼                             ▼
                                   interval_table (K × <start,end>, 1R + 1W)
                                         │ read port                   ▲ write port
               ┌───────────┬─────────────┼──────────────┬──────────┐   │
               ▼           ▼             ▼              ▼          ▼   │
        check_interval min_local_gap min_global_gap dumping_logic merge_logic
        (inside/below/ (running min, (running min,  (streams      (new / extend /
         above)         index, side)  index)         lines to      move / join)
                                                     the cache)
```

* **`interval_table`** is a single-bank memory with one asynchronous read port and one clocked write port. The controller keeps the valid entries in slots `0..count-1`. The read data goes to every unit at once. The controller's enables decide which unit uses it in a given cycle, so no separate demultiplexer is needed. During a dump, the controller hands the read address to the dumping logic.
* **`greedy_controller`** sequences everything.
  * *Scan:* reads slots 0..count-1, one per cycle. The three evaluation units see each entry as it goes by. Scanning stops early if the line is already covered. The first interval above `L` gives the insert position.
  * *Decide:* picks the action from the two minima.
  * *Merge:* two cycles. The lower interval's start is captured, then the upper interval is rewritten as the joined one.
  * *Move:* one interval copied to the next slot up or down per cycle. This frees the right slot for `<L,L>`.
  * *Insert:* writes `<L,L>`.
* **`min_local_gap`** and **`min_global_gap`** each hold a running minimum and its slot index. The global unit remembers the previous interval's end, so one read port is enough. A strictly smaller value replaces the stored one, which is how ties go to the lower slot.
* **`merge_logic`** chooses what the write port receives.
* **`update_buffer`** holds requests that arrive while the controller works. When it is full, `upd_ready` (Busy) drops and the writer must stall.
* **`dumping_logic`** runs a dump. It reads each interval and offers its line numbers to the cache one by one. The cache sends those lines' contents off-chip.

### Timing

The first table entry is evaluated in the same cycle the request leaves the buffer. With `n` intervals stored, a request takes:

| case | cycles |
|---|---|
| empty table | 1 |
| covered by interval `i` | i + 1 |
| extend an interval | n + 1 |
| new interval at the end of the table | n + 2 |
| new interval at position q < n | 2n − q + 1 |
| full table, merge at pair `j`, insert position `q` | k + 3 + moves, where moves = j − q or q − j − 2 |

The worst case is **2k + 1 cycles**: 65 at `k = 32` and 9 at `k = 4`. The testbenches check every request against its exact count. A request enters the buffer one cycle before the controller can take it.

A dump behaves as follows:

1. A `dump_req` pulse closes the buffer input, so Busy stays high until the dump ends.
2. Requests already buffered are processed first.
3. The dumping logic streams one line number per cycle while `dump_ready` is high, plus one cycle per interval.
4. `dump_done` pulses and the table is empty for the next epoch.

A covered line never enters the table twice. Dumped lines come out in table order, which is ascending.

## Distributed caches: vertical sharing

For an L2 made of 16 slices of 256 kB (4096 lines of 64 B), one tracker per slice would multiply the area by 16. Here, two adjacent slices share one tracker, so `distributed_tracker` holds eight of them.

Sharing is *vertical*. **`vertical_share_port`** folds each pair of neighbouring lines of a slice into one tracker line, and gives the slices consecutive halves of the tracker's line range. Line `l` of slice `i` (with C slices per tracker) becomes shared line `i·4096/C + l/C`. For two 16-line slices A and B, lines 14 and 15 of A become shared line 7, and lines 0 and 1 of B become shared line 8. The tracker therefore still works on 12-bit line numbers. A slice that writes nothing dumps nothing, and a busy slice can use more of the shared intervals than a quiet one.

On the update side, a round-robin arbiter passes one slice request per cycle. A request the tracker refuses keeps its grant until it is accepted. On the dump side, every shared line is expanded back into its C lines on the owning slice's dump port. Each shared tracker has `k = 4` (32 intervals over all eight) and a four-entry buffer. One `d_dump_req` starts all eight dumps. `d_dump_done` pulses when the last line of the last slice has been offered.

## The coarse bit-vector alternative

`tlines_bitvector` is the simpler way to save storage. It keeps one bit for every `T` adjacent lines, set when any of them is written, so it needs `lines / T` bits: 16384 at `T = 2` for the 4 MB L2, or 512 at `T = 64`. A dump sends all `T` lines of every set bit. The overhead is therefore local: an isolated written line costs `T − 1` extra lines, wherever it is. The interval table, by contrast, may have to bridge a long gap once its `k` slots are used up.

The bits are held in a memory of 32-bit words:

* **Update.** A write is a single-cycle read-modify-write of one word, so requests are accepted every cycle and never stall the writer.
* **Dump.** The dump reads the words in order and clears each one as it goes. An all-zero word costs one cycle. For each set bit, its `T` line numbers are offered in ascending order on the same valid/ready port the Greedy tracker uses.
* **Reset.** After reset, the words are cleared one per cycle: 512 cycles at the defaults. `upd_ready` stays low until that finishes.

For the three 16-line examples used above (lines 0–10; lines 0–3, 6 and 8–11; the even lines), `T = 2` dumps 12, 10 and 16 lines. A one-interval table dumps 11, 12 and 15.

## Top level and parameters

`update_tracker_top` places both configurations side by side, each with its own ports:

* `s_*`: the tracker of the shared 4 MB L2. It is the Greedy tracker by default. With `S_METHOD = 1` it is the `T`-lines-per-bit vector instead; `s_n_intervals` then reads zero.
* `d_*`: the 16-slice distributed L2, with per-slice buses packed as `[16][12]`.

The caches, the processor and any on-chip network are outside the design. Their connections are the ports.

| parameter | default | meaning |
|---|---|---|
| `S_LINE_W` | 15 | line-number width of the shared L2 (32768 lines) |
| `S_K` | 32 | intervals in the shared tracker |
| `S_METHOD` | 0 | shared tracker: 0 = Greedy interval table, 1 = `T`-lines-per-bit vector |
| `S_T` | 2 | lines per bit when `S_METHOD = 1` (power of two) |
| `BUF_D` | 4 | Update Buffer entries (all trackers) |
| `D_CACHES` | 16 | distributed L2 slices |
| `D_C` | 2 | slices per tracker (power of two, ≥ 2) |
| `D_LINE_W` | 12 | line-number width of one slice (4096 lines) |
| `D_K` | 4 | intervals per distributed tracker |

All modules take their sizes as parameters. `greedy_update_tracker` works for any `K ≥ 1` and any line width. The defaults are collected in `ut_pkg`, which also defines the write-operation and controller-state enums.

Storage at the defaults:
* Shared tracker: 960 bits of Interval Table and 4 × 15 bits of buffer.
* Each distributed tracker: 4 × 24 = 96 table bits and 4 × 12 bits of buffer.

Synthesis of the whole top at its defaults gives about 3.6 k word-level cells, 1.4 k flip-flops and 2.2 k memory bits.

Notes on behaviour:
* Resets are asynchronous and active low. Reset empties every table.
* The table memory itself is not reset.
* Line numbers are assumed to be in range.
* Assertions cover three things:
  * a request refused on `upd_ready` must be held, and so must a line offered on `dump_ready`;
  * table writes stay in range;
  * a merge never has to place the new line between the two intervals being joined.

## Where this RTL departs from, or adds to, the published design

* **Free slots.** The published algorithm describes only a full table. Here, a line that touches an interval extends it; any other line takes a free slot.
* **Equal gaps.** The comparison is the published one (`minLocalGap < minGlobalGap`), so equal gaps lead to a merge. Equal distances resolve to the lower interval.
* **Gap counting.** Gaps count unwritten lines between (end − start − 1), as in the published worked examples. The published pseudo-code subtracts without the −1. The decisions are the same either way.
* **Memory and handshakes.** The asynchronous-read table and the valid/ready handshakes are this design's choices, as are the dump sequencing (drain the buffer first, stream one line per cycle) and the round-robin arbitration between sharing slices.
* **Tracker size per distributed slice.** The publication recommends "k = 32" for both cache organisations, but evaluates and synthesises the shared-by-two tracker with k = 4 per table. k = 4 is used here, which gives 32 intervals in total.
* **Dump count of one example.** The published table for the three 16-line examples gives the 2-lines-per-bit dump of the second example as 12 lines, but its overhead as 6.25 % (one line). The bit mapping gives 10 lines, which matches the overhead, and the test expects 10.
* **Not built.** The publication also describes:
  * a *Hybrid* tracker that adds a 256-bit auxiliary bit-vector for the densest window;
  * *horizontal* sharing, which ORs the same line number across slices;
  * an optimal offline algorithm.

  It recommends Greedy over these and judges Hybrid too slow, so none is built. The on-chip network that would separate the slices from their trackers is not modelled either: the links are direct.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a line `TB_RESULT checks=N failures=M` and has a cycle watchdog. `tb/interval_model_pkg.sv` is an independent behavioural model of the Greedy table. It returns, for each request, the action taken and the exact cycle count expected.

* **`tb_greedy_update_tracker`** has five harnesses:
  * three replay the published worked examples (k = 2 and k = 3) and compare the table with the printed intervals;
  * one sends random single requests at k = 8 and checks the table and exact cycle count (≤ 2k+1) after every one;
  * one streams clustered requests fast enough to fill the buffer and stall the sender, then dumps under random back-pressure.
* **`tb_greedy_controller`** tests the controller with the real datapath. It feeds requests back-to-back and checks the spacing between pops against the model's cycle counts.
* **`tb_vertical_share_port`** checks the sharing example above. It also runs random traffic at C = 2 and C = 4, checking the mapping, arbitration, starvation and dump expansion.
* **`tb_distributed_tracker`** and **`tb_update_tracker_top`** run end to end. The top test uses every default parameter. It checks dump streams against the model, checks that every written line is dumped and that an idle slice dumps nothing. It also counts stalls, covered-line drops, extensions, insertions, merges, moves, arbitration conflicts and dump back-pressure, and fails if any of them never happened.
* **`tb_workload_examples`** runs the published one-interval example columns. It also runs clustered epochs on the full-size shared tracker, measuring the dumping overhead and checking the 2-competitive bound against the optimal offline cover, which the testbench computes. The same epochs go to a top level built with `S_METHOD = 1`. Its dump must be exactly the written line pairs, in order.
* **`tb_tlines_bitvector`** runs the three 16-line examples at `T = 2`. It also runs random epochs at the default size and at 256 lines with `T = 4` and 8-bit words. Every dump is compared line by line with the expected expansion, under back-pressure, and the reset clearing time is checked.
* The leaf units (`update_buffer`, `interval_table`, `check_interval`, `min_local_gap`, `min_global_gap`, `merge_logic`, `dumping_logic`) are each tested directly against reference computations.

To simulate with Verilator 5, for example the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ut_pkg.sv tb/interval_model_pkg.sv tb/tb_update_tracker_top.sv \
    --top-module tb_update_tracker_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. The unit tests that do not use the model can leave out `tb/interval_model_pkg.sv`. Each test finishes in well under a minute.
