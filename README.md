# BTB access filtering: a branch prediction unit that rarely touches its big BTB

A superscalar front end normally reads its branch target buffer (BTB) for
every branch it fetches. A large BTB (here 2048 entries, 2-way) costs a lot of
dynamic energy per read, and at high clock rates it may need two or three
cycles per read. Yet most of those reads are wasted:

* a conditional branch that the direction predictor calls **not taken** needs
  no target at all, and
* most taken branches come from a small hot set that fits in a **tiny BTB**.

BTB Access Filtering (BAF) uses both facts. The direction predictor decides
first whether a target is needed at all. Only if it is, a 128-entry
direct-mapped *filter buffer* is read. Only when that misses is the large
*main BTB* read. The main BTB then sits idle most of the time. Its sets can
stay in a low-leakage *drowsy* state, and its long latency is exposed only on
the rare filter misses. The original proposal reports, for SPEC CPU2000, an
88.5% cut in BTB dynamic energy at 0.1% performance loss, 83% less BTB
leakage with the drowsy scheme, and only 0.8% / 1.6% loss with a 2- / 3-cycle
main BTB, against 4.4% / 12% for a conventional BTB of that latency.

This repository gives synthesizable SystemVerilog for the whole prediction
unit: the filter, the two BTBs, the drowsy control, the direction predictor
and the return address stack. The processor around it is not included.

## The lookup path

```
            lk_pc, lk_kind
                 |
   +-------------+--------------------------------------------+
   |  cycle 0    v                                            |
   |  tournament predictor --taken?--> filter buffer read     |
   |  (returns: pop RAS; calls: push PC+4)     (gated)        |
   +----------------------------------------------------------+
   |  cycle 1 (resolve)                                       |
   |    return              -> answer from RAS                |
   |    predicted not-taken -> answer "fall through"          |
   |    filter hit          -> answer with filter target      |
   |    filter miss         -> start main-BTB read, stall     |
   +----------------------------------------------------------+
   |  cycle 1+LAT (or 2+LAT if the set was drowsy)            |
   |    main hit  -> answer with target, copy entry to filter |
   |    main miss -> answer "fall through"                    |
   +----------------------------------------------------------+
```

Key points:

* **Two filters in series.** A conditional branch is predicted in the cycle
  it is presented. The prediction gates the filter-buffer read in that same
  cycle. So a predicted-not-taken branch reads neither buffer. Jumps and calls
  are always "taken" and go to the filter buffer. Returns use the RAS and read
  no BTB.
* **The main BTB is read only after a filter miss,** one cycle after the
  lookup, never in parallel with the filter. This is what saves energy. The
  price is that a filter miss costs `1 + BTB_LAT` cycles.
* **Stall.** While a main-BTB read is in flight, `lk_ready` is low. Otherwise
  the unit accepts one lookup per cycle. A new lookup may be accepted in the
  cycle a response is given.
* **Miss in both buffers.** The unit answers with `rsp_pred_taken=1` and
  `rsp_taken=0`: the direction said taken but no target is known, so fetch
  falls through, and the branch is taught at resolution.

Response latency, counted from the cycle the lookup is accepted:

| case                                   | latency          | buffers read      |
|----------------------------------------|------------------|-------------------|
| conditional, predicted not-taken       | 1                | none              |
| return                                 | 1                | none (RAS)        |
| predicted taken, filter hit            | 1                | filter            |
| predicted taken, filter miss           | 1 + BTB_LAT      | filter, main      |
| same, main-BTB set drowsy              | 2 + BTB_LAT      | filter, main      |

## Training and filling the buffers

Resolved branches come back on the `upd_*` port, in program order, with the
`rsp_src` and `rsp_target` they were given. From these the unit knows which
buffer already holds the right target:

* A conditional branch trains the direction predictor.
* A taken branch (not a return) whose correct target did **not** come from
  the filter buffer is written into the filter buffer.
* If its correct target came from neither buffer, it is also written into the
  main BTB. A branch found correctly in the main BTB is not rewritten there.
* When a main-BTB read hits, the entry is copied into the filter buffer in the
  response cycle. If a resolution write to the filter buffer happens in the
  same cycle, that write wins and the copy is dropped.
* Not-taken branches allocate nothing.

So the main BTB sees writes only for new or changed targets, and the filter
buffer always holds the most recently used taken branches.

## Drowsy main BTB

`drowsy_ctrl` keeps one drowsy bit per main-BTB set, using the simple
periodic policy:

* Every `DROWSY_WINDOW` cycles (4000 by default) all sets go drowsy.
* A read or write wakes the set it touches.
* Reading a drowsy set costs one extra cycle (`main_wake` flags such a
  response). A write wakes its set at once.

With filtering, the main BTB is read so seldom that only a small fraction of
its sets is awake at any time. `main_awake_sets` reports that count as a
leakage measure. In the default-size test about 150 of 1024 sets are awake on
average. The drowsy voltage itself is a circuit matter. The RTL only models
the state and its wake-up cost. `DROWSY_EN=0` removes the controller.

## Direction predictor and return stack

`tournament_predictor` is built like the Alpha 21264 predictor:

* a 1K x 10-bit local history table selects one of 1K 3-bit counters;
* a 12-bit global history selects one of 4K 2-bit global counters;
* a 4K 2-bit choice table, indexed by the same global history, picks between
  the two.

Histories are updated only by resolved branches (no speculative history, no
repair). Its tables are flip-flop arrays read combinationally, so that the
prediction is ready early enough to gate the filter-buffer read.

`ras` is a 32-entry circular stack. A call's lookup pushes PC+4, a return's
lookup pops. On overflow the oldest entry is lost. Mispredicted paths are not
repaired.

## Interface of `baf_bpu`

| port | dir | meaning |
|------|-----|---------|
| `lk_valid`, `lk_ready` | in/out | lookup handshake; only branches are presented |
| `lk_pc`, `lk_kind` | in | branch PC and class (`BR_COND`, `BR_UNCOND`, `BR_CALL`, `BR_RET`) from predecode |
| `rsp_valid` | out | one cycle per accepted lookup |
| `rsp_pred_taken` | out | predicted direction |
| `rsp_taken`, `rsp_target` | out | redirect fetch to this target |
| `rsp_src` | out | `SRC_NONE`, `SRC_FILTER`, `SRC_MAIN` or `SRC_RAS` |
| `upd_valid`, `upd_pc`, `upd_kind`, `upd_taken`, `upd_target` | in | resolved branch, in order |
| `upd_src`, `upd_pred_target` | in | the `rsp_src` / `rsp_target` it was given |
| `fb_access`, `main_access` | out | a buffer read this cycle (energy events) |
| `main_wake` | out | this main-BTB response paid the wake-up cycle |
| `main_awake_sets` | out | main-BTB sets not drowsy |

The branch-class and source types are in `baf_pkg`. Reset is asynchronous and
active low. It clears all valid bits, histories and counters, and empties the stack.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `FB_ENTRIES` | 128 | original design (128-entry direct-mapped filter) |
| `BTB_ENTRIES`, `BTB_WAYS` | 2048, 2 | original design |
| `BTB_LAT` | 1 | original design; 2 and 3 are its deep-pipeline versions |
| `RAS_DEPTH` | 32 | original design |
| `DROWSY_EN`, `DROWSY_WINDOW` | 1, 4000 | drowsy use is original; the window is this RTL's choice |
| `LHT_ENTRIES`, `LHIST_W`, `LCTR_W`, `GHIST_W` | 1024, 10, 3, 12 | Alpha 21264 predictor sizes |
| `PC_W` | 64 | Alpha addresses |

## Where this RTL makes its own choices

The original describes the organisation (predictor-gated lookup, small
filter BTB in front of a large multi-cycle BTB, drowsy leakage control) and
its sizes. The following are choices of this RTL, and the first places to
look if you adapt it:

* The predictor and the gated filter-buffer read share one cycle (a serial
  path). A faster clock may need the filter read moved a cycle later.
* The update and fill policy above, including the copy on a main-BTB hit and
  which write wins when two collide.
* Handshakes, the branch class supplied by predecode, and handing
  `rsp_src` back at update.
* Main BTB: LRU replacement, full tags, separate read and write ports, one
  read in flight. Latency is modelled as a tag compare in the request cycle
  plus a delay; a stale result is possible if the same entry is written
  during a multi-cycle read.
* Drowsy policy (periodic window, per-set bits, one-cycle wake-up, no
  wake-up delay on writes).
* Non-speculative predictor history and an unrepaired RAS.
* One branch lookup per cycle. The processor the original was evaluated in
  fetches four instructions per cycle. A fetch group with several branches
  would present them one after another, or need more lookup ports.

## Files

| file | content |
|------|---------|
| `rtl/baf_pkg.sv` | branch-class and target-source types |
| `rtl/baf_bpu.sv` | top: lookup control, filtering, update policy |
| `rtl/tournament_predictor.sv` | direction predictor |
| `rtl/filter_buffer.sv` | 128-entry direct-mapped filter BTB |
| `rtl/main_btb.sv` | 2048-entry 2-way BTB with latency and drowsy sets |
| `rtl/drowsy_ctrl.sv` | per-set drowsy state |
| `rtl/ras.sv` | return address stack |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/baf_stim.sv` | branch-stream generator and checker for the top |
| `tb/tb_baf_bpu.sv` | full-size end-to-end test (all defaults) |
| `tb/tb_baf_deep.sv` | the same with a 2-cycle and a 3-cycle main BTB |

## Verification

Each testbench compares its module against a model written separately in the
testbench. It prints `TB_RESULT checks=N failures=M` and has a watchdog.

* **Unit tests.** Each leaf module is checked against its model:
  * hit and target on every read;
  * read latency, including the extra drowsy cycle, at 1, 2 and 3 cycles;
  * LRU eviction;
  * RAS overflow;
  * drowsy window timing;
  * learning of a period-4 loop (local history) and of a correlated branch
    (global history).
* **End-to-end test.** `baf_stim` plays a synthetic program through the
  top: 400 static branches, with calls paired to returns and biased
  conditional branches. It checks:
  * every target;
  * the latency of every response;
  * that no filtered lookup reads a buffer;
  * that the main BTB is read only after a filter miss.

  It fails if any mechanism never happens: filtered lookup, filter hit, main
  hit, double miss, RAS return, drowsy wake-up, stall.
* **Measured at default size.** About 5% of lookups reach the main BTB.

The SPEC benchmarks of the original evaluation are not reproduced. That
needs a processor model, which is not part of this RTL.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_baf_bpu -y rtl -y tb rtl/baf_pkg.sv tb/tb_baf_bpu.sv
./obj_dir/Vtb_baf_bpu
```

Replace `tb_baf_bpu` with any other testbench name to run it. The
full-size end-to-end test runs in well under a second. To try another
configuration, override the `baf_bpu` parameters as `tb_baf_deep.sv`
does, and pass the matching `LAT` to `baf_stim`.
