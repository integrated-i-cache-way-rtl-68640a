# Way-predicting BTB front end

A 4-way instruction cache normally reads four data ways on every fetch and then
throws three of them away. This front end reads only one. The trick is to get
the way from the branch target buffer, which is already consulted on every
fetch to find the next fetch address. Each BTB entry therefore stores, next to
the branch target, two I-cache way predictions:

* **twp**: the way holding the line at the branch target (used when the branch
  is predicted taken);
* **fwp**: the way holding the line after the branch, the fall-through
  (used when it is predicted not taken).

So the lookup that picks the next address also picks the single data way to
enable. Fetch blocks without a branch would have no way prediction. To cover
them, their first instruction also looks up the BTB, and the entry records the
way of the next sequential line in its fwp. Because these non-branch entries
compete with branches for BTB space, the BTB ways can be split between the two
kinds. A lookup then enables only the BTB ways of its kind, which also saves
BTB energy.

When no prediction exists, or a prediction turns out wrong, the cache still
works. A missing prediction enables all ways. A wrong one costs a second read
of the right way in the next cycle.

## Blocks

| file | block |
|---|---|
| `rtl/wpb_pkg.sv` | shared constants, types (`ftag_t`, `commit_t`, `upd_req_t`, `btb_wr_t`, `btb_cfg_e`) and helper functions |
| `rtl/icache.sv` | 64 KB, 4-way, 32 B-line I-cache. It reads all tag ways but only the enabled data ways, and reports the hit way |
| `rtl/wp_btb.sv` | 2K-entry, 4-way BTB holding `{address, target, lru, twp, fwp}`, with run-time way partitioning |
| `rtl/dir_pred.sv` | combined direction predictor: 4K bimodal table, 4K 12-bit global-history table, 4K chooser |
| `rtl/way_queue.sv` | Way Queue (WQ): the hit way of every finished fetch, in fetch order |
| `rtl/burq.sv` | BTB Update Request Queue (BURQ): BTB updates still waiting for their way |
| `rtl/fetch_unit.sv` | fetch control: predecode, BTB lookup, next address and way mask, wrong-way re-read, miss refill |
| `rtl/commit_update.sv` | commit-side BTB update, misprediction redirect, predictor training |
| `rtl/wp_frontend.sv` | top level that wires all of the above |

## Learning the ways: WQ pointers and the BURQ

This is the subtle part of the design.

The way a prediction needs is the way of the line fetched *after* the
instruction that looked up the BTB. That is only known once that next fetch
has finished. The update is also written late: only when the instruction
commits, so that wrong-path instructions never pollute the BTB. The design
links the two events with the Way Queue.

1. **Every fetch pushes its way.** Each fetch that finishes pushes its I-cache
   hit way into the WQ, a 64-entry circular buffer. A pointer of 6 index bits
   plus a wrap bit names each push.
2. **The block remembers the next entry.** The block fetched in that cycle
   stores, in its tag, `wq_ptr` = the WQ entry the *next* fetch will fill:
   `tail + 1`, because this fetch's own push takes `tail`. The tag travels
   with the block through the core and returns at commit.
3. **At commit the update reads the WQ at `wq_ptr`.** Each WQ entry records the
   pointer it was written under. A read therefore only counts as valid if the
   entry already holds that exact fetch, and not an older or newer lap.
   - If the entry is valid and no older request waits, the BTB is written in
     the same cycle (an "immediate update").
   - Otherwise the request goes into the 8-entry BURQ. It waits there until
     its WQ entry is filled, and then is written in order.
   A request can miss its entry because the next fetch missed in the cache and
   is still refilling.
4. **A misprediction waits for the correct line.** When a branch was
   mispredicted, the line that truly follows it has not been fetched yet. The
   commit redirects fetch, and the update's `wait_ptr` becomes the current
   tail: the entry the redirected fetch will fill. The request always goes
   through the BURQ in this case.

What the written entry holds:

| committed instruction | twp | fwp |
|---|---|---|
| taken branch | way from the WQ | carried over from the fetch-time lookup |
| not-taken branch | carried over, if the target is unchanged | way from the WQ |
| non-branch | – | way from the WQ |

Because the "other" way prediction is carried in the block tag, no
read-modify-write of the BTB is needed at commit.

A redirect after a misprediction can itself use a way prediction: the fwp of
a wrongly-taken branch, or the twp of a wrongly-not-taken branch whose target
is known. In those cases it enables one way instead of four.

## BTB organisation (`cfg` input)

`cfg` selects how the four BTB ways are shared. Ways 0..n-1 serve branches and
the rest serve non-branch lookups. A lookup enables only its own ways, and
allocation stays inside them.

| `cfg` | branch ways | non-branch ways | BTB ways read per lookup |
|---|---|---|---|
| `CFG_BASE` | 4 | none (non-branch blocks are not looked up) | 4 |
| `CFG_SHARE` | 4 shared | 4 shared | 4 |
| `CFG_P1_3` | 1 (512 entries) | 3 (1536) | 1 or 3 |
| `CFG_P2_2` | 2 (1024) | 2 (1024) | 2 |
| `CFG_P3_1` | 3 (1536) | 1 (512) | 3 or 1 |

The best split depends on the program, so it is a run-time setting meant to be
chosen per application. Hold it constant while running. Changing it leaves
entries that fall outside the new partition unused until they are replaced.

`CFG_BASE` keeps the way-prediction fields only for branches. It models a BTB
that predicts ways for taken and not-taken branches but not for straight-line
code.

## Fetch pipeline and timing

* **One cycle per fetch.** An I-cache read is issued in cycle *t*. In cycle
  *t+1* the response comes back, and all of the following happen
  combinationally:
  - the line is predecoded and the first control-transfer instruction at or
    after the fetch address is found;
  - the BTB and direction predictor are looked up;
  - the block is delivered on `blk_*`;
  - the hit way is pushed into the WQ;
  - the next read is issued with its way mask.
  A correctly predicted fetch stream therefore delivers one block per cycle.
* **Fetch block.** A block runs from the fetch address to the first branch, or
  to the end of the 32-byte line. `blk_insn` holds the whole line, with word
  *k* at index *k*. The block starts at word `blk_pc[4:2]` and has `blk_n`
  instructions.
* **Next access.**
  - Predicted-taken branch with a BTB hit: go to the target, with mask
    `twp`.
  - Any other branch: go to the next instruction, with mask `fwp` if the entry
    hit.
  - No branch: go to the next line, with mask `fwp` of the non-branch entry
    if it hit.
  - A missing or invalid prediction enables all four ways.
* **Wrong way** (the tags hit in a way that was not enabled). The line is read
  again in the next cycle with only the hit way enabled. That costs one
  bubble, and `ev_way_miss` pulses.
* **Cache miss.** `mem_req` pulses with the line address, and
  `mem_rsp_v`/`mem_rsp_data` return the line after any latency. The line is
  written into the LRU way and then re-read with all ways. One refill is
  outstanding at a time.
* **Core stall.** `stall` stops new I-cache reads. Delivered blocks are never
  back-pressured.
* **Commit port.** The core returns, at most once per cycle, each block's
  looked-up instruction on `cmt_v`/`cmt`, with the block's `ftag_t` and, for
  a branch, the resolved direction and target. It must hold the commit while
  `cmt_ready` is low, which happens while the BURQ is full.
  - A mispredicted branch redirects fetch at that commit.
  - The core must discard all younger blocks at that point.
* **Direction predictor.** It is trained and its history shifted at commit.
  A branch that misses in the BTB is predicted not taken.

The `ev_*` outputs pulse once per event: a fetch and its enabled data ways,
BTB ways enabled, wrong way, cache miss, misprediction, BURQ enqueue,
immediate update, BTB write, and BURQ occupancy. Multiplying these counts by
per-way energies gives the fetch energy.

## Parameters

| module | parameter | default |
|---|---|---|
| `wp_frontend` | `IC_SIZE` | 65536 bytes |
| `wp_frontend` | `BTB_ENTRIES` | 2048 |
| `wp_frontend` | `BP_ENTRIES` | 4096 |
| `wp_frontend` | `BP_HIST` | 12 |
| `wp_frontend` | `RESET_PC` | 0 |
| `wpb_pkg` | `IC_WAYS`, `BTB_WAYS` | 4 |
| `wpb_pkg` | `LINE_BYTES` | 32 |
| `wpb_pkg` | `WQ_DEPTH` | 64 |
| `wpb_pkg` | `BURQ_DEPTH` | 8 |

The cache, BTB and predictor sizes are those of the machine the design was
evaluated on: a 64 KB 4-way cache with 32 B lines, and a 2K-entry 4-way BTB.
The WQ and BURQ depths are this implementation's choice. The WQ must be deeper
than the number of blocks that can be in flight. 64 matches a 64-entry
reorder window.

## Where this implementation makes its own choices

* **Fetch width.** The evaluated machine fetches 4 instructions per cycle.
  Here a fetch is a line-wide block: up to 8 instructions, ending at the first
  branch. That gives exactly one BTB lookup and one WQ entry per fetched line.
  A core with a narrower decoder would take the block through a fetch queue.
* **Control transfers.** Branches are recognised with a MIPS-style opcode
  test: opcodes 1–7, plus `jr`/`jalr`. Change `is_ctrl` in `wpb_pkg` for
  another ISA.
* **BTB write policy.**
  - Every committed looked-up instruction writes its entry: allocation on a
    miss, refresh on a hit.
  - Not-taken branches are allocated too, so their fwp is kept.
  - LRU is updated on writes, not on lookups.
  - Way predictions carry a valid bit.
* **Update order.** BURQ requests are written strictly in order. A commit whose
  way is already known still queues behind an older waiting request.
* **Recovery.** Mispredictions are recovered at commit, not at execute.
* **Tags.** The I-cache reads all tag ways on every access. Only the data ways
  are gated.
* **Predictor details.** Direction predictor indexing: address bits [13:2] for
  the bimodal table and the chooser, and the 12 history bits for the global
  table.

## Not included

* The out-of-order core that consumes blocks and returns commits.
* The second-level cache behind the refill port.
* The data cache.

The testbench models the core and the second-level cache behaviourally.

## Testbenches

Each `tb/tb_<module>.sv` drives its block against an independent reference
and ends with `TB_RESULT checks=<n> failures=<n>`. Each has a watchdog.

`tb/tb_wp_frontend.sv` runs the top level with no parameter overrides. The
rest of the machine is modelled behaviourally:

* **Program.** A synthetic program that is also the reference. It has six
  1.5 KB code regions spaced 16 KB apart, so they conflict in the I-cache.
  Branches occur at a density of about one in eight: loops, region jumps,
  biased forward skips and region exits.
* **Core model.** It checks every delivered instruction against the program,
  follows the correct path, commits 6 cycles after fetch and flushes on a
  redirect.
* **Memory model.** A 20-cycle refill memory.
* **Stalls.** A 16-entry fetch queue that raises `stall`.

It runs 6000 blocks in each of the five organisations. It checks that every
mechanism occurred: one-way and all-way fetches, wrong-way re-reads, cache
misses, mispredictions, one-way redirects, BURQ requests, immediate updates,
non-branch hits, stalls, and each organisation. With sharing, it also checks
that most fetches enable one way. A typical run prints:

| cfg | wrong way | branch hit | non-branch hit | one-way fetches | data ways / fetch | BTB ways / lookup |
|---|---|---|---|---|---|---|
| base | 2.0 % | 93.2 % | – | 52.6 % | 2.42 | 4.00 |
| share | 5.5 % | 99.2 % | 90.6 % | 91.5 % | 1.25 | 4.00 |
| 1_3 | 4.0 % | 89.5 % | 95.0 % | 86.3 % | 1.41 | 1.89 |
| 2_2 | 4.6 % | 98.5 % | 90.7 % | 90.4 % | 1.29 | 2.00 |
| 3_1 | 6.2 % | 99.7 % | 76.5 % | 86.1 % | 1.42 | 2.06 |

Covering straight-line code cuts the data ways read per fetch from about 2.4
to about 1.3.

Only a few requests wait in the BURQ at once. A request waits only for the
single fetch that follows its block, and a misprediction flushes everything
younger. So in this run the BURQ never fills, and commit is never held. The
hold on a full BURQ is exercised by the `commit_update` and `burq` unit
testbenches instead.

### Simulating with Verilator

```
verilator --binary --timing --assert -Irtl -y rtl \
  rtl/wpb_pkg.sv tb/tb_wp_frontend.sv --top-module tb_wp_frontend
./obj_dir/Vtb_wp_frontend
```

The same pattern works for each `tb_<module>`.
