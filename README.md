# Path ORAM controller with a Last Path Cache

Path ORAM hides which memory block a processor is using. It does this by
making every access look like a read and a write of one random root-to-leaf
path of a binary tree kept in untrusted memory. The price is bandwidth: one
block costs 2·(L+1)·Z block transfers. For a 24-level tree with 4 slots per
bucket that is 192.

Two successive paths always share their top levels: at least the root, and
about one more level for every further leading bit their leaf IDs share.
Plain Path ORAM writes those shared buckets back at the end of one access and
reads them again at the start of the next. That round trip is wasted, and
dropping it reveals nothing. Which buckets are shared depends only on the
two path IDs, and those IDs are public anyway.

This RTL removes the round trip with a **Last Path Cache (LPC)**. The LPC
never holds a copy of any data. The blocks written to the last path simply
stay valid in the on-chip stash. A small pointer array, (L+1)·Z stash
indices (768 bits at the default size), remembers which stash entries they
are. Each level of the LPC behaves in one of two ways:

* **Delay** (write-back), levels `0 .. THRESHOLD-1`, near the root. A bucket
  is not written to memory at all while the next path still covers it. It is
  written only once a later path leaves it.
* **Reuse** (write-through), levels `THRESHOLD .. L`, near the leaves. Every
  bucket is written as in plain Path ORAM, but a shared bucket is not read
  again.

Delay saves both the read and the write of a shared bucket, but it lengthens
the time between reading a bucket and writing it back. That costs DRAM
row-buffer hits, and mostly near the leaves. Deep levels are rarely shared,
so Reuse loses little there. The default `THRESHOLD = 8` (8 Delay levels and
16 Reuse levels) was the best balance found for a 24-level tree.
`THRESHOLD = 0` gives pure Reuse and `THRESHOLD = L+1` gives pure Delay.

An optional **reordering window** sits in front of the controller. It issues
pending requests in one sweep over leaf-ID order, so successive paths share
more levels.

## What is in the RTL

```
oram_system                  top: window + controller
├── request_window           reordering window (WINDOW requests)
└── oram_controller          Path ORAM controller with LPC
    ├── stash_cam            address CAM of the stash: hit search, free entry
    ├── stash_ram            tag RAM of the stash: {address, leaf ID}
    ├── binary_heap          min-heap ordering stash blocks for write-back
    ├── lpc                  pointer array + last path + overlap test
    └── xorshift_rng         new leaf IDs
oram_pkg                     controller state type, shared helper
```

The controller is a minimal Path ORAM controller. It has no position map:
each request carries the block's current leaf ID, and the answer returns the
new one. It stores no tree: memory is reached through three streams (read
request, read response, write request). The stash holds tags only, meaning
the block address and the leaf ID. No block data passes through the design
and nothing is encrypted. A full system would add block data, AES, a position
map (or a recursive ORAM) and a DRAM controller around these streams.

## One access, step by step

The request is for address `A`, which currently sits on leaf `x`. The last
path written is `p`. A level `l` is *shared* when `x` and `p` agree in their
`l` most significant bits. The shared levels always form a prefix
`0 .. k`.

1. **Stash search (`S_LOOKUP`).** The CAM compares `A` with every valid
   stash entry in the same cycle. LPC blocks are valid stash entries, so this
   also searches the LPC, at no extra cost. On a hit the block's leaf is read
   from the tag RAM and the answer goes out: `rsp_hit=1`, plus
   `rsp_lpc=1` if the block was held for the LPC. The leaf does not change
   and memory is not touched. From request acceptance to answer takes
   3 cycles (4 through the window).
2. **Remap.** On a miss, the low `L` bits of the Xorshift generator become
   `A`'s new leaf.
3. **Hand back shared levels (`S_PREP`).** For each shared level, every valid
   LPC pointer is cleared and its stash entry becomes an ordinary stash block
   again. These buckets are not read from memory.
4. **Build the heap (`S_SCAN`).** Every ordinary stash block is pushed into
   the min-heap with key `leaf XOR x`. This includes blocks left over from
   earlier accesses and the blocks from step 3. The key changes with `x`, so
   the heap is rebuilt on every miss: one scan over the stash, 2 cycles per
   valid entry and 1 per empty one, plus sift cycles.
5. **Path read (`S_RD_REQ`, `S_RD_RSP`).** The controller sends one read
   request per *non-shared* level, root first. With treetop caching on, the
   levels below `TREETOP` are skipped as well. Each request returns `Z` tag
   beats. A real block takes the lowest free stash entry and joins the heap.
   If it is `A`, it is given its new leaf on the way in. If `A` was not on
   the path (it was never written), a fresh entry is created for it
   (`S_RD_DONE`).
6. **Answer (`S_RESP_MISS`).** The answer carries `rsp_hit=0` and the new
   leaf.
7. **Write-back, leaf level up to the root.** With treetop caching on, it
   stops at level `TREETOP`. For each level `l`:
   * *Retire the old bucket (`S_WB_OLD`).* This applies only when `l` is not
     shared, so the LPC still holds bucket `(p, l)`. On a Delay level its `Z`
     slots are written to memory **at path `p`**, real blocks and dummies
     alike, and the blocks leave the stash. On a Reuse level memory already
     has them, so they just leave the stash.
   * *Fill the new bucket (`S_WB_NEW`).* For each of the `Z` slots: if the
     heap head's key satisfies `key >> (L-l) == 0` (the block may live at
     level `l` of `x`), it is popped. Its stash index goes into LPC slot
     `(l, s)` and the entry stays valid, now marked as held for the LPC.
     Otherwise the slot is recorded as empty. On a Reuse level each slot,
     real or dummy, is also written to memory **at path `x`**. On a Delay
     level nothing goes to memory yet.
8. **Finish.** `x` becomes the last path and the heap is cleared. Blocks that
   found no slot stay in the stash as ordinary blocks.

The smallest XOR key means the longest common prefix with `x`, so the heap
head is always the block that can go deepest. Taking blocks from the head
while the fit test holds places every block as deep as the free slots allow.

## Memory traffic, and why it is safe

For a miss on path `x` after path `p`, with `k+1` shared levels (`0 .. k`):

| traffic | count |
|---|---|
| bucket reads | `L - k` (levels `k+1 .. L`), each `Z` beats |
| slot writes at path `p` | `Z` per Delay level in `k+1 .. THRESHOLD-1` |
| slot writes at path `x` | `Z` per Reuse level, `(L+1-THRESHOLD)·Z` in all |

Before the first miss after reset no path is recorded. Nothing is then
shared and nothing is retired.

All three counts depend only on `x`, `p` and the parameters, never on the
addresses or on which blocks hit. Each counted group goes out in a fixed
order. Reads go from the root down. Writes go from the leaf up, and within a
level the old bucket comes before the new one. A stash hit causes no traffic
at all, exactly as in plain Path ORAM. The end-to-end testbench checks every
count, level by level, on every access.

## Interfaces

All streams use valid/ready handshakes. A transfer happens on a clock edge
where both are high. An output held with `valid` high keeps its value until
it is taken; assertions in `oram_controller` check this. Levels run from 0
(root) to `L` (leaf). A path is named by its leaf ID, whose most significant
bit picks the branch below the root.

| group | signals | notes |
|---|---|---|
| request | `req_valid/ready`, `req_addr[ADDR_W]`, `req_leaf[L]` | `req_leaf` comes from the position map |
| answer | `rsp_valid/ready`, `rsp_addr`, `rsp_hit`, `rsp_lpc`, `rsp_leaf[L]` | `rsp_leaf` goes back into the position map |
| read request | `rd_req_valid/ready`, `rd_req_path[L]`, `rd_req_level` | one per bucket |
| read response | `rd_rsp_valid/ready`, `rd_rsp_real`, `rd_rsp_addr`, `rd_rsp_leaf` | `Z` beats per request, slot order |
| write request | `wr_valid/ready`, `wr_path`, `wr_level`, `wr_slot`, `wr_real`, `wr_addr`, `wr_leaf` | one per slot; `wr_real=0` is a dummy |
| status | `stash_overflow` (sticky), `stash_used`, `idle` | |

With the window in place (`oram_system`, `WINDOW > 0`), answers can come back
in a different order from the requests. `rsp_addr` says which request an
answer belongs to. A core must not have two requests for the same address
pending at the same time.

Reset is asynchronous and active low. It empties the stash, the heap, the
LPC and the window, and reloads the generator seed.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `L` | 23 | tree height; levels 0..L, 2^L leaves |
| `Z` | 4 | slots per bucket |
| `STASH_SIZE` | 256 | stash entries, LPC-held blocks included |
| `THRESHOLD` | 8 | levels below it are Delay, the rest Reuse |
| `TREETOP` | 0 | treetop caching: levels below it stay in the stash (at most `L`) |
| `ADDR_W` | 32 | block address width |
| `WINDOW` | 8 | reordering window (`oram_system` only); 0 = none |
| `SEED` | `32'h2545F491` | Xorshift seed, non-zero |

`L`, `Z`, the stash size, the threshold and the window sizes (4 and 8) are
those of the reference configuration. Hardware was evaluated at
L = 14, 17, 20 and 23. The other defaults are choices made for this RTL.

`TREETOP = k` adds treetop caching on top of the LPC. Levels `0 .. k-1` are
never read or written, and the blocks that would be placed there simply stay
in the stash. Reads skip those levels the same way they skip shared ones, and
the write-back stops after level `k`. The LPC never holds a treetop level.
The stash then has to absorb up to `(2^k - 1)·Z` more blocks: 28 for
`k = 3`. The reference hardware has no treetop cache, so the default is 0.
Its evaluation combines the two caches with `k` from 1 to 3. The traffic
table above then holds with the levels below `k` removed from every row.

## Choices made here, and limits

The reference design describes what each part does but leaves many details
open. The following are this RTL's own choices:

* **Stream formats.** There is one read request per bucket, answered by `Z`
  tag beats, and one write request per slot. The answer stream back to the
  core and the `idle` output are additions.
* **Heap rebuild.** The heap is rebuilt by scanning the stash at every miss.
  This costs about `STASH_SIZE` to `2·STASH_SIZE` cycles per access. A heap
  that re-keys in place would be faster; the reference does not say how it
  handles this.
* **Sift timing.** Heap sifts move one level per cycle, so one push or pop
  takes up to `1 + log2(STASH_SIZE)` cycles.
* **Write-back pace.** Write-back handles one slot per cycle at best. The
  heap pop and the tag-RAM read add cycles per real block.
* **Never-written blocks.** A block that was never written is created on its
  first miss.
* **Stash overflow.** A block read while the stash is full is dropped, and
  `stash_overflow` rises and stays high. The stash must be sized so that this
  practically never happens. Note that LPC-held blocks (up to `(L+1)·Z`,
  96 by default) share the stash with the ordinary ones.
* **Window rule.** The window issues the request with the smallest leaf ID
  above the last issued one, and otherwise wraps to the smallest. Ties go to
  the lowest slot. It issues only real requests and never inserts dummies.
* **Hits and the window.** A stash hit does not remap its block and does not
  change the LPC. The window still counts the hit's leaf ID as the last one
  issued when it picks the next request.
* **CAM.** The stash CAM is a plain register array with parallel compare. A
  vendor CAM could replace it behind the same ports.

Not included: block data, encryption, the position map and the DRAM side.
Dummy accesses are not included either. A system that must hide when it
accesses memory issues them whenever no real request is waiting. Here a core
that wants them has to send its own requests on random paths.

Some lint warnings remain, and none of them is a circuit problem:

* `rst_n` reaches the assertion `disable iff` clauses as well as the
  flip-flop resets.
* `heap_pop_ready` and `heap_count` are unused in the controller.
* The upper 9 bits of the 32-bit generator output are unused when `L = 23`.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs.

| testbench | what it exercises |
|---|---|
| `tb_xorshift_rng` | 1000 outputs against the xorshift32 recurrence; hold; reset |
| `tb_stash_ram` | random reads and writes against a model; read latency of 1 cycle |
| `tb_stash_cam` | random insert, invalidate and search against a model; lowest free entry; count; full CAM |
| `tb_lpc` | pointer reads in the same cycle; overlap test against a bit-by-bit reference |
| `tb_binary_heap` | random push/pop against a sorted model; full and drain; sift latency ≤ log2(DEPTH) |
| `tb_request_window` | issue order against a model of the one-way rule; forward picks and wrap-arounds both occur |
| `tb_oram_controller` | end to end at L=4, Z=2, 32-entry stash, THRESHOLD=2, 400 accesses; a second run at L=5, THRESHOLD=3, TREETOP=2 (details below) |
| `tb_oram_system` | window + controller at L=5, window of 4, 600 requests with up to 4 outstanding; checks that answers are reordered |
| `tb_oram_full` | `oram_system` at its default parameters, 1000 accesses to 40 blocks |
| `tb_oram_sizes` | `oram_system` at L = 14, 17 and 20 (the other evaluated heights), 600 accesses each, same checks |
| `tb_oram_traffic` | memory traffic at full size for Reuse, Delay/Reuse and Delay, with the window and with treetop caching (below) |

The end-to-end tests share `tb/oram_env.sv`. It models the core, with its
position map, and the tree, as a sparse map of slots that empties a bucket
when the bucket is read. It toggles every ready and valid signal at random.
It checks:

* **Hits.** A hit keeps the block's leaf, touches no memory, and has the same
  latency whether or not the block was held for the LPC.
* **Misses.** A miss on a known block finds the block on the path read.
* **Traffic.** Reads and writes match the table above, level by level and in
  order.
* **Block placement.** Every real block written lies on its own path and
  carries its current leaf.
* **No duplicates.** No block is stored twice in the tree.

It also counts how often each mechanism occurred and fails any mechanism
that never occurred. The mechanisms are: stash hits on ordinary and on
LPC-held blocks, misses served from memory, created blocks, skipped shared
reads, Delay writes (real and dummy) and Reuse writes (real and dummy).
`tb_oram_controller` also runs a second controller with an 8-entry stash fed
with full buckets, to make `stash_overflow` rise.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_oram_controller \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/oram_pkg.sv tb/tb_oram_controller.sv
./obj_dir/Vtb_oram_controller +verilator+rand+reset+2
```

`tb_oram_full` takes about a second at full size (L = 23, 256-entry stash).
The controller's cost per access is dominated by the stash scan and the
`L+1` levels of write-back.

`tb_oram_traffic` runs seven full-size designs side by side (L = 23, Z = 4,
256-entry stash). Each gets 3000 misses to fresh blocks on random paths, and
memory answers every read with dummies. The designs are five controllers
with THRESHOLD 0, 2, 4, 8 and 24, `oram_system` with a window of 8 that is
kept full, and the THRESHOLD 8 controller with `TREETOP = 3`. Plain Path ORAM
moves 2·24·4 = 192 slots per access. Two random paths share about two levels:
the root plus, on average, one more. So Reuse should save about
2/48 ≈ 4.2 % of the slot traffic, and Delay and the hybrid about
4/48 ≈ 8.3 %. With `t` Delay levels, a shared level among `0 .. t-1` also
saves its write. Level `i` is shared with probability 2^-i, so this adds
1 + 1/2 + … + 2^-(t-1) levels of writes: 7.3 % at
`t = 2` and 8.1 % at `t = 4`. The saving is near its limit by `t = 8`. With
three treetop levels the saving should be about
(3 + 0.25)·2/48 ≈ 13.5 %: the three levels plus a quarter level shared below
them. One run measured:

| design | slots per access | saving | peak stash |
|---|---|---|---|
| Reuse (THRESHOLD 0) | 184.1 | 4.10 % | 11 |
| THRESHOLD 2 | 177.8 | 7.40 % | 9 |
| THRESHOLD 4 | 176.7 | 7.96 % | 10 |
| Delay/Reuse (THRESHOLD 8) | 176.1 | 8.30 % | 10 |
| Delay (THRESHOLD 24) | 175.8 | 8.45 % | 11 |
| Delay/Reuse + window of 8 | 160.3 | 16.50 % | 15 |
| Delay/Reuse + treetop 3 | 166.2 | 13.45 % | 20 |

The test accepts each computed saving within 0.6 points of its estimate. It
requires the saving to rise with the threshold, and THRESHOLD 8 to be within
half a point of pure Delay. It requires the window to add at least 5 points; with eight sorted leaves,
neighbours share about three more levels. It also requires treetop caching to
raise the peak stash fill. The peaks are low because memory here returns no
real blocks.

The tests check that the protocol behaves as intended, that no block is lost,
and that the memory traffic is exactly the count given above. Apart from the
slot counts above, they do not check the performance figures reported for the
original scheme (execution
time on application traces, DRAM row-buffer behaviour). Those need a
processor and DRAM simulator, which is outside this RTL. The RTL is
synthesizable, but it has not been timed or placed on an FPGA.
