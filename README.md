# Address-interleaved load/store queue with network flow control

A processor with a large instruction window can have hundreds of loads and
stores in flight. When its level-1 data cache is split into banks that sit
at different places on the chip, every bank has to check memory ordering
for the addresses it owns. The natural answer is to give each cache bank its
own slice of the load/store queue (LSQ) and send every memory instruction to
the slice that owns its cache line. Each slice then handles forwarding,
violation detection and store commit for its addresses on its own.

The catch is capacity. Which slice an instruction lands in depends on its
address, so in the worst case every in-flight memory instruction goes to the
same slice. Sizing every slice for that case (256 entries × 4 slices here)
wastes area and power. This design makes the slices small (48 entries by
default) and handles the rare overflow in the on-chip network instead:

* Memory instructions are grouped by age into **blocks** of 32. The oldest
  block is **non-speculative**; the up to seven younger ones are speculative.
* The network hop into each slice has two **virtual channels (VCs)**. VC0
  carries the non-speculative block and always has priority. VC1 carries
  everything else.
* A speculative instruction that finds its slice full just waits in VC1.
  This backs up the speculative network traffic and costs no LSQ entry.
* A non-speculative instruction that finds its slice full cannot wait:
  younger instructions could be holding all the entries, which would
  deadlock. It raises an **overflow flush** request instead.
* When the oldest block commits, the next block becomes non-speculative.
  Its instructions still waiting in VC1 are **promoted** into VC0.

Because the queue slice is indexed by address and not by age, its entries
are in no particular order. Much of this document is about how an unordered
queue still forwards the right value, finds the right violation and commits
stores in program order.

## Ages, blocks and the window

An instruction's age is 8 bits: `{block slot[2:0], LSID[4:0]}`. There are 8
block slots used as a ring, and the load/store ID (LSID) is the
instruction's position within its block. The oldest in-flight block is
given by `head_blk`. All age comparisons are made relative to it:
`age - {head_blk, 5'b0}`, modulo 256. That way the ring can wrap without
ever being reset. `lsq_pkg` holds these types and helper functions. It also
defines the request packet (`mem_req_t`), which carries the age, a
load/store bit, the size (1, 2, 4 or 8 bytes), a 48-bit address and 64 bits
of store data. An access never crosses an 8-byte (doubleword) boundary.

## Inside one partition (`lsq_bank`)

A partition has `LSQ_ENTRIES` slots. Each slot is spread over several
arrays that share the slot number:

| structure | module | content | ports |
|---|---|---|---|
| free list | `free_list` | 1 bit per slot: free or not | allocate 1 per cycle, release any set in 1 cycle |
| address CAM | `addr_cam` | 48-bit address | 1 search, 1 write, 1 read |
| age-table CAM (AT-CAM) | `age_cam` | 8-bit age; search gives older / equal / younger vectors | 1 search, 1 write, 1 read |
| RAM | `lsq_ram` | store data, size, byte offset (69 bits) | 2 read, 1 write |
| indirection table (INT) | `indirection_table` | per age (256 entries): slot number, valid, is-store | 2 read, 1 write |
| Bloom filters | `bloom_filters` | per block: a 32-bit load filter and a 32-bit store filter | insert 1, query all 8 |
| counters | `overflow_counter` | per block counts and a total | |

**Arrival.** An instruction is accepted when `in_valid && in_ready`. It
takes the lowest free slot. Its address, age and data are written to the
slot, and the INT entry for its age gets the slot number. Its block's
counter and its block's load or store Bloom filter are updated.

**Bloom filtering.** A CAM search costs power, and most loads have no older
store to the same address. So each arrival first reads the Bloom filters:

* A load checks the store filters of its own block and all older blocks.
* A store checks the load filters of its own block and all younger blocks.

The hash is `addr[7:3] ^ addr[12:8]`, i.e. the doubleword address folded to
5 bits. A miss in every relevant filter proves there is nothing to find, so
the CAM search is skipped (`bf_filtered`). A hit may be a false positive,
and it triggers the real search (`cam_search`). A block's filters are
cleared in one cycle when the block commits or is flushed.

**Load.** The address CAM gives the slots that hold the same doubleword.
The AT-CAM gives the slots older than the load. ANDed with "occupied" and
"is a store", these are the stores that might forward to the load. They go
to the forwarding unit, described in the next section. A load whose
filters all miss skips the search and is answered in the next cycle with
an empty byte mask: all its bytes come from the cache.

**Store.** The CAM and AT-CAM find younger loads to the same doubleword
that are already in the queue. Those loads executed too early and read a
stale value. If there are any, `viol_valid` reports the age of the oldest
one. The global control must then flush from that load's block.

**Commit.** For the non-speculative block, the INT supplies a 32-bit
vector of which LSIDs of that block are stores held in this partition. The
partition visits those in LSID order, and for each one the INT gives the
slot. The store's address, data and size are read
through the CAM read port and the second RAM port and sent to the cache on
`st_*`, one store per cycle. After that the block's slots (an AT-CAM
same-block search), INT entries, filters and counter are all released in
one cycle, and `commit_done` pulses. A commit of a block with S stores in
this partition takes 2 + S cycles. The INT is what makes this cheap:
without it, finding the next store to commit would mean scanning every
slot.

**Flush.** `flush_valid` with `flush_blk` frees, in one cycle, every slot
whose block is `flush_blk` or younger. It also clears those blocks' INT
entries, filters and counters.

Only one operation runs at a time. While forwarding, committing or
flushing, `in_ready` is low.

## Store forwarding in an unordered queue (`store_forward_unit`)

In a queue indexed by age, the youngest older store is simply the nearest
match going backwards. Here the slots are unordered, so the unit rebuilds
the order:

1. In the arrival cycle, every candidate store sets one bit in a 256-bit
   **matching vector**. The bit is indexed by the store's age relative to
   the oldest block, which the AT-CAM supplies.
2. Each later cycle, the unit takes the highest set bit: the youngest
   remaining older store. The INT turns that age into a slot, and the RAM
   gives the slot's data. Bytes the load still needs, and that this store
   writes, are taken. Then the bit is cleared.
3. The scan ends when every byte of the load is covered or no bits remain.

Counting the arrival cycle as 0, a load that visits K ≥ 1 stores has its
result (`ld_valid`, `ld_data`, `ld_mask`) in cycle K + 1. A load with no
candidate has it in cycle 2. Younger stores override older ones, because
each byte is taken from the first store that supplies it. The bytes left
in `ld_mask = 0` must be read from the cache. Most loads see zero or one
matching store, so the longer scan is rarely paid.

## Overflow handling

### Counting (`overflow_counter`)

There is one counter for each of the 8 blocks plus a cumulative one. The
cumulative counter grows by one per accepted instruction. When a block
leaves, by commit or flush, its count is subtracted.
`full_nonspec = total >= LSQ_ENTRIES`. `full_spec = total >= LSQ_ENTRIES -
RESERVED`. So `RESERVED` entries can be kept for the non-speculative block.
The default is 0, which in the original evaluation was as good as
reserving for almost every program. With 0, the two flags are equal.

### Virtual channels and promotion (`vc_channel`)

Each partition has a `vc_channel` in front of it with two buffers of
`VC_DEPTH` (2) flits.

* Each cycle, the head of VC0 is offered if VC0 is not empty, else the head
  of VC1.
* A VC0 head facing `full_nonspec` is not offered. Instead it holds
  `ovf_flush` high (with `ovf_age`) until a flush comes.
* A VC1 head facing `full_spec` stays put (`spec_stall`). VC1's `in_ready`
  drops once its buffer is full, so the stall spreads back to the ports.

When `head_blk` advances after a commit, flits left in VC0 that belong to
an older block are dropped. One VC1 flit of the new head block, the oldest,
moves to VC0 per cycle while VC0 has room (`promoted`). A flush drops the
flits of the flushed blocks from both channels.

Promotion is the subtle part. The global control has to move `head_blk` in
the same cycle it sees `commit_done`. `commit_done` is therefore raised in
the cycle the last partition finishes, and not a cycle later. Otherwise a
partition that has just become idle would take the next block's flits from
VC1 as speculative, ahead of any promotion. This costs nothing for
correctness, but it takes away the ordering benefit of promotion.

Overflow flushes should be rare. Non-speculative traffic overtakes
speculative traffic at every hop, so the oldest block's instructions
usually reach a partition before younger ones fill it.

### Routing (`bank_xbar`)

`bank_xbar` stands in for the operand network between the execution units
and the partitions:

* `NUM_PORTS` injection ports feed it.
* The partition is chosen by `(address >> log2(LINE_BYTES)) % NUM_BANKS`,
  i.e. whole cache lines are interleaved across partitions.
* The VC is chosen from the block: VC0 for `head_blk`, VC1 otherwise.
* Each (partition, VC) output grants one port per cycle by round robin,
  among ports whose channel has room. A granted port sees `port_ready`.
* A refused port may offer something else next cycle. The issue logic is
  expected to offer non-speculative instructions when it is being refused.

## Top level (`dlsq_top`) and what the rest of the processor must do

`dlsq_top` connects the crossbar to `NUM_BANKS` pairs of `vc_channel` and
`lsq_bank`. Everything that decides block order lives outside: the global
control, the execution units, the data cache banks, the TLBs and the
miss-handling units. Their signals are ports:

| port | direction | meaning |
|---|---|---|
| `head_blk` | in | slot of the oldest in-flight block |
| `port_valid/req/ready[P]` | in/in/out | memory instructions from the execution side |
| `commit_valid`, `commit_blk`, `commit_done` | in/in/out | commit the oldest block; done when every partition has released it |
| `flush_valid`, `flush_blk` | in | flush `flush_blk` and all younger blocks (one cycle) |
| `acc_valid/acc_age[B]` | out | instruction entered partition b this cycle |
| `ld_valid/age/data/mask[B]` | out | load result; bytes with mask 0 come from the cache |
| `viol_valid/age[B]` | out | ordering violation: flush from this load's block |
| `ovf_flush/ovf_age[B]` | out | non-speculative overflow: flush and re-execute |
| `st_valid/addr/data/size[B]` | out | committed store to write into cache bank b |
| `spec_stall`, `promoted`, `cam_search`, `bf_filtered`, `occupancy` | out | activity, per partition |

The global control's side of the contract:

* Issue `commit_valid` only once every instruction of the oldest block has
  entered its partition (`acc_*`) and every load has been answered. Issue
  one commit at a time.
* Advance `head_blk` in the cycle `commit_done` is seen.
* Do not flush the block that is being committed.
* After an overflow flush, throttle: re-issue the oldest block alone until
  it commits, so that it is guaranteed to fit. Otherwise the same overflow
  can repeat.

Assertions in the RTL catch the main violations of these rules, and of the
handshakes.

## Parameters

| parameter | default | where |
|---|---|---|
| `NUM_BANKS` | 4 | partitions = data cache banks |
| `LSQ_ENTRIES` | 48 | entries per partition |
| `RESERVED` | 0 | entries kept for the non-speculative block |
| `VC_DEPTH` | 2 | flits per virtual channel |
| `BF_BITS` | 32 | bits per Bloom filter |
| `NUM_PORTS` | 4 | injection ports (own choice) |
| `LINE_BYTES` | 64 | interleaving granule (own choice) |

The window (8 blocks × 32) and the address width (48) are constants in
`lsq_pkg`.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Each compares the
module against a model written independently inside the testbench. Run one
with:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/lsq_pkg.sv \
    tb/tb_lsq_bank.sv --top-module tb_lsq_bank -o sim
./obj_dir/sim +verilator+rand+reset+2
```

`tb_dlsq_top` runs the whole design at its default parameters. It plays
the rest of the processor:

* execution units that issue out of order;
* a global control that keeps 8 blocks in flight, commits, flushes on
  violations and overflows, and throttles after an overflow;
* a data cache model.

At each commit it checks every load value and the cache contents against
sequential execution. It runs four workloads of 24 blocks each:

* **MIX**: random loads and stores over all partitions.
* **TYP**: each block's 32 loads spread evenly, 8 per partition.
* **WC**: all loads go to partition 0, so up to 256 in flight for 48
  entries.
* **SEQ**: blocks are issued in order to one partition, which makes
  promotion happen.

It fails unless each of these happened at least once: filtered arrival,
CAM search, forwarding, violation flush, VC backpressure, promotion,
overflow flush and commit. It simulates in well under a second.
`tb_dlsq_sizes` runs the same workloads on 40-entry partitions with 4
entries reserved for the non-speculative block.

## Where this RTL departs from the original proposal, and its limits

* **Network.** The mesh of routers is reduced to a one-stage crossbar
  (`bank_xbar`) plus the last VC buffers in front of each partition. Hop
  latency, wormhole routing and promotion inside intermediate routers are
  not modelled.
* **Forwarding scan.** Every store visit merges all its bytes in one cycle.
  The proposal's cost of up to N + 9 cycles for partial merges is not
  reproduced. The scan also stops as soon as the load is fully covered.
* **Ages in the matching vector.** They come from the AT-CAM, which is the
  first of the two suggested optimisations. The second, scanning block by
  block from the youngest older block, is implied by the age order of the
  vector.
* **Violations.** They are detected at doubleword granularity, so two
  accesses to different bytes of one doubleword count as a conflict. This
  is conservative: extra flushes, never missed ones.
* **Loads.** Load target registers are not stored in the RAM; the load's
  age travels with its response instead.
* **Throughput.** A partition accepts at most one instruction per cycle
  and none while it forwards, commits or flushes.
* **Not built.** The alternatives to VCs (NACK-and-retry, skid buffers) are
  not built. Neither are the parts of the surrounding processor: data cache
  banks, dependence predictor, DTLB, miss-handling unit, issue logic and
  global control. The testbench models only what it needs of them.
* **Sizes.** All defaults are the proposal's main configuration except the
  line size and the port count, which it does not give. Other partition
  sizes (it evaluates 32 to 160 entries) and reserved-entry counts are
  parameter settings.
