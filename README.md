# Early tag access data cache with self-repairing tags

A set-associative data cache normally reads every way of a set, tags and data
alike, and throws away all but one. The early-tag-access (ETA) cache finds the
destination way sooner. When a load or store enters the load/store queue
(LSQ), it is looked up in a copy of the cache's TLB and tag array. If that
lookup hits, the instruction carries the matching way with it. When the
instruction later reaches the cache, only that one way of the tag array and of
the data array is switched on. Instructions without a prediction access the
cache the ordinary way, with all ways active.

Two further ideas from the same source are built here:

* **Tag protection by neighbourhood.** Every tag has a parity bit. Programs
  have spatial locality, so a neighbouring set often holds a line with the
  very same tag. When a tag fails its parity check, the cache looks for that
  copy in the adjacent sets and repairs the tag from it.
* **A count- and parity-filtered search memory.** This is an 8 × 8
  content-search memory (8 words of 8 bits). A search first compares the
  count of 1s and the parity bit of the search word with small segments
  stored beside each word. Only the words that pass have their full match
  line evaluated.

The source describes the search memory and the ETA cache side by side. It
does not say how one feeds the other, so the top level `eta_top` holds them as
two independent units that share only clock and reset.

The design follows the article "Early Tag Access to Improve the Reliability
of the Cache Memory" (IJIRCCE, vol. 4, no. 2, 2016). That article gives the
structure and the rules. It gives no sizes, encodings or handshakes: those
are choices made here, and each module's header comment says which parts are
which.

## Module tree

```
eta_top
├── eta_cache                  early-tag-access data cache
│   ├── tlb        (u_lsq_tlb)   LSQ copy of the TLB
│   ├── tag_array  (u_lsq_tags)  LSQ copy of the tag array, all ways enabled
│   ├── lsq                      load/store queue + predicted-way buffer
│   ├── tlb        (u_dc_tlb)    data cache TLB
│   └── dcache                   cache access stage
│       └── tag_array (u_tags)   tag array with way enables, parity, repair
└── cam_wrapper                 search memory behind two FIFOs
    ├── sync_fifo (input, output)
    └── search_memory
        ├── cam_matrix → cam_cell (8 × 8)
        ├── ones_counter, parity_gen (for written word and search word)
        ├── ml_encoder            count stage, parity stage, match lines, encoder
        └── integrator            matched row → one 8-bit word
```

`eta_pkg` holds the shared types: `mem_op_e` (load/store) and `acc_kind_e`,
which says how the cache served an access.

## How an instruction travels through the ETA cache

**LSQ stage (the cycle of entry).** Address generation presents
`enq_op/enq_va/enq_data`. In the same cycle the LSQ TLB translates the address
and the LSQ tag array compares the tag in all ways of the indexed set. If both
hit, `enq_pred` is high. The way number then goes into the predicted-way
buffer beside the new LSQ entry. A store may enter without its data
(`enq_data_rdy` low); the data arrives later on `sd_valid/sd_idx/sd_data`,
where `sd_idx` is the `enq_idx` the store received.

**Issue.** The oldest entry has the highest priority. It goes to the cache
once it is ready: a load at once, a store once its data is there. Issue is
strictly in program order. Loads and stores to the same address therefore
never pass each other, and no address comparison is needed.

**Cache access stage.** The data cache TLB translates the oldest entry. On a
TLB miss, `tlb_miss` and `tlb_miss_vpn` ask an outside handler for the page.
The handler writes it into both TLBs at once through `tlb_fill_*`. `dcache`
then serves the access in one of four ways (`resp_kind`):

| kind             | what happens                                                                   | tag ways activated | cycles for a load hit |
|------------------|---------------------------------------------------------------------------------|-------------------:|----------------------:|
| `ACC_ONE_WAY`    | predicted way's tag matches; only that way of tag and data arrays is read      | 1                  | 1 |
| `ACC_CONV`       | no prediction; all ways read in parallel (conventional)                        | 2                  | 1 |
| `ACC_MISPREDICT` | predicted way does not hold the line any more; all ways are read next cycle    | 1 + 2              | 2 |
| `ACC_MISS`       | line absent: loads refill from memory, stores are written through              | 2 (or 1 + 2)       | – |

A prediction is only a hint. A line can be replaced between the LSQ lookup and
the cache access. The tag compare of the single active way catches this, so
a wrong prediction costs one cycle and one extra tag read, never wrong data.

The two copies never drift apart. Every TLB fill goes to both TLBs. Every
refill writes the same set, way and tag into both tag arrays (`fill_*` from
`dcache`). Stores do not change tags, because the cache is write-through
without write allocation.

**Completion.** `resp_valid` pulses once per instruction, in program order.
It carries `resp_rdata` for loads and `resp_kind`. `tag_way_en` and
`data_way_en` show in each cycle which ways are switched on, which is the
measure the technique is meant to lower.

### Partial tag comparison

The source describes the LSQ tag array as a full copy, but in one place it
also speaks of partial tag comparison at the LSQ stage. The parameter
`LSQ_TAG_BITS` (default: the full 24-bit tag) sets how many low tag bits the
LSQ copy stores and compares. A smaller value makes the copy cheaper. The
price is that two ways can match partially; the lowest of them is then
predicted, and a wrong guess ends as `ACC_MISPREDICT`. Results stay correct.
With 4 bits, the test traffic below sees about 3% wrong predictions, against
well under 1% with full tags.

### Handshakes

* LSQ enqueue: `enq_valid` is taken when `enq_ready` is high (queue not full).
* `dcache` request: `req_*` is held until `done`. A load hit finishes in the
  same cycle as its deciding lookup.
* Next-level memory: `mem_req_valid/we/addr/wdata` is held until `mem_ack`.
  Read data is taken in the `mem_ack` cycle. A refill takes one lookup cycle
  plus the memory latency; a store takes one lookup cycle plus the
  write-through latency.
* TLB fills are expected only while the cache is idle, that is in answer to
  `tlb_miss` or before traffic starts.

## Tag repair from an adjacent set

`tag_array` stores `^tag` as a parity bit next to each tag. During a lookup,
every enabled and valid way is parity-checked. For a way that fails, the
array searches sets `s-1` and then `s+1` (wrapping at the ends). It looks for
a valid, parity-clean tag that differs from the faulty one in exactly one
bit, which is the signature of a single flipped bit. If it finds one:

* the compare of this same cycle already uses the repaired tag, so a
  one-way access still hits;
* the repaired tag is written back at the clock edge (`err_corrected`).

If no copy exists, the line is invalidated (`err_uncorrectable`) and the
access goes on as a miss. This is safe because the cache is write-through:
memory always holds the current data.

**Limitation.** One parity bit cannot tell which bit flipped. A neighbouring
tag that differs from the *original* in two bits is also one bit away from
the corrupted tag, and would be taken for the copy. That is a false repair,
and it can return another line's data. Random tags make this rare. It is
inherent in repairing from a neighbour with a single parity bit. A stronger
code on the tags would remove it, at the cost of more check bits.

`inj_en/inj_set/inj_way/inj_bit` flip one stored tag bit without updating the
parity, to emulate a transient error. Tie `inj_en` low in use. The LSQ copy
of the tag array has no injection and never sees errors. If the main copy
invalidates a line, the LSQ copy may still predict it; that case ends as
`ACC_MISPREDICT` or `ACC_MISS`.

## The search memory

Each word of `search_memory` has three parts. `cam_matrix` holds the 8 data
bits in `cam_cell`s. The other two are a 4-bit count-of-ones segment and a
parity bit, both computed by `ones_counter` and `parity_gen` when the word is
written. A search (`srch_en`, `srch_data`) works in three steps:

1. **Counting stage:** a word stays enabled only if its stored count equals
   the search word's count.
2. **Parity stage:** of those, a word stays enabled only if its parity equals
   the search parity. An equal count already implies an equal parity, so this
   stage removes nothing more. It is kept because the scheme specifies both
   checks.
3. **Match-line sensing:** only the enabled words have their match line
   formed from the cells' XNOR compare results. `rsp_sensed` reports how many
   were evaluated.

`ml_encoder` turns the match lines into `hit` and the address of the
lowest-numbered match. `integrator` gates that row of the matrix onto an
8-bit output, which is zero on a miss. Results are registered and appear one
clock after the search.

Example: words `00000000`, `00100001`, `10000001`, `00000101`, `00011111`
are stored in lines 0 to 4. A search for `00000101` (two 1s, parity 0) keeps
only lines 1, 2 and 3 after the counting stage. The match line fires for
line 3 alone.

`cam_wrapper` streams search words through an input FIFO and results through
an output FIFO, each 8 deep. Its port names (`clk_in_p`, `reset_in_pn`,
`en_in_p`, `wr_en_in_p`, `rd_en_in_p`, `rd_data_out_p`,
`inputfifo_full_out_p`, `outputfifo_empty_out_p`, `data_rdy_out_p`) are those
of the source's reference simulation. Their behaviour is defined here:

* while `en_in_p` is high, one word per cycle moves from the input FIFO into
  the search memory;
* a word moves only if its result is sure to find room in the output FIFO;
* a result is `{hit, address, data}`;
* `data_rdy_out_p` marks a result entering the output FIFO, two clocks after
  its word left the input FIFO's head.

## Parameters (defaults)

| parameter | default | origin |
|---|---|---|
| `WAYS` | 2 | two ways per tag and data array, as in the source |
| `CAM_WORDS` × `CAM_WIDTH` | 8 × 8 | 8 × 8 matrix, as in the source |
| `SETS` | 64 | own choice |
| `LSQ_DEPTH` | 8 | own choice |
| `LSQ_TAG_BITS` | 24 (full tag) | full copy, as in the source's LSQ description |
| `TLB_ENTRIES` | 8 per TLB, fully associative, round-robin | own choice |
| `VA_W`, `PA_W`, `DATA_W` | 32 | own choice |
| `PAGE_BITS` | 12 (4 KiB pages) | own choice |
| line size | one 32-bit word (`OFF_BITS` = 2) | own choice |
| `FIFO_DEPTH` | 8 | own choice |

The tag is `PA_W − log2(SETS) − OFF_BITS` = 24 bits. The set index lies inside
the page offset, so the LSQ stage and the cache stage index the same set from
either address. Replacement takes the way after the most recently used one,
which is true LRU for two ways.

## What is not built

* The sense-amplifier "auxiliary bit" that the source says speeds up match-line
  sensing. It is a circuit technique whose working is not given.
* The step where "the searched address and page information are updated".
  Nothing says what is updated.
* Power supply, clock generator, the processor's address generation, the
  page-table walker and the memory below the cache. Their signals are ports.

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>`. Each
compares the module with an independent reference model, counts checks, ends
with `TB_RESULT checks=N failures=M`, and has a cycle watchdog.

* `tb_eta_top` runs the whole design at its default parameters. On the cache
  side it sends 3000 loads and stores with locality over 10 pages (60% reuse,
  20% sequential, the rest spread or aimed at two hot sets). It plays the TLB
  miss handler and a memory with 1 to 3 cycles of latency, and injects random
  tag-bit errors. It checks:
  * program order and load values against an architectural reference;
  * the number of tag ways switched on for every instruction.

  It also requires each mechanism to occur at least once: one-way access,
  conventional access, wrong prediction, miss, TLB miss, full LSQ, a store
  waiting for data, tag repair and uncorrectable tag. On the search side it
  streams 500 searches through the FIFOs. A typical run gives about 850
  one-way accesses out of 3000, about 1600 misses (the workload is
  miss-heavy), and about 5200 tag-way activations against 6000 for a
  conventional 2-way cache.
* `tb_eta_cache` is the same traffic on the cache alone, and `tb_eta_partial`
  runs it with `LSQ_TAG_BITS = 4`.
* `tb_dcache` checks kind, tag-way and data-way activation counts and cycle count of every access
  against a tag/LRU model.
* `tb_tag_array` flips bits with a copy on the left, on the right (also
  across the wrap at sets 0 and 63) or nowhere, and checks repair,
  invalidation and that disabled ways stay silent.
* `tb_search_memory` includes the 00000101 example above and checks the
  number of match lines sensed.

The system tests inject errors only into tag bits 23 to 11. Every physical
page in those tests lies below 128, so those bits are zero in every real tag,
and no false repair (see the limitation above) can happen. Random injection
over all bits does occasionally produce one.

Running one testbench with Verilator (5.x), from the directory holding `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/eta_pkg.sv tb/tb_eta_top.sv \
          --top-module tb_eta_top -o sim
./obj_dir/sim
```

Replace `eta_top` with any module name to run its own testbench. Verilator's
lint (`-Wall`) reports only unused signals and the mixed use of reset in
assertions; it reports no latches, loops or multiply driven nets.
