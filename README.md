# History-based tag comparison for a direct-mapped instruction cache

A direct-mapped I-cache normally reads and compares its tag on every fetch,
yet once an instruction has been fetched, it cannot leave the cache until the
next miss. Programs dominated by loops (media kernels are the typical case)
therefore pay for a great many tag checks whose answer is already known.

This design removes those checks by remembering *which stretches of code have
been fetched in full since the last miss*. The memory for that is the branch
target buffer (BTB) the processor already has: every BTB entry gets two extra
bits, the **execution footprints**:

* **T** – the block that starts at the branch's *target* is in the cache;
* **F** – the block that starts at the branch's *fall-through* address is in the cache.

A block runs from its start address to the next branch that is registered in
the BTB. When the fetch reaches a branch that hits in the BTB, the footprint
for the predicted direction says whether the block about to be fetched is
known to be resident. If it is, the cache fetches that whole block without
touching its tag array. If it is not, the cache checks tags as usual and
records the footprint once the block has been fetched to its end without a
miss. Any miss, and any BTB eviction, wipes every footprint.

The default configuration is a 16 KB direct-mapped cache with 32-byte lines
and a data array in 4 subbanks, beside a 512-set, 4-way BTB.

## Operation modes

The mode controller is always in one of three modes:

| Mode | Tag check | What it does |
|------|-----------|--------------|
| Normal (N) | every fetch | plain cache behaviour |
| Omitting (O) | none | the tag array is idle; every fetch is a hit |
| Tracing (T) | every fetch | as Normal, and the block being fetched gets its footprint set at the next BTB hit |

On every completed fetch that hits in the BTB:

1. Flags T and F of the hit entry are read together with the lookup.
2. The predicted direction selects one: T if taken, F if not taken.
3. If it is set, the mode becomes Omitting. If it is clear, the mode becomes
   Tracing, and the Previous Branch Address (PBA) register takes the branch
   address and the predicted direction.
4. If the controller was *already* in Tracing mode, there has been no miss
   since the previous BTB hit. So the whole block from the PBA's branch to
   the current branch is resident. The flag named by the PBA register (T or
   F of that entry) is set. This happens whatever the new mode is.

Leaving to Normal mode:

* **I-cache miss** or **BTB replacement**: every T and F flag in the BTB is
  cleared, and the mode becomes Normal. A miss can evict part of any block. An
  evicted BTB entry may have been the end marker of a block whose footprint is
  valid.
* **Branch misprediction** or a **target from the return address stack**:
  the mode becomes Normal and the footprints are kept.

Footprints are never rolled back after a misprediction. A footprint only
says that a range of addresses is resident. That is true whether or not the
fetch that proved it was on the correct path.

### Worked example

Take an inner loop closed by branch C and an outer loop closed by branch D,
with T of C already set. The tag checks go like this:

* C is predicted taken and T(C)=1, so the next trip round the inner loop runs
  in Omitting mode.
* C is predicted not taken and F(C)=0, so the mode becomes Tracing and
  PBA=(C, not taken).
* At D (taken, T(D)=0) the mode stays Tracing. Because this is a
  Tracing-mode hit, F(C) is set, and PBA becomes (D, taken).
* At the next C, F(C)=1 gives Omitting mode. This is again a hit seen in
  Tracing mode, so T(D) is set.
* From then on both loops run in Omitting mode until a miss, a replacement
  or a misprediction.

`tb/tb_hbtc_mode_ctrl.sv` replays exactly this sequence.

## Timing and stalls

* **Hit:** the cache and the BTB answer in the fetch cycle. Their arrays have
  an asynchronous read.
* **Miss:** `miss` pulses, `mem_req` is sent in the same cycle, and the line
  comes back in one beat. It is written at that clock edge, and the retried
  fetch hits in the next cycle. With a memory that answers in L cycles, the
  fetch stalls for L+1 cycles. The testbenches use L=5, which gives the
  6-cycle miss penalty of the reference configuration.
* **Footprint write:** the BTB has one port, and the write goes to a
  different entry from the lookup. So the write takes the cycle after the
  Tracing-mode BTB hit, and the fetch stalls for that one cycle
  (`ctrl_stall`).
* **Footprint clear:** this starts the cycle after the miss or replacement
  and holds the BTB port for `INV_PENALTY` cycles (default 1). On a miss it
  runs in parallel with the refill, so it costs nothing while it is shorter
  than the miss penalty.
* **Mode changes** take effect from the fetch after the BTB hit that causes
  them. The branch instruction itself is the last fetch of the old block.

## Structure

| File | Role |
|------|------|
| `rtl/hbtc_pkg.sv` | mode enum (`NMODE/OMODE/TMODE`), address width, PBA struct |
| `rtl/dm_icache.sv` | direct-mapped cache: tag+valid array, data array in `SUBBANKS` subbanks, refill FSM, `omit_tag` input |
| `rtl/hbtc_btb.sv` | set-associative LRU BTB with T/F flags, footprint set port, flash clear, `replaced` pulse |
| `rtl/pba_reg.sv` | Previous Branch Address register (address, direction, valid) |
| `rtl/hbtc_mode_ctrl.sv` | mode FSM, PBA register, footprint write/clear sequencing, stall |
| `rtl/hbtc_icache.sv` | top: wires the four parts together |

### Top-level interface (`hbtc_icache`)

* **Fetch:** `fetch_valid`, `fetch_pc` in; `fetch_ready`, `fetch_data`
  (64 bits) out. Hold the request until `fetch_ready`.
* **Prediction:** `btb_hit` and `btb_target` come out in the fetch cycle. The
  processor answers in the same cycle with `pred_taken` and `ras_used`. Both
  are sampled only when the fetch completes. `mispredict` may pulse in any
  cycle.
* **BTB registration:** `upd_en`, `upd_pc`, `upd_target`. The processor
  registers taken branches and changed targets here.
* **Memory:** `mem_req`/`mem_addr` send a line request. `mem_rvalid`/`mem_rdata`
  return the 256-bit line.
* **Observation:** `mode`, `tag_rd` (the tag array is read),
  `bank_en` (the one-hot data subbank enable), `cache_miss`, `refill_busy`,
  `btb_replaced`, `fp_write`, `fp_clear`, `ctrl_stall`. Counting `tag_rd`,
  `bank_en` and `fp_write` over a run gives the activity an energy model
  needs.

### Parameters

| Parameter | Default | Origin |
|-----------|---------|--------|
| `CACHE_BYTES` | 16384 | reference configuration |
| `LINE_BYTES` | 32 | reference configuration |
| `SUBBANKS` | 4 | reference configuration |
| `BTB_WAYS` | 4 | reference configuration |
| `BTB_SETS` | 512 | usual default of the out-of-order simulator the scheme was evaluated on; this design's choice |
| `INST_BYTES` | 8 | one subbank word per fetch; this design's choice |
| `INV_PENALTY` | 1 | reference configuration; values from 1 to 32 were studied |

The cache-size range (4–64 KB), BTB associativities from 1 to 32 and the
longer clear penalties that the scheme was studied with can all be built by
setting these parameters.

## Design choices beyond the scheme

The scheme fixes the modes, the flags, the PBA register and the
invalidation rules. These details are this implementation's own:

* **Fetch word:** one fetch returns one 8-byte word, which is one subbank
  word. BTB indexing ignores the low 3 address bits.
* **Refill:** one request, one single-beat response. Reset clears only the
  valid bits.
* **Replacement:** the BTB uses LRU. Registering a branch into an empty way
  is not a replacement. When a lookup and a registration hit the same set in
  the same cycle, the lookup counts first.
* **Target change:** when a registration changes a branch's target, that
  entry's T flag is cleared. The old T described a different block.
* **Footprint write:** the write finds its entry by the branch address held
  in the PBA register. If the entry is gone, the write does nothing.
* **Simultaneous events:** invalidation beats misprediction/RAS, which beats
  the flag decision. A PBA valid bit is cleared on invalidation.
* **No overlap with fetch:** the cache and the BTB are not accessed while
  the controller holds the BTB port. This is checked by assertions in
  `hbtc_btb` and `hbtc_mode_ctrl`.

Not included:

* the processor, its direction predictor and its return address stack (all
  represented by top-level ports);
* the next-level memory;
* the extra BTB port that would remove the footprint-write stall (it was
  only suggested, not part of the scheme);
* the "interline" tag-comparison technique that the scheme was compared and
  combined with.

## Verification

Each block has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`:

* `tb_dm_icache`: full-size cache against a reference tag store. It checks
  hit/miss, data, a miss penalty of exactly 6 cycles, `tag_rd` and the
  one-hot subbank enable, and that with the check omitted no tag is read and
  no miss is taken.
* `tb_hbtc_btb`: an 8-set × 4-way BTB against a recency-ordered reference
  model under random lookups, registrations, footprint sets and clears. It
  covers evictions and target changes.
* `tb_pba_reg`: random load/clear sequences.
* `tb_hbtc_mode_ctrl`: the worked example above, step by step, then 20,000
  random cycles against a reference model of the mode rules, with a 3-cycle
  clear.
* `tb_hbtc_icache`: the whole design at default parameters. A processor
  model runs nested loops, indirect calls into code that conflicts with the
  loop in both the cache and the BTB, returns through the RAS, and random
  mispredictions.
  * It checks every fetched word, including all fetches made with the tag
    check omitted, against memory.
  * It checks that each miss costs 6 cycles and that each footprint write
    stalls for one.
  * It requires that omission, Omitting and Tracing entries, footprint
    writes, clears on miss and on replacement, and the misprediction and RAS
    exits all occur.
  * In a typical run about 60% of the fetches skip the tag check.
* `tb_hbtc_sweep`: the same program on six other configurations side by
  side (through `tb_hbtc_sweep_run`): 4 KB and 64 KB caches, 1-way and
  32-way BTBs, and clear penalties of 4 and 32 cycles. With a 32-cycle clear
  the stall after a miss grows to 33 cycles, because the clear no longer
  hides inside the refill. The testbench checks that too.

`tb/tb_line_mem.sv` is the behavioural memory used by the cache testbenches.
The word at byte address `a` is `{~a, a}`.

### Running a testbench

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hbtc_icache \
  rtl/hbtc_pkg.sv rtl/pba_reg.sv rtl/dm_icache.sv rtl/hbtc_btb.sv \
  rtl/hbtc_mode_ctrl.sv rtl/hbtc_icache.sv tb/tb_line_mem.sv tb/tb_hbtc_icache.sv
./obj_dir/Vtb_hbtc_icache
```

Swap in another testbench name and drop the files it does not need (the
sweep also needs `tb/tb_hbtc_sweep_run.sv`). Every
testbench finishes in well under a second.

## Limits

* **Array timing:** the tag, data and BTB arrays are behavioural memories
  with asynchronous read. Mapping them onto synchronous SRAM macros would
  move the hit and lookup results one cycle later, and the mode controller's
  timing would have to follow.
* **Misprediction timing:** `mispredict` is taken in the cycle it is
  reported. A deep pipeline would report it later, after wrong-path fetches.
  Those fetches stay safe, because the blocks they run through are resident.
  But their BTB hits can move the controller to Omitting or Tracing mode
  before the misprediction returns it to Normal mode.
* **Synthesis:** the footprint clear is a one-cycle flash clear of
  2 × 2048 flag bits. That is simple in RTL but a wide reset net in silicon.
  `INV_PENALTY` models a slower clear, but the RTL still clears in the first
  cycle.
