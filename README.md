# Reconfigurable dynamic data cache (RABED)

An embedded application rarely benefits from one fixed cache geometry:
one phase of a program streams through memory and wants long blocks,
another ping-pongs between a few addresses that collide in one set and
wants associativity. This design is a 64 KB data cache that can change both
at run time. It runs as a direct-mapped, 2-way or 4-way set-associative
cache with 16-, 32- or 64-word blocks (nine configurations), and a
controller picks the configuration with the fewest misses. It measures
candidate configurations over short intervals, runs the winner for a
longer phase, and searches again when the phase's miss rate gets too high.

The cache is write-through with LRU replacement. Addresses are 24-bit word
addresses and words are 32 bits wide.

```
             +------------------------- rabed -------------------------+
 processor <-+-> dynamic_red_cache <-----------> red_cache             |
             |        ^  (search, phases,          |- red_way_select   |
             |        |   static/dynamic mode)     |- red_tag_ram      |
 memory   <--+--------+                            |- red_valid_bits   |
             |                                     |- red_data_ram     |
             |                                     |- red_lru          |
             |                                     '- red_hit_miss_counters
             +---------------------------------------------------------+
```

The processor and the memory both attach to `dynamic_red_cache`. It
forwards their traffic to `red_cache` (the reconfigurable cache itself)
and drives its configuration inputs.

## One physical cache, nine logical ones

Storage is always the same base cache: 4 ways × 256 sets × 16-word blocks.
Each block has a 12-bit tag, a valid bit and a 2-bit LRU age. A word
address splits as

| bits  | 23:12 | 11:4      | 3:0         |
|-------|-------|-----------|-------------|
| field | tag   | set index | word offset |

and **this split never changes**. The configuration changes only two things.

**Associativity: which ways an address may use.** The set is always
picked by bits 11:4. The full 12-bit tag is always stored and compared.

| mode          | code | ways allowed for an address              |
|---------------|------|------------------------------------------|
| direct-mapped | 00   | the one way numbered by bits 13:12       |
| 2-way         | 01   | bit 12 = 0: ways 0 and 2; bit 12 = 1: ways 1 and 3 |
| 4-way         | 10   | all four (code 11 behaves the same)      |

The pairing is chosen so that a larger associativity never loses a hit.
The way a direct-mapped address may use is always one of its 2-way
candidates, and every 2-way candidate is a 4-way candidate. So a block
loaded under a smaller associativity is still found after the controller
raises it.

**Block size: how many base blocks are filled together.** A 32-word block
is two base blocks in the same way of two consecutive sets (2k, 2k+1). A
64-word block is four (4k…4k+3). A refill fetches the whole aligned block
from memory, one word at a time in ascending order. It writes each base
block's tag and valid bit as its 16th word arrives. Lookups always check
only the base block at bits 11:4. The LRU ages of all sets of the block
are updated together, so they stay in step.

**Switching without a flush.** Every base block carries its full tag and
sits at its natural set, so it is always a correct copy of the memory words
it names, whatever configuration loaded it. The configuration may change
between any two accesses, and nothing is invalidated.

One thing does follow from this. After the associativity drops, a block
resident in a way that is no longer allowed misses and is loaded again
into an allowed way, so two ways of a set can hold the same block. A
processor write therefore updates **every** valid matching way of the set,
not just the one that counts as the hit. This keeps duplicate copies
identical. Reads may use any of them.

## Replacement: LRU by counters

Every block has a 2-bit age, and within a set the four ages are always a
permutation of 0..3 (reset: way k has age k). Using way w sets its age to
0, and ages every way that was younger than w by one. On a read miss the
victim is the lowest-numbered allowed way that is invalid. If every allowed
way is valid, the victim is the allowed way with the largest age. In
direct-mapped mode the only allowed way is the victim. In 2-way mode the
older of the two candidates is chosen. Because the ages order all four
ways, that is also the LRU order of the pair.

## Write policy

Writes go through to memory every time. There are no dirty bits. A write hit
updates the cached copies and memory. A write miss only writes memory: it
allocates nothing. Both count in the hit and miss counters.

## The Red Cache interface and timing (`red_cache`)

Signal names follow the cache's original interface description. The
handshakes are this implementation's own.

* **Processor.** Raise `procRead` or `procWrite` for one cycle, with
  `procAddr` (and `dataFromProc`), while `busy` is low.
  `setAssociativeMode` and `setBlockSize` are sampled in the same cycle and
  hold for that access. `busy` is high from the next cycle until the
  access is finished.
  * Read hit: `dataReadyForProc` pulses, with `dataToProc`, in the cycle
    right after the request. `busy` is high for that one cycle.
  * Read miss: the block (16, 32 or 64 words) is fetched. One cycle after
    the last word, `dataReadyForProc` pulses with the requested word.
  * Write: one lookup cycle, then one memory write. `busy` falls when the
    memory acknowledges.
* **Memory.** `memRead` or `memWrite` is held, with `addrToMem` and
  `dataToMem`, until the memory answers with a one-cycle `dataReadyFromMem`
  (and `dataFromMem` for reads). The memory acknowledges writes the same
  way. The next request may begin in the cycle after the answer.
* **Counters.** `Hits` and `Misses` (32 bits, wrapping) count every read and
  write. `resetHitMissCounters` clears both at the next edge, and takes
  priority over a count in the same cycle.

The controller FSM is IDLE → LOOKUP → (IDLE | FILL → RESPOND | MEM_WR).
The tag, valid, LRU and data arrays are read combinationally in LOOKUP.
Assertions in `red_cache` check that requests only arrive while idle, that
reads and writes are never raised together, and that a hit is always in an
allowed way.

## Choosing the configuration (`dynamic_red_cache`)

Time is counted in processor accesses.

1. **Stage 1, block size.** Run direct-mapped with 16, then 32, then 64-word
   blocks, for `CDI` = 128 accesses each. The block size with the fewest
   misses wins.
2. **Stage 2, associativity.** With that block size, run 2-way and then
   4-way for 128 accesses each. Direct-mapped at that size has already been
   measured in stage 1. The associativity with the fewest misses wins.
   On a tie, the earlier and smaller setting stays.
3. **Phase.** Run the winner for `PHASE_LEN` accesses. At the end of the
   phase, `hitMissValuesReady` pulses for one cycle. `Hits`, `Misses`,
   `getAssociativeMode` and `getBlockSize` then hold that phase's counts and
   configuration. If the phase's miss rate was above `MISS_THRESH_PCT`
   percent, the search (step 1) starts again. Otherwise another phase
   follows.

The search also runs right after reset. Each search interval ends once its
last access has completed. The controller then takes one update cycle: it
raises `busy`, reads the Red Cache counters and clears them, and applies
the next configuration.

`setCacheConfiguration` = `01` selects this dynamic mode. Any other value
selects static mode: every access uses `staticAssociativeMode` and
`staticBlockSize`, and phases of `PHASE_LEN` accesses are still reported.
The mode is sampled at the first access after reset and then at each
interval end. Switching from static to dynamic starts a fresh search.

### Parameters (of `rabed` and `dynamic_red_cache`)

| parameter         | default | origin |
|-------------------|---------|--------|
| `CDI`             | 128     | the configuration-determination interval of the original design |
| `PHASE_LEN`       | 1024    | this implementation's choice; the original gives no phase length |
| `MISS_THRESH_PCT` | 10      | this implementation's choice; the original gives no threshold value |

The cache geometry (4 ways, 256 sets, 16-word base blocks, 24-bit
addresses, 32-bit words, 12-bit tags) is fixed in `rabed_pkg`. The
way-selection rules depend on exactly four ways and the 12/8/4 address
split, so the geometry is not a module parameter.

## Where this implementation departs from, or adds to, the original design

* **Write policy.** The original names both write-back (in its summary)
  and write-through (in its detailed design, which has no dirty bits).
  This RTL is write-through.
* **Write misses** do not allocate. **Writes update all copies** in the set
  (see above). **Invalid ways are filled before the LRU victim is
  evicted.**
* **Encodings.** The 2-bit codes for associativity (00/01/10) and block size
  (00/01/10) are this implementation's; code 11 acts as 4-way or 64 words.
  `setCacheConfiguration` uses 00 for static and 01 for dynamic, as in the
  original.
* The original sets the static configuration through a method call. Here
  it is two level inputs, `staticAssociativeMode` and `staticBlockSize`.
* **Hits/Misses at the top** report the just-ended phase, because the
  controller clears the Red Cache counters at every interval.
* **Cycle-level handshakes**, reset (asynchronous, active low, clearing the
  valid bits and setting the LRU ages), tie-breaking, and the phase length
  and threshold are all this implementation's own choices.
* The storage is written as plain arrays with combinational read, in the
  spirit of the register files the original used. The data and tag arrays
  map to memories. Valid bits and LRU ages are flip-flops so that reset can
  clear them.

After coarse synthesis the full design is about 1.9 k word-level cells,
3.4 k flip-flops, and 536,576 memory bits (512 Ki data + 12 Ki tag).

## Files

| file | contents |
|------|----------|
| `rtl/rabed_pkg.sv` | widths, sizes, configuration encodings, address-field helpers |
| `rtl/rabed.sv` | top level: controller + cache |
| `rtl/dynamic_red_cache.sv` | configuration search, phases, static mode, forwarding |
| `rtl/red_cache.sv` | reconfigurable cache: controller FSM and wiring of the arrays |
| `rtl/red_way_select.sv` | allowed ways, tag comparators, hit way, victim |
| `rtl/red_data_ram.sv`, `red_tag_ram.sv`, `red_valid_bits.sv`, `red_lru.sv`, `red_hit_miss_counters.sv` | storage and counters |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_main_memory.sv` | behavioural word memory with random latency |
| `tb/tb_ref_pkg.sv` | reference model of hits and misses, used by the cache testbenches |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends. Each has a
cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rabed \
  -Irtl -y rtl -y tb rtl/rabed_pkg.sv tb/tb_ref_pkg.sv tb/tb_rabed.sv
./obj_dir/Vtb_rabed
```

Replace `tb_rabed` with any other `tb_<module>`. `tb_ref_pkg.sv` is only
needed by `tb_rabed` and `tb_red_cache`.

* `tb_rabed` runs the whole design at its default parameters on about 16,000
  accesses, against the behavioural memory. The traffic includes a
  conflict loop that direct-mapped and 2-way thrash, a sequential stream,
  random reads over the whole address space, a stretch in static mode, and
  a return to dynamic mode. Two independent models predict the outcome of
  every access. The first predicts hit or miss. The second predicts the
  configuration the controller must apply, following the search, phase and
  threshold rules. The testbench checks read data, hit latency, refill
  length, the configuration used for every access, and every end-of-phase
  report. It also requires each mechanism to occur at least once: refills
  of each block size, write hits and misses, all nine configurations, a
  finished search, a kept phase, a retune, a static phase, mode switches,
  and update cycles.
* `tb_red_cache` drives the cache alone through all nine configurations,
  switching every 40 accesses. It checks data, hit/miss, timing, refill
  addresses, write-through and the counters.
* `tb_dynamic_red_cache` replaces the cache with a scripted stand-in whose
  miss counts are chosen per configuration. This forces every branch of
  the search: each block size and each associativity winning, ties, and
  phases just under and just over the threshold. It also covers static
  mode and forwarding. It runs with small parameters (CDI = 8,
  PHASE_LEN = 32, 25 %).
* The storage, selection and counter testbenches compare against shadow
  copies and rule-based expectations. `tb_red_way_select` also checks the
  hit-preservation property of the way mapping.

Every testbench runs in well under a second.
