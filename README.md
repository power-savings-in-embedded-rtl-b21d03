# Decode filter cache front end

In a small embedded core, reading the instruction cache and decoding each
instruction use a large share of the power: over 40 % of it in a
StrongARM-class design. This front end avoids both for most instructions. It
keeps a tiny cache of instructions that are *already decoded*: the decode
filter cache (DFC). When an instruction is served from the DFC, the I-cache is
not read and the decoder is not used. A 16-byte line buffer beside the DFC
catches the sequential fetches the DFC cannot serve. A small predictor names,
before each fetch, the one source to read: line buffer, DFC or I-cache. Only
that array gets a read enable. So a fetch normally costs one small-array read
and no extra cycle.

The RTL is synthesizable SystemVerilog. It covers the fetch and decode
stages of a five-stage in-order pipeline (fetch, decode, execute, mem,
writeback). The decoder, the execute/mem/writeback stages and main memory are
outside it and connect through ports.

## Three sources, one fetch stage

```
 fetch address ──► predictor ──► names the source of the next fetch
        │
        ├──► line buffer ─┐
        ├──► I-cache ─────┴─► latch 1 ─► decoder ─┐
        │        └─► (16-B block into line buffer) ├─► latch 2 ─► execute
        └──► DFC ───────────► latch 5 ────────────┘
```

The latch numbers are the pipeline-register names used throughout the RTL.

* **Line buffer or I-cache.** The raw instruction is written to latch 1. The
  decoder turns it into latch 2 in the next cycle. An I-cache hit also copies
  its 16-byte block into the line buffer. Later fetches in that block can
  then come from the line buffer.
* **DFC.** The fetch stage is gated: no I-cache, no line buffer. The decoded
  instruction goes straight into latch 5. In the next cycle the decode stage
  is gated, and latch 5 moves into latch 2.

Either way, an instruction fetched in cycle N+1 is in latch 2 at the end of
cycle N+2. Downstream timing therefore does not depend on the source. Gating
holds latch 1 unchanged (so the decoder's inputs do not toggle) and drops
`dec_valid`.

## Decoded instructions of different widths

Decoded instructions differ in width. If every instruction had to fit, the
DFC line would be as wide as the widest one. Instead, each instruction is
*cacheable* or *uncacheable* according to its decode width. You choose the
split offline:

1. Profile benchmarks.
2. Sum the execution frequency of each decode width.
3. Sort the widths by size and accumulate their frequencies.
4. Take the widths whose accumulated frequency is within the target
   *cacheable ratio* (for example 90 % of executed instructions).

Because the table is sorted by width, the result is a single threshold.
`cacheable_classifier` compares each decode width with the threshold input
`max_cacheable_width` and with the DFC line width (64 bits).

A 16-byte block of code can therefore mix cacheable and uncacheable
instructions. The DFC handles this as a **sectored cache**:

| per sector | size |
|---|---|
| tag (shared by the sector) | address bits [31:8] |
| valid bits, one per line | 4 |
| lines, one decoded instruction each | 4 × 64 bits |

The cache is direct mapped with 16 sectors, indexed by address bits [7:4].
Bits [3:2] select the line within the sector. An uncacheable instruction
leaves its line invalid, and its neighbours can still hit.

The DFC is filled from the decode stage, not on a miss. The decoded form of an
instruction exists only once it has gone through the decoder. So every
instruction moving from latch 1 to latch 2 is offered to the DFC:

* If its sector holds another block, the sector is reallocated: new tag, all
  valid bits cleared.
* Its line's valid bit is then set to its cacheable flag.
* Its data is stored if it is cacheable.

## The next-fetch-source predictor

This is the part that needs the closest reading (`nfp_predictor`). It has to
decide which source to read **before** the fetch, using only the current
fetch address. Reading all three sources in parallel would save no fetch
power. Reading them one after another would add a bubble on every miss.

**State**

* The next fetch prediction table (NFPT) has one entry per DFC sector (16).
  Each entry holds a 4-bit `partial_tag` and a 4-bit `sector_valid` mask.
* The decode side has `last_decode_addr` and `last_table_entry`.
* The fetch side has `next_fetch_src` (line buffer or DFC) and
  `cur_sector_valid` (4 bits).

**Training (decode side).** Every instruction entering latch 2 presents its
address `decode_addr` and cacheable flag. Instructions that come from the DFC
present cacheable = 1. Then:

1. If `decode_addr` is in a different 16-byte line than `last_decode_addr`,
   `last_table_entry` first moves to the table index of the line just left.
2. The entry at `last_table_entry` gets `partial_tag` = `decode_addr[11:8]`.
   Its `sector_valid` bit for `decode_addr` gets the cacheable flag. If the
   partial tag changed, the other mask bits are cleared first.
3. `last_decode_addr` becomes `decode_addr`.

As a result, the entry of a line describes the line that *followed* it last
time: which of its instructions are in the DFC. Code usually repeats its last
path. So the lookup for "what comes after this line" can use the current
line's address, in the same cycle as the fetch.

**Prediction (fetch side).** Each completed fetch at `fetch_addr` predicts
the source for `fetch_addr + 4`.

* **Same line.** If `next_fetch_src` is the line buffer, predict the line
  buffer. Otherwise predict the DFC if the bit of `fetch_addr + 4` in
  `cur_sector_valid` is set, else the I-cache.
* **Next line.** Read the entry at `fetch_addr[7:4]` and compare its
  partial tag with `fetch_addr[11:8]`.
  * On a match, the mask is copied into `cur_sector_valid` and
    `next_fetch_src` becomes DFC. The source is the DFC if the first mask bit
    is set, else the I-cache.
  * With no match, the source is the I-cache and `next_fetch_src` becomes
    line buffer, because that I-cache line will be copied there.
* **Taken branch.** If the branch is the last instruction of its line, the
  next-line rule is applied to the branch address. The first mask bit then
  stands for the target, even though the target need not be the first
  instruction of its line. For a branch in mid-line there is no prediction,
  and the target is fetched from the I-cache.

Two things make a prediction wrong. The table entry may have been overwritten
by a conflicting sector. Or the path may have changed at a branch. A wrong
DFC prediction costs one bubble (see below). A wrong I-cache prediction costs
only power.

## Misses, branches and stalls

* **Predicted DFC or line buffer misses.** The fetch produces a bubble. The
  same address is fetched from the I-cache in the next cycle. In practice the
  line buffer never misses, because it always holds the block set up by the
  I-cache fetch that switched the predictor to it.
* **I-cache miss.** The fetch waits while the 32-byte line is refilled from
  memory. With the 30-cycle memory assumed in the tests, a fetch that misses
  gets its instruction 33 cycles after the first lookup: lookup, request,
  30 cycles of memory, line write, lookup again. A refill that has started
  always completes, even after a redirect.
* **Taken branch.** Branches are predicted not taken. The execute stage
  raises `ex_redirect` with `ex_target` for the instruction it holds (the one
  on `ex_*`). The front end squashes latches 1 and 5 and the current fetch,
  then fetches the target. The target reaches execute three cycles after the
  redirect when its fetch hits: a two-cycle penalty.
* **Back-end stall.** While `be_stall` is high the whole front end holds.
  `ex_redirect` is ignored during a stall.

## Interface of `dfc_frontend`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (pc = `RESET_PC`, caches and table empty) |
| `max_cacheable_width` | in | 8 | cacheable threshold in bits, from profiling |
| `dec_valid`, `dec_pc`, `dec_instr` | out | 1/32/32 | latch 1 to the external decoder |
| `dec_uop`, `dec_width` | in | 128/8 | decoded instruction and its width, same cycle (combinational decoder) |
| `ex_valid`, `ex_pc`, `ex_uop`, `ex_from_dfc` | out | 1/32/128/1 | latch 2 to execute; `ex_from_dfc` marks a skipped decode |
| `be_stall` | in | 1 | hold the front end this cycle |
| `ex_redirect`, `ex_target` | in | 1/32 | instruction in execute is a taken branch |
| `mem_req`, `mem_addr` | out | 1/32 | I-cache line request, held until `mem_valid` |
| `mem_valid`, `mem_data` | in | 1/256 | the requested line, one-cycle pulse |
| `fe_events` | out | 11 | per-cycle flags: I-cache read/miss, line-buffer read/hit, DFC read/hit, decode, mispredict, redirect, table prediction, predicted branch target |

Decoded instructions are carried 128 bits wide. Cacheable ones occupy the
low 64 bits, and the DFC stores those. `fe_events` is meant for counting
array accesses and decodes, the quantities that set the power.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DFC_SECTORS` | 16 | DFC sectors = predictor table entries |
| `DFC_LINES` | 4 | decoded instructions per sector |
| `LB_BYTES` | 16 | line buffer |
| `IC_BYTES`, `IC_WAYS`, `IC_LINE` | 16384, 4, 32 | L1 I-cache |
| `PTAG_W` | 4 | predictor partial tag bits |
| `RESET_PC` | 0x1000 | first fetch address |

Instructions are 4 bytes and a DFC line is 8 bytes (`dfc_pkg`). The DFC,
line buffer and predictor together are roughly the size of a 32-line, 16-byte
instruction filter cache, the conventional alternative.

## Modules

| file | module |
|---|---|
| `rtl/dfc_pkg.sv` | widths, `fetch_src_e`, `fe_events_t` |
| `rtl/dfc_frontend.sv` | top: fetch control, latches 1, 5, 2, gating, redirect |
| `rtl/decode_filter_cache.sv` | sectored DFC |
| `rtl/nfp_predictor.sv` | next-fetch-source predictor |
| `rtl/line_buffer.sv` | 16-byte line buffer |
| `rtl/icache.sv` | set-associative I-cache, LRU, refill port |
| `rtl/cacheable_classifier.sv` | width threshold |

## Simulating

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. For example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/dfc_pkg.sv rtl/dfc_frontend.sv tb/mem_model.sv tb/tb_dfc_frontend.sv \
  --top-module tb_dfc_frontend -Mdir obj_top -o sim && obj_top/sim
```

Other testbenches build the same way, with their module and testbench file:
`tb_decode_filter_cache`, `tb_nfp_predictor`, `tb_line_buffer`,
`tb_cacheable_classifier`, `tb_icache` (the last also needs `tb/mem_model.sv`).
Each compares the block with a reference model written into the testbench.
Each has a watchdog.

`tb_dfc_frontend` runs the top at its default sizes. It uses a 30-cycle
memory model holding a generated program in a small test instruction set:
branches with trip counts, and plain operations with 48-, 64- or 96-bit
decoded forms, about 10 % of them uncacheable. The program makes three
passes over three loops:

* a 16-instruction loop whose branch ends a line;
* a loop that starts and ends mid-line;
* a 768-byte loop, larger than the DFC, that conflicts with itself.

The test checks:

* the address and the decoded form of every instruction reaching execute;
* the two-cycle taken-branch penalty;
* that each mechanism occurs at least once: DFC hit, DFC misprediction,
  line-buffer hit, I-cache miss, table prediction, predicted branch target,
  gated decode, uncacheable instruction, stall, taken branch.

It also prints the share of fetches that avoided the I-cache and of
instructions that skipped decode.

`tb_cacheable_ratio_sweep` runs one program four times, with thresholds
that make about 90, 80, 70 and 60 % of the executed instructions cacheable.
It checks correctness in each run. It also checks that fewer instructions
skip decode as the ratio falls.

## Where this design makes its own choices

The structure and the rules above follow the published description of the
decode filter cache. These points are this design's own:

* **Miss recovery.** After a wrong line-buffer or DFC prediction, the retry
  goes to the I-cache.
* **Branch targets with no prediction.** These are fetched from the I-cache.
* **DFC sector reallocation.** A sector is reallocated on any decoded
  instruction from another block, cacheable or not. This mirrors the table
  training.
* **Table masks.** A table mask is cleared when its entry receives a
  different partial tag.
* **DFC instructions train the table.** Instructions served from the DFC
  also train the table, as cacheable. Without this, a line served wholly from
  the DFC would break the line-to-line chain.
* **Partial-tag comparison.** It uses the tag bits of the current fetch
  address, not those of the next one. The two differ only across a 256-byte
  boundary.
* **I-cache internals.** The replacement policy (true LRU), the refill
  handshake and the 1-cycle lookup are this design's.
* **Line-buffer fill.** The line buffer receives the 16-byte half of the
  32-byte I-cache line that holds the fetch.
* **Interfaces.** The widths of the decoded-instruction bus (128 bits) and
  of the decode-width field (8 bits), the decoder and back-end interfaces,
  the stall input and the reset address are assumptions.

## Not included

* **Decoder.** No instruction set or decoded format is fixed, so the decoder
  stays outside (`dec_*`).
* **Back end and memory.** Execute/mem/writeback, the data cache and main
  memory are not part of this RTL.
* **Run-time cacheable ratio.** A mode that picks cacheable instructions at
  run time to meet a target ratio is not built. It is an evaluation method,
  not hardware. The threshold input covers the same configurations.
* **Comparison configurations.** A predictor-less, serially accessed DFC
  and a plain instruction filter cache are not built.
