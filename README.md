# 32-bit dictionary compressor and decompressor

This is a small lossless compressor in the XMatchPro family. It works on
four-byte *tuples*, one per clock. Each tuple is looked up at once in a
64-entry dictionary of tuples it has seen before:

- **Match.** If the tuple is in the dictionary, the compressor emits only
  its 6-bit location.
- **Miss.** If it is not, the compressor emits the tuple itself as a
  literal and adds it to the dictionary, so that later copies of it match.

The decompressor rebuilds the same dictionary from the same literals. So a
location always means the same tuple on both sides, and the original
stream comes back bit for bit.

Because every entry is searched in one clock, the rate does not depend on
the data: one tuple (32 bits) in per clock, one code out per clock.

```
            +----------------------- xmatch_compressor -----------------------+
 data ----->|--+--> dict_array (64 x 32, valid bits) --words--+               |
 start ---->|  |         ^ store (miss)                        v              |
            |  +----------------------------------> 64 x comparator           |
            |                                              | matchlines       |
            |                                              v                  |
            |                    cam_comparator (match_encoder + out regs) ---|--> match_hit, addr_out,
            +-----------------------------------------------------------------+    data_out, out_valid

 code ----> xmatch_decompressor (dict_array copy, read on match / store on literal) ----> tuple
```

## Coding a tuple

| case  | `match_hit` | `addr_out`        | `data_out` | dictionary                   |
|-------|-------------|-------------------|------------|------------------------------|
| match | 1           | location (0..63)  | 0          | unchanged                    |
| miss  | 0           | 0                 | the tuple  | tuple written at next location |

Only full 32-bit matches are coded. XMatchPro proper also codes partial
matches, where some bytes of a tuple agree with a dictionary entry. The source design does not say how those
are coded, so partial matching is not built. A
compressed size can be estimated at 1 + 6 bits per match and 1 + 32 bits
per literal. That packing into a bit stream is not part of the RTL: the
codes come out as parallel fields.

## The dictionary search

The search works like a content-addressable memory (CAM):

- The input tuple goes to 64 `comparator` instances at the same time, one
  per dictionary word.
- Each comparator drives one *matchline*. It is high when the word is valid
  and equal to the input.
- `match_encoder` turns the matchlines into a hit flag and a binary
  location.

The encoder is not a priority encoder. Each location bit is just the OR of
the matchlines whose index has that bit set. That is correct only if at
most one matchline is ever high, and the design keeps that true by
construction:

- A tuple is stored only when it matched nothing, so no two valid words
  are ever equal.
- When a full dictionary overwrites an entry, the old value leaves the
  dictionary, so the rule still holds.
- An assertion in `match_encoder` checks it during simulation.

**Fill and replacement.** `dict_array` fills from location 0 upwards. Once
full, it overwrites round-robin, oldest entry first. Each word has a valid
bit, which reset clears, so a word that was never written can never match.
Reset leaves the word storage itself alone, which keeps 2048 bits of
flip-flops out of the reset tree.

**Timing.** The search is combinational in the clock the tuple arrives.
The code is registered and appears one clock later. A miss writes the
dictionary at the same clock edge. So a tuple that repeats the one just
before it already matches: the entry written at edge *n* is searched by the
tuple presented before edge *n+1*.

```
clk        _/~\_/~\_/~\_/~\_
start      _/~~~~~~~~~~~\___
data        | A | B | A |
out_valid  _____/~~~~~~~~~~~\_
match_hit  _____| 0 | 0 | 1 |      A, B miss and are stored; A then matches
addr_out        | - | - | 0 |
data_out        | A | B | 0 |
```

## Keeping the decompressor in step

`xmatch_decompressor` contains its own `dict_array` and applies the same
rule as the compressor:

- A literal is written at the next location, with the same round-robin
  order.
- A match reads the word at the given location.

Nothing beyond the code stream needs to be sent. There are two conditions:

- **Common reset.** Both sides must be reset together, so that they start
  with empty dictionaries.
- **Complete, in-order stream.** The decompressor must see every code, in
  order. Dropping a literal would shift every later location.

The decompressor has an assertion that fires if a code names an empty
location. That can only happen if the two sides have fallen out of step.

The decompressor takes one code per clock and returns the tuple one clock
later.

## Top level: `lossless_codec_top`

The top holds one compressor and one decompressor side by side. Each half
has its own ports, so the codes can be stored or sent between them. To run
a loopback, connect `out_valid`, `match_hit`, `addr_out` and `data_out` to
`dec_valid_in`, `dec_match_hit`, `dec_addr_in` and `dec_data_in`.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; every register uses the rising edge |
| `rst` | in | 1 | synchronous, active high; empties both dictionaries |
| `start` | in | 1 | a tuple is present on `data` this clock |
| `data` | in | 32 | tuple to compress |
| `addr_out` | out | 6 | match location |
| `match_hit` | out | 1 | 1 = match code, 0 = literal |
| `data_out` | out | 32 | literal tuple (0 on a match) |
| `out_valid` | out | 1 | the three fields above hold a code |
| `dec_valid_in` | in | 1 | a code is present |
| `dec_match_hit`, `dec_addr_in`, `dec_data_in` | in | 1, 6, 32 | the code |
| `dec_valid_out` | out | 1 | `dec_data_out` holds a restored tuple |
| `dec_data_out` | out | 32 | restored tuple |

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH` | 32 | tuple width in bits (four bytes) |
| `DEPTH` | 64 | dictionary entries; 16 and 32 are the smaller sizes the scheme allows, trading compression for area |

The defaults come from `xmatch_pkg`. The location width is `$clog2(DEPTH)`.
At the defaults, synthesis gives about 4200 flip-flop bits for the two
halves together. Almost all of them are the two 64 x 32 dictionaries.

## What is fixed by the source design and what is chosen here

**Taken from the original description:**

- The three-part compressor: array, comparator, CAM comparator.
- The 64 x 32-bit dictionary. Lengths of 16, 32 or 64 tuples are allowed.
- A 32-bit tuple every clock.
- The parallel search.
- The block-diagram pin names: CLK, RST, DATA, START, ADDR OUT, MATCH HIT,
  DATA OUT.
- The binary match location of log2(entries) bits.
- Decompression as the reverse of compression.

**Chosen here:**

- The meaning of `start` as "tuple valid".
- The added `out_valid` output.
- Registered outputs with one clock of latency.
- `data_out` = 0 on a match.
- Per-word valid bits.
- Round-robin replacement once the dictionary is full.
- A synchronous, active-high reset.
- The OR-based encoder.
- The search uses the input tuple directly, and the one register stage sits
  at the outputs. A textbook CAM holds the search word in a register in
  front of the searchlines instead. Either way, a code appears one clock
  after its tuple.
- The whole decompressor structure, since the description says only what
  decompression does.
- The single comparator block drawn in the block diagram is built as one
  comparator per dictionary word, as the parallel search needs. The diagram
  draws reset into that comparator; here the comparator is combinational
  and takes the word's valid bit instead.

**Not built:**

- Partial-match coding (see above).
- The multi-engine arrangement that the original design mentions: several
  compressor/decompressor engines with their own memories, and control
  blocks that route data between them. No engine count, routing or control
  scheme is given for it.

## Files

`rtl/`:

| file | content |
|------|---------|
| `xmatch_pkg.sv` | default tuple width and dictionary size |
| `comparator.sv` | one matchline: valid-gated 32-bit equality |
| `dict_array.sv` | dictionary words, valid bits, round-robin write pointer |
| `match_encoder.sv` | matchlines to hit + location, one-hot assertion |
| `cam_comparator.sv` | hit/miss decision, store request, registered code outputs |
| `xmatch_compressor.sv` | compressor: array + 64 comparators + CAM comparator |
| `xmatch_decompressor.sv` | decompressor with its own dictionary |
| `lossless_codec_top.sv` | compressor and decompressor side by side |

`tb/`: one self-checking testbench per module, named `tb_<module>.sv`.
They share the reference model in `xmatch_ref_pkg.sv`. That model
searches a plain list entry by entry, so it works out the expected codes
independently of the RTL.

- **`tb_lossless_codec_top`** loops the compressor into the decompressor at
  the default sizes. It checks every code and every restored tuple, and
  the one-code-per-tuple rate. It also counts matches, misses, a match
  against the tuple stored one clock before, entry replacement, idle
  clocks and a mid-stream reset, and it fails if any of them never
  happened.
- **`tb_workload_files`** streams generated files of 7168, 3481, 4505,
  4710, 5120 and 9625 bytes through the loop. It checks that each comes
  back intact in one clock per tuple plus two clocks of latency, and
  prints the matches and an estimated coded size for each.
- **`tb_dict_sizes`** runs systems with 16, 32 and 64 entries side by side
  on one stream. Each is checked against a model of its own size, through
  the helper `codec_size_checker.sv`. It prints the number of matches each
  size finds.

Every testbench ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each one has a watchdog that stops a
run that hangs.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_lossless_codec_top \
    -y rtl -y tb +libext+.sv rtl/xmatch_pkg.sv tb/xmatch_ref_pkg.sv tb/tb_lossless_codec_top.sv
./obj_dir/Vtb_lossless_codec_top
```

Replace the top module and testbench file to run another test. Everything
finishes in seconds. Lint the RTL alone with

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/xmatch_pkg.sv rtl/lossless_codec_top.sv
```

## Changing it

- **Dictionary size.** `DEPTH` can be any value of 2 or more; the location
  width follows it. Set it on `lossless_codec_top` or on each half
  separately, but the compressor and decompressor must use the same value.
  The testbenches hard-code 64 entries and 6-bit locations.
- **Replacement policy.** This lives entirely in `dict_array`. Any policy
  that still stores only tuples that missed keeps the one-match property
  the encoder relies on. The decompressor must use the same policy.
- **Other tuple widths.** `WIDTH` is a parameter, but the testbenches and
  their reference model assume 32 bits.
