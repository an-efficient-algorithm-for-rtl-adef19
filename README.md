# C-Pack cache-line compressor and decompressor

Off-chip memory is slow next to the processor, so a larger on-chip cache
pays off. A compressed cache gets that extra room without more SRAM, but
only if the hardware can compress and decompress a line in a few cycles.
It must also be lossless and work on blocks as small as one cache line.

This RTL implements C-Pack, a line compressor built for that job. It
looks at each 32-bit word of a line on its own:

* Words that are common in cache data get a short fixed code. These are
  an all-zero word (`zzzz`) and a word with only its low byte non-zero
  (`zzzx`).
* Other words are compared with a small **dictionary** of the words seen
  earlier in the same line. A full match, or a match of the upper three or
  upper two bytes, is coded as a dictionary index plus the bytes that
  differ.
* A word with no match is sent whole, behind a 2-bit code.

Two words are compressed per clock cycle, and two are decompressed per
cycle.

In the intended system, each core has a private L2 cache split into an
uncompressed region and a compressed region. There is one
compressor/decompressor per core between the two regions. Lines that move
from the uncompressed region to the compressed one are compressed, and
lines read back are decompressed. `cpack_top` is that per-core unit. The
caches, cores, interconnect and memory around it are not part of this RTL:
its ports are where they would connect.

## The code table

In the pattern names, each letter is one byte, most significant byte
first:

* `z` is a zero byte.
* `m` is a byte equal to the byte in the same position of a dictionary
  entry.
* `x` is a byte that matches nothing.

| pattern | code   | what follows the code                    | bits at 16 entries |
|---------|--------|------------------------------------------|--------------------|
| `zzzz`  | `00`   | nothing                                  | 2                  |
| `xxxx`  | `01`   | the whole word                           | 34                 |
| `mmmm`  | `10`   | index                                    | 6                  |
| `mmxx`  | `1100` | index, low two bytes                     | 24                 |
| `zzzx`  | `1101` | low byte                                 | 12                 |
| `mmmx`  | `1110` | index, low byte                          | 16                 |

The index is `log2(ENTRIES)` bits wide, so the lengths of the three
dictionary codes change with `ENTRIES`. Code `1111` is unused. A decoder
reads two bits, and two more only if the first two are `11`, so the codes
form a prefix code and need no separators.

Choosing a code (`cpack_word_encoder`):

1. A word that is `zzzz` or `zzzx` takes that code, even if it is also in
   the dictionary.
2. Otherwise the shortest dictionary code wins: `mmmm`, then `mmmx`, then
   `mmxx`. Among entries that match equally well, the lowest index wins.
3. Otherwise the word is coded `xxxx`.

Every word that is not `zzzz` or `zzzx` is pushed into the dictionary.
This includes words that matched an entry in full, so an entry can appear
twice.

Example, with a four-entry dictionary `{12345678, AAAAAAAA, 12340000,
3527894E}` (2-bit index):

| input      | result                                            |
|------------|---------------------------------------------------|
| `000000AB` | `(1101)AB`                                        |
| `BBBB2022` | `(01)BBBB2022`                                    |
| `123456AA` | `(1110)(00)AA`: upper three bytes match entry 0   |

`tb_cpack_word_encoder` and `tb_cpack_word_decoder` check exactly these
cases.

## The dictionary and the two-words-per-cycle rule

`cpack_dictionary` holds `ENTRIES` words (default 16), each with a valid
bit:

* Pushes go to a write pointer that wraps around, so the oldest entry is
  the one replaced (FIFO).
* The dictionary is emptied at the start of every line. A compressed line
  can therefore be decompressed without any other line.
* Because the dictionary is emptied for every line, 16-word lines and 16
  entries never fill it within a line. Replacement only happens with more
  words per line than entries.

Handling two words per cycle is the hard part. The pair must be coded
exactly as if its words had come one at a time, because the decompressor
rebuilds them in the same order. Word 2 is therefore compared with the
dictionary *including word 1 of the same cycle*:

* The dictionary has two views. `entries` is the contents at the start of
  the cycle. `fwd_entries` is the same contents with word 1's push already
  applied, computed combinationally.
* Encoder 1 and decoder 1 use `entries`. Encoder 2 and decoder 2 use
  `fwd_entries`.
* Both words are written at the clock edge, word 1 first.

So `12345678` followed by `123456AA` in one beat codes the second word as
`mmmx` against the first.

The compressor and the decompressor each have their own dictionary. They
stay identical because they push the same words in the same order.

## Compressed line format

The compressed codes of a line are simply concatenated, in word order and
first bit first. Nothing is aligned or padded between them. The compressor
outputs:

* `out_line`: a vector of `34*LINE_WORDS` bits with the stream
  left-aligned, so the first bit is the MSB and the unused low bits are
  zero.
* `out_bits`: the length of the stream in bits.

Line sizes:

* The smallest line is `2*LINE_WORDS` bits: 32 bits for an all-zero
  16-word line, a ratio of 16:1.
* The largest is `34*LINE_WORDS` bits: 544 bits for a line of 16
  unmatched words, more than the 512 bits of the original line.

This unit does not decide whether to store such a line uncompressed
instead. The caller can compare `out_bits` with `32*LINE_WORDS`.

## Compressor (`cpack_compressor`)

A line arrives as `LINE_WORDS/2` beats on `in_valid`/`in_data`.
`in_data[31:0]` is the first word of the pair and `in_data[63:32]` the
second. Idle cycles between beats are allowed. There is no back-pressure:
a beat is taken in every cycle that `in_valid` is high.

* Two `cpack_word_encoder`s code the pair.
* A shift accumulator packs the codes. Each beat, the accumulator shifts
  left by `len1 + len2` and ORs in the two codes.
* One cycle after each beat, the two compressed words (`cw1`/`cw2`,
  right-aligned), their lengths and their patterns appear for
  observation.
* One cycle after the last beat, `out_valid` pulses and `out_line` and
  `out_bits` hold the line. They stay there until the next line completes.

Throughput is one line every `LINE_WORDS/2` cycles (8 at the defaults).

## Decompressor (`cpack_decompressor`)

A line is taken when `in_valid` and `in_ready` are both high. `in_ready`
is low while the unit decodes that line. In each of the next
`LINE_WORDS/2` cycles:

1. The stored stream is shifted left by the read position, giving the
   window for word 1.
2. A `cpack_word_decoder` decodes word 1 and returns its length.
3. Word 2's window starts that many bits further on. The second decoder
   decodes it against the forwarded dictionary.
4. The read position advances by both lengths.

Timing and flags:

* `out_data` (word 1 in `[31:0]`) and `out_valid` are registered. The
  first pair appears two cycles after the line is taken, then one pair
  per cycle.
* `out_last` marks the last pair of the line.
* `error` is raised with `out_last` if the line held code `1111`, or if
  the stream did not use exactly `in_bits` bits.

Each cycle's critical path is: shift by the read position → decode word 1
→ add its length → shift again → decode word 2. The two `34*LINE_WORDS`-bit
barrel shifters are the largest logic in the unit.

## Top (`cpack_top`)

The compressor and the decompressor sit side by side and run at the same
time:

* `comp_*` ports: lines in from the uncompressed L2 region and compressed
  lines out to the compressed region.
* `decomp_*` ports: lines back the other way.

The compressed region itself, meaning how variable-size lines are stored
and found, is not implemented.

## Parameters

| parameter    | default | meaning                                   |
|--------------|---------|-------------------------------------------|
| `ENTRIES`    | 16      | dictionary entries; the index is `log2(ENTRIES)` bits |
| `LINE_WORDS` | 16      | 32-bit words per line (must be even)      |

Where the defaults come from:

* `ENTRIES = 16` is implied by the lengths in the code table (6, 16 and
  24 bits need a 4-bit index). The worked example above uses 4 entries;
  set `ENTRIES=4` to reproduce it.
* `LINE_WORDS = 16`, a 64-byte line, is a common cache line size. It is
  this design's choice.

Word width (32) and two words per cycle are fixed.

## How far it can be trusted

The testbenches are self-checking and compare against a reference model
(`tb/cpack_ref_pkg.sv`). The model is written separately from the RTL and
codes one word at a time. For each testbench to show it can fail, a
deliberately broken copy of its module was run, and the testbench caught
every one.

| testbench | what it checks |
|-----------|----------------|
| `tb_cpack_dictionary` | 5000 random cycles of 0, 1 or 2 pushes and clears; contents, valid bits, forwarded view and write pointer every cycle; many pointer wraps |
| `tb_cpack_word_encoder` | the worked examples; 4000 random words against random, partly filled 16-entry dictionaries |
| `tb_cpack_word_decoder` | the worked examples; random coded words followed by random stream bits; code `1111` |
| `tb_cpack_compressor` | 600 lines, including all-zero and all-random lines, with random idle cycles; every compressed word, every packed line, one beat per cycle, result one cycle after the last beat |
| `tb_cpack_decompressor` | 600 reference-compressed lines; every word, the 2-cycle latency and one pair per cycle, `in_ready`, and the error flag for a corrupt code and a wrong length |
| `tb_cpack_top` | end to end at the default parameters (see below) |
| `tb_cpack_image_workload` | generated 8-bit grey images of 1 kB and 700 kB (flat, gradient and textured areas) through `cpack_top`: lossless, lengths equal to the model's, 9 compressor cycles per line as driven; prints the ratio reached (1.65:1 on this data) |

`tb_cpack_top` runs 400 lines at the default parameters. Each line is
compressed, held in a queue that stands in for the compressed region,
and decompressed while later lines are being compressed. Every line must
return unchanged. The test also counts, and requires at least once:

* each of the six patterns;
* word 2 of a pair coded from word 1 of the same pair;
* a line that grew instead of shrinking;
* cycles in which both paths were busy.

On its synthetic data mix the overall ratio (uncompressed size over
compressed size) is about 1.4.

Not verified:

* Clock frequency. The reference FPGA implementation this follows
  reported about 195 MHz.
* Area.
* Behaviour on real cache contents.

## Departures and choices

These points are this design's own choices rather than part of the C-Pack
description it follows:

* **`zzzx` code.** `zzzx` is coded `1101` and `mmxx` `1100`, as in
  the worked example; one listing of the code table pairs `zzzx` with
  `1100`, which would collide with `mmxx`.
* **Dictionary size.** The worked example uses a 4-entry dictionary with a
  2-bit index. The code table's lengths need 16 entries, and the default
  follows the table.
* **Compression ratio.** The source defines it both as compressed over
  uncompressed size and as the reverse. The testbench reports
  uncompressed over compressed.
* **Added here:** FIFO replacement, valid bits, emptying the dictionary at
  every line, the tie-break among matches, the packed line format, the
  handshakes, the register stages and latencies, the error flag and the
  line size.

Two parts of the source are not implemented:

* An image-data compressor based on interpolation. Only a few signal
  names describe it.
* Any cache organisation for the compressed region.

## Files and simulation

`rtl/` holds one module or package per file:

* `cpack_pkg.sv`
* `cpack_dictionary.sv`
* `cpack_word_encoder.sv`
* `cpack_word_decoder.sv`
* `cpack_compressor.sv`
* `cpack_decompressor.sv`
* `cpack_top.sv`

`tb/` holds the testbenches and `cpack_ref_pkg.sv`. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cpack_top \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/cpack_pkg.sv tb/cpack_ref_pkg.sv \
    tb/tb_cpack_top.sv
./obj_dir/Vtb_cpack_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. All of
them finish in well under a second.
