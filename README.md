# Reconfigurable Huffman / Shannon source encoder

This is a small hardware encoder for lossless compression of short text
messages. It builds a variable-length prefix code from the message itself
(frequent characters get short code words) and then replaces every character
by its code word. It does this in two ways on one chip: Huffman coding, and
Shannon coding, where the Shannon lane can be switched to Shannon-Fano
coding. The code is "dynamic": the character statistics are measured from
each message, not fixed in advance. A central controller decides which
lanes take part in a run, which is where the reconfiguration happens: one
input stream, one or both encoders, and one of two algorithms in the
Shannon lane.

The RTL follows a published proposal for such an encoder: two parallel
lanes of memory element, frequency calculator, compression module and code
generator, with a controller ("connection optimizer") in the middle. The
proposal gives the block structure and what each block does; the inner
workings of most blocks, all widths and all handshakes are choices made
here. They are marked as such in each file's opening comment and summarised
under [Departures and open points](#departures-and-open-points).

## Worked example

For the 11-character message `electronics` (counts: e 2, c 2, and l, t, r,
o, n, i, s once each):

| | Huffman lane | Shannon lane | Shannon-Fano mode |
|---|---|---|---|
| code lengths, order e c l t r o n i s | 3 3 3 3 3 3 3 4 4 | 3 3 4 4 4 4 4 4 4 | 2 3 3 3 4 4 3 4 4 |
| first code words | e = 110, c = 101 | e = 000, c = 001 | e = 00, c = 010 |
| compressed size | 35 bits (3.18 bits/char) | 40 bits (3.64 bits/char) | 35 bits |
| cycles from `start` to `done`, both lanes | 104 | 104 | 111 |

The entropy of this message is 3.096 bits per character. The testbenches
check the 35-bit Huffman size, the Shannon lengths and first code words, and
that every compressed message decodes back to the original.

## Structure

```
                     +--------------------------------------------+
 in_valid/in_data -->| memory_element -> frequency_calculator ->   |
 in_last, in_ready   |   huffman_compression -> huffman_code_gen   |--> huf_*
                     |            (sorter, adder)  (symbol_encoder)|
                     |                                             |
 start, mode,   ---->|           connection_controller             |
 sf_mode             |                                             |
                     | memory_element -> frequency_calculator ->   |
                     |   shannon_compression -> shannon_code_gen   |--> sha_*
                     |            (sorter, adder)  (symbol_encoder)|
                     +--------------------------------------------+
```

Files (all in `rtl/`, one module or package per file):

| file | role |
|---|---|
| `src_enc_pkg.sv` | sizes (`MAX_LEN`, `SYM_W`, `CNT_W`, `CODE_W`), lane mode and controller phase enums |
| `source_encoder_top.sv` | the two lanes and the controller |
| `connection_controller.sv` | lane selection and phase sequencing |
| `memory_element.sv` | message store, replayed twice per run |
| `frequency_calculator.sv` | histogram of the message |
| `frequency_sorter.sv` | descending sort of the histogram |
| `freq_adder.sv` | the adder shared by both compression modules |
| `huffman_compression.sv` | Huffman tree construction |
| `huffman_code_generator.sv` | code words from the tree, then encoding |
| `shannon_compression.sv` | cumulative counts and code lengths, or Shannon-Fano splitting |
| `shannon_code_generator.sv` | Shannon code words by division, then encoding |
| `symbol_encoder.sv` | table lookup and compressed-data store, used by both code generators |

## Sizes

Everything is sized from one number, the message window `MAX_LEN` = 15
characters:

* characters are `SYM_W` = 8 bits;
* counts and cumulative counts fit in `CNT_W` = 4 bits (at most 15);
* with at most 15 distinct symbols a Huffman code word is at most 14 bits,
  so code words are carried in `N-1` = 14 bits with a 4-bit length;
* the compressed-data register holds `15 x 14` = 210 bits, more than any
  code of a 15-character message needs.

Every module takes these as parameters (`N`, `DW`, `CW`, `CDW`, ...) with the
package values as defaults. `N` can be changed at the top; the rest follow.

## How a run proceeds

The controller steps through five phases; a lane that is not selected gets
no strobes and keeps the results of its last run.

1. **Load.** `start` latches `mode` (1 Huffman, 2 Shannon, 3 both) and
   `sf_mode` and clears the selected lanes. While `in_ready` is high, one
   character per cycle is accepted on `in_valid`/`in_data`; `in_last` ends
   the message. Both memory elements see the same input. Characters beyond
   15 are dropped and raise `overflow` for that lane; the message is then
   encoded as its first 15 characters.
2. **Count.** The memory elements replay the message into the frequency
   calculators. Each incoming character is compared in parallel with the
   table of symbols already seen; a hit increments the count, a miss appends
   a new entry. The table is in order of first occurrence. Status `S` rises
   after the last character.
3. **Build.** The compression modules sort the table by descending count
   (odd-even transposition sort, 15 cycles, ties keep first-occurrence
   order) and then build the code, see the next two sections.
4. **Code.** Each code generator forms its code words, then asks for a
   second replay of the message, and its `symbol_encoder` looks up every
   character. The code word goes out on `*_out_valid/_code/_len` and is
   shifted into `*_bits`.
5. **Done.** `done` pulses once all selected lanes are finished. A new
   `start` is accepted in that same cycle.

## Huffman tree in hardware

The Huffman tree is built by repeatedly adding the two lightest nodes into a
new parent. Because the leaves arrive sorted, no priority queue is needed:
the two-queue method keeps the unused leaves as one queue (the lightest is
simply the last one not yet taken) and the new internal nodes as a second
queue, which is automatically in non-decreasing weight order. Each cycle the
module compares the heads of the two queues twice to pick the two lightest
nodes, the adder forms the parent's weight, and the parent is appended to
the internal queue. `n` distinct symbols need `n-1` cycles.

Nodes are numbered 0..14 for the sorted leaves and 15..28 for internal nodes
in creation order. The module stores for each node its parent and the bit on
the edge to it: 0 for the lighter child of a merge, 1 for the heavier. On
equal weights a leaf is taken before an internal node. The last node created
is the root.

The code generator then walks from each leaf to the root, one edge per
cycle, and collects the edge bits. The edge next to the root is the first
bit sent, so it becomes the most significant bit of the code word. A message
with only one distinct symbol gets the one-bit code `0`.

## Shannon and Shannon-Fano codes

The Shannon lane works with integer counts instead of probabilities. With
`T` the message length, `cnt[i]` the count of the i-th most frequent symbol
and `cum[i]` the sum of the counts before it (formed by the adder, one
symbol per cycle):

* code length `len[i] = ceil(log2(T / cnt[i]))`, found as the smallest
  `l >= 1` with `cnt[i] * 2^l >= T`;
* code word = the first `len[i]` bits of the binary fraction `cum[i] / T`,
  that is `floor(cum[i] * 2^len[i] / T)`.

The code generator computes the code word by restoring division, one bit per
cycle: the remainder starts at `cum[i]`, is doubled each step, and a 1 is
emitted (and `T` subtracted) whenever it reaches `T`.

With `sf_mode = 1` the Shannon lane uses Shannon-Fano coding instead. The
sorted symbols form one group. A small stack holds the groups still to be
split; each cycle the group on top is split at the point where the counts of
the two parts are closest to equal (the first such point on a tie). The more
frequent part appends 0 to its members' code words, the other part 1, and
parts with two or more symbols go back on the stack. A message with `n`
distinct symbols takes `n-1` splits. The code generator then takes these
code words unchanged.

## Interface of the top

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `start` | in | 1 | begin a run (sampled while idle or while `done` is high) |
| `mode` | in | 2 | `enc_mode_e`: 1 Huffman, 2 Shannon, 3 both, 0 none |
| `sf_mode` | in | 1 | Shannon lane: 0 Shannon, 1 Shannon-Fano |
| `in_valid`, `in_data`, `in_last` | in | 1, 8, 1 | message characters |
| `in_ready` | out | 1 | high during the load phase |
| `busy`, `done` | out | 1 | run in progress; end-of-run pulse |
| `overflow` | out | 2 | per lane: more than 15 characters were offered |
| `huf_sym`, `huf_code`, `huf_len`, `huf_n` | out | 15 x 8, 15 x 14, 15 x 4, 4 | code table, most frequent symbol first |
| `huf_out_valid`, `huf_out_code`, `huf_out_len` | out | 1, 14, 4 | code word of each character, in message order |
| `huf_bits`, `huf_nbits` | out | 210, 8 | compressed message: the low `huf_nbits` bits, first bit highest |
| `sha_*` | out | same | the same for the Shannon lane |

A code word of length `L` occupies bits `L-1..0` of its field, sent from bit
`L-1` down.

Approximate run time for a message of `L` characters and `n` distinct
symbols: `L` cycles to load, `L+2` to count, 16 for the sort plus `n` to
`2n` for building, then the code generation (Huffman: the sum of the code
lengths plus `n`; Shannon: the sum of the code lengths; Shannon-Fano: none)
and `L+3` for encoding. The lanes run in parallel and the controller waits
for the slower one.

## Verification

Each block has a self-checking testbench in `tb/` (the shared
`symbol_encoder` is tested through both code generators) that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_freq_adder` | all 4-bit operand pairs, random 12-bit pairs |
| `tb_memory_element` | replay of every message length 0..17, `out_last`, `status`, overflow, one character per cycle |
| `tb_frequency_calculator` | symbol table and counts against a reference count, timing of `S` |
| `tb_frequency_sorter` | descending order, permutation, stability on ties, 15-cycle latency |
| `tb_huffman_compression` | tree shape and labels, weighted path length equal to an independent optimal Huffman cost, latency |
| `tb_huffman_code_generator` | code words against the bench's own tree walk, stream, stored data, decoding |
| `tb_shannon_compression` | cumulative counts, lengths against `ceil(log2(T/cnt))` in real arithmetic, Shannon-Fano code words against a reference splitting, latency |
| `tb_shannon_code_generator` | code words against `floor(cum*2^len/T)`, Shannon-Fano pass-through, stream, decoding, one cycle per code bit |
| `tb_connection_controller` | lane strobes in all modes against lane models with random delays |
| `tb_source_encoder_top` | whole design at default sizes: `electronics`, single-symbol and 15-symbol messages, 150 random messages in all modes and both Shannon-lane algorithms; optimal Huffman size, exact Shannon and Shannon-Fano code words, decoding, untouched disabled lanes; counts that every mode, overflow, back-pressure, single-symbol and full-table case occurred |

To run one with Verilator (version 5, from the directory above `rtl/`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_source_encoder_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/src_enc_pkg.sv tb/tb_source_encoder_top.sv
./obj_dir/Vtb_source_encoder_top
```

The controller and the symbol encoder carry concurrent assertions (strobes
only to enabled lanes, every character found in the code table); `--assert`
enables them.

The end-to-end test runs the top with its default parameters and finishes in
well under a second. The benches use `$urandom` for their random messages
and need no input files.

## Departures and open points

* **Message window.** The proposal gives the memory element as 15 positions
  in one place and the input as a 14-character array in another. The RTL
  uses 15; a 14-character message fits.
* **Shannon versus Shannon-Fano.** The proposal describes Shannon-Fano
  (splitting into groups of nearly equal probability), but its simulated
  Shannon encoder produces Shannon codes (cumulative-probability code
  words, lengths `ceil(log2 1/p)`). The Shannon code is the default here;
  Shannon-Fano is available through `sf_mode`.
* **Huffman bit pattern.** The Huffman code built here is optimal and gives
  the same 35-bit size for `electronics` as the proposal's example, but not
  the same bits. The proposal's encoded example corresponds to the code
  e=010 l=0001 c=001 t=0000 r=111 o=110 n=101 i=100 s=011; this design
  gives e=110 c=101 l=100 t=011 r=010 o=001 n=000 i=1111 s=1110. Both are
  optimal; they differ in tie-breaking and edge labelling, which the
  proposal does not specify.
* **Reset.** All blocks use a synchronous active-high reset, except the
  sorter, which has an asynchronous active-low reset as the proposal
  specifies for it. Inside the top the sorter's reset is driven from `rst`.
* **Duplicated front end.** As in the proposal's block diagram, each lane
  has its own memory element and frequency calculator, so in "both" mode the
  message is stored and counted twice. Sharing them would save about 320
  storage bits.
* **Not part of the RTL.** The proposal targets a Kintex-7 FPGA and derives
  its hardware from MATLAB models through high-level synthesis. The RTL here
  is hand-written and device independent; no timing or resource figures are
  claimed.
* **Output storage.** The proposal has the controller write the result into
  a given memory location. Here each lane keeps its compressed data in a
  210-bit register and streams one code word per character; there is no
  address-based write-back, and no serial bit output.
* **No decoder.** Decoding appears only as a software check in the proposal
  and is not part of the hardware; the testbenches decode in software.
