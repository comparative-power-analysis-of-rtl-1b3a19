# Precomputation-based CAM: block-XOR (XPCAM) and ones-count (OCCAM)

A content-addressable memory (CAM) answers "which stored words equal this
word?" by comparing the search word with every stored word at once. Those
full-width comparisons are where a CAM spends its power. A
*precomputation-based* CAM (PB-CAM) cuts their number with a cheap filter:

1. A **parameter extractor** turns each word into a short parameter (4 or 5
   bits for a 16-bit word). The parameter of every stored word is kept in a
   small **parameter memory**.
2. A search computes the parameter of the search word and compares it with all
   stored parameters. A word whose parameter differs cannot be equal, so it is
   dropped.
3. Only the surviving words are compared at full width in the **data memory**.

How much power is saved depends on how many stored words share a parameter
value. That depends on the extractor, and this RTL provides two:

* **OCCAM**: the parameter is the number of ones in the word. Over all 16-bit
  words the counts are binomially spread. 8 ones alone covers 12870 of the
  65536 words (19.6 %), so a typical search still compares many words.
* **XPCAM**: the parameter is built from the parity of four 4-bit blocks, which
  spreads words nearly evenly over the codes, about 1/16 of the words each.

`pbcam_top` instantiates one of each so that both can be driven with the same
traffic. XPCAM is the proposed design and OCCAM is the reference.

## The block-XOR extractor (`rtl/block_xor_extractor.sv`)

This is the least obvious part of the design. The 16-bit word `D` is split
into four blocks, and each block is XOR-reduced to one bit:

| block | bits      | output |
|-------|-----------|--------|
| 0     | D[15:12]  | A3     |
| 1     | D[11:8]   | A2     |
| 2     | D[7:4]    | A1     |
| 3     | D[3:0]    | A0     |

Each of the 16 values of `A3..A0` is produced by exactly 8·8·8·8 = 4096 words,
because each block has 8 patterns of each parity. That is a uniform spread of
6.25 % per code.

A PB-CAM also needs one parameter code that no word produces, to mark a word
that holds no data. Otherwise an empty word could pass the filter. With 16
codes all in use, the block-XOR output alone has none to spare. A
multiplexer frees one:

* `S = A3 & A2 & A1 & A0`
* `param = S ? D[15:12] : A3..A0`

When `S = 1`, `A3 = 1`, so `D[15:12]` has odd parity. The replacement value is
therefore one of the eight odd-parity nibbles, and 4'b1111 (even parity) is
never produced. The 4096 words with `A = 1111` are spread 512 each over the
eight odd-parity codes. The final distribution over all 2^16 words is:

* 4608 words (7.03 %) for each odd-parity code (1, 2, 4, 7, 8, 11, 13, 14);
* 4096 words (6.25 %) for each even-parity code other than 15;
* 0 words for code 15, which the parameter memory uses as "empty".

`tb/tb_block_xor_extractor.sv` checks all 65536 inputs and this histogram.

Which multiplexer input `S = 1` selects is this design's reading. The source
only names the two inputs. The reading chosen here is the one that frees a
code.

## The ones-count extractor (`rtl/ones_count_extractor.sv`)

This is a small adder tree:

* four full adders reduce D[2:0], D[5:3], D[8:6] and D[11:9] to 2-bit counts;
* two 2-bit adders pair them up, with D[12] and D[13] as carry-ins;
* a 3-bit adder joins the pairs, with D[14] as carry-in;
* an incrementer adds D[15].

A 16-bit word can have 0 to 16 ones, and one more code is needed for "empty".
That makes 18 codes, so the parameter is 5 bits, ceil(log2(18)). The
incrementer keeps its carry as bit 4; a 4-bit result would wrap 16 to 0. Code
17 marks an empty word. Count r occurs for C(16,r) words;
`tb/tb_ones_count_extractor.sv` checks all of them.

## Memories and one search (`param_memory`, `data_memory`, `pbcam`)

`pbcam` wires the parts as follows. Select the extractor with the parameter
`EXT`: `EXT_BLOCK_XOR` gives XPCAM, `EXT_ONES_COUNT` gives OCCAM.

```
req_data ──► extractor ──► param ──► param_memory (WORDS × 4/5 bit) ──► cmp_en[WORDS]
    │                                                                       │
    └──────────────────────────────────────► data_memory (WORDS × 16 bit) ◄─┘
                                                   │ match[WORDS]
                                  priority encoder, popcount(cmp_en), output registers
```

* `param_memory` is a register array with one equality comparator per word.
  Reset fills it with the empty code, so words that were never written stay
  out of every search.
* `data_memory` is a 16-bit array. The match line of word i is
  `cmp_en[i] & (word_i == key)`. A word that is not enabled is not compared.
  In a full-custom CAM, that is the match line that is never precharged and
  discharged. This RTL only models the gating; it does not model the power.
* A single extractor serves writes and searches. A write stores both the word
  and its parameter.

### Interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (empties the CAM) |
| `req_valid` | in | 1 | a request this cycle |
| `req_write` | in | 1 | 1: write `req_data` to word `req_addr`; 0: search for `req_data` |
| `req_addr` | in | log2(WORDS) | word to write (ignored for a search) |
| `req_data` | in | 16 | word to write or search for |
| `rsp_valid` | out | 1 | high for one cycle, the cycle after a search |
| `rsp_hit` | out | 1 | some word matched |
| `rsp_addr` | out | log2(WORDS) | lowest matching word |
| `rsp_match` | out | WORDS | one match line per word |
| `rsp_compares` | out | log2(WORDS+1) | number of words compared at full width |

One request can be issued every cycle. A write takes effect at the clock edge,
so a search in the next cycle sees it. A search is one combinational pass
(extractor, parameter compare, gated data compare, encoder) into registers, so
its result appears one cycle after the request. An assertion flags writes to a
word beyond `WORDS`. Another flags an extractor output equal to the empty
code, which must never happen.

`pbcam_top` has two such port sets, `xp_*` (XPCAM) and `oc_*` (OCCAM), with
shared `clk` and `rst_n`.

## What the comparison shows

`tb/tb_pbcam_top.sv` fills both 256-word CAMs with the same random data. It
then searches for random keys and compares the mean number of words each CAM
compares at full width. The result is about **17 for XPCAM against 36 for
OCCAM** (of 256 words).

The expected values are 256·Σp² over the parameter distributions:

* XPCAM: 256·(8·0.0703² + 7·0.0625²) ≈ 17.1
* OCCAM: 256·C(32,16)/2^32 ≈ 35.8

A conventional CAM would compare all 256 words.

## Parameters

| parameter | default | where | note |
|-----------|---------|-------|------|
| `WORDS` | 256 | `pbcam`, `pbcam_top`, memories | number of stored words; the source gives none, 256 is a choice |
| `DATA_W` | 16 | `pbcam_pkg` | fixed: both extractors are built for 16 bits |
| `XOR_PARAM_W`, `XOR_EMPTY` | 4, 4'b1111 | `pbcam_pkg` | XPCAM parameter and empty code |
| `OC_PARAM_W`, `OC_EMPTY` | 5, 17 | `pbcam_pkg` | OCCAM parameter and empty code |

`WORDS` can be changed freely. The extractors are hard-wired to 16-bit words.

## Where this RTL departs from, or adds to, the architecture it implements

* The ones-count output is 5 bits wide, not the 4 that the adder tree's
  final stage is usually drawn with, so that a count of 16 and an empty code
  both fit.
* The architecture fixes neither the number of words nor any interface or
  timing. The following are choices made here: the request/response port,
  one-cycle latency, lowest-index priority encoder, asynchronous reset and
  the `rsp_compares` counter.
* There is no way to delete a single word other than reset.
* The source compares the two designs by power and speed measured on
  transistor-level layouts in 0.8 µm to 0.18 µm processes (about 90 % less
  power for XPCAM, at a slightly higher operating speed). RTL cannot reproduce
  those figures. Only the number of full-width comparisons, which drives that
  power, is measured here.
* The intrusion-detection system that motivates the CAM is not included.

## Files and simulation

* `rtl/pbcam_pkg.sv`: widths, empty codes, `extractor_e`.
* `rtl/block_xor_extractor.sv`, `rtl/ones_count_extractor.sv`: the two
  extractors.
* `rtl/param_memory.sv`, `rtl/data_memory.sv`: the two compare stages.
* `rtl/pbcam.sv`: one PB-CAM.
* `rtl/pbcam_top.sv`: XPCAM and OCCAM side by side.
* `tb/pbcam_tb_pkg.sv`: reference models, written from the definitions of the
  parameters rather than from the circuits.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

Run a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Mdir obj \
  rtl/pbcam_pkg.sv tb/pbcam_tb_pkg.sv rtl/*.sv tb/tb_pbcam_top.sv \
  --top-module tb_pbcam_top
./obj/Vtb_pbcam_top
```

`tb_pbcam_top` runs the top at its default size, checks every response
against a shadow model, and requires each of the following to occur at least
once:

* write and overwrite;
* hit and multiple match;
* parameter-stage reject;
* data-stage reject;
* search of a partly empty CAM.

It finishes in well under a second.
