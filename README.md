# Bit-parallel Huffman decoder, with a JPEG mode and a leading-ones optimized LUT

A Huffman code gives frequent symbols short codewords and rare symbols long
ones. Decoding it one bit at a time (walking the code tree) takes as many
cycles as the codeword has bits, so the output rate depends on the data. The
decoders here take the bit-parallel approach instead: the next undecoded bits
of the stream are lined up in front of a look-up table that recognises the
whole codeword at once and also returns its length. The length moves a bit
pointer forward, so **one codeword is decoded in every clock cycle whatever
its length**.

Three decoders are built on the same datapath:

| Decoder | Module | Code | Input word | Output per cycle |
|---|---|---|---|---|
| basic | `huff_par_decoder` | 8-symbol example code, codewords of 2..5 bits | 8 bits | one symbol |
| JPEG, full LUT | `jpeg_huff_decoder #(.LUT_OPT(0))` | JPEG luminance AC table, codewords of 2..16 bits | 16 bits | codeword item, then amplitude item |
| JPEG, optimized LUT | `jpeg_huff_decoder #(.LUT_OPT(1))` | same | 16 bits | same |

`huff_decoder_top` places the three side by side, sharing only clock and reset.

## The datapath: buffer, accumulator, shifter, LUT

```
 in_data ──► ┌──────────┬──────────┐
 (W bits)    │ layer 1  │ layer 2  │  huff_input_buffer (2 x W bits)
             └────┬─────┴────┬─────┘
                  └── 2W ────┘
                       │
              ┌────────▼────────┐   ptr
              │ barrel shifter  │◄──────────────┐  huff_shifter
              └────────┬────────┘               │
                 window│ (next bits first)      │
              ┌────────▼────────┐  length  ┌────┴───────────┐
              │       LUT       ├─────────►│  accumulator   │ huff_accumulator
              └────────┬────────┘          │ ptr += length  │
                       │ symbol            │ ptr >= W: -W,  │
                       ▼                   │  shift buffer  │
                    output reg             └────────────────┘
```

* **Buffer.** Two layers of W bits. Layer 1 holds the word being decoded,
  layer 2 the next one, so a codeword that begins near the end of layer 1
  can run on into layer 2. The first stream bit is the MSB of a word.
* **Accumulator.** `ptr` is the position of the next undecoded bit in layer 1.
  Every decoded codeword adds its length. When the sum reaches W, layer 1 is
  used up: in the same cycle W is subtracted, layer 2 moves into layer 1 and
  a new word is loaded into layer 2.
* **Shifter.** Shifts the 2W-bit pair left by `ptr` and presents the top bits
  (5 for the example code, 16 for JPEG) to the LUT.
* **LUT.** Returns the decoded value and the codeword length. For the
  example code it is a 32-word ROM indexed by the next five bits.

Because a layer is at least as wide as the longest codeword, one decode can
use up at most one layer, and a source that delivers one word per request
never lets the decoder run dry.

### Worked example (example code)

Code: A `00`, B `0101`, C `011`, D `10`, E `01001`, F `110`, G `01000`,
H `111`. The output symbol is the 3-bit index (A = 000 ... H = 111).
Input words `00100110`, `10010101`, `11011110`:

| cycle | ptr before | bits seen by the LUT | symbol | length | ptr after |
|---|---|---|---|---|---|
| 1 | 0 | `00`100 | A | 2 | 2 |
| 2 | 2 | `10`011 | D | 2 | 4 |
| 3 | 4 | `011`01 | C | 3 | 7 |
| 4 | 7 | `0` + `1001` from layer 2 | E | 5 | 12 → 4, layers shift, new word loaded |
| 5 | 4 | `0101`1 | B | 4 | 8 → 0, layers shift |
| 6.. | 0 | `110` `111` `10` | F H D | 3 3 2 | |

`tb_huff_par_decoder` checks exactly this trace and its one-symbol-per-cycle
timing.

### Stalls

The input side is a valid/ready handshake. A codeword (or amplitude) is
consumed only when all of its bits lie in layers that hold data, tested as
`ptr + length <= W * nvalid`, where `nvalid` is the number of filled layers. If the
source pauses, the decoder waits without losing its place; bits beyond the
valid layers can produce a LUT hit, but it is not used. This also lets the
last codewords of a stream drain without a dummy word after them.

## JPEG mode: codewords and amplitudes alternate

In a JPEG entropy-coded segment each Huffman codeword (a run/category byte:
run of zero coefficients in bits 7:4, amplitude bit length "category" in bits
3:0) is followed directly by `category` bits of coefficient amplitude.
`jpeg_huff_decoder` therefore alternates two kinds of cycle:

1. **Codeword cycle.** The LUT decodes the run/category byte; the
   accumulator adds the code length; the category is saved.
2. **Amplitude cycle.** The LUT is not used: the top `category` bits of the
   shifter output are the amplitude; the accumulator adds `category`.

The alternation is strict. A category-0 codeword (end of block `0x00`, run of
sixteen zeros `0xF0`) is followed by an amplitude item of length 0, which costs
one cycle. The amplitude is output in its coded form (right-aligned bits);
turning it into a signed coefficient (values with MSB 0 are negative, offset
by 2^category − 1) is left to the consumer. The layers are 16 bits so that a
16-bit codeword never spans more than two layers.

A window of 16 valid bits that matches no codeword sets the sticky `code_err`
and decoding stops until reset.

## The optimized LUT

The full LUT (`jpeg_lut_full`) compares each of the 162 codewords against up
to 16 window bits. The JPEG luminance AC codewords have a structure that makes
most of those bits redundant: every codeword is a run of *n* ones, the zero
that ends the run, and a short remainder. For this table *n* ranges over
0..15 and the remainder is never longer than 6 bits:

| leading ones *n* | 0 | 1–4 | 5–8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|
| longest remainder (bits) | 1 | 2 | 3 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |

`jpeg_lut_opt` builds the LUT key from that:

1. **Leading 1's detector** (`jpeg_l1d`) counts *n* in the 16-bit window.
2. **Shifter / positioner** shifts the window left by *n* so the ending zero
   is at the top, and takes the 6 bits after it as the remainder.
3. **Pointer**: *n* as a 4-bit value selects the section of the LUT for that
   run length.
4. **LUT**: each of the 162 entries compares the 10-bit key {*n*, remainder}
   (only as many remainder bits as its codeword has) and returns the same
   13-bit result as the full table: 8-bit run/category and 5-bit length.

So each entry compares 10 bits instead of 16. The price is that the detector
and the second shifter sit in series between the buffer shifter and the table,
so the combinational path of a decode cycle gets longer. The two LUTs give
identical outputs for all 65536 windows (checked by `tb_jpeg_lut_opt` and
`tb_jpeg_lut_full` against the same reference, and by `tb_jpeg_huff_decoder`,
which runs both decoders on the same stream and compares them cycle by
cycle).

## Code tables

`rtl/huff_pkg.sv` holds both codes:

* The example code as left-aligned codewords and lengths (`T2_CODE`,
  `T2_LEN`). The ROM of `huff_lut_table2` is filled at elaboration by
  matching every codeword as a prefix of every 5-bit address, so editing
  these two lists (and `T2_MAXLEN` for longer codes) changes the code.
* The JPEG luminance AC table as the standard's `BITS` (number of codewords of
  each length 1..16) and `HUFFVAL` (run/category per codeword in code order)
  lists (ITU-T T.81, Annex K.3). The codewords themselves are derived at
  elaboration by the canonical rule: codewords of one length are consecutive
  binary numbers, and the first codeword of length L+1 is (last codeword of
  length L + 1) << 1. Any other table in this form can be dropped in, as long
  as its codewords are at most 16 bits; `jpeg_lut_opt` raises an elaboration
  error if a remainder does not fit its 6 bits.

## Interfaces and timing

All decoders: `clk`, synchronous active-low `rst_n`; input `in_valid`,
`in_data` (first stream bit in the MSB), `in_ready`. A word is taken at a
rising edge with `in_valid && in_ready`.

* `huff_par_decoder` (`W` = 8): `out_valid`, `out_sym[2:0]`, `out_len[2:0]`.
* `jpeg_huff_decoder` (`W` = 16, `LUT_OPT` = 1): `out_valid`, `out_is_amp`,
  `out_rc` (run/category, `huff_pkg::run_cat_t`), `out_amp[15:0]`,
  `out_len[4:0]` (code length or category), `code_err`.

Outputs are registered. A word accepted at edge *k* yields its first item at
edge *k*+1; with a source that is always valid, one item follows every cycle
after that. The decode cycle itself (shifter, LUT, accumulator adder, fit
test) is a single combinational path with no pipelining.

`huff_decoder_top` prefixes these ports with `t2_` (basic decoder), `jf_`
(JPEG, full LUT) and `jo_` (JPEG, optimized LUT).

## Files

| File | Contents |
|---|---|
| `rtl/huff_pkg.sv` | code tables, canonical-code functions, `run_cat_t` |
| `rtl/huff_input_buffer.sv` | two-layer input buffer with handshake |
| `rtl/huff_accumulator.sv` | bit pointer, wrap and layer-shift trigger |
| `rtl/huff_shifter.sv` | barrel shifter in front of the LUT |
| `rtl/huff_lut_table2.sv` | 32-word ROM of the example code |
| `rtl/huff_par_decoder.sv` | basic bit-parallel decoder |
| `rtl/jpeg_l1d.sv` | leading 1's detector |
| `rtl/jpeg_lut_full.sv` | JPEG LUT, 16-bit compare per entry |
| `rtl/jpeg_lut_opt.sv` | JPEG LUT, detector + positioner + 10-bit key |
| `rtl/jpeg_huff_decoder.sv` | JPEG decoder, codeword/amplitude alternation |
| `rtl/huff_decoder_top.sv` | the three decoders side by side |
| `tb/huff_ref_pkg.sv` | reference models for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_table2_sample` (sample-set workload) |

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/huff_pkg.sv tb/huff_ref_pkg.sv tb/tb_huff_decoder_top.sv \
  --top-module tb_huff_decoder_top
./obj_dir/Vtb_huff_decoder_top
```

Replace `tb_huff_decoder_top` by any other testbench name. The end-to-end test
`tb_huff_decoder_top` runs the top at its default parameters: 2000 random
symbols on the basic decoder and 1000 random JPEG codeword/amplitude pairs on
each JPEG decoder, once with an always-valid source (checking one item per
cycle) and once with a pausing source, then a stream of ones to trigger
`code_err`. It counts stalls, codewords that span both buffer layers,
amplitude items including category-0 ones, codewords with nine or more
leading ones, and code errors, and fails if any of them never occurs. It runs
in seconds.

`tb_table2_sample` decodes the full sample set the example code was designed
for (120 symbols: A 22, B 8, C 15, D 33, E 4, F 16, G 2, H 20, in random
order). It checks that the coded stream is 325 bits, against 360 for the
3-bit fixed-length code, and that the 120 symbols leave on 120 consecutive
cycles.

## How far it is verified

* Every module has a testbench comparing it with an independent model:
  exhaustive for the LUTs (32 and 65536 inputs) and the leading-ones detector,
  random for buffer, accumulator and shifter, random streams for the decoders.
* Each testbench was also run against a deliberately broken copy of its
  module and failed, so its checks do detect errors.
* All RTL is synthesizable; it lints cleanly apart from style warnings
  (descending ranges, unused bits of wide intermediates).
* Not verified: timing on any device, and real JPEG files (markers, byte
  stuffing and DC coefficients are outside this design).

## Departures and choices to be aware of

* **Example code.** Codeword B is `0101`. This is the only reading that keeps
  the code prefix-free and complete, matches B's bit count and makes the
  worked example above decode.
* **JPEG table size.** The LUTs hold the 162 codewords of the standard
  luminance AC table with 16-bit input. The original description quotes
  262 entries and a 17-bit input for the full table; neither number matches a
  standard JPEG table, and no codeword needs more than 16 bits. The optimized
  key width (10 bits) and the entry width (13 bits) are as described.
* **Leading zeros.** Only leading ones are detected; a leading-zeros detector
  would add nothing for this table, since only two codewords (`00` and `01`)
  start with 0.
* **Alternation.** Category-0 codewords are followed by an empty amplitude
  cycle to keep codeword and amplitude strictly alternating.
* **Own additions.** The valid/ready input handshake and the stall rule,
  registered outputs, `code_err`, and 16-bit input words in the JPEG
  decoder are this design's choices. DC decoding, block assembly, marker
  detection and 0xFF00 byte-stuffing removal are not part of it.
* **Not included.** The bit-serial (tree-walking state machine) decoder,
  which the parallel decoder replaces, is not built.
* For reference, the original FPGA implementation of these three decoders in
  an Altera FLEX10K20 ran at roughly 9–11.5 MHz; no such figures were
  measured for this RTL.
