# Lossy input-image compression for embedded vision hardware

A vision accelerator (HOG detector, CNN) spends much of its energy moving the
input image to and from external DRAM: the sensor writes it line by line, and
the feature extractor reads it back block by block, often several times. This
design compresses the image on its way into DRAM and decompresses it on its
way out. The loss is kept small and is tuned for vision: pixels are predicted
from their neighbours (DPCM), and the prediction residuals are quantized more
finely when they are small and more coarsely when they are large (a
"gradient-oriented" quantizer). Memory traffic drops, and detection or
classification accuracy barely changes.

The hard part is not the coder. Data is written as lines but read as blocks,
and the coded sub-blocks have variable length. So the design has to find a
block's bits in memory without decoding everything before them. Most of the
RTL deals with that problem.

## Terms

| term | meaning |
|---|---|
| sub-block | 4 horizontally adjacent pixels of one line (n x 1, n = 4): the unit that is coded |
| compression block | a column of sub-blocks, 4 pixels wide and M = 8 lines tall. No prediction crosses its edges |
| strip | K = 8 consecutive lines, the height of a vision block |
| column | the K sub-blocks of one strip at one horizontal position (an n x K block) |
| vision block | K x K = 8 x 8 pixels, the unit the vision processor asks for |
| QC | quantization configuration: one of four reconstruction-level tables |
| CM | coding mode: the common bit length of all residuals of a sub-block |

## The sub-block code

Take a sub-block with pixels p0..p3. The compress core walks them in order
and keeps the *reconstructed* value d_i of each pixel, which is exactly the
value the decoder will rebuild, so errors do not build up along a line:

* p0 is predicted from the reconstructed pixel directly above it. On the top
  line of a compression block there is nothing above: p0 is stored as a raw
  8-bit value and has no residual.
* p1, p2 and p3 are predicted from d0, d1 and d2.
* The residual r_i = p_i - prediction (-255..255) goes through LUTrd and
  becomes a 5-bit signed index q_i (-15..15). LUTird maps q_i back to a
  reconstructed residual, and d_i = clamp(prediction + that residual, 0, 255).

The quantizer has 16 reconstruction magnitudes per sign. LUTrd chooses the
nearest one; a tie goes to the smaller one. Four configurations are built in
(`iic_pkg::LEVELS`), from fine (QC 0) to coarse (QC 3):

| QC | magnitudes for index 0..15 |
|---|---|
| 0 | 0 1 2 3 4 5 6 8 10 13 17 23 32 48 80 160 |
| 1 | 0 2 4 6 8 10 13 16 20 25 32 42 56 80 120 200 |
| 2 | 0 3 6 9 12 16 20 25 31 38 48 60 80 108 150 210 |
| 3 | 0 4 8 12 16 21 27 34 42 52 64 80 100 128 168 224 |

LUTrd is a real look-up table. `goq_lut_rd` fills a 4 x 256-entry ROM at
elaboration time with `iic_pkg::nearest_level`, so a different quantizer only
needs a different `LEVELS` table.

All coded residuals of a sub-block get the same length L: the smallest
two's-complement width that holds every one of them (0 to 5 bits; L = 0 means
they are all zero). L is stored as a 3-bit CM. The code is packed LSB first:

```
top line of a compression block:  p0[7:0] | CM[2:0] | q1 | q2 | q3     11..26 bits
any other line:                   CM[2:0] | q0 | q1 | q2 | q3          3..23 bits
```

A flat area costs 3 bits per 4 pixels. The worst case costs 26 bits, against
32 bits uncompressed.

## How an image travels

**Compression path** (`iic_compressor`). The sensor delivers one sub-block per
cycle in raster order. A one-line column buffer (IMG_W/4 entries) keeps d0 of
every sub-block, which becomes the "pixel above" for the next line. The
compress core (`iic_compress_core`) codes the sub-block in two pipeline
stages. The bit packer (`iic_bit_packer`) appends the codes into 64-bit words.

Memory layout: line y owns a fixed slot of LINE_WORDS words, starting at word
address y x LINE_WORDS. LINE_WORDS is the worst case for a line, plus one
spare word (196 for 1920 pixels). A line's codes fill its slot from the start,
and the last word is zero-padded. So the start address of every line is known
without reading anything. Compression saves memory *traffic*, not memory
*space*: this is the trade-off that makes random access by lines cheap.

**Decompression path.** The vision processor asks for a vision block by
strip number and by the sub-block column of its left edge, so blocks may
overlap at a 4-pixel step.

1. *Block recomposition* (`iic_block_recomp`) keeps the last K/4 = 2 decoded
   columns of the current strip. Columns of the request that are already there
   are reused. Missing columns are decoded in order, left to right along the
   strip.
2. *Line recomposition* (`iic_line_recomp`) holds one coded-bit buffer per
   line of the strip (64 + 26 bits). For each column it hands the decompress
   core two lines per cycle (lines 0-1, 2-3, 4-5, 6-7). Each line is handed as
   a window that starts at that line's bit pointer. It then drops as many bits
   as the core reports for each sub-block.
3. *Address translation* (`iic_addr_trans`) keeps those buffers filled. A
   line that holds fewer than 26 bits (the longest possible code) asks for its
   next word. The unit reads word `(strip_y0 + j) x LINE_WORDS + wp[j]`, where
   wp[j] counts the words already fetched for line j. Each line has at most
   one word in flight, and the lowest-numbered waiting line goes first. This is
   how requests for variable-length sub-blocks become requests for whole words.
   Each word is fetched only once per strip pass, and the bits it holds for the
   next columns stay in the buffer.
4. The *decompress core* (`iic_decompress_core`) decodes two vertically
   adjacent sub-blocks per cycle. Stage 1 splits each window into raw p0, CM
   and the residual field, and reports the code length straight away. Stage 2
   cuts the residual field into four L-bit fields, runs LUTird and rebuilds the
   pixels. The upper lane's p0 uses the lower lane of the previous cycle; the
   lower lane's p0 uses the upper lane.
5. Block recomposition writes the decoded sub-blocks into its column buffer.
   Once every column of the request is there, it sends out the 8 x 8 block.

A strip is restarted when a request names another strip, or a column that has
already left the column buffer (one left of the buffered columns). Block
recomposition raises `fetch_hold` to stop new reads. It waits until no word is
in flight, then pulses `strip_start`. That pulse resets the word pointers and
empties the line buffers. Without the hold, a read accepted in the same cycle
as the restart would later deliver a stale word into the new strip.

K must be a multiple of M. Then every strip begins on a compression-block
boundary with raw pixels, and a strip decodes without touching the lines above
it.

## Timing

| path | rate | latency |
|---|---|---|
| compress core | 1 sub-block (4 pixels) per cycle | 2 cycles |
| bit packer | 1 word per cycle | 1 cycle (2 for a held end-of-line word) |
| decompress core | 2 sub-blocks (8 pixels) per cycle | 2 cycles |
| one 8-line column | 4 cycles when its data is buffered | |

The line-recomposition stall (`dec_stall`) shows cycles in which a column is
open but a line still waits for a word. The bit packer emits at most one word
per cycle. If a line's last, padded word falls in the same cycle as a full
word, it is held one cycle. For that reason a line must have at least two
sub-blocks.

At 1920 x 1080 and 60 frames/s, the compressor needs 31.1 MHz (4 pixels per
cycle). Reading each frame once takes at least 15.6 MHz of decompress-core
cycles (8 pixels per cycle), more with stalls and overlapping blocks. Twelve
reads, one per pyramid scale, need at least 187 MHz.

The 8 pixels per cycle are not reached in practice. `tb_iic_workload` reads a
whole frame back as non-overlapping blocks, and its simple requester waits for
each block before asking for the next. Memory answers after 2 to 7 cycles and
refuses one read in eight. Under these conditions the read-back averages 3.3
to 3.6 pixels per cycle. At that rate, twelve 1080p60 reads would need a clock
of about 430 MHz.

## Modules

| file | role |
|---|---|
| `rtl/iic_pkg.sv` | widths, types, level tables, helper functions (code length, clamp, line slot size) |
| `rtl/goq_lut_rd.sv` | LUTrd: residual to 5-bit quantized residual |
| `rtl/goq_lut_ird.sv` | LUTird: quantized residual to reconstructed residual |
| `rtl/iic_compress_core.sv` | DPCM + quantization + CM + code assembly, 2 stages |
| `rtl/iic_bit_packer.sv` | variable-length codes to 64-bit words, per-line padding |
| `rtl/iic_compressor.sv` | compression stage: column buffer, core, packer, write addresses |
| `rtl/iic_addr_trans.sv` | sub-block demand to word reads |
| `rtl/iic_line_recomp.sv` | per-line coded buffers, column sequencing, feeds the core |
| `rtl/iic_decompress_core.sv` | CM/residual split, LUTird, inverse DPCM, 2 lanes |
| `rtl/iic_block_recomp.sv` | request check, decoded-column buffer, 8 x 8 block assembly, strip restart |
| `rtl/iic_top.sv` | both paths wired together |

## Interface of `iic_top`

The top does not contain the DRAM, the sensor or the vision processor; their
signals are ports. Everything runs from one clock `clk`, with the asynchronous
active-low reset `rst_n`.

* Sensor: `in_valid`, `in_pix[3:0]` (four pixels, element i = p_i). No
  back-pressure.
* Memory write: `wr_valid`, `wr_addr`, `wr_data`. The memory must accept every
  write. `frame_done` pulses after the last word of a frame; `frame_words` then
  holds how many words the frame took.
* Memory read: `rd_valid`/`rd_ready`/`rd_addr`/`rd_line` request, and
  `rsp_valid`/`rsp_data`/`rsp_line` response. The response echoes `rd_line` and
  may come after any delay. Since each line has at most one word in flight,
  responses for different lines may return in any order.
* Vision processor: `vreq_valid`/`vreq_ready` with `vreq_strip` and
  `vreq_col`. The answer is `vblk[row][x]`, valid for one cycle with
  `vblk_valid`, in the same cycle as `vreq_ready`. A request needs
  `vreq_col + 2 <= IMG_W/4`.
* `qc` selects the quantizer. It must stay the same while a frame is written
  and read back.
* Statistics: `hit_cols` and `miss_cols` count columns of requests served from
  the buffer and columns decoded for them. `strip_starts` counts strip starts,
  and `dec_stall` is high while decoding waits for memory.

The compressed frame has a single region in memory. The reader must not read a
line that is being overwritten by the next frame. Double buffering would only
need a base address added to both address paths.

## Parameters

| parameter | default | from |
|---|---|---|
| `IMG_W` x `IMG_H` | 1920 x 1080 | the 1080p target of the design |
| sub-block width n | 4 | fixed in `iic_pkg` (four pixels p0..p3) |
| quantized residual | 5 bits | fixed in `iic_pkg` |
| `LANES` | 2 | two sub-blocks decoded per cycle |
| `K` (vision block, strip height) | 8 | own choice (an 8 x 8 HOG cell) |
| `M` (compression block height) | 8 | own choice |
| `W` (memory word) | 64 | own choice |
| `LINE_WORDS` | 196 | derived: worst-case line + 1 |

K must be a multiple of 4, of M and of LANES. IMG_W must be a multiple of 4,
with at least 2 sub-blocks per line. IMG_H should be a multiple of K; lines
below the last full strip cannot be requested.

## What follows the source design and what does not

Taken from the source design:
* the split into a compression stage, line recomposition, address
  translation, decompress core and block recomposition with request buffers;
* 4-pixel sub-blocks inside n x m compression blocks;
* DPCM with the raw upper-left pixel, and p0 predicted from above;
* 5-bit quantized residuals from LUTrd/LUTird, with a coding mode giving their
  common length;
* the two-stage compress core at one sub-block per cycle, and the two-stage
  decompress core at two sub-blocks per cycle;
* quantization configurations that can be swapped by replacing the LUTs.

Points of the source description that this design settles one way:
* The compress core's first stage walks the pixels p0 to p3 in order. Each
  pixel after p0 is predicted from the reconstructed pixel before it.
* The prediction for p0 is the reconstructed pixel above it. The raw 8-bit
  pixel is kept only at the upper left of each compression block. Because a
  compression block is one sub-block wide, this means every sub-block on the
  block's top line.
* The quantizer levels are not powers of two, so a shift cannot do the
  quantization. It is done by table look-up: LUTrd maps a residual to its
  quantized residual, and LUTird maps that back to a reconstructed residual.
* The decompress core splits the code into residual fields of L bits.
  Each field is then sign-extended to a 5-bit quantized residual.
* Requests are checked against buffers before memory is read. In the source
  the buffers hold coded sub-blocks, and a block is decoded once all of its
  sub-blocks are there. Here the coded bits already fetched are kept in the
  line-recomposition buffers. The block recomposition buffers *decoded*
  columns. Memory sees the same reads, and a column reused by an overlapping
  block is not decoded a second time.

This design's own choices:
* the four level tables;
* the bit layout of a code, and the CM as a plain length;
* M = K = 8 and 64-bit words;
* the fixed per-line memory slots and per-line padding;
* the request format, the left-to-right decoding order within a strip, and the
  restart on backward requests;
* one word in flight per line;
* no back-pressure on the sensor, memory-write and vision-block outputs.

The accuracy figures reported for the original scheme cannot be reproduced
here: they depend on its own level tables and on vision benchmarks outside
RTL simulation. What the RTL can show is the traffic itself. `tb_iic_workload`
compresses a 228 x 232 synthetic scene, the size of one colour plane of a
227 x 227 CNN input. The scene has a gradient, solid objects and +-2 noise.
It then reads the frame back as vision blocks:

| QC | words written (raw: 6612) | of raw | words read | max / mean pixel error |
|---|---|---|---|---|
| 0 | 3528 | 53.3 % | 3572 | 40 / 0.15 |
| 1 | 2668 | 40.3 % | 2723 | 37 / 0.57 |
| 2 | 2579 | 39.0 % | 2630 | 21 / 0.69 |
| 3 | 2087 | 31.5 % | 2146 | 20 / 1.02 |

A few reads more than writes are the one-word look-ahead at line ends. The
same frame (QC 3) is then scanned again at a 4-pixel step, as a HOG detector
with overlapping cells would scan it. That scan asks for 1624 blocks, twice as
many, yet it reads the same 2146 words. 1595 of its columns come from the
block-recomposition buffer. The
harder mixed test image of `tb_iic_top_full`, one sixth of which is pure noise,
takes about 45 % of raw at full HD, averaged over QC 1 and QC 3.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model
`tb/tb_iic_ref.sv` is a separate, procedural encoder and decoder with its own
copy of the level tables; it also generates the test image.

| testbench | what it checks |
|---|---|
| `tb_goq_lut_rd`, `tb_goq_lut_ird` | every input of every QC |
| `tb_iic_compress_core` | codes, lengths and reconstruction for random sub-blocks; latency exactly 2 at 1 per cycle |
| `tb_iic_bit_packer` | words and end-of-line flags against a bit-queue model; the held-word case occurs |
| `tb_iic_compressor` | every memory write (address and data) of two frames; `frame_words` |
| `tb_iic_decompress_core` | lengths, pixels and a latency of exactly 2 at 2 sub-blocks per cycle |
| `tb_iic_addr_trans` | line choice, word addresses, `idle`, hold and strip changes, memory refusals |
| `tb_iic_line_recomp` | every window against the expected code, stalls, no fetch after a strip's last column |
| `tb_iic_block_recomp` | blocks, buffer hits, restart on backward requests, strip-start ordering |
| `tb_iic_top` | end to end on a 64 x 32 frame: two frames with different QC, all writes, every vision block, overlapping, backward and random requests, memory latency and refusals; each mechanism must occur |
| `tb_iic_top_full` | the same at the default 1920 x 1080: one frame read back completely, a second one in part (about 5 s of simulation) |
| `tb_iic_workload` | the whole design on a CNN-plane-sized scene under all four QCs: writes, blocks, words read against words written, traffic, pixel error and read rate; an overlapping scan must reuse buffered columns and read no extra words |

Run one with plain Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/iic_pkg.sv tb/tb_iic_ref.sv tb/tb_iic_top.sv --top-module tb_iic_top
./obj_dir/Vtb_iic_top
```

Replace `tb_iic_top` with any other testbench name. Every testbench except
`tb_goq_lut_rd` and `tb_goq_lut_ird` needs `tb/tb_iic_ref.sv`. The two top
testbenches (`tb_iic_top`, `tb_iic_top_full`) also include
`tb/tb_iic_top_body.svh`.

Lint notes: Verilator reports `SYNCASYNCNET` because the assertions sample
`rst_n` synchronously (`disable iff`) while the flip-flops use it as an
asynchronous reset. This is intended. A few `UNUSEDSIGNAL` reports are
intended too: the compressor keeps only d0 of each reconstructed sub-block.
