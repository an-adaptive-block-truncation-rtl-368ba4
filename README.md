# ABTC: adaptive block truncation coding of video, as a hardware pipeline

This encoder compresses RGB video by cutting each frame into 4x4 blocks and
describing each block with as few statistics as it needs. A flat block is
sent as its mean. A block with two brightness levels is sent as a mean, an
absolute moment and a 16-bit bit plane. A detailed block also gets its 16
per-pixel errors, truncated or square-root quantized. Before any of that, a
block is tested against the same block of the previous frame, which costs 1
bit if it matches, and against the block just before it in the same frame,
which costs 3 bits. The operations are all integer additions, comparisons and
shifts. There is no transform and no motion search. The target is "semi-motion" video
such as a head-and-shoulders scene or a fixed camera, where most blocks
repeat.

The RTL takes one pixel per clock in raster order and produces a stream of
32-bit words. At the default parameters it handles 640x480 frames. A decoder,
`abtc_decoder`, sits beside the encoder in the same top module. It turns that
word stream back into 4x4 YCbCr blocks.

## Block classes and the record of each block

Every block's luminance Y goes through AMBTC (absolute-moment BTC):

* `mean = (sum of 16 Y) >> 4`
* `AM = (sum of |Y_i - mean|) >> 4`
* bit plane `bp[i] = 1` where `Y_i < mean`
* mean errors `E_i = Y_i - mean`

It is then classified with two thresholds:

| class   | condition | reconstruction at a decoder |
|---------|-----------|-----------------------------|
| uniform | `AM < th_am` | all pixels = mean |
| normal  | otherwise, if `SAE < th_sae` | `mean - AM` where bp=1, `mean + AM` where bp=0 |
| pattern | otherwise | `mean + E'_i` with coded errors |

SAE is the sum of absolute differences between the block and its two-level
reconstruction. The reconstruction uses AM saturated to the 5 bits the
record carries, with levels clamped to 0..255.

The chroma components are never classified. Each block that is not a copy
carries its Cb and Cr block means, shifted down to 6 bits.

Records, written first bit first:

| record  | bits | length |
|---------|------|--------|
| SPF (same as previous frame) | `1` | 1 |
| SPB (same as previous block) | `0 11` | 3 |
| uniform | `0 01` Y(8) Cb(6) Cr(6) | 23 |
| normal  | `0 00` Y(8) AM(5) BP(16) Cb(6) Cr(6) | 44 |
| pattern | `0 10` n(3) Y(8) BP(16) 16 x AME(n) Cb(6) Cr(6) | 42 + 16n |

Inside a field the most significant bit comes first. The bit plane and the
16 AMEs (absolute mean errors) run from pixel 0 to pixel 15, in raster order
inside the block. At 24 bits per input pixel, the compression ratios are:

* SPF: 384
* SPB: 128
* uniform: about 16.7
* normal: about 8.7
* pattern: 384 / (42 + 16n)

### Coding the errors of a pattern block

The sign of each error is already in the bit plane, so only magnitudes are
sent. The mode is chosen at run time:

* **Linear** (`srq_en = 0`). Each error becomes `a_i = min(|E_i| >> cut, 127)`,
  and `n` is the bit length of the largest `a_i`, so `n` adapts to the block.
  The `cut` setting (cut-error) trades quality for rate. Because the `n` field
  has 3 bits, `n` can be at most 7, which is why the magnitudes are capped at 127.
* **SRQ**, square-root quantization (`srq_en = 1`). A 256-entry table of 4-bit
  codes maps the signed error, clamped to -128..127, to `{sign, k}`. `k` is
  the integer whose square is nearest to `floor(|E|/2)`, with ties going to the
  smaller value, and it is capped at 7. A decoder rebuilds
  `mean ± 2k²`. For example, an error of 38 gives `38/2 = 19`, nearest square 16,
  so `k = 4`, which decodes to +32. Only `k` is sent (`n = 3`), because the sign is
  in the bit plane. `srq_lut` computes the table when it is elaborated.

## The two copy decisions (the hardest part)

### SPB: same as the previous block in the frame

`intra_dpcm` keeps the moments and the 16 errors of the block just before
the current one in block order. At the start of a block row, that is the last block of the
row above. SPB is allowed only when both blocks have the same class:

* both uniform: `|Δmean| < th_am`
* both normal: `|Δmean| < th_am`, `|ΔAM| < th_am`, and
  `popcount(bp ^ bp_prev) < th_map`. The popcount is done as two 8-bit halves.
* both pattern: `|Δmean| < th_am` and `SAD = Σ|E_i - E_prev,i| < th_sad`

The comparison is against the previous block's *original* moments, even when
that block was itself sent as a copy. A long run of slowly changing blocks
can therefore drift in a decoder by up to one threshold per block. The first
block of a frame is never SPB.

### SPF: same as the block of the previous frame

`moment_store` holds one 33-bit entry per block: class, mean, 7-bit AM and
bit plane. An entry is written for every block as it is coded. The entry of
the same block index is read one stage earlier, before that write, so the
read returns the previous frame's value. `inter_dpcm` then tests:

* both uniform: `|Δmean| < th_am`
* otherwise, whatever the two classes are: `|Δmean| < th_am`, `|ΔAM| < th_am`
  and `Δmap < th_map`

SPF is tested first and wins over SPB, because a decoder reads the one-bit
SPF flag first.

SPF is switched off in three cases:

* for the first frame after reset
* for a frame started with `in_key = 1` (a key frame)
* while the store has not yet been filled by one complete frame

The store keeps the moments of the source blocks. It does not keep decoded
reconstructions, so a chain of SPF decisions can also drift.

## Getting blocks out of a raster scan: `line_buffer`

Pixels arrive line by line, but a block needs four lines.

* **Storage.** The buffer holds 8 lines (5120 pixels at 640 wide) as two halves of four lines.
  It stores two pixels per 48-bit word, 4W words in all.
* **Writing.** The writer fills one half.
* **Reading.** When the last pixel of the fourth line arrives, the reader walks
  that half block by block: rows 0..3, left pixel pair then right pixel pair.
  Each block takes 8 beats of two pixels, so a block row is read in `2W`
  cycles.
* **Alternation.** The writer moves to the other half. The halves alternate with every
  block row, also across frame boundaries, so a frame height that is an odd
  number of block rows works.
* **Timing rule.** At one pixel per cycle, the next block row takes at least
  `4W` cycles to arrive, so the reader always finishes first. An assertion
  checks this.

Each beat is converted to YCbCr by two `rgb2ycc` instances. `block_assembler` then collects the 8 beats of a block into three
arrays of 16 samples.

## Pipeline and timing

```
line_buffer -> rgb2ycc x2 -> block_assembler -> S1 -> S2 -> S3 -> bitstream_packer
                                               means  AM,bp,E  classify, code errors,
                                                      store    SPB/SPF, build record,
                                                      read     store write
```

* **Clock.** Everything runs on one clock with an asynchronous active-low reset.
* **Throughput.** One block can enter S1 every 8 cycles, which is exactly the
  line buffer's output rate. The stages therefore never stall, and there is
  no back-pressure.
* **Latency.** The last word of a frame leaves within `2W + 40` cycles of the
  frame's last pixel. Most of that is the line buffer reading out the last
  block row. The end-to-end testbenches check this limit.
* **Word packing.** `bitstream_packer` appends each record to a 224-bit
  accumulator and emits a word whenever 32 bits are ready, first bit in bit 31.
* **End of frame.** After the frame's last block, the packer pads with zeros
  to the next word and marks that word `out_last`, so every frame starts on a
  word boundary.
* **Status outputs.** `stat_valid`, `stat_spf`, `stat_spb` and `stat_type`
  report each block's decision.

Synthesized with yosys, the top has about 1.2k cells and 1.6k flip-flop
bits. Memory is 772 kbit in total: the line buffer, the moment store and the
SRQ tables.

## Configuration

`cfg` (type `cfg_t` in `abtc_pkg`) is read every block. Hold it steady during a frame.

| field | width | meaning |
|-------|-------|---------|
| `th_am`  | 8  | uniform threshold, also used for Δmean and ΔAM |
| `th_sae` | 12 | normal/pattern threshold |
| `th_sad` | 12 | SAD threshold for pattern-block SPB |
| `th_map` | 5  | bit-plane difference threshold |
| `cut`    | 3  | cut-error: right shift of pattern errors |
| `srq_en` | 1  | square-root quantization of pattern errors |

These are the settings used for three CIF test sequences. Each value is for
the lowest ratio → the highest ratio (compression ratio 10 → 60):

| sequence | th_am | th_sae | cut |
|----------|-------|--------|-----|
| Missa    | 2 → 5 | 32 → 85 | 0 → 2 |
| Foreman  | 3 → 13 | 50 → 208 | 1 → 4 |
| Salesman | 3 → 8 | 30 → 137 | 1 → 3 |

Those settings do not include `th_sad` and `th_map`. The testbenches use 40 and 5.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `abtc_encoder` | `WIDTH`, `HEIGHT` | 640, 480 | frame size |
| `line_buffer` | `W`, `H` | 640, 480 | set from the top |
| `moment_store` | `DEPTH` | 19200 | blocks per frame |
| `block_assembler` | `BW` | 15 | block-index width |

`WIDTH` and `HEIGHT` must be multiples of 4, and `HEIGHT` must be at least 8.

## Where this design departs or chooses

**Colour and rounding**

* The colour matrix is full-range BT.601 with 8-bit coefficients (77/150/29, -43/-85/128, 128/-107/-21),
  rounded, with chroma offset by 128.
* Means and AM are truncated, not rounded.

**Stages the pipeline does not include**

* There is no entropy coder after the record packer. The output is the raw records.
* The reference design runs the encoder as software on a chip of ten
  data-driven processors. Here it is a fixed-function pipeline. The line
  buffer addresses a block's lines at offsets 3, 2, 1 and 0 from the fourth
  line, which is also how the software addresses them. A register file takes
  the place of the processors' packet-matching memory.

**Previous-block comparisons**

* The previous block for SPB is the one just before in raster block order.
* SPB and SPF compare original moments, not decoded ones; see the drift
  note in the two SPF/SPB sections above.

**Pattern-block errors**

* The 3-bit `n` field caps the linear magnitudes at 7 bits.
* In SRQ mode the sign bit is not repeated, because the bit plane carries it.

**Frame protocol**

* Frames have a fixed size.
* Key frames are requested with `in_key`.
* Output words are 32 bits, with zero padding at the end of each frame.

**Not included**

* The decoder stops at YCbCr blocks in block order. It does not convert
  back to RGB or reorder the pixels into raster lines.
* The stream does not carry `cut` or `srq_en`. The decoder takes them as
  inputs (`dec_cut`, `dec_srq_en`), set as the encoder was for that frame.

## Decoder

`abtc_decoder` is reached through the `dec_*` ports of `abtc_encoder` and
has its own handshake. It is not wired to the encoder's output inside the
top. Its input words go into a 256-bit bit queue, and a word is accepted
while at most 224 bits are queued. Each cycle it reads the head of the
queue: the SPF bit first, then the 2-bit class, then for pattern blocks
the 3-bit error width. Once the whole record is queued, it emits one block.

* SPF copies the block at the same position in its frame store.
* SPB copies the block it decoded just before.
* Uniform blocks are filled with the mean.
* Normal blocks get mean - AM where the bit plane is 1 and mean + AM where it is 0.
* Pattern blocks get mean -/+ (a << cut), or mean -/+ 2k^2 in SRQ mode.

Results are clamped to 0..255. Chroma is the 6-bit value times 4. After the
last block of a frame, the padding up to the word boundary is dropped. The
frame store holds 16 Y samples and 12 chroma bits per block, and every
decoded block is written to it, copies included.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. The expected
values come from a behavioural model, `tb/abtc_model_pkg.sv`. The model does
the colour conversion, the moments, the classification, both DPCM tests and
the record building with plain integer code.

* `tb_abtc_encoder`: 32x16, 5 frames. It covers threshold changes, a key
  frame, SRQ and input gaps. It compares every word, every `out_last` flag
  and every block decision with the model. It also counts each mechanism and
  fails if one never occurred: uniform, normal and pattern blocks; SPB of
  each class; SPF; SRQ; cut-error; end-of-frame padding; and SPF suppressed
  by a key frame.
* `tb_abtc_decoder`: 32x16, 12 frames. It feeds records of every kind,
  with random input gaps, and checks every decoded pixel, chroma value,
  block index and start-of-frame flag. The frames use linear coding with
  cut 0 to 2, and SRQ.
* The three `tb_abtc_encoder*` testbenches also loop the encoder's words
  into the top's decoder ports. They check that every block comes back, in
  order.
* `tb_abtc_encoder_full`: the default 640x480 size, 2 frames (162,721 checks).
* `tb_abtc_encoder_cif`: 352x288, 3 frames, each with a column of the threshold table above.
* Unit testbenches: `tb_line_buffer`, `tb_rgb2ycc`, `tb_block_assembler`,
  `tb_mean_tree`, `tb_am_module`, `tb_sae_classifier`, `tb_pattern_coder`,
  `tb_srq_lut`, `tb_intra_dpcm`, `tb_inter_dpcm`, `tb_moment_store`,
  `tb_block_packer`, `tb_bitstream_packer`.

All of these pass. To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/abtc_pkg.sv tb/abtc_model_pkg.sv tb/tb_abtc_encoder.sv \
  --top-module tb_abtc_encoder -o sim && ./obj_dir/sim
```

To run another testbench, replace its name in both places. The full-size
test builds in about 20 s and simulates in a few seconds.

Lint produces three kinds of warning, which are expected:

* unused bits: the two low chroma-mean bits, the `cfg` fields a module does not use, and the parts of the decoder's shifted queue copies that a field extraction does not read
* unused parameters
* `SYNCASYNCNET` on `rst_n`, because the assertions are disabled by the same
  signal that resets the flip-flops asynchronously

The decoder's `out_cb` and `out_cr` have two low bits that are always 0,
because chroma is sent as 6 bits.
