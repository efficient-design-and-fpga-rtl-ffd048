# Baseline JPEG encoder in SystemVerilog

This is a hardware JPEG compressor. It takes an RGB image one pixel at a time and writes a
complete, standard JFIF (`.jpg`) file into a byte-wide memory. It uses the baseline sequential
DCT process of the JPEG standard:

```
 RGB pixels ──► colour conversion ──► 8-line ──► 2-D DCT ──► quantiser ──► zig-zag ──► entropy ──► bit ──► bytes to
 (raster order)  + level shift        strip                                 reorder    coder       packer   memory
                 rgb2ycbcr            block_buffer  dct2d     quantizer     zigzag     entropy_    bit_
                                                                                       encoder     packer
                                      jfif_header writes the file header first; the controller appends EOI
```

The top module is `compressor`. Its port list is that of the reference design: Red/Green/Blue,
ProcessRGB, ProcessingRGB, CompressImage, Compression[1:0], Mono, ImgColumns[9:0],
ImgLines[8:0], Compressing, addr[15:0], din[7:0], we, clk and reset. That is 77 pins. Everything
is synchronous to one clock.

The design is built for clarity and can be checked bit-exactly. It is not built for speed: it
codes one 8x8 block at a time, and each block takes a few hundred clock cycles.

## Using the top module

| Port | Dir | Meaning |
|---|---|---|
| `CompressImage` | in | One-cycle pulse, given while `Compressing` = 0. Starts a new file and latches `ImgColumns`, `ImgLines`, `Compression` and `Mono`. |
| `ImgColumns`, `ImgLines` | in | Image width and height in pixels. Each must be a multiple of 8. The largest is 1016 x 504. |
| `Compression` | in | Quantisation strength: 0 = finest (tables at 50 %), 1 = standard tables (100 %), 2 = 200 %, 3 = 400 %. |
| `Mono` | in | 1 = grey-scale file holding only the Y component. 0 = colour file with Y, Cb, Cr. |
| `Red`, `Green`, `Blue`, `ProcessRGB` | in | One pixel, in raster order. It is taken in any cycle where `ProcessRGB` and `ProcessingRGB` are both 1. |
| `ProcessingRGB` | out | 1 while the encoder can take pixels. It goes to 0 once 8 image lines have been received, and stays 0 until those lines have been coded. |
| `Compressing` | out | 1 from `CompressImage` until the final EOI byte has been written. |
| `addr`, `din`, `we` | out | Byte write port for the output memory. The file starts at address 0. At most one byte is written per cycle. |

Operating sequence:

1. Set the image parameters and pulse `CompressImage`.
2. Hold each pixel until it is taken (`ProcessRGB` = `ProcessingRGB` = 1 on a clock edge).
3. Wait for `Compressing` to fall. The memory then holds the whole file, and the address of the
   last write plus one is its length.

The 16-bit address reaches 64 KiB. A larger file wraps around.

Colour images are coded 4:4:4, with no chroma subsampling. Each 8x8 area of the image gives one Y
block, one Cb block and one Cr block, and the three are interleaved in that order.

## Sample formats through the pipeline

| Stage | Output | Format |
|---|---|---|
| `rgb2ycbcr` | Y-128, Cb, Cr | signed 8 bit |
| `dct2d` | F(v,u) | signed 19 bit, 7 fractional bits (12.7) |
| `quantizer` | round(F/Q) | signed 12 bit |
| `entropy_encoder` | Huffman code plus amplitude bits | up to 27 bits, right-aligned, with a length |
| `bit_packer` | bytes | 8 bit, 0xFF followed by 0x00 |

**Colour conversion.** The JFIF equations are Y = 0.299R + 0.587G + 0.114B,
Cb = −0.1687R − 0.3313G + 0.5B and Cr = 0.5R − 0.4187G − 0.0813B. They are computed with
16-bit fractional constants, rounded half up and saturated. Before the DCT, JPEG shifts 8-bit
samples to a signed range by subtracting 128. For Y this subtraction is done here. For Cb and Cr
the usual +128 offset and this −128 shift cancel, so neither is applied. The block has two
register stages.

**DCT.** `dct2d` computes the orthonormal 8x8 DCT used by JPEG, first along rows and then along
columns:

F(v,u) = ¼·C(v)·C(u)·Σ s(y,x)·cos((2x+1)uπ/16)·cos((2y+1)vπ/16)

Here C(0) = 1/√2 and C(k) = 1 otherwise. The row pass keeps 8 fractional bits in a 19-bit
transpose memory. Each 1-D output is an 8-term dot product with 24-bit cosine constants, computed
by eight constant multipliers in one cycle. The constants are built at elaboration from cos(mπ/16)
values scaled by 2^30. The handshake copies a common DCT core: `nd` qualifies input, `rfd` means
ready for data, and `rdy` qualifies output. One block works like this:

- 64 input cycles while `rfd` = 1;
- 64 cycles for the row pass;
- 64 output cycles with `rdy` = 1, in row-major order;
- the first output comes 65 cycles after the last input.

**Quantiser.** It computes Sq = round(S/Q), rounding halves away from zero. The division is exact
and is done by a combinational divider on the 12.7 value:
sign(S)·⌊(|S| + 64Q) / 128Q⌋. Each step Q comes from the example luminance and chrominance tables
of the JPEG standard (Annex K.1), scaled by the `Compression` level and clamped to 1..255. The
scaling is `(base·pct + 50) / 100` with pct = 50, 100, 200 or 400. All 512 steps are a ROM built
at elaboration (`jpeg_pkg::QROM`). The same ROM feeds the DQT segment of the header, so the file
always describes the quantisation that was actually used.

## Entropy coding

This is the least obvious part of the design.

**Zig-zag.** The quantiser reports each coefficient with its natural (row-major) position p.
`zigzag` writes the coefficient at address `ZIGZAG[p]`, then reads addresses 0..63 in order. The
result is the zig-zag sequence, with the DC coefficient first.

**DC.** The DC coefficient is coded as a difference, DIFF = DC − PRED. PRED is the previous DC of
the same component; Y, Cb and Cr each have their own predictor. All three predictors are cleared
at the start of an image. DIFF is coded in two parts:

- its magnitude category SSSS (the number of bits in |DIFF|), through the DC Huffman table;
- then SSSS amplitude bits: DIFF itself when positive, DIFF − 1 in two's complement when negative.

**AC.** The coder counts zero coefficients. When a nonzero coefficient arrives, it emits the
Huffman code of the symbol (RUN << 4 | SSSS), followed by the amplitude bits.

- If 16 or more zeros come before the coefficient, a ZRL code (symbol 0xF0, meaning 16 zeros) is
  emitted first. While it does so, the coefficient is held: `in_ready` stays low for one cycle
  per ZRL.
- Zeros at the end of a block are replaced by a single EOB code (symbol 0x00).
- No EOB is sent when coefficient 63 is nonzero.

Luminance blocks use the luminance DC and AC tables; Cb and Cr blocks use the chrominance tables.

**Huffman tables.** `huff_codes` does not store codes. It holds the table specifications of the
standard (Annex K.3): BITS, the count of codes of each length 1..16, and HUFFVAL, the symbols in
code order. At elaboration it runs the three procedures of the standard:

1. List the code sizes.
2. Assign codes. The code counts up by one within a length, and doubles when the length grows.
3. Reorder the codes and sizes by symbol value.

The result is a 4 x 256-entry ROM of (code, size) pairs. The header's DHT segment is generated from
the same specifications.

**Bit packing.** Codes enter a 40-bit accumulator MSB first, so the root of each Huffman code ends
up toward the MSB of a byte. A new code is accepted only while fewer than 8 bits are waiting. Whole
bytes then leave one per cycle. After every 0xFF byte a 0x00 byte is inserted, so that scan data
cannot look like a marker. At the end of the image, `flush` pads the last partial byte with
1-bits.

## The file produced

`jfif_header` streams the header segments in this order:

| Segment | Contents | Colour | Mono |
|---|---|---|---|
| SOI | start of image | 2 | 2 |
| APP0 | JFIF 1.01, aspect 1:1, no thumbnail | 18 | 18 |
| DQT | table 0 (luma) and table 1 (chroma), each in zig-zag order | 134 | 69 |
| SOF0 | baseline frame, 8-bit precision, height, width; components 1..3 with 1x1 sampling and tables 0/1/1 | 19 | 13 |
| DHT | DC-luma, AC-luma, DC-chroma, AC-chroma | 420 | 212 |
| SOS | all components, Ss = 0, Se = 63 | 14 | 10 |
| **Total** | | **607** | **324** |

A mono file has only table 0 in DQT, and only the two luma tables in DHT. The numbers in the last
two columns are segment sizes in bytes.

After the header come the scan data, a single interleaved scan, and then the EOI marker
(FF D9), written by the controller. Restart markers are not used.

## Control and timing

The controller in `compressor` runs these steps:

1. **Header.** Write the header. Pixels of the first strip are already accepted during this step.
2. **Wait for a strip.** Wait until `block_buffer` holds 8 complete lines of every component. The
   buffer holds a single strip; there is no double buffering.
3. **Code the strip.** For each block column, and for each component (Y, then Cb, then Cr):
   - start the block read, once the DCT shows `rfd`;
   - wait for the entropy coder's `blk_done`.
4. **Release the strip.** Free the buffer so the next 8 lines can arrive.
5. **Finish.** After the last strip, wait for the coder to empty, flush the packer, and write
   FF D9.

Only one block is in flight at a time, so no FIFOs are needed between stages. Coding one block
takes roughly 200 to 300 cycles: 3 cycles to read, 192 in the DCT, about 66 more through the
quantiser and zig-zag, and the entropy coding, which can wait on the packer. Measured in
simulation, counting from `CompressImage` to `Compressing` falling:

- a 32x32 colour image takes about 14,400 cycles;
- a 32x16 mono image takes about 2,800 cycles.

Both figures include pixel input at about 80 % of the cycles. At 37 MHz, the 32x32 image takes
about 0.4 ms.

The strip buffer is 3 x 8 x `MAX_COLS` bytes, which is 24 KiB at the default `MAX_COLS` = 1024. It
is the only large memory. The quantiser and Huffman tables are small ROMs.

## How this relates to the reference design

The data path, the block order, the quantiser equation, the DC differencing, the zig-zag table,
the MSB-first bit order, the derivation of codes from table specifications, the JFIF header, and
the top-level port names follow the published design. Everything below is this implementation's
own choice, or differs from it.

- **DCT core.** The reference uses a vendor DCT core: 8-bit input, 24-bit coefficients, 19-bit
  internal and result width, rounding, block transpose memory. It takes 9 clocks per input sample
  (one setting shows 5) and has a 95-cycle latency. `dct2d` keeps the widths and the
  `din/nd/rfd/rdy/dout` handshake, but takes one sample per clock, with the timing given above.
  It has a synchronous reset, which the reference core lacks.
- **Tables.** The reference does not list its quantisation or Huffman tables. The example tables
  of the JPEG standard are used.
- **Port behaviour.** The meaning of `Compression`, `Mono`, `ProcessingRGB` and `Compressing`,
  and the pixel handshake, are inferred from the names alone.
- **Image size.** The reference asks for width and height to be multiples of 16. Here multiples
  of 8 are enough, because there is no subsampling. The reference calls the image resolution
  unlimited, but its own port widths (10-bit column count, 9-bit line count, 16-bit address) cap
  the image at 1016 x 504 pixels and the file at 64 KiB. This RTL keeps those ports and their
  limits.
- **Standard JPEG details.** Chroma subsampling (none), byte stuffing, padding, EOI, ZRL/EOB rules
  and DC predictor reset follow the JPEG standard, not a stated choice of the reference.
- **Performance not reproduced.** The reported FPGA figures (4992 slices, 37.129 MHz on a
  Virtex-II class device) describe the reference, not this RTL.

## Files

- `rtl/jpeg_pkg.sv`: the shared package. It holds types (`sample_t`, `dct_t`, `qcoef_t`, `vlc_t`,
  `comp_e`, `htab_e`), the zig-zag table, and the quantisation and Huffman specifications, with
  the constant functions that build the ROMs.
- `rtl/<block>.sv`: one module per stage, as listed in the diagram. `rtl/compressor.sv` is the top.
- `tb/tb_<block>.sv`: self-checking testbenches, one per module. Each ends by printing
  `TB_RESULT checks=N failures=M`.
- `tb/jpeg_ref_pkg.sv`: reference models used by the testbenches:
  - a Huffman decoder written after the decoding procedure of the standard (MINCODE, MAXCODE,
    VALPTR), which is a different algorithm from the encoder's lookup;
  - real-arithmetic colour conversion and DCT.

## Verification

Every testbench compares its block against values worked out independently, and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_rgb2ycbcr` | Random and corner colours against the real-valued equations, within 1 LSB; 2-cycle latency. |
| `tb_block_buffer` | Three strips of a 32-pixel-wide image with gaps; when `full` rises and input is refused; every block of every component; read latency. |
| `tb_dct2d` | Constant, impulse, checkerboard and random blocks against a real DCT, within 3 LSB of 12.7; `rfd`, back-to-back output and the 65-cycle latency. |
| `tb_quantizer` | All levels and both tables; exact half-way cases and extremes; exact results. |
| `tb_zigzag` | Scan order produced by walking the anti-diagonals; random write order and back-pressure. |
| `tb_huff_codes` | Code words printed in the standard's tables K.3 to K.6; symbol counts; prefix-freeness. |
| `tb_entropy_encoder` | Blocks with ZRL runs, no EOB, and large values, decoded by the reference decoder; one block checked bit by bit. |
| `tb_bit_packer` | Random codes with many 0xFF bytes, against a bit-string model with stuffing and padding. |
| `tb_jfif_header` | Segment chain, lengths, frame size, DQT entries, DHT counts, for mono and colour. |
| `tb_compressor` | The whole encoder at default parameters (details below). |

`tb_compressor` encodes four generated images:

- 32x32 colour at level 1;
- 32x16 mono at level 3;
- 48x24 colour at level 0;
- 1016x8 colour at level 3, the widest line the 10-bit `ImgColumns` port allows (a multiple of 8).

It then parses each file as a decoder would. It loads the Huffman tables from the file's own DHT
segment, removes byte stuffing and decodes every block. The coefficients are compared with a
floating-point reference that divides by the file's own DQT steps.

- Any coefficient off by more than one fails the test.
- At least 97 % must match exactly. In practice 99.6 % do; the rest sit on rounding boundaries.
- The test also requires each of these to happen at least once: input stalls, ZRL, EOB, a block
  with no EOB, byte stuffing, padding, mono mode and colour mode.

Run a testbench with Verilator 5 (two-state simulation; everything that is read is reset):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_compressor rtl/jpeg_pkg.sv tb/tb_compressor.sv
./obj_dir/Vtb_compressor
```

Replace `tb_compressor` with any other testbench name to run that one. The end-to-end test runs
in a few seconds.

## Changing the design

- **Wider images.** `MAX_COLS` on `compressor` and `block_buffer` sets the strip buffer size. The
  `ImgColumns`/`ImgLines` port widths and the 16-bit address set the other limits.
- **DCT precision.** `dct2d` takes `DATA_W`, `COEF_W`, `INT_W`/`INT_FRAC` and `RES_W`/`RES_FRAC`.
  The quantiser expects the 12.7 format of `jpeg_pkg::DCT_W`.
- **Quantisation levels.** Change `QSCALE_PCT`, or the base tables, in `jpeg_pkg`. The header
  follows automatically.
- **Huffman tables.** Replace the BITS/HUFFVAL arrays in `jpeg_pkg`. Both the code ROM and the DHT
  segment are derived from them. The DHT segment lengths in `jfif_header` assume tables of 12 and
  162 symbols.
