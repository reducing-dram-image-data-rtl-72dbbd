# Low-energy image data path for a video engine and a heterogeneous DRAM

In a DRAM of a few hundred megabits or more, moving a word over the chip's
internal data H-tree costs more energy than anything else in a page-mode
access. That cost grows with the number of wires that toggle (self
transitions) and with adjacent wires that toggle against each other
(coupling transitions). Image data is very regular: neighbouring pixels have
close values. This design reshapes the words of an image block before they
reach the DRAM so that successive words on the bus look alike and
neighbouring wires carry alike bits. The DRAM controller sees ordinary
writes and reads, with the same addresses; only the bit patterns change.

A second idea concerns where frames live. Reference frames in video decoding
are read many times, other frames once. The DRAM is assumed to hold a small,
cheap-to-access *hot data zone* near its I/O next to the large main array.
The design steers requests to it by address masking and can copy regions of
reference frames into it.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The testbenches
are self-checking and run on Verilator 5.

## The data path at a glance

```
engine ──pix_in──► pixel_scheduler ─► mht_encoder ─► coef_packer ─► bus_encoder ──bus_wr──► DRAM
         (raster)   (reorder block)   (optional      (records →     (Gray + bit
                                       recompression)  64-bit words)  interleave)

engine ◄─pix_out── pixel_scheduler ◄─ mht_decoder ◄─ coef_unpacker ◄─ bus_decoder ◄─bus_rd── DRAM

request address ─► hot_zone_decoder ─► hot / main + local address
swap command    ─► hot_swap_ctrl ─► main-array read port, hot-zone write port
```

`dram_image_codec_top` wires all of this together. The unit of work is one
16x16 block of 8-bit pixels, sent as 32 words of 64 bits. Each word holds
eight horizontally adjacent pixels, pixel *i* in bits `8i+7:8i`. The engine
writes a block in raster order and reads it back in raster order. Between
the two, everything is invisible to it, provided it reads with the same
configuration it wrote with.

The configuration is one struct, `cfg` (`dm_pkg::dm_cfg_t`):

| field     | effect |
|-----------|--------|
| `comp_en` | lossy recompression of each 8-pixel group (off: raw pixels) |
| `qp`      | quantisation set 0..3 for recompression |
| `gray_en` | Gray coding: of each pixel for raw data, of each coefficient field when compressed |
| `ilv_en`  | bit-level interleaving of raw pixel words (ignored when compressed) |

A separate input, `blk_small`, selects an 8x8 chrominance block instead of
a 16x16 luminance block. In 4:2:0 video each macroblock has one such block
per chroma plane. Change `cfg` and `blk_small` only between blocks, with
both paths idle. The block reorder is always on.

## Pixel transfer scheduling

Sent in raster order, a block puts pixel P0 and then P8 on the same eight
wires. Those pixels are eight columns apart and so only loosely related. The
scheduler instead sends each 8-pixel-wide column strip from top to bottom:

```
scheduled word:  0      1       2       ...  15        16     17      ...  31
pixels:          P0-7   P16-23  P32-39  ...  P240-247  P8-15  P24-31  ...  P248-255
```

Now the same wires carry vertically adjacent pixels on successive cycles.
Scheduled word *k* is raster word `(k mod 16)*2 + k/16`. For power-of-two
sizes this just swaps the two fields of the buffer address.

`pixel_scheduler` is a single 32-word buffer. With `TO_BUS=1` (write side)
it is written in raster order and read in scheduled order; with `TO_BUS=0`
(read side) the other way round. It fills completely, then drains
completely, so an unstalled block takes 32 + 32 cycles. A second buffer
would double the throughput but was not needed for correctness.

An 8x8 chroma block (`small_blk`) is exactly one strip wide on a 64-bit bus.
Its scheduled order is therefore its raster order, with each row directly
under the previous one, which is already the good order. Only the word count
changes, to 8. On a narrower bus the same input gives several strips, and
they are reordered like the luminance block.

## Gray coding and bit-level interleaving

With `gray_en`, each 8-bit pixel is sent as its Gray code,
`g[7] = b[7]`, `g[i] = b[i+1] ^ b[i]`. Pixel values that are close then
differ in few bits. The read side inverts it with the XOR chain
`b[i] = b[i+1] ^ g[i]`.

With `ilv_en`, the word is regrouped so that wire `8j + i` carries bit *j*
of pixel *i*. Wires 0..7 then carry the LSBs of the eight pixels,
wires 56..63 their MSBs. Same-weight bits of neighbouring pixels are
strongly correlated, so adjacent wires tend to switch together, which costs
no coupling energy. `bit_interleave` and `bit_deinterleave` are pure wire
permutations: a synthesised netlist of either has no cells at all.

The write side applies Gray coding first, then interleaving (`bus_encoder`);
the read side undoes them in the reverse order (`bus_decoder`). Both are one
register stage. For compressed data the top switches both steps off here,
because Gray coding then happens per coefficient inside the MHT codec, and
interleaving transformed coefficients does not help.

## Recompression: the MHT record

This is the least obvious part of the design.

With `comp_en`, each 8-pixel word is transformed by an 8-point modified
Hadamard transform (MHT) built from three stages of integer
average/difference butterflies (S-transform). Stage *s* pairs the two values
whose positions differ in bit *s*:

```
l = floor((a + b) / 2)      h = a - b                  (forward)
a = l + floor((h + 1) / 2)  b = a - h                  (inverse, exact)
```

Coefficient *Yk* took the difference in the stages named by the set bits of
*k*. So *Y0* is the block average (8 bits, unsigned), and *Yk* is a signed
value of `8 + popcount(k)` bits. The DC term is kept as it is. *Y1..Y7* are
arithmetically shifted right by the QP set's amounts:

| QP | Y1 | Y2 | Y3 | Y4 | Y5 | Y6 | Y7 | record bits | words / block |
|----|----|----|----|----|----|----|----|-------------|---------------|
| 0  | 0  | 0  | 0  | 0  | 0  | 0  | 0  | 76          | 38            |
| 1  | 1  | 1  | 2  | 1  | 2  | 2  | 3  | 64          | 32            |
| 2  | 2  | 2  | 3  | 2  | 3  | 3  | 4  | 57          | 29 (last word padded) |
| 3  | 3  | 3  | 4  | 3  | 4  | 4  | 5  | 50          | 25            |

An 8x8 chroma block has 8 records, i.e. 10, 8, 8 or 7 words for QP 0..3.

For QP > 0 the shift equals `popcount(k) + QP - 1`. So every AC coefficient
then fits in exactly `9 - QP` bits, and the record keeps only those bits.
Fields lie back to back, Y0 at bit 0 (`dm_pkg::field_w`, `field_off`,
`rec_len`). With `gray_en` each field is Gray coded over its own width,
treating the two's-complement bits as unsigned. QP 0 is lossless and
*longer* than the raw data (76 > 64 bits), because the transform grows the
word length. The decoder sign-extends each field and shifts it back left
(no rounding offset). It then runs the inverse butterflies and clamps to
0..255.

`coef_packer` appends records LSB-first to a bit accumulator and emits a
64-bit word whenever one is full. After a block's 32nd record it flushes the
remainder as a zero-padded word, so every block starts word-aligned.
`coef_unpacker` does the reverse and drops the padding after the 32nd
record. Records wider than the bus (QP 0) and narrower ones both flow at up
to one per cycle.

Beware one interaction. Because records straddle word boundaries at QP 0,
2 and 3, the same coefficient does not stay on the same wires from one word
to the next. Only at QP 1 (64-bit records) are the fields wire-aligned, and
that is where Gray coding of coefficients helps the most in the tests below.

## Hot data zone and hot data swap

`hot_zone_decoder` compares the upper address bits with the window base
`HOT_BASE`. Addresses count 64-bit words. By default the device is 2 Gb
(2^25 words, `ADDR_W = 25`) and the hot zone 32 Mb (2^19 words,
`HOT_AW = 19`), placed at the top of the address space. The window spans
2^`HOT_AW` words and is aligned to that size; an assertion checks the
alignment. `HOT_WORDS` (default 2^`HOT_AW`) says how many of those words
the zone really has. A zone whose size is not a power of two therefore
costs one extra compare of the offset against a constant. A 24 Mb zone, for
example, is `HOT_AW = 19` with `HOT_WORDS = 393216`, and the top 131,072
words of its window go to the main array. `hot_addr` is the offset inside
the zone.

`hot_swap_ctrl` supports decoding region by region. The same region of
all *m* reference frames is brought into the hot zone. All predicted frames
are then motion-compensated for that region before the next one is fetched.
On `start` it copies, for frame *f* = 0..`n_refs`-1, the words
`frame_base + f*frame_words + region_idx*region_words + w` of the main
array into hot-zone slot `f*region_words + w`. It issues one read per cycle
on a valid/ready port, accepts in-order responses of any latency, and
writes one hot-zone word per response. `err` refuses a request whose
regions would need more than `HOT_WORDS` words. `swap_words` counts all words moved, which
is what the swap energy depends on.

As a sizing example: a 1080p reference frame with chroma is 24 Mb
(393,216 words), so one whole frame fits in the 32 Mb zone. With five
reference frames, a region can be at most 104,857 words of each.

The hot zone and main arrays themselves, their H-trees, supplies and
refresh are DRAM circuitry outside this RTL. The top brings out the
main-array read port (`main_rd_*`, `main_rsp_*`) and the hot-zone write
port (`hot_wr_*`) that the swap uses.

## Interfaces and timing

- Clock `clk`, asynchronous active-low reset `rst_n`, on every block.
- All streaming ports use valid/ready; a transfer happens on a rising edge
  with both high. `last` flags mark the final word of a block on the DRAM
  write side and on the pixel output.
- Latency: scheduler fill (32 words), then one register each in MHT
  encoder, packer and bus encoder. The read side is the mirror image.
- Throughput: one word per cycle through every stage except the scheduler,
  which alternates 32 fill and 32 drain cycles. That gives 0.5 word/cycle
  per path, enough for D1 at 30 frame/s from about a 4 MHz clock.
- `hot_zone_decoder` is combinational.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `BUS_W`, `PIX_W`, `PPB` | 64, 8, 8 | `dm_pkg` | bus width, pixel width, pixels per word |
| `BLK_W`, `BLK_H` | 16, 16 | `dm_pkg` | block size |
| `QSHIFT` | table above | `dm_pkg` | quantisation shifts |
| `ADDR_W` | 25 | top, decoder, swap | word address width (2 Gb) |
| `HOT_AW` | 19 | top, decoder, swap | hot zone window (32 Mb); 17 and 18 give 8 and 16 Mb |
| `HOT_WORDS` | 2^`HOT_AW` | top, decoder, swap | words in the hot zone; 393216 gives 24 Mb |
| `HOT_BASE` | `25'h1F8_0000` | top, decoder | hot window base |
| `REF_W` | 3 | top, swap | width of `n_refs` |

`pixel_scheduler`, `gray_enc/dec`, `bit_(de)interleave` and the packers also
take their sizes as parameters. A 32-bit bus with the same block, for
example, becomes four 4-pixel strips.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a cycle watchdog. Expected values
come from models written independently of the RTL:

- `mht_ref_pkg` is an integer model of the transform, quantisation and
  record layout.
- `main_array_model` is a main array with random back-pressure and latency.
- The remaining expected values are bit-by-bit formulas in the testbenches.

`tb_dram_image_codec_top` runs the whole design at its default parameters.
It uses a smooth synthetic 64x32 frame (eight blocks) in all 12
configurations, with a behavioural DRAM and random stalls on both sides. It
then sends the matching 8x8 chroma blocks through four of those
configurations. It checks:

- every pixel read back (exact for raw data and QP 0; the reference model
  for QP 1..3);
- the words per block;
- the first bus word of each block;
- the hot/main routing of every address;
- a two-frame swap, read back from the hot zone;
- that an oversize swap is refused.

It also counts self transitions and coupling transitions (a pair of adjacent
wires switching in opposite directions counts twice, one switching against a
steady neighbour once). The counts on the bus for these eight blocks were:

| configuration | words | self | coupling |
|---------------|-------|------|----------|
| raster order, binary (conventional) | 256 | 6711 | 10148 |
| scheduled, binary | 256 | 3685 | 5342 |
| scheduled, Gray | 256 | 2597 | 4518 |
| scheduled, binary, interleaved | 256 | 3685 | 5756 |
| scheduled, Gray, interleaved | 256 | 2597 | 4120 |
| MHT QP 0 / 1 / 2 / 3, binary | 304 / 256 / 232 / 200 | 9462 / 4895 / 6970 / 6097 | 7307 / 2338 / 4167 / 3712 |
| MHT QP 0 / 1 / 2 / 3, Gray | 304 / 256 / 232 / 200 | 6842 / 1151 / 3637 / 4041 | 9058 / 1990 / 5068 / 6087 |

These numbers come from a synthetic ramp, not real video, so use them only
for the direction of each effect. On this image, interleaving binary pixels
slightly raised coupling, while interleaving Gray-coded pixels lowered it.
That the effect of interleaving on coupling depends on the data is expected.
With recompression, Gray coding cut self transitions at every QP and mostly
raised coupling.

Two more testbenches run the workloads the method was evaluated on, at the
top's default parameters.

`tb_workload_cif_frame` sends a whole CIF frame (352x288, 396
macroblocks) through all 12 configurations. The picture is synthetic: a lit
gradient, a smooth disc, a finely textured patch and a little noise. Every
pixel is checked. The transition counts and their reductions against the
conventional transfer were:

| configuration | words | self | coupling |
|---------------|-------|------|----------|
| raster order, binary (conventional) | 12672 | 183042 | 277088 |
| scheduled, binary | 12672 | -49.0 % | -50.4 % |
| scheduled, Gray | 12672 | -64.6 % | -58.8 % |
| scheduled, binary, interleaved | 12672 | -49.0 % | -49.3 % |
| scheduled, Gray, interleaved | 12672 | -64.6 % | -65.2 % |
| MHT QP 0 / 1 / 2 / 3, binary | 15048 / 12672 / 11484 / 9900 | +119 / -20 / +77 / +47 % | -24 / -83 / -51 / -51 % |
| MHT QP 0 / 1 / 2 / 3, Gray | 15048 / 12672 / 11484 / 9900 | +4 / -84 / -45 / -33 % | -9 / -83 / -47 / -31 % |

The test also sends the 396 8x8 blocks of one chroma plane through four
configurations; the counts are printed but have no conventional baseline.

The recompressed rows show the cost of packing records back to back.
Only at QP 1 do the fields stay on the same wires from word to word. At
QP 0, 2 and 3 the field positions drift, and self transitions rise despite
the smaller data volume. A layout that keeps every field on fixed wires
would avoid this, at the price of unused bits in each word. That is the
first thing to revisit if recompression is to be used at QP 2 or 3.

`tb_workload_hd_reference_swap` runs the 1080p reference-frame case.
Frames of 24 Mb (393,216 words) lie in the 2 Gb main array, with 1 to 5
reference frames and hot zones of 8, 16, 24 and 32 Mb. The test builds four
copies of the top, with `HOT_AW` = 17, 18, 19 and 19; the 24 Mb copy sets
`HOT_WORDS = 393216`. For each case it walks the
whole frame region by region, checks every word that lands in the hot zone,
and has one oversize request refused. Each configuration moves every
reference word exactly once (*m* x 393,216 words). An estimate that charges
twice the reference data exceeding the zone would give, for example,
2,883,584 words for five frames and a 32 Mb zone, against the 1,966,080
this controller copies.

## Simulating

Packages must come first on the command line. To run the end-to-end test:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  --top-module tb_dram_image_codec_top \
  rtl/dm_pkg.sv tb/mht_ref_pkg.sv tb/tb_dram_image_codec_top.sv
./obj_dir/Vtb_dram_image_codec_top
```

It builds in a few seconds and runs in well under a second. Any other
testbench works the same way: replace the top module and the last file with
`tb/tb_<block>.sv`. The simulator has two states, so every register that is
read has a reset.

## Where this design goes beyond or departs from its source method

The method this RTL implements describes what the data manipulations,
recompression, hot zone and swap do. It does not give their circuits. These
points are this design's own:

- **The transform.** The MHT is realised as three S-transform
  butterfly stages. This choice makes QP 0 lossless and explains the
  shift table's pattern exactly, but a different MHT would give different
  coefficients and record lengths.
- **Record layout and packing** (field widths, order, Gray coding of signed
  fields, word packing with per-block padding).
- **Dequantisation** is a plain left shift, with no reconstruction offset.
- **Packed records drift across the wires.** At QP 0, 2 and 3 this cancels
  the benefit of scheduling for self transitions (see the CIF results).
- **Single-buffered reorder.** Its throughput is half a word per cycle.
- **The swap only copies into the hot zone.** Reference data is read-only,
  so nothing is written back. An energy estimate that charges the
  swap twice (out and in) overstates what this controller does.
- **Hot zone size.** The zone sits in an aligned power-of-two window, and
  a size limit handles other sizes such as 24 Mb. The window's position in
  the address space is arbitrary.
- **Chrominance format.** The method stores chroma in blocks as well but
  does not fix their size. This design supports 8x8 blocks (4:2:0) only.
- **Not built.** The baseline raster-order transfer is not offered as a
  mode. Lower supply voltage and longer refresh of the hot zone are circuit
  matters of the DRAM die and are not in this RTL.

## Files

| file | contents |
|------|----------|
| `rtl/dm_pkg.sv` | shared sizes, types, QP table, record layout functions, Gray helpers |
| `rtl/pixel_scheduler.sv` | block reorder buffer, both directions |
| `rtl/gray_enc.sv`, `rtl/gray_dec.sv` | per-lane Gray conversion |
| `rtl/bit_interleave.sv`, `rtl/bit_deinterleave.sv` | bit-level interleaving |
| `rtl/bus_encoder.sv`, `rtl/bus_decoder.sv` | registered Gray + interleave stage |
| `rtl/mht_encoder.sv`, `rtl/mht_decoder.sv` | recompression and decompression of one 8-pixel group |
| `rtl/coef_packer.sv`, `rtl/coef_unpacker.sv` | variable-length records to and from 64-bit words |
| `rtl/hot_zone_decoder.sv` | hot zone address masking |
| `rtl/hot_swap_ctrl.sv` | region copy from main array to hot zone |
| `rtl/dram_image_codec_top.sv` | the complete data path |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_workload_cif_frame.sv`, `tb/tb_workload_hd_reference_swap.sv` | workload tests at full size |
| `tb/mht_ref_pkg.sv`, `tb/main_array_model.sv` | reference model and behavioural main array |
