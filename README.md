# Fixed-ratio embedded frame compression by predefined bitplane comparison

A video decoder spends much of its power and memory bandwidth moving
reference frames to and from external DRAM. This design halves that traffic
and the frame-store size with a small lossy codec placed between an H.264
decoder core and its 32-bit memory bus. Every 4x2 block of 8-bit pixels
(64 bits) becomes exactly one 32-bit word. Because the ratio is fixed at 2:1,
a block's compressed word sits at a fixed address (half the uncompressed
one), so motion compensation keeps random access to the frame. The price is
a bounded loss of quality. The codec reaches it with three cheap tricks:

* **pixel truncation** pulls the outliers of a smooth block into one quarter
  of the 0..255 range, so its top bitplanes become uniform;
* **start plane and mode** encode those uniform top planes in 4 bits for the
  whole block;
* **predefined bitplane comparison** codes the next four bitplanes of each
  2x2 half as indices into a small table of typical 4-pixel patterns. If the
  table does not fit, three raw bitplanes are stored instead.

The compressor is a 2-stage pipeline (2 clocks of latency, one block per
clock). The decompressor is a single stage (1 clock). The original design
targets HD1080/HD720 at 30 frames/s with a 150 MHz clock.

## The 32-bit segment

| bits    | field        | meaning |
|---------|--------------|---------|
| [31:30] | Mode         | preset value of bitplanes {B7,B6}; B5 is always preset to 0 |
| [29:28] | Start Plane  | SP = number of top planes (from B7) that equal the preset, 0..3 |
| [27:26] | Decision L   | left 2x2 half: 0 group A, 1 group B, 2 group C, 3 no comparison |
| [25:24] | Decision R   | right 2x2 half, same code |
| [23:12] | Coded Data L | four 3-bit pattern indices, or three raw 4-bit bitplanes |
| [11:0]  | Coded Data R | same for the right half |

`ec_pkg::segment_t` declares this layout as a packed struct.

Pixel numbering inside a 4x2 block, used on every internal bus
(`block_t`, pixel *i* in bits `[8i+7:8i]`):

```
 top row:     0 1 | 4 5
 bottom row:  2 3 | 6 7
              left  right   (2x2 halves)
```

A **bitplane** of a 2x2 half is 4 bits: bit *b* of pixels 0,1,2,3 (or
4,5,6,7), with the first pixel in the most significant position.

## How a block is coded

### 1. Pixel truncation (stage 1)

The block average `avg = (sum of 8 pixels) >> 3` selects a quarter of the
range. In that quarter, the max-min difference must stay below a limit:

| type | average   | difference | clamp range |
|------|-----------|------------|-------------|
| 1    | 0..63     | < 32       | 0..63       |
| 2    | 64..127   | < 64       | 64..127     |
| 3    | 128..191  | < 64       | 128..191    |
| 4    | 192..255  | < 32       | 192..255    |
| 5    | otherwise |            | unchanged   |

If the test passes, every pixel outside the quarter is clamped to its nearest
edge (e.g. type 2: below 64 becomes 64, 128 or above becomes 127). Only the
rare pixel that strays across a quarter boundary in a smooth block is
changed, and afterwards B7 and B6 are identical across the block.
(`ec_pixel_truncation`, four `ec_quantizer` instances.)

### 2. Start plane and mode

Four modes preset the top three planes: mode *m* presets B7 = m[1],
B6 = m[0] and B5 = 0 for all eight pixels. For each mode the start plane
counts how many planes from B7 down equal the preset, stopping at the first
mismatch and capping at 3. The mode with the largest SP is kept; on a tie the
lowest mode number wins. These SP planes are now known from the header, and
coding starts at bit `7-SP`. (`ec_start_plane`.)

### 3. Rounding (compensation)

The coded field of each pixel is either 4 bits (pattern comparison) or 3 bits
(no comparison), starting at bit `7-SP`. All bits below it are dropped. To
round rather than truncate, the field is incremented when the first dropped
bit is 1, unless the field is all ones. The all-ones exception means a carry
can never reach the preset planes. Both roundings are computed in parallel,
because the format is chosen only afterwards. (`ec_compensation`.)

Example with SP = 0: `0101 1100` becomes `0110` in the 4-bit field.

### 4. Predefined bitplane comparison

This is the heart of the codec. Each 2x2 half is coded on its own, with the
block's SP. The four planes from `7-SP` down (comparison-rounded pixels) are
looked up in three groups of eight patterns:

| index   | 0    | 1    | 2    | 3    | 4    | 5    | 6    | 7    |
|---------|------|------|------|------|------|------|------|------|
| group A | 0000 | 1111 | 1110 | 0111 | 0011 | 1100 | 0001 | 1000 |
| group B | 0000 | 1111 | 1110 | 0111 | 1010 | 1001 | 0110 | 0101 |
| group C | 0000 | 1111 | 1110 | 0111 | 1101 | 1011 | 0010 | 0100 |

Together the groups cover all sixteen 4-bit planes. The first four patterns
(flat and near-flat) are in every group; the rest split into horizontal and
vertical structure (A), diagonals (B) and single-pixel outliers (C). Since
one group's index costs 3 bits, four planes fit the 12-bit field.

* A group **qualifies** when it holds the first three planes.
* If it also holds the fourth plane, the code is exact. Otherwise the fourth
  plane, the least significant one, is replaced by the group's pattern with
  the smallest Hamming distance (lowest index on a tie). This keeps the
  error of that plane to the fewest pixels.
* Preference order: exact groups before approximate ones, then A, B, C.
* If no group qualifies, the half is stored as **no comparison**: three raw
  4-bit planes of the no-comparison-rounded pixels.

So a half is coded to 4 bitplanes when its structure is regular, and to 3
otherwise. (`ec_side_compare` for one half; `ec_bitplane_compare` for both
halves and the stage-2 register.)

### Worked example

Input block (pixels 0..7): `4 50 5 42 36 43 32 10`. The average is 27 but
the difference is 46, so truncation leaves it unchanged (type 5). B7 and B6
are all zero and B5 is not, so mode 0 and SP = 2, and coding starts at bit 5.

* Left half (4, 50, 5, 42): after comparison rounding its planes do not fit
  any group, so it is stored as no comparison. The no-comparison-rounded
  pixels 12, 50, 13, 42 give planes B5..B3 `0101 0100 1011`.
* Right half (36, 43, 32, 10): planes B5..B2 are `1110 0000 0101 1101`.
  Group B holds the first three (indices 2, 0, 7). `1101` is not in B, and
  its nearest B pattern is `1111` (index 1).

Segment: `00 10 11 01 010101001011 010000111001`. Decoded block:
`8 48 8 40 36 44 36 12`.

## Decoding

`ec_data_rearrange` rebuilds each pixel from the top. The SP preset planes
come first. Next come the four pattern planes, or the three raw planes.
Every remaining lower bit is zero. The rounding in the encoder already makes
that zero fill the nearest value. `ec_decompressor` adds one output register:
a segment presented in one clock gives its eight pixels in the next.

## Pipeline and timing

```
           stage 1                     stage 2
 in_blk -> pixel truncation -> [reg] -> start plane -> compensation -> comparison -> [coded reg] -> segment
                                            \___ mode, SP, decisions ____________________ [header reg] _/
```

* `ec_compressor`: `in_valid`/`in_blk` every clock if wanted;
  `out_valid`/`out_seg` two clocks later. No back-pressure.
* `ec_decompressor`: `in_valid`/`in_seg` to `out_valid`/`out_blk` one clock
  later.
* All registers use an asynchronous active-low reset (`rst_n`).

## The system interface (top: `ec_system_interface`)

The top is the codec as it sits in the decoder: between the deblocking
filter (writer), motion compensation (reader) and one 32-bit memory port.

| port | dir | width | use |
|------|-----|-------|-----|
| `df_valid`, `df_addr`, `df_data` | in | 1, 20, 32 | one 4-pixel row per clock from the deblocking filter |
| `mc_req`, `mc_addr` | in | 1, 20 | read request for one 4x2 block (address of its top row) |
| `mc_ready` | out | 1 | request taken this clock |
| `mc_rvalid`, `mc_rdata` | out | 1, 32 | reconstructed block, top row then bottom row |
| `mem_req`, `mem_we`, `mem_addr`, `mem_wdata` | out | 1, 1, 20, 32 | memory request |
| `mem_rvalid`, `mem_rdata` | in | 1, 32 | read data, in request order |

In every 32-bit row word, column *c* is in bits `[8c+7:8c]`.

* **Address space.** Both clients use uncompressed word addresses: the top
  row of a 4x2 block is at the even address 2k, the bottom row at 2k+1. The
  compressed segment is stored at word k (`ec_addr_map`: select, then shift
  right by one).
* **Write path.** A row at an even address is held. The row at the next odd
  address completes the block, which enters the compressor. Two clocks
  later the segment is written. An assertion checks the even/odd pairing.
* **Read path.** Up to `RD_DEPTH` (4) reads may be outstanding. Returned
  segments wait in a 4-entry FIFO, which is bypassed when empty. The
  decompressor holds each block for two clocks, one per row. A steady
  request stream therefore gives 4 pixels every clock, which is the
  motion-compensation input rate. With an idle FIFO, the top row leaves one
  clock after `mem_rvalid`.
* **Arbitration.** A segment leaving the compressor cannot wait, so writes
  always win the port. `mc_ready` is low in that clock and whenever
  `RD_DEPTH` reads are outstanding.
* **Assumed memory.** The memory accepts one request per clock and answers
  reads in order after any latency. The real system puts an AMBA 2.0 bus,
  an arbiter and a 128 Mb mobile SDR DRAM behind this port; none of them
  are part of this RTL.

## Files

| file | content |
|------|---------|
| `rtl/ec_pkg.sv` | block/segment types, decision codes, pattern table function |
| `rtl/ec_pixel_truncation.sv`, `rtl/ec_quantizer.sv` | stage 1 |
| `rtl/ec_start_plane.sv` | start plane and mode search |
| `rtl/ec_compensation.sv` | both roundings |
| `rtl/ec_side_compare.sv`, `rtl/ec_bitplane_compare.sv` | pattern comparison |
| `rtl/ec_data_packer.sv` | header register and segment packing |
| `rtl/ec_compressor.sv` | two-stage compressor |
| `rtl/ec_data_rearrange.sv`, `rtl/ec_decompressor.sv` | decompressor |
| `rtl/ec_addr_map.sv` | address select and 2:1 mapping |
| `rtl/ec_system_interface.sv` | top: write path, read path, shared port |
| `tb/tb_ec_model_pkg.sv` | integer reference model of coder and decoder |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ec_frame_psnr` and `tb_ec_mc_access` |

Parameters of the top: `ADDR_W` = 20, `BUS_W` = 32, `RD_DEPTH` = 4.
The coding itself has no parameters: block size, field widths and pattern
groups are fixed by the format.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if the testbench hangs. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
  --top-module tb_ec_system_interface \
  rtl/ec_pkg.sv tb/tb_ec_model_pkg.sv tb/tb_ec_system_interface.sv
./obj_dir/Vtb_ec_system_interface
```

Replace the top module and file name for the other testbenches.

* **Block testbenches.** Each drives its module with thousands of random
  and directed blocks, or segments. It compares every output with the
  reference model in `tb_ec_model_pkg` and checks latencies: 1 clock for
  stage 1 and the decompressor, 2 for the compressor. It also counts
  coverage: every truncation type, mode, start plane, decision, and
  rounding up, saturating or not rounding.
* **`tb_ec_system_interface`** runs the top at its default parameters. It
  writes 2000 blocks through the deblocking-filter port and reads blocks
  back in random bursts from a memory model with 1..3 clocks of latency.
  It checks every write word and address, the two-clock write latency,
  every returned row and its exact clock. It requires that each of these
  happened at least once: a read stalled by a write, a read held off by the
  full FIFO, and a back-to-back stream of four or more blocks.
* **`tb_ec_mc_access`** runs the motion-compensation read cases. Each
  motion-vector component can be aligned, not aligned, or at a sub-pixel
  position, so one 4x4 block needs 2 to 15 compressed blocks. Each case
  runs against a memory with a fixed read latency L of 1 to 6 clocks. The
  testbench checks every row and requires the N blocks to arrive in exactly
  L + 2N + 1 clocks, without a gap. Weighted with the published case mix,
  the average is 15.2 + L clocks per 4x4 block. That is inside the
  25-clock budget of a 150 MHz HD decoder if the memory answers within 9
  clocks. The worst case, 15 blocks for a 9x9 area, needs
  31 + L clocks and does not fit. The original design reports the same for
  that case.
* **`tb_ec_frame_psnr`** streams a synthetic 352x288 frame through
  compressor and decompressor at one block per clock. It checks the frame
  time of blocks + 3 clocks and reports PSNR: about 42 dB on this smooth,
  synthetic content. Real sequences were not available, and the original
  design reports a loss of 1.9 to 3.5 dB on CIF test sequences, including
  decoder drift.

The reference model is a separate, integer-arithmetic implementation of the
same rules. It shares the design's reading of the points listed below, so
the testbenches check that the RTL implements these rules, not that the
rules match another implementation bit for bit.

## Interpretations and departures

The coding rules above follow the published algorithm. Where its
description was ambiguous or silent, this design chose as follows:

* **Start plane.** One prose description of the start plane is off by one
  from the flowchart and from a worked example. This design follows the
  flowchart: SP counts the matching top planes, so two all-zero top planes
  give SP = 2.
* **Pattern-comparison details.** The rule for the fourth plane (nearest
  pattern), the group preference, the decision codes and the bit order
  inside the 12-bit coded fields are this design's choices.
* **Decoder zero fill.** Lower planes are filled with zeros.
* **Truncation type selector.** It uses only the average; the difference
  test lives in the quantizers. This is equivalent to a five-way selection.
* **Header register.** The header is registered in the packer so that the
  whole segment leaves on one clock edge.
* **System interface.** Handshakes, the row pairing, the read FIFO and its
  depth, and write-first arbitration are this design's.
* **Not included.** The decoder, the bus, the arbiter and the DRAM. The
  original design's gate count (about 4.0k gates compressor, 0.9k
  decompressor, 90 nm) and power figures were not reproduced.
