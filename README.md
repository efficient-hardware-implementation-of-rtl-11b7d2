# Multiplierless 8x8 DCT / IDCT image path for VVC-style transform coding

This design takes an 8-bit greyscale image, cuts it into 8x8 blocks,
applies the two-dimensional forward DCT of Versatile Video Coding (VVC) to
each block, and then applies the inverse DCT to get the pixels back. Between
the two transforms sit the coefficients a codec would quantise and send, and
they are brought out for observation. The path contains no multipliers.
Two ideas keep it small:

* **Shift-and-add constants.** Every product with a transform coefficient is
  a fixed shift-and-add network. The 8-point DCT matrix has only seven
  distinct magnitudes, so each input sample is multiplied by all seven once,
  with partial terms shared between them. Each output is then a signed sum of
  eight of those products.
* **One 1D stage per transform, used twice.** A 2D DCT is `C·X·Cᵀ`: a column
  transform followed by a row transform. Each transform has one 1D stage,
  which handles all 64 samples of a block at once. A multiplexer in front of
  the stage first feeds it the input block. It then feeds it the transposed
  result of that first pass, which sits in a 64-entry transpose register. So
  a DCT/IDCT pair needs two stages of shift-and-add logic instead of four.

With the default parameters the design holds a 512x512 image (4,096 blocks).
After the image is loaded, the whole image goes through the DCT and the
IDCT in 8,198 clock cycles: one block every two cycles, plus six cycles of
latency.

## Data path

```
 load port (8 bit/cycle)
        |
  +-----v------+ 512 bit  +--------------+ 64x8  +-------------------------+ 64x16  +-------------------------+ 64x8
  | image_ram  |--------->| block_reader |------>|          dct2d          |------->|         idct2d          |------> pix_*
  | 262,144 x8 | 1 word = | counter + 64 |       |  mux -> dct_stage -+    |  |     |  mux -> dct_stage -+    |
  | dual port  | 1 block  | input regs   |       |   ^   (fwd)        |    |  |     |   ^   (inv)        |    |
  +------------+          +--------------+       |   +-- transpose <--+    |  |     |   +-- transpose <--+    |
                                                 |       register -> out   |  |     |       register -> clip  |
                                                 +-------------------------+  |     +-------------------------+
                                                                              +--> coef_* (observation)
```

All the links between blocks use a valid/ready handshake and carry the block
number as a tag. A stall at the pixel output (`pix_ready_i` low) propagates
back through the IDCT, the DCT and the block reader. No data is lost.

## The transform arithmetic

### Matrix

`C[k][n] = round(64·√2·cos(π(2n+1)k/16))` for `k > 0`, and `C[0][n] = 64`.
This gives the VVC/HEVC 8-point integer DCT-II:

```
 64  64  64  64  64  64  64  64
 89  75  50  18 -18 -50 -75 -89
 83  36 -36 -83 -83 -36  36  83
 75 -18 -89 -50  50  89  18 -75
 64 -64 -64  64  64 -64 -64  64
 50 -89  18  75 -75 -18  89 -50
 36 -83  83 -36 -36  83 -83  36
 18 -50  75 -89  89 -75  50 -18
```

`dct_pkg::cmat(k, n)` computes the entries from the angle index
`(2n+1)k mod 32`, using the symmetries of the cosine. No table is stored.

### Constant multiplication (`const_mult`)

For one sample `x`, the module computes:

```
18x = 16x + 2x        36x = 18x << 1        50x = 32x + 18x
64x = x << 6          83x = 64x + 18x + x   75x = 83x - 8x
89x = 83x + 4x + 2x
```

That is 7 adders or subtracters for all seven constants, and no multiplier.

### One pass (`dct_stage`)

Each pass computes, for all eight columns `j` at once:

* forward: `Z[i][j] = Σm C[i][m]·X[m][j]`
* inverse: `Z[i][j] = Σm C[m][i]·X[m][j]`

Each term is one of the seven products of `X[m][j]`, negated if the matrix
entry is negative. The stage has 64 `const_mult`s and 64 eight-term adders.

Each sum is rounded, shifted right and saturated to 16 bits:
`sat16((Z + 2^(s-1)) >>> s)`. The stage writes the result **transposed**,
so `out[j][i] = Z[i][j]`.

Because of that transposition, running the stage twice gives the 2D
transform:

* forward: pass 1 gives `(C·X)ᵀ`, pass 2 gives `(C·(C·X)ᵀ)ᵀ = C·X·Cᵀ`.
* inverse: the same reasoning gives `Cᵀ·Y·C`.

### Scaling

The rows of `C` have squared norm 2^15, so a forward transform followed by
an inverse one scales the data by 2^30. The design splits that factor over
the four passes the way VVC does for 8-bit video:

| pass          | shift | input range             | output          |
|---------------|-------|-------------------------|-----------------|
| DCT pass 1    | 2     | pixels 0..255           | 16-bit signed   |
| DCT pass 2    | 9     | 16-bit                  | 16-bit coefficients |
| IDCT pass 1   | 7     | 16-bit coefficients     | 16-bit signed   |
| IDCT pass 2   | 12    | 16-bit                  | clipped to 0..255 |

Some examples:

* An all-255 block has DC coefficient 32,640, which fits in 16 bits.
* Coefficients that come from 8-bit pixels stay within ±32,640 and do not
  saturate. The bound is 255 · (sum of the absolute values of a matrix row)²
  / 2^11. Saturation (`sat_o`) is a guard for coefficient blocks that no
  pixel block produces, for example after heavy quantisation.
* IDCT outputs below 0 or above 255 are clipped (`clip_o`). This happens,
  for example, on a 0/255 checkerboard.

On the synthetic test image, the reconstructed pixels equal the originals
exactly. The lossy step of a real codec, quantisation, is not part of this
design.

## Time-sharing a stage (`two_pass_ctrl`)

The controller has two states:

* **PASS0**: the input is ready. An offered block goes through the stage,
  and the result is captured in the transpose register.
* **PASS1**: the multiplexer selects the transpose register, and the second
  pass goes into the output register.

PASS1 waits (`stall_o`) while the output register still holds a block that
nobody has taken. No new block is accepted during PASS1. The result is one
block every two cycles, with out_valid two cycles after the block was
accepted.

Timing of one block with no back-pressure. Cycle 0 is the cycle in which
`block_reader` issues the read:

| cycle | event |
|-------|-------|
| 0 | `rd_en` with the block number as word address |
| 1 | RAM word is valid; captured into the 64 input registers |
| 2 | input registers valid; DCT pass 1; the next read is issued |
| 3 | DCT pass 2 |
| 4 | coefficients valid (`coef_valid_o`); IDCT pass 1 |
| 5 | IDCT pass 2 |
| 6 | reconstructed block valid on `pix_*` |

`block_reader` issues a read only when its input registers will be free by
the time the data comes back. For this reason it never needs to drop or
buffer a word.

## Memory and image layout (`image_ram`)

The image memory is a simple dual-port RAM:

* **Write port:** 262,144 8-bit locations, one pixel per cycle.
* **Read port:** 4,096 words of 512 bits, with one cycle of latency. Each
  word is one 8x8 block.

Pixel address `p` is stored in word `p / 64`, byte lane `p % 64`. The
design expects each block's 64 pixels at consecutive addresses, row-major,
and the blocks in raster order. For image pixel `(x, y)` of a W-wide image:

```
addr = ((y/8)·(W/8) + x/8)·64 + (y%8)·8 + x%8
```

The RAM has no reset and no preset contents. Load the image through the
write port before you pulse `start_i`.

## Top-level interface (`vvc_dct_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, active-low asynchronous reset |
| `wr_en_i`, `wr_addr_i`, `wr_data_i` | in | 1, 18, 8 | image load, one pixel per cycle |
| `start_i` | in | 1 | process every block of the image once |
| `busy_o`, `done_o` | out | 1 | run in progress; pulse when the last block has been taken |
| `fetch_done_o` | out | 1 | pulse when the last block has entered the DCT |
| `coef_valid_o`, `coef_blk_o`, `coef_tag_o` | out | 1, 64x16, 12 | coefficients of each block, valid for one cycle as the block enters the IDCT |
| `pix_valid_o`, `pix_ready_i`, `pix_blk_o`, `pix_tag_o` | out/in | 1, 1, 64x8, 12 | reconstructed block and its number |
| `dct_stall_o`, `idct_stall_o`, `sat_o`, `clip_o` | out | 1 | event flags |

Blocks are packed arrays in row-major order: element `[r*8+c]` is row `r`,
column `c`.

There is one parameter, `NUM_PIXELS` (default 262,144). It must be a
multiple of 64. All other sizes follow from it.

## Files

| file | contents |
|------|----------|
| `rtl/dct_pkg.sv` | types, widths, shifts, the matrix function |
| `rtl/const_mult.sv` | shift-and-add products ×64, 89, 83, 75, 50, 36, 18 |
| `rtl/dct_stage.sv` | one 64-wide 1D pass, forward or inverse (`INVERSE`) |
| `rtl/two_pass_ctrl.sv` | handshake and pass control of a shared stage |
| `rtl/dct2d.sv`, `rtl/idct2d.sv` | the 2D transforms |
| `rtl/image_ram.sv` | 8-bit-write / 512-bit-read image memory |
| `rtl/block_reader.sv` | block counter and input registers |
| `rtl/vvc_dct_top.sv` | the whole path |
| `tb/tb_dct_ref_pkg.sv` | reference model: plain multiplication with the same rounding rules |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, to run the full-size test of the top:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/dct_pkg.sv tb/tb_dct_ref_pkg.sv tb/tb_vvc_dct_top.sv --top-module tb_vvc_dct_top
./obj_dir/Vtb_vvc_dct_top
```

For another testbench, replace `tb_vvc_dct_top` with its name.

`tb_vvc_dct_top` runs at the default size and takes well under a minute.
It does the following:

1. Loads a synthetic 512x512 image made of ramps, texture, flat white, a
   checkerboard and large squares.
2. Runs the image once with random back-pressure on the pixel output.
3. Checks every coefficient block and every reconstructed block against the
   reference model, and every reconstructed block against the original
   pixels.
4. Prints block 1397.
5. Runs the image a second time with no back-pressure and checks that the
   run takes exactly 2·4096 + 6 cycles.

It also requires that stalls in both transforms and pixel clipping each
happened at least once.

The block testbenches check these points:

* every product of `const_mult`;
* both stages in both passes, including saturation;
* the controller, cycle by cycle, against a model;
* the rate and latency of `dct2d` and `idct2d` under random handshakes;
* a full write and read-back of the RAM;
* a full fetch with and without stalls.

## How this relates to the published design, and what is not included

* **Coefficient values.** The source of the architecture gives the
  coefficient matrix only symbolically. This design uses the VVC integer
  matrix, with the VVC shift split and 16-bit intermediates. Those widths
  differ from the wide intermediate registers (31 to 46 bits) reported for
  the multiplier-based versions.
* **Throughput.** The architecture is described as producing 64 transformed
  values per cycle, and that is true of each 1D stage here. A full 2D block
  needs two passes of the shared stage, so a block leaves every two cycles.
* **Loading the image.** The original memory is a vendor RAM IP preloaded
  from an initialisation file. Here the RAM is a plain array with a write
  port, so any image can be loaded in simulation or in hardware.
* **Block order in memory.** How the image is laid out in the memory is not
  specified. The block-per-word layout above is this design's choice.
* **Output of reconstructed pixels.** The original dumps the reconstructed
  image to a text file from simulation. Here the hardware presents each
  block on a handshake port, and the testbench compares it instead of
  storing it.
* **Handshakes, tags, reset and event flags** are this design's own
  additions.
* **Adder structure.** Each 1D output uses a direct matrix-form sum of
  shift-and-add products. No even/odd butterfly factorisation is used, so
  the adder count is higher than a butterfly version would need. The exact
  adder and register counts of the published implementation could not be
  reproduced from its description.
* **Baseline variants are not included.** These are the variant with four
  multiplier stages, the variant with two multiplier stages, and the
  variant with four shift-and-add stages. Only the proposed combination is
  built: two stages, no multipliers.
* **Other transform sizes** are not supported. VVC also uses 4x4, 16x16,
  32x32 and 64x64 transforms, but only the 8x8 transform is described in
  hardware, and only that is built.
