# LBP-histogram emotion recogniser with bitwise error identification

This RTL classifies a 48x48 grey-scale face image into one of seven emotions:
anger, contempt, disgust, fear, happy, sad and surprise. It uses Local Binary
Pattern (LBP) histograms. Next to the classifier sits a second, much simpler
matcher, called here the *improved-KNN error identifier*. It compares the
test image's LBP image bit for bit with every stored LBP image. It picks the
closest one without any arithmetic and reports where the two first differ.
A built-in error inductor can corrupt one pixel of the test image on purpose.
That is how the design shows that the error identifier finds corrupted
pixels.

The design follows a published FPGA design for LBPH emotion recognition with
KNN-style error-pixel detection. The description it follows was written at
block-diagram level. Everything below the block level is this design's own:
the streaming architecture, the RAMs, the handshakes and the timing. The
section "Where this design departs from the original description" lists the
differences.

## What one operation does

The host first writes a 48x48 image, one byte per pixel in raster order, into
the image buffer. It then starts one of two operations.

* **TRAIN, class k.** The design computes the LBP image of the loaded picture
  and its 256-bin histogram. Both are stored as trained image k. Do this once
  for each of the seven classes, with one typical face per emotion.
* **TEST.** The design computes the LBP image and histogram of the loaded
  picture. If `err` was high at start, one pixel is corrupted on the way. Then
  three things follow:
  1. The test histogram is compared with the seven trained histograms by
     Euclidean distance. The closest class raises its emotion output.
  2. The test LBP image is XORed bit by bit with each trained LBP image. The
     smallest XOR word marks the matching trained image (`match_class`).
  3. The first 1 in that XOR word gives `error_flag` and `error_position`.

```
image RAM -> zero-pad scan -> error inductor -> LBP window -> LBP RAM + histogram
                                                               |          |
                                            improved-KNN  <----+          +--> Euclidean distance -> decision
                                     (PISO, XOR, SIPO, sort, check)
```

## LBP with zero padding

For each pixel the LBP code compares its eight neighbours with the pixel
itself (the centre). Border pixels need neighbours outside the image. The
image is therefore surrounded by one ring of zero pixels, which makes it
50x50. The output is again 48x48, so no pixel is lost.

`zero_pad_scan` never builds the padded copy. It walks the 50x50 raster with
two counters, reads interior pixels from the image RAM and puts out 0 on the
border, one pixel per clock. `lbp_window` keeps the two previous padded rows
in line buffers and shifts each new column into a 3x3 window. LBP row i is
therefore made from padded rows i..i+2.

The neighbours are numbered clockwise from the top-left corner:

```
I0 I1 I2
I7 Ic I3
I6 I5 I4
```

S(n) is 1 when In >= Ic, compared as unsigned 8-bit values. The code is
{S(0), S(1), ..., S(7)}, so **S(0) is the MSB**. This bit order is the one the
design is specified with. The textbook formula sum S(n)*2^n puts S(0) in the
LSB instead. `lbp_code` has a parameter `S0_MSB`; set it to 0 for the textbook
order. That changes the codes, but the whole flow still works.

## Histogram, distance and decision

`lbp_histogram` has 256 counters of 12 bits each, enough for all 2304 pixels
in one bin. The counters saturate instead of wrapping. There are eight
histograms: one for the test image and one for each trained class. A trained
class's histogram fills while its TRAIN operation runs.

`hist_distance` reads one bin per clock, for 256 clocks. For each class it
adds (test - trained)^2 into a 32-bit accumulator. The square root is never
taken, because the smallest squared distance belongs to the same class as the
smallest distance. `emotion_decide` registers a one-hot result. If two classes
tie, the one with the lower index wins. Bit 0 is anger, and the bits follow
the order of the list above up to bit 6, surprise. The seven outputs `anger`
to `surprise` come straight from these bits.

## The improved-KNN error identifier (`knn_error_id`)

This is the least conventional part of the design.

**Images as words.** Each LBP image is read as one 18432-bit word (2304 codes
x 8 bits). LBP pixel 0 comes first, and each code is read MSB first. Bit
position p is therefore bit 7 - p%8 of LBP pixel p/8. Pixels are numbered in
raster order, so pixel = row*48 + column.

**PISO.** Each of the eight LBP RAMs (test plus seven trained) is followed by
an 8-bit parallel-in serial-out register, `piso_reg`. The register is
reloaded every eight clocks while the RAM read for the next byte runs in the
background. Together, the RAM and the register behave like one 18432-bit
PISO, shifting one bit per clock.

**XOR.** Seven XOR gates compare the test bit with each trained bit. The XOR
word is all zero exactly when a trained LBP image equals the test LBP image.
Every 1 in it marks a differing bit.

**SIPO.** Each XOR stream is packed back into bytes by a `sipo_reg`, which
stores them in a 2304-byte RAM.

**Sorting.** `min_sort` finds the numerically smallest XOR word while the
streams go by, MSB first. Each class starts as a candidate. On each bit where
some candidates have 0 and others have 1, the ones with 1 drop out. At the
end the lowest-index survivor is the match. No distance is computed. "Closest"
here means "agrees with the test image for the longest run from the start of
the image". It does not mean "fewest differing bits".

**Conditional check.** `fault_checker` reads the selected SIPO word with a
15-bit position counter, one bit per clock. The first 1 sets `error_flag` and
latches its position in `error_position` (15 bits, since 2^15 > 18432). An
all-zero word leaves the flag low.

**What an induced error looks like.** Suppose the inductor corrupts padded
pixel (r, c), with r and c in 0..49. That pixel lies in the window of up to
nine LBP pixels: rows r-2..r and columns c-2..c, clipped to 0..47. The first
of these LBP pixels whose comparison actually changes is the one reported.
Test the same image that was trained, and the matching word is zero except
around the corrupted pixel. The error position therefore points at it,
usually within a row of it. A corrupted pixel does not always change a
comparison. For example, a changed border zero can still be below every
neighbour. In that case the LBP image is unchanged and the flag stays low,
correctly. A test image that matches no trained image well gives a flag and a
position too, but then they only say where the images first differ.

The error inductor (`error_inject`) runs a free-running 16-bit LFSR. At the
start of each frame it latches a position, folded into 0..49 by modulo, and a
non-zero XOR mask. When `err` was high at start, it XORs that one padded pixel
with the mask. The position and mask appear on `err_row`, `err_col` and
`err_mask`, so a test can predict the result.

## Interface of `lbph_emotion_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `img_we`, `img_waddr`, `img_wdata` | in | 1, 12, 8 | write one pixel (index row*48+col); ignored while busy |
| `start`, `mode`, `train_class`, `err` | in | 1, 1, 3, 1 | start an operation (`mode` 0 TRAIN, 1 TEST); class for TRAIN; `err` induces an error in TEST |
| `busy`, `done` | out | 1 | operation running; one-clock pulse at the end |
| `anger` ... `surprise` | out | 1 each | emotion decision of the last TEST, one-hot |
| `error_flag`, `error_position` | out | 1, 15 | first differing bit against the matching trained LBP image |
| `match_class` | out | 3 | trained image with the smallest XOR word |
| `err_armed`, `err_row`, `err_col`, `err_mask` | out | 1, 6, 6, 8 | the error induced in the last frame |
| `lbp_raddr`, `lbp_rdata` | in/out | 12, 8 | read back the test LBP image while idle (one clock latency) |

Parameters are `IMG_W` and `IMG_H` (48 each). The class count (7), the bin
count (256) and the counter and distance widths live in `lbph_pkg`.

Timing at the defaults, counted from the start pulse to the done pulse (the
end-to-end testbench checks these counts exactly):

| operation | clocks |
|---|---|
| TRAIN: clear, 50x50 padded scan, LBP pipeline | 2500 + 7 = 2507 |
| TEST, first difference at bit p | 2500 + 6 + 257 (distance) + 18432 (KNN stream) + p + 10 (sort, check) |
| TEST, no difference | 2500 + 6 + 257 + 2 x 18432 + 9 = 39636 |

A TEST therefore takes at most 39636 clocks, which is 396 µs at 100 MHz. The
KNN part streams one bit per clock and then scans one bit per clock until the
first difference.

## Where this design departs from the original description

* **Architecture.** The original is one behavioural block that handles the
  whole image as wide vectors. It is nearly all combinational, with a
  handful of flip-flops. This design streams one pixel or one bit per clock.
  It keeps images in RAMs and so needs many more registers and RAM bits. The
  original reports a latency of a few nanoseconds and a throughput of tens of
  Gbit/s. Those figures describe the combinational version and do not apply
  here.
* **PISO and SIPO.** The 18432-bit registers are built as RAM plus an 8-bit
  shift register. The bit streams are the same. One block diagram of the
  original labels these registers 256 bits wide, while its text says 18432;
  18432 is used.
* **The minimum XOR word.** It is taken as the unsigned numeric minimum, which
  is the literal reading of "the minimum value". Population count would be
  the other possible reading. The sort is done on the fly rather than after
  the SIPO, which gives the same result.
* **Error position.** The original's top-level port list shows an 8-bit
  `error_position`. Its text and diagrams give 15 bits, which is used here.
  Only the first differing bit is reported.
* **Training.** Trained images go through the same LBP path (TRAIN
  operations) instead of being loaded as precomputed LBP files.
* **`error_flag` meaning.** In the original simulation, `error_flag` is high
  while the combinational logic settles. Here it is a registered result,
  valid at `done`.
* **This design's own choices.** The random generator, the tie rules, reset,
  widths and all handshakes.

The device utilisation, power and layout results of the original
implementation are not reproduced. The image-to-hex conversion scripts were
host software and are not part of this RTL.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`; `-y rtl` lets verilator find the
modules a testbench uses. For example, to run the whole design
end to end at full size (about 20 s):

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
  rtl/lbph_pkg.sv tb/tb_lbph_emotion_top.sv --top-module tb_lbph_emotion_top
./obj_dir/Vtb_lbph_emotion_top
```

This testbench trains seven synthetic images. It then tests one of them,
with and without an induced error, and a noise image. A reference model in
the testbench recomputes every LBP code, histogram, distance, XOR minimum and
error position. The testbench also counts how often each mechanism occurred:
training, testing, error induction, flag raised, clean match and read-back.
Every one of them must occur at least once.

Files: `lbph_pkg.sv` (constants, emotion and operation enums), `sync_ram`,
`zero_pad_scan`, `error_inject`, `lbp_code`, `lbp_window`, `lbp_histogram`,
`hist_distance`, `emotion_decide`, `piso_reg`, `sipo_reg`, `min_sort`,
`fault_checker`, `knn_error_id`, `lbph_ctrl` and the top,
`lbph_emotion_top`.
