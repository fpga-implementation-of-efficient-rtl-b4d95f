# Fast-convolution (9,7) discrete wavelet transform

This RTL computes the (9,7) discrete wavelet transform (DWT): the wavelet
that JPEG2000 uses for lossy compression. It handles a 1D signal and, built
on top of that, one level of the 2D transform of an image. It uses the
*convolution* form of the filters, not the lifting form. Convolution keeps
the critical path short: one multiplication plus a few additions, against
about four multiplications and eight additions in a chain for lifting.

The main idea is to share the hardware between the two filters. A direct
design has a 9-tap low-pass filter and a 7-tap high-pass filter. Each
computes a result for every input sample, and half of the results are then
thrown away. Here a single datapath works at the sample rate and alternates:

* on one clock it computes a high-pass result, on the next a low-pass result;
* both filters are symmetric, so the two samples that meet the same
  coefficient are added before the multiplication (pre-adders). That leaves
  five multiplications per result;
* a bank of *coefficient registers* sends the multipliers either the
  low-pass or the high-pass set, and switches every clock;
* the coefficients are constants approximated by a few signed powers of two,
  so every "multiplier" is a small shift-and-add network.

The result is one output per clock in the order y_H(0), y_L(0), y_H(1),
y_L(1), ... The datapath uses five shared shift-add multipliers, and its
critical path ends at a multiplier.

## The filter equations

For a frame x(0..N-1), with x(i) = 0 outside the frame (zero padding):

    y_L(n) = h0·x(2n) + Σ_{k=1..4} h_k·(x(2n-k) + x(2n+k))        (9 taps, centre x(2n))
    y_H(n) = g0·x(2n-1) + Σ_{k=1..3} g_k·(x(2n-1-k) + x(2n-1+k))   (7 taps, centre x(2n-1))

for n = 0 .. N/2-1. The high-pass band is centred on the odd sample *before*
the even one. So y_H(0) is centred on the padding sample x(-1), and the last
low-pass output y_L(N/2-1) reaches x(N-1).

Coefficients are the JPEG2000 irreversible analysis filters. The low-pass
DC gain is 1 and the high-pass Nyquist gain is 2. In hardware, each
coefficient is rounded to 12 fractional bits. It is then cut to its four
most significant canonical-signed-digit (CSD) terms:

| tap | exact          | hardware value /4096 | terms                    |
|-----|----------------|----------------------|--------------------------|
| h0  | 0.602949018236 | 2464                 | 2^11 + 2^9 − 2^7 + 2^5   |
| h1  | 0.266864118443 | 1093                 | 2^10 + 2^6 + 2^2 + 2^0   |
| h2  | −0.078223266529| −320                 | −2^8 − 2^6               |
| h3  | −0.016864118443| −69                  | −2^6 − 2^2 − 2^0         |
| h4  | 0.026748757411 | 110                  | 2^7 − 2^4 − 2^1          |
| g0  | 1.115087052457 | 4568                 | 2^12 + 2^9 − 2^5 − 2^3   |
| g1  | −0.591271763114| −2424                | −2^11 − 2^9 + 2^7 + 2^3  |
| g2  | −0.057543526229| −236                 | −2^8 + 2^4 + 2^2         |
| g3  | 0.091271763114 | 374                  | 2^9 − 2^7 − 2^3 − 2^1    |

Every approximation is within 2^-8 of the exact tap. The table is computed
at elaboration time from the 2^-30 reference values in `dwt97_pkg`:
round(c·2^COEF_FRAC), then CSD recoding, then truncation to CSD_TERMS
digits. So changing `COEF_FRAC` or `CSD_TERMS` changes it consistently.
Outputs are rounded half up to integers.

## The 1D datapath (`fc_dwt97`)

```
in ─► dwt_ctrl ─► dwt_delay_line (9 taps) ─► dwt97_datapath
                                               ├─ dwt_preadd    5 pre-added sums     ─┐
                                               ├─ dwt_coef_reg  h or g set            ─┼─► 5 × csd_mult ─► dwt_adder_tree ─► out
```

**Window and key tap.** Slot 0 of the delay line holds the newest sample.
Slot 4 is the filter centre. Every accepted sample shifts the window by
one. Because y_H(n) is centred on x(2n-1) and y_L(n) on x(2n), successive
windows alternate between a high-pass centre and a low-pass centre.

The band of a window is decided by slot 3, the *key tap*: the sample one
newer than the centre. An even-indexed key sample gives a high-pass result,
an odd one a low-pass result. With this choice every input sample is the
key of exactly one output. A frame of N samples gives exactly N outputs.

**Frame edges.** Each slot carries four tag bits: valid, frame tag,
index-is-odd, and last-of-frame. The frame tag toggles from one frame to
the next. The pre-adders read a slot as zero if it is empty or from a
different frame than the key tap. That is exactly the zero padding of the
equations, so frames can follow each other with no gap. Their windows
overlap and each side still sees zeros.

After the last sample of a frame, three outputs are still owed. They need
three more shifts. If the next frame starts, its samples provide those
shifts. If the input goes idle, `dwt_ctrl` shifts in up to three empty
*bubbles* (the tail flush). The next frame's first sample cancels any
bubbles not yet inserted, so that no bubble can land between two samples of
the new frame. Frames must be at least 5 samples long, because a window
spans at most three frames and the tag is one bit.

**Pipeline and timing.** There is one register after the delay line. It
holds the pre-added sums together with the coefficient registers, which are
loaded in the same edge from the same window. The five shift-add products
are registered. The two adder levels are registered, and the last one also
rounds. So only a multiplier lies between two registers on the longest
path.

The output for key sample x(j) is loaded into the output register by the
4th clock edge after the edge of the third shift that follows x(j). In
continuous streaming that means: y_H(n) is loaded by the 4th edge after
x(2n+3) is accepted, and y_L(n) by the 4th edge after x(2n+4). After the
last sample of a stream, the final three outputs need the three flush
cycles as well.

**Ports.** `in_valid`, `in_data` (IN_W bits, signed) and `in_last` come in.
There is no back pressure. `out_valid`, `out_data` (IN_W+2 bits), `out_high`
(1 = y_H), `out_last` and `flushing` go out.

## The 2D transform (`dwt2d`, the top level)

A 2D DWT is a 1D transform along every row, then along every column of the
result. Here the column pass starts as soon as four rows have been
row-filtered. There is no full-image transposition buffer:

* **Row pass.** A `fc_dwt97` takes the image in raster order. Each row is
  one frame, with `in_last` made by a pixel counter. Its output row keeps
  the interleaved order, so position j holds the row high band when j is
  even and the row low band when j is odd.
* **Column pass.** Each of the COLS positions is an independent 1D signal
  running down the image. `dwt_col_window` keeps eight line buffers (COLS
  entries each, value plus tags). When a row-pass value for column c
  arrives, the window register gets the new value and the eight older
  values of column c. The buffers then shift down at address c. From that
  window on, a second `dwt97_datapath` does exactly what the row pass does.
* **Column sequencing.** `dwt_col_ctrl` gives each value its column
  address, row parity, image tag and last-row flag. After an image, every
  column owes three outputs. In idle cycles the controller walks the
  columns and shifts bubbles into those still owed. A column that the next
  image has reached owes nothing more, because the new rows push its tail
  out. Real samples always take priority over bubbles.
* **Warm-up.** The line buffers are memories without reset. A saturating
  count of the rows written since reset marks unwritten buffers as empty.
  This relies on the first image arriving in raster order, and needs images
  of at least 8 rows.

**Outputs.** Each `out_valid` carries one coefficient (IN_W+4 bits). It
comes with:

* `out_col`: its column position j;
* `out_hhigh`: the row high band, equal to j even;
* `out_vhigh`: the column high band;
* `out_col_last`: the last result of that column for this image.

Down a column, results alternate H, L, H, L like the 1D output. So result
number i of column j is row band (j even ? H : L) and column band
(i even ? H : L). The pair (`out_vhigh`, `out_hhigh`) selects the subband
LL, LH, HL or HH. Results come row by row with the columns in order. The
last three result rows of an image are pushed out by the next image or by
the column flush. `row_flushing` and `col_flushing` show the bubbles.

With COLS = ROWS = 256 (a 256 × 256 grey-scale image), the column pass
holds 8 × 256 × 22 bits of line buffer. First results appear 5 clocks after
the row pass delivers row 3 of column position 0, long before the image is
complete.

After coarse synthesis with Yosys at the defaults, the whole 2D top comes to
about 1,070 word-level cells, 1,915 flip-flop bits and 45,056 memory bits.
The 1D core alone is about 350 cells and 650 flip-flop bits. These are
technology-independent counts, not FPGA resource figures.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `dwt2d` | `IN_W` | 16 | signed pixel width (8-bit grey levels fit) |
| `dwt2d` | `COLS`, `ROWS` | 256, 256 | image size |
| all | `COEF_FRAC` | 12 | fractional bits of the coefficients (max 13) |
| all | `CSD_TERMS` | 4 | signed-digit terms kept per coefficient (≤ 0: all) |
| `fc_dwt97` | `IN_W` | 16 | signed sample width; output IN_W+2 |

The output widths cover the worst-case gain. The high-pass filter has
Σ|g| ≈ 2.6, so each pass adds 2 bits. Full-scale 16-bit inputs are tested.

## Files

| file | role |
|---|---|
| `rtl/dwt97_pkg.sv` | tap constants, tag struct, CSD encoding, elaboration-time coefficient functions |
| `rtl/dwt2d.sv` | top: 2D transform (row pass + line-buffer column pass) |
| `rtl/fc_dwt97.sv` | 1D fast-convolution DWT |
| `rtl/dwt97_datapath.sv` | shared arithmetic: pre-adders, coefficient registers, multipliers, adder tree |
| `rtl/dwt_ctrl.sv` | 1D sample tags and tail flush |
| `rtl/dwt_delay_line.sv` | 9-slot window shift register |
| `rtl/dwt_preadd.sv` | symmetric pre-adders with frame-edge zeroing, band decision |
| `rtl/dwt_coef_reg.sv` | low-/high-pass coefficient registers |
| `rtl/csd_mult.sv` | shift-and-add constant multiplier |
| `rtl/dwt_adder_tree.sv` | product registers, two adder levels, rounding |
| `rtl/dwt_col_ctrl.sv` | column-pass sequencing and column flush |
| `rtl/dwt_col_window.sv` | eight line buffers forming the column window |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog. Each one works with plain Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dwt97_pkg.sv tb/tb_dwt2d.sv \
          --top-module tb_dwt2d -Mdir obj_2d && obj_2d/Vtb_dwt2d
```

Replace `tb_dwt2d` with any other testbench name.

* `tb_dwt2d` runs the top at its defaults: four 256 × 256 images. It
  covers input gaps, back-to-back images, idle periods, and an image
  arriving halfway through a column flush. Every coefficient is compared
  with a reference 2D transform that the testbench computes from the
  equations above. The test takes about 2 seconds.
* `tb_fc_dwt97` sends 256 rows of 256 samples through the 1D core with
  several schedules: back to back, complete flush, flush ended early by a
  stalling row, and random stalls. It checks every output bit-exactly. It
  also checks each output against the exact real-valued filters within the
  approximation bound, and checks the output cycle of every result.
* The unit testbenches compare each module with a small model. They
  override sizes to keep runs short (for example 8 columns for the column
  modules).

## Where this departs from, or adds to, the original architecture

The source architecture is a published FPGA design for a fast-convolution
(9,7) DWT. It fixes the filter structure: symmetric pre-addition, shared
multipliers, coefficient registers switching between the low-pass and
high-pass sets, alternating outputs at one per clock, zero-padded frame
edges, and multiplier-less approximated constants. It does not fix the
following points, which are this implementation's own:

* **Numbers.** The coefficient values, the 12-bit / 4-term approximation,
  all data widths and the rounding.
* **Pipeline.** The pipeline depth, and the use of rising clock edges
  everywhere. The original speaks of outputs on the trailing edges of even
  and odd cycles.
* **Frame handling.** The frame handshake, the tag scheme, the tail flush,
  and the way the band is chosen from the key tap.
* **2D transform.** The original describes rows then columns with an array
  transposition between them. It also says that column processing starts
  once enough rows are filtered. The line-buffer column pass follows the
  second statement, and stores no transposed image. Whether the column
  filter is a second unit is not stated. Here it is a second copy of the
  datapath.
* **Not reproduced.** The reported 230 MHz on a Spartan-3E, the power
  figures, and the straight FIR and plain-convolution designs that the
  original compares against. Those are not part of this RTL. The MATLAB
  image experiments are replaced by random images in `tb_dwt2d`. The test
  photographs themselves are not included.

## Trust and limits

* All testbenches pass, each with thousands to hundreds of thousands of
  bit-exact checks. A broken copy of each module was used to confirm that
  its testbench fails.
* Nothing guards against misuse: frames shorter than 5 samples, images with
  fewer than 8 rows, or a first image that is not in raster order give
  wrong results.
* There is no back pressure anywhere. The producer sets the pace, up to one
  sample per clock.
* Only one decomposition level is built. Further levels would feed the LL
  band back through another `dwt2d`-style stage.
