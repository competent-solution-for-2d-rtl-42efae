# 2D-FFT and 2D-IFFT engine for small images

This engine computes the two-dimensional Fourier transform of an N x N image
with a single one-dimensional FFT core, then inverts the transform to
reconstruct the image. It relies on the fact that the 2D DFT is separable: a 1D
FFT of every row, followed by a 1D FFT of every column of the result, gives the
2D spectrum. The inverse runs the same way in the other order, columns first and
then rows. One frame SRAM holds the image and every intermediate result in place. A
state machine moves one row or column at a time between the SRAM and the FFT
core. The FFT core is an in-place, radix-2, decimation-in-time core. It processes
one frame of N complex points at a time.

The default configuration is a 32 x 32 image of 8-bit pixels, a 32-point core,
32-bit two's complement real and imaginary parts, and a pixel scaling factor of
256.

```
              pix_valid/pix_data                         res_* (every 1D result word,
                    |                                      tagged with pass/line/index)
                    v                                             ^
            +----------------+   row/column order   +-------------+-----------+
 start ---> |  fft2d_ctrl    |--------------------->|        fft_core         |
 done  <--- | START          |  N words per line    |  LOAD -> CALC -> UNLOAD |
 state <--- | INITIALISE     |<---------------------|                         |
            | ROW_FFT        |  N results per line  |  2 RAM banks of N/2     |
            | COL_FFT_IM     |                      |  read/write switches    |
            | COL_IFFT       |                      |  address generator      |
            | ROW_IFFT       |                      |  twiddle LUT, butterfly |
            +-------+--------+                      +-------------------------+
                    | single port
            +-------v--------+
            |  frame_sram    |  N*N complex words, address = row*N + column
            +----------------+
```

## The operation, pass by pass

| state          | what happens                                                             | SRAM afterwards              |
|----------------|--------------------------------------------------------------------------|------------------------------|
| `START`        | waits for `start`                                                        | previous result              |
| `INITIALISE`   | takes N*N pixels row-major, multiplies each by 2^`SCALE_LOG2`, stores it as a complex word with zero imaginary part | scaled image |
| `ROW_FFT`      | forward FFT of row 0, 1, ..., N-1; each result goes back to its row      | row spectra                  |
| `COL_FFT_IM`   | forward FFT of every column; results go back to the column               | 2D spectrum                  |
| `COL_IFFT`     | inverse FFT of every column                                              | row spectra again            |
| `ROW_IFFT`     | inverse FFT of every row; `done` pulses at the end                       | reconstructed scaled image   |

For each line (a row or a column), the controller reads the N words from the
SRAM on N consecutive clocks and hands them to the core. This is the FEED
phase. It then waits for the core's N output words and writes each one back to
the address it came from (COLLECT). The two phases never overlap, so the SRAM
needs only one port. Only the address order differs between the row and column
passes: `{line, i}` for rows and `{i, line}` for columns. The core's direction
input is high in the two inverse passes.

Every word the core returns is also presented on the `res_*` outputs together
with the pass (`res_state`), the row or column number (`res_line`) and the
position within it (`res_idx`). This is how results leave the engine:
 * the `ROW_FFT` words are the row spectra;
 * the `COL_FFT_IM` words are the 2D spectrum, for column `res_line`
   and vertical frequency `res_idx`;
 * the `ROW_IFFT` words are the reconstructed pixels. Divide them by
   2^`SCALE_LOG2` and round to get pixel values.

## Inside the FFT core

The core (`fft_core`) works frame by frame. Each frame goes through three
phases.

**Twiddle table at power-on.** The core computes its own twiddle factors.
After reset, a sequencer in `twiddle_lut` runs an iterative CORDIC
(`twiddle_cordic`) once for each of the N/2 entries and writes the result. Angles
are binary fractions of a turn, so 2*pi*k/N is exact. Angles beyond a quarter
turn are folded back with cos t = -sin(t - pi/2) and sin t = cos(t - pi/2),
which keeps the CORDIC where it converges. Each entry takes 24 clocks (20
iterations plus handshake), so the table is ready 384 clocks after reset for
N = 32. Every entry is within one LSB of the exact value. `buf_ready` stays low
until then. Loading the image takes longer than this, so the fill costs the
engine no time.

**LOAD.** `buf_ready` is high. Input word n is written to the in-place memory
at address bitrev(n), the bit-reversed index. The butterflies can then work in
decimation-in-time order and the result comes out in natural order. Input words
may have gaps: `datai_valid` may drop between words. The core starts computing
by itself once N words are in.

**CALC.** There are log2(N) stages. In stage s, butterfly b (0 to N/2-1) works
on two words:

```
A = (b >> s) * 2^(s+1) + (b mod 2^s)       B = A + 2^s
k = (b mod 2^s) * N / 2^(s+1)              X = A + W_N^k * B,  Y = A - W_N^k * B
```

X and Y overwrite A and B. This is the in-place part: the core never needs more
than N words of storage.

The hard part is reading two operands and writing two results on every clock
with ordinary one-read/one-write RAMs. The memory is split into two banks of
N/2 words (`inplace_ram`). A word at address a lives in bank parity(a), the XOR
of its bits, at index a >> 1. A and B differ in exactly one bit, so their
parities differ and they always sit in different banks. The address generator
(`fft_addr_gen`) gives each bank's index. It also gives a `swap` bit that is 1
when A is in bank 1. The read switch (`fft_switch`) uses `swap` to turn the two
bank outputs into (A, B). The twiddle LUT (`twiddle_lut`) supplies W_N^k in the
same clock. The butterfly (`fft_butterfly`) takes two more clocks. The write
switch then turns (X, Y) back into (bank 0, bank 1) words. Bank indices and
`swap` travel down a three-stage delay line alongside the data.

One butterfly is issued per clock. Within a stage no address is touched twice,
so the pipeline does not stall. Between stages the next stage may read words
the current one is still writing. After the last butterfly of a stage, the
core therefore waits 3 clocks, the depth of the read-to-write pipeline, before
the next stage begins. Starting one clock earlier would let the first read of
the new stage fetch a word from before its last write.

**UNLOAD.** Word k is read from bank parity(k) at index k >> 1 and leaves on
`datao_*`, one per clock. There is no back-pressure. `buf_ready` rises again
with the last output word.

## Number format and scaling

Accuracy depends mostly on where the growth of the transform is absorbed. The
design has three controls for this.

* **Pixel scaling factor** (`SCALE_LOG2`). Pixels are multiplied by 2^`SCALE_LOG2`
  before the transform. This gives the fixed-point arithmetic fraction bits to
  round into. Where rounding noise has a fixed absolute size (`FWD_SCALE = 1`),
  each doubling of the factor halves the error in pixel steps, but needs one
  more bit of word. With `FWD_SCALE = 0` the remaining error comes mostly from
  the twiddle words. It grows with the signal, so the factor hardly changes it.
* **Where the 1/N goes** (`FWD_SCALE`). Each 1D pass in one direction divides by
  N: the butterfly halves both results in each of its log2(N) stages. The other
  direction does not scale, so a forward transform followed by an inverse one
  returns the input.
  * `FWD_SCALE = 0` (default): the forward passes are unscaled (true DFT) and
    the inverse passes halve. The 2D spectrum grows by up to N*N:
    255 * 256 * 1024 = 6.7e7, which fits 32-bit words. Rounding happens only
    while values shrink, which gives small errors.
  * `FWD_SCALE = 1`: the forward passes halve (spectrum = DFT / N^2) and the
    inverse passes are unscaled. No word ever grows beyond the input range, which
    makes 16-bit data usable. The price is that the spectrum is rounded at
    1/N^2 of its size, and the inverse multiplies that rounding noise back up.
* **Twiddle word** (`TW` = 16). There are TW-2 fraction bits, so +1.0 and -1.0
  are exact. If +1.0 were stored as 2^(TW-1)-1, every trivial butterfly would
  shrink its operand slightly, and the DC terms would drift visibly.

Halving rounds half to even. This matters more than it looks. Rounding half up
adds a small positive bias to every bin of the spectrum, and a constant offset
in every bin inverse-transforms into one large error at pixel (0, 0). With
forward scaling on a 32 x 32 image, that error reaches hundreds of scaled
units. The twiddle product is rounded to nearest before the add and subtract. Results that do not
fit W bits saturate and set `ovflow_flag` for the current frame.

Measured reconstruction error, on a synthetic 32 x 32 image (gradient plus
noise), in scaled units. Divide by the scaling factor to get pixel steps.

| configuration                                   | RMS   | max abs | every pixel recovered exactly after rounding |
|-------------------------------------------------|-------|---------|-------------------------------------------|
| W=32, factor 256, `FWD_SCALE=0` (default)       | 0.69  | 3       | yes                                       |
| W=32, factor 128, `FWD_SCALE=0`                 | 0.32  | 2       | yes                                       |
| W=16, factor 128, `FWD_SCALE=1`                 | 24    | 93      | not guaranteed (error < 1 pixel step)     |
| W=32, factor 128, `FWD_SCALE=1`                 | 24    | 82      | not guaranteed                            |
| W=32, factor 256, `FWD_SCALE=1`                 | 24    | 119     | yes on this image                         |

A factor of 256 does not fit 16-bit words: 255 * 256 = 65280 > 32767.

## Timing

Each 1D transform (one line) inside the engine takes 2N + log2(N)*(N/2 + 3) + 2
clocks, from the first SRAM read of the line to the write of its last result.
That is 161 clocks for N = 32. The parts are:
* N clocks to feed the line;
* log2(N) stages of N/2 butterflies, each followed by a 3-clock drain;
* N clocks to unload;
* a few clocks of register latency.

The four passes take 4N lines, which is 20608 clocks for N = 32. Loading the
image adds N*N clocks (1024) if `pix_valid` stays high. The core alone returns
its first output word N + log2(N)*(N/2 + 3) + 1 = 128 clocks after its first
input word. Timing does not depend on the data width. The engine processes one
image at a time; a new `start` is accepted once `done` has pulsed.

## Interface of `fft2d_top`

| port                         | dir | width     | meaning |
|------------------------------|-----|-----------|---------|
| `clk`, `rst_n`               | in  | 1         | clock; asynchronous active-low reset |
| `start`                      | in  | 1         | start an operation (taken in `START`) |
| `pix_valid`, `pix_data`      | in  | 1, PIX_W  | unsigned pixels, row-major; taken when `pix_ready` is high |
| `pix_ready`                  | out | 1         | high during `INITIALISE` |
| `state`                      | out | 3         | `fft2d_pkg::ctrl_state_t` |
| `busy`, `done`               | out | 1         | not in `START`; one-clock pulse at the end |
| `res_valid`                  | out | 1         | a result word is present |
| `res_state`                  | out | 3         | pass of the word |
| `res_line`, `res_idx`        | out | log2(N)   | row/column number and position |
| `res_re`, `res_im`           | out | W         | the word, two's complement |
| `ovflow_flag`                | out | 1         | a butterfly saturated in the last line transform |

Parameters: `N` = 32 (a power of two; the engine is tested at 32, the controller and address generator also at 8), `W` = 32, `TW` = 16, `PIX_W` = 8,
`SCALE_LOG2` = 8, `FWD_SCALE` = 0.

## Files

| file | content |
|------|---------|
| `rtl/fft2d_pkg.sv`     | state enumeration, bit-reversal function |
| `rtl/fft2d_top.sv`     | the engine |
| `rtl/fft2d_ctrl.sv`    | pass sequencer and SRAM/core addressing |
| `rtl/frame_sram.sv`    | N*N-word single-port frame store |
| `rtl/fft_core.sv`      | in-place radix-2 FFT/IFFT core |
| `rtl/fft_addr_gen.sv`  | operand, bank and twiddle addressing |
| `rtl/inplace_ram.sv`   | one N/2-word bank of the in-place memory |
| `rtl/fft_switch.sv`    | 2x2 crossbar, used as read switch and as write switch |
| `rtl/twiddle_lut.sv`   | twiddle table that fills itself after reset |
| `rtl/twiddle_cordic.sv`| iterative CORDIC computing one twiddle factor |
| `rtl/fft_butterfly.sv` | pipelined radix-2 butterfly |

Every testbench in `tb/` checks its block against values computed
independently, in double precision or with plain integer arithmetic. Each ends
by printing `TB_RESULT checks=<n> failures=<n>`.

* `tb_fft2d_top`: the whole engine at its default parameters, on two images.
  It checks every word of every pass against double-precision DFTs and the
  exact clock count. It also counts the mechanisms: input stalls, forward and
  inverse passes, row and column passes, and `done`.
* `tb_fft2d_table1`: the same checks in three configurations side by side:
  32-bit data with factors 256 and 128, and 16-bit data with factor 128. The
  checks live in `tb/fft2d_check_harness.sv`.
* `tb_fft_core`: random forward and inverse frames, latency, input gaps, and
  saturation with the flag cleared on the next frame.
* `tb_fft2d_ctrl`: the controller with a model SRAM and a stand-in core that
  reverses each line. The reversal exposes any addressing or direction mistake.
* `tb_fft_butterfly`, `tb_fft_addr_gen`, `tb_twiddle_lut`, `tb_twiddle_cordic`, `tb_inplace_ram`,
  `tb_frame_sram`, `tb_fft_switch`: unit tests.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fft2d_pkg.sv tb/tb_fft2d_top.sv --top-module tb_fft2d_top -o sim
./obj_dir/sim
```

The end-to-end test takes well under a second.

## How this relates to the original design, and what is assumed

The original design is an FPGA system built around a vendor FFT core. The
following parts follow its description:
* the six states and their order;
* the row-then-column forward flow and the column-then-row inverse flow;
* a single SRAM reused in place;
* a 32-point core on 32 x 32 images, with 32-bit (or 16-bit) data;
* scaling factors of 128 and 256;
* the core's structure: frame-wise processing, an in-place memory of two
  N/2-word RAMs, read and write switches, a read address generator, a twiddle
  LUT, automatic start after one frame is loaded, and one output word per clock.

The core here is written from that description. It is not the vendor's
implementation, and its port names are its own.

This design's own choices:
* the pixel input stream and the tagged result stream;
* the bank mapping;
* the 3-clock stage drain;
* the scaling scheme (`FWD_SCALE`), round-half-even halving and saturation;
* the 16-bit twiddles with exact unity, and CORDIC as the way the table is computed at power-on;
* one four-multiplier butterfly per clock;
* the single-port SRAM with one clock of read latency;
* loading the image as the work of `INITIALISE`.

The original's reported errors cannot be reproduced exactly. Its core's
rounding is not known, and its test images are not included. Its RMS error,
in scaled units, is about 7 at factor 128 and about 3.5 at factor 256 (at 32
bits). Its error therefore falls as the factor grows. Here, the default scheme
gives errors of 0.3 to 0.7 scaled units at either factor. The `FWD_SCALE = 1`
scheme shows the original's trend, with a smaller slope: its pixel error halves
per doubling of the factor. The original
reports computation times of 316 us (32-bit) and 278 us (16-bit). This design
takes the same number of clocks at both widths, and the original gives no clock
frequency to compare against.

Not included: reading and writing image files, and computing the error measures.
Both are test-bench work here; `tb_fft2d_top` prints RMS, relative RMS and
maximum absolute error.
