# Harris corner detector in FPGA fabric, fed through a shared SRAM

This design finds corners in a small grey-scale image with the Harris
structure-tensor method, computed entirely in FPGA logic. A host processor
(the ARM side of a DE1-SoC style FPGA SoC) places the image in an on-chip
SRAM that both sides can reach and raises a flag. The fabric copies the
image into its own block RAM and runs two sliding-window passes over it. It
writes one Harris response per pixel back into the same SRAM, then clears
the flag. For every pixel:

    Ix, Iy   = image * Gx, image * Gy        (3x3 derivative-of-Gaussian)
    Sxx      = W * Ix^2
    Syy      = W * Iy^2                      (3x3 Gaussian window W)
    Sxy      = W * IxIy
    R        = (Sxx/4)(Syy/4) - (Sxy/4)^2 - 0.04 ((Sxx+Syy)/4)^2

R is large and positive at corners, negative along edges and near zero in
flat regions. It equals the textbook `det(M) - k trace(M)^2` scaled by 1/16.
The scaling keeps every intermediate value inside the number range.

The default size is a 30 x 30 image. One detection takes 17 236 clocks from
the moment the flag is seen, about 0.34 ms at 50 MHz.

## Number format

All detector arithmetic uses signed fixed point in 27 bits: one sign bit,
five integer bits and 21 fraction bits (Q6.21). Range is about ±32, with a
resolution of 4.8e-7. 27 bits is the width of one FPGA DSP multiplier.

- **Products** (`fx_mult`) keep bits [47:21] of the exact 54-bit product. The
  fraction is truncated toward minus infinity, and integer overflow wraps.
- **Sums** (`add3`) wrap at 27 bits.
- There is no saturation anywhere. Pixel values should stay within [0, 1] or
  a similar small range (see "Limits" below).

The three 3x3 kernels are samples of g(x, y) = exp(-(x²+y²)/2), for x, y
in {-1, 0, 1}:

| kernel | taps (row-major, top row first)                          |
|--------|----------------------------------------------------------|
| W      | `e⁻¹ e^-½ e⁻¹ / e^-½ 1 e^-½ / e⁻¹ e^-½ e⁻¹`               |
| Gx     | `-e⁻¹ 0 e⁻¹ / -e^-½ 0 e^-½ / -e⁻¹ 0 e⁻¹` (x·g)             |
| Gy     | `-e⁻¹ -e^-½ -e⁻¹ / 0 0 0 / e⁻¹ e^-½ e⁻¹` (y·g)             |

In Q6.21 these are 771500 (e⁻¹), 1271986 (e^-½) and 2097152 (1.0). The
kernels are not normalised, so W sums to about 4.9. That is part of why R is
pre-scaled by 1/4 per factor.

## Memory layout and the two passes

The image is stored zero-padded, (ISIZE+2) x (ISIZE+2) words, row-major with
pitch W = ISIZE+2 (32 by default). Output pixel (r, c), with r and c in
0..ISIZE-1, is the centre of the 3x3 window whose top-left word is
`r*W + c`.

There are five `dual_clock_ram` instances of (ISIZE+2)² x 27 bits: image,
Ixx, Iyy, Ixy and R. They share one read address and one write address.
Each has a two-edge read latency: the address is registered, then the data.

1. **Load.** Shared-SRAM word i+1 goes to image word i, one word per clock.
   In the same cycle, 0 is written to word i of the three tensor RAMs. The
   tensor planes therefore start with a zero border, and the second pass can
   slide over them exactly like over the image.
2. **Derivative pass.** `window_addr_gen` issues the nine addresses of each
   window, one per clock, in raster order over the ISIZE² windows. Within a
   window the steps are +1, +1, +(W-2), +1, +1, +(W-2), +1, +1. After that,
   the generator jumps back to the next window's top-left word:
   - -(2W+1) to move one column right;
   - -(2W-1) after the last column of a row, to reach the next row.

   The returned words land in a nine-word window register. When the window
   is complete, `conv3x3` with Gx and with Gy gives Ix and Iy. Three
   multipliers form Ix², Iy² and IxIy. These three values are written at the
   window's centre address, `(r+1)*W + c+1`, of the three tensor RAMs.
3. **Tensor pass.** The same generator runs again. Three window registers
   now collect Ixx, Iyy and Ixy, and all three convolvers use W.
   `harris_response` turns their outputs into R. R is written to R-RAM word
   n = r*ISIZE + c and to shared-SRAM word n+1.

Both passes take exactly 9 clocks per window. They use the same three
convolvers; only the kernel select (`sum_phase`) and the window sources
change. The datapath from the window registers to the RAM write is one
combinational path. It contains a 27x27 multiply, an adder tree, two more
multiply levels and the response subtraction.

### Pipeline timing inside a pass

For one window word, counting clock edges from the one that registers its
address:

| edge | what happens                                                          |
|------|-----------------------------------------------------------------------|
| 0    | `window_addr_gen` presents the address (and tap, index and centre)     |
| 1    | the RAM registers the address                                         |
| 2    | the RAM registers the data                                            |
| 3    | the controller stores it in window slot `tap`                         |

`harris_ctrl` delays the generator's tap, index, centre and last flags
through three registers (`p1`..`p3`), so they arrive with the data. In the
cycle where `p3` shows tap 8, all nine slots hold the same window, so the
datapath output is valid. The write strobe (`we_tensor` or `we_r`) is high
for exactly that cycle. At the end of that cycle, slot 0 is overwritten by
the next window. In the tensor pass, the SRAM write of R is registered one
clock later. The result is one SRAM write every 9 clocks.

## Host protocol (shared SRAM)

The fabric sees the shared SRAM as one 32-bit port with one clock of read
latency: `sram_address`, `sram_write`, `sram_writedata` and
`sram_readdata`.

| word          | host → fabric                          | fabric → host                         |
|---------------|----------------------------------------|---------------------------------------|
| 0             | write 1 to start                        | cleared to 0 when all R are written    |
| 1 .. (ISIZE+2)² | padded image, Q6.21 in bits 26:0       | —                                     |
| 1 .. ISIZE²   | —                                      | R in bits 26:0, bits 31:27 zero        |

The results overwrite the first ISIZE² image words. The R word is
zero-extended, not sign-extended: the host must sign-extend bit 26 itself.

After reset (`rst`, driven from a host PIO on the board), the controller
polls word 0. It starts only when the word holds exactly 1. After one
detection it idles until the next reset. `phase` shows the controller state:

| value | state        |
|-------|--------------|
| 0     | POLL_PREP    |
| 1     | POLL         |
| 2     | LOAD         |
| 3     | LOAD_DRAIN   |
| 4     | DER          |
| 5     | DER_DRAIN    |
| 6     | SUM          |
| 7     | SUM_DRAIN    |
| 8     | DONE         |
| 9     | IDLE         |

Cycle budget, counted from the clock on which the flag is seen:

- (ISIZE+2)² clocks to load the image;
- 9·ISIZE² clocks for each of the two passes;
- 12 clocks for pipeline fill, drains and the final flag write.

## The floating-point library and test memories

The same source contains a small library for a 27-bit floating-point format:

- 1 sign bit, an 8-bit exponent with bias 127, and an 18-bit fraction;
- an exponent of 0 means zero;
- there are no denormals, infinities or NaNs.

It also contains two test RAMs. None of this is used by the detector.
`harris_top` instantiates it all beside the detector, with ports prefixed
`fp_`, `m10k_` and `mlab_`.

| module        | function                              | timing                      |
|---------------|---------------------------------------|-----------------------------|
| `fp_mul`      | a·b, mantissas multiplied exactly, truncated | combinational        |
| `fp_add`      | a+b, align / add, then normalise       | 2 clocks                    |
| `fp_inv_sqrt` | 1/√x: magic-number estimate plus one Newton step, error < 0.2 % | 5 stages, one input per clock |
| `int2fp`      | 16-bit signed integer → float, exact   | combinational               |
| `fp2int`      | float → 16-bit integer, truncated, clipped to ±32767 | combinational |
| `fp_shift`    | x·2^s for signed 8-bit s; exponent leaving 1..255 gives 0 | combinational |
| `fp_negate`   | −x (zero stays +0)                     | combinational               |
| `fp_compare`  | a ≥ b (±0 equal)                       | combinational               |
| `m10k_256x32` | 256 x 32 block RAM, registered read    | 1 clock                     |
| `mlab_20x32`  | 20 x 32 LUT RAM, registered read       | 1 clock                     |

There is no absolute-value module. For |x|, clear bit 26.

## Departures from the original design

- **Load speed.** The image loads one word per clock through a pipeline.
  The original takes two clocks per word and mixes the address and
  write-enable timing. Everything after the load keeps the original's
  9-clock window.
- **Zero border.** The original clears the tensor RAMs by copying a ROM full
  of zeros. Here a constant 0 is multiplexed onto their data inputs.
- **Tensor write enables.** The three tensor RAMs share one write enable. In
  the original, only one of the three enables is ever driven.
- **Harris constant.** k is the 0.04 encoded in the original constant. Its
  comment speaks of "around 0.05".
- **VGA output.** Thresholding R and plotting corners into a VGA pixel
  buffer is switched off in the original and is not built. The on-chip
  SRAM, the VGA pixel buffer, the processor system and the board pins are
  platform IP. Only the SRAM's FPGA-side port is brought out.
- **Floating-point library.** The arithmetic is re-derived, not transcribed:
  - `fp_mul` keeps the fraction LSB that the original drops;
  - `fp_mul` and `fp_add` saturate on overflow;
  - `fp_shift` returns 0 on exponent overflow or underflow, as the
    original's notes intend;
  - `fp_inv_sqrt` carries its first estimate through a delay line aligned
    with the Newton term. In the original, the two are one stage apart,
    which only works for a held input.
- **Displays.** The 16-bit display value `hex_value` is a top-level input.
  The original declares it but never drives it.

## Limits

- There is no overflow protection. With pixels in [0, 1]:
  - |Ix|, |Iy| stay below 1.35;
  - the smoothed tensor entries stay below about 9;
  - after the 1/4 scaling, every product stays well inside ±32.

  Sxx + Syy can reach about 17.6·p² for pixels up to p, so pixel values
  above about 1.3 can overflow the trace and wrap.
- The R RAM is written but not read. Results reach the host only through
  the shared SRAM.
- ISIZE is a parameter. DEPTH and AW of the RAMs must hold (ISIZE+2)², and
  the shared SRAM must hold word (ISIZE+2)².

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`.

- **End to end (`tb_harris_top`).** Runs the whole top at its default
  parameters, with a behavioural shared SRAM (`tb/shared_sram_model.sv`)
  and the testbench acting as host. It runs two detections:
  - a random image, where all 900 responses are compared bit for bit with a
    software model of the same fixed-point arithmetic
    (`tb/harris_ref_pkg.sv`);
  - a bright rectangle, where the strongest response must fall on one of
    its corners.

  It also checks:
  - one R write every 9 clocks;
  - the total detection time;
  - that polling, loading, both passes, the row wraps (30 per pass) and the done
    handshake all happened;
  - the floating-point ports and the test RAMs.
- **Floating point.** The library is checked against real arithmetic.
- **Unit tests.** The convolver, the response unit and the multiplier are
  checked against the same fixed-point model. The address generator is
  checked against directly computed window addresses at 30x30 and 5x5. The
  controller runs alone at 4x4 with stand-in RAMs and datapath functions
  that are sensitive to position.

## Simulating

Packages must come first on the command line. For example, for the
end-to-end test:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/harris_pkg.sv rtl/fp27_pkg.sv tb/harris_ref_pkg.sv tb/fp_ref_pkg.sv \
      -y rtl -y tb tb/tb_harris_top.sv --top-module tb_harris_top -o sim
    ./obj_dir/sim

This takes under a second. The other testbenches build the same way, with
their own `tb_<module>.sv`.

## Files

| file | contents |
|---|---|
| `rtl/harris_pkg.sv` | Q6.21 type, kernels, k, controller states |
| `rtl/harris_top.sv` | top: detector, displays, floating-point library, test RAMs |
| `rtl/harris_ctrl.sv` | sequencer, latency pipeline, window registers, SRAM handshake |
| `rtl/window_addr_gen.sv` | 3x3 window address sequence |
| `rtl/conv3x3.sv`, `rtl/fx_mult.sv`, `rtl/add3.sv` | convolver, multiplier, 3-input adder |
| `rtl/harris_response.sv` | R from the smoothed tensor |
| `rtl/dual_clock_ram.sv` | image / tensor / R memories |
| `rtl/hex_digit.sv` | 7-segment decoder |
| `rtl/fp27_pkg.sv`, `rtl/fp_*.sv`, `rtl/int2fp.sv`, `rtl/fp2int.sv` | floating-point library |
| `rtl/m10k_256x32.sv`, `rtl/mlab_20x32.sv` | test RAMs |
| `tb/tb_*.sv` | testbenches |
| `tb/*_pkg.sv`, `tb/shared_sram_model.sv` | reference models, SRAM model |
