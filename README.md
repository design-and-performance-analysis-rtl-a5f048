# Fully parallel 32- and 64-point radix-2 FFT

This design computes the discrete Fourier transform

    X(k) = sum_{n=0}^{N-1} x(n) * exp(-j*2*pi*k*n/N),   k = 0 .. N-1

of a whole block of N samples at once. It uses the radix-2
decimation-in-time (DIT) FFT algorithm, which needs (N/2)*log2(N) butterflies
instead of the N^2 multiplications of a direct DFT. Every butterfly of the
signal-flow graph is its own piece of hardware. There are no memories, no
registers and no control: samples go in on one side and the spectrum comes out
on the other, one propagation delay later.

There are two sizes, side by side in the top module `fft_top`:

| size     | input samples     | output bins            | stages | butterflies per stage | butterfly word |
|----------|-------------------|------------------------|--------|-----------------------|----------------|
| 32-point | 32 x 16-bit real  | 32 x (32-bit re + im)  | 5      | 16                    | 32 bits        |
| 64-point | 64 x 32-bit real  | 64 x (64-bit re + im)  | 6      | 32                    | 64 bits        |

The structure is the textbook radix-2 DIT FFT as published for these two
sizes: 5 or 6 butterfly stages, bit-reversed inputs, outputs in natural order,
and a butterfly with 32-bit (or 64-bit) real and imaginary ports. The
fixed-point arithmetic is this design's own, because the published description
does not give one. The same goes for the input widths, which are inferred from
the published I/O pin counts. See "What is assumed" below.

## How the network is wired

The DIT FFT splits an N-point DFT into two N/2-point DFTs, one of the
even-indexed samples and one of the odd-indexed samples. It applies the same
split again until only 2-point DFTs are left. Unrolled, this gives log2(N)
stages:

1. **Input order.** The samples are read in bit-reversed index order. Position
   i of the first stage gets sample `bitrev(i)`, which is i with its log2(N)
   bits reversed. For 32 points the order is x(0), x(16), x(8), x(24), x(4),
   x(20), ... For 64 points it is x(0), x(32), x(16), x(48), ... This is what
   lets the outputs come out in natural order. Because every sample is present
   at the same time, the reordering is just wiring, done in `fft_radix2`.

2. **Stage m (m = 1 .. log2 N)** combines points that are `HALF = 2^(m-1)`
   apart. Stage 1 uses adjacent pairs, stage 2 pairs 2 apart, stage 3 pairs 4
   apart, and the last stage pairs N/2 apart. The points form groups of 2^m.
   Inside a group, position t (0 <= t < HALF) is the upper input of a
   butterfly and position t + HALF is the lower input. The butterfly's
   twiddle exponent is

       K = N * t / 2^m

   So stage 1 uses only W^0. In the last stage t runs through 0 .. N/2-1 and
   every power W^0 .. W^(N/2-1) is used once. The lower output needs
   W^(K+N/2) = -W^K. That comes from the subtraction in the butterfly, so no
   separate twiddle is needed for it.

3. **Butterfly** (`fft_butterfly`):

       g1 = c1 + c2 * W
       g2 = c1 - c2 * W

   Its ports are c1, c2 and w in, and g1 and g2 out. Each is split into `_r`
   (real) and `_i` (imaginary) words.

4. **Output.** The last stage's outputs are X(0) .. X(N-1) in natural order.
   They are not scaled: X(0) is the plain sum of the samples.

A check that is easy to run: an impulse at input p gives X(k) = A * W^(k*p).
It exercises the ordering and every twiddle on every path.

## Number format and precision

All words are two's-complement signed.

- **Inputs** are sign-extended to the butterfly word width DW before stage 1.
  The top feeds real samples, so the imaginary inputs are zero. The core
  `fft_radix2` takes complex samples.
- **Twiddles** have FRAC = DW - 2 fraction bits: Q2.30 at 32 bits and Q2.62 at
  64 bits. This makes +1.0 and -1.0 exact. Values are rounded to nearest. The
  angle is folded into the first quadrant before cos and sin are taken, so
  W^0 = 1 and W^(N/4) = -j are exact.
- **Product** c2*W is formed at full width (2*DW+1 bits), then shifted right by
  FRAC bits. The shift truncates toward minus infinity. The result is kept to
  DW bits.
- **Sums** wrap at DW bits. Nothing saturates and nothing is scaled between
  stages. Each stage can grow a value by at most one bit, so DW >= IN_W +
  log2(N) + 1 is enough to avoid overflow for any input. `fft_radix2` refuses
  to elaborate with a smaller DW. Both sizes have plenty of room: 16 + 5 + 1 =
  22 <= 32, and 32 + 6 + 1 = 39 <= 64.
- **Error.** Each product truncation costs up to 1 LSB. A later stage can at
  most double an error, so the worst case is roughly 1.5 * 2^log2(N) LSB per
  component. In practice results stay within a few LSB of the exact DFT. The
  testbenches allow N LSB.

The twiddle tables are computed while the design is elaborated
(`fft_pkg::twiddle_re/_im` with `$cos`/`$sin`), so no numbers are stored in the
sources. In the network each butterfly reads its own `fft_twiddle_rom` at a
constant index, so synthesis reduces each table to the one constant that
butterfly needs. The conversion goes through a 64-bit integer, so DW is
limited to 64.

## Modules

| module            | role |
|-------------------|------|
| `fft_top`         | 32-point and 64-point FFTs side by side, real inputs, complex outputs |
| `fft_radix2`      | N-point core: bit-reversed input wiring, then log2(N) `fft_stage`s |
| `fft_stage`       | one stage: N/2 butterflies, each with its own twiddle lookup |
| `fft_butterfly`   | g1 = c1 + c2*W, g2 = c1 - c2*W in fixed point |
| `fft_twiddle_rom` | W_N^k for k = 0 .. N/2-1, computed at elaboration |
| `fft_pkg`         | `bitrev()` and the twiddle functions |

Parameters, with their defaults:

- `fft_top`: `N32=32`, `IN32_W=16`, `DW32=32`, `N64=64`, `IN64_W=32`,
  `DW64=64`.
- `fft_radix2`: `N=32`, `IN_W=16`, `DW=32`. N must be a power of two, at
  least 4.
- `fft_stage`: `N`, `DW`, `STAGE`.
- `fft_butterfly`: `DW`, `FRAC=DW-2`.
- `fft_twiddle_rom`: `N`, `DW`, `FRAC`.

Ports of `fft_top`. The arrays are unpacked and indexed by sample or bin
number:

    input  logic signed [15:0] x32    [32]   // x(0..31)
    output logic signed [31:0] y32_re [32]   // Re X(0..31)
    output logic signed [31:0] y32_im [32]   // Im X(0..31)
    input  logic signed [31:0] x64    [64]
    output logic signed [63:0] y64_re [64]
    output logic signed [63:0] y64_im [64]

**Timing.** Everything is combinational: there is no clock and no reset. The
critical path runs through log2(N) butterflies, each a multiplier followed by
an adder. To pipeline the design, put registers between `fft_stage`
instances, at the `g_lvl` arrays in `fft_radix2`.

**Cost.** The 32-point FFT has 80 butterflies and the 64-point FFT has 192.
Each butterfly has four DW x DW multipliers. Multiplications by 0 and by
powers of two, such as W^0 = 1, fold away in synthesis. The design is large
and I/O-heavy on purpose: 2560 I/O bits for 32 points and 10240 for 64 points.
It suits a wide on-chip datapath, not pins.

## What is assumed

These points are not fixed by the published description. They are choices of
this design:

- **Combinational, no clock.** The published design gives its speed as a
  minimum delay (about 21.5 ns for 32 points and 30.4 ns for 64 points on a
  Virtex-6 device). Its I/O count leaves no pin for a clock.
- **Input widths.** 16 bits (32-point) and 32 bits (64-point) are inferred
  from the published I/O counts: 32*16 + 32*2*32 = 2560 and 64*32 + 64*2*64 =
  10240.
- **Real input.** The published simulation feeds a real signed vector, which
  `fft_top` follows. The DFT itself is defined for complex input, which
  `fft_radix2` accepts.
- **Twiddle sign.** W = exp(-j*2*pi/N), the sign of the DFT definition above.
- **The whole fixed-point scheme** described under "Number format and
  precision".
- **Twiddle supply.** One constant per butterfly. A folded (time-shared)
  architecture with a twiddle ROM and an address counter is not what is
  described and is not built.

Nothing of the published design is left out. Its results are FPGA synthesis
numbers: LUT and DSP counts and delay. They depend on the FPGA tools and are
not reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_fft_butterfly`   | 2000 random operand/twiddle sets plus W = 1, -j, -1, +j, bit-exact against a 64-bit integer model |
| `tb_fft_twiddle_rom` | every entry for N = 32/DW = 32 and N = 64/DW = 64 against cos/sin; exact W^0 and W^(N/4) |
| `tb_fft_stage`       | all 5 stages of a 32-point FFT with random data, against a real-arithmetic model (within 2 LSB) |
| `tb_fft_radix2`      | the core at 32 points (16/32-bit) and 64 points (32/64-bit) with complex input: impulses at every position, a constant, tones, random full-scale data, against a direct DFT |
| `tb_fft_top`         | both FFTs at their default sizes: odd-index impulses, cosine tones, full-scale extremes and 100 random blocks, against a direct DFT. It counts each kind of stimulus and fails if one never ran. |

`tb_fft_top` runs the top with its default parameters, so it covers the full
32-point and 64-point transforms. It finishes in well under a second.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/fft_pkg.sv tb/tb_fft_top.sv --top-module tb_fft_top
    ./obj_dir/Vtb_fft_top

Replace `tb_fft_top` with any other testbench name. For lint:

    verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/fft_pkg.sv rtl/fft_top.sv

Lint reports only that some bits of the butterfly's full-width product are
unused. This is intended: the low FRAC bits are dropped by the truncation, and
the top bits only repeat the sign.

## Changing it

- **Other sizes.** Instantiate `fft_radix2` with any power-of-two N >= 4.
  Choose DW >= IN_W + log2(N) + 1 and DW <= 64. The stage count, pairing and
  twiddles all follow from N.
- **Different rounding.** Change the two lines that slice `prod_r`/`prod_i` in
  `fft_butterfly`. For example, add 2^(FRAC-1) before slicing to round to
  nearest.
- **Scaling per stage** (to keep DW = IN_W, for example). Shift g1 and g2
  right by one in `fft_butterfly`. The output is then X(k)/N.
