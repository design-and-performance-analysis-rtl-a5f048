// fft_top: the 32-point and the 64-point radix-2 DIT FFT, side by side.
//
// Two independent, fully parallel FFTs built from the same blocks:
//   * 32 points: 16-bit signed real inputs x32, 32-bit complex outputs
//     y32_re/y32_im; 5 stages of 16 butterflies with 32-bit words.
//   * 64 points: 32-bit signed real inputs x64, 64-bit complex outputs
//     y64_re/y64_im; 6 stages of 32 butterflies with 64-bit words.
// The inputs are real, so the imaginary input of each FFT is zero. Outputs
// are in natural order: y(k) is bin k of the DFT of x, unscaled.
//
// Timing: combinational. There is no clock or reset; outputs follow the
// inputs after the propagation delay of log2(N) butterfly levels.
// The two sizes, the real input and the complex output follow the published
// design; the input and output widths are inferred from its I/O count and
// butterfly word sizes.
module fft_top #(
  parameter int unsigned N32    = 32,
  parameter int unsigned IN32_W = 16,
  parameter int unsigned DW32   = 32,
  parameter int unsigned N64    = 64,
  parameter int unsigned IN64_W = 32,
  parameter int unsigned DW64   = 64
) (
  input  logic signed [IN32_W-1:0] x32    [N32],
  output logic signed [DW32-1:0]   y32_re [N32],
  output logic signed [DW32-1:0]   y32_im [N32],
  input  logic signed [IN64_W-1:0] x64    [N64],
  output logic signed [DW64-1:0]   y64_re [N64],
  output logic signed [DW64-1:0]   y64_im [N64]
);

  logic signed [IN32_W-1:0] zero32 [N32];
  logic signed [IN64_W-1:0] zero64 [N64];

  always_comb begin
    for (int i = 0; i < N32; i++) zero32[i] = '0;
    for (int i = 0; i < N64; i++) zero64[i] = '0;
  end

  fft_radix2 #(.N(N32), .IN_W(IN32_W), .DW(DW32)) u_fft32 (
    .x_re(x32), .x_im(zero32),
    .y_re(y32_re), .y_im(y32_im)
  );

  fft_radix2 #(.N(N64), .IN_W(IN64_W), .DW(DW64)) u_fft64 (
    .x_re(x64), .x_im(zero64),
    .y_re(y64_re), .y_im(y64_im)
  );

endmodule
