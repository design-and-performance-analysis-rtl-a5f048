// fft_radix2: fully parallel N-point radix-2 decimation-in-time FFT.
//
// Computes X(k) = sum_n x(n) * exp(-j*2*pi*k*n/N), k = 0 .. N-1, for all N
// points at once. The inputs are first put in bit-reversed order (fixed
// wiring, see fft_pkg::bitrev), then pass through M = log2(N) butterfly
// stages (fft_stage) whose pair distance doubles from 1 to N/2; each stage
// holds N/2 butterflies.
// The outputs leave the last stage in natural order 0 .. N-1. Every butterfly
// of the signal-flow graph is its own piece of hardware, so one transform is
// computed per evaluation of the combinational network.
//
// Interface:
//   x_re/x_im[N]  IN_W-bit signed input samples (sign-extended to DW inside)
//   y_re/y_im[N]  DW-bit signed spectrum, unscaled (the DFT sum itself)
// Timing: combinational, no clock, no registers; the result is valid one
// propagation delay after the inputs settle.
// Sizes: defaults are the 32-point configuration (16-bit inputs, 32-bit
// butterfly words). The 64-point configuration is N = 64, IN_W = 32, DW = 64.
// The structure follows the published radix-2 DIT design; the word widths
// are read from its reported I/O and butterfly port sizes, and the
// fixed-point rules (twiddle format, truncation, no scaling between stages)
// are this design's choice. DW should be at least IN_W + log2(N) + 1 so that
// no sum can overflow.
module fft_radix2 #(
  parameter int unsigned N    = 32,  // number of points, power of two, >= 4
  parameter int unsigned IN_W = 16,  // input sample width
  parameter int unsigned DW   = 32   // internal and output word width
) (
  input  logic signed [IN_W-1:0] x_re [N],
  input  logic signed [IN_W-1:0] x_im [N],
  output logic signed [DW-1:0]   y_re [N],
  output logic signed [DW-1:0]   y_im [N]
);

  localparam int unsigned M = $clog2(N);  // number of butterfly stages

  // One pair of arrays per level: level 0 is the input in bit-reversed
  // order, level m the output of stage m.
  for (genvar m = 0; m <= M; m++) begin : g_lvl
    logic signed [DW-1:0] re [N];
    logic signed [DW-1:0] im [N];
  end

  // Bit-reversed input ordering, widened to DW bits: position i of level 0
  // takes sample bitrev(i). For N = 32 that is x(0), x(16), x(8), x(24), ...
  // All samples are present at once, so the reordering is fixed wiring.
  for (genvar i = 0; i < N; i++) begin : g_in
    localparam int unsigned SRC = fft_pkg::bitrev(i, M);
    assign g_lvl[0].re[i] = DW'(x_re[SRC]);
    assign g_lvl[0].im[i] = DW'(x_im[SRC]);
  end

  for (genvar m = 1; m <= M; m++) begin : g_stage
    fft_stage #(.N(N), .DW(DW), .STAGE(m)) u_stage (
      .a_re(g_lvl[m-1].re), .a_im(g_lvl[m-1].im),
      .y_re(g_lvl[m].re),   .y_im(g_lvl[m].im)
    );
  end

  assign y_re = g_lvl[M].re;
  assign y_im = g_lvl[M].im;

  if (DW < IN_W + M + 1) begin : g_narrow
    $error("fft_radix2: DW must be at least IN_W + log2(N) + 1");
  end

endmodule
