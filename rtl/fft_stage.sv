// fft_stage: one butterfly stage of an N-point radix-2 DIT FFT.
//
// Stage STAGE (m = 1 .. log2(N)) combines pairs of points that are
// HALF = 2^(m-1) apart: stage 1 uses adjacent pairs, stage 2 pairs 2 apart,
// stage 3 pairs 4 apart, and so on up to N/2 apart in the last stage. The N
// points fall into groups of 2^m; inside a group, position t (t = 0 .. HALF-1)
// is paired with position t + HALF and the pair goes through one butterfly
// with twiddle W_N^K, K = N*t/2^m. The stage thus holds N/2 butterflies, each
// with its own twiddle lookup at a constant index.
//
// Interface: a_re/a_im[N] in, y_re/y_im[N] out, DW-bit signed words.
//   y[top] = a[top] + a[bot]*W,  y[bot] = a[top] - a[bot]*W
// Timing: combinational.
// The pairing and the twiddle exponent follow the radix-2 DIT algorithm as
// published; the fixed-point arithmetic is that of fft_butterfly.
module fft_stage #(
  parameter int unsigned N     = 32,  // number of points
  parameter int unsigned DW    = 32,  // word width
  parameter int unsigned STAGE = 1    // stage number m, 1 .. log2(N)
) (
  input  logic signed [DW-1:0] a_re [N],
  input  logic signed [DW-1:0] a_im [N],
  output logic signed [DW-1:0] y_re [N],
  output logic signed [DW-1:0] y_im [N]
);

  localparam int unsigned HALF  = 1 << (STAGE - 1);   // pair distance
  localparam int unsigned KSTEP = N >> STAGE;         // N / 2^m
  localparam int unsigned KW    = $clog2(N) - 1;      // twiddle index width

  for (genvar b = 0; b < N / 2; b++) begin : g_bf
    localparam int unsigned T   = b % HALF;                   // position in group
    localparam int unsigned TOP = (b / HALF) * 2 * HALF + T;  // upper input
    localparam int unsigned BOT = TOP + HALF;                 // lower input
    localparam int unsigned K   = T * KSTEP;                  // twiddle power

    logic signed [DW-1:0] w_re, w_im;

    fft_twiddle_rom #(.N(N), .DW(DW)) u_tw (
      .k   (KW'(K)),
      .w_re(w_re),
      .w_im(w_im)
    );

    fft_butterfly #(.DW(DW)) u_bf (
      .c1_r(a_re[TOP]), .c1_i(a_im[TOP]),
      .c2_r(a_re[BOT]), .c2_i(a_im[BOT]),
      .w_r (w_re),      .w_i (w_im),
      .g1_r(y_re[TOP]), .g1_i(y_im[TOP]),
      .g2_r(y_re[BOT]), .g2_i(y_im[BOT])
    );
  end

  if (STAGE < 1 || (1 << STAGE) > N) begin : g_bad_stage
    $error("fft_stage: STAGE must lie in 1 .. log2(N)");
  end

endmodule
