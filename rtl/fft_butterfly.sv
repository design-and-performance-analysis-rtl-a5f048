// fft_butterfly: radix-2 decimation-in-time butterfly.
//
// Computes, on complex operands split into real (_r) and imaginary (_i)
// words,
//     g1 = c1 + c2 * W
//     g2 = c1 - c2 * W
// which is the basic two-input, two-output step of the radix-2 DIT FFT. The
// port names (c1, c2, w in; g1, g2 out, each with _r and _i halves) and the
// 32-bit word of the 32-point FFT follow the published butterfly symbol; the
// 64-point FFT uses the same block with 64-bit words (DW = 64).
//
// Arithmetic (this design's choice; the published description gives only the
// equations):
//   * All words are two's-complement signed, DW bits wide.
//   * W is a fixed-point number with FRAC fraction bits (default DW - 2, so
//     |W| <= 1 fits exactly).
//   * The complex product c2*W is formed at full precision (2*DW+1 bits), then
//     shifted right arithmetically by FRAC bits (truncation toward minus
//     infinity) and kept to DW bits.
//   * The sum and difference wrap at DW bits; there is no saturation. Callers
//     size DW so that the FFT's growth (log2(N) + 1 bits over the input) fits.
//
// The FRAC low product bits are dropped by the truncation and the top
// DW+1-FRAC product bits carry only sign, so lint reports them as unused;
// that is intended.
//
// Timing: purely combinational, no clock. The published design reports a
// minimum delay rather than a clocked latency, and has no clock pin among its
// I/O.
module fft_butterfly #(
  parameter int unsigned DW   = 32,      // word width of every operand
  parameter int unsigned FRAC = DW - 2   // fraction bits of the twiddle factor
) (
  input  logic signed [DW-1:0] c1_r,
  input  logic signed [DW-1:0] c1_i,
  input  logic signed [DW-1:0] c2_r,
  input  logic signed [DW-1:0] c2_i,
  input  logic signed [DW-1:0] w_r,
  input  logic signed [DW-1:0] w_i,
  output logic signed [DW-1:0] g1_r,
  output logic signed [DW-1:0] g1_i,
  output logic signed [DW-1:0] g2_r,
  output logic signed [DW-1:0] g2_i
);

  localparam int unsigned PW = 2 * DW + 1;  // full-precision product width

  logic signed [PW-1:0] prod_r, prod_i;     // c2*W before scaling
  logic signed [DW-1:0] t_r, t_i;           // c2*W in the data format

  always_comb begin
    prod_r   = PW'(c2_r) * PW'(w_r) - PW'(c2_i) * PW'(w_i);
    prod_i   = PW'(c2_r) * PW'(w_i) + PW'(c2_i) * PW'(w_r);
    // Arithmetic shift right by FRAC, kept to DW bits.
    t_r      = prod_r[FRAC +: DW];
    t_i      = prod_i[FRAC +: DW];
    g1_r     = c1_r + t_r;
    g1_i     = c1_i + t_i;
    g2_r     = c1_r - t_r;
    g2_i     = c1_i - t_i;
  end

endmodule
