// tb_fft_top: end-to-end test of the 32-point and 64-point FFTs together.
//
// Runs the top with its default parameters: the 32-point FFT on 16-bit real
// inputs and the 64-point FFT on 32-bit real inputs, and compares every
// output bin of both with a direct O(N^2) DFT computed here in real
// arithmetic (tolerance N LSB, covering the per-stage truncation).
// Each mechanism of the design is counted and must occur at least once:
//   * a 32-point transform and a 64-point transform;
//   * an impulse at an odd input index, which the bit-reversed ordering moves
//     to the lower half of the first stage;
//   * an input that needs a non-trivial twiddle (a tone off bins 0 and N/2),
//     so that every stage's complex multiplication is exercised;
//   * full-scale random input, the largest growth through the stages.
// The design is combinational; the clock only paces the test and the
// watchdog.
module tb_fft_top;
  localparam int  N32 = 32, IN32_W = 16, DW32 = 32;
  localparam int  N64 = 64, IN64_W = 32, DW64 = 64;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fft32 = 0, n_fft64 = 0, n_odd_impulse = 0, n_tone = 0, n_fullscale = 0;

  logic signed [IN32_W-1:0] x32    [N32];
  logic signed [DW32-1:0]   y32_re [N32], y32_im [N32];
  logic signed [IN64_W-1:0] x64    [N64];
  logic signed [DW64-1:0]   y64_re [N64], y64_im [N64];

  fft_top dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare one output bin with the exact DFT of real samples xs.
  function automatic int bin_error(input real xs [], input int k, input real got_re,
                                   input real got_im);
    int n_pts;
    real er, ei, dr, di, tol;
    n_pts = xs.size();
    tol = real'(n_pts);
    er = 0.0; ei = 0.0;
    for (int n = 0; n < n_pts; n++) begin
      er += xs[n] * $cos(2.0 * PI * ((k * n) % n_pts) / n_pts);
      ei -= xs[n] * $sin(2.0 * PI * ((k * n) % n_pts) / n_pts);
    end
    dr = got_re - er;
    di = got_im - ei;
    if (dr > tol || dr < -tol || di > tol || di < -tol) begin
      $display("N=%0d bin %0d: got %f,%fj exp %f,%fj", n_pts, k, got_re, got_im, er, ei);
      return 1;
    end
    return 0;
  endfunction

  task automatic run_both();
    real xs32 [], xs64 [];
    xs32 = new[N32];
    xs64 = new[N64];
    @(posedge clk);
    for (int n = 0; n < N32; n++) xs32[n] = real'(x32[n]);
    for (int n = 0; n < N64; n++) xs64[n] = real'(x64[n]);
    for (int k = 0; k < N32; k++) begin
      checks++;
      failures += bin_error(xs32, k, real'(y32_re[k]), real'(y32_im[k]));
    end
    for (int k = 0; k < N64; k++) begin
      checks++;
      failures += bin_error(xs64, k, real'(y64_re[k]), real'(y64_im[k]));
    end
    n_fft32++;
    n_fft64++;
  endtask

  initial begin
    // Impulses at odd positions.
    for (int p = 1; p < N64; p += 6) begin
      for (int n = 0; n < N32; n++) x32[n] = '0;
      for (int n = 0; n < N64; n++) x64[n] = '0;
      x32[p % N32] = 16'sd12345;
      x64[p]       = 32'sd123456789;
      run_both();
      n_odd_impulse++;
    end
    // Real cosine tones at bins 1, 3, 7 and 13.
    for (int t = 0; t < 4; t++) begin
      int b;
      b = (t == 0) ? 1 : (t == 1) ? 3 : (t == 2) ? 7 : 13;
      for (int n = 0; n < N32; n++)
        x32[n] = IN32_W'(longint'(32000.0 * $cos(2.0 * PI * b * n / N32)));
      for (int n = 0; n < N64; n++)
        x64[n] = IN64_W'(longint'(2.0e9 * $cos(2.0 * PI * b * n / N64)));
      run_both();
      n_tone++;
    end
    // Full-scale extremes, then random data.
    for (int n = 0; n < N32; n++) x32[n] = (n % 2 == 0) ? -16'sd32768 : 16'sd32767;
    for (int n = 0; n < N64; n++) x64[n] = (n % 2 == 0) ? 32'sh8000_0000 : 32'sh7fff_ffff;
    run_both();
    n_fullscale++;
    for (int n = 0; n < N32; n++) x32[n] = -16'sd32768;
    for (int n = 0; n < N64; n++) x64[n] = 32'sh8000_0000;
    run_both();
    n_fullscale++;
    for (int r = 0; r < 100; r++) begin
      for (int n = 0; n < N32; n++) x32[n] = IN32_W'($urandom);
      for (int n = 0; n < N64; n++) x64[n] = IN64_W'($urandom);
      run_both();
    end

    $display("mechanisms: fft32=%0d fft64=%0d odd_impulse=%0d tone=%0d fullscale=%0d",
             n_fft32, n_fft64, n_odd_impulse, n_tone, n_fullscale);
    if (n_fft32 == 0)       begin failures++; $display("32-point FFT never ran"); end
    if (n_fft64 == 0)       begin failures++; $display("64-point FFT never ran"); end
    if (n_odd_impulse == 0) begin failures++; $display("no odd-index impulse"); end
    if (n_tone == 0)        begin failures++; $display("no tone input"); end
    if (n_fullscale == 0)   begin failures++; $display("no full-scale input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
