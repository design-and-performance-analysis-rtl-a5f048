// tb_fft_radix2: self-checking test of the N-point radix-2 DIT FFT core.
//
// Runs the core at its default size (32 points, 16-bit inputs, 32-bit words)
// and at the 64-point size (32-bit inputs, 64-bit words) on complex inputs,
// and compares every output bin with a direct O(N^2) DFT computed here in
// real arithmetic. Stimuli: an impulse at every position, a constant, single
// complex tones and random full-scale data. Each of the log2(N) stages
// truncates once per product, so a bin may differ from the exact DFT by a few
// LSB; the tolerance is N LSB, far below the error any wrong pairing,
// ordering or twiddle would produce.
module tb_fft_radix2;
  localparam int  N    = 32, IN_W  = 16, DW  = 32;
  localparam int  N2   = 64, IN_W2 = 32, DW2 = 64;
  localparam real PI   = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [IN_W-1:0]  x_re  [N],  x_im  [N];
  logic signed [DW-1:0]    y_re  [N],  y_im  [N];
  logic signed [IN_W2-1:0] x2_re [N2], x2_im [N2];
  logic signed [DW2-1:0]   y2_re [N2], y2_im [N2];

  fft_radix2 #(.N(N), .IN_W(IN_W), .DW(DW)) dut (.*);

  fft_radix2 #(.N(N2), .IN_W(IN_W2), .DW(DW2)) dut64 (
    .x_re(x2_re), .x_im(x2_im), .y_re(y2_re), .y_im(y2_im)
  );

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare spectrum (yr, yi) with the exact DFT of (xr, xi).
  task automatic compare(input string what, input real xr [], input real xi [],
                         input real yr [], input real yi []);
    int n_pts, bad;
    real tol;
    n_pts = xr.size();
    tol = real'(n_pts);
    bad = 0;
    for (int k = 0; k < n_pts; k++) begin
      real er, ei, dr, di;
      er = 0.0; ei = 0.0;
      for (int n = 0; n < n_pts; n++) begin
        real c, s;
        c  = $cos(2.0 * PI * ((k * n) % n_pts) / n_pts);
        s  = $sin(2.0 * PI * ((k * n) % n_pts) / n_pts);
        er += xr[n] * c + xi[n] * s;
        ei += xi[n] * c - xr[n] * s;
      end
      dr = yr[k] - er;
      di = yi[k] - ei;
      checks++;
      if (dr > tol || dr < -tol || di > tol || di < -tol) begin
        failures++;
        bad++;
        if (bad <= 4)
          $display("%s N=%0d: bin %0d got %f,%fj exp %f,%fj", what, n_pts, k, yr[k], yi[k], er, ei);
      end
    end
  endtask

  // Apply the current inputs of both cores and check both spectra.
  task automatic check_dft(input string what);
    real xr [], xi [], yr [], yi [];
    @(posedge clk);
    xr = new[N]; xi = new[N]; yr = new[N]; yi = new[N];
    for (int n = 0; n < N; n++) begin
      xr[n] = real'(x_re[n]); xi[n] = real'(x_im[n]);
      yr[n] = real'(y_re[n]); yi[n] = real'(y_im[n]);
    end
    compare(what, xr, xi, yr, yi);
    xr = new[N2]; xi = new[N2]; yr = new[N2]; yi = new[N2];
    for (int n = 0; n < N2; n++) begin
      xr[n] = real'(x2_re[n]); xi[n] = real'(x2_im[n]);
      yr[n] = real'(y2_re[n]); yi[n] = real'(y2_im[n]);
    end
    compare(what, xr, xi, yr, yi);
  endtask

  task automatic clear();
    for (int n = 0; n < N; n++)  begin x_re[n]  = '0; x_im[n]  = '0; end
    for (int n = 0; n < N2; n++) begin x2_re[n] = '0; x2_im[n] = '0; end
  endtask

  initial begin
    // Impulses: X(k) = A * W^(k*p), exercises ordering and every twiddle.
    for (int p = 0; p < N2; p++) begin
      clear();
      x_re[p % N] = 16'sd20000;
      x_im[p % N] = -16'sd7000;
      x2_re[p]    = 32'sd1500000000;
      x2_im[p]    = -32'sd700000000;
      check_dft("impulse");
    end
    // Constant input: all energy in bin 0.
    for (int n = 0; n < N; n++)  begin x_re[n]  = 16'sd1000;     x_im[n]  = -16'sd500; end
    for (int n = 0; n < N2; n++) begin x2_re[n] = 32'sd100000;   x2_im[n] = -32'sd50000; end
    check_dft("constant");
    // Complex tones at a few bins.
    for (int b = 1; b < N; b += 5) begin
      for (int n = 0; n < N; n++) begin
        x_re[n] = IN_W'(longint'(30000.0 * $cos(2.0 * PI * b * n / N)));
        x_im[n] = IN_W'(longint'(30000.0 * $sin(2.0 * PI * b * n / N)));
      end
      for (int n = 0; n < N2; n++) begin
        x2_re[n] = IN_W2'(longint'(2.0e9 * $cos(2.0 * PI * b * n / N2)));
        x2_im[n] = IN_W2'(longint'(2.0e9 * $sin(2.0 * PI * b * n / N2)));
      end
      check_dft("tone");
    end
    // Random full-scale data; the first block is all most-negative values.
    for (int r = 0; r < 100; r++) begin
      for (int n = 0; n < N; n++) begin
        x_re[n] = IN_W'($urandom);
        x_im[n] = IN_W'($urandom);
      end
      for (int n = 0; n < N2; n++) begin
        x2_re[n] = IN_W2'($urandom);
        x2_im[n] = IN_W2'($urandom);
      end
      if (r == 0) begin
        for (int n = 0; n < N; n++)  begin x_re[n]  = -16'sd32768;    x_im[n]  = -16'sd32768; end
        for (int n = 0; n < N2; n++) begin x2_re[n] = 32'sh8000_0000; x2_im[n] = 32'sh8000_0000; end
      end
      check_dft("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
