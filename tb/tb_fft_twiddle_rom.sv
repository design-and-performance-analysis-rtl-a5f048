// tb_fft_twiddle_rom: self-checking test of the twiddle factor table.
//
// Reads every entry k = 0 .. N/2-1 and compares it with cos(2*pi*k/N) and
// -sin(2*pi*k/N) scaled by 2^FRAC, allowing 1 LSB for rounding. Also checks
// the exact values at k = 0 (1.0) and k = N/4 (-j). Instances at N = 32 with
// 32-bit words and N = 64 with 64-bit words, the two published sizes.
module tb_fft_twiddle_rom;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]         k32;
  logic signed [31:0] re32, im32;
  logic [4:0]         k64;
  logic signed [63:0] re64, im64;

  fft_twiddle_rom #(.N(32), .DW(32)) dut32 (.k(k32), .w_re(re32), .w_im(im32));
  fft_twiddle_rom #(.N(64), .DW(64)) dut64 (.k(k64), .w_re(re64), .w_im(im64));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(input real got, input real exp_v, input real tol);
    real d;
    d = got - exp_v;
    if (d < 0.0) d = -d;
    return d <= tol;
  endfunction

  initial begin
    real s32, s64;
    s32 = 2.0 ** 30;
    s64 = 2.0 ** 62;
    for (int k = 0; k < 16; k++) begin
      k32 = 4'(k);
      @(posedge clk);
      checks += 2;
      if (!near(real'(re32), $cos(2.0 * PI * k / 32.0) * s32, 1.0)) begin
        failures++; $display("N=32 k=%0d re=%0d", k, re32);
      end
      if (!near(real'(im32), -$sin(2.0 * PI * k / 32.0) * s32, 1.0)) begin
        failures++; $display("N=32 k=%0d im=%0d", k, im32);
      end
    end
    for (int k = 0; k < 32; k++) begin
      k64 = 5'(k);
      @(posedge clk);
      checks += 2;
      // Double precision limits the reference to about 2^-52 relative.
      if (!near(real'(re64), $cos(2.0 * PI * k / 64.0) * s64, 4096.0)) begin
        failures++; $display("N=64 k=%0d re=%0d", k, re64);
      end
      if (!near(real'(im64), -$sin(2.0 * PI * k / 64.0) * s64, 4096.0)) begin
        failures++; $display("N=64 k=%0d im=%0d", k, im64);
      end
    end
    // Exact entries: W^0 = 1, W^(N/4) = -j.
    k32 = 4'd0; k64 = 5'd0;
    @(posedge clk);
    checks += 4;
    if (re32 != 32'sd1 <<< 30 || im32 != 0) begin failures++; $display("W32^0 = %0d,%0d", re32, im32); end
    if (re64 != 64'sd1 <<< 62 || im64 != 0) begin failures++; $display("W64^0 = %0d,%0d", re64, im64); end
    k32 = 4'd8; k64 = 5'd16;
    @(posedge clk);
    if (re32 != 0 || im32 != -(32'sd1 <<< 30)) begin failures++; $display("W32^8 = %0d,%0d", re32, im32); end
    if (re64 != 0 || im64 != -(64'sd1 <<< 62)) begin failures++; $display("W64^16 = %0d,%0d", re64, im64); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
