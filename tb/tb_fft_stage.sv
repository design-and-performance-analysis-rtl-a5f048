// tb_fft_stage: self-checking test of one radix-2 DIT butterfly stage.
//
// Instantiates all five stages of a 32-point FFT (32-bit words), each fed its
// own random data, and checks every output against a reference computed here
// in real arithmetic: point i pairs with i XOR 2^(m-1), the lower index is the
// top of the butterfly, and the twiddle is W_32^k with
// k = (i mod 2^(m-1)) * 32 / 2^m. The hardware truncates c2*W to whole LSBs,
// so each result may sit up to 2 LSB from the exact value.
module tb_fft_stage;
  localparam int  N  = 32;
  localparam int  DW = 32;
  localparam int  M  = 5;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [DW-1:0] a_re [M][N], a_im [M][N];
  logic signed [DW-1:0] y_re [M][N], y_im [M][N];

  for (genvar s = 0; s < M; s++) begin : g_dut
    fft_stage #(.N(N), .DW(DW), .STAGE(s + 1)) dut (
      .a_re(a_re[s]), .a_im(a_im[s]), .y_re(y_re[s]), .y_im(y_im[s])
    );
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(input real got, input real exp_v);
    real d;
    d = got - exp_v;
    if (d < 0.0) d = -d;
    return d <= 2.0;
  endfunction

  initial begin
    for (int round = 0; round < 50; round++) begin
      for (int s = 0; s < M; s++)
        for (int i = 0; i < N; i++) begin
          a_re[s][i] = DW'($signed(28'($urandom)));
          a_im[s][i] = DW'($signed(28'($urandom)));
        end
      @(posedge clk);
      for (int s = 0; s < M; s++) begin
        int half;
        half = 1 << s;
        for (int i = 0; i < N; i++) begin
          int top, bot, k;
          real wr, wi, pr, pi, er, ei;
          top = i & ~half;
          bot = i | half;
          k   = (top % half) * N / (2 * half);
          wr  = $cos(2.0 * PI * k / N);
          wi  = -$sin(2.0 * PI * k / N);
          pr  = real'(a_re[s][bot]) * wr - real'(a_im[s][bot]) * wi;
          pi  = real'(a_re[s][bot]) * wi + real'(a_im[s][bot]) * wr;
          if (i == top) begin
            er = real'(a_re[s][top]) + pr; ei = real'(a_im[s][top]) + pi;
          end else begin
            er = real'(a_re[s][top]) - pr; ei = real'(a_im[s][top]) - pi;
          end
          checks += 2;
          if (!near(real'(y_re[s][i]), er) || !near(real'(y_im[s][i]), ei)) begin
            failures++;
            $display("stage %0d point %0d: got %0d,%0dj exp %f,%fj", s + 1, i,
                     y_re[s][i], y_im[s][i], er, ei);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
