// tb_fft_butterfly: self-checking test of the radix-2 DIT butterfly.
//
// Drives random complex operands and random unit-magnitude twiddles, plus the
// corner twiddles 1, -j, -1 and +j, and compares g1 and g2 with a reference
// computed here in 64-bit integer arithmetic: t = floor((c2*W) / 2^FRAC),
// g1 = c1 + t, g2 = c1 - t. The block is combinational; a free-running clock
// only paces the test and drives the watchdog.
module tb_fft_butterfly;
  localparam int DW   = 32;
  localparam int FRAC = DW - 2;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;

  logic signed [DW-1:0] c1_r, c1_i, c2_r, c2_i, w_r, w_i;
  logic signed [DW-1:0] g1_r, g1_i, g2_r, g2_i;

  fft_butterfly #(.DW(DW)) dut (.*);

  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd28();
    return longint'($signed(28'($urandom)));
  endfunction

  task automatic check_one(input longint a_r, a_i, b_r, b_i, input longint wr, wi);
    longint pr, pi, tr, ti;
    c1_r = DW'(a_r); c1_i = DW'(a_i);
    c2_r = DW'(b_r); c2_i = DW'(b_i);
    w_r  = DW'(wr);  w_i  = DW'(wi);
    @(posedge clk);
    pr = b_r * wr - b_i * wi;
    pi = b_r * wi + b_i * wr;
    tr = pr >>> FRAC;
    ti = pi >>> FRAC;
    checks += 4;
    if (longint'(g1_r) != a_r + tr) begin failures++; $display("g1_r %0d exp %0d", g1_r, a_r + tr); end
    if (longint'(g1_i) != a_i + ti) begin failures++; $display("g1_i %0d exp %0d", g1_i, a_i + ti); end
    if (longint'(g2_r) != a_r - tr) begin failures++; $display("g2_r %0d exp %0d", g2_r, a_r - tr); end
    if (longint'(g2_i) != a_i - ti) begin failures++; $display("g2_i %0d exp %0d", g2_i, a_i - ti); end
  endtask

  initial begin
    longint one;
    one = longint'(1) <<< FRAC;
    // Corner twiddles: 1, -j, -1, +j.
    check_one(100, -200, 3000, 4000, one, 0);
    check_one(100, -200, 3000, 4000, 0, -one);
    check_one(100, -200, 3000, 4000, -one, 0);
    check_one(100, -200, 3000, 4000, 0, one);
    // Random operands, random twiddle angles.
    for (int n = 0; n < 2000; n++) begin
      real ang;
      ang = 2.0 * PI * real'($urandom % 4096) / 4096.0;
      check_one(rnd28(), rnd28(), rnd28(), rnd28(),
                longint'($cos(ang) * real'(one)), longint'(-$sin(ang) * real'(one)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
