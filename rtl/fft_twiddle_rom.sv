// fft_twiddle_rom: twiddle factor table of an N-point radix-2 FFT.
//
// Returns W_N^k = exp(-j*2*pi*k/N) = cos(2*pi*k/N) - j*sin(2*pi*k/N) for
// k = 0 .. N/2-1, the powers a radix-2 butterfly network needs. Entries are
// signed fixed point with FRAC fraction bits (default DW - 2), rounded to
// nearest; W^0 = 1.0 is therefore exact.
//
// How it works: the table is a constant computed at elaboration from the
// cosine and sine (fft_pkg::twiddle_re/twiddle_im), so no numbers are stored
// in source files and any power-of-two N works. A read is a combinational
// lookup indexed by k. Inside the FFT each butterfly owns one instance with a
// constant k, so synthesis reduces it to the one constant that butterfly uses.
//
// Interface: k (log2(N)-1 bits) in; w_re, w_im (DW bits, signed) out.
// Timing: combinational.
// The twiddle definition follows the DFT; the fixed-point format, rounding
// and the 64-bit limit on DW are choices of this design.
module fft_twiddle_rom #(
  parameter int unsigned N    = 32,       // FFT size, a power of two, >= 4
  parameter int unsigned DW   = 32,       // word width, <= 64
  parameter int unsigned FRAC = DW - 2    // fraction bits
) (
  input  logic        [$clog2(N)-2:0] k,
  output logic signed [DW-1:0]        w_re,
  output logic signed [DW-1:0]        w_im
);

  localparam int unsigned ENTRIES = N / 2;

  typedef logic [ENTRIES-1:0][DW-1:0] table_t;

  function automatic table_t make_re();
    table_t t;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      t[i] = DW'(fft_pkg::twiddle_re(i, N, FRAC));
    end
    return t;
  endfunction

  function automatic table_t make_im();
    table_t t;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      t[i] = DW'(fft_pkg::twiddle_im(i, N, FRAC));
    end
    return t;
  endfunction

  localparam table_t TW_RE = make_re();
  localparam table_t TW_IM = make_im();

  always_comb begin
    w_re = TW_RE[k];
    w_im = TW_IM[k];
  end

  // Elaboration-time legality of the parameters.
  if (N < 4 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("fft_twiddle_rom: N must be a power of two and at least 4");
  end
  if (DW > 64 || FRAC >= DW) begin : g_bad_dw
    $error("fft_twiddle_rom: need DW <= 64 and FRAC < DW");
  end

endmodule
