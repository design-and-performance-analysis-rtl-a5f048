// fft_pkg: shared helpers for the fully parallel radix-2 decimation-in-time FFT.
//
// Holds elaboration-time functions only; nothing here becomes hardware by
// itself.
//   * bitrev()     reverses the low BITS bits of an index. The DIT network
//                  consumes its inputs in this order (x(0), x(16), x(8), ...
//                  for N = 32) and delivers its outputs in natural order.
//   * twiddle_re() and twiddle_im() give the twiddle factor
//                  W_N^k = exp(-j*2*pi*k/N) = cos(2*pi*k/N) - j*sin(2*pi*k/N)
//                  as a signed fixed-point integer with FRAC fraction bits,
//                  rounded to nearest; the angle is folded into the first
//                  quadrant so the values on the axes are exact. They are
//                  evaluated while the design is elaborated, so the twiddle
//                  tables are constants and no trigonometry is built.
// The fixed-point format of the twiddles (FRAC = data width - 2, so +1.0 is
// representable) is a choice of this design; the FFT definition itself only
// fixes the values. The real-to-integer conversion goes through a 64-bit
// longint, which limits the twiddle word to 64 bits.
package fft_pkg;

  localparam real PI = 3.14159265358979323846;

  // Reverse the low `bits` bits of `idx`.
  function automatic int unsigned bitrev(input int unsigned idx, input int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned b = 0; b < bits; b++) begin
      r = (r << 1) | ((idx >> b) & 1);
    end
    return r;
  endfunction

  // cos and sin of 2*pi*k/n, evaluated on the first quadrant and mapped by
  // symmetry, so that the points on the axes (k = 0, n/4, n/2, 3n/4) are
  // exact. n must be a multiple of 4.
  function automatic real cos_2pi(input int unsigned k, input int unsigned n);
    int unsigned q, j;
    real c, s;
    q = (k % n) / (n / 4);
    j = (k % n) % (n / 4);
    c = $cos(2.0 * PI * real'(j) / real'(n));
    s = $sin(2.0 * PI * real'(j) / real'(n));
    case (q)
      0:       return c;
      1:       return -s;
      2:       return -c;
      default: return s;
    endcase
  endfunction

  function automatic real sin_2pi(input int unsigned k, input int unsigned n);
    int unsigned q, j;
    real c, s;
    q = (k % n) / (n / 4);
    j = (k % n) % (n / 4);
    c = $cos(2.0 * PI * real'(j) / real'(n));
    s = $sin(2.0 * PI * real'(j) / real'(n));
    case (q)
      0:       return s;
      1:       return c;
      2:       return -s;
      default: return -c;
    endcase
  endfunction

  // Real part of W_n^k scaled by 2^frac: round(cos(2*pi*k/n) * 2^frac).
  function automatic longint twiddle_re(input int unsigned k, input int unsigned n,
                                        input int unsigned frac);
    return longint'(cos_2pi(k, n) * (2.0 ** frac));
  endfunction

  // Imaginary part of W_n^k scaled by 2^frac: round(-sin(2*pi*k/n) * 2^frac).
  function automatic longint twiddle_im(input int unsigned k, input int unsigned n,
                                        input int unsigned frac);
    return longint'(-sin_2pi(k, n) * (2.0 ** frac));
  endfunction

endpackage
