// fft_pkg -- types and constants shared by both FFT architectures.
//
// Every sample in the design is a complex number carried as two 16-bit
// two's-complement words (real and imaginary part). The word width stays
// 16 bits through every stage of both transforms, as the architectures are
// specified: sums and differences wrap modulo 2^16 and no per-stage scaling
// is applied, so the caller keeps |X(k)| inside the 16-bit range (for an
// N-point transform, input magnitudes below 2^15 / N are always safe).
//
// Twiddle factors W_N^k = exp(-j*2*pi*k/N) are fixed-point constants with
// TW_FRAC fractional bits (Q1.14 by default, so +1.0 is 16384 and still fits
// a 16-bit signed word). They are computed at elaboration time from
//   tw_re(N,k) = round( cos(2*pi*k/N) * 2^TW_FRAC)
//   tw_im(N,k) = round(-sin(2*pi*k/N) * 2^TW_FRAC)
// so no coefficient table is stored. The 16-bit width follows the
// architecture description; the 14-bit twiddle fraction and the
// round-half-up product rounding are this design's own choices.
package fft_pkg;

  localparam int DATA_W  = 16;  // width of the real and of the imaginary word
  localparam int TW_FRAC = 14;  // fractional bits of a twiddle constant

  typedef logic signed [DATA_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  localparam real PI = 3.14159265358979323846;

  function automatic int tw_re(int n, int k);
    return int'($floor($cos(2.0 * PI * real'(k) / real'(n)) * real'(1 << TW_FRAC) + 0.5));
  endfunction

  function automatic int tw_im(int n, int k);
    return int'($floor(-$sin(2.0 * PI * real'(k) / real'(n)) * real'(1 << TW_FRAC) + 0.5));
  endfunction

  // Complex sum and difference, wrapping at DATA_W bits.
  function automatic cplx_t cadd(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t csub(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  // Multiplication by -j and by +j: a swap of the parts and one negation,
  // no multiplier.
  function automatic cplx_t cmul_mj(cplx_t a);
    cplx_t r;
    r.re = a.im;
    r.im = -a.re;
    return r;
  endfunction

  function automatic cplx_t cmul_pj(cplx_t a);
    cplx_t r;
    r.re = -a.im;
    r.im = a.re;
    return r;
  endfunction

  // Bit reversal of the low 'bits' bits of i (input order of the radix-2
  // decimation-in-time flow graph).
  function automatic int bitrev(int i, int bits);
    int r;
    r = 0;
    for (int b = 0; b < bits; b++) r = (r << 1) | ((i >> b) & 1);
    return r;
  endfunction

endpackage
