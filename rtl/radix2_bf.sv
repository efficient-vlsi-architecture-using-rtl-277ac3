// radix2_bf -- the radix-2 butterfly, a DFT of size 2.
//
// Takes two complex samples a1, a2 and returns x1 = a1 + a2 and
// x2 = a1 - a2 (no twiddle factor). It is the last-level butterfly of the
// split-radix FFT and, preceded by a twiddle multiplier, the building block
// of the radix-2 DIT FFT. Purely combinational: four 16-bit adders or
// subtractors, results wrap at 16 bits like every word in the design.
module radix2_bf
  import fft_pkg::*;
(
  input  cplx_t a1,
  input  cplx_t a2,
  output cplx_t x1,
  output cplx_t x2
);

  always_comb begin
    x1 = cadd(a1, a2);
    x2 = csub(a1, a2);
  end

endmodule
