// fft_top -- the two 32-point FFT architectures side by side.
//
// A radix-2 DIT FFT (radix2_fft) and a split-radix FFT (srfft) of the same
// length, each with its own input and output ports so that either can be
// used, or both compared, on the same or different data. Both compute
// X(k) = sum_n x(n) exp(-j*2*pi*nk/N) on 16-bit complex samples, fully in
// combinational logic: there is no clock, a new block of N samples is
// transformed as soon as it is applied. Bringing both out in one top is this
// design's choice; each architecture is complete on its own.
module fft_top
  import fft_pkg::*;
#(
  parameter int N = 32
) (
  input  cplx_t r2_x[N],
  output cplx_t r2_X[N],
  input  cplx_t sr_x[N],
  output cplx_t sr_X[N]
);

  radix2_fft #(.N(N)) u_radix2 (.x(r2_x), .X(r2_X));
  srfft      #(.N(N)) u_split  (.x(sr_x), .X(sr_X));

endmodule
