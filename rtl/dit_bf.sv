// dit_bf -- radix-2 decimation-in-time butterfly with twiddle factor.
//
//   y0 = x0 + x1 * W_N^K
//   y1 = x0 - x1 * W_N^K
//
// The lower input passes through a constant twiddle multiplier
// (twiddle_mul), then a plain radix-2 butterfly (radix2_bf) forms the sum
// and the difference. One of these per crossing in every stage of the
// radix-2 FFT flow graph. Purely combinational.
module dit_bf
  import fft_pkg::*;
#(
  parameter int N = 32,
  parameter int K = 1
) (
  input  cplx_t x0,
  input  cplx_t x1,
  output cplx_t y0,
  output cplx_t y1
);

  cplx_t x1w;

  twiddle_mul #(.N(N), .K(K)) u_tw (.a(x1), .y(x1w));
  radix2_bf u_bf (.a1(x0), .a2(x1w), .x1(y0), .x2(y1));

endmodule
