// sr_bf -- split-radix butterfly ("L-shaped" butterfly).
//
// For one index n of an N-point split-radix step it takes the four samples
// x0 = x(n), x1 = x(n+N/4), x2 = x(n+N/2), x3 = x(n+3N/4) and forms
//   e0 = x0 + x2                        } inputs of the N/2-point DFT that
//   e1 = x1 + x3                        } yields the even outputs X(2k)
//   z1 = ((x0 - x2) - j(x1 - x3)) W_N^n    input of the N/4-point DFT of X(4k+1)
//   z3 = ((x0 - x2) + j(x1 - x3)) W_N^3n   input of the N/4-point DFT of X(4k+3)
// Multiplication by -j / +j is a swap of parts and a negation; the two
// twiddle factors are constant multipliers (twiddle_mul), which reduce to
// wires for n = 0. Purely combinational.
//
// The equations and the placement of the two twiddle multipliers inside the
// unit follow the architecture description; number format and rounding are
// those of twiddle_mul.
module sr_bf
  import fft_pkg::*;
#(
  parameter int N   = 32,  // size of the transform this step belongs to
  parameter int IDX = 0    // the index n, 0 .. N/4-1
) (
  input  cplx_t x0,
  input  cplx_t x1,
  input  cplx_t x2,
  input  cplx_t x3,
  output cplx_t e0,
  output cplx_t e1,
  output cplx_t z1,
  output cplx_t z3
);

  cplx_t d02, d13, u1, u3;

  always_comb begin
    e0  = cadd(x0, x2);
    e1  = cadd(x1, x3);
    d02 = csub(x0, x2);
    d13 = csub(x1, x3);
    u1  = cadd(d02, cmul_mj(d13));
    u3  = cadd(d02, cmul_pj(d13));
  end

  twiddle_mul #(.N(N), .K(IDX))     u_w1 (.a(u1), .y(z1));
  twiddle_mul #(.N(N), .K(3 * IDX)) u_w3 (.a(u3), .y(z3));

endmodule
