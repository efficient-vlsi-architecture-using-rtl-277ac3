// twiddle_mul -- multiplication of a complex sample by the constant twiddle
// factor W_N^K = exp(-j*2*pi*K/N).
//
// The coefficient is fixed at elaboration (parameters N and K), so after
// synthesis this is a constant-coefficient complex multiplier. Trivial
// factors are recognised and cost no multiplier: W = 1 passes the sample
// through, W = -j, -1 and +j swap and/or negate the parts. Every other factor
// uses the Q1.14 constants of fft_pkg: the four 16x16 products are summed at
// full precision, rounded (add half an LSB, arithmetic shift right by
// TW_FRAC) and cut back to 16 bits. Purely combinational.
//
// The architecture description names the factor and shows constant complex
// multipliers in the synthesised 4-point design; the fixed-point format and
// the rounding rule are this design's own choices.
module twiddle_mul
  import fft_pkg::*;
#(
  parameter int N = 32,  // transform size the factor belongs to
  parameter int K = 1    // exponent of W_N
) (
  input  cplx_t a,
  output cplx_t y
);

  localparam int KM = ((K % N) + N) % N;  // exponent reduced to 0..N-1

  generate
    if (KM == 0) begin : g_one
      assign y = a;
    end else if (4 * KM == N) begin : g_mj
      always_comb y = cmul_mj(a);
    end else if (2 * KM == N) begin : g_m1
      always_comb y = csub('0, a);
    end else if (4 * KM == 3 * N) begin : g_pj
      always_comb y = cmul_pj(a);
    end else begin : g_mul
      localparam logic signed [DATA_W-1:0] WR = DATA_W'(tw_re(N, KM));
      localparam logic signed [DATA_W-1:0] WI = DATA_W'(tw_im(N, KM));
      localparam int PW = 2 * DATA_W + 1;
      localparam logic signed [PW-1:0] HALF = PW'(1) <<< (TW_FRAC - 1);
      logic signed [PW-1:0] pre, pim;
      always_comb begin
        pre  = PW'(a.re * WR) - PW'(a.im * WI);
        pim  = PW'(a.re * WI) + PW'(a.im * WR);
        y.re = DATA_W'((pre + HALF) >>> TW_FRAC);
        y.im = DATA_W'((pim + HALF) >>> TW_FRAC);
      end
    end
  endgenerate

endmodule
