// radix2_fft -- fully parallel N-point radix-2 decimation-in-time FFT.
//
// Computes X(k) = sum_n x(n) W_N^(nk), W_N = exp(-j*2*pi/N), for one block
// of N complex 16-bit samples, entirely in combinational logic: the whole
// Cooley-Tukey flow graph is laid out in hardware, with no clock, no
// memory and no control. The inputs are wired in bit-reversed order to the
// first stage; then log2(N) stages follow, each with N/2 twiddled
// butterflies (dit_bf). In stage s (s = 1..log2 N) the butterflies span
// 2^(s-1) lines, pair lines j and j + 2^(s-1) of each group of 2^s, and
// apply W_(2^s)^j to the lower line; outputs leave in natural order. For
// N = 32 that is 5 stages of 16 butterflies.
//
// Interface: x[0..N-1] in natural time order, X[0..N-1] in natural
// frequency order, both arrays of fft_pkg::cplx_t. Timing: one
// combinational path of log2(N) butterflies from any input to any output;
// the result is valid as soon as that path has settled.
//
// The flow graph, its stage/twiddle layout, the 16-bit word and the sizes
// 4..32 follow the architecture description; the twiddle number format and
// rounding are those of twiddle_mul.
module radix2_fft
  import fft_pkg::*;
#(
  parameter int N = 32  // transform length, a power of two >= 2
) (
  input  cplx_t x[N],
  output cplx_t X[N]
);

  localparam int L = $clog2(N);

  // Number of butterflies in the flow graph, for inspection and tests.
  localparam int NUM_BF = (N / 2) * L;

  initial assert (N >= 2 && (1 << L) == N)
    else $error("radix2_fft: N must be a power of two >= 2");

  // g_stage[s].din holds the N lines entering stage s+1 and g_stage[s].dout
  // the N lines leaving it; each stage is a separate array so that the
  // stages form a plain feed-forward chain.
  for (genvar s = 0; s < L; s++) begin : g_stage
    localparam int H = 1 << s;  // butterfly span
    cplx_t din[N];
    cplx_t dout[N];

    for (genvar i = 0; i < N; i++) begin : g_link
      if (s == 0) begin : g_first
        assign din[i] = x[bitrev(i, L)];
      end else begin : g_next
        assign din[i] = g_stage[s-1].dout[i];
      end
    end

    for (genvar g = 0; g < N; g += 2 * H) begin : g_group
      for (genvar j = 0; j < H; j++) begin : g_bf
        dit_bf #(.N(2 * H), .K(j)) u_bf (
          .x0(din[g + j]),
          .x1(din[g + j + H]),
          .y0(dout[g + j]),
          .y1(dout[g + j + H])
        );
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    assign X[i] = g_stage[L-1].dout[i];
  end

endmodule
