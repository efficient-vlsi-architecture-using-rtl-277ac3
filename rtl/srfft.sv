// srfft -- fully parallel N-point split-radix FFT.
//
// Computes the same DFT as radix2_fft, X(k) = sum_n x(n) W_N^(nk), with the
// split-radix decomposition, which needs fewer non-trivial twiddle
// multiplications. One split-radix step turns a block of M samples into
//   * M/4 split-radix butterflies (sr_bf) over x(n), x(n+M/4), x(n+M/2),
//     x(n+3M/4), whose outputs are
//   * one block of M/2 samples x(n) + x(n+M/2), whose DFT gives X(2k), and
//   * two blocks of M/4 twiddled samples z1(n), z3(n), whose DFTs give
//     X(4k+1) and X(4k+3).
// The hardware lays this recursion out as a flat, in-place flow graph of
// log2(N) columns: column s (s = 0 .. log2(N)-2) holds the split-radix
// butterflies of every block of size N/2^s present at that point, every
// other line passes straight through, and the last column holds the
// radix-2 butterflies (radix2_bf) of all blocks of size 2. Which lines a
// column's butterflies use is worked out at elaboration by the constant
// functions below (the index sequence of the classic in-place split-radix
// program). The final column leaves X in bit-reversed order, which the
// output wiring undoes. For N = 32 this gives 8 + 4 + 6 + 5 = 23
// split-radix butterflies and 11 radix-2 butterflies; N = 16 gives 9 + 5,
// N = 8 gives 3 + 3 and N = 4 gives 1 + 1.
//
// Interface: x[0..N-1] in natural time order, X[0..N-1] in natural
// frequency order. Purely combinational, no clock: results are valid once
// the longest path has settled.
//
// The decomposition, the butterfly counts per size, the 16-bit word and the
// sizes 4..32 follow the architecture description; the column layout of the
// flow graph and the natural output order are this design's choices.
module srfft
  import fft_pkg::*;
#(
  parameter int N = 32  // transform length, a power of two >= 2
) (
  input  cplx_t x[N],
  output cplx_t X[N]
);

  localparam int L = $clog2(N);

  initial assert (N >= 2 && (1 << L) == N)
    else $error("srfft: N must be a power of two >= 2");

  // Role of line 'pos' in split-radix column s: -1 when the line passes
  // through, otherwise 0..3, its leg in a butterfly on lines i0, i0+M/4,
  // i0+M/2, i0+3M/4 where M = n >> s is the block size of the column.
  function automatic int sr_leg(int n, int s, int pos);
    int m, q, is, id;
    m = n >> s;
    q = m / 4;
    for (int j = 0; j < q; j++) begin
      is = j;
      id = 2 * m;
      while (is < n - 1) begin
        for (int i0 = is; i0 < n - 1; i0 += id)
          for (int leg = 0; leg < 4; leg++)
            if (pos == i0 + leg * q) return leg;
        is = 2 * id - m + j;
        id = 4 * id;
      end
    end
    return -1;
  endfunction

  // Role of line 'pos' in the final radix-2 column: -1 pass-through,
  // 0 upper and 1 lower input of a butterfly on lines i0, i0+1.
  function automatic int r2_leg(int n, int pos);
    int is, id;
    is = 0;
    id = 4;
    while (is < n - 1) begin
      for (int i0 = is; i0 < n; i0 += id)
        if (pos == i0 || pos == i0 + 1) return pos - i0;
      is = 2 * id - 2;
      id = 4 * id;
    end
    return -1;
  endfunction

  function automatic int count_sr_bf(int n);
    int c;
    c = 0;
    for (int s = 0; s < $clog2(n) - 1; s++)
      for (int p = 0; p < n; p++)
        if (sr_leg(n, s, p) == 0) c++;
    return c;
  endfunction

  function automatic int count_r2_bf(int n);
    int c;
    c = 0;
    for (int p = 0; p < n; p++)
      if (r2_leg(n, p) == 0) c++;
    return c;
  endfunction

  // Number of butterflies in the flow graph, for inspection and tests.
  localparam int NUM_SR_BF = count_sr_bf(N);
  localparam int NUM_R2_BF = count_r2_bf(N);

  // g_col[s].din / .dout: the N lines entering and leaving column s.
  for (genvar s = 0; s < L; s++) begin : g_col
    localparam int M = N >> s;  // block size handled by this column
    localparam int Q = M / 4;
    cplx_t din[N];
    cplx_t dout[N];

    for (genvar p = 0; p < N; p++) begin : g_line
      if (s == 0) begin : g_first
        assign din[p] = x[p];
      end else begin : g_next
        assign din[p] = g_col[s-1].dout[p];
      end

      if (s < L - 1) begin : g_split
        localparam int LEG = sr_leg(N, s, p);
        if (LEG == 0) begin : g_bf
          // p = i0 and p mod M is the butterfly index n within its block
          sr_bf #(.N(M), .IDX(p % M)) u_sr (
            .x0(din[p]), .x1(din[p + Q]), .x2(din[p + 2*Q]), .x3(din[p + 3*Q]),
            .e0(dout[p]), .e1(dout[p + Q]), .z1(dout[p + 2*Q]), .z3(dout[p + 3*Q])
          );
        end else if (LEG < 0) begin : g_pass
          assign dout[p] = din[p];
        end
      end else begin : g_radix2
        localparam int LEG = r2_leg(N, p);
        if (LEG == 0) begin : g_bf
          radix2_bf u_bf (.a1(din[p]), .a2(din[p + 1]), .x1(dout[p]), .x2(dout[p + 1]));
        end else if (LEG < 0) begin : g_pass
          assign dout[p] = din[p];
        end
      end
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_out
    assign X[k] = g_col[L-1].dout[bitrev(k, L)];
  end

endmodule
