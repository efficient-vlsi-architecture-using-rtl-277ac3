// tb_fft_top -- end-to-end test of both 32-point architectures in fft_top,
// at the default parameters.
//
// Three kinds of run, each counted, and each must occur at least once:
//   * shared data: the same block goes into both transforms; each output is
//     checked against a floating-point DFT (1 + N/4 LSB) and the two
//     architectures must agree with each other within twice that;
//   * independent data: different blocks on the two input ports at the same
//     time, each output checked against its own DFT, which shows the two
//     datapaths do not interfere;
//   * exact vectors: an impulse (all X(k) = 1) and a constant block
//     (X(0) = 32, rest 0) must come out bit-exact from both.
module tb_fft_top;
  import fft_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 32;

  cplx_t r2_x[N], r2_X[N], sr_x[N], sr_X[N];
  int checks = 0, failures = 0;
  int n_shared = 0, n_indep = 0, n_exact = 0;
  real max_r2 = 0.0, max_sr = 0.0;

  fft_top dut (.r2_x(r2_x), .r2_X(r2_X), .sr_x(sr_x), .sr_X(sr_X));

  int  ar[MAXN], ai[MAXN], br[MAXN], bi[MAXN];
  real ayr[MAXN], ayi[MAXN], byr[MAXN], byi[MAXN];

  task automatic fill_random(output int r[MAXN], output int i[MAXN]);
    for (int n = 0; n < MAXN; n++) begin
      r[n] = rnd(32767 / (2 * N));
      i[n] = rnd(32767 / (2 * N));
    end
  endtask

  // Compare one output block with a reference; returns 1 when all parts fit.
  function automatic bit block_ok(cplx_t y[N], real er[MAXN], real ei[MAXN], real tol,
                                  string name, inout real mx);
    bit ok = 1;
    for (int k = 0; k < N; k++) begin
      real dr, di;
      dr = fabs(real'(y[k].re) - er[k]);
      di = fabs(real'(y[k].im) - ei[k]);
      if (dr > mx) mx = dr;
      if (di > mx) mx = di;
      if (dr > tol || di > tol) begin
        if (ok) $display("FAIL %s X(%0d) = (%0d,%0d) expected (%f,%f)", name, k,
                         y[k].re, y[k].im, er[k], ei[k]);
        ok = 0;
      end
    end
    return ok;
  endfunction

  task automatic apply(bit same);
    for (int n = 0; n < N; n++) begin
      r2_x[n] = '{sample_t'(ar[n]), sample_t'(ai[n])};
      sr_x[n] = same ? '{sample_t'(ar[n]), sample_t'(ai[n])} : '{sample_t'(br[n]), sample_t'(bi[n])};
    end
    #1;
  endtask

  task automatic check_pair(real tol, bit same);
    real dummy;
    dft(N, ar, ai, ayr, ayi);
    if (same) begin br = ar; bi = ai; end
    dft(N, br, bi, byr, byi);
    checks++;
    if (!block_ok(r2_X, ayr, ayi, tol, "radix-2", max_r2)) failures++;
    checks++;
    if (!block_ok(sr_X, byr, byi, tol, "split-radix", max_sr)) failures++;
    if (same) begin
      real rr[MAXN], ri[MAXN];
      for (int k = 0; k < MAXN; k++) begin
        rr[k] = (k < N) ? real'(r2_X[k].re) : 0.0;
        ri[k] = (k < N) ? real'(r2_X[k].im) : 0.0;
      end
      dummy = 0.0;
      checks++;
      if (!block_ok(sr_X, rr, ri, 2.0 * tol, "radix-2 vs split-radix", dummy)) failures++;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real tol;
    tol = 1.0 + real'(N) / 4.0;

    // exact vectors
    for (int n = 0; n < MAXN; n++) begin ar[n] = (n == 0) ? 1 : 0; ai[n] = 0; end
    apply(1); check_pair(0.001, 1); n_exact++;
    for (int n = 0; n < MAXN; n++) begin ar[n] = 1; ai[n] = 0; end
    apply(1); check_pair(0.001, 1); n_exact++;

    for (int t = 0; t < 300; t++) begin
      bit same;
      same = t[0];
      fill_random(ar, ai);
      fill_random(br, bi);
      apply(same);
      check_pair(tol, same);
      if (same) n_shared++; else n_indep++;
    end

    $display("shared-data runs %0d, independent-data runs %0d, exact vectors %0d", n_shared,
             n_indep, n_exact);
    $display("max error: radix-2 %.2f LSB, split-radix %.2f LSB", max_r2, max_sr);
    if (n_shared == 0) begin failures++; $display("FAIL no shared-data run"); end
    if (n_indep == 0)  begin failures++; $display("FAIL no independent-data run"); end
    if (n_exact == 0)  begin failures++; $display("FAIL no exact-vector run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
