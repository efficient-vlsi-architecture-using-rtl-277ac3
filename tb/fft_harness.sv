// fft_harness -- drives one N-point FFT (radix-2 when ARCH = 0, split-radix
// when ARCH = 1) and checks it against a floating-point DFT.
//
// Vectors applied, one per time step:
//   * a unit impulse x(0) = 1        -> every X(k) = 1, exactly
//   * a constant x(n) = 1            -> X(0) = N, all other X(k) = 0, exactly
//   * for N = 4, x = 0, 1, 2, 3      -> X = 6, -2+2j, -2, -2-2j, exactly
//   * a constant x(n) = 2^15 / N     -> X(0) = 2^15, which a 16-bit word
//                                       holds as -2^15 (wrap), exactly
//   * a full-scale complex tone on bin 1, within tolerance
//   * NRAND random complex blocks with |x| small enough that no X(k) can
//     leave the 16-bit range, within tolerance
// The tolerance grows with the number of rounded multiplications on a path
// (1 + N/4 LSB per part). 'done' rises when all vectors are through;
// checks/failures count compared output blocks; max_err is the largest
// deviation of any output part from the exact DFT, in LSB.
module fft_harness
  import fft_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int N     = 32,
  parameter int ARCH  = 0,
  parameter int NRAND = 100
) (
  output int checks,
  output int failures,
  output int exact_vectors,
  output int random_vectors,
  output real max_err,
  output logic done
);

  cplx_t x[N], X[N];

  if (ARCH == 0) begin : g_r2
    radix2_fft #(.N(N)) dut (.x(x), .X(X));
  end else begin : g_sr
    srfft #(.N(N)) dut (.x(x), .X(X));
  end

  int  xr[MAXN], xi[MAXN];
  real yr[MAXN], yi[MAXN];

  // Reference value wrapped into the 16-bit two's-complement range.
  function automatic real wrap16(real v);
    real w;
    w = v;
    while (w >= 32768.0) w -= 65536.0;
    while (w < -32768.0) w += 65536.0;
    return w;
  endfunction

  task automatic apply_and_check(real tol, string name);
    int bad;
    for (int n = 0; n < N; n++) begin
      x[n].re = sample_t'(xr[n]);
      x[n].im = sample_t'(xi[n]);
    end
    #1;
    dft(N, xr, xi, yr, yi);
    for (int k = 0; k < N; k++) begin
      yr[k] = wrap16(yr[k]);
      yi[k] = wrap16(yi[k]);
    end
    bad = 0;
    for (int k = 0; k < N; k++) begin
      if (fabs(real'(X[k].re) - yr[k]) > max_err) max_err = fabs(real'(X[k].re) - yr[k]);
      if (fabs(real'(X[k].im) - yi[k]) > max_err) max_err = fabs(real'(X[k].im) - yi[k]);
      if (fabs(real'(X[k].re) - yr[k]) > tol || fabs(real'(X[k].im) - yi[k]) > tol) begin
        if (bad < 3)
          $display("FAIL %s N=%0d arch=%0d X(%0d) = (%0d,%0d), expected (%f,%f)", name, N, ARCH,
                   k, X[k].re, X[k].im, yr[k], yi[k]);
        bad++;
      end
    end
    checks++;
    if (bad != 0) failures++;
  endtask

  initial begin
    real tol;
    int  amp;
    checks = 0; failures = 0; exact_vectors = 0; random_vectors = 0; done = 0; max_err = 0.0;
    tol = 1.0 + real'(N) / 4.0;
    amp = 32767 / (2 * N);  // |re| + |im| summed over N samples stays < 2^15

    for (int n = 0; n < MAXN; n++) begin xr[n] = 0; xi[n] = 0; end
    xr[0] = 1;
    apply_and_check(0.001, "impulse");
    exact_vectors++;

    for (int n = 0; n < MAXN; n++) begin xr[n] = (n < N) ? 1 : 0; xi[n] = 0; end
    apply_and_check(0.001, "constant");
    exact_vectors++;

    if (N == 4) begin
      for (int n = 0; n < MAXN; n++) begin xr[n] = (n < 4) ? n : 0; xi[n] = 0; end
      apply_and_check(0.001, "ramp");
      exact_vectors++;
    end

    for (int n = 0; n < MAXN; n++) begin xr[n] = (n < N) ? 32768 / N : 0; xi[n] = 0; end
    apply_and_check(0.001, "wrap");
    exact_vectors++;

    for (int n = 0; n < MAXN; n++) begin
      xr[n] = (n < N) ? int'($floor(real'(32767 / N) * $cos(2.0 * PI * real'(n) / real'(N)) + 0.5)) : 0;
      xi[n] = (n < N) ? int'($floor(real'(32767 / N) * $sin(2.0 * PI * real'(n) / real'(N)) + 0.5)) : 0;
    end
    apply_and_check(tol, "tone");
    random_vectors++;

    for (int t = 0; t < NRAND; t++) begin
      for (int n = 0; n < MAXN; n++) begin
        xr[n] = (n < N) ? rnd(amp) : 0;
        xi[n] = (n < N) ? rnd(amp) : 0;
      end
      apply_and_check(tol, "random");
      random_vectors++;
    end
    done = 1;
  end

endmodule
