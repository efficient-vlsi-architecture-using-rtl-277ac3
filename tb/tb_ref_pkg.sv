// tb_ref_pkg -- reference arithmetic for the FFT testbenches.
//
// Everything here is computed in double-precision floating point, straight
// from the definitions (DFT sum, butterfly equations), independently of the
// fixed-point structure of the design under test.
package tb_ref_pkg;

  localparam int  MAXN = 32;
  localparam real PI   = 3.14159265358979323846;

  // Direct DFT X(k) = sum_n x(n) exp(-j 2 pi n k / n_pts).
  function automatic void dft(input int n_pts,
                              input int xr[MAXN], input int xi[MAXN],
                              output real yr[MAXN], output real yi[MAXN]);
    for (int k = 0; k < MAXN; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
    end
    for (int k = 0; k < n_pts; k++) begin
      for (int n = 0; n < n_pts; n++) begin
        real ang;
        ang = -2.0 * PI * real'((n * k) % n_pts) / real'(n_pts);
        yr[k] += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
        yi[k] += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
      end
    end
  endfunction

  // (ar + j ai) * exp(-j 2 pi k / n)
  function automatic void cmul_w(input real ar, input real ai, input int n, input int k,
                                 output real yr, output real yi);
    real ang;
    ang = -2.0 * PI * real'(k) / real'(n);
    yr  = ar * $cos(ang) - ai * $sin(ang);
    yi  = ar * $sin(ang) + ai * $cos(ang);
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Signed random integer in [-amp, amp].
  function automatic int rnd(int amp);
    return int'($urandom_range(2 * amp, 0)) - amp;
  endfunction

endpackage
