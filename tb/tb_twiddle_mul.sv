// tb_twiddle_mul -- self-checking test of the constant twiddle multiplier.
//
// Instantiates the multiplier for a set of (N, K) pairs covering every
// special case (W = 1, -j, -1, +j, K >= N) and general factors of the 4..32
// point transforms. Random samples are compared with the floating-point
// product a * exp(-j 2 pi K / N): trivial factors must be exact, the others
// within 1.5 LSB (half an LSB of rounding plus the Q1.14 coefficient error
// at the sample amplitudes used).
module tb_twiddle_mul;
  import fft_pkg::*;
  import tb_ref_pkg::*;

  localparam int NC = 12;
  localparam int PN[NC] = '{32, 32, 32, 32, 32, 32, 32, 16, 16,  8, 4, 32};
  localparam int PK[NC] = '{ 0,  1,  3,  8, 16, 24,  5,  3,  6,  1, 1, 33};

  cplx_t a[NC], y[NC];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NC; c++) begin : g_dut
    twiddle_mul #(.N(PN[c]), .K(PK[c])) dut (.a(a[c]), .y(y[c]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int c = 0; c < NC; c++) begin
        a[c].re = sample_t'(rnd(16000));
        a[c].im = sample_t'(rnd(16000));
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        real er, ei, tol;
        bit trivial;
        cmul_w(real'(a[c].re), real'(a[c].im), PN[c], PK[c], er, ei);
        trivial = ((4 * (PK[c] % PN[c])) % PN[c]) == 0;
        tol = trivial ? 0.001 : 1.5;
        checks++;
        if (fabs(real'(y[c].re) - er) > tol || fabs(real'(y[c].im) - ei) > tol) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d K=%0d a=(%0d,%0d) y=(%0d,%0d) exp=(%f,%f)", PN[c], PK[c],
                     a[c].re, a[c].im, y[c].re, y[c].im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
