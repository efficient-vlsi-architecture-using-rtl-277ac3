// tb_dit_bf -- self-checking test of the twiddled radix-2 DIT butterfly.
//
// For several (N, K) pairs, random x0, x1 are applied and y0, y1 compared
// with x0 +/- x1 * exp(-j 2 pi K / N) in floating point, within 1.5 LSB.
module tb_dit_bf;
  import fft_pkg::*;
  import tb_ref_pkg::*;

  localparam int NC = 6;
  localparam int PN[NC] = '{2, 4, 4, 8, 16, 32};
  localparam int PK[NC] = '{0, 0, 1, 3,  5, 13};

  cplx_t x0[NC], x1[NC], y0[NC], y1[NC];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NC; c++) begin : g_dut
    dit_bf #(.N(PN[c]), .K(PK[c])) dut (.x0(x0[c]), .x1(x1[c]), .y0(y0[c]), .y1(y1[c]));
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
        x0[c] = '{sample_t'(rnd(8000)), sample_t'(rnd(8000))};
        x1[c] = '{sample_t'(rnd(8000)), sample_t'(rnd(8000))};
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        real pr, pi_;
        cmul_w(real'(x1[c].re), real'(x1[c].im), PN[c], PK[c], pr, pi_);
        checks++;
        if (fabs(real'(y0[c].re) - (real'(x0[c].re) + pr)) > 1.5 ||
            fabs(real'(y0[c].im) - (real'(x0[c].im) + pi_)) > 1.5 ||
            fabs(real'(y1[c].re) - (real'(x0[c].re) - pr)) > 1.5 ||
            fabs(real'(y1[c].im) - (real'(x0[c].im) - pi_)) > 1.5) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d K=%0d y0=(%0d,%0d) y1=(%0d,%0d)", PN[c], PK[c],
                     y0[c].re, y0[c].im, y1[c].re, y1[c].im);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
