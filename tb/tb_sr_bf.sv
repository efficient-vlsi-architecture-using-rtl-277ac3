// tb_sr_bf -- self-checking test of the split-radix butterfly.
//
// Every index n of the 32-point step (n = 0..7) and a few of the 8- and
// 16-point steps are instantiated. Random inputs are compared with the
// butterfly equations evaluated in floating point:
//   e0 = x0 + x2, e1 = x1 + x3                   (exact)
//   z1 = ((x0-x2) - j(x1-x3)) exp(-j 2 pi n / N)   (within 1.5 LSB)
//   z3 = ((x0-x2) + j(x1-x3)) exp(-j 2 pi 3n / N)  (within 1.5 LSB)
module tb_sr_bf;
  import fft_pkg::*;
  import tb_ref_pkg::*;

  localparam int NC = 12;
  localparam int PN[NC] = '{32, 32, 32, 32, 32, 32, 32, 32, 16, 16, 8, 4};
  localparam int PI_[NC] = '{0,  1,  2,  3,  4,  5,  6,  7,  1,  3, 1, 0};

  cplx_t x0[NC], x1[NC], x2[NC], x3[NC], e0[NC], e1[NC], z1[NC], z3[NC];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NC; c++) begin : g_dut
    sr_bf #(.N(PN[c]), .IDX(PI_[c])) dut (
      .x0(x0[c]), .x1(x1[c]), .x2(x2[c]), .x3(x3[c]),
      .e0(e0[c]), .e1(e1[c]), .z1(z1[c]), .z3(z3[c]));
  end

  function automatic bit near(real got, real exp, real tol);
    return fabs(got - exp) <= tol;
  endfunction

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
        x0[c] = '{sample_t'(rnd(4000)), sample_t'(rnd(4000))};
        x1[c] = '{sample_t'(rnd(4000)), sample_t'(rnd(4000))};
        x2[c] = '{sample_t'(rnd(4000)), sample_t'(rnd(4000))};
        x3[c] = '{sample_t'(rnd(4000)), sample_t'(rnd(4000))};
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        real dr, di, fr, fi, u1r, u1i, u3r, u3i, r1r, r1i, r3r, r3i;
        dr = real'(x0[c].re) - real'(x2[c].re);
        di = real'(x0[c].im) - real'(x2[c].im);
        fr = real'(x1[c].re) - real'(x3[c].re);
        fi = real'(x1[c].im) - real'(x3[c].im);
        // -j*(fr + j fi) = fi - j fr ; +j*(fr + j fi) = -fi + j fr
        u1r = dr + fi;  u1i = di - fr;
        u3r = dr - fi;  u3i = di + fr;
        cmul_w(u1r, u1i, PN[c], PI_[c], r1r, r1i);
        cmul_w(u3r, u3i, PN[c], 3 * PI_[c], r3r, r3i);
        checks++;
        if (!near(real'(e0[c].re), real'(x0[c].re) + real'(x2[c].re), 0.001) ||
            !near(real'(e0[c].im), real'(x0[c].im) + real'(x2[c].im), 0.001) ||
            !near(real'(e1[c].re), real'(x1[c].re) + real'(x3[c].re), 0.001) ||
            !near(real'(e1[c].im), real'(x1[c].im) + real'(x3[c].im), 0.001)) begin
          failures++;
          if (failures < 10) $display("FAIL even sums N=%0d n=%0d", PN[c], PI_[c]);
        end
        checks++;
        if (!near(real'(z1[c].re), r1r, 1.5) || !near(real'(z1[c].im), r1i, 1.5) ||
            !near(real'(z3[c].re), r3r, 1.5) || !near(real'(z3[c].im), r3i, 1.5)) begin
          failures++;
          if (failures < 10)
            $display("FAIL odd N=%0d n=%0d z1=(%0d,%0d) exp=(%f,%f) z3=(%0d,%0d) exp=(%f,%f)",
                     PN[c], PI_[c], z1[c].re, z1[c].im, r1r, r1i, z3[c].re, z3[c].im, r3r, r3i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
