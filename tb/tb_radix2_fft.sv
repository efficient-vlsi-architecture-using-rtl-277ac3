// tb_radix2_fft -- self-checking test of the radix-2 DIT FFT at every size
// of the architecture family: 4, 8, 16 and 32 points, run in parallel.
// Each size gets the impulse, constant, (for N = 4) ramp, tone and random
// vectors of fft_harness, checked against a floating-point DFT.
module tb_radix2_fft;
  localparam int NS = 4;
  localparam int SIZES[NS] = '{4, 8, 16, 32};

  int   c[NS], f[NS], ex[NS], rv[NS];
  real  me[NS];
  logic d[NS];
  int   checks = 0, failures = 0;

  for (genvar i = 0; i < NS; i++) begin : g_size
    fft_harness #(.N(SIZES[i]), .ARCH(0), .NRAND(200)) h (
      .checks(c[i]), .failures(f[i]), .exact_vectors(ex[i]), .random_vectors(rv[i]), .max_err(me[i]), .done(d[i]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Butterflies per size: N/2 per stage, log2(N) stages.
  localparam int EXP_BF[NS] = '{4, 12, 32, 80};
  int n_bf[NS];
  assign n_bf[0] = g_size[0].h.g_r2.dut.NUM_BF;
  assign n_bf[1] = g_size[1].h.g_r2.dut.NUM_BF;
  assign n_bf[2] = g_size[2].h.g_r2.dut.NUM_BF;
  assign n_bf[3] = g_size[3].h.g_r2.dut.NUM_BF;

  initial begin
    #1;
    for (int i = 0; i < NS; i++) begin
      checks++;
      if (n_bf[i] != EXP_BF[i]) begin
        failures++;
        $display("FAIL N=%0d: %0d butterflies, expected %0d", SIZES[i], n_bf[i], EXP_BF[i]);
      end
    end
    wait (d[0] && d[1] && d[2] && d[3]);
    for (int i = 0; i < NS; i++) begin
      $display("radix-2 N=%0d: %0d blocks checked (%0d exact, %0d random/tone), %0d failed, max error %.2f LSB",
               SIZES[i], c[i], ex[i], rv[i], f[i], me[i]);
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
