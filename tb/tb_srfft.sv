// tb_srfft -- self-checking test of the split-radix FFT at every size
// of the architecture family: 4, 8, 16 and 32 points, run in parallel.
// Each size gets the impulse, constant, (for N = 4) ramp, tone and random
// vectors of fft_harness, checked against a floating-point DFT, and the
// number of butterflies in each flow graph is compared with the expected
// counts.
module tb_srfft;
  localparam int NS = 4;
  localparam int SIZES[NS] = '{4, 8, 16, 32};

  int   c[NS], f[NS], ex[NS], rv[NS];
  real  me[NS];
  logic d[NS];
  int   checks = 0, failures = 0;

  for (genvar i = 0; i < NS; i++) begin : g_size
    fft_harness #(.N(SIZES[i]), .ARCH(1), .NRAND(200)) h (
      .checks(c[i]), .failures(f[i]), .exact_vectors(ex[i]), .random_vectors(rv[i]), .max_err(me[i]), .done(d[i]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Butterfly counts of the split-radix flow graph per size:
  // split-radix butterflies 1, 3, 9, 23 and radix-2 butterflies 1, 3, 5, 11.
  localparam int EXP_SR[NS] = '{1, 3, 9, 23};
  localparam int EXP_R2[NS] = '{1, 3, 5, 11};
  int n_sr[NS], n_r2[NS];
  assign n_sr[0] = g_size[0].h.g_sr.dut.NUM_SR_BF;
  assign n_sr[1] = g_size[1].h.g_sr.dut.NUM_SR_BF;
  assign n_sr[2] = g_size[2].h.g_sr.dut.NUM_SR_BF;
  assign n_sr[3] = g_size[3].h.g_sr.dut.NUM_SR_BF;
  assign n_r2[0] = g_size[0].h.g_sr.dut.NUM_R2_BF;
  assign n_r2[1] = g_size[1].h.g_sr.dut.NUM_R2_BF;
  assign n_r2[2] = g_size[2].h.g_sr.dut.NUM_R2_BF;
  assign n_r2[3] = g_size[3].h.g_sr.dut.NUM_R2_BF;

  initial begin
    #1;
    for (int i = 0; i < NS; i++) begin
      checks++;
      if (n_sr[i] != EXP_SR[i] || n_r2[i] != EXP_R2[i]) begin
        failures++;
        $display("FAIL N=%0d: %0d split-radix and %0d radix-2 butterflies, expected %0d and %0d",
                 SIZES[i], n_sr[i], n_r2[i], EXP_SR[i], EXP_R2[i]);
      end else
        $display("split-radix N=%0d: %0d split-radix + %0d radix-2 butterflies", SIZES[i],
                 n_sr[i], n_r2[i]);
    end
    wait (d[0] && d[1] && d[2] && d[3]);
    for (int i = 0; i < NS; i++) begin
      $display("split-radix N=%0d: %0d blocks checked (%0d exact, %0d random/tone), %0d failed, max error %.2f LSB",
               SIZES[i], c[i], ex[i], rv[i], f[i], me[i]);
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
