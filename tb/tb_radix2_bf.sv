// tb_radix2_bf -- self-checking test of the radix-2 butterfly.
//
// Drives random full-range complex operands (including the extreme values)
// and compares x1, x2 with a1 + a2 and a1 - a2 computed in 32-bit integers
// and wrapped to 16 bits, as the design's word arithmetic specifies.
module tb_radix2_bf;
  import fft_pkg::*;

  cplx_t a1, a2, x1, x2;
  int checks = 0, failures = 0;

  radix2_bf dut (.a1(a1), .a2(a2), .x1(x1), .x2(x2));

  function automatic logic [15:0] w16(int v);
    return v[15:0];
  endfunction

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, $signed(got), $signed(exp));
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
    for (int t = 0; t < 2000; t++) begin
      a1.re = sample_t'($urandom); a1.im = sample_t'($urandom);
      a2.re = sample_t'($urandom); a2.im = sample_t'($urandom);
      if (t == 0) begin a1 = '{16'sh7fff, -16'sh8000}; a2 = '{16'sh7fff, 16'sh7fff}; end
      #1;
      check("x1.re", x1.re, w16(int'(a1.re) + int'(a2.re)));
      check("x1.im", x1.im, w16(int'(a1.im) + int'(a2.im)));
      check("x2.re", x2.re, w16(int'(a1.re) - int'(a2.re)));
      check("x2.im", x2.im, w16(int'(a1.im) - int'(a2.im)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
