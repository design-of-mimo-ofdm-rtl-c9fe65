// tb_complex_mult: random samples times random unit-magnitude twiddles,
// compared with the double-precision product (within 1.5 units).
module tb_complex_mult;
  import fft_pkg::*;
  cplx_t a, p;
  coef_t w;
  int checks = 0, failures = 0;

  complex_mult dut (.a, .w, .p);

  initial begin
    a = '0; w = '0;
    for (int t = 0; t < 300; t++) begin
      real ang, er, ei, ar, ai, wr, wi;
      ang = 2.0 * 3.14159265358979 * real'($urandom % 1000) / 1000.0;
      w.re = coef_comp_t'($rtoi($floor(16384.0 * $cos(ang) + 0.5)));
      w.im = coef_comp_t'($rtoi($floor(16384.0 * $sin(ang) + 0.5)));
      a.re = sample_t'(int'($urandom % 400000) - 200000);
      a.im = sample_t'(int'($urandom % 400000) - 200000);
      #1;
      ar = real'(a.re); ai = real'(a.im);
      wr = real'(w.re) / 16384.0; wi = real'(w.im) / 16384.0;
      er = ar * wr - ai * wi;
      ei = ar * wi + ai * wr;
      checks++;
      if (real'(p.re) - er > 1.5 || er - real'(p.re) > 1.5 ||
          real'(p.im) - ei > 1.5 || ei - real'(p.im) > 1.5) begin
        failures++;
        if (failures < 10) $display("got (%0d,%0d) want (%0.1f,%0.1f)", p.re, p.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
