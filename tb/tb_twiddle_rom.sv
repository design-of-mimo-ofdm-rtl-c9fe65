// tb_twiddle_rom: checks every one of the 128 twiddles W128^e produced from
// the 1/8-period table against cos/sin computed in double precision
// (at most one unit of rounding apart).
module tb_twiddle_rom;
  import fft_pkg::*;
  logic [6:0] idx;
  coef_t      w;
  int checks = 0, failures = 0;

  twiddle_rom dut (.idx, .w);

  initial begin
    for (int e = 0; e < 128; e++) begin
      real cr, ci;
      idx = 7'(e);
      #1;
      cr = 16384.0 * $cos(2.0 * 3.14159265358979 * e / 128.0);
      ci = -16384.0 * $sin(2.0 * 3.14159265358979 * e / 128.0);
      checks++;
      if (real'(w.re) - cr > 1.0 || cr - real'(w.re) > 1.0 ||
          real'(w.im) - ci > 1.0 || ci - real'(w.im) > 1.0) begin
        failures++;
        $display("e=%0d got (%0d,%0d) want (%0.1f,%0.1f)", e, w.re, w.im, cr, ci);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
