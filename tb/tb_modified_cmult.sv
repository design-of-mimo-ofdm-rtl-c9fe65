// tb_modified_cmult: for every group position of a 64-point block, random
// samples on the four paths are multiplied and compared with
// x * exp(-j*2*pi*e/64), e = n2 * bitrev3(p), n = 4*grp + j = 8p + n2,
// computed in double precision (within 16 units: the nine stored constants are rounded to 14 fraction bits).
module tb_modified_cmult;
  import fft_pkg::*;
  logic       clk = 1'b0, en = 1'b0;
  logic [3:0] grp;
  cplx_t      in_data [LANES];
  cplx_t      out_data [LANES];
  int checks = 0, failures = 0;

  modified_cmult dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      for (int g = 0; g < 16; g++) begin
        @(negedge clk);
        grp = 4'(g);
        en = 1'b1;
        foreach (in_data[j]) begin
          in_data[j].re = sample_t'(int'($urandom % 400000) - 200000);
          in_data[j].im = sample_t'(int'($urandom % 400000) - 200000);
        end
        @(negedge clk);
        en = 1'b0;
        for (int j = 0; j < LANES; j++) begin
          int n, p, n2, k1, e;
          real ang, xr, xi, er, ei;
          n = 4 * g + j; p = n / 8; n2 = n % 8;
          k1 = ((p & 1) << 2) | (p & 2) | ((p >> 2) & 1);
          e = n2 * k1;
          ang = 2.0 * 3.14159265358979 * e / 64.0;
          xr = real'(in_data[j].re); xi = real'(in_data[j].im);
          er = xr * $cos(ang) + xi * $sin(ang);
          ei = xi * $cos(ang) - xr * $sin(ang);
          checks++;
          if (real'(out_data[j].re) - er > 16.0 || er - real'(out_data[j].re) > 16.0 ||
              real'(out_data[j].im) - ei > 16.0 || ei - real'(out_data[j].im) > 16.0) begin
            failures++;
            if (failures < 10) $display("g=%0d j=%0d e=%0d got (%0d,%0d) want (%0.1f,%0.1f)",
                                        g, j, e, out_data[j].re, out_data[j].im, er, ei);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
