// complex_mult: combinational complex multiplier, sample times twiddle.
//
// Computes (a.re + j a.im)(w.re + j w.im) with four real products, rounds
// to nearest and drops the CFRAC coefficient fraction bits, so the result
// has the same scale as the input sample. Module 2 has two of them, shared
// in time between its four data paths. The four-product form and the
// rounding are this design's own choice; the document gives no insides.
module complex_mult
  import fft_pkg::*;
(
  input  cplx_t a,
  input  coef_t w,
  output cplx_t p
);

  assign p = cmul_coef(a, w);

endmodule
