// fft_pkg: types, constants and small arithmetic helpers shared by the
// mixed-radix multipath delay-feedback (MRMDF) 128/64-point FFT/IFFT.
//
// Samples are complex two's-complement fixed-point numbers. The input
// port carries IW-bit integers; inside the pipeline every sample is DW bits
// wide, enough for the log2(128) = 7 bits of growth of an unscaled
// 128-point transform plus one guard bit. Twiddle coefficients are CW-bit
// signed values with CFRAC fraction bits (16384 represents 1.0).
// The word lengths are this design's own choice.
package fft_pkg;

  localparam int LANES   = 4;   // parallel data paths
  localparam int MAX_SEQ = 4;   // simultaneous data sequences (MIMO streams)
  localparam int IW      = 12;  // input sample width (real and imaginary)
  localparam int DW      = 20;  // internal and output sample width
  localparam int CW      = 16;  // twiddle coefficient width
  localparam int CFRAC   = 14;  // twiddle coefficient fraction bits

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [CW-1:0] coef_comp_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    coef_comp_t re;
    coef_comp_t im;
  } coef_t;

  typedef cplx_t lanes_t [LANES];

  function automatic cplx_t cadd(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t csub(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  // Multiply by -j: (a + jb)(-j) = b - ja
  function automatic cplx_t cmul_mj(cplx_t a);
    cplx_t r;
    r.re = a.im;
    r.im = -a.re;
    return r;
  endfunction

  // Round-to-nearest scaling of a DW+1 bit value by 1/sqrt(2), realised
  // with shifts and adds: 11585 = 2^14 - 2^12 - 2^10 + 2^8 + 2^6 + 1
  function automatic sample_t scale_r2(logic signed [DW:0] v);
    logic signed [DW+CW:0] x, p;
    x = (DW + CW + 1)'(v);
    p = (x <<< 14) - (x <<< 12) - (x <<< 10) + (x <<< 8) + (x <<< 6) + x;
    p = p + (1 <<< (CFRAC - 1));
    return sample_t'(p >>> CFRAC);
  endfunction

  // Multiply by the trivial twiddle W8^e, e = 0..3.
  // W8^1 = (1 - j)/sqrt2, W8^2 = -j, W8^3 = -(1 + j)/sqrt2.
  function automatic cplx_t cmul_w8(cplx_t a, logic [1:0] e);
    cplx_t r;
    logic signed [DW:0] s, d;
    s = {a.re[DW-1], a.re} + {a.im[DW-1], a.im};
    d = {a.im[DW-1], a.im} - {a.re[DW-1], a.re};
    unique case (e)
      2'd0: r = a;
      2'd1: begin r.re = scale_r2(s);  r.im = scale_r2(d);  end
      2'd2: r = cmul_mj(a);
      default: begin r.re = scale_r2(d); r.im = scale_r2(-s); end
    endcase
    return r;
  endfunction

  // Fixed-point complex product with a coefficient, rounded to nearest
  function automatic cplx_t cmul_coef(cplx_t a, coef_t w);
    logic signed [DW+CW:0] pr, pi;
    cplx_t r;
    pr = a.re * w.re - a.im * w.im + (1 <<< (CFRAC - 1));
    pi = a.re * w.im + a.im * w.re + (1 <<< (CFRAC - 1));
    r.re = sample_t'(pr >>> CFRAC);
    r.im = sample_t'(pi >>> CFRAC);
    return r;
  endfunction

  // Exchange real and imaginary parts (used to run the IFFT on the FFT core)
  function automatic cplx_t cswap(cplx_t a);
    cplx_t r;
    r.re = a.im;
    r.im = a.re;
    return r;
  endfunction

  function automatic logic [2:0] bitrev3(logic [2:0] v);
    return {v[0], v[1], v[2]};
  endfunction

  // Reverse the low `bits` bits of v (bits = 6 or 7)
  function automatic logic [6:0] bitrev(logic [6:0] v, int unsigned bits);
    logic [6:0] r;
    r = '0;
    for (int i = 0; i < 7; i++)
      if (i < int'(bits)) r[i] = v[int'(bits) - 1 - i];
    return r;
  endfunction

endpackage
