// modified_cmult: the "modified complex multiplier" at the end of Module 3.
// It multiplies the four data paths by the nontrivial twiddles W64^e of the
// 8 x 8 decomposition of the 64-point FFT, all in the same cycle.
//
// Path j of group g carries the sample at position n = 4g + j of a 64-point
// block. After the first radix-8 step, n = 8p + n2 holds bin k1 = bitrev3(p)
// of the 8-point DFT over the high index, and is multiplied by
// W64^(n2*k1): exponents 0..49. Every twiddle is a quadrant rotation of an
// angle 2*pi*m/64, m = 0..15, whose cosine and sine are C[m] and C[16-m]
// with C[i] = round(16384*cos(2*pi*i/64)): the nine constant sets
// (cos, sin of i = 0..8) of the document. No general multiplier is used:
// each product with a constant C[i] is a fixed sum of shifted copies of the
// sample (canonical signed digits, at most seven terms), and the quadrant
// only picks signs and swaps the four partial products.
// The exponent range, the nine constant sets, the shift-and-add constants
// and the four-path sharing follow the document; the digit recoding and
// rounding to nearest are this design's choices. Registered: latency one
// enabled cycle.
module modified_cmult
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  logic [3:0] grp,              // group within the 64-point block
  input  cplx_t      in_data  [LANES],
  output cplx_t      out_data [LANES]
);

  localparam int PW = DW + CFRAC + 2;   // width of a constant product
  typedef logic signed [PW-1:0] prod_t;

  // x * C[i] by shifts and adds, i = 0..16
  function automatic prod_t mul_c(sample_t x, logic [4:0] i);
    prod_t xe, p;
    xe = prod_t'(x);
    unique case (i)
      5'd0: p = (xe <<< 14);   // 16384
      5'd1: p = (xe <<< 14) - (xe <<< 6) - (xe <<< 4) + (xe <<< 0);   // 16305
      5'd2: p = (xe <<< 14) - (xe <<< 8) - (xe <<< 6) + (xe <<< 2) + (xe <<< 0);   // 16069
      5'd3: p = (xe <<< 14) - (xe <<< 10) + (xe <<< 8) + (xe <<< 6) - (xe <<< 0);   // 15679
      5'd4: p = (xe <<< 14) - (xe <<< 10) - (xe <<< 8) + (xe <<< 5) + (xe <<< 0);   // 15137
      5'd5: p = (xe <<< 14) - (xe <<< 11) + (xe <<< 7) - (xe <<< 4) + (xe <<< 0);   // 14449
      5'd6: p = (xe <<< 14) - (xe <<< 12) + (xe <<< 10) + (xe <<< 8) + (xe <<< 6) - (xe <<< 3) - (xe <<< 0);   // 13623
      5'd7: p = (xe <<< 14) - (xe <<< 12) + (xe <<< 9) - (xe <<< 7) - (xe <<< 3) + (xe <<< 0);   // 12665
      5'd8: p = (xe <<< 14) - (xe <<< 12) - (xe <<< 10) + (xe <<< 8) + (xe <<< 6) + (xe <<< 0);   // 11585
      5'd9: p = (xe <<< 13) + (xe <<< 11) + (xe <<< 7) + (xe <<< 5) - (xe <<< 3) + (xe <<< 1);   // 10394
      5'd10: p = (xe <<< 13) + (xe <<< 10) - (xe <<< 7) + (xe <<< 4) - (xe <<< 1);   // 9102
      5'd11: p = (xe <<< 13) - (xe <<< 9) + (xe <<< 6) - (xe <<< 4) - (xe <<< 2) - (xe <<< 0);   // 7723
      5'd12: p = (xe <<< 13) - (xe <<< 11) + (xe <<< 7) - (xe <<< 1);   // 6270
      5'd13: p = (xe <<< 12) + (xe <<< 9) + (xe <<< 7) + (xe <<< 4) + (xe <<< 2);   // 4756
      5'd14: p = (xe <<< 12) - (xe <<< 10) + (xe <<< 7) - (xe <<< 2);   // 3196
      5'd15: p = (xe <<< 11) - (xe <<< 9) + (xe <<< 6) + (xe <<< 3) - (xe <<< 1);   // 1606
      5'd16: p = '0;   // 0
      default: p = '0;
    endcase
    return p;
  endfunction

  function automatic sample_t rnd(prod_t v);
    return sample_t'((v + (prod_t'(1) <<< (CFRAC - 1))) >>> CFRAC);
  endfunction

  // x * W64^e
  function automatic cplx_t mul_w64(cplx_t x, logic [5:0] e);
    logic [4:0] ci, si;
    prod_t      p1, p2, p3, p4;     // re*c, im*s, re*s, im*c
    cplx_t      r;
    ci = {1'b0, e[3:0]};
    si = 5'd16 - ci;
    p1 = mul_c(x.re, ci);
    p2 = mul_c(x.im, si);
    p3 = mul_c(x.re, si);
    p4 = mul_c(x.im, ci);
    // W = cos(theta) - j sin(theta), theta = quadrant*pi/2 + 2*pi*m/64
    unique case (e[5:4])
      2'd0: begin r.re = rnd(p1 + p2);  r.im = rnd(p4 - p3);  end
      2'd1: begin r.re = rnd(p4 - p3);  r.im = rnd(-p1 - p2); end
      2'd2: begin r.re = rnd(-p1 - p2); r.im = rnd(p3 - p4);  end
      default: begin r.re = rnd(p3 - p4); r.im = rnd(p1 + p2);  end
    endcase
    return r;
  endfunction

  logic [2:0] k1;
  assign k1 = bitrev3(grp[3:1]);

  always_ff @(posedge clk) begin
    if (en) begin
      for (int j = 0; j < LANES; j++) begin
        logic [2:0] n2;
        n2 = {grp[0], 2'(j)};
        out_data[j] <= mul_w64(in_data[j], 6'(n2) * 6'(k1));
      end
    end
  end

endmodule
