// twiddle_rom: twiddle factor W128^e = cos(2*pi*e/128) - j*sin(2*pi*e/128)
// for e = 0..127, built from a table that holds only one eighth of a period
// of the cosine and sine waves (angles 0..pi/4, 17 entries each).
//
// The table entries are round(16384*cos(2*pi*i/128)) and
// round(16384*sin(2*pi*i/128)), i = 0..16. Any other angle is folded into
// the first octant: within a quadrant, angles above pi/4 swap the roles of
// cosine and sine (cos(pi/2 - x) = sin(x)); the quadrant then sets the
// signs. Storing 1/8 of the waveform and reconstructing the rest by symmetry
// follows the Module 2 description; the folding logic itself is this
// design's own. Purely combinational.
module twiddle_rom
  import fft_pkg::*;
(
  input  logic [6:0] idx,   // exponent e of W128^e
  output coef_t      w      // Q2.14 coefficient
);

  localparam int unsigned COS_T [17] = '{16384, 16364, 16305, 16207, 16069, 15893,
                                         15679, 15426, 15137, 14811, 14449, 14053,
                                         13623, 13160, 12665, 12140, 11585};
  localparam int unsigned SIN_T [17] = '{0, 804, 1606, 2404, 3196, 3981, 4756,
                                         5520, 6270, 7005, 7723, 8423, 9102, 9760,
                                         10394, 11003, 11585};

  logic [4:0] m;        // angle within the quadrant, 0..31
  coef_comp_t c, s;     // cosine and sine of the in-quadrant angle

  always_comb begin
    m = idx[4:0];
    if (m <= 5'd16) begin
      c = coef_comp_t'(COS_T[m]);
      s = coef_comp_t'(SIN_T[m]);
    end else begin
      c = coef_comp_t'(SIN_T[5'(6'd32 - {1'b0, m})]);
      s = coef_comp_t'(COS_T[5'(6'd32 - {1'b0, m})]);
    end
    // W = cos(theta) - j sin(theta), theta = quadrant*pi/2 + angle
    unique case (idx[6:5])
      2'd0: begin w.re =  c; w.im = -s; end
      2'd1: begin w.re = -s; w.im = -c; end
      2'd2: begin w.re = -c; w.im =  s; end
      default: begin w.re = s; w.im = c; end
    endcase
  end

endmodule
