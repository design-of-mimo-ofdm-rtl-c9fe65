// radix8_module4 (Module 4): the second, last radix-8 step of the 64-point
// FFT, over the low index n2 (butterfly distances 4, 2 and 1 samples).
//
// Distance 4 samples is one group, so the first radix-2 stage is a
// delay-feedback BU_2 per path with a memory of one group (4 words per path
// at four sequences, 16 words in all); its lower-half outputs (position
// bit 2 set) are multiplied by W8^j, j = data path (the document notes that these
// first-stage outputs need twiddles before the next stage).
// Distances 2 and 1 lie between the four paths of one cycle, so stages 2 and
// 3 are plain butterflies across the paths, with -j applied to path 3
// between them. Each step is registered.
// Output: decimation-in-frequency place order, so path j of group g carries
// bin bitrev6(4g + j) of its 64-point block: the bit-reversed output order
// of the document's algorithm. Latency: one group of valid input plus two
// registered cycles.
module radix8_module4
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [2:0] nseq,
  input  logic       in_valid,
  input  cplx_t      in_data [LANES],
  output logic       out_valid,
  output cplx_t      out_data [LANES]
);

  logic       s1_v;  cplx_t s1_d [LANES];  logic [3:0] s1_grp;
  logic       r1_v;  cplx_t r1_d [LANES];
  logic       r2_v;
  cplx_t      b    [LANES];

  sdf_stage #(.G(1), .NG(16)) u_st1 (
    .clk, .rst_n, .clear, .nseq, .in_valid, .in_data,
    .out_valid(s1_v), .out_data(s1_d), .grp(s1_grp));

  always_ff @(posedge clk) begin
    if (s1_v)
      for (int j = 0; j < LANES; j++)
        r1_d[j] <= s1_grp[0] ? cmul_w8(s1_d[j], 2'(j)) : s1_d[j];
  end

  // stage 2 across paths: (0,2) and (1,3); -j on the difference of (1,3)
  always_comb begin
    b[0] = cadd(r1_d[0], r1_d[2]);
    b[2] = csub(r1_d[0], r1_d[2]);
    b[1] = cadd(r1_d[1], r1_d[3]);
    b[3] = cmul_mj(csub(r1_d[1], r1_d[3]));
  end

  // stage 3 across paths: (0,1) and (2,3)
  always_ff @(posedge clk) begin
    if (r1_v) begin
      out_data[0] <= cadd(b[0], b[1]);
      out_data[1] <= csub(b[0], b[1]);
      out_data[2] <= cadd(b[2], b[3]);
      out_data[3] <= csub(b[2], b[3]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_v <= 1'b0; r2_v <= 1'b0;
    end else if (clear) begin
      r1_v <= 1'b0; r2_v <= 1'b0;
    end else begin
      r1_v <= s1_v; r2_v <= r1_v;
    end
  end

  assign out_valid = r2_v;

endmodule
