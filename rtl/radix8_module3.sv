// radix8_module3 (Module 3): the first radix-8 step of the 64-point FFT,
// mapped from the three-step radix-8 algorithm onto four data paths.
//
// With n = 8*n1 + n2 the 8-point DFT over n1 (butterfly distances 32, 16 and
// 8 samples) is done by three radix-2 delay-feedback stages. Because a group
// holds four consecutive samples, those distances are 8, 4 and 2 groups: each
// path's delay memory holds 32, 16 and 8 words at four sequences, 224 words
// over the four paths. Between stages the trivial twiddles of the 8-point
// DFT are applied: after stage 1 the lower half (position bit 5 set) is
// multiplied by W8^(position bits 4:3); after stage 2 positions with bits 4
// and 3 set are multiplied by -j. The stage 3 outputs then pass through the
// modified complex multiplier (W64^(n2*k1)).
// Every stage output is registered; the data stay in decimation-in-frequency
// place order. Latency: 14 groups of valid input plus three registered cycles.
// Input and output: groups of four paths as produced by data_reorder; each
// 64-point block (16 groups) is processed independently, so a 128-point
// frame from Module 2 is handled as two blocks.
module radix8_module3
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

  // stage 1: distance 8 groups
  logic       s1_v;  cplx_t s1_d [LANES];  logic [3:0] s1_grp;
  logic       r1_v;  cplx_t r1_d [LANES];
  // stage 2: distance 4 groups
  logic       s2_v;  cplx_t s2_d [LANES];  logic [3:0] s2_grp;
  logic       r2_v;  cplx_t r2_d [LANES];
  // stage 3: distance 2 groups
  logic       s3_v;  cplx_t s3_d [LANES];  logic [3:0] s3_grp;
  logic       r3_v;

  sdf_stage #(.G(8), .NG(16)) u_st1 (
    .clk, .rst_n, .clear, .nseq, .in_valid, .in_data,
    .out_valid(s1_v), .out_data(s1_d), .grp(s1_grp));

  always_ff @(posedge clk) begin
    if (s1_v)
      for (int j = 0; j < LANES; j++)
        r1_d[j] <= s1_grp[3] ? cmul_w8(s1_d[j], s1_grp[2:1]) : s1_d[j];
  end

  sdf_stage #(.G(4), .NG(16)) u_st2 (
    .clk, .rst_n, .clear, .nseq, .in_valid(r1_v), .in_data(r1_d),
    .out_valid(s2_v), .out_data(s2_d), .grp(s2_grp));

  always_ff @(posedge clk) begin
    if (s2_v)
      for (int j = 0; j < LANES; j++)
        r2_d[j] <= (s2_grp[2] && s2_grp[1]) ? cmul_mj(s2_d[j]) : s2_d[j];
  end

  sdf_stage #(.G(2), .NG(16)) u_st3 (
    .clk, .rst_n, .clear, .nseq, .in_valid(r2_v), .in_data(r2_d),
    .out_valid(s3_v), .out_data(s3_d), .grp(s3_grp));

  modified_cmult u_mcm (
    .clk, .en(s3_v), .grp(s3_grp), .in_data(s3_d), .out_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_v <= 1'b0; r2_v <= 1'b0; r3_v <= 1'b0;
    end else if (clear) begin
      r1_v <= 1'b0; r2_v <= 1'b0; r3_v <= 1'b0;
    end else begin
      r1_v <= s1_v; r2_v <= s2_v; r3_v <= s3_v;
    end
  end

  assign out_valid = r3_v;

endmodule
