// radix2_module (Module 2): the radix-2 first step of the 128-point
// mixed-radix 2 x 64 FFT, skipped in 64-point mode.
//
// With n = 64r + q and k = 2l + m, the 128-point DFT splits into two
// 64-point DFTs: of x(q) + x(q+64) (even bins, m = 0) and of
// (x(q) - x(q+64)) * W128^q (odd bins, m = 1). Each data path has a BU_2
// with a delay-feedback memory of 16 groups (64 words per path at four
// sequences, 256 words in all, four banks so that four words are read at
// once). The first half of a frame fills the memory; in the second half the
// sums go on to Module 3 directly and the differences go back into the
// memory, from which they are read during the first half of the next frame.
// Output order: per sequence, the 64 sums, then the 64 twiddled differences;
// path j of group g holds position 4g + j.
//
// Twiddles W128^q come from a 1/8-period cosine/sine ROM. Only two complex
// multipliers (each with its own ROM) serve the four paths: in the second
// half multiplier k twiddles the difference of path k before it is written
// to the memory, and in the first half it twiddles the stored difference of
// path k + 2 as it is read. Each is busy in every cycle, and the memory
// holds already-twiddled data for paths 0 and 1. This split of the work is
// this design's reading of "two complex multipliers, two ROMs".
// Latency: 16 groups of valid input plus one registered cycle; in 64-point
// mode one registered cycle. `clear` restarts the frame counting.
module radix2_module
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [2:0] nseq,
  input  logic       mode128,    // 1: 128-point, 0: 64-point (bypass)
  input  logic       in_valid,
  input  cplx_t      in_data [LANES],
  output logic       out_valid,
  output cplx_t      out_data [LANES]
);

  localparam int unsigned G     = 16;             // butterfly distance in groups
  localparam int unsigned DEPTH = G * MAX_SEQ;    // words per bank

  cplx_t      mem [LANES][DEPTH];
  logic [5:0] ptr;
  logic [6:0] len;
  logic       phase, primed;
  logic [1:0] seq;                  // sequence of the current element
  logic [3:0] grp;                  // group within the half frame
  logic       go, st_valid;
  cplx_t      rd   [LANES];
  cplx_t      diff [LANES];
  cplx_t      wr   [LANES];
  cplx_t      res  [LANES];
  cplx_t      mul_a [2];
  cplx_t      mul_p [2];
  coef_t      mul_w [2];
  logic [6:0] mul_idx [2];
  cplx_t      bypass [LANES];
  cplx_t      res_q  [LANES];
  logic       valid_q;

  assign len      = 7'(G * nseq);
  assign go       = in_valid && mode128;
  assign st_valid = go && (phase || primed);

  for (genvar j = 0; j < LANES; j++) begin : g_bank
    assign rd[j]   = mem[j][ptr];
    assign diff[j] = csub(rd[j], in_data[j]);
  end

  // two shared multipliers: difference of path k (second half) or stored
  // difference of path k + 2 (first half); q = 4 * grp + path
  for (genvar k = 0; k < 2; k++) begin : g_mul
    assign mul_a[k]   = phase ? diff[k] : rd[k + 2];
    assign mul_idx[k] = {1'b0, grp, phase ? 2'(k) : 2'(k + 2)};
    twiddle_rom  u_rom (.idx(mul_idx[k]), .w(mul_w[k]));
    complex_mult u_mul (.a(mul_a[k]), .w(mul_w[k]), .p(mul_p[k]));
  end

  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      if (phase) begin
        res[j] = cadd(rd[j], in_data[j]);
        wr[j]  = (j < 2) ? mul_p[j] : diff[j];
      end else begin
        res[j] = (j < 2) ? rd[j] : mul_p[j - 2];
        wr[j]  = in_data[j];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (go)
      for (int j = 0; j < LANES; j++) mem[j][ptr] <= wr[j];
    if (st_valid) res_q <= res;
    if (in_valid) bypass <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0; phase <= 1'b0; primed <= 1'b0; seq <= '0; grp <= '0;
      valid_q <= 1'b0;
    end else if (clear) begin
      ptr <= '0; phase <= 1'b0; primed <= 1'b0; seq <= '0; grp <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= mode128 ? st_valid : in_valid;
      if (go) begin
        if ({1'b0, ptr} == len - 1'b1) begin
          ptr   <= '0;
          seq   <= '0;
          grp   <= '0;
          phase <= ~phase;
          if (!phase) primed <= 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
          if ({1'b0, seq} == nseq - 1'b1) begin
            seq <= '0;
            grp <= grp + 1'b1;
          end else begin
            seq <= seq + 1'b1;
          end
        end
      end
    end
  end

  assign out_valid = valid_q;
  assign out_data  = mode128 ? res_q : bypass;

endmodule
