// mrmdf_fft: 128/64-point FFT/IFFT processor for a MIMO-OFDM (IEEE 802.11n)
// baseband, built as a mixed-radix multipath delay-feedback (MRMDF) pipeline.
//
// Four parallel data paths carry up to four simultaneous sequences (one per
// antenna stream). The chain is
//   data_reorder (Module 1)  -> groups of four consecutive samples per path
//   radix2_module (Module 2) -> 128 = 2 x 64 radix-2 step (bypassed at 64)
//   radix8_module3 (Module 3)-> first radix-8 step + W64 twiddles
//   radix8_module4 (Module 4)-> second radix-8 step
// Every butterfly pairs samples through a delay-feedback memory, so no
// separate input or output buffer is needed.
//
// Interface: on each in_valid cycle path p brings the next sample of
// sequence p (p < nseq). Frames are N = 128 or 64 samples per sequence and
// must arrive back to back; the pipeline moves only with input, so after the
// last frame one more frame (e.g. zeros) pushes its results out. Results
// leave in groups: when out_valid is high, all paths hold sequence out_seq,
// group out_grp, and path j holds frequency bin out_bin[j] =
// bitrev(4*out_grp + j) (7 bits at 128 points, 6 at 64): bit-reversed order.
// IFFT (inverse = 1) exchanges real and imaginary parts before and after the
// FFT core and divides by N, giving x(n) = 1/N sum X(k) W^-nk.
// nseq, mode128 and inverse may change only between runs: pulse `clear`
// (synchronous) after changing them.
// Throughput: N*nseq results per N input cycles. Latency in valid groups:
// 1 (Module 1) + 16 (Module 2, 128 only) + 14 (Module 3) + 1 (Module 4),
// plus one register per stage; one following frame flushes exactly.
// Word lengths, the handshake, the flush by a following frame and the IFFT
// by real/imaginary exchange are this design's own choices.
module mrmdf_fft
  import fft_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [2:0]           nseq,      // 1..4 simultaneous sequences
  input  logic                 mode128,   // 1: 128-point, 0: 64-point
  input  logic                 inverse,   // 1: IFFT, 0: FFT
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_re [LANES],
  input  logic signed [IW-1:0] in_im [LANES],
  output logic                 out_valid,
  output logic [1:0]           out_seq,
  output logic [4:0]           out_grp,
  output logic [6:0]           out_bin [LANES],
  output logic signed [DW-1:0] out_re  [LANES],
  output logic signed [DW-1:0] out_im  [LANES]
);

  cplx_t x    [LANES];
  logic  m1_v, m2_v, m3_v, m4_v;
  cplx_t m1_d [LANES];
  cplx_t m2_d [LANES];
  cplx_t m3_d [LANES];
  cplx_t m4_d [LANES];
  logic [1:0] seq_c;
  logic [4:0] grp_c;

  // input: sign extension, and the real/imaginary exchange for the IFFT
  always_comb begin
    for (int p = 0; p < LANES; p++) begin
      cplx_t v;
      v.re = sample_t'(in_re[p]);
      v.im = sample_t'(in_im[p]);
      x[p] = inverse ? cswap(v) : v;
    end
  end

  data_reorder u_m1 (
    .clk, .rst_n, .clear, .nseq, .in_valid, .in_data(x),
    .out_valid(m1_v), .out_data(m1_d));

  radix2_module u_m2 (
    .clk, .rst_n, .clear, .nseq, .mode128, .in_valid(m1_v), .in_data(m1_d),
    .out_valid(m2_v), .out_data(m2_d));

  radix8_module3 u_m3 (
    .clk, .rst_n, .clear, .nseq, .in_valid(m2_v), .in_data(m2_d),
    .out_valid(m3_v), .out_data(m3_d));

  radix8_module4 u_m4 (
    .clk, .rst_n, .clear, .nseq, .in_valid(m3_v), .in_data(m3_d),
    .out_valid(m4_v), .out_data(m4_d));

  // output position: sequence and group of the current result
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_c <= '0;
      grp_c <= '0;
    end else if (clear) begin
      seq_c <= '0;
      grp_c <= '0;
    end else if (m4_v) begin
      if ({1'b0, seq_c} == nseq - 1'b1) begin
        seq_c <= '0;
        grp_c <= (mode128 || grp_c != 5'd15) ? grp_c + 1'b1 : 5'd0;
      end else begin
        seq_c <= seq_c + 1'b1;
      end
    end
  end

  // output register: IFFT post-processing, bin numbers
  always_ff @(posedge clk) begin
    if (m4_v) begin
      out_seq <= seq_c;
      out_grp <= grp_c;
      for (int j = 0; j < LANES; j++) begin
        cplx_t      y;
        logic [6:0] pos;
        y = m4_d[j];
        if (inverse) begin
          y = cswap(y);
          if (mode128) begin
            y.re = (y.re + sample_t'(64)) >>> 7;
            y.im = (y.im + sample_t'(64)) >>> 7;
          end else begin
            y.re = (y.re + sample_t'(32)) >>> 6;
            y.im = (y.im + sample_t'(32)) >>> 6;
          end
        end
        out_re[j] <= y.re;
        out_im[j] <= y.im;
        pos = {grp_c, 2'(j)};
        out_bin[j] <= bitrev(pos, mode128 ? 7 : 6);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     out_valid <= 1'b0;
    else if (clear) out_valid <= 1'b0;
    else            out_valid <= m4_v;
  end

endmodule
