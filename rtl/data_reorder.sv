// data_reorder (Module 1): turns 1-4 simultaneous input sequences into the
// "groups" that the four parallel data paths of the FFT process.
//
// Input: on each valid cycle data path p carries the next sample of
// sequence p (paths p >= NSEQ are ignored). Every four valid input cycles
// form a 4x4 block: samples 4b..4b+3 of each sequence. The block is sent
// out transposed as one group of NSEQ cycles: in output cycle s, path j
// carries sample 4b+j of sequence s. So one group holds four consecutive
// samples of every sequence, 32 groups make a 128-point frame and 16 groups
// a 64-point frame, and all sequences of a group share their twiddle
// factors on each path.
//
// Storage is a single 16-word 4x4 array, transposed in place. Block b is
// read while block b+1 is written: in the t-th input cycle of block b+1
// sequence t of block b is read (if t < NSEQ) from exactly the four words
// that the t-th samples of block b+1 then overwrite. For this the layout
// alternates from block to block: rows hold sequences in one block and
// samples in the next.
// Timing: the group of block b leaves during the first NSEQ input cycles of
// block b+1, registered (one cycle later). Like every delay-feedback stage,
// Module 1 moves only with input, so a following frame flushes the last
// block; with fewer than four sequences the output idles 4 - NSEQ cycles
// in four. The 16-word size and the regrouping follow the document; the
// alternating in-place transpose is this design's way of building it
// (the document describes skewing delays and a switch).
module data_reorder
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

  cplx_t      mem [LANES][LANES];  // 16 words
  logic       tr;                  // layout of the block being written
  logic       primed;              // a complete block is stored
  logic [1:0] wcnt;                // sample within the block
  logic       rd_en;

  assign rd_en = in_valid && primed && ({1'b0, wcnt} < nseq);

  always_ff @(posedge clk) begin
    if (rd_en) begin
      // previous block has the other layout
      for (int j = 0; j < LANES; j++)
        out_data[j] <= tr ? mem[wcnt][j] : mem[j][wcnt];
    end
    if (in_valid) begin
      for (int p = 0; p < LANES; p++) begin
        if (tr) mem[wcnt][p] <= in_data[p];   // row = sample
        else    mem[p][wcnt] <= in_data[p];   // row = sequence
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tr        <= 1'b0;
      primed    <= 1'b0;
      wcnt      <= '0;
      out_valid <= 1'b0;
    end else if (clear) begin
      tr        <= 1'b0;
      primed    <= 1'b0;
      wcnt      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= rd_en;
      if (in_valid) begin
        wcnt <= wcnt + 1'b1;
        if (wcnt == 2'd3) begin
          tr     <= ~tr;
          primed <= 1'b1;
        end
      end
    end
  end

endmodule
