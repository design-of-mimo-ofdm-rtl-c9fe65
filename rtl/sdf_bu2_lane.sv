// sdf_bu2_lane: radix-2 butterfly unit (BU_2) with a delay-feedback memory
// on one data path, the building block of Modules 2, 3 and 4.
//
// The lane carries NSEQ interleaved sequences; a "group" is NSEQ consecutive
// valid samples (one per sequence). The butterfly pairs each sample with the
// one G groups later, so the feedback memory holds L = G*NSEQ samples. Valid
// samples cycle through blocks of 2L:
//   first half : the input is written into the memory, and the memory's old
//                content (the differences of the previous block) is output;
//   second half: output = memory + input (the sum), and memory - input (the
//                difference) is written back.
// The output stream is therefore the decimation-in-frequency result of the
// block in place order (sums first, then differences), delayed by L valid
// samples. Nothing is produced during the first half of the very first
// block; the pipeline moves only on valid samples, so the last block's
// differences leave when the next block comes in.
// out_valid/out_data are combinational from the inputs and the memory; the
// memory is an array read and written at the same address each valid cycle.
// `clear` (synchronous) restarts the block counting, as required after a
// change of NSEQ. The delay-feedback scheme follows the document; the
// counter, the handshake and `clear` are this design's own.
module sdf_bu2_lane
  import fft_pkg::*;
#(
  parameter int unsigned G = 8   // butterfly distance in groups
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [2:0] nseq,       // 1..4 simultaneous sequences
  input  logic       in_valid,
  input  cplx_t      in_data,
  output logic       out_valid,
  output cplx_t      out_data
);

  localparam int unsigned DEPTH = G * MAX_SEQ;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  cplx_t          mem [DEPTH];
  logic [AW-1:0]  ptr;
  logic [AW:0]    len;       // L = G * nseq
  logic           phase;     // 0: fill half, 1: butterfly half
  logic           primed;    // a first block's butterfly half has begun
  cplx_t          rd;

  assign len = (AW + 1)'(G * nseq);
  assign rd  = mem[ptr];

  always_comb begin
    out_valid = in_valid && (phase || primed);
    out_data  = phase ? cadd(rd, in_data) : rd;
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[ptr] <= phase ? csub(rd, in_data) : in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      phase  <= 1'b0;
      primed <= 1'b0;
    end else if (clear) begin
      ptr    <= '0;
      phase  <= 1'b0;
      primed <= 1'b0;
    end else if (in_valid) begin
      if ({1'b0, ptr} == len - 1'b1) begin
        ptr   <= '0;
        phase <= ~phase;
        if (!phase) primed <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

endmodule
