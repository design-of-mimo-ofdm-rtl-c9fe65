// sdf_stage: four sdf_bu2_lane butterflies, one per data path, sharing one
// output position counter.
//
// All four paths see the same valid pattern, so one counter of output
// samples tells where in the transform block the current outputs are: the
// sequence number `seq` (0..NSEQ-1) and the group number `grp`
// (0..NG-1, one group = NSEQ valid cycles). Data path j of group g holds the
// sample with index 4*g + j of its sequence. The parent module uses grp
// to choose twiddle factors. Outputs are combinational, like the lanes'.
module sdf_stage
  import fft_pkg::*;
#(
  parameter int unsigned G  = 8,   // butterfly distance in groups
  parameter int unsigned NG = 16   // groups counted by grp before it wraps
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic [2:0]            nseq,
  input  logic                  in_valid,
  input  cplx_t                 in_data [LANES],
  output logic                  out_valid,
  output cplx_t                 out_data [LANES],
  output logic [$clog2(NG)-1:0] grp
);

  logic [LANES-1:0] lane_valid;
  logic [1:0]       seq;

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    sdf_bu2_lane #(.G(G)) u_lane (
      .clk, .rst_n, .clear, .nseq,
      .in_valid,
      .in_data  (in_data[j]),
      .out_valid(lane_valid[j]),
      .out_data (out_data[j])
    );
  end

  assign out_valid = &lane_valid;   // identical in all paths

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq <= '0;
      grp <= '0;
    end else if (clear) begin
      seq <= '0;
      grp <= '0;
    end else if (out_valid) begin
      if ({1'b0, seq} == nseq - 1'b1) begin
        seq <= '0;
        grp <= grp + 1'b1;   // NG is a power of two: wraps by itself
      end else begin
        seq <= seq + 1'b1;
      end
    end
  end

endmodule
