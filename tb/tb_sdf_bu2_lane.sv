// tb_sdf_bu2_lane: one delay-feedback butterfly lane with a distance of
// G = 3 groups, run with 1, 3 and 4 sequences. For each setting four blocks
// of 2L random samples (L = G * sequences) are sent, one sample per cycle
// with random idle cycles, then a block of zeros. Expected output stream:
// for every block, x[e] + x[e+L] for e < L, then x[e] - x[e+L]; the first
// valid output must come with the (L+1)-th valid input.
module tb_sdf_bu2_lane;
  import fft_pkg::*;
  localparam int G = 3;
  localparam int NB = 4;

  logic       clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [2:0] nseq = 3'd1;
  logic       in_valid = 1'b0, out_valid;
  cplx_t      in_data, out_data;
  int checks = 0, failures = 0;

  sdf_bu2_lane #(.G(G)) dut (.*);
  always #5 clk = ~clk;

  cplx_t exp_q [$];
  int    n_in, first_valid_at;

  always @(posedge clk) begin
    if (in_valid) n_in++;
    if (out_valid) begin
      cplx_t e;
      if (first_valid_at < 0) first_valid_at = n_in;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = exp_q.pop_front();
        if (out_data != e) begin
          failures++;
          if (failures < 10) $display("got (%0d,%0d) want (%0d,%0d)", out_data.re, out_data.im, e.re, e.im);
        end
      end
    end
  end

  task automatic run(input int ns);
    int L;
    cplx_t x [];
    L = G * ns;
    @(negedge clk);
    nseq = 3'(ns); clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    exp_q.delete();
    n_in = 0; first_valid_at = -1;
    for (int b = 0; b <= NB; b++) begin
      x = new[2 * L];
      foreach (x[i]) begin
        x[i].re = (b < NB) ? sample_t'(int'($urandom % 20000) - 10000) : '0;
        x[i].im = (b < NB) ? sample_t'(int'($urandom % 20000) - 10000) : '0;
      end
      if (b < NB) begin
        for (int e = 0; e < L; e++) exp_q.push_back(cadd(x[e], x[e + L]));
        for (int e = 0; e < L; e++) exp_q.push_back(csub(x[e], x[e + L]));
      end else begin
        for (int e = 0; e < L; e++) exp_q.push_back(cplx_t'(0));   // sums of the zero block
      end
      for (int i = 0; i < 2 * L; i++) begin
        if ($urandom % 3 == 0) begin in_valid = 1'b0; @(negedge clk); end
        in_valid = 1'b1;
        in_data = x[i];
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (first_valid_at != L + 1) begin
      failures++;
      $display("nseq=%0d: first output with input %0d, expected %0d", ns, first_valid_at, L + 1);
    end
    // every expected output has appeared
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("nseq=%0d: %0d outputs missing", ns, exp_q.size());
    end
  endtask

  initial begin
    in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1);
    run(3);
    run(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
