// tb_data_reorder: feeds 1-4 sequences (one per path, one sample per cycle,
// continuous and with random idle cycles), twelve random 4-sample blocks and
// one block of zeros to flush, and checks that each block comes out as one
// group of NSEQ cycles, cycle s carrying samples 4b..4b+3 of sequence s on
// paths 0..3. With continuous input the first group must be on the outputs
// five cycles after the first sample (one block plus a register), and
// exactly 12 * NSEQ output cycles must appear.
module tb_data_reorder;
  import fft_pkg::*;
  localparam int NB = 12;
  logic       clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [2:0] nseq = 3'd4;
  logic       in_valid = 1'b0, out_valid;
  cplx_t      in_data [LANES];
  cplx_t      out_data [LANES];
  int checks = 0, failures = 0;

  data_reorder dut (.*);
  always #5 clk = ~clk;

  cplx_t  exp_q [$];       // expected output groups, flattened by path
  longint cycle = 0, first_in, first_out;
  int     n_out_cycles;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (in_valid && first_in < 0) first_in = cycle;
    if (out_valid) begin
      if (first_out < 0) first_out = cycle;
      n_out_cycles++;
      for (int j = 0; j < LANES; j++) begin
        cplx_t e;
        checks++;
        e = (exp_q.size() > 0) ? exp_q.pop_front() : cplx_t'('1);
        if (out_data[j] != e) begin
          failures++;
          if (failures < 10) $display("path %0d got (%0d,%0d) want (%0d,%0d)", j,
                                      out_data[j].re, out_data[j].im, e.re, e.im);
        end
      end
    end
  end

  task automatic run(input int ns, input bit gaps);
    cplx_t x [MAX_SEQ][4];
    @(negedge clk);
    nseq = 3'(ns); clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    first_in = -1; first_out = -1; n_out_cycles = 0;
    for (int b = 0; b <= NB; b++) begin
      foreach (x[p, t]) begin
        x[p][t].re = (b < NB) ? sample_t'($urandom) : '0;
        x[p][t].im = (b < NB) ? sample_t'($urandom) : '0;
      end
      if (b < NB)
        for (int s = 0; s < ns; s++)
          for (int j = 0; j < LANES; j++) exp_q.push_back(x[s][j]);
      for (int t = 0; t < 4; t++) begin
        if (gaps && $urandom % 3 == 0) begin in_valid = 1'b0; @(negedge clk); end
        in_valid = 1'b1;
        for (int p = 0; p < LANES; p++) in_data[p] = x[p][t];
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_out_cycles != NB * ns) begin
      failures++;
      $display("nseq=%0d: %0d output cycles, expected %0d", ns, n_out_cycles, NB * ns);
    end
    if (!gaps) begin
      checks++;
      if (first_out - first_in != 5) begin
        failures++;
        $display("nseq=%0d: first group after %0d cycles, expected 5", ns, first_out - first_in);
      end
    end
    exp_q.delete();
  endtask

  initial begin
    foreach (in_data[p]) in_data[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int ns = 1; ns <= 4; ns++) begin
      run(ns, 1'b0);
      run(ns, 1'b1);
    end
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
