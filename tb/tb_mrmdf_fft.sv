// tb_mrmdf_fft: end-to-end test of the MRMDF FFT/IFFT processor at its
// default sizes.
//
// Runs a list of configurations (128/64 points, 1-4 sequences, FFT and
// IFFT). For each one the processor is cleared, fed two frames of random
// samples back to back plus one frame of zeros that pushes the results out,
// and every result is compared with a double-precision DFT (or inverse DFT
// with its 1/N) computed here. It also checks that each configuration uses
// the mechanisms it should (Module 2 bypass, idle cycles of the regrouping
// for fewer than four sequences, input stalls) and that, with continuous
// input, consecutive frames of results are exactly N cycles apart.
module tb_mrmdf_fft;
  import fft_pkg::*;

  localparam int NFRAMES = 2;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 clear = 1'b0;
  logic [2:0]           nseq = 3'd4;
  logic                 mode128 = 1'b1;
  logic                 inverse = 1'b0;
  logic                 in_valid = 1'b0;
  logic signed [IW-1:0] in_re [LANES];
  logic signed [IW-1:0] in_im [LANES];
  logic                 out_valid;
  logic [1:0]           out_seq;
  logic [4:0]           out_grp;
  logic [6:0]           out_bin [LANES];
  logic signed [DW-1:0] out_re  [LANES];
  logic signed [DW-1:0] out_im  [LANES];

  mrmdf_fft dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_mode128 = 0, n_bypass = 0, n_inverse = 0, n_forward = 0;
  int n_idle_groups = 0, n_stall = 0, n_clear = 0;
  int n_seq_cfg [1:4] = '{0, 0, 0, 0};

  // stimulus and results of one configuration
  int      xin_re [NFRAMES][MAX_SEQ][128];
  int      xin_im [NFRAMES][MAX_SEQ][128];
  int      yout_re[NFRAMES][MAX_SEQ][128];
  int      yout_im[NFRAMES][MAX_SEQ][128];
  bit      seen   [NFRAMES][MAX_SEQ][128];
  int      n_out;            // result cycles collected
  longint  first_out [NFRAMES];
  bit      collecting = 1'b0;
  bit      prev_out_valid = 1'b0;
  int      npt_cur = 128;
  int      ns_cur = 4;

  always @(posedge clk) begin
    if (collecting && out_valid) begin
      int per_frame, fr;
      per_frame = npt_cur / 4 * ns_cur;
      fr = n_out / per_frame;
      if (fr < NFRAMES) begin
        if (n_out % per_frame == 0) first_out[fr] = cycle;
        for (int j = 0; j < LANES; j++) begin
          yout_re[fr][out_seq][out_bin[j]] = out_re[j];
          yout_im[fr][out_seq][out_bin[j]] = out_im[j];
          seen[fr][out_seq][out_bin[j]] = 1'b1;
        end
      end
      n_out++;
    end
    // a gap inside a frame of results: the regrouping idles for fewer than four sequences
    if (collecting && !out_valid && prev_out_valid && n_out % (npt_cur / 4 * ns_cur) != 0)
      n_idle_groups++;
    prev_out_valid <= out_valid;
  end

  task automatic run_cfg(input bit m128, input int ns, input bit inv, input bit stalls);
    int npt;
    npt = m128 ? 128 : 64;
    // reconfigure and clear
    @(negedge clk);
    mode128 = m128; nseq = 3'(ns); inverse = inv; clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    n_clear++;
    npt_cur = npt; ns_cur = ns; n_out = 0;
    foreach (seen[f, s, k]) seen[f][s][k] = 1'b0;
    collecting = 1'b1;
    if (m128) n_mode128++; else n_bypass++;
    if (inv) n_inverse++; else n_forward++;
    n_seq_cfg[ns]++;
    // frames of random data, then one frame of zeros to flush
    for (int f = 0; f <= NFRAMES; f++) begin
      for (int n = 0; n < npt; n++) begin
        if (stalls && ($urandom % 4 == 0)) begin
          in_valid = 1'b0;
          n_stall++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        for (int p = 0; p < LANES; p++) begin
          int re, im;
          re = (f < NFRAMES) ? int'($urandom % 4095) - 2047 : 0;
          im = (f < NFRAMES) ? int'($urandom % 4095) - 2047 : 0;
          in_re[p] = IW'(re);
          in_im[p] = IW'(im);
          if (f < NFRAMES && p < MAX_SEQ) begin
            xin_re[f][p][n] = re;
            xin_im[f][p][n] = im;
          end
        end
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    collecting = 1'b0;
    // compare with the reference transform
    for (int f = 0; f < NFRAMES; f++) begin
      for (int s = 0; s < ns; s++) begin
        for (int k = 0; k < npt; k++) begin
          real ar, ai, ang, tol;
          ar = 0.0; ai = 0.0;
          for (int n = 0; n < npt; n++) begin
            ang = 2.0 * 3.14159265358979 * real'((n * k) % npt) / real'(npt);
            if (inv) ang = -ang;
            ar += real'(xin_re[f][s][n]) * $cos(ang) + real'(xin_im[f][s][n]) * $sin(ang);
            ai += real'(xin_im[f][s][n]) * $cos(ang) - real'(xin_re[f][s][n]) * $sin(ang);
          end
          if (inv) begin
            ar = ar / real'(npt);
            ai = ai / real'(npt);
            tol = 2.0;
          end else begin
            tol = 40.0;
          end
          checks++;
          if (!seen[f][s][k] ||
              (real'(yout_re[f][s][k]) - ar > tol) || (ar - real'(yout_re[f][s][k]) > tol) ||
              (real'(yout_im[f][s][k]) - ai > tol) || (ai - real'(yout_im[f][s][k]) > tol)) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH n=%0d ns=%0d inv=%0d frame %0d seq %0d bin %0d: got (%0d,%0d) want (%0.1f,%0.1f) seen=%0d",
                       npt, ns, inv, f, s, k, yout_re[f][s][k], yout_im[f][s][k], ar, ai, seen[f][s][k]);
          end
        end
      end
    end
    // throughput: with continuous input, results of consecutive frames are N cycles apart
    if (!stalls) begin
      checks++;
      if (first_out[1] - first_out[0] != longint'(npt)) begin
        failures++;
        $display("FRAME PERIOD n=%0d ns=%0d: %0d cycles, expected %0d", npt, ns,
                 first_out[1] - first_out[0], npt);
      end
    end
    $display("config n=%0d nseq=%0d inverse=%0d stalls=%0d done, failures so far %0d",
             npt, ns, inv, stalls, failures);
  endtask

  initial begin
    for (int p = 0; p < LANES; p++) begin in_re[p] = '0; in_im[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_cfg(1'b1, 4, 1'b0, 1'b0);
    run_cfg(1'b1, 1, 1'b0, 1'b0);
    run_cfg(1'b0, 4, 1'b0, 1'b0);
    run_cfg(1'b0, 2, 1'b1, 1'b0);
    run_cfg(1'b1, 3, 1'b1, 1'b1);
    run_cfg(1'b0, 3, 1'b0, 1'b1);
    // every mechanism must have been exercised
    checks += 7;
    if (n_mode128 == 0)     begin failures++; $display("128-point mode never ran"); end
    if (n_bypass == 0)      begin failures++; $display("64-point bypass never ran"); end
    if (n_inverse == 0)     begin failures++; $display("IFFT never ran"); end
    if (n_idle_groups == 0) begin failures++; $display("regrouping never idled"); end
    if (n_stall == 0)       begin failures++; $display("input never stalled"); end
    if (n_clear == 0)       begin failures++; $display("clear never used"); end
    if (n_seq_cfg[1] == 0 || n_seq_cfg[2] == 0 || n_seq_cfg[3] == 0 || n_seq_cfg[4] == 0) begin
      failures++; $display("not every sequence count ran");
    end
    $display("mechanisms: 128pt=%0d 64pt-bypass=%0d ifft=%0d fft=%0d idle-cycles=%0d stalls=%0d clears=%0d",
             n_mode128, n_bypass, n_inverse, n_forward, n_idle_groups, n_stall, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
