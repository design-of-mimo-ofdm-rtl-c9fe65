// tb_radix2_module: Module 2 in 128-point mode (sums, then differences times W128^q)
// and in 64-point mode (bypass, one register).
//
// Frames of random samples are sent in the group format of the data paths
// (group g, cycle s: path j carries sample 4g + j of sequence s), back to
// back and then followed by one frame of zeros, for 2 and 4 sequences and
// once with random idle input cycles. Each output position is compared with
// a reference computed here in double precision. With continuous input the
// first result must appear 16*NSEQ + 1 (128-point) or 1 (64-point) cycles after the first sample.
module tb_radix2_module;
  import fft_pkg::*;
  localparam int NPT = 128;
  localparam int NG  = NPT / 4;
  localparam int NF  = 3;

  logic       clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [2:0] nseq = 3'd4;
  logic       mode128 = 1'b1;
  logic       in_valid = 1'b0, out_valid;
  cplx_t      in_data [LANES];
  cplx_t      out_data [LANES];
  int checks = 0, failures = 0;

  radix2_module dut (.*);
  always #5 clk = ~clk;

  real    xr [NF][MAX_SEQ][NPT], xi [NF][MAX_SEQ][NPT];
  int     yr [NF][MAX_SEQ][NPT], yi [NF][MAX_SEQ][NPT];
  int     n_out, ns_cur;
  longint cycle = 0, first_in, first_out;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (in_valid && first_in < 0) first_in = cycle;
    if (out_valid) begin
      int f, g, s;
      if (first_out < 0) first_out = cycle;
      f = n_out / (NG * ns_cur);
      g = (n_out / ns_cur) % NG;
      s = n_out % ns_cur;
      if (f < NF)
        for (int j = 0; j < LANES; j++) begin
          yr[f][s][4 * g + j] = int'(out_data[j].re);
          yi[f][s][4 * g + j] = int'(out_data[j].im);
        end
      n_out++;
    end
  end

  function automatic int brev3(int v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  // reference value at output position n of one frame
  function automatic void reference(input int f, input int s, input int n,
                                    output real rr, output real ri);
    real ang, ar, ai;
    if (!mode128) begin
      rr = xr[f][s][n];
      ri = xi[f][s][n];
    end else begin
      if (n < 64) begin
        rr = xr[f][s][n] + xr[f][s][n + 64];
        ri = xi[f][s][n] + xi[f][s][n + 64];
      end else begin
        ar = xr[f][s][n - 64] - xr[f][s][n];
        ai = xi[f][s][n - 64] - xi[f][s][n];
        ang = 2.0 * 3.14159265358979 * (n - 64) / 128.0;
        rr = ar * $cos(ang) + ai * $sin(ang);
        ri = ai * $cos(ang) - ar * $sin(ang);
      end
    end
  endfunction

  task automatic run(input int ns, input bit gaps);
    @(negedge clk);
    nseq = 3'(ns); clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    n_out = 0; ns_cur = ns; first_in = -1; first_out = -1;
    foreach (xr[f, s, n]) begin
      xr[f][s][n] = real'(int'($urandom % (2 * 100000 + 1)) - 100000);
      xi[f][s][n] = real'(int'($urandom % (2 * 100000 + 1)) - 100000);
    end
    for (int f = 0; f <= NF; f++)
      for (int g = 0; g < NG; g++)
        for (int s = 0; s < ns; s++) begin
          if (gaps && $urandom % 3 == 0) begin in_valid = 1'b0; @(negedge clk); end
          in_valid = 1'b1;
          for (int j = 0; j < LANES; j++) begin
            in_data[j].re = (f < NF) ? sample_t'($rtoi(xr[f][s][4 * g + j])) : '0;
            in_data[j].im = (f < NF) ? sample_t'($rtoi(xi[f][s][4 * g + j])) : '0;
          end
          @(negedge clk);
        end
    in_valid = 1'b0;
    repeat (8) @(negedge clk);
    for (int f = 0; f < NF; f++)
      for (int s = 0; s < ns; s++)
        for (int n = 0; n < NPT; n++) begin
          real rr, ri;
          reference(f, s, n, rr, ri);
          checks++;
          if (real'(yr[f][s][n]) - rr > 12.0 || rr - real'(yr[f][s][n]) > 12.0 ||
              real'(yi[f][s][n]) - ri > 12.0 || ri - real'(yi[f][s][n]) > 12.0) begin
            failures++;
            if (failures < 10) $display("ns=%0d frame %0d seq %0d pos %0d: got (%0d,%0d) want (%0.1f,%0.1f)",
                                        ns, f, s, n, yr[f][s][n], yi[f][s][n], rr, ri);
          end
        end
    if (!gaps) begin
      checks++;
      if (first_out - first_in != longint'(mode128 ? 16 * ns + 1 : 1)) begin
        failures++;
        $display("ns=%0d: latency %0d cycles, expected %0d", ns, first_out - first_in, mode128 ? 16 * ns + 1 : 1);
      end
    end
  endtask

  initial begin
    foreach (in_data[j]) in_data[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(4, 1'b0);
    run(2, 1'b0);
    run(3, 1'b1);
    mode128 = 1'b0;
    run(4, 1'b0);
    run(1, 1'b1);
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
