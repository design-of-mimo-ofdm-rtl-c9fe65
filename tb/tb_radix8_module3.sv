// tb_radix8_module3: Module 3: 8-point DFT over the high index n1 of every
// 64-point block (n = 8*n1 + n2), in place order, times W64^(n2*k1).
//
// Frames of random samples are sent in the group format of the data paths
// (group g, cycle s: path j carries sample 4g + j of sequence s), back to
// back and then followed by one frame of zeros, for 2 and 4 sequences and
// once with random idle input cycles. Each output position is compared with
// a reference computed here in double precision. With continuous input the
// first result must appear 14*NSEQ + 3 cycles after the first sample.
module tb_radix8_module3;
  import fft_pkg::*;
  localparam int NPT = 64;
  localparam int NG  = NPT / 4;
  localparam int NF  = 3;

  logic       clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [2:0] nseq = 3'd4;
  logic       in_valid = 1'b0, out_valid;
  cplx_t      in_data [LANES];
  cplx_t      out_data [LANES];
  int checks = 0, failures = 0;

  radix8_module3 dut (.*);
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
    int p, n2, k1, base;
    p = (n % 64) / 8; n2 = n % 8; k1 = brev3(p); base = n - (n % 64);
    ar = 0.0; ai = 0.0;
    for (int n1 = 0; n1 < 8; n1++) begin
      ang = 2.0 * 3.14159265358979 * ((n1 * k1) % 8) / 8.0;
      ar += xr[f][s][base + 8 * n1 + n2] * $cos(ang) + xi[f][s][base + 8 * n1 + n2] * $sin(ang);
      ai += xi[f][s][base + 8 * n1 + n2] * $cos(ang) - xr[f][s][base + 8 * n1 + n2] * $sin(ang);
    end
    ang = 2.0 * 3.14159265358979 * (n2 * k1) / 64.0;
    rr = ar * $cos(ang) + ai * $sin(ang);
    ri = ai * $cos(ang) - ar * $sin(ang);
  endfunction

  task automatic run(input int ns, input bit gaps);
    @(negedge clk);
    nseq = 3'(ns); clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    n_out = 0; ns_cur = ns; first_in = -1; first_out = -1;
    foreach (xr[f, s, n]) begin
      xr[f][s][n] = real'(int'($urandom % (2 * 20000 + 1)) - 20000);
      xi[f][s][n] = real'(int'($urandom % (2 * 20000 + 1)) - 20000);
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
          if (real'(yr[f][s][n]) - rr > 16.0 || rr - real'(yr[f][s][n]) > 16.0 ||
              real'(yi[f][s][n]) - ri > 16.0 || ri - real'(yi[f][s][n]) > 16.0) begin
            failures++;
            if (failures < 10) $display("ns=%0d frame %0d seq %0d pos %0d: got (%0d,%0d) want (%0.1f,%0.1f)",
                                        ns, f, s, n, yr[f][s][n], yi[f][s][n], rr, ri);
          end
        end
    if (!gaps) begin
      checks++;
      if (first_out - first_in != longint'(14 * ns + 3)) begin
        failures++;
        $display("ns=%0d: latency %0d cycles, expected %0d", ns, first_out - first_in, 14 * ns + 3);
      end
    end
  endtask

  initial begin
    foreach (in_data[j]) in_data[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(4, 1'b0);
    run(2, 1'b0);
    run(1, 1'b0);
    run(3, 1'b1);
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
