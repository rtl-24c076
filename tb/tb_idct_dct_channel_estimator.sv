// tb_idct_dct_channel_estimator: runs the IDCT/DCT estimator at its default
// size (N = 1024 subcarriers, M = 32 pilots) on several OFDM symbols.
//
// For each symbol a multipath channel with non-integer path delays,
// H(k) = sum_l a_l exp(-j 2 pi k tau_l / N), is applied to random QPSK
// pilots, Y = H * P, rounded to Q1.15. The testbench computes its own
// reference in floating point from the same pilots: the LS estimate
// Y * conj(P) rounded to Q1.15, the input gain and rotation, the
// orthonormal M-point IDCT, zero padding, the orthonormal N-point DCT and
// the output gain and rotation, written out as separate steps with the
// orthonormal weights (not the hardware's combined constants). It checks:
//  - every output against that reference, within 3 LSB (the cosine words
//    are 16-bit, so the 32-term sums carry about one LSB of rounding);
//  - that out_k runs 0..N-1 in order and out_valid comes every M clocks;
//  - that the estimate passes through the pilot values at k = k'*D
//    (within 3 LSB of the LS estimate);
//  - the latency: done M*M + N*M + 1 clocks after the last pilot;
//  - the mean-square error against the true channel up to the last pilot,
//    which must stay below 1e-3 (printed; this is the interpolation
//    quality the estimator exists for).
`timescale 1ns/1ps
module tb_idct_dct_channel_estimator;
  import fft_pkg::*;
  localparam int N = 1024;
  localparam int M = 32;
  localparam int D = N / M;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, in_valid = 1'b0;
  logic in_ready, out_valid, busy, done;
  cplx_t in_y = '0, in_p = '0, out_h;
  logic [$clog2(N)-1:0] out_k;

  always #5 clk = ~clk;

  idct_dct_channel_estimator #(.N(N), .M(M)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // true channel, pilots, LS estimates and reference
  real h_re [N], h_im [N];
  real ls_re [M], ls_im [M];
  real ref_re [N], ref_im [N];
  cplx_t py [M], pp [M];

  function automatic real wgt(int m, int len);
    return (m == 0) ? $sqrt(1.0 / len) : $sqrt(2.0 / len);
  endfunction
  real hn_re [M], hn_im [M];

  task automatic make_symbol(int sym);
    real a [4], tau [4], ph0 [4];
    real dre, dim, g;
    for (int l = 0; l < 4; l++) begin
      a[l]   = 0.38 / (l + 1);
      tau[l] = real'(l) * (1.3 + 0.4 * sym) + 0.37 * sym;
      ph0[l] = 2.0 * PI * real'($urandom_range(999)) / 1000.0;
    end
    for (int k = 0; k < N; k++) begin
      h_re[k] = 0.0; h_im[k] = 0.0;
      for (int l = 0; l < 4; l++) begin
        real ang;
        ang = ph0[l] - 2.0 * PI * real'(k) * tau[l] / N;
        h_re[k] += a[l] * $cos(ang);
        h_im[k] += a[l] * $sin(ang);
      end
    end
    for (int kp = 0; kp < M; kp++) begin
      real yr, yi;
      pp[kp].re = $urandom_range(1) ? 16'sd23170 : -16'sd23170;
      pp[kp].im = $urandom_range(1) ? 16'sd23170 : -16'sd23170;
      yr = h_re[kp * D] * pp[kp].re - h_im[kp * D] * pp[kp].im;
      yi = h_re[kp * D] * pp[kp].im + h_im[kp * D] * pp[kp].re;
      py[kp].re = 16'($rtoi(yr + (yr >= 0 ? 0.5 : -0.5)));
      py[kp].im = 16'($rtoi(yi + (yi >= 0 ? 0.5 : -0.5)));
      // LS reference, rounded to Q1.15 like the hardware's output format
      dre = real'(py[kp].re) * pp[kp].re + real'(py[kp].im) * pp[kp].im;
      dim = real'(py[kp].im) * pp[kp].re - real'(py[kp].re) * pp[kp].im;
      ls_re[kp] = real'($rtoi($floor(dre / 32768.0 + 0.5))) / 32768.0;
      ls_im[kp] = real'($rtoi($floor(dim / 32768.0 + 0.5))) / 32768.0;
    end
    // input gain 1/sqrt(2) (at k' = 0) and rotation exp(+j pi k' / 2M),
    // then the M-point IDCT
    for (int n = 0; n < M; n++) begin
      hn_re[n] = 0.0; hn_im[n] = 0.0;
      for (int kp = 0; kp < M; kp++) begin
        real gr, gi, ga, ang;
        ang = PI * kp / (2.0 * M);
        ga  = (kp == 0) ? $sqrt(0.5) : 1.0;
        gr  = ga * (ls_re[kp] * $cos(ang) - ls_im[kp] * $sin(ang));
        gi  = ga * (ls_im[kp] * $cos(ang) + ls_re[kp] * $sin(ang));
        g   = wgt(kp, M) * $cos(PI * (2.0 * n + 1.0) * kp / (2.0 * M));
        hn_re[n] += gr * g;
        hn_im[n] += gi * g;
      end
    end
    // zero padding, N-point DCT, gain and rotation exp(-j pi k / 2N)
    for (int k = 0; k < N; k++) begin
      real sr, si, b, ang;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < M; n++) begin
        g = $cos(PI * (2.0 * n + 1.0) * k / (2.0 * N));
        sr += hn_re[n] * g;
        si += hn_im[n] * g;
      end
      b   = wgt(k, N) * ((k == 0) ? $sqrt(2.0 * N / M) : $sqrt(real'(N) / M));
      ang = -PI * k / (2.0 * N);
      ref_re[k] = b * (sr * $cos(ang) - si * $sin(ang));
      ref_im[k] = b * (si * $cos(ang) + sr * $sin(ang));
    end
  endtask

  task automatic run_symbol(int sym);
    int nout, t_last, t_done, last_out_t, gap_bad;
    real er, ei, mse;
    int  cnt_mse;
    real maxe;
    make_symbol(sym);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int kp = 0; kp < M; kp++) begin
      in_valid = 1'b1;
      in_y = py[kp];
      in_p = pp[kp];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    t_last = 0; t_done = -1; nout = 0; last_out_t = -1; gap_bad = 0;
    mse = 0.0; cnt_mse = 0; maxe = 0.0;
    while (t_done < 0 && t_last < 200000) begin
      @(posedge clk);
      #1;
      t_last++;
      if (out_valid) begin
        if (last_out_t >= 0 && t_last - last_out_t != M) gap_bad++;
        last_out_t = t_last;
        checks++;
        if (int'(out_k) != nout) begin
          failures++;
          if (failures < 6) $display("sym %0d: out_k %0d, expected %0d", sym, out_k, nout);
        end
        er = real'(out_h.re) - ref_re[nout] * 32768.0;
        ei = real'(out_h.im) - ref_im[nout] * 32768.0;
        if (er > maxe) maxe = er;
        if (-er > maxe) maxe = -er;
        if (ei > maxe) maxe = ei;
        if (-ei > maxe) maxe = -ei;
        checks++;
        if (er > 3.0 || er < -3.0 || ei > 3.0 || ei < -3.0) begin
          failures++;
          if (failures < 6) $display("sym %0d k=%0d: got (%0d,%0d) want (%f,%f)", sym, nout,
                                     out_h.re, out_h.im, ref_re[nout] * 32768.0, ref_im[nout] * 32768.0);
        end
        if (nout % D == 0) begin
          er = real'(out_h.re) - ls_re[nout / D] * 32768.0;
          ei = real'(out_h.im) - ls_im[nout / D] * 32768.0;
          checks++;
          if (er > 3.0 || er < -3.0 || ei > 3.0 || ei < -3.0) begin
            failures++;
            if (failures < 6) $display("sym %0d pilot %0d: got (%0d,%0d) LS (%f,%f)", sym, nout / D,
                                       out_h.re, out_h.im, ls_re[nout / D] * 32768.0, ls_im[nout / D] * 32768.0);
          end
        end
        if (nout <= (M - 1) * D) begin
          er = real'(out_h.re) / 32768.0 - h_re[nout];
          ei = real'(out_h.im) / 32768.0 - h_im[nout];
          mse += er * er + ei * ei;
          cnt_mse++;
        end
        nout++;
      end
      if (done) t_done = t_last;
    end
    checks++;
    if (nout != N || gap_bad != 0) begin
      failures++;
      $display("sym %0d: %0d outputs, %0d irregular gaps", sym, nout, gap_bad);
    end
    // t counts clocks after the edge that took the last pilot
    checks++;
    if (t_done != M * M + N * M + 1) begin
      failures++;
      $display("sym %0d: done after %0d clocks, expected %0d", sym, t_done, M * M + N * M + 1);
    end
    mse = mse / cnt_mse;
    checks++;
    if (mse > 1.0e-3) begin
      failures++;
      $display("sym %0d: MSE against the true channel %e", sym, mse);
    end
    $display("symbol %0d: %0d outputs, latency %0d clocks, max error %0.2f LSB, MSE up to the last pilot %e",
             sym, nout, t_done, maxe, mse);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++) run_symbol(s);
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (busy) begin
      failures++;
      $display("still busy after the last symbol");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
