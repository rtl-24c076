// tb_vl_fft_top: end-to-end test of the processor at its default size.
//
// FFT: for every length (64 .. 8192) random complex samples are streamed
// in, and each of the L results is compared with a direct DFT computed here
// in floating point, divided by L (the processor scales by 1/L). The test
// also checks the number of butterfly issue cycles, (L/4) per stage, and
// the stall cycles between stages, and counts how often each mechanism
// occurred: radix-2 stages, pipeline stalls, both commutator columns, all
// four bank offsets, every length. CORDIC: rotations of a vector over a
// sweep of angles in [-pi/4, pi/4] and by a zero angle are compared with
// cos/sin; the test counts zero-angle bypasses (no iteration), rotations at
// the published worst case of 4 iterations and rotations that needed the
// scale stage, and fails if any of these never happened. Channel
// estimators: one full symbol (1024 subcarriers, 32 QPSK pilots) through
// a flat channel, fed to both; all 1024 values of the DCT/EIDCT estimator
// must equal the channel, the IDCT/DCT estimator must equal it at the
// pilots and must fall off above the last pilot.
`timescale 1ns/1ps
module tb_vl_fft_top;
  import fft_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              fft_start = 1'b0, fft_in_valid = 1'b0;
  fft_mode_e         fft_mode = MODE_64;
  cplx_t             fft_in_data = '0;
  logic              fft_in_ready, fft_out_valid, fft_busy, fft_done;
  logic              fft_issue, fft_radix2, fft_stall;
  cplx_t             fft_out_data;
  logic [ADDR_W-1:0] fft_out_k;
  logic              cor_start = 1'b0;
  logic signed [11:0] cor_x_in = '0, cor_y_in = '0;
  logic signed [12:0] cor_theta = '0;
  logic              cor_busy, cor_valid;
  logic signed [11:0] cor_x_out, cor_y_out;
  logic [3:0]        cor_iters, cor_sc_iters;
  logic              ce_start = 1'b0, ce_in_valid = 1'b0;
  cplx_t             ce_in_y = '0, ce_in_p = '0;
  logic              ce_in_ready, ce_out_valid, ce_busy, ce_done;
  cplx_t             ce_out_h;
  logic [9:0]        ce_out_k;
  logic              ce2_start, ce2_in_valid;
  cplx_t             ce2_in_y, ce2_in_p;
  logic              ce2_in_ready, ce2_out_valid, ce2_busy, ce2_done;
  cplx_t             ce2_out_h;
  logic [9:0]        ce2_out_k;
  // both estimators get the same pilots
  assign ce2_start    = ce_start;
  assign ce2_in_valid = ce_in_valid;
  assign ce2_in_y     = ce_in_y;
  assign ce2_in_p     = ce_in_p;

  vl_fft_top dut (.*);

  int checks = 0, failures = 0;

  // mechanism counters
  int n_radix2 = 0, n_stall = 0, n_straddle = 0, n_aligned = 0;
  int n_bank [4] = '{0, 0, 0, 0};
  int n_cor_bypass = 0, n_cor_worst = 0, n_cor_scale = 0;
  int n_ce_out = 0, n_ce2_out = 0, n_ce2_falloff = 0;
  int n_issue = 0;
  always @(posedge clk) begin
    if (fft_issue) begin
      n_issue++;
      if (fft_radix2) n_radix2++;
      if (dut.u_fft.straddle0) n_straddle++; else n_aligned++;
      n_bank[dut.u_fft.m0]++;
    end
    if (fft_stall) n_stall++;
  end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real    xr [NMAX], xi [NMAX];
  real    cs [NMAX], sn [NMAX];
  cplx_t  got [NMAX];
  bit     seen [NMAX];

  function automatic int lg2(fft_mode_e m);
    return int'(mode_log2(m));
  endfunction

  task automatic run_fft(fft_mode_e m);
    int L, stages, issue0, stall0, nout, bad;
    real maxerr, er, ei, tol;
    L = 1 << lg2(m);
    stages = (lg2(m) + 1) / 2;
    for (int i = 0; i < L; i++) begin
      cs[i] = $cos(2.0 * 3.14159265358979 * i / L);
      sn[i] = $sin(2.0 * 3.14159265358979 * i / L);
    end
    @(negedge clk);
    fft_mode  = m;
    fft_start = 1'b1;
    @(negedge clk);
    fft_start = 1'b0;
    for (int i = 0; i < L; i++) begin
      logic signed [DW-1:0] r, q;
      r = DW'($signed($urandom_range(32767)) - 16384);
      q = DW'($signed($urandom_range(32767)) - 16384);
      xr[i] = real'(r) / 32768.0;
      xi[i] = real'(q) / 32768.0;
      fft_in_valid = 1'b1;
      fft_in_data  = '{re: r, im: q};
      // an idle cycle now and then exercises in_valid gaps
      if (i % 97 == 5) begin
        fft_in_valid = 1'b0;
        @(negedge clk);
        fft_in_valid = 1'b1;
      end
      @(negedge clk);
      while (!fft_in_ready && i < L - 1) @(negedge clk);
    end
    fft_in_valid = 1'b0;
    issue0 = n_issue;
    stall0 = n_stall;
    for (int k = 0; k < L; k++) seen[k] = 1'b0;
    nout = 0;
    while (!fft_done) begin
      @(posedge clk);
      #1;
      if (fft_out_valid) begin
        got[fft_out_k] = fft_out_data;
        seen[fft_out_k] = 1'b1;
        nout++;
      end
    end
    // cycle counts: L/4 butterflies per stage, DRAIN of 3 clocks per stage
    checks++;
    if (n_issue - issue0 != stages * L / 4) begin
      failures++;
      $display("L=%0d: %0d butterfly issues, expected %0d", L, n_issue - issue0, stages * L / 4);
    end
    checks++;
    if (n_stall - stall0 != 3 * (stages - 1)) begin
      failures++;
      $display("L=%0d: %0d stall cycles, expected %0d", L, n_stall - stall0, 3 * (stages - 1));
    end
    checks++;
    if (nout != L) begin
      failures++;
      $display("L=%0d: %0d outputs", L, nout);
    end
    // reference DFT / L
    maxerr = 0.0;
    bad = 0;
    // rounding of 2 half-adds per radix-2^2 stage and of the twiddle words
    tol = (4.0 + 1.5 * stages) / 32768.0;
    for (int k = 0; k < L; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int i = 0; i < L; i++) begin
        int idx;
        idx = (i * k) % L;
        sr += xr[i] * cs[idx] + xi[i] * sn[idx];
        si += xi[i] * cs[idx] - xr[i] * sn[idx];
      end
      sr /= L; si /= L;
      er = real'(got[k].re) / 32768.0 - sr;
      ei = real'(got[k].im) / 32768.0 - si;
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > maxerr) maxerr = er;
      if (ei > maxerr) maxerr = ei;
      checks++;
      if (!seen[k] || er > tol || ei > tol) begin
        failures++;
        bad++;
        if (bad < 5) $display("L=%0d k=%0d got (%0d,%0d) want (%f,%f)", L, k,
                              got[k].re, got[k].im, sr * 32768.0, si * 32768.0);
      end
    end
    $display("L=%0d done: max error %0.2f LSB (tolerance %0.1f)", L, maxerr * 32768.0, tol * 32768.0);
  endtask

  task automatic run_cordic();
    int maxit, sumit, cnt;
    real maxe;
    maxit = 0; sumit = 0; cnt = 0; maxe = 0.0;
    for (int th = -1603; th <= 1608; th += 7) begin
      real ex, ey, a;
      @(negedge clk);
      cor_x_in  = 12'sd512;            // 0.5 in Q2.10
      cor_y_in  = 12'sd0;
      cor_theta = 13'(th);
      cor_start = 1'b1;
      @(negedge clk);
      cor_start = 1'b0;
      while (!cor_valid) @(negedge clk);
      a  = real'(th) / 2048.0;
      ex = real'(cor_x_out) / 1024.0 - 0.5 * $cos(a);
      ey = real'(cor_y_out) / 1024.0 - 0.5 * $sin(a);
      if (ex < 0) ex = -ex;
      if (ey < 0) ey = -ey;
      if (ex > maxe) maxe = ex;
      if (ey > maxe) maxe = ey;
      checks++;
      if (ex > 1.5 / 1024.0 || ey > 1.5 / 1024.0) begin
        failures++;
        $display("CORDIC th=%0d got (%0d,%0d)", th, cor_x_out, cor_y_out);
      end
      if (cor_iters == 4'd0) n_cor_bypass++;
      if (cor_iters == 4'd4) n_cor_worst++;
      if (cor_sc_iters != 4'd0) n_cor_scale++;
      if (int'(cor_iters) > maxit) maxit = int'(cor_iters);
      sumit += int'(cor_iters);
      cnt++;
    end
    // worst case of the angle decomposition at 12 bits is 4 iterations
    checks++;
    if (maxit > 4) begin
      failures++;
      $display("CORDIC worst case %0d iterations", maxit);
    end
    $display("CORDIC: %0d angles, max error %0.2f LSB, iterations avg %0.3f max %0d",
             cnt, maxe * 1024.0, real'(sumit) / cnt, maxit);
  endtask

  // Channel estimators: one symbol through a flat channel H = 0.5 - 0.25j
  // with QPSK pilots, fed to both at once. Every one of the DCT/EIDCT
  // estimator's 1024 outputs must equal H. The IDCT/DCT estimator must
  // equal H at the 32 pilot subcarriers and fall off above the last pilot
  // (its documented behaviour: at k = 1023 it must be below half of |H|).
  task automatic run_estimator();
    int bad, bad2;
    bad = 0; bad2 = 0;
    @(negedge clk);
    ce_start = 1'b1;
    @(negedge clk);
    ce_start = 1'b0;
    for (int kp = 0; kp < 32; kp++) begin
      int pr, pi;
      pr = $urandom_range(1) ? 23170 : -23170;
      pi = $urandom_range(1) ? 23170 : -23170;
      ce_in_valid = 1'b1;
      ce_in_p.re  = 16'(pr);
      ce_in_p.im  = 16'(pi);
      // Y = H * P with H = (0.5, -0.25)
      ce_in_y.re  = 16'($rtoi(0.5 * pr + 0.25 * pi));
      ce_in_y.im  = 16'($rtoi(0.5 * pi - 0.25 * pr));
      @(posedge clk);
      while (!ce_in_ready) @(posedge clk);
      @(negedge clk);
    end
    ce_in_valid = 1'b0;
    while (!ce_done || !ce2_done) begin
      @(posedge clk);
      #1;
      if (ce2_out_valid) begin
        n_ce2_out++;
        checks++;
        if (int'(ce2_out_k) != n_ce2_out - 1) begin
          failures++;
          bad2++;
        end
        if (ce2_out_k % 32 == 0) begin
          checks++;
          if (ce2_out_h.re > 16384 + 3 || ce2_out_h.re < 16384 - 3 ||
              ce2_out_h.im > -8192 + 3 || ce2_out_h.im < -8192 - 3) begin
            failures++;
            bad2++;
            if (bad2 < 4) $display("IDCT/DCT estimator k=%0d: got (%0d,%0d)", ce2_out_k, ce2_out_h.re, ce2_out_h.im);
          end
        end
        if (ce2_out_k == 10'd1023) begin
          real mag;
          mag = $sqrt(real'(ce2_out_h.re) ** 2 + real'(ce2_out_h.im) ** 2);
          if (mag < 0.5 * $sqrt(16384.0 ** 2 + 8192.0 ** 2)) n_ce2_falloff++;
        end
      end
      if (ce_out_valid) begin
        n_ce_out++;
        checks++;
        if (ce_out_h.re > 16384 + 3 || ce_out_h.re < 16384 - 3 ||
            ce_out_h.im > -8192 + 3 || ce_out_h.im < -8192 - 3 || int'(ce_out_k) != n_ce_out - 1) begin
          failures++;
          bad++;
          if (bad < 4) $display("estimator k=%0d: got (%0d,%0d)", ce_out_k, ce_out_h.re, ce_out_h.im);
        end
      end
    end
    $display("channel estimator: %0d outputs, %0d wrong", n_ce_out, bad);
    $display("IDCT/DCT channel estimator: %0d outputs, %0d wrong, fall-off above the last pilot %0d",
             n_ce2_out, bad2, n_ce2_falloff);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_estimator();
    run_cordic();
    run_fft(MODE_64);
    run_fft(MODE_256);
    run_fft(MODE_512);
    run_fft(MODE_1024);
    run_fft(MODE_2048);
    run_fft(MODE_4096);
    run_fft(MODE_8192);
    // every mechanism must have happened
    checks++;
    if (n_radix2 == 0 || n_stall == 0 || n_straddle == 0 || n_aligned == 0) begin
      failures++;
      $display("mechanism missing: radix2=%0d stall=%0d straddle=%0d aligned=%0d",
               n_radix2, n_stall, n_straddle, n_aligned);
    end
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (n_bank[b] == 0) begin
        failures++;
        $display("bank offset %0d never used", b);
      end
    end
    checks++;
    if (n_cor_bypass == 0 || n_cor_worst == 0 || n_cor_scale == 0) begin
      failures++;
      $display("CORDIC mechanism missing: bypass=%0d worst=%0d scale=%0d",
               n_cor_bypass, n_cor_worst, n_cor_scale);
    end
    checks++;
    if (n_ce_out != 1024) begin
      failures++;
      $display("channel estimator gave %0d outputs, expected 1024", n_ce_out);
    end
    checks++;
    if (n_ce2_out != 1024 || n_ce2_falloff == 0) begin
      failures++;
      $display("IDCT/DCT estimator: %0d outputs (expected 1024), fall-off seen %0d times",
               n_ce2_out, n_ce2_falloff);
    end
    $display("CORDIC mechanisms: zero-angle bypass=%0d 4-iteration=%0d scale stage=%0d",
             n_cor_bypass, n_cor_worst, n_cor_scale);
    $display("mechanisms: radix-2 issues=%0d stall cycles=%0d straddled=%0d aligned=%0d banks=%0d/%0d/%0d/%0d",
             n_radix2, n_stall, n_straddle, n_aligned, n_bank[0], n_bank[1], n_bank[2], n_bank[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
