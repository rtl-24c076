// tb_chest_vehicular_a: runs both DCT-based channel estimators side by side
// on noisy pilots from a Rayleigh-faded multipath channel with the ETSI
// "Vehicular A" power delay profile, at the default size (N = 1024
// subcarriers, M = 32 pilots, sample period 0.2 us).
//
// Vehicular A: six paths at 0, 0.31, 0.71, 1.09, 1.73 and 2.51 us (0, 1.55,
// 3.55, 5.45, 8.65 and 12.55 samples, none on the sample grid) with
// average powers 0, -1, -9, -10, -15 and -20 dB. Each symbol draws new
// complex Gaussian path gains (the channel is taken as constant within a
// symbol), scaled to a mean channel power of 0.09 so that Q1.15 does not
// saturate. The QPSK pilots get complex white Gaussian noise at a pilot
// SNR of 10, 20, 30 and 40 dB, a few symbols each; both estimators are
// fed the same pilots at the same time.
//
// Measured: the mean-square error of each estimate against the true
// channel over the subcarriers up to the last pilot (those above it are
// a guard band in this use), normalised by the channel power. Checks:
//  - at 10, 20 and 30 dB each estimator's normalised MSE is below 2/SNR
//    (the interpolation does not amplify the pilot noise);
//  - each estimator's MSE falls from one SNR to the next;
//  - the IDCT/DCT estimator stays within a factor 4 of the DCT/EIDCT
//    estimator at 10 to 30 dB (the two perform alike);
//  - every symbol gives N outputs from each estimator, one done pulse
//    each, and both are idle afterwards.
// At 40 dB the error is dominated by the interpolation itself, because the
// path delays fall between samples; that floor is printed, not checked.
`timescale 1ns/1ps
module tb_chest_vehicular_a;
  import fft_pkg::*;
  localparam int N = 1024;
  localparam int M = 32;
  localparam int D = N / M;
  localparam int NSYM = 4;
  localparam real PI = 3.14159265358979323846;
  localparam real CH_POW = 0.09;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, in_valid = 1'b0;
  cplx_t in_y = '0, in_p = '0;
  logic in_ready1, out_valid1, busy1, done1;
  logic in_ready2, out_valid2, busy2, done2;
  cplx_t out_h1, out_h2;
  logic [$clog2(N)-1:0] out_k1, out_k2;

  always #5 clk = ~clk;

  dct_channel_estimator #(.N(N), .M(M)) u_est1 (
    .clk, .rst_n, .start, .in_valid, .in_ready(in_ready1), .in_y, .in_p,
    .out_valid(out_valid1), .out_h(out_h1), .out_k(out_k1), .busy(busy1), .done(done1)
  );

  idct_dct_channel_estimator #(.N(N), .M(M)) u_est2 (
    .clk, .rst_n, .start, .in_valid, .in_ready(in_ready2), .in_y, .in_p,
    .out_valid(out_valid2), .out_h(out_h2), .out_k(out_k2), .busy(busy2), .done(done2)
  );

  int checks = 0, failures = 0;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // standard normal sample (Box-Muller)
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(999999)) + 1.0) / 1000001.0;
    u2 = real'($urandom_range(999999)) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  real tau [6] = '{0.0, 1.55, 3.55, 5.45, 8.65, 12.55};
  real pdb [6] = '{0.0, -1.0, -9.0, -10.0, -15.0, -20.0};
  real h_re [N], h_im [N];

  task automatic make_channel();
    real ptot, a_re [6], a_im [6], s;
    ptot = 0.0;
    for (int l = 0; l < 6; l++) ptot += 10.0 ** (pdb[l] / 10.0);
    for (int l = 0; l < 6; l++) begin
      s = $sqrt(CH_POW * (10.0 ** (pdb[l] / 10.0)) / ptot / 2.0);
      a_re[l] = s * gauss();
      a_im[l] = s * gauss();
    end
    for (int k = 0; k < N; k++) begin
      h_re[k] = 0.0; h_im[k] = 0.0;
      for (int l = 0; l < 6; l++) begin
        real c, sn;
        c  = $cos(2.0 * PI * k * tau[l] / N);
        sn = -$sin(2.0 * PI * k * tau[l] / N);
        h_re[k] += a_re[l] * c - a_im[l] * sn;
        h_im[k] += a_re[l] * sn + a_im[l] * c;
      end
    end
  endtask

  function automatic logic signed [15:0] q15(real v);
    real r;
    r = v * 32768.0;
    r = r + (r >= 0.0 ? 0.5 : -0.5);
    if (r > 32767.0) r = 32767.0;
    if (r < -32768.0) r = -32768.0;
    return 16'($rtoi(r));
  endfunction

  // one symbol at the given SNR; adds the squared errors of both estimators
  task automatic run_symbol(real snr_db, inout real se1, inout real se2, inout int cnt);
    real sigma, pr, pi, yr, yi;
    int  n1, n2, d1, d2;
    make_channel();
    sigma = $sqrt(CH_POW / (10.0 ** (snr_db / 10.0)) / 2.0);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int kp = 0; kp < M; kp++) begin
      // unit-magnitude QPSK pilot, received value H * P + noise
      pr = $urandom_range(1) == 1 ? 0.70710678 : -0.70710678;
      pi = $urandom_range(1) == 1 ? 0.70710678 : -0.70710678;
      yr = h_re[kp * D] * pr - h_im[kp * D] * pi + sigma * gauss();
      yi = h_re[kp * D] * pi + h_im[kp * D] * pr + sigma * gauss();
      in_valid = 1'b1;
      in_p.re = q15(pr); in_p.im = q15(pi);
      in_y.re = q15(yr); in_y.im = q15(yi);
      @(posedge clk);
      while (!(in_ready1 && in_ready2)) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    n1 = 0; n2 = 0; d1 = 0; d2 = 0;
    while (n1 < N || n2 < N) begin
      @(posedge clk);
      #1;
      if (done1) d1++;
      if (done2) d2++;
      if (out_valid1) begin
        if (int'(out_k1) <= (M - 1) * D) begin
          se1 += (real'(out_h1.re) / 32768.0 - h_re[out_k1]) ** 2 +
                 (real'(out_h1.im) / 32768.0 - h_im[out_k1]) ** 2;
          cnt++;
        end
        n1++;
      end
      if (out_valid2) begin
        if (int'(out_k2) <= (M - 1) * D)
          se2 += (real'(out_h2.re) / 32768.0 - h_re[out_k2]) ** 2 +
                 (real'(out_h2.im) / 32768.0 - h_im[out_k2]) ** 2;
        n2++;
      end
    end
    checks++;
    if (n1 != N || n2 != N) begin
      failures++;
      $display("symbol gave %0d and %0d outputs, expected %0d", n1, n2, N);
    end
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (d1 != 1 || d2 != 1 || busy1 || busy2) begin
      failures++;
      $display("done pulses %0d/%0d, busy %0d/%0d after the symbol", d1, d2, busy1, busy2);
    end
  endtask

  real snrs [4] = '{10.0, 20.0, 30.0, 40.0};
  real mse1 [4], mse2 [4];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 4; s++) begin
      real se1, se2;
      int  cnt;
      se1 = 0.0; se2 = 0.0; cnt = 0;
      for (int t = 0; t < NSYM; t++) run_symbol(snrs[s], se1, se2, cnt);
      mse1[s] = se1 / cnt / CH_POW;
      mse2[s] = se2 / cnt / CH_POW;
      $display("SNR %2.0f dB: normalised MSE  DCT/EIDCT %e  IDCT/DCT %e  (1/SNR %e)",
               snrs[s], mse1[s], mse2[s], 10.0 ** (-snrs[s] / 10.0));
      if (s < 3) begin
        checks += 3;
        if (mse1[s] > 2.0 * 10.0 ** (-snrs[s] / 10.0)) begin
          failures++;
          $display("DCT/EIDCT MSE too large at %0.0f dB", snrs[s]);
        end
        if (mse2[s] > 2.0 * 10.0 ** (-snrs[s] / 10.0)) begin
          failures++;
          $display("IDCT/DCT MSE too large at %0.0f dB", snrs[s]);
        end
        if (mse2[s] > 4.0 * mse1[s]) begin
          failures++;
          $display("IDCT/DCT MSE not comparable to DCT/EIDCT at %0.0f dB", snrs[s]);
        end
      end
      if (s > 0) begin
        checks += 2;
        if (mse1[s] >= mse1[s-1]) begin
          failures++;
          $display("DCT/EIDCT MSE does not fall from %0.0f to %0.0f dB", snrs[s-1], snrs[s]);
        end
        if (mse2[s] >= mse2[s-1]) begin
          failures++;
          $display("IDCT/DCT MSE does not fall from %0.0f to %0.0f dB", snrs[s-1], snrs[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
