// tb_vl_fft_core: the FFT core alone at the three lengths that exercise
// its mechanisms quickly: 64 (power of four), 512 and 2048 (radix-2 first
// stage). Inputs are single complex tones plus an impulse, whose
// transforms are known in closed form: a tone A*exp(j*2*pi*f*n/L) gives
// A at k=f and 0 elsewhere (after the 1/L scaling); an impulse of height A
// at n=0 gives A/L at every k. Tolerance 8 LSB.
`timescale 1ns/1ps
module tb_vl_fft_core;
  import fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, in_valid = 1'b0;
  fft_mode_e mode_in = MODE_64;
  cplx_t in_data = '0, out_data;
  logic in_ready, out_valid, busy, done, issue, radix2, stall;
  logic [ADDR_W-1:0] out_k;
  int checks = 0, failures = 0;

  vl_fft_core dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t got [NMAX];

  // kind 0: tone at bin f; kind 1: impulse
  task automatic run(fft_mode_e m, int kind, int f);
    int L;
    real a, er, ei, wr, wi;
    L = 1 << int'(mode_log2(m));
    a = 12000.0;
    @(negedge clk);
    mode_in = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int n = 0; n < L; n++) begin
      real ph;
      ph = 6.283185307179586 * real'((f * n) % L) / L;
      in_valid = 1'b1;
      if (kind == 0) in_data = '{re: DW'($rtoi(a * $cos(ph))), im: DW'($rtoi(a * $sin(ph)))};
      else           in_data = (n == 0) ? '{re: DW'(16000), im: DW'(-8000)} : '0;
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (!done) begin
      @(posedge clk);
      #1;
      if (out_valid) got[out_k] = out_data;
    end
    for (int k = 0; k < L; k++) begin
      if (kind == 0) begin wr = (k == f) ? a : 0.0; wi = 0.0; end
      else begin wr = 16000.0 / L; wi = -8000.0 / L; end
      er = real'(got[k].re) - wr;
      ei = real'(got[k].im) - wi;
      checks++;
      if (er > 8.0 || er < -8.0 || ei > 8.0 || ei < -8.0) begin
        failures++;
        if (failures < 6) $display("L=%0d kind=%0d k=%0d got (%0d,%0d)", L, kind, k, got[k].re, got[k].im);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(MODE_64, 0, 5);
    run(MODE_64, 1, 0);
    run(MODE_512, 0, 77);
    run(MODE_512, 1, 0);
    run(MODE_2048, 0, 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
