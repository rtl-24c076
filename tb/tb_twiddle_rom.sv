// tb_twiddle_rom: reads all 8192 twiddle factors and compares each with
// cos(2*pi*n/N) - j sin(2*pi*n/N) in Q1.11, allowing one LSB (rounding and
// the clipping of +1.0 to 2047/2048). Also checks the one-clock latency.
`timescale 1ns/1ps
module tb_twiddle_rom;
  import fft_pkg::*;
  logic              clk = 1'b0;
  logic [ADDR_W-1:0] idx = '0;
  twid_t             w;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  twiddle_rom dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real c, s, scale;
    scale = real'(1 << (TW - 1));
    for (int n = 0; n < NMAX; n++) begin
      @(negedge clk);
      idx = ADDR_W'(n);
      @(posedge clk);
      #1;
      c =  $cos(2.0 * 3.14159265358979 * n / NMAX) * scale;
      s = -$sin(2.0 * 3.14159265358979 * n / NMAX) * scale;
      checks++;
      if ((real'(w.re) - c) > 1.01 || (real'(w.re) - c) < -1.01 ||
          (real'(w.im) - s) > 1.01 || (real'(w.im) - s) < -1.01) begin
        failures++;
        if (failures < 5) $display("n=%0d got (%0d,%0d) want (%f,%f)", n, w.re, w.im, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
