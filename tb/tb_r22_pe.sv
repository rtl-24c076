// tb_r22_pe: random data and twiddles through the PE in both modes.
// Radix-2^2: y0 = X0/4, y1 = X2*W2/4, y2 = X1*W1/4, y3 = X3*W3/4 with
// X the radix-4 DFT of x0..x3. Radix-2: y0 = (x0+x2)/2, y1 = (x1+x3)/2,
// y2 = (x0-x2)*W1/2, y3 = (x1-x3)*W3/2. References are computed in floating
// point from the twiddle words actually applied; tolerance 2 LSB.
module tb_r22_pe;
  import fft_pkg::*;
  cplx_t x [4], y [4];
  twid_t w1, w2, w3;
  logic  radix2;
  int checks = 0, failures = 0;

  r22_pe dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic twid_t rand_tw();
    real a;
    twid_t t;
    a = 6.283185307 * $urandom_range(8191) / 8192.0;
    t.re = TW'($rtoi($cos(a) * 2047.0));
    t.im = TW'($rtoi(-$sin(a) * 2047.0));
    return t;
  endfunction

  initial begin
    real xr [4], xi [4], zr [4], zi [4], wr [4], wi [4], er, ei;
    for (int r = 0; r < 4000; r++) begin
      radix2 = r[0];
      for (int p = 0; p < 4; p++) begin
        x[p].re = DW'($signed($urandom_range(32767)) - 16384);
        x[p].im = DW'($signed($urandom_range(32767)) - 16384);
        xr[p] = real'(x[p].re);
        xi[p] = real'(x[p].im);
      end
      w1 = rand_tw(); w2 = rand_tw(); w3 = rand_tw();
      if (r < 8) begin w1 = '{re: 2047, im: 0}; end
      #1;
      wr[0] = 2048.0; wi[0] = 0.0;
      if (!radix2) begin
        // z = radix-4 outputs in the PE's output order X0, X2, X1, X3, / 4
        zr[0] = (xr[0] + xr[1] + xr[2] + xr[3]) / 4;  zi[0] = (xi[0] + xi[1] + xi[2] + xi[3]) / 4;
        zr[1] = (xr[0] - xr[1] + xr[2] - xr[3]) / 4;  zi[1] = (xi[0] - xi[1] + xi[2] - xi[3]) / 4;
        zr[2] = (xr[0] + xi[1] - xr[2] - xi[3]) / 4;  zi[2] = (xi[0] - xr[1] - xi[2] + xr[3]) / 4;
        zr[3] = (xr[0] - xi[1] - xr[2] + xi[3]) / 4;  zi[3] = (xi[0] + xr[1] - xi[2] - xr[3]) / 4;
        wr[1] = w2.re; wi[1] = w2.im;
      end else begin
        zr[0] = (xr[0] + xr[2]) / 2;  zi[0] = (xi[0] + xi[2]) / 2;
        zr[1] = (xr[1] + xr[3]) / 2;  zi[1] = (xi[1] + xi[3]) / 2;
        zr[2] = (xr[0] - xr[2]) / 2;  zi[2] = (xi[0] - xi[2]) / 2;
        zr[3] = (xr[1] - xr[3]) / 2;  zi[3] = (xi[1] - xi[3]) / 2;
        wr[1] = 2048.0; wi[1] = 0.0;
      end
      wr[2] = w1.re; wi[2] = w1.im;
      wr[3] = w3.re; wi[3] = w3.im;
      for (int p = 0; p < 4; p++) begin
        er = (zr[p] * wr[p] - zi[p] * wi[p]) / 2048.0 - real'(y[p].re);
        ei = (zr[p] * wi[p] + zi[p] * wr[p]) / 2048.0 - real'(y[p].im);
        checks++;
        if (er > 2.0 || er < -2.0 || ei > 2.0 || ei < -2.0) begin
          failures++;
          if (failures < 6) $display("r=%0d radix2=%0d port %0d error (%f,%f)", r, radix2, p, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
