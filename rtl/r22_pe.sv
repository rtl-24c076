// r22_pe: unified radix-2^2 / radix-2 DIF butterfly processing element.
//
// Inputs x0..x3 are the data at addresses s,t,u,v. In radix-2^2 mode
// (radix2=0) the first adder column forms x0+x2, x0-x2, x1+x3 and x1-x3,
// the last is multiplied by -j by swapping real and imaginary parts (and
// negating the new imaginary part), and the second adder column completes
// the radix-4 butterfly. Outputs leave in bit-reversed order within the
// butterfly and are multiplied by W^0, W^2n, W^n and W^3n:
//     y0 = X0,  y1 = X2 * W^2n,  y2 = X1 * W^n,  y3 = X3 * W^3n.
// In radix-2 mode (radix2=1) the second adder column and the W^2n
// multiplier are bypassed and the PE computes two radix-2 butterflies,
// <x0,x2> and <x1,x3>:
//     y0 = x0+x2, y2 = (x0-x2) W^n, y1 = x1+x3, y3 = (x1-x3) W^(n+N/4),
// with the third multiplier's twiddle supplied by the caller.
// Every adder column divides by two (rounding), so a full transform of
// length L is scaled by 1/L and cannot overflow; this scaling is this
// design's choice. Each complex multiplier uses three real multipliers.
// Combinational: the surrounding processor registers inputs and outputs.
module r22_pe
  import fft_pkg::*;
(
  input  cplx_t x     [4],
  input  twid_t w1,          // W^n
  input  twid_t w2,          // W^2n
  input  twid_t w3,          // W^3n (radix-2^2) or W^(n+N/4) (radix-2)
  input  logic  radix2,      // Radix-2^2/2 select: 1 = two radix-2 butterflies
  output cplx_t y     [4]
);
  // (a + b) / 2 and (a - b) / 2, rounded, one bit of headroom.
  function automatic logic signed [DW-1:0] hadd(logic signed [DW-1:0] a,
                                                logic signed [DW-1:0] b);
    logic signed [DW:0] s;
    s = (DW+1)'(a) + (DW+1)'(b) + (DW+1)'(1);
    return DW'(s >>> 1);
  endfunction
  function automatic logic signed [DW-1:0] hsub(logic signed [DW-1:0] a,
                                                logic signed [DW-1:0] b);
    logic signed [DW:0] s;
    s = (DW+1)'(a) - (DW+1)'(b) + (DW+1)'(1);
    return DW'(s >>> 1);
  endfunction

  cplx_t a0, a1, a2, a3, a3j;   // first column
  cplx_t b0, b1, b2, b3;        // second column
  cplx_t m1_in, m2_in, m3_in, m1_out, m2_out, m3_out;

  always_comb begin
    a0.re = hadd(x[0].re, x[2].re);  a0.im = hadd(x[0].im, x[2].im);
    a2.re = hsub(x[0].re, x[2].re);  a2.im = hsub(x[0].im, x[2].im);
    a1.re = hadd(x[1].re, x[3].re);  a1.im = hadd(x[1].im, x[3].im);
    a3.re = hsub(x[1].re, x[3].re);  a3.im = hsub(x[1].im, x[3].im);
    // swap r/i: -j * (re + j im) = im - j re
    a3j.re = a3.im;
    a3j.im = -a3.re;
    b0.re = hadd(a0.re, a1.re);   b0.im = hadd(a0.im, a1.im);
    b1.re = hsub(a0.re, a1.re);   b1.im = hsub(a0.im, a1.im);
    b2.re = hadd(a2.re, a3j.re);  b2.im = hadd(a2.im, a3j.im);
    b3.re = hsub(a2.re, a3j.re);  b3.im = hsub(a2.im, a3j.im);
  end

  // Multiplier inputs (the muxes in front of the W^n and W^3n multipliers).
  assign m2_in = b1;                       // W^2n, unused in radix-2 mode
  assign m1_in = radix2 ? a2 : b2;         // W^n
  assign m3_in = radix2 ? a3 : b3;         // W^3n or W^(n+N/4)

  cmul3 u_m1 (.x(m1_in), .w(w1), .y(m1_out));
  cmul3 u_m2 (.x(m2_in), .w(w2), .y(m2_out));
  cmul3 u_m3 (.x(m3_in), .w(w3), .y(m3_out));

  // Output muxes.
  assign y[0] = radix2 ? a0 : b0;
  assign y[1] = radix2 ? a1 : m2_out;
  assign y[2] = m1_out;
  assign y[3] = m3_out;
endmodule
