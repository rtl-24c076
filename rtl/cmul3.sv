// cmul3: complex multiplier with three real multipliers.
//
// (a + jb)(c + jd) is formed as k1 = c(a+b), k2 = a(d-c), k3 = b(c+d),
// re = k1 - k3, im = k1 + k2, replacing four multipliers by three as the
// butterfly PE does. The data word is Q1.(DW-1), the twiddle Q1.(TW-1);
// products are rounded back to DW bits and saturated. Combinational.
module cmul3
  import fft_pkg::*;
(
  input  cplx_t x,
  input  twid_t w,
  output cplx_t y
);
  localparam int unsigned PW = DW + TW + 2;

  logic signed [DW:0]   a_b;
  logic signed [TW:0]   d_c, c_d;
  logic signed [PW-1:0] k1, k2, k3, pre, pim;

  function automatic logic signed [DW-1:0] rnd_sat(logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + (PW'(1) <<< (TW - 2))) >>> (TW - 1);
    if (r > PW'(2 ** (DW - 1) - 1))      return DW'(2 ** (DW - 1) - 1);
    else if (r < -PW'(2 ** (DW - 1)))    return DW'(-(2 ** (DW - 1)));
    else                                 return DW'(r);
  endfunction

  always_comb begin
    a_b = (DW+1)'(x.re) + (DW+1)'(x.im);
    d_c = (TW+1)'(w.im) - (TW+1)'(w.re);
    c_d = (TW+1)'(w.re) + (TW+1)'(w.im);
    k1  = PW'(w.re) * PW'(a_b);
    k2  = PW'(x.re) * PW'(d_c);
    k3  = PW'(x.im) * PW'(c_d);
    pre = k1 - k3;
    pim = k1 + k2;
    y.re = rnd_sat(pre);
    y.im = rnd_sat(pim);
  end
endmodule
