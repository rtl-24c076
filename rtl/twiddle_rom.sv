// twiddle_rom: coefficient ROM giving W_N^n = cos(2*pi*n/N) - j sin(2*pi*n/N)
// for N = 8192 and any n in 0..N-1.
//
// Only one octant (N/8+1 = 1025 entries of cos and sin, TW bits each) is
// stored, using the symmetry of the sinusoid as in the ROM size estimate of
// the text (2 x 12 bits x 8192/8). The index is split into a quadrant
// q = n[12:11] and a remainder r = n[10:0]; the octant table is read at r or
// at N/4-r (cos and sin swapped), and the quadrant then rotates the pair by
// a multiple of 90 degrees. Table contents are computed when the ROM is
// initialised (see below), rounded to Q1.(TW-1) and clipped to 2^(TW-1)-1,
// so 1.0 reads as 2047/2048 at TW=12.
//
// Timing: one clock of latency; twiddle is registered.
module twiddle_rom
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic [ADDR_W-1:0] idx,
  output twid_t             w
);
  localparam int unsigned OCT = NMAX / 8;          // 1024
  localparam int unsigned QTR = NMAX / 4;          // 2048

  // Table contents: the octant is generated by the angle-addition
  // recurrence c' = c cos(d) - s sin(d), s' = s cos(d) + c sin(d) with
  // d = 2*pi/N, in Q2.60 fixed point (error far below one LSB of the
  // TW-bit words), then rounded to Q1.(TW-1) and clipped to 2^(TW-1)-1.
  localparam longint COS_D = 64'sd1152921165489838592;  // cos(2*pi/8192) * 2^60
  localparam longint SIN_D = 64'sd884279632303724;      // sin(2*pi/8192) * 2^60

  function automatic logic [TW-1:0] to_word(longint v);
    longint r;
    r = (v + (longint'(1) << (60 - TW))) >>> (61 - TW);
    if (r > (longint'(1) << (TW - 1)) - 1) r = (longint'(1) << (TW - 1)) - 1;
    if (r < 0) r = 0;
    return TW'(r);
  endfunction

  logic [TW-1:0] cos_tab [OCT+1];
  logic [TW-1:0] sin_tab [OCT+1];

  initial begin
    logic signed [127:0] c, s, cn;
    c = 128'sd1 <<< 60;
    s = '0;
    for (int m = 0; m <= int'(OCT); m++) begin
      cos_tab[m] = to_word(longint'(c));
      sin_tab[m] = to_word(longint'(s));
      cn = (c * COS_D - s * SIN_D) >>> 60;
      s  = (s * COS_D + c * SIN_D) >>> 60;
      c  = cn;
    end
  end

  logic [1:0]        q;
  logic [BFC_W-1:0]  r;
  logic              upper;     // remainder in the second octant
  logic [BFC_W-1:0]  ta;        // table address
  logic signed [TW-1:0] c0, s0, c1, s1;

  assign q     = idx[ADDR_W-1 -: 2];
  assign r     = idx[BFC_W-1:0];
  assign upper = (r > BFC_W'(OCT));
  assign ta    = upper ? BFC_W'(QTR - r) : r;

  always_comb begin
    // First quadrant angle theta = 2*pi*r/N.
    c0 = upper ? signed'(sin_tab[ta]) : signed'(cos_tab[ta]);
    s0 = upper ? signed'(cos_tab[ta]) : signed'(sin_tab[ta]);
    // Rotate by q*90 degrees.
    unique case (q)
      2'd0: begin c1 =  c0; s1 =  s0; end
      2'd1: begin c1 = -s0; s1 =  c0; end
      2'd2: begin c1 = -c0; s1 = -s0; end
      2'd3: begin c1 =  s0; s1 = -c0; end
    endcase
  end

  always_ff @(posedge clk) begin
    w.re <= c1;
    w.im <= -s1;
  end
endmodule
