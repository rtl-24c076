// vl_cag: variable-length coefficient (twiddle) index generator.
//
// The twiddle exponent of a butterfly is the butterfly counter shifted left
// by the stage count, reduced modulo the range of butterfly positions in
// that stage. The butterfly counter already holds i*2^c (2^c = ratio of the
// longest to the current length), so one shift serves every length:
//     n = (B << K) mod (N/4)
// The published generator (for radix-2) uses w = (B * 2^k) mod (N/2); for
// radix-2^2 stages the butterfly position spans N/4, hence mod N/4 here.
// The three PE multipliers need W^n, W^2n and, in a radix-2^2 stage, W^3n;
// in a radix-2 stage the third multiplier serves the second butterfly pair
// (t,v), which sits N/4 further on, and gets W^(n+N/4).
// Counter and stage values come from the data address generator, whose
// counters are the "similar" stage counter unit the text refers to.
// Combinational: barrel shifter plus two small adders.
module vl_cag
  import fft_pkg::*;
(
  input  logic [BFC_W-1:0]  bf_cnt,    // butterfly counter content B
  input  logic [STG_W-1:0]  stage_cnt, // stage counter content K
  input  logic              radix2,    // radix-2 stage
  output logic [ADDR_W-1:0] idx1,      // exponent for the W^n multiplier
  output logic [ADDR_W-1:0] idx2,      // exponent for the W^2n multiplier
  output logic [ADDR_W-1:0] idx3       // exponent for the W^3n / W^(n+N/4) multiplier
);
  logic [BFC_W-1:0] n;

  // Barrel shifter: result truncated to 11 bits = mod N/4.
  assign n    = bf_cnt << stage_cnt;
  assign idx1 = ADDR_W'(n);
  assign idx2 = ADDR_W'({n, 1'b0});
  assign idx3 = radix2 ? ADDR_W'(n) + ADDR_W'(NMAX / 4)
                       : ADDR_W'(n) + ADDR_W'({n, 1'b0});
endmodule
