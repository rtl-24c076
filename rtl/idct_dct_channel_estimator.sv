// idct_dct_channel_estimator: pilot-aided OFDM channel estimator that
// interpolates with an M-point IDCT followed by an N-point DCT, so that it
// maps onto ordinary (type-II / type-III) DCT hardware.
//
// One OFDM symbol carries M equispaced pilots, pilot k' on subcarrier
// k = k'*D with D = N/M. For each symbol the estimator
//   1. forms the least-squares estimate at each pilot as it arrives,
//      Hp(k') = Y(k') * conj(P(k')) (= Y/P for unit-magnitude pilots), and
//      turns it into G(k') = a(k') exp(+j pi k' / 2M) Hp(k'), with
//      a(0) = 1/2 and a(k') = 1 otherwise;
//   2. takes it to the time domain with an M-point IDCT (DCT-III),
//        h(n) = (2/M) sum_k' G(k') cos((2n+1) pi k' / 2M),  n = 0..M-1;
//   3. pads h with zeros to N points and takes the N-point DCT-II,
//        S(k) = sum_{n<M} h(n) cos((2n+1) pi k / 2N),       k = 0..N-1;
//   4. rotates the result, H(k) = exp(-j pi k / 2N) S(k).
// The pilot record behind this is the M estimates extended to 2M points
// with a zero at M and a phase-rotated mirror image above it; its 2M-point
// IDFT / zero padding / DFT interpolation reduces to the IDCT / DCT pair
// above. H passes through the pilot estimates at k = k'*D. Beyond the
// last pilot it falls towards zero, because of the inserted zero, so the
// subcarriers above (M-1)*D are not meant to be used. All orthonormal DCT
// weights and the output gains combine into the two constants a(k') and
// 2/M, a halving and a shift.
//
// Hardware: the simplest direct form. One complex-by-real multiply-
// accumulate unit evaluates both transforms, one product per clock: M*M
// clocks for the IDCT, then N*M clocks for the DCT, one result every M
// clocks. The two phase rotations use one complex multiply each, at the
// input (as the pilots arrive) and at the output. Cosines and sines come
// from a quarter-wave table of N+1 words of cos(pi i / 2N), generated at
// initialisation by the angle-addition recurrence in Q2.60 fixed point
// (step cos/sin from their Taylor series) and rounded to Q1.15. The MAC's
// table read is registered, so the MAC runs one clock behind the index.
//
// Formats: Y, P and H are Q1.15 complex (fft_pkg::cplx_t); the LS estimate
// is rounded and saturated to Q1.15; G(k') and h(n) are kept with 20
// fraction bits in 24; the accumulator is 44 bits; outputs are rounded and
// saturated to Q1.15.
//
// Interface and timing: as dct_channel_estimator. start (when idle) begins
// a symbol; in_ready is high until M pilots have been taken with in_valid
// (in_y = received value, in_p = known pilot symbol), in pilot order. The
// estimate leaves in subcarrier order: out_valid pulses once every M
// clocks with out_h = H(k) and out_k = k; done pulses with the last one,
// M*M + N*M + 1 clocks after the last pilot was taken.
//
// The algorithm (extended pilot record, input gain and rotation, IDCT,
// zero padding, DCT, output gain and rotation) and N = 1024, M = 32 follow
// the published estimator. The gains are this design's reading of it: the
// factor 1/sqrt(2) of the input stage is applied at k' = 0 only and the
// output rotation is exp(-j pi k / 2N), the combination under which the
// estimate reproduces the pilots. The direct-form architecture, the
// unit-magnitude pilots, the word lengths and the interface are this
// design's own.
module idct_dct_channel_estimator
  import fft_pkg::*;
#(
  parameter int unsigned N = 1024,   // subcarriers
  parameter int unsigned M = 32      // pilots
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  cplx_t                in_y,
  input  cplx_t                in_p,
  output logic                 out_valid,
  output cplx_t                out_h,
  output logic [$clog2(N)-1:0] out_k,
  output logic                 busy,
  output logic                 done
);
  localparam int unsigned D   = N / M;
  localparam int unsigned KW  = $clog2(N);
  localparam int unsigned MW  = $clog2(M);
  localparam int unsigned PW  = $clog2(4 * N);   // phase, unit pi/(2N)
  localparam int unsigned CW  = 16;              // cosine, Q1.15
  localparam int unsigned GW  = 24;              // g(m), 20 fraction bits
  localparam int unsigned AW  = 44;              // accumulator

  if (N % M != 0 || (1 << KW) != N || (1 << MW) != M || M < 4) begin : g_bad_size
    $error("idct_dct_channel_estimator: N and M must be powers of two, M >= 4, M dividing N");
  end

  // ------------------------------------------------ quarter-wave cosine ROM
  localparam longint PI_Q60 = 64'sd3622009729038561421;   // pi * 2^60

  // cos (c = 1) or sin (c = 0) of x (Q60, x < 0.1) by Taylor series
  function automatic longint trig_q60(longint x, bit c);
    logic signed [127:0] term, sum;
    sum  = c ? (128'sd1 <<< 60) : 128'(x);
    term = sum;
    for (int i = 1; i < 8; i++) begin
      term = -((term * x) >>> 60) * x >>> 60;
      term = c ? term / ((2 * i - 1) * (2 * i)) : term / ((2 * i) * (2 * i + 1));
      sum  = sum + term;
    end
    return longint'(sum);
  endfunction

  localparam longint STEP  = PI_Q60 / (2 * N);
  localparam longint COS_D = trig_q60(STEP, 1'b1);
  localparam longint SIN_D = trig_q60(STEP, 1'b0);

  function automatic logic signed [CW-1:0] to_cw(logic signed [127:0] v);
    logic signed [127:0] r;
    r = (v + (128'sd1 <<< (60 - CW))) >>> (61 - CW);
    if (r > (128'sd1 <<< (CW - 1)) - 1) r = (128'sd1 <<< (CW - 1)) - 1;
    if (r < 0) r = '0;
    return CW'(r);
  endfunction

  logic signed [CW-1:0] cos_q [N+1];
  initial begin
    logic signed [127:0] c, s, cn;
    c = 128'sd1 <<< 60;
    s = '0;
    for (int i = 0; i <= int'(N); i++) begin
      cos_q[i] = to_cw(c);
      cn = (c * COS_D - s * SIN_D) >>> 60;
      s  = (s * COS_D + c * SIN_D) >>> 60;
      c  = cn;
    end
  end

  // quarter-wave fold of a phase a in [0, 4N) (unit pi/(2N)): table
  // index in [0, N] and the sign of cos(pi * a / 2N)
  function automatic logic [KW+1:0] fold(logic [PW-1:0] a);
    unique case (a[PW-1 -: 2])
      2'd0:    return {1'b0, (KW+1)'(a[KW-1:0])};
      2'd1:    return {1'b1, (KW+1)'(N) - (KW+1)'(a[KW-1:0])};
      2'd2:    return {1'b1, (KW+1)'(a[KW-1:0])};
      default: return {1'b0, (KW+1)'(N) - (KW+1)'(a[KW-1:0])};
    endcase
  endfunction

  // MAC cosine, registered
  logic [PW-1:0]        phase;
  logic [KW+1:0]        fm;
  logic signed [CW-1:0] cos_r;
  assign fm = fold(phase);
  always_ff @(posedge clk) cos_r <= fm[KW+1] ? -cos_q[fm[KW:0]] : cos_q[fm[KW:0]];

  // rotation cos/sin: input side at phase k'*D, output side at phase k
  logic [PW-1:0]        rphase;
  logic [KW+1:0]        fc, fs;
  logic signed [CW-1:0] rot_c, rot_s;
  assign fc    = fold(rphase);
  assign fs    = fold(rphase - PW'(N));       // sin x = cos(x - pi/2)
  assign rot_c = fc[KW+1] ? -cos_q[fc[KW:0]] : cos_q[fc[KW:0]];
  assign rot_s = fs[KW+1] ? -cos_q[fs[KW:0]] : cos_q[fs[KW:0]];

  // ------------------------------------------------ buffers
  logic signed [GW-1:0] gp_re [M];       // G(k'), rotated LS estimates
  logic signed [GW-1:0] gp_im [M];
  logic signed [GW-1:0] h_re [M];        // h(n), IDCT result
  logic signed [GW-1:0] h_im [M];

  // ------------------------------------------------ sequencing
  typedef enum logic [1:0] {E_IDLE, E_LOAD, E_IDCT, E_DCT} est_state_e;
  est_state_e state;

  logic [KW-1:0] outer;   // n (IDCT) or k (DCT)
  logic [MW-1:0] inner;   // k' (IDCT) or n (DCT)
  logic [MW-1:0] ld_cnt;
  logic          issue;

  assign in_ready = (state == E_LOAD);
  assign issue    = (state == E_IDCT) || (state == E_DCT);

  // phase of the cosine for the current product
  always_comb begin
    if (state == E_IDCT)
      phase = PW'((2 * int'(outer) + 1) * int'(inner) * int'(D));
    else
      phase = PW'((2 * int'(inner) + 1) * int'(outer));
  end

  // LS estimate y * conj(p)
  function automatic logic signed [DW-1:0] sat_round(logic signed [2*DW+1:0] v, int sh);
    logic signed [2*DW+1:0] r;
    r = (v + ((2*DW+2)'(1) <<< (sh - 1))) >>> sh;
    if (r > (2*DW+2)'(2 ** (DW - 1) - 1))   return DW'(2 ** (DW - 1) - 1);
    else if (r < -(2*DW+2)'(2 ** (DW - 1))) return DW'(-(2 ** (DW - 1)));
    else                                    return DW'(r);
  endfunction

  cplx_t ls;
  always_comb begin
    ls.re = sat_round((2*DW+2)'(in_y.re) * (2*DW+2)'(in_p.re) + (2*DW+2)'(in_y.im) * (2*DW+2)'(in_p.im), DW - 1);
    ls.im = sat_round((2*DW+2)'(in_y.im) * (2*DW+2)'(in_p.re) - (2*DW+2)'(in_y.re) * (2*DW+2)'(in_p.im), DW - 1);
  end

  // input rotation G = a * ls * (c + j s), 20 fraction bits
  localparam int unsigned RW = 2 * DW + 2;
  logic signed [RW-1:0] gr_full, gi_full;
  logic signed [GW-1:0] g_in_re, g_in_im;
  always_comb begin
    gr_full = RW'(ls.re) * RW'(rot_c) - RW'(ls.im) * RW'(rot_s);
    gi_full = RW'(ls.im) * RW'(rot_c) + RW'(ls.re) * RW'(rot_s);
    // 30 fraction bits to 20, one more for a(0) = 1/2
    g_in_re = GW'((gr_full + (RW'(1) <<< ((ld_cnt == '0) ? 10 : 9))) >>> ((ld_cnt == '0) ? 11 : 10));
    g_in_im = GW'((gi_full + (RW'(1) <<< ((ld_cnt == '0) ? 10 : 9))) >>> ((ld_cnt == '0) ? 11 : 10));
  end

  // stage 1 registers (aligned with cos_r)
  logic                 s1_valid, s1_first, s1_last, s1_dct;
  logic [KW-1:0]        s1_dest;
  logic signed [GW-1:0] s1_re, s1_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= E_IDLE;
      outer <= '0; inner <= '0; ld_cnt <= '0;
      s1_valid <= 1'b0; s1_first <= 1'b0; s1_last <= 1'b0; s1_dct <= 1'b0;
      s1_dest <= '0; s1_re <= '0; s1_im <= '0;
    end else begin
      s1_valid <= issue;
      s1_first <= (inner == '0);
      s1_last  <= (inner == MW'(M - 1));
      s1_dct   <= (state == E_DCT);
      s1_dest  <= outer;
      if (state == E_IDCT) begin
        s1_re <= gp_re[inner];
        s1_im <= gp_im[inner];
      end else begin
        s1_re <= h_re[inner];
        s1_im <= h_im[inner];
      end
      unique case (state)
        E_IDLE: if (start) begin
          ld_cnt <= '0;
          state  <= E_LOAD;
        end
        E_LOAD: if (in_valid) begin
          ld_cnt <= ld_cnt + 1'b1;
          if (ld_cnt == MW'(M - 1)) begin
            outer <= '0; inner <= '0;
            state <= E_IDCT;
          end
        end
        E_IDCT: begin
          inner <= inner + 1'b1;
          if (inner == MW'(M - 1)) begin
            if (outer == KW'(M - 1)) begin
              outer <= '0;
              state <= E_DCT;
            end else begin
              outer <= outer + 1'b1;
            end
          end
        end
        E_DCT: begin
          inner <= inner + 1'b1;
          if (inner == MW'(M - 1)) begin
            outer <= outer + 1'b1;
            if (outer == KW'(N - 1)) state <= E_IDLE;
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == E_LOAD && in_valid) begin
      gp_re[ld_cnt] <= g_in_re;
      gp_im[ld_cnt] <= g_in_im;
    end
  end

  // ------------------------------------------------ multiply-accumulate
  logic signed [AW-1:0] acc_re, acc_im, nx_re, nx_im;
  always_comb begin
    nx_re = (s1_first ? '0 : acc_re) + AW'(s1_re) * AW'(cos_r);
    nx_im = (s1_first ? '0 : acc_im) + AW'(s1_im) * AW'(cos_r);
  end

  // IDCT sum (35 fraction bits) times 2/M, kept with 20 fraction bits
  function automatic logic signed [GW-1:0] to_h(logic signed [AW-1:0] v);
    localparam int SH = 15 + int'(MW) - 1;
    return GW'((v + (AW'(1) <<< (SH - 1))) >>> SH);
  endfunction

  // output rotation S * (c - j s): 50 fraction bits to Q1.15
  localparam int unsigned OW = AW + CW + 1;
  function automatic logic signed [DW-1:0] to_out(logic signed [OW-1:0] v);
    logic signed [OW-1:0] r;
    r = (v + (OW'(1) <<< 34)) >>> 35;
    if (r > OW'(2 ** (DW - 1) - 1))   return DW'(2 ** (DW - 1) - 1);
    else if (r < -OW'(2 ** (DW - 1))) return DW'(-(2 ** (DW - 1)));
    else                              return DW'(r);
  endfunction

  logic signed [OW-1:0] o_re, o_im;
  always_comb begin
    o_re = OW'(nx_re) * OW'(rot_c) + OW'(nx_im) * OW'(rot_s);
    o_im = OW'(nx_im) * OW'(rot_c) - OW'(nx_re) * OW'(rot_s);
  end

  // the rotation table is shared: pilot phase k'*D while loading, the
  // output subcarrier's phase k otherwise
  assign rphase = (state == E_LOAD) ? PW'(int'(ld_cnt) * int'(D)) : PW'(s1_dest);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re <= '0; acc_im <= '0;
      out_valid <= 1'b0; out_h <= '0; out_k <= '0; done <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (s1_valid) begin
        acc_re <= nx_re;
        acc_im <= nx_im;
        if (s1_last && s1_dct) begin
          out_valid <= 1'b1;
          out_h.re  <= to_out(o_re);
          out_h.im  <= to_out(o_im);
          out_k     <= s1_dest;
          done      <= (s1_dest == KW'(N - 1));
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (s1_valid && s1_last && !s1_dct) begin
      h_re[s1_dest[MW-1:0]] <= to_h(nx_re);
      h_im[s1_dest[MW-1:0]] <= to_h(nx_im);
    end
  end

  assign busy = (state != E_IDLE) || s1_valid || out_valid;
endmodule
