// dct_channel_estimator: pilot-aided OFDM channel estimator that
// interpolates with a DCT / extended IDCT (EIDCT) pair instead of an
// IDFT / DFT pair.
//
// One OFDM symbol carries M equispaced pilots, pilot k' on subcarrier
// k = k'*D with D = N/M. For each symbol the estimator
//   1. forms the least-squares estimate at each pilot while the pilots
//      arrive: Hp(k') = Y(k') * conj(P(k')), which equals Y/P for pilot
//      symbols of unit magnitude;
//   2. takes the M-point DCT-II of the pilot estimates,
//        hc(m) = w(m) * sum_k' Hp(k') cos((2k'+1) pi m / 2M),
//      w(0) = 1/sqrt(M), w(m) = sqrt(2/M) otherwise;
//   3. pads it with zeros to N points and evaluates the extended IDCT
//        H(k) = sum_{m<M} w(m) hc(m) cos((2k + D) pi m / 2N),
//      k = 0..N-1, which passes through the pilot estimates at k = k'*D
//      and interpolates smoothly between them.
// Mirror extension is what the DCT does implicitly, so the interpolation
// has no jump at the ends of the pilot record and far less aliasing than
// the DFT-based estimator. The real and imaginary parts are processed
// independently with the same real cosines.
//
// Hardware: the simplest direct form. One complex-by-real multiply-
// accumulate unit evaluates both sums, one product per clock: M*M clocks
// for the DCT, then N*M clocks for the EIDCT, one result every M clocks.
// w(m)^2 is 1/M or 2/M, a shift, so the DCT result is stored as
// g(m) = w(m) hc(m) and the EIDCT needs no further weights. Cosines come
// from a quarter-wave table of N+1 words of cos(pi i / 2N), generated at
// initialisation by the angle-addition recurrence in Q2.60 fixed point
// (step cos/sin computed from their Taylor series) and rounded to Q1.15;
// it is read synchronously, so the MAC runs one clock behind the index.
//
// Formats: Y, P and H are Q1.15 complex (fft_pkg::cplx_t); the LS estimate
// is rounded and saturated to Q1.15; g(m) is kept with 20 fraction bits;
// the accumulator is 44 bits; outputs are rounded and saturated to Q1.15.
//
// Interface and timing: start (when idle) begins a symbol. in_ready is then
// high until M pilots have been taken with in_valid (in_y = received value,
// in_p = known pilot symbol), in pilot order k' = 0..M-1. The estimate
// leaves in subcarrier order: out_valid pulses once every M clocks with
// out_h = H(k) and out_k = k; done pulses with the last one, M*M + N*M + 1
// clocks after the last pilot was taken.
//
// The algorithm (equations for the LS step, the DCT, zero padding and the
// EIDCT, and N = 1024, M = 32 as defaults) follows the published estimator;
// the direct-form single-MAC architecture, the unit-magnitude pilot
// assumption, the word lengths and the interface are this design's own.
module dct_channel_estimator
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
    $error("dct_channel_estimator: N and M must be powers of two, M >= 4, M dividing N");
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

  // cos(pi * a / 2N) for a phase a in [0, 4N), registered
  logic [PW-1:0]        phase;
  logic [KW:0]          ca;
  logic                 cneg;
  logic signed [CW-1:0] cos_r;
  always_comb begin
    unique case (phase[PW-1 -: 2])
      2'd0:    begin ca = (KW+1)'(phase[KW-1:0]);       cneg = 1'b0; end
      2'd1:    begin ca = (KW+1)'(N) - (KW+1)'(phase[KW-1:0]); cneg = 1'b1; end
      2'd2:    begin ca = (KW+1)'(phase[KW-1:0]);       cneg = 1'b1; end
      default: begin ca = (KW+1)'(N) - (KW+1)'(phase[KW-1:0]); cneg = 1'b0; end
    endcase
  end
  always_ff @(posedge clk) cos_r <= cneg ? -cos_q[ca] : cos_q[ca];

  // ------------------------------------------------ buffers
  cplx_t                hp [M];          // LS pilot estimates
  logic signed [GW-1:0] g_re [M];        // w(m) * hc(m)
  logic signed [GW-1:0] g_im [M];

  // ------------------------------------------------ sequencing
  typedef enum logic [1:0] {E_IDLE, E_LOAD, E_DCT, E_EIDCT} est_state_e;
  est_state_e state;

  logic [KW-1:0] outer;   // m (DCT) or k (EIDCT)
  logic [MW-1:0] inner;   // k' (DCT) or m (EIDCT)
  logic [MW-1:0] ld_cnt;
  logic          issue;

  assign in_ready = (state == E_LOAD);
  assign issue    = (state == E_DCT) || (state == E_EIDCT);

  // phase of the cosine for the current product
  always_comb begin
    if (state == E_DCT)
      phase = PW'((2 * int'(inner) + 1) * int'(outer) * int'(D));
    else
      phase = PW'((2 * int'(outer) + int'(D)) * int'(inner));
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
      if (state == E_DCT) begin
        s1_re <= GW'(hp[inner].re);
        s1_im <= GW'(hp[inner].im);
      end else begin
        s1_re <= g_re[inner];
        s1_im <= g_im[inner];
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
            state <= E_DCT;
          end
        end
        E_DCT: begin
          inner <= inner + 1'b1;
          if (inner == MW'(M - 1)) begin
            if (outer == KW'(M - 1)) begin
              outer <= '0;
              state <= E_EIDCT;
            end else begin
              outer <= outer + 1'b1;
            end
          end
        end
        E_EIDCT: begin
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
    if (state == E_LOAD && in_valid) hp[ld_cnt] <= ls;
  end

  // ------------------------------------------------ multiply-accumulate
  logic signed [AW-1:0] acc_re, acc_im, nx_re, nx_im;
  always_comb begin
    nx_re = (s1_first ? '0 : acc_re) + AW'(s1_re) * AW'(cos_r);
    nx_im = (s1_first ? '0 : acc_im) + AW'(s1_im) * AW'(cos_r);
  end

  // DCT sum (30 fraction bits) times w(m)^2 = 2^-MW or 2^-(MW-1), kept
  // with 20 fraction bits
  function automatic logic signed [GW-1:0] to_g(logic signed [AW-1:0] v, logic m0);
    int sh;
    sh = 10 + (m0 ? int'(MW) : int'(MW) - 1);
    return GW'((v + (AW'(1) <<< (sh - 1))) >>> sh);
  endfunction

  // EIDCT sum (35 fraction bits) to Q1.15
  function automatic logic signed [DW-1:0] to_out(logic signed [AW-1:0] v);
    logic signed [AW-1:0] r;
    r = (v + (AW'(1) <<< 19)) >>> 20;
    if (r > AW'(2 ** (DW - 1) - 1))   return DW'(2 ** (DW - 1) - 1);
    else if (r < -AW'(2 ** (DW - 1))) return DW'(-(2 ** (DW - 1)));
    else                              return DW'(r);
  endfunction

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
        if (s1_last && !s1_dct) begin
          out_valid <= 1'b1;
          out_h.re  <= to_out(nx_re);
          out_h.im  <= to_out(nx_im);
          out_k     <= s1_dest;
          done      <= (s1_dest == KW'(N - 1));
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (s1_valid && s1_last && s1_dct) begin
      g_re[s1_dest[MW-1:0]] <= to_g(nx_re, s1_dest == '0);
      g_im[s1_dest[MW-1:0]] <= to_g(nx_im, s1_dest == '0);
    end
  end

  assign busy = (state != E_IDLE) || s1_valid || out_valid;
endmodule
