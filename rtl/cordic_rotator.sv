// cordic_rotator: iterative circular-rotation CORDIC with leading-one
// detection, table recoding of the residual angle and variable scale factor
// compensation.
//
// Rotates (x, y) by theta. Each clock performs one iteration:
//   1. Leading-one detection on |z| (z = residual angle) gives the position
//      k with 2^-k <= |z| < 2^-(k-1), and the four bits of |z| starting at
//      that leading one.
//   2. A recoding table (one table for k = 0,1 and one for k > 1, as in the
//      published scheme) turns those four bits into two micro-rotation
//      exponents m and n whose angles atan(2^-m)+atan(2^-n) best match |z|.
//   3. Two shift-and-add micro-rotations by 2^-m and 2^-n in the direction
//      of sign(z), then z -= sign(z)*(atan(2^-m)+atan(2^-n)). Only the
//      first NW = (W+1)/3 arctangents are stored (for W=12: 2^-1..2^-4);
//      a smaller one is the last stored word shifted right, since
//      atan(2^-i) = 2^-i - 2^-3i/3 + ... and the cubic term drops below
//      the angle LSB once i >= W/3.
//   4. Scale compensation: x,y -= x,y * 2^-(2m+1), the first-order part of
//      cos(atan 2^-m). The remaining scale error, ln cos(atan 2^-m) -
//      ln(1-2^-(2m+1)) + ln cos(atan 2^-n), is accumulated in a scale factor
//      error accumulator T from a small ROM.
// The loop ends when z reaches 0 (or after MAX_IT iterations). The scale
// stage then removes the accumulated error T, also by shift-and-add: each
// clock it finds the leading one of |T| at position j, takes whichever of
// ln(1 +- 2^-j) and ln(1 +- 2^-(j+1)) (sign of T) is closer to T, scales
// x,y by that (1 +- 2^-j') and subtracts the logarithm from T. It stops
// when |T| < 2^-(W+1) or after MAX_SC steps. The way T is decomposed, the
// rounding of the ROM words and the guard bits are this design's choices.
//
// The ROMs are computed during elaboration from power series
//   atan(2^-i)         = sum_k (-1)^k 2^-i(2k+1) / (2k+1)
//   ln(1 + 2^-a)       = sum_k (-1)^(k+1) 2^-ak / k
//   -ln(1 - 2^-b)      = sum_k 2^-bk / k
// in 60-bit fixed point, then rounded to the angle and T formats, with
// ln cos(atan x) = -ln(1 + x^2)/2. For W=12 they give the published atan
// words 950, 502, 255, 128 (units of 2^-11).
//
// Taken from the published scheme: the leading-one detector, the two
// recoding tables, the shortened atan table, the per-iteration column
// x - x*2^-(2m+1), the T accumulator with its ln-error ROM, and the use of
// shift-and-add only. Its own choices: one iteration per clock in a loop
// (not a pipeline), the ln cos(atan 2^-n) term and the scale stage above.
//
// Formats: x, y are W-bit Q2.(W-2) (2-bit integer part, as in the published
// simulations, which use W = 8, 12 and 16); theta is a signed (W+1)-bit
// angle in radians with W-1 fraction bits (Q1.11 for W=12, as in the
// published atan table), |theta| <= pi/4. Internally x, y carry G guard
// bits and T has W+4 fraction bits. Interface: start loads the operands
// when idle; valid pulses with the result; iters reports the number of
// double-rotation iterations and sc_iters the number of scale steps.
// valid comes iters + sc_iters + 2 clocks after start.
module cordic_rotator #(
  parameter int unsigned W      = 12,   // data width incl. 2 integer bits
  parameter int unsigned G      = 4,    // guard bits
  parameter int unsigned MAX_IT = 8,    // rotation iteration limit
  parameter int unsigned MAX_SC = 10    // scale step limit
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic signed [W:0]   theta,    // Q1.(W-1)
  output logic                busy,
  output logic                valid,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out,
  output logic [3:0]          iters,
  output logic [3:0]          sc_iters
);
  localparam int unsigned DI  = W + G;        // internal data width
  localparam int unsigned AW  = W + 1;        // angle width
  localparam int unsigned AF  = W - 1;        // angle fraction bits
  localparam int unsigned NW  = (W + 1) / 3;  // stored atan words
  localparam int unsigned EF  = W + 4;        // T fraction bits
  localparam int unsigned TWD = EF + 4;       // T width
  localparam int unsigned QF  = 60;           // series precision

  if (W < 6 || W > 20) begin : g_bad_width
    $error("cordic_rotator: W must be within 6..20");
  end

  // ------------------------------------------------ ROM contents
  typedef logic [AW-2:0]         atan_tab_t [32];
  typedef logic signed [TWD-1:0] t_tab_t    [32];

  // atan(2^-i) in QF fraction bits, i >= 1
  function automatic logic [127:0] atan_q(int i);
    logic [127:0] s;
    s = '0;
    for (int k = 0; k < 40; k++) begin
      if (i * (2 * k + 1) < QF) begin
        if (k % 2 == 0) s = s + ((128'(1) << (QF - i * (2 * k + 1))) / 128'(2 * k + 1));
        else            s = s - ((128'(1) << (QF - i * (2 * k + 1))) / 128'(2 * k + 1));
      end
    end
    return s;
  endfunction

  // ln(1 + 2^-a) (plus = 1) or -ln(1 - 2^-a) (plus = 0) in QF bits, a >= 1
  function automatic logic [127:0] ln_q(int a, bit plus);
    logic [127:0] s;
    s = '0;
    for (int k = 1; k < 64; k++) begin
      if (a * k < QF) begin
        if (plus && k % 2 == 0) s = s - ((128'(1) << (QF - a * k)) / 128'(k));
        else                    s = s + ((128'(1) << (QF - a * k)) / 128'(k));
      end
    end
    return s;
  endfunction

  // round a QF-bit magnitude to f fraction bits
  function automatic logic [127:0] rnd_q(logic [127:0] v, int f);
    return (v + (128'(1) << (QF - f - 1))) >> (QF - f);
  endfunction

  function automatic atan_tab_t gen_atan();
    atan_tab_t t;
    for (int i = 0; i < 32; i++) begin
      if (i <= int'(NW)) t[i] = (AW-1)'(rnd_q(atan_q(i < 1 ? 1 : i), AF));
      else               t[i] = t[NW] >> (i - int'(NW));
    end
    return t;
  endfunction

  // ln cos(atan 2^-i) = -ln(1 + 2^-2i) / 2
  function automatic t_tab_t gen_lncos();
    t_tab_t t;
    for (int i = 0; i < 32; i++)
      t[i] = -TWD'(rnd_q(ln_q(2 * (i < 1 ? 1 : i), 1'b1) >> 1, EF));
    return t;
  endfunction

  // ln cos(atan 2^-i) - ln(1 - 2^-(2i+1))
  function automatic t_tab_t gen_err_m();
    t_tab_t t;
    int j;
    for (int i = 0; i < 32; i++) begin
      j = (i < 1) ? 1 : i;
      t[i] = TWD'(rnd_q(ln_q(2 * j + 1, 1'b0) - (ln_q(2 * j, 1'b1) >> 1), EF));
    end
    return t;
  endfunction

  // ln(1 + 2^-j) and ln(1 - 2^-j)
  function automatic t_tab_t gen_ln1(bit plus);
    t_tab_t t;
    for (int j = 0; j < 32; j++) begin
      if (plus) t[j] =  TWD'(rnd_q(ln_q(j < 1 ? 1 : j, 1'b1), EF));
      else      t[j] = -TWD'(rnd_q(ln_q(j < 1 ? 1 : j, 1'b0), EF));
    end
    return t;
  endfunction

  localparam atan_tab_t ATAN  = gen_atan();
  localparam t_tab_t    LN1P  = gen_ln1(1'b1);
  localparam t_tab_t    LN1M  = gen_ln1(1'b0);
  localparam t_tab_t    LNCOS = gen_lncos();
  localparam t_tab_t    ERR_M = gen_err_m();

  typedef enum logic [1:0] {C_IDLE, C_ITER, C_SCALE} cstate_e;
  cstate_e state;

  logic signed [DI-1:0]  x, y;
  logic signed [AW-1:0]  z;
  logic signed [TWD-1:0] t_acc;
  logic [3:0]            it, sc;

  // ------------------------------------------------ leading-one detection
  logic [AW-2:0] za;        // |z|
  logic [4:0]    lo_pos;    // bit index of the leading one
  logic [4:0]    k;         // 2^-k weight of the leading one
  logic [3:0]    pat;       // four bits from the leading one
  always_comb begin
    za = z[AW-1] ? (AW-1)'(-z) : (AW-1)'(z);
    lo_pos = '0;
    for (int b = 0; b < int'(AW) - 1; b++) if (za[b]) lo_pos = 5'(b);
    k = 5'(AF) - lo_pos;
    if (lo_pos >= 5'd3) pat = 4'(za >> (lo_pos - 5'd3));
    else                pat = 4'(za << (5'd3 - lo_pos));
  end

  // ------------------------------------------------ angle recoding table
  logic [4:0] m, n;
  always_comb begin
    m = k;
    n = k + 5'd1;
    if (k <= 5'd1) begin
      unique case (pat)
        4'b1000: n = k + 5'd3;
        4'b1001: n = k + 5'd2;
        4'b1010: n = k + 5'd2;
        default: n = k + 5'd1;   // 1011, 1100; 1101..1111 unused
      endcase
    end else begin
      unique case (pat)
        4'b1000: n = k + 5'd4;
        4'b1001: n = k + 5'd3;
        4'b1010: n = k + 5'd2;
        4'b1110: begin m = k - 5'd1; n = k + 5'd5; end
        4'b1111: begin m = k - 5'd1; n = k + 5'd3; end
        default: n = k + 5'd1;   // 1011, 1100, 1101
      endcase
    end
  end

  // ------------------------------------------------ one iteration datapath
  logic signed [DI-1:0] x1, y1, x2, y2, x3, y3;
  logic signed [AW-1:0] z_next;
  logic [5:0]           cs;     // compensation shift 2m+1
  always_comb begin
    if (!z[AW-1]) begin
      x1 = x  - (y  >>> m);  y1 = y  + (x  >>> m);
      x2 = x1 - (y1 >>> n);  y2 = y1 + (x1 >>> n);
      z_next = z - AW'(ATAN[m]) - AW'(ATAN[n]);
    end else begin
      x1 = x  + (y  >>> m);  y1 = y  - (x  >>> m);
      x2 = x1 + (y1 >>> n);  y2 = y1 - (x1 >>> n);
      z_next = z + AW'(ATAN[m]) + AW'(ATAN[n]);
    end
    cs = 6'({m, 1'b0}) + 6'd1;
    x3 = x2 - (x2 >>> cs);
    y3 = y2 - (y2 >>> cs);
  end

  // ------------------------------------------------ scale stage
  localparam int unsigned T_STOP = 1 << (EF - W - 1);   // 2^-(W+1)
  logic [TWD-2:0]        ta;      // |T|
  logic [4:0]            t_pos;   // leading one of |T|
  logic [4:0]            j0, j1, js;
  logic signed [TWD-1:0] l0, l1, d0, d1, l_sel;
  logic signed [DI-1:0]  xs, ys;
  logic                  t_done;
  always_comb begin
    ta = t_acc[TWD-1] ? (TWD-1)'(-t_acc) : (TWD-1)'(t_acc);
    t_pos = '0;
    for (int b = 0; b < int'(TWD) - 1; b++) if (ta[b]) t_pos = 5'(b);
    t_done = (ta < (TWD-1)'(T_STOP));
    j0 = (t_pos >= 5'(EF)) ? 5'd1 : 5'(EF) - t_pos;
    j1 = j0 + 5'd1;
    l0 = t_acc[TWD-1] ? LN1M[j0] : LN1P[j0];
    l1 = t_acc[TWD-1] ? LN1M[j1] : LN1P[j1];
    d0 = t_acc - l0;
    d1 = t_acc - l1;
    if ((d0[TWD-1] ? -d0 : d0) <= (d1[TWD-1] ? -d1 : d1)) begin
      js = j0; l_sel = l0;
    end else begin
      js = j1; l_sel = l1;
    end
    if (t_acc[TWD-1]) begin
      xs = x - (x >>> js);  ys = y - (y >>> js);
    end else begin
      xs = x + (x >>> js);  ys = y + (y >>> js);
    end
  end

  function automatic logic signed [W-1:0] to_out(logic signed [DI-1:0] v);
    logic signed [DI:0] r;
    r = ((DI+1)'(v) + (DI+1)'(1 << (G - 1))) >>> G;
    if (r > (DI+1)'(2 ** (W - 1) - 1))   return W'(2 ** (W - 1) - 1);
    else if (r < -(DI+1)'(2 ** (W - 1))) return W'(-(2 ** (W - 1)));
    else                                 return W'(r);
  endfunction

  assign busy = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      x <= '0; y <= '0; z <= '0; t_acc <= '0; it <= '0; sc <= '0;
      valid <= 1'b0; x_out <= '0; y_out <= '0; iters <= '0; sc_iters <= '0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        C_IDLE: if (start) begin
          x     <= DI'(x_in) <<< G;
          y     <= DI'(y_in) <<< G;
          z     <= theta;
          t_acc <= '0;
          it    <= '0;
          sc    <= '0;
          state <= C_ITER;
        end
        C_ITER: begin
          if (z == '0 || it == 4'(MAX_IT)) begin
            state <= C_SCALE;
          end else begin
            x     <= x3;
            y     <= y3;
            z     <= z_next;
            t_acc <= t_acc + ERR_M[m] + LNCOS[n];
            it    <= it + 1'b1;
          end
        end
        C_SCALE: begin
          if (t_done || sc == 4'(MAX_SC)) begin
            x_out    <= to_out(x);
            y_out    <= to_out(y);
            iters    <= it;
            sc_iters <= sc;
            valid    <= 1'b1;
            state    <= C_IDLE;
          end else begin
            x     <= xs;
            y     <= ys;
            t_acc <= t_acc - l_sel;
            sc    <= sc + 1'b1;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
