// vl_fft_core: in-place, memory-based variable-length FFT processor.
//
// Computes 8192, 4096, 2048, 1024, 512, 256 or 64-point DIF FFTs with one
// radix-2^2 butterfly PE that reads four complex words and writes four back
// every clock. Data live in four banks of 2048 words; the bank of each
// address is the sum of its radix-4 digits mod 4, which makes the four
// addresses of every butterfly fall in four different banks. A read and a
// write commutator route the PE ports to the banks. Lengths that are not a
// power of four start with a stage in which the PE runs as two radix-2
// butterflies.
//
// Pipeline (one butterfly per clock, three clocks from read to write-back):
//   c0  DAG gives s,t,u,v; bank index of s; commutated word addresses go to
//       the banks; coefficient indices go to the twiddle ROMs
//   c1  bank data -> read commutator -> input registers; twiddles registered
//   c2  PE -> output registers
//   c3  write commutator -> bank write ports
// Streaming interface: after start (which latches mode) the core takes L
// samples with in_valid/in_ready, computes, then outputs L results in
// natural frequency order with out_valid high for L consecutive clocks
// (out_k gives the index). The results are X[k]/L. done pulses with the
// last result.
module vl_fft_core
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  fft_mode_e         mode_in,
  input  logic              in_valid,
  output logic              in_ready,
  input  cplx_t             in_data,
  output logic              out_valid,
  output cplx_t             out_data,
  output logic [ADDR_W-1:0] out_k,
  output logic              busy,
  output logic              done,
  // observation of internal mechanisms
  output logic              issue,      // a butterfly is issued this clock
  output logic              radix2,     // issued butterfly is radix-2 mode
  output logic              stall       // pipeline drain between stages
);
  localparam int unsigned CW = $bits(cplx_t);

  // ---------------------------------------------------------------- control
  fft_mode_e         mode;
  logic              ld_we, ul_re, dag_clear, ctl_done;
  logic [ADDR_W-1:0] ld_addr, ul_addr, ul_k;
  logic              last_bf, last_stage, dag_done;
  logic [ADDR_W-1:0] a_s, a_t, a_u, a_v;
  logic [BFC_W-1:0]  bf_cnt;
  logic [STG_W-1:0]  stage_cnt;

  fft_controller u_ctl (
    .clk, .rst_n, .start, .mode_in, .mode,
    .in_valid, .in_ready, .ld_we, .ld_addr,
    .dag_clear, .issue, .dag_last_bf(last_bf), .dag_last_stage(last_stage),
    .stall, .ul_re, .ul_addr, .ul_k, .busy, .done(ctl_done)
  );

  vl_dag u_dag (
    .clk, .rst_n, .mode, .clear(dag_clear), .step(issue),
    .addr_s(a_s), .addr_t(a_t), .addr_u(a_u), .addr_v(a_v),
    .bf_cnt, .stage_cnt, .radix2, .last_bf, .last_stage, .done(dag_done)
  );

  // --------------------------------------------------------------- c0: read
  logic [1:0] m0;
  logic       straddle0;
  logic [BANK_AW-1:0] port_wa [4];
  logic [BANK_AW-1:0] bank_ra [4];

  bank_index_gen u_big (.addr(a_s), .bank(m0));
  // The symbol lies on a radix-4 digit boundary when K is odd.
  assign straddle0 = ~stage_cnt[0];

  assign port_wa[0] = a_s[ADDR_W-1:2];
  assign port_wa[1] = a_t[ADDR_W-1:2];
  assign port_wa[2] = a_u[ADDR_W-1:2];
  assign port_wa[3] = a_v[ADDR_W-1:2];

  commutator #(.W(BANK_AW), .TO_BANKS(1'b1)) u_addr_com (
    .bank_m(m0), .straddle(straddle0), .din(port_wa), .dout(bank_ra)
  );

  logic [ADDR_W-1:0] ci1, ci2, ci3;
  twid_t w1, w2, w3;
  vl_cag u_cag (.bf_cnt, .stage_cnt, .radix2, .idx1(ci1), .idx2(ci2), .idx3(ci3));
  twiddle_rom u_rom1 (.clk, .idx(ci1), .w(w1));
  twiddle_rom u_rom2 (.clk, .idx(ci2), .w(w2));
  twiddle_rom u_rom3 (.clk, .idx(ci3), .w(w3));

  // Load / unload bank selection.
  logic [1:0] ld_bank, ul_bank;
  bank_index_gen u_big_ld (.addr(ld_addr), .bank(ld_bank));
  bank_index_gen u_big_ul (.addr(ul_addr), .bank(ul_bank));

  // ------------------------------------------------------------ pipeline tags
  typedef struct packed {
    logic       valid;
    logic       radix2;
    logic [1:0] m;
    logic       straddle;
  } tag_t;

  tag_t tag1, tag2, tag3;
  logic [BANK_AW-1:0] wa1 [4], wa2 [4], wa3 [4];   // per-bank word addresses
  logic               ul_v1;
  logic [1:0]         ul_bank1;
  logic [ADDR_W-1:0]  ul_k1;
  logic               done1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag1 <= '0; tag2 <= '0; tag3 <= '0;
      ul_v1 <= 1'b0; ul_bank1 <= '0; ul_k1 <= '0; done1 <= 1'b0;
    end else begin
      tag1 <= '{valid: issue, radix2: radix2, m: m0, straddle: straddle0};
      tag2 <= tag1;
      tag3 <= tag2;
      ul_v1    <= ul_re;
      ul_bank1 <= ul_bank;
      ul_k1    <= ul_k;
      done1    <= ctl_done;
    end
  end

  always_ff @(posedge clk) begin
    wa1 <= bank_ra;
    wa2 <= wa1;
    wa3 <= wa2;
  end

  // ------------------------------------------------------------------ banks
  logic [CW-1:0]      rdata [4];
  logic [CW-1:0]      bank_wd [4];
  logic               b_re [4];
  logic [BANK_AW-1:0] b_ra [4];
  logic               b_we [4];
  logic [BANK_AW-1:0] b_wa [4];
  logic [CW-1:0]      b_wd [4];

  for (genvar b = 0; b < 4; b++) begin : g_bank
    always_comb begin
      if (ul_re) begin
        b_re[b] = (ul_bank == 2'(b));
        b_ra[b] = ul_addr[ADDR_W-1:2];
      end else begin
        b_re[b] = issue;
        b_ra[b] = bank_ra[b];
      end
      if (ld_we) begin
        b_we[b] = (ld_bank == 2'(b));
        b_wa[b] = ld_addr[ADDR_W-1:2];
        b_wd[b] = in_data;
      end else begin
        b_we[b] = tag3.valid;
        b_wa[b] = wa3[b];
        b_wd[b] = bank_wd[b];
      end
    end
    mem_bank #(.DEPTH(NMAX / BANKS), .W(CW)) u_bank (
      .clk, .re(b_re[b]), .raddr(b_ra[b]), .rdata(rdata[b]),
      .we(b_we[b]), .waddr(b_wa[b]), .wdata(b_wd[b])
    );
  end

  // ---------------------------------------------------- c1: read commutator
  logic [CW-1:0] port_rd [4];
  commutator #(.W(CW), .TO_BANKS(1'b0)) u_rd_com (
    .bank_m(tag1.m), .straddle(tag1.straddle), .din(rdata), .dout(port_rd)
  );

  cplx_t x_reg [4];
  twid_t w1_reg, w2_reg, w3_reg;
  always_ff @(posedge clk) begin
    for (int p = 0; p < 4; p++) x_reg[p] <= cplx_t'(port_rd[p]);
    w1_reg <= w1;
    w2_reg <= w2;
    w3_reg <= w3;
  end

  // ---------------------------------------------------------------- c2: PE
  cplx_t pe_y [4];
  r22_pe u_pe (
    .x(x_reg), .w1(w1_reg), .w2(w2_reg), .w3(w3_reg),
    .radix2(tag2.radix2), .y(pe_y)
  );

  logic [CW-1:0] y_reg [4];
  always_ff @(posedge clk) begin
    for (int p = 0; p < 4; p++) y_reg[p] <= CW'(pe_y[p]);
  end

  // ------------------------------------------------- c3: write commutator
  commutator #(.W(CW), .TO_BANKS(1'b1)) u_wr_com (
    .bank_m(tag3.m), .straddle(tag3.straddle), .din(y_reg), .dout(bank_wd)
  );

  // ----------------------------------------------------------------- output
  assign out_valid = ul_v1;
  assign out_data  = cplx_t'(rdata[ul_bank1]);
  assign out_k     = ul_k1;
  assign done      = done1;

  // Load and unload use the bank ports only while no butterfly is in
  // flight; the DAG finishes exactly when the last butterfly is issued.
  a_no_load_during_run: assert property (@(posedge clk) disable iff (!rst_n)
                                         !(ld_we && (issue || tag3.valid)));
  a_no_unload_during_run: assert property (@(posedge clk) disable iff (!rst_n)
                                           !(ul_re && (issue || tag3.valid)));
  a_dag_done_at_flush: assert property (@(posedge clk) disable iff (!rst_n)
                                        dag_done |-> !issue && busy);

endmodule
