// vl_dag: variable-length data address generator for the radix-2^2/2 FFT.
//
// For every butterfly it produces the four in-place data addresses
// <s,t,u,v> of one radix-2^2 butterfly (or of two radix-2 butterfly pairs
// <s,u> and <t,v> in a radix-2 stage). With K the stage counter and j the
// butterfly counter bits, each address is
//     { j[10 : 11-K], symbol[1:0], j[10-K : 0] }
// that is, the counter split at bit 11-K with the symbol 00/01/10/11
// inserted. The split is made by four SIB multiplexer arrays sharing one
// MUX_con decoder.
//
// Counters (as in the published block diagram):
//  - butterfly counter [10:0] steps by 1,2,4,8,16,32 or 128 (mode select)
//    so that a shorter transform occupies every 2^c-th address;
//  - its carry-out goes through the carry-in controller into bit 0
//    (radix-2 stage, step 1) or bit 1 (radix-2^2 stage, step 2) of the
//    stage counter;
//  - a comparator resets all counters when the stage counter reaches
//    log2(length) (13,12,11,10,9,8,6).
// Lengths that are not a power of four run their first stage (K=0) in
// radix-2 mode; all others stages are radix-2^2.
//
// Timing: addresses are combinational from the registered counters. While
// step=1 the generator advances by one butterfly per clock. last_bf marks
// the last butterfly of a stage, last_stage the last stage; done pulses
// in the cycle after the final butterfly was stepped. clear (synchronous)
// and rst_n (asynchronous, active low) reset both counters; these are
// this design's choices.
module vl_dag
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  fft_mode_e         mode,        // mode select
  input  logic              clear,       // restart at butterfly 0, stage 0
  input  logic              step,        // advance to the next butterfly
  output logic [ADDR_W-1:0] addr_s,
  output logic [ADDR_W-1:0] addr_t,
  output logic [ADDR_W-1:0] addr_u,
  output logic [ADDR_W-1:0] addr_v,
  output logic [BFC_W-1:0]  bf_cnt,      // butterfly counter content
  output logic [STG_W-1:0]  stage_cnt,   // stage counter content K
  output logic              radix2,      // current stage is radix-2
  output logic              last_bf,     // last butterfly of this stage
  output logic              last_stage,  // this is the last stage
  output logic              done         // one-cycle pulse: FFT finished
);
  logic [BFC_W-1:0] bf_step;
  logic [BFC_W:0]   bf_sum;
  logic             carry;
  logic [STG_W-1:0] stage_next;
  logic [STG_W-1:0] stage_max;
  logic             cmp_eq;

  // Mode-select multiplexer: counter step 2^c.
  assign bf_step = BFC_W'(1) << mode_shift(mode);
  assign bf_sum  = {1'b0, bf_cnt} + {1'b0, bf_step};
  assign carry   = bf_sum[BFC_W];

  // Stage maximum multiplexer and comparator.
  assign stage_max = mode_log2(mode);
  assign radix2    = (stage_cnt == '0) && !mode_pow4(mode);

  // Carry-in controller: the carry enters the stage counter at bit 0 in a
  // radix-2 stage and at bit 1 in a radix-2^2 stage.
  assign stage_next = stage_cnt + (radix2 ? STG_W'(carry) : STG_W'({carry, 1'b0}));
  assign cmp_eq     = (stage_next == stage_max);

  assign last_bf    = carry;
  assign last_stage = ((stage_cnt + (radix2 ? STG_W'(1) : STG_W'(2))) == stage_max);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bf_cnt    <= '0;
      stage_cnt <= '0;
      done      <= 1'b0;
    end else if (clear) begin
      bf_cnt    <= '0;
      stage_cnt <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (step) begin
        if (carry && cmp_eq) begin
          // Comparator: reset all counters at the end of the last stage.
          bf_cnt    <= '0;
          stage_cnt <= '0;
          done      <= 1'b1;
        end else begin
          bf_cnt    <= bf_sum[BFC_W-1:0];
          stage_cnt <= stage_next;
        end
      end
    end
  end

  // MUX_con decoder: symbol occupies address bits 12-K and 11-K.
  sib_sel_e mux_con [ADDR_W];
  always_comb begin
    for (int n = 0; n < ADDR_W; n++) begin
      if (n > (ADDR_W - 1) - int'(stage_cnt))       mux_con[n] = SIB_S2;
      else if (n == (ADDR_W - 1) - int'(stage_cnt)) mux_con[n] = SIB_I1;
      else if (n == (ADDR_W - 2) - int'(stage_cnt)) mux_con[n] = SIB_I0;
      else                                          mux_con[n] = SIB_BP;
    end
  end

  sib_mux_array u_sib00 (.bf_cnt(bf_cnt), .symbol(2'b00), .mux_con(mux_con), .addr(addr_s));
  sib_mux_array u_sib01 (.bf_cnt(bf_cnt), .symbol(2'b01), .mux_con(mux_con), .addr(addr_t));
  sib_mux_array u_sib10 (.bf_cnt(bf_cnt), .symbol(2'b10), .mux_con(mux_con), .addr(addr_u));
  sib_mux_array u_sib11 (.bf_cnt(bf_cnt), .symbol(2'b11), .mux_con(mux_con), .addr(addr_v));

endmodule
