// fft_controller: operation state controller of the variable-length FFT.
//
// One transform runs as: IDLE -> LOAD -> RUN/DRAIN ... -> FLUSH -> UNLOAD.
//  - LOAD accepts L input samples (L = selected length) in natural order, one
//    per in_valid, and gives each the data address n*2^c, so a shorter
//    transform occupies every 2^c-th word of the 8192-word space.
//  - RUN steps the data address generator by one butterfly per clock
//    (issue=1). The read / PE / write-back pipeline is three clocks deep,
//    so after the last butterfly of a stage the controller stalls for
//    DRAIN_CYC clocks (DRAIN), letting that stage's write-backs land before
//    the next stage reads. After the last stage it waits the same time
//    (FLUSH).
//  - UNLOAD reads the result in natural frequency order, k = 0..L-1, from
//    address bit-reverse13(k), since the in-place DIF leaves X[k] at the
//    bit-reversed position; out data follows one clock later.
// The text names this controller and the three pipeline parts it overlaps
// (memory read, PE, memory write); the states, the stall between stages and
// the load/unload order are this design's choices. start is accepted only in
// IDLE and latches the mode; done pulses in the cycle the last result is
// read, one clock before that sample leaves the processor.
module fft_controller
  import fft_pkg::*;
#(
  parameter int unsigned DRAIN_CYC = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  fft_mode_e         mode_in,
  output fft_mode_e         mode,        // latched length for this transform
  // input side
  input  logic              in_valid,
  output logic              in_ready,
  output logic              ld_we,       // write one input sample
  output logic [ADDR_W-1:0] ld_addr,
  // butterfly engine
  output logic              dag_clear,
  output logic              issue,       // step the DAG / issue a butterfly
  input  logic              dag_last_bf,
  input  logic              dag_last_stage,
  output logic              stall,       // pipeline drain between stages
  // output side
  output logic              ul_re,       // read one result
  output logic [ADDR_W-1:0] ul_addr,
  output logic [ADDR_W-1:0] ul_k,        // frequency index being read
  output logic              busy,
  output logic              done
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_DRAIN, S_FLUSH, S_UNLOAD} state_e;

  state_e           state;
  logic [ADDR_W-1:0] cnt;         // load / unload sample count
  logic [3:0]        dcnt;        // drain counter
  logic [ADDR_W-1:0] len_m1;

  assign len_m1 = ADDR_W'((1 << mode_log2(mode)) - 1);

  function automatic logic [ADDR_W-1:0] rev13(logic [ADDR_W-1:0] v);
    for (int b = 0; b < ADDR_W; b++) rev13[b] = v[ADDR_W-1-b];
  endfunction

  assign in_ready  = (state == S_LOAD);
  assign ld_we     = (state == S_LOAD) && in_valid;
  assign ld_addr   = cnt << mode_shift(mode);
  assign issue     = (state == S_RUN);
  assign stall     = (state == S_DRAIN);
  assign ul_re     = (state == S_UNLOAD);
  assign ul_addr   = rev13(cnt);
  assign ul_k      = cnt;
  assign busy      = (state != S_IDLE);
  assign dag_clear = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      mode  <= MODE_8192;
      cnt   <= '0;
      dcnt  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (start) begin
            mode  <= mode_in;
            state <= S_LOAD;
          end
        end
        S_LOAD: if (in_valid) begin
          if (cnt == len_m1) begin
            cnt   <= '0;
            state <= S_RUN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_RUN: if (dag_last_bf) begin
          dcnt  <= 4'(DRAIN_CYC - 1);
          state <= dag_last_stage ? S_FLUSH : S_DRAIN;
        end
        S_DRAIN: begin
          if (dcnt == '0) state <= S_RUN;
          else            dcnt  <= dcnt - 1'b1;
        end
        S_FLUSH: begin
          if (dcnt == '0) state <= S_UNLOAD;
          else            dcnt  <= dcnt - 1'b1;
        end
        S_UNLOAD: begin
          if (cnt == len_m1) begin
            cnt   <= '0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
