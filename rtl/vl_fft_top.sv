// vl_fft_top: the designs of this project side by side.
//
//  - vl_fft_core: an in-place, memory-based variable-length FFT processor
//    (64 to 8192 points) built around one radix-2^2/2 butterfly, four
//    conflict-free memory banks, a multiplexer-based variable-length data
//    address generator and a shift-based coefficient index generator.
//  - cordic_rotator: a CORDIC vector rotator using leading-one detection,
//    recoding of the residual angle into double micro-rotations and
//    shift-and-add scale factor compensation, at 12-bit accuracy. It is a
//    stand-alone unit: the FFT core keeps its multiplier-based PE and
//    coefficient ROM.
//  - dct_channel_estimator: a pilot-aided channel estimator for one OFDM
//    symbol (1024 subcarriers, 32 pilots) that interpolates the pilot
//    estimates with a DCT and an extended IDCT.
//  - idct_dct_channel_estimator: the second estimator of the same kind,
//    same size, interpolating with an IDCT followed by a DCT.
// The units share only clock and reset; each brings its own ports out.
// They are not chained: in a receiver the FFT output at the pilot
// subcarriers would feed the estimator, but that glue is left to the user.
module vl_fft_top
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // FFT processor
  input  logic              fft_start,
  input  fft_mode_e         fft_mode,
  input  logic              fft_in_valid,
  output logic              fft_in_ready,
  input  cplx_t             fft_in_data,
  output logic              fft_out_valid,
  output cplx_t             fft_out_data,
  output logic [ADDR_W-1:0] fft_out_k,
  output logic              fft_busy,
  output logic              fft_done,
  output logic              fft_issue,
  output logic              fft_radix2,
  output logic              fft_stall,
  // CORDIC rotator
  input  logic              cor_start,
  input  logic signed [11:0] cor_x_in,
  input  logic signed [11:0] cor_y_in,
  input  logic signed [12:0] cor_theta,
  output logic              cor_busy,
  output logic              cor_valid,
  output logic signed [11:0] cor_x_out,
  output logic signed [11:0] cor_y_out,
  output logic [3:0]        cor_iters,
  output logic [3:0]        cor_sc_iters,
  // DCT-based channel estimator
  input  logic              ce_start,
  input  logic              ce_in_valid,
  output logic              ce_in_ready,
  input  cplx_t             ce_in_y,
  input  cplx_t             ce_in_p,
  output logic              ce_out_valid,
  output cplx_t             ce_out_h,
  output logic [9:0]        ce_out_k,
  output logic              ce_busy,
  output logic              ce_done,
  // IDCT/DCT-based channel estimator
  input  logic              ce2_start,
  input  logic              ce2_in_valid,
  output logic              ce2_in_ready,
  input  cplx_t             ce2_in_y,
  input  cplx_t             ce2_in_p,
  output logic              ce2_out_valid,
  output cplx_t             ce2_out_h,
  output logic [9:0]        ce2_out_k,
  output logic              ce2_busy,
  output logic              ce2_done
);
  vl_fft_core u_fft (
    .clk, .rst_n,
    .start(fft_start), .mode_in(fft_mode),
    .in_valid(fft_in_valid), .in_ready(fft_in_ready), .in_data(fft_in_data),
    .out_valid(fft_out_valid), .out_data(fft_out_data), .out_k(fft_out_k),
    .busy(fft_busy), .done(fft_done),
    .issue(fft_issue), .radix2(fft_radix2), .stall(fft_stall)
  );

  cordic_rotator #(.W(12)) u_cordic (
    .clk, .rst_n, .start(cor_start),
    .x_in(cor_x_in), .y_in(cor_y_in), .theta(cor_theta),
    .busy(cor_busy), .valid(cor_valid),
    .x_out(cor_x_out), .y_out(cor_y_out), .iters(cor_iters),
    .sc_iters(cor_sc_iters)
  );

  dct_channel_estimator #(.N(1024), .M(32)) u_chest (
    .clk, .rst_n, .start(ce_start),
    .in_valid(ce_in_valid), .in_ready(ce_in_ready),
    .in_y(ce_in_y), .in_p(ce_in_p),
    .out_valid(ce_out_valid), .out_h(ce_out_h), .out_k(ce_out_k),
    .busy(ce_busy), .done(ce_done)
  );

  idct_dct_channel_estimator #(.N(1024), .M(32)) u_chest2 (
    .clk, .rst_n, .start(ce2_start),
    .in_valid(ce2_in_valid), .in_ready(ce2_in_ready),
    .in_y(ce2_in_y), .in_p(ce2_in_p),
    .out_valid(ce2_out_valid), .out_h(ce2_out_h), .out_k(ce2_out_k),
    .busy(ce2_busy), .done(ce2_done)
  );
endmodule
