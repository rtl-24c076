// sib_mux: one MUX_n cell of the shift-insert-bypass multiplexer array.
//
// Produces bit n of a data address from four candidates, chosen by a
// two-bit control: insert symbol bit 0 (I0), insert symbol bit 1 (I1),
// bypass butterfly counter bit n (BP), or shift by two, i.e. take
// butterfly counter bit n-2 (S2). The four functions are those of the
// published MUX_n cell; the control encoding (sib_sel_e) is this design's.
// Purely combinational.
module sib_mux
  import fft_pkg::*;
(
  input  logic     sym0,     // symbol bit 0
  input  logic     sym1,     // symbol bit 1
  input  logic     bypass,   // butterfly counter bit n
  input  logic     shift2,   // butterfly counter bit n-2
  input  sib_sel_e sel,      // MUX_con_n
  output logic     q         // data address bit n
);
  always_comb begin
    unique case (sel)
      SIB_I0: q = sym0;
      SIB_I1: q = sym1;
      SIB_BP: q = bypass;
      SIB_S2: q = shift2;
    endcase
  end
endmodule
