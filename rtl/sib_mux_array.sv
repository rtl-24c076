// sib_mux_array: shift-insert-bypass (SIB) multiplexer array.
//
// Forms one 13-bit data address from the 11-bit butterfly counter and a
// two-bit symbol (00, 01, 10 or 11 for the PE ports s, t, u, v). Each
// address bit n has its own MUX_n cell; the controls MUX_con_n, shared by
// the four arrays and produced by the address generator from the stage
// count, make the bits above the symbol position "shift 2", the two bits at
// the symbol position "insert symbol", and the bits below "bypass". This
// replaces the barrel shifters of earlier designs by one 4:1 multiplexer per
// bit. Inputs that do not exist (bit n-2 for n<2, bit n for n>10) are tied
// to 0, as they are marked "x" in the published array. Combinational.
module sib_mux_array
  import fft_pkg::*;
(
  input  logic [BFC_W-1:0]  bf_cnt,          // butterfly counter [10:0]
  input  logic [1:0]        symbol,          // symbol [1:0]
  input  sib_sel_e          mux_con [ADDR_W], // MUX_con_0 .. MUX_con_12
  output logic [ADDR_W-1:0] addr            // data address [12:0]
);
  for (genvar n = 0; n < ADDR_W; n++) begin : g_bit
    logic bp, s2;
    if (n < BFC_W) begin : g_bp
      assign bp = bf_cnt[n];
    end else begin : g_nobp
      assign bp = 1'b0;
    end
    if (n >= 2) begin : g_s2
      assign s2 = bf_cnt[n-2];
    end else begin : g_nos2
      assign s2 = 1'b0;
    end
    sib_mux u_mux (
      .sym0  (symbol[0]),
      .sym1  (symbol[1]),
      .bypass(bp),
      .shift2(s2),
      .sel   (mux_con[n]),
      .q     (addr[n])
    );
  end
endmodule
