// tb_sib_mux_array: checks the shift-insert-bypass array for every stage
// position K = 0..11, every symbol and random butterfly counter values.
// Expected address: {bf[10:11-K], symbol, bf[10-K:0]}, computed with
// integer shifts and masks.
module tb_sib_mux_array;
  import fft_pkg::*;
  logic [BFC_W-1:0]  bf_cnt;
  logic [1:0]        symbol;
  sib_sel_e          mux_con [ADDR_W];
  logic [ADDR_W-1:0] addr;
  int checks = 0, failures = 0;

  sib_mux_array dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 12; k++) begin
      for (int n = 0; n < ADDR_W; n++)
        mux_con[n] = (n > 12 - k) ? SIB_S2 : (n == 12 - k) ? SIB_I1 :
                     (n == 11 - k) ? SIB_I0 : SIB_BP;
      for (int r = 0; r < 200; r++) begin
        int unsigned b, hi, lo, expv;
        b = $urandom_range(2047);
        if (r == 0) b = 0;
        if (r == 1) b = 2047;
        for (int sym = 0; sym < 4; sym++) begin
          bf_cnt = BFC_W'(b);
          symbol = 2'(sym);
          #1;
          hi = b >> (11 - k);
          lo = b & ((1 << (11 - k)) - 1);
          expv = (hi << (13 - k)) | (sym << (11 - k)) | lo;
          checks++;
          if (addr != ADDR_W'(expv)) begin
            failures++;
            if (failures < 5) $display("K=%0d bf=%0d sym=%0d addr=%0d exp=%0d", k, b, sym, addr, expv);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
