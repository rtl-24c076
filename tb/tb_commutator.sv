// tb_commutator: checks both commutator directions against the eight
// configurations of the published commutator table (bank of ports A..D for
// M = 00..11, power-of-4 column and first-stage non-power-of-4 column,
// written out below as literal lists), and checks that the bank each port
// is routed to equals the bank index (digit sum mod 4) of that port's
// address for butterflies generated by the address equation at every stage
// position.
module tb_commutator;
  logic [1:0]  bank_m;
  logic        straddle;
  logic [7:0]  din [4];
  logic [7:0]  to_banks [4];
  logic [7:0]  from_banks [4];
  int checks = 0, failures = 0;

  commutator #(.W(8), .TO_BANKS(1'b1)) dut_w (.bank_m, .straddle, .din(din), .dout(to_banks));
  commutator #(.W(8), .TO_BANKS(1'b0)) dut_r (.bank_m, .straddle, .din(to_banks), .dout(from_banks));

  // bank of port A,B,C,D for each M: aligned and straddled columns
  int tab_al [4][4] = '{'{0, 1, 2, 3}, '{1, 2, 3, 0}, '{2, 3, 0, 1}, '{3, 0, 1, 2}};
  int tab_st [4][4] = '{'{0, 2, 1, 3}, '{1, 3, 2, 0}, '{2, 0, 3, 1}, '{3, 1, 0, 2}};

  function automatic int digsum(int a);
    int s = 0;
    for (int d = 0; d < 7; d++) s += (a >> (2 * d)) & 3;
    return s % 4;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      for (int st = 0; st < 2; st++) begin
        bank_m = 2'(m);
        straddle = st[0];
        for (int p = 0; p < 4; p++) din[p] = 8'(8'hA0 + p);
        #1;
        for (int p = 0; p < 4; p++) begin
          int b;
          b = st ? tab_st[m][p] : tab_al[m][p];
          checks++;
          if (to_banks[b] != din[p]) begin
            failures++;
            $display("M=%0d st=%0d port %0d not in bank %0d", m, st, p, b);
          end
          checks++;
          if (from_banks[p] != din[p]) begin
            failures++;
            $display("M=%0d st=%0d read port %0d wrong", m, st, p);
          end
        end
      end
    end
    // butterflies from the address equation: {hi, symbol, lo}, K = 0..11
    for (int k = 0; k < 12; k++) begin
      for (int r = 0; r < 100; r++) begin
        int b, hi, lo, a [4];
        b  = $urandom_range(2047);
        hi = b >> (11 - k);
        lo = b & ((1 << (11 - k)) - 1);
        for (int s = 0; s < 4; s++) a[s] = (hi << (13 - k)) | (s << (11 - k)) | lo;
        bank_m   = 2'(digsum(a[0]));
        straddle = ~k[0];
        for (int p = 0; p < 4; p++) din[p] = 8'(p);
        #1;
        for (int p = 0; p < 4; p++) begin
          checks++;
          if (to_banks[digsum(a[p])] != 8'(p)) begin
            failures++;
            if (failures < 5) $display("K=%0d bf=%0d port %0d misrouted", k, b, p);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
