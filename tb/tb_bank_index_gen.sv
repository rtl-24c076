// tb_bank_index_gen: exhaustive check of the bank index over all 8192
// addresses against the sum of the radix-4 digits modulo 4, and of the
// conflict-free property: the four addresses of a butterfly (two address
// bits varied) always land in four different banks.
module tb_bank_index_gen;
  import fft_pkg::*;
  logic [ADDR_W-1:0] addr;
  logic [1:0]        bank;
  int checks = 0, failures = 0;

  bank_index_gen dut (.*);

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
    for (int a = 0; a < NMAX; a++) begin
      addr = ADDR_W'(a);
      #1;
      checks++;
      if (int'(bank) != digsum(a)) begin
        failures++;
        if (failures < 5) $display("addr=%0d bank=%0d exp=%0d", a, bank, digsum(a));
      end
    end
    // four addresses differing in bits p+1,p: distinct banks through the DUT
    for (int p = 0; p < 12; p++) begin
      for (int r = 0; r < 50; r++) begin
        int base;
        logic [3:0] used;
        base = int'($urandom_range(NMAX - 1)) & ~(3 << p);
        used = '0;
        for (int sym = 0; sym < 4; sym++) begin
          addr = ADDR_W'(base | (sym << p));
          #1;
          used[bank] = 1'b1;
        end
        checks++;
        if (used != 4'b1111) begin
          failures++;
          $display("conflict at base=%0d p=%0d", base, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
