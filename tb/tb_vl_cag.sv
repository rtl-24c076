// tb_vl_cag: checks the coefficient indices for random butterfly counter
// values at every stage count, in both modes, against integer arithmetic:
// n = (B * 2^K) mod 2048, 2n, 3n, and n + 2048 in a radix-2 stage.
module tb_vl_cag;
  import fft_pkg::*;
  logic [BFC_W-1:0]  bf_cnt;
  logic [STG_W-1:0]  stage_cnt;
  logic              radix2;
  logic [ADDR_W-1:0] idx1, idx2, idx3;
  int checks = 0, failures = 0;

  vl_cag dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 12; k++) begin
      for (int r = 0; r < 300; r++) begin
        int b, n, e3;
        b = $urandom_range(2047);
        bf_cnt = BFC_W'(b);
        stage_cnt = STG_W'(k);
        radix2 = (k == 0) && r[0];
        #1;
        n  = (b * (1 << k)) % 2048;
        e3 = radix2 ? n + 2048 : 3 * n;
        checks++;
        if (int'(idx1) != n || int'(idx2) != 2 * n || int'(idx3) != e3) begin
          failures++;
          if (failures < 5) $display("B=%0d K=%0d got %0d %0d %0d", b, k, idx1, idx2, idx3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
