// tb_vl_dag: steps the data address generator through one whole transform
// of every length and checks, butterfly by butterfly, the four addresses
// against the address equation {bf[10:11-K], symbol, bf[10-K:0]} with a
// stage sequence worked out here (K = 0,1,3,5,... with a radix-2 first
// stage for 8192/2048/512 points; K = 0,2,4,... otherwise), the radix-2,
// last-butterfly and last-stage flags, the done pulse, the number of
// butterflies ((L/4) per stage), and that every stage touches each of the
// L addresses of the transform exactly once. A few cycles with step=0 are
// inserted to check that the generator holds.
`timescale 1ns/1ps
module tb_vl_dag;
  import fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  fft_mode_e mode = MODE_64;
  logic clear = 1'b0, step = 1'b0;
  logic [ADDR_W-1:0] addr_s, addr_t, addr_u, addr_v;
  logic [BFC_W-1:0] bf_cnt;
  logic [STG_W-1:0] stage_cnt;
  logic radix2, last_bf, last_stage, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  vl_dag dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit touched [NMAX];

  task automatic run(fft_mode_e m);
    int lg, c, L, nst, ks [8], total;
    lg = int'(mode_log2(m));
    c = 13 - lg;
    L = 1 << lg;
    nst = 0;
    if (lg % 2 == 1) begin
      ks[0] = 0;
      nst = 1;
      for (int k = 1; k < lg; k += 2) ks[nst++] = k;
    end else begin
      for (int k = 0; k < lg; k += 2) ks[nst++] = k;
    end
    @(negedge clk);
    mode = m; clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    total = 0;
    for (int si = 0; si < nst; si++) begin
      int k;
      k = ks[si];
      for (int a = 0; a < NMAX; a++) touched[a] = 1'b0;
      for (int i = 0; i < L / 4; i++) begin
        int b, hi, lo, e [4];
        logic [ADDR_W-1:0] got [4];
        b  = i << c;
        hi = b >> (11 - k);
        lo = b & ((1 << (11 - k)) - 1);
        for (int s = 0; s < 4; s++) e[s] = (hi << (13 - k)) | (s << (11 - k)) | lo;
        got = '{addr_s, addr_t, addr_u, addr_v};
        checks++;
        if (int'(stage_cnt) != k || int'(bf_cnt) != b ||
            radix2 != (k == 0 && lg % 2 == 1) ||
            last_bf != (i == L / 4 - 1) || last_stage != (si == nst - 1)) begin
          failures++;
          if (failures < 5) $display("L=%0d K=%0d i=%0d: counters/flags wrong (K=%0d bf=%0d)", L, k, i, stage_cnt, bf_cnt);
        end
        for (int s = 0; s < 4; s++) begin
          checks++;
          if (int'(got[s]) != e[s]) begin
            failures++;
            if (failures < 5) $display("L=%0d K=%0d i=%0d port %0d: %0d want %0d", L, k, i, s, got[s], e[s]);
          end
          touched[got[s]] = 1'b1;
        end
        step = 1'b1;
        if (i == 7) begin   // hold for two cycles
          step = 1'b0;
          @(negedge clk);
          @(negedge clk);
          step = 1'b1;
        end
        @(negedge clk);
        total++;
        step = 1'b0;
        checks++;
        if (done != (si == nst - 1 && i == L / 4 - 1)) begin
          failures++;
          $display("L=%0d: done=%0d at stage %0d bf %0d", L, done, si, i);
        end
      end
      for (int a = 0; a < NMAX; a++) begin
        if ((a % (1 << c)) == 0) begin
          checks++;
          if (!touched[a]) begin
            failures++;
            if (failures < 5) $display("L=%0d K=%0d: address %0d not touched", L, k, a);
          end
        end
      end
    end
    checks++;
    if (stage_cnt != 0 || bf_cnt != 0 || total != nst * L / 4) begin
      failures++;
      $display("L=%0d: not back at 0 after %0d butterflies", L, total);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(MODE_64);
    run(MODE_256);
    run(MODE_512);
    run(MODE_1024);
    run(MODE_2048);
    run(MODE_4096);
    run(MODE_8192);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
