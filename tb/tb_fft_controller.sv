// tb_fft_controller: drives the controller with a simple stand-in for the
// address generator (a butterfly counter that raises last_bf every L/4
// issues and last_stage in the final stage) and checks the sequence:
// L input samples accepted with load addresses n*2^c (with a gap in
// in_valid), L/4 issues per stage, exactly DRAIN_CYC stall cycles between
// stages and before unloading, L unload reads at bit-reversed addresses
// in natural k order, the done pulse, and busy returning low.
`timescale 1ns/1ps
module tb_fft_controller;
  import fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, in_valid = 1'b0;
  fft_mode_e mode_in = MODE_64, mode;
  logic in_ready, ld_we, dag_clear, issue, stall, ul_re, busy, done;
  logic [ADDR_W-1:0] ld_addr, ul_addr, ul_k;
  logic dag_last_bf, dag_last_stage;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fft_controller dut (.*);

  // stand-in address generator
  int bf = 0, st = 0, L = 64, nst = 3;
  assign dag_last_bf    = (bf == L / 4 - 1);
  assign dag_last_stage = (st == nst - 1);
  always @(posedge clk) begin
    if (dag_clear) begin bf <= 0; st <= 0; end
    else if (issue) begin
      if (bf == L / 4 - 1) begin bf <= 0; st <= (st == nst - 1) ? 0 : st + 1; end
      else bf <= bf + 1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rev13(int v);
    int r = 0;
    for (int b = 0; b < 13; b++) if (v & (1 << b)) r |= 1 << (12 - b);
    return r;
  endfunction

  task automatic run(fft_mode_e m);
    int lg, c, n, issues, stalls, reads, cyc;
    lg = int'(mode_log2(m));
    c = 13 - lg;
    L = 1 << lg;
    nst = (lg + 1) / 2;
    @(negedge clk);
    mode_in = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (mode != m || !in_ready) begin failures++; $display("mode not latched / not loading"); end
    n = 0;
    while (n < L) begin
      in_valid = (n % 13 != 7) || !ld_we;   // one idle cycle now and then
      if (n % 13 == 7 && in_valid) in_valid = ($urandom_range(1) == 1);
      #1;
      if (ld_we) begin
        checks++;
        if (int'(ld_addr) != (n << c)) begin
          failures++;
          if (failures < 5) $display("L=%0d load %0d at %0d", L, n, ld_addr);
        end
        n++;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    issues = 0; stalls = 0; reads = 0; cyc = 0;
    while (!issue) @(negedge clk);
    while (!done) begin
      if (issue) issues++;
      if (stall) stalls++;
      if (ul_re) begin
        checks++;
        if (int'(ul_k) != reads || int'(ul_addr) != rev13(reads)) begin
          failures++;
          if (failures < 5) $display("L=%0d read k=%0d addr=%0d", L, ul_k, ul_addr);
        end
        reads++;
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (issues != nst * L / 4 || stalls != 3 * (nst - 1) || reads != L) begin
      failures++;
      $display("L=%0d: issues=%0d stalls=%0d reads=%0d", L, issues, stalls, reads);
    end
    // RUN + DRAIN + FLUSH + UNLOAD cycle count, from the first issue
    checks++;
    if (cyc != nst * L / 4 + 3 * nst + L) begin
      failures++;
      $display("L=%0d: %0d cycles from load end to done", L, cyc);
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(MODE_64);
    run(MODE_512);
    run(MODE_256);
    run(MODE_2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
