// tb_mem_bank: fills a bank with random words, reads them back with the
// one-clock read latency, and checks that a simultaneous read and write of
// different words do not disturb each other.
`timescale 1ns/1ps
module tb_mem_bank;
  localparam int DEPTH = 2048;
  logic        clk = 1'b0;
  logic        re = 1'b0, we = 1'b0;
  logic [10:0] raddr = '0, waddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mem_bank #(.DEPTH(DEPTH), .W(32)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 11'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int r = 0; r < 3000; r++) begin
      int a, b;
      a = $urandom_range(DEPTH - 1);
      b = (a + 1 + $urandom_range(DEPTH - 2)) % DEPTH;
      @(negedge clk);
      re = 1'b1; raddr = 11'(a);
      we = r[0]; waddr = 11'(b); wdata = $urandom;
      @(posedge clk);
      if (we) model[b] = wdata;
      #1;
      checks++;
      if (rdata != model[a]) begin
        failures++;
        if (failures < 5) $display("addr %0d read %h want %h", a, rdata, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
