// tb_cordic_rotator: runs the rotator at the three published accuracies,
// W = 8, 12 and 16 bits, side by side (one instance each).
//
// For each width it rotates a full-scale vector (just under 2.0) by every
// representable angle in [-pi/4, pi/4], then 500 random vectors by random
// angles, and compares the result with the exact rotation computed here in
// floating point, allowing 2 LSB of the W-bit output (the rounding of the
// arctangent words alone accounts for up to about 1.3 LSB at full scale).
// A zero angle must return the input after zero iterations. For angles 0..pi/4 the number of
// iterations of the angle decomposition is collected: the worst case must
// equal the published 3 / 4 / 5 and the average must be within 0.05 of
// the published 1.835 / 2.727 / 3.644. For W=12 the stored arctangent
// words must be the published 950, 502, 255, 128 (units of 2^-11). The
// scale stage must converge before its step limit on every rotation; its
// step counts are printed next to the published ones for comparison. And
// every computed ROM word is compared with real-arithmetic values.
`timescale 1ns/1ps
module tb_cordic_rotator;
  localparam int NWID = 3;
  localparam int WS [NWID]       = '{8, 12, 16};
  localparam int WORST [NWID]    = '{3, 4, 5};
  localparam real AVG [NWID]     = '{1.835, 2.727, 3.644};
  localparam real SCAVG [NWID]   = '{1.786, 3.092, 4.153};
  localparam int SCWORST [NWID]  = '{4, 5, 6};

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int finished = 0;

  always #5 clk = ~clk;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  end

  for (genvar g = 0; g < NWID; g++) begin : g_w
    localparam int W  = WS[g];
    localparam int AF = W - 1;
    localparam int TOP = int'(3.14159265358979 / 4.0 * (2.0 ** AF));
    logic start = 1'b0;
    logic signed [W-1:0] x_in = '0, y_in = '0, x_out, y_out;
    logic signed [W:0]   theta = '0;
    logic busy, valid;
    logic [3:0] iters, sc_iters;

    cordic_rotator #(.W(W)) dut (.*);

    int sc_sum = 0, sc_max = 0, sc_cnt = 0;

    task automatic rot(int xv, int yv, int th, output int it);
      real a, ex, ey, xr, yr;
      @(negedge clk);
      x_in = W'(xv); y_in = W'(yv); theta = (W+1)'(th); start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!valid) @(negedge clk);
      a  = real'(th) / (2.0 ** AF);
      xr = (xv * $cos(a) - yv * $sin(a));
      yr = (yv * $cos(a) + xv * $sin(a));
      ex = real'(x_out) - xr;
      ey = real'(y_out) - yr;
      checks++;
      if (ex > 2.0 || ex < -2.0 || ey > 2.0 || ey < -2.0) begin
        failures++;
        if (failures < 6) $display("W=%0d (%0d,%0d) by %0d: got (%0d,%0d) want (%f,%f)",
                                   W, xv, yv, th, x_out, y_out, xr, yr);
      end
      it = int'(iters);
      checks++;
      if (sc_iters >= 4'd10) begin
        failures++;
        $display("W=%0d scale decomposition did not converge for angle %0d", W, th);
      end
      sc_sum += int'(sc_iters); sc_cnt++;
      if (int'(sc_iters) > sc_max) sc_max = int'(sc_iters);
    endtask

    initial begin
      int it, maxit, sumit, cnt, half;
      real avg;
      maxit = 0; sumit = 0; cnt = 0;
      half = 2 ** (W - 2);
      @(posedge rst_n);
      if (W == 12) begin
        checks++;
        if (int'(dut.ATAN[1]) != 950 || int'(dut.ATAN[2]) != 502 || int'(dut.ATAN[3]) != 255 || int'(dut.ATAN[4]) != 128) begin
          failures++;
          $display("atan words %0d %0d %0d %0d", dut.ATAN[1], dut.ATAN[2], dut.ATAN[3], dut.ATAN[4]);
        end
      end
      // every ROM word against real arithmetic: stored arctangents to
      // 0.5 LSB, scale-error words to 0.5 LSB of 2^-(W+4)
      for (int i = 1; i < 20; i++) begin
        real ef, lc, em;
        ef = 2.0 ** (W + 4);
        lc = $ln($cos($atan(2.0 ** (-i)))) * ef;
        em = (lc / ef - $ln(1.0 - 2.0 ** (-(2 * i + 1)))) * ef;
        checks++;
        if ((i <= (W + 1) / 3 && rabs(real'(dut.ATAN[i]) - $atan(2.0 ** (-i)) * (2.0 ** AF)) > 0.5) ||
            rabs(real'(dut.LNCOS[i]) - lc) > 0.5 || rabs(real'(dut.ERR_M[i]) - em) > 0.5) begin
          failures++;
          $display("W=%0d ROM word %0d: atan %0d lncos %0d (%f) err %0d (%f)",
                   W, i, dut.ATAN[i], dut.LNCOS[i], lc, dut.ERR_M[i], em);
        end
      end
      rot(half / 2 + 3, -half / 3, 0, it);
      checks++;
      if (it != 0 || x_out != W'(half / 2 + 3) || y_out != W'(-half / 3)) begin
        failures++;
        $display("W=%0d zero angle: %0d iterations, (%0d,%0d)", W, it, x_out, y_out);
      end
      for (int th = -TOP; th <= TOP; th++) begin
        rot(2 * half - 1, 0, th, it);
        if (th >= 0) begin sumit += it; cnt++; if (it > maxit) maxit = it; end
      end
      for (int r = 0; r < 500; r++)
        rot($urandom_range(2 * half) - half, $urandom_range(2 * half) - half,
            $urandom_range(2 * TOP) - TOP, it);
      avg = real'(sumit) / cnt;
      checks++;
      if (maxit != WORST[g] || avg > AVG[g] + 0.05 || avg < AVG[g] - 0.05) begin
        failures++;
        $display("W=%0d: worst %0d (published %0d), average %0.3f (published %0.3f)",
                 W, maxit, WORST[g], avg, AVG[g]);
      end
      $display("W=%0d angles 0..pi/4: average %0.3f iterations (published %0.3f), worst %0d (published %0d)",
               W, avg, AVG[g], maxit, WORST[g]);
      $display("W=%0d scale steps: average %0.3f, worst %0d (published scale factor composition %0.3f, worst %0d)",
               W, real'(sc_sum) / sc_cnt, sc_max, SCAVG[g], SCWORST[g]);
      finished++;
    end
  end

  initial begin
    wait (finished == NWID);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
