// tb_dif_fir: tests both polyphase branches (PHASE 0: 32 even taps, PHASE 1:
// 31 odd taps).
//  1. The coefficient table is recomputed here from its defining formula
//     (Kaiser-windowed sinc, fc = 0.125, beta = 6.5, scaled to 2044) and must
//     match the shared table exactly.
//  2. An impulse must reproduce the branch's taps, starting exactly one clock
//     after the sample enters (the branch latency).
//  3. Random full-range input, including runs of +/-511 and -512 that give the
//     largest results, is compared with a direct convolution.
`timescale 1ns/1ps
module tb_dif_fir;
  import dif_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [9:0]  din = '0;
  logic signed [23:0] y0, y1;

  dif_fir #(.PHASE(0)) dut0 (.clk, .rst, .din, .dout(y0));
  dif_fir #(.PHASE(1)) dut1 (.clk, .rst, .din, .dout(y1));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xh [0:2047];

  function automatic real bessel_i0(real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 40; k++) begin
      t = t * (x / (2.0 * k)) * (x / (2.0 * k));
      s = s + t;
    end
    return s;
  endfunction

  function automatic int expected(int phase, int e);
    int s = 0;
    for (int k = 0; 2*k + phase < 63; k++)
      if (e - 1 - k >= 0) s += H[2*k + phase] * xh[e - 1 - k];
    return s;
  endfunction

  initial begin
    real hr [63];
    real tot, r, pi;
    pi = 3.14159265358979;
    tot = 0.0;
    for (int n = 0; n < 63; n++) begin
      real t, win, sn;
      t = n - 31;
      r = t / 31.0;
      win = bessel_i0(6.5 * $sqrt(1.0 - r*r)) / bessel_i0(6.5);
      sn = (n == 31) ? 0.25 : $sin(pi * 0.25 * t) / (pi * t);
      hr[n] = sn * win;
      tot += hr[n];
    end
    for (int n = 0; n < 63; n++) begin
      int q;
      q = $rtoi(hr[n] / tot * 2044.0 + ((hr[n] >= 0) ? 0.5 : -0.5));
      checks++;
      if (q != H[n]) begin
        failures++;
        $display("tap %0d: formula %0d table %0d", n, q, H[n]);
      end
    end

    for (int e = 0; e < 2048; e++) xh[e] = 0;
    xh[10] = 1;                                   // impulse
    xh[100] = -512;                               // negative full-scale impulse
    for (int e = 200; e < 1800; e++) xh[e] = $urandom_range(0, 1023) - 512;
    for (int e = 1000; e < 1064; e++) xh[e] = 511;
    for (int e = 1100; e < 1164; e++) xh[e] = -512;
    for (int e = 1200; e < 1264; e++) xh[e] = (H[2*((1263 - e) % 32)] < 0) ? -512 : 511;

    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int e = 0; e < 1900; e++) begin
      din = 10'(xh[e]);
      @(posedge clk);
      #1;
      // after this edge the output holds the sum through sample e
      checks++;
      if (y0 != 24'(expected(0, e + 1)) || y1 != 24'(expected(1, e + 1))) begin
        failures++;
        if (failures < 8) $display("e=%0d got %0d %0d exp %0d %0d", e, y0, y1, expected(0, e+1), expected(1, e+1));
      end
      if (e >= 10 && e < 10 + 32) begin
        checks++;
        if (y0 != 24'(H[2*(e-10)])) failures++;
        if (e < 10 + 31 && y1 != 24'(H[2*(e-10)+1])) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
