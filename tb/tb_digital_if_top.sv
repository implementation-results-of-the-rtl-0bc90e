// tb_digital_if_top: end-to-end test of the digital IF processor at its
// default (and only) size.
//
// The reference model works on the interleaved 200 MS/s stream, not on the
// polyphase branches the design uses: x[2j] = dn and x[2j+1] = dm of the pair
// taken at edge j; z[n] = x[n] * (+/-1 or +/-j) with pairs negated
// alternately; y[n] = sum_m h[m] z[n-m] over all 63 taps at n = 2j+1; the word
// w = bits [19:4] of y; out = j^(j+1) * w.  Output after edge j+6 must equal
// the model for pair j bit for bit.  Raw mode must show pair e-2 after edge e.
//
// Stimulus: random full-range samples (including -512, whose negation wraps),
// an impulse, a pattern that drives the filter beyond 20 bits so the output
// slice wraps, and raw-mode stretches with mode switches in between.  Each of
// these mechanisms is counted, and one that never happened is a failure.
`timescale 1ns/1ps
module tb_digital_if_top;
  import dif_pkg::*;

  localparam int NPAIR = 3000;

  logic clk = 1'b0, rst = 1'b1, raw_mode = 1'b0;
  logic signed [9:0] dm = '0, dn = '0;
  logic signed [15:0] out_real, out_imag;
  logic control1, control2;

  digital_if_top dut (
    .dra(clk), .drb(clk), .rst, .raw_mode, .dm, .dn,
    .out_real, .out_imag, .control1, .control2
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt_negm = 0, cnt_negn = 0, cnt_negwrap = 0, cnt_swap = 0;
  int cnt_negreal = 0, cnt_negimag = 0, cnt_slicewrap = 0, cnt_modesw = 0;
  int cnt_raw = 0, cnt_proc = 0;

  int xs [2*NPAIR+2];        // x[n], n = 2j (dn) and 2j+1 (dm)
  int mode_at [NPAIR+8];     // raw_mode during the cycle after edge j

  function automatic int wrap(int v, int bits);
    int m = 1 << bits;
    v = v & (m - 1);
    if (v >= m/2) v -= m;
    return v;
  endfunction

  function automatic int sgn(int j);   // sign applied to both samples of pair j
    return (j % 2 == 0) ? 1 : -1;
  endfunction

  // Real and imaginary parts of z[n]: n even -> imaginary, n odd -> real.
  function automatic int zval(int n);
    int j = n / 2;
    if (n < 2) return 0;                         // pairs before edge 1 are zero
    return (sgn(j) > 0) ? xs[n] : wrap(-xs[n], 10);
  endfunction

  task automatic model(input int j, output int re, output int im, output bit wrapped);
    longint yr = 0, yi = 0;
    int n = 2*j + 1;
    int wr, wi;
    for (int m = 0; m < 63; m++) begin
      if (n - m >= 0) begin
        if (((n - m) % 2) == 1) yr += longint'(H[m]) * zval(n - m);
        else                    yi += longint'(H[m]) * zval(n - m);
      end
    end
    wrapped = (yr >= (1 << 19)) || (yr < -(1 << 19)) || (yi >= (1 << 19)) || (yi < -(1 << 19));
    wr = wrap(int'(yr >>> 4), 16);
    wi = wrap(int'(yi >>> 4), 16);
    case ((j + 1) % 4)
      0: begin re = wr;            im = wi;            end
      1: begin re = wrap(-wi, 16); im = wr;            end
      2: begin re = wrap(-wr, 16); im = wrap(-wi, 16); end
      default: begin re = wi;      im = wrap(-wr, 16); end
    endcase
  endtask

  int e = 0;   // drb edges since reset was released

  // Stimulus: pair e+1 is put on the pins before edge e+1.
  function automatic int stim(int j);
    int v;
    if (j < 400)        v = $urandom_range(0, 1023) - 512;                      // random
    else if (j < 500)   v = 0;
    else if (j < 600)   v = 0;                                                  // impulse (set below)
    else if (j < 800)   v = 0;                                                  // overload (set below)
    else                v = $urandom_range(0, 1023) - 512;
    return v;
  endfunction

  initial begin
    for (int n = 0; n < 2*NPAIR+2; n++) xs[n] = 0;
    for (int j = 1; j < NPAIR; j++) begin
      xs[2*j]   = stim(j);
      xs[2*j+1] = stim(j);
    end
    // occasional most-negative codes
    for (int j = 20; j < 400; j += 37) xs[2*j+1] = -512;
    for (int j = 21; j < 400; j += 41) xs[2*j] = -512;
    // impulse at n = 1001 (pair 500, dm)
    xs[1001] = 100;
    // overload: for output pair 700 make every term of the real sum positive
    for (int m = 0; m < 63; m += 2) begin
      int n, jj, s;
      n = 2*700 + 1 - m;
      jj = n / 2;
      s = (H[m] > 0) ? 1 : (H[m] < 0) ? -1 : 0;
      xs[n] = 511 * s * sgn(jj);
    end
    for (int j = 0; j < NPAIR+8; j++) mode_at[j] = 0;
  end

  // Mode schedule: raw mode for pairs 1000..1299 and 2000..2099.
  function automatic bit raw_sched(int j);
    return (j >= 1000 && j < 1300) || (j >= 2000 && j < 2100);
  endfunction

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    dn = 10'(xs[2]); dm = 10'(xs[3]);
    forever begin
      @(posedge clk);
      e++;
      #1;
      // check output after edge e
      if (raw_mode) begin
        if (e >= 3) begin
          checks++; cnt_raw++;
          if (out_real != 16'(xs[2*(e-2)+1]) || out_imag != 16'(xs[2*(e-2)])) begin
            failures++;
            if (failures < 10) $display("raw mismatch e=%0d got %0d,%0d", e, out_real, out_imag);
          end
        end
      end else if (e >= 7) begin
        int re, im, j; bit wr;
        j = e - 6;
        model(j, re, im, wr);
        checks++; cnt_proc++;
        if (wr) cnt_slicewrap++;
        if ((j % 4) == 0 || (j % 4) == 2) if (re != 0 || im != 0) cnt_swap++;
        if (re != 0 && ((j + 1) % 4 == 1 || (j + 1) % 4 == 2)) cnt_negreal++;
        if (im != 0 && ((j + 1) % 4 == 2 || (j + 1) % 4 == 3)) cnt_negimag++;
        if (out_real != 16'(re) || out_imag != 16'(im)) begin
          failures++;
          if (failures < 10) $display("proc mismatch j=%0d got %0d,%0d exp %0d,%0d", j, out_real, out_imag, re, im);
        end
      end
      if (control1 != clk || control2 != 1'b0) begin failures++; end
      if (e >= NPAIR - 2) break;
      @(negedge clk);
      // input sign statistics for pair e+1
      if (sgn(e+1) < 0) begin
        if (xs[2*(e+1)+1] != 0) cnt_negm++;
        if (xs[2*(e+1)] != 0)   cnt_negn++;
        if (xs[2*(e+1)+1] == -512 || xs[2*(e+1)] == -512) cnt_negwrap++;
      end
      dn = 10'(xs[2*(e+1)]);
      dm = 10'(xs[2*(e+1)+1]);
      if (raw_sched(e+1) != raw_mode) cnt_modesw++;
      raw_mode = raw_sched(e+1);
    end
    $display("mechanisms: negM=%0d negN=%0d neg-wrap=%0d swap=%0d negreal=%0d negimag=%0d slice-wrap=%0d mode-switch=%0d raw=%0d proc=%0d",
             cnt_negm, cnt_negn, cnt_negwrap, cnt_swap, cnt_negreal, cnt_negimag, cnt_slicewrap, cnt_modesw, cnt_raw, cnt_proc);
    checks++; if (cnt_negm == 0) failures++;
    checks++; if (cnt_negn == 0) failures++;
    checks++; if (cnt_negwrap == 0) failures++;
    checks++; if (cnt_swap == 0) failures++;
    checks++; if (cnt_negreal == 0) failures++;
    checks++; if (cnt_negimag == 0) failures++;
    checks++; if (cnt_slicewrap == 0) failures++;
    checks++; if (cnt_modesw < 4) failures++;
    checks++; if (cnt_raw == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPAIR + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
