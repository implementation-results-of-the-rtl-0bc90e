// tb_dif_noise: wideband-noise measurement of the whole processor.
//
// Uniform white noise in -200..200 drives the ADC inputs.  (Noise over the
// full 10-bit range would push the filter results past the 20 bits that the
// output keeps often enough to wrap; the level here keeps them 5 standard
// deviations inside.)  The output power spectrum is estimated at 100 output
// frequencies (-50..+49 MHz, 1 MHz apart) by averaging NSEG = 100
// Hann-windowed periodograms of SEGLEN = 32768 output samples each.
// The expected spectrum is computed here from the filter taps: white
// noise of variance s2 stays white after the fs/4 mixing, so the output
// density at f_out is
//   (s2 / 2) * (|H(f_out - 25)|^2 + |H(f_out - 125)|^2) / 16^2
// (H in MHz at 200 MS/s, the two terms being the decimation aliases, 1/16 the
// bit selection), plus the truncation noise of the bit selection.
//
// Checks: within 45 dB of the peak the estimate must lie within -2.2 / +2 dB
// of the expectation (the averaging spread is about 0.4 dB); further down it
// must stay more than 40 dB below the peak, so the stop band and its side
// lobes are visible.  The pass band must be the upper half of the output band
// (F_out around +1..+48 MHz) and the mirrored half must be empty.
`timescale 1ns/1ps
module tb_dif_noise;
  import dif_pkg::*;

  localparam int SEGLEN = 32768;
  localparam int NSEG   = 100;
  localparam int NF     = 100;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [9:0] dm = '0, dn = '0;
  logic signed [15:0] out_real, out_imag;
  logic control1, control2;

  digital_if_top dut (
    .dra(clk), .drb(clk), .rst, .raw_mode(1'b0), .dm, .dn,
    .out_real, .out_imag, .control1, .control2
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real rot_c [NF];   // per-sample rotation of each analysis frequency
  real rot_s [NF];
  real ph_c  [NF];   // current phasor exp(j*w*t)
  real ph_s  [NF];
  real psd  [NF];
  real acc_r [NF];
  real acc_i [NF];

  function automatic real hpow(real f);
    real re = 0.0, im = 0.0;
    for (int m = 0; m < 63; m++) begin
      re += H[m] * $cos(2.0 * PI * f / 200.0 * m);
      im -= H[m] * $sin(2.0 * PI * f / 200.0 * m);
    end
    return re*re + im*im;
  endfunction

  initial begin
    real w2, s2, expv, peak, d, wk, xr, xi;
    int k;
    w2 = 0.0;
    for (int t = 0; t < SEGLEN; t++) begin
      real wt;
      wt = 0.5 - 0.5 * $cos(2.0 * PI * t / SEGLEN);
      w2 += wt * wt;
    end
    for (int f = 0; f < NF; f++) begin
      rot_c[f] = $cos(2.0 * PI * (f - 50) / 100.0);
      rot_s[f] = $sin(2.0 * PI * (f - 50) / 100.0);
    end
    for (int f = 0; f < NF; f++) psd[f] = 0.0;

    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 64 + NSEG * SEGLEN; c++) begin
      dn = 10'($urandom_range(0, 400) - 200);
      dm = 10'($urandom_range(0, 400) - 200);
      @(posedge clk);
      #1;
      if (c >= 64) begin
        k = (c - 64) % SEGLEN;
        if (k == 0) for (int f = 0; f < NF; f++) begin
          acc_r[f] = 0.0; acc_i[f] = 0.0; ph_c[f] = 1.0; ph_s[f] = 0.0;
        end
        wk = 0.5 - 0.5 * $cos(2.0 * PI * k / SEGLEN);
        xr = wk * out_real;
        xi = wk * out_imag;
        for (int f = 0; f < NF; f++) begin
          real nc;
          acc_r[f] += xr * ph_c[f] + xi * ph_s[f];
          acc_i[f] += xi * ph_c[f] - xr * ph_s[f];
          nc       = ph_c[f] * rot_c[f] - ph_s[f] * rot_s[f];
          ph_s[f]  = ph_s[f] * rot_c[f] + ph_c[f] * rot_s[f];
          ph_c[f]  = nc;
        end
        if (k == SEGLEN - 1)
          for (int f = 0; f < NF; f++) psd[f] += (acc_r[f]*acc_r[f] + acc_i[f]*acc_i[f]) / NSEG;
      end
      @(negedge clk);
    end

    s2 = (401.0 * 401.0 - 1.0) / 12.0;
    peak = 0.0;
    for (int f = 0; f < NF; f++) if (psd[f] > peak) peak = psd[f];
    for (int f = 0; f < NF; f++) begin
      real fo;
      fo = f - 50;
      expv = w2 * ((s2 / 2.0) * (hpow(fo - 25.0) + hpow(fo - 125.0)) / 256.0 + 1.0 / 6.0);
      d = 10.0 * $log10(psd[f] / expv);
      checks++;
      if (10.0 * $log10(expv / peak) > -45.0) begin
        if (d > 2.0 || d < -2.2) begin
          failures++;
          $display("f_out %0d MHz: measured %0.2f dB vs expected (%0.2f dB)", f - 50, 10.0*$log10(psd[f]/peak), 10.0*$log10(expv/peak));
        end
      end else if (10.0 * $log10(psd[f] / peak) > -40.0) begin
        failures++;
        $display("f_out %0d MHz: stop band only %0.2f dB down", f - 50, 10.0*$log10(psd[f]/peak));
      end
      if ((f - 50) % 5 == 0)
        $display("f_out %3d MHz: %7.2f dB (expected %7.2f dB)", f - 50, 10.0*$log10(psd[f]/peak), 10.0*$log10(expv/peak));
    end
    // pass band in the upper half, nothing in the mirrored half
    checks++;
    if (10.0*$log10(psd[50 + 25] / peak) < -1.0 || 10.0*$log10(psd[50 - 25] / peak) > -40.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (64 + NSEG * SEGLEN + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
