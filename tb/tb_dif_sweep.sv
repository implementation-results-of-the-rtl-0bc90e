// tb_dif_sweep: sinusoidal-input measurements of the whole processor.
//
// A real tone at F_in (100..200 MHz, in the second Nyquist zone of the
// 200 MS/s ADC) must come out as a complex tone at F_out = 175 - F_in MHz
// (modulo the 100 MS/s output rate).  For each F_in from 100 to 200 MHz in
// 1 MHz steps the testbench feeds NSAMP output periods of a tone of amplitude
// 500, correlates the output with a Hann-windowed complex exponential at
// F_out and compares the measured gain with the gain computed here from the
// filter taps, H(f) at f = 150 - F_in MHz (200 MS/s).
//
// Checks: the 135 MHz tone lands at +40 MHz, is the strongest of all 1 MHz
// output frequencies, and fills the 16-bit output (peak above 2^14); the gain
// matches the taps within 0.3 dB where it is above -40 dB, and stays below
// -40 dB elsewhere; the half-power band edges lie at 127-128 and 173-174 MHz;
// the pass-band ripple over 130..170 MHz is below 0.5 dB.  Inputs at 100, 150
// and 200 MHz, where both halves of the real tone land on the same output
// frequency, are skipped.
`timescale 1ns/1ps
module tb_dif_sweep;
  import dif_pkg::*;

  localparam int NSAMP = 32768;  // output samples per frequency
  localparam int SETTLE = 64;     // pipeline fill before measuring
  localparam real AMP = 500.0;
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
  real gain_db [100:200];
  real exp_db  [100:200];

  function automatic int sample(real fin, longint n);
    return $rtoi($floor(AMP * $cos(2.0 * PI * fin / 200.0 * real'(n)) + 0.5));
  endfunction

  // |H(f)| / sum(h), f in MHz at 200 MS/s
  function automatic real hmag(real f);
    real re = 0.0, im = 0.0, s = 0.0;
    for (int m = 0; m < 63; m++) begin
      re += H[m] * $cos(2.0 * PI * f / 200.0 * m);
      im -= H[m] * $sin(2.0 * PI * f / 200.0 * m);
      s  += H[m];
    end
    return $sqrt(re*re + im*im) / s;
  endfunction

  // Measure the output tone at fout (MHz, 100 MS/s) while driving fin.
  task automatic measure(input real fin, input real fout, output real amp, output int peak);
    real cr = 0.0, ci = 0.0, ws = 0.0, w, ph;
    longint n;
    peak = 0;
    n = 0;
    for (int t = 0; t < SETTLE + NSAMP; t++) begin
      @(negedge clk);
      dn = 10'(sample(fin, n));
      dm = 10'(sample(fin, n + 1));
      n += 2;
      @(posedge clk);
      #1;
      if (t >= SETTLE + 6) begin
        int k;
        k = t - SETTLE - 6;
        if (k < NSAMP - 6) begin
          w  = 0.5 - 0.5 * $cos(2.0 * PI * k / (NSAMP - 6));
          ph = 2.0 * PI * fout / 100.0 * k;
          cr += w * (out_real * $cos(ph) + out_imag * $sin(ph));
          ci += w * (out_imag * $cos(ph) - out_real * $sin(ph));
          ws += w;
          if (out_real > peak) peak = out_real;
          if (-out_real > peak) peak = -out_real;
        end
      end
    end
    amp = $sqrt(cr*cr + ci*ci) / ws;
  endtask

  initial begin
    real amp, full, best_amp, other_amp, ripple_lo, ripple_hi;
    int peak, lo_edge, hi_edge, best_f;
    full = AMP / 2.0 * 2047.0 / 16.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // 135 MHz tone: find the strongest output frequency on a 1 MHz grid.
    best_amp = 0.0; best_f = -999;
    measure(135.0, 40.0, amp, peak);
    $display("135 MHz tone: amplitude at +40 MHz %0.1f (full %0.1f), peak %0d", amp, full, peak);
    checks++; if (peak < (1 << 14)) failures++;
    for (int f = -50; f < 50; f++) begin
      real a; int p;
      measure(135.0, real'(f), a, p);
      if (a > best_amp) begin best_amp = a; best_f = f; end
      if (f == -40) other_amp = a;
    end
    $display("135 MHz tone: strongest output at %0d MHz, -40 MHz image %0.1f dB", best_f, 20.0*$log10(other_amp/best_amp + 1e-12));
    checks++; if (best_f != 40) failures++;
    checks++; if (20.0*$log10(other_amp/best_amp + 1e-12) > -40.0) failures++;

    // Sweep.
    lo_edge = 0; hi_edge = 0; ripple_lo = 1e9; ripple_hi = -1e9;
    for (int fin = 100; fin <= 200; fin++) begin
      real fout;
      fout = 175.0 - fin;
      if (fout < -50.0) fout += 100.0;
      measure(real'(fin), fout, amp, peak);
      gain_db[fin] = 20.0 * $log10(amp / full + 1e-12);
      exp_db[fin]  = 20.0 * $log10(hmag(150.0 - fin) + 1e-12);
      if (fin == 100 || fin == 150 || fin == 200) continue;
      checks++;
      if (exp_db[fin] > -40.0) begin
        if (gain_db[fin] - exp_db[fin] > 0.3 || gain_db[fin] - exp_db[fin] < -0.3) failures++;
      end else if (gain_db[fin] > -40.0) failures++;
      if (gain_db[fin] > -3.0) begin
        if (lo_edge == 0) lo_edge = fin;
        hi_edge = fin;
      end
      if (fin >= 130 && fin <= 170) begin
        if (gain_db[fin] < ripple_lo) ripple_lo = gain_db[fin];
        if (gain_db[fin] > ripple_hi) ripple_hi = gain_db[fin];
      end
    end
    for (int fin = 100; fin <= 200; fin += 5)
      $display("F_in %0d MHz -> F_out %0d MHz: %0.2f dB (taps give %0.2f dB)", fin, 175 - fin, gain_db[fin], exp_db[fin]);
    $display("half-power band %0d..%0d MHz, ripple %0.3f dB", lo_edge, hi_edge, ripple_hi - ripple_lo);
    checks++; if (lo_edge < 127 || lo_edge > 128) failures++;
    checks++; if (hi_edge < 173 || hi_edge > 174) failures++;
    checks++; if (ripple_hi - ripple_lo > 0.5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (210 * (SETTLE + NSAMP)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
