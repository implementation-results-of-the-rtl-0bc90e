// digital_if_top: digital IF processor for a 200 MS/s AD9410 front end.
//
// An IF band of 120-180 MHz is sampled at 200 MS/s in the second Nyquist zone,
// so it appears folded at 20-80 MHz.  The processor shifts the spectrum down
// by fs/4 (50 MHz), removes the image with a 63-tap lowpass (47 MHz wide),
// halves the rate and shifts the result up by a quarter of the new rate
// (25 MHz).  A tone at F_in in the analog band comes out as a complex tone at
// 175 MHz - F_in, e.g. 135 MHz -> +40 MHz, in a 100 MS/s complex stream.
// Every multiplication by a power of j is a sign change or a real/imaginary
// exchange, so the only arithmetic is the two filter branches.
//
//   dm, dn --> dif_input_sync --> dif_fs4_down --> dif_fir (real, 32 taps)  --> dif_fs4_up --> out_real
//                                       ^      \-> dif_fir (imag, 31 taps)  -->     ^      --> out_imag
//                                       |                                          |
//                                       +-------------- dif_controller -----------+
//
// Interface: the ADC delivers two samples per clock, the earlier on dn and the
// later on dm, each bus with its own data-ready clock (dra, drb); the whole
// design after the input registers runs on drb.  Outputs are 16-bit signed.
// control1 forwards drb as the sample clock for the capture equipment;
// control2 is held low, as in the original pin-out.
//
// raw_mode selects between the two operating modes of the board: 0 outputs
// the processed complex samples, 1 passes the raw ADC samples (out_real = the
// later sample dm, out_imag = the earlier sample dn, sign-extended to 16
// bits).  The existence of the two modes is from the design description; the
// mode pin and the raw output format are this design's own.
//
// Timing: after rst (synchronous, active high, at least two cycles of both
// clocks) the processed output after drb edge e belongs to the sample pair
// taken at edge e-6; the raw output after edge e to the pair taken at edge
// e-2.  One complex output per clock: 100 MS/s at a 100 MHz drb.
module digital_if_top
  import dif_pkg::*;
(
  input  logic                    dra,
  input  logic                    drb,
  input  logic                    rst,
  input  logic                    raw_mode,
  input  logic signed [ADC_W-1:0] dm,
  input  logic signed [ADC_W-1:0] dn,
  output logic signed [OUT_W-1:0] out_real,
  output logic signed [OUT_W-1:0] out_imag,
  output logic                    control1,
  output logic                    control2
);

  dif_ctrl_t  ctrl;

  logic signed [ADC_W-1:0] m_sync, n_reg;
  logic signed [ADC_W-1:0] m_mix, n_mix;
  logic signed [FIR_W-1:0] re_full, im_full;
  logic signed [OUT_W-1:0] proc_real, proc_imag;
  logic signed [OUT_W-1:0] raw_real, raw_imag;

  dif_controller u_ctrl (
    .clk(drb), .rst, .ctrl, .state()
  );

  dif_input_sync u_sync (
    .dra, .drb, .rst, .dm, .dn, .m_sync, .n_reg
  );

  dif_fs4_down u_down (
    .clk(drb), .rst, .neginput(ctrl.neginput),
    .m_in(m_sync), .n_in(n_reg), .m_out(m_mix), .n_out(n_mix)
  );

  dif_fir #(.PHASE(0)) u_fir_real (
    .clk(drb), .rst, .din(m_mix), .dout(re_full)
  );

  dif_fir #(.PHASE(1)) u_fir_imag (
    .clk(drb), .rst, .din(n_mix), .dout(im_full)
  );

  dif_fs4_up u_up (
    .clk(drb), .rst, .swap(ctrl.swap), .negreal(ctrl.negreal), .negimag(ctrl.negimag),
    .re_in(re_full), .im_in(im_full), .re_out(proc_real), .im_out(proc_imag)
  );

  // Raw mode: the pair re-timed by dif_input_sync; N gets one more register
  // so that both words of the output belong to the same pair.
  logic signed [ADC_W-1:0] n_raw_q;

  always_ff @(posedge drb) begin
    if (rst) begin
      n_raw_q  <= '0;
      raw_real <= '0;
      raw_imag <= '0;
    end else begin
      n_raw_q  <= n_reg;
      raw_real <= OUT_W'(m_sync);
      raw_imag <= OUT_W'(n_raw_q);
    end
  end

  assign out_real = raw_mode ? raw_real : proc_real;
  assign out_imag = raw_mode ? raw_imag : proc_imag;
  assign control1 = drb;
  assign control2 = 1'b0;

endmodule
