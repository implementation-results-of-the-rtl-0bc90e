// dif_fs4_down: fs/4 down-conversion of the 200 MS/s real stream.
//
// Multiplying the real samples x[n] by exp(-j*pi*n/2) only changes signs and
// decides whether a sample is real or imaginary: with bus N holding x[2j] and
// bus M x[2j+1], the later sample (M) becomes the real part and the earlier
// one (N) the imaginary part, and both samples of a pair are negated on every
// other pair.  The hardware does this with one negator per bus: when
// neginput = 0, M is negated and N passes; when neginput = 1, N is negated and
// M passes.  Because M arrives here one clock later than N (it was re-timed),
// this negates M and N of the same pair together.  N is then delayed one more
// clock so that both branches of the filter see the same pair in the same clock.
//
// The negators are W-bit two's-complement subtractors from zero, so the most
// negative code negates to itself, as in the original.  The structure follows
// the design description; the reset is this design's own.
//
// Interface: m_in/n_in from dif_input_sync, neginput from dif_controller.
// Timing: m_out is registered once, n_out twice.
module dif_fs4_down
  import dif_pkg::*;
#(
  parameter int W = ADC_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                neginput,
  input  logic signed [W-1:0] m_in,
  input  logic signed [W-1:0] n_in,
  output logic signed [W-1:0] m_out,
  output logic signed [W-1:0] n_out
);

  logic signed [W-1:0] negn_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      m_out  <= '0;
      negn_q <= '0;
      n_out  <= '0;
    end else begin
      if (neginput == 1'b0) begin
        m_out  <= W'(-m_in);
        negn_q <= n_in;
      end else begin
        m_out  <= m_in;
        negn_q <= W'(-n_in);
      end
      n_out <= negn_q;
    end
  end

endmodule
