// dif_fs4_up: output word selection and fs/4 up-conversion.
//
// Stage 1 keeps bits [19:4] of each 24-bit filter result: four MSBs that a
// full-scale input never reaches and four LSBs of excess precision are
// dropped, as in the design description (values beyond 20 bits wrap).
// Stages 2 and 3 multiply the 100 MS/s complex stream w = R + jI by j^(k+1)
// (a 25 MHz up-shift) using only exchanges and negations:
//   stage 2: swap = 1 exchanges real and imaginary,
//   stage 3: negreal / negimag negate the real / imaginary word.
// The controller's table, with the two stages one clock apart, produces
// j*w, -w, -j*w, w on four consecutive samples.  Negation is a 16-bit
// two's-complement subtract from zero, so -32768 maps to itself.
//
// Interface: re_in/im_in from the real and imaginary filter branches, the
// control lines from dif_controller (all sampled on the same clock edge, the
// same way the original uses them).  Timing: three register stages; the
// output after edge e uses swap from edge e-1 and negreal/negimag from edge e.
module dif_fs4_up
  import dif_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    swap,
  input  logic                    negreal,
  input  logic                    negimag,
  input  logic signed [FIR_W-1:0] re_in,
  input  logic signed [FIR_W-1:0] im_in,
  output logic signed [OUT_W-1:0] re_out,
  output logic signed [OUT_W-1:0] im_out
);

  logic signed [OUT_W-1:0] re_slice, im_slice;  // realfilt / imagfilt registers
  logic signed [OUT_W-1:0] m_q, n_q;            // after the swap stage

  always_ff @(posedge clk) begin
    if (rst) begin
      re_slice <= '0;
      im_slice <= '0;
      m_q      <= '0;
      n_q      <= '0;
      re_out   <= '0;
      im_out   <= '0;
    end else begin
      re_slice <= re_in[SLICE_LSB +: OUT_W];
      im_slice <= im_in[SLICE_LSB +: OUT_W];
      if (swap) begin
        m_q <= im_slice;
        n_q <= re_slice;
      end else begin
        m_q <= re_slice;
        n_q <= im_slice;
      end
      re_out <= negreal ? OUT_W'(-m_q) : m_q;
      im_out <= negimag ? OUT_W'(-n_q) : n_q;
    end
  end

endmodule
