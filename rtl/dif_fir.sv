// dif_fir: one polyphase branch of the 63-tap image-reject lowpass.
//
// The 63-tap prototype h[] (dif_pkg::H) runs on the 200 MS/s complex stream,
// whose real samples sit at odd and imaginary samples at even sample times.
// Keeping only every second output, the real part of an output uses only the
// even-indexed taps on bus M and the imaginary part only the odd-indexed taps
// on bus N.  PHASE selects the branch: 0 gives the 32 even taps (real branch),
// 1 the 31 odd taps (imaginary branch).  Each branch takes one 10-bit sample
// and produces one 24-bit full-precision result per clock.
//
// The design description only names the two filter cores (generated by a
// vendor filter compiler) and their 10-bit input and 24-bit output.  Their
// structure here is this design's own: a transposed direct form, one
// multiplier per tap feeding a chain of 24-bit accumulating registers, so the
// result appears one clock after the newest sample:
//   dout(t+1) = sum_k c[k] * din(t-k),  c[k] = h[2k + PHASE].
// 24 bits cannot overflow: the largest |result| is 512 * sum|c| < 2^20.
module dif_fir
  import dif_pkg::*;
#(
  parameter int PHASE = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W-1:0] din,
  output logic signed [FIR_W-1:0] dout
);

  localparam int NT = branch_taps(PHASE);

  // One accumulating register per tap; g_tap[0].acc_q is the result.
  for (genvar k = 0; k < NT; k++) begin : g_tap
    localparam coef_t C = branch_coef(PHASE, k);
    logic signed [FIR_W-1:0] prod, acc_q;

    assign prod = FIR_W'(din) * FIR_W'(C);

    if (k == NT - 1) begin : g_last
      always_ff @(posedge clk) begin
        if (rst) acc_q <= '0;
        else     acc_q <= prod;
      end
    end else begin : g_mid
      always_ff @(posedge clk) begin
        if (rst) acc_q <= '0;
        else     acc_q <= g_tap[k+1].acc_q + prod;
      end
    end
  end

  assign dout = g_tap[0].acc_q;

endmodule
