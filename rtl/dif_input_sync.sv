// dif_input_sync: capture of the two AD9410 output buses.
//
// The AD9410 delivers its 200 MS/s samples demultiplexed on two 10-bit buses,
// M and N, each with its own 100 MHz data-ready clock (dra, drb).  Bus M is
// registered on dra and then re-registered on drb; bus N is registered on drb.
// From here on the whole processor runs on drb.  In this design bus N carries
// the earlier sample of each pair and bus M the later one (x[2j] and x[2j+1]);
// the register structure follows the design description.
//
// dra and drb have the same frequency with a fixed phase; the single
// re-timing register assumes the phase leaves enough setup margin, as on the
// original board.  The synchronous active-high reset (one per clock domain, so
// rst must be held for a few cycles of both clocks) is this design's own.
//
// Timing: m_sync holds the M sample taken two drb edges earlier, n_reg the N
// sample taken one drb edge earlier.
module dif_input_sync
  import dif_pkg::*;
#(
  parameter int W = ADC_W
) (
  input  logic                dra,
  input  logic                drb,
  input  logic                rst,
  input  logic signed [W-1:0] dm,
  input  logic signed [W-1:0] dn,
  output logic signed [W-1:0] m_sync,
  output logic signed [W-1:0] n_reg
);

  logic signed [W-1:0] m_reg;

  always_ff @(posedge dra) begin
    if (rst) m_reg <= '0;
    else     m_reg <= dm;
  end

  always_ff @(posedge drb) begin
    if (rst) begin
      m_sync <= '0;
      n_reg  <= '0;
    end else begin
      m_sync <= m_reg;
      n_reg  <= dn;
    end
  end

endmodule
