// dif_controller: the free-running sequencer of the digital IF processor.
//
// A 2-bit counter steps S0 -> S1 -> S2 -> S3 -> S0 on every drb clock.  Each
// state selects the four control lines used by the data path in that clock:
//
//   state | neginput swap negimag negreal
//   ------+--------------------------------
//    S0   |    0      1      0       0
//    S1   |    1      0      0       1
//    S2   |    0      1      1       1
//    S3   |    1      0      1       0
//
// neginput alternates every clock and drives the fs/4 down-shift; swap and the
// two negate lines, applied one pipeline stage apart, make the fs/4 up-shift.
// The table is the one given in the design description.  The synchronous
// active-high reset, which puts the counter in S0, is this design's own (the
// original relies on flip-flops powering up at zero).
//
// Interface: clk, rst in; ctrl (combinational decode of the state) and state out.
module dif_controller
  import dif_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  output dif_ctrl_t  ctrl,
  output dif_state_e state
);

  always_ff @(posedge clk) begin
    if (rst) state <= S0;
    else     state <= dif_state_e'(state + 2'd1);
  end

  always_comb begin
    unique case (state)
      S0: ctrl = '{neginput: 1'b0, swap: 1'b1, negimag: 1'b0, negreal: 1'b0};
      S1: ctrl = '{neginput: 1'b1, swap: 1'b0, negimag: 1'b0, negreal: 1'b1};
      S2: ctrl = '{neginput: 1'b0, swap: 1'b1, negimag: 1'b1, negreal: 1'b1};
      S3: ctrl = '{neginput: 1'b1, swap: 1'b0, negimag: 1'b1, negreal: 1'b0};
      default: ctrl = '0;
    endcase
  end

  // The fs/4 down-shift relies on neginput alternating on every clock.
  a_neginput_rises: assert property (
    @(posedge clk) disable iff (rst) !ctrl.neginput |=> ctrl.neginput
  );
  a_neginput_falls: assert property (
    @(posedge clk) disable iff (rst) ctrl.neginput |=> !ctrl.neginput
  );

endmodule
