// tb_dif_controller: checks the controller's state sequence and its table of
// control lines (neginput, swap, negimag, negreal) over several periods,
// including a reset in the middle of a period.
`timescale 1ns/1ps
module tb_dif_controller;
  import dif_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  dif_ctrl_t  ctrl;
  dif_state_e state;

  dif_controller dut (.clk, .rst, .ctrl, .state);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Expected lines per state, packed as {neginput, swap, negimag, negreal}.
  localparam logic [3:0] EXP [4] = '{4'b0100, 4'b1001, 4'b0111, 4'b1010};

  task automatic run(input int ncyc);
    for (int c = 0; c < ncyc; c++) begin
      checks++;
      if (int'(state) != c % 4 || ctrl != EXP[c % 4]) begin
        failures++;
        $display("cycle %0d: state %0d ctrl %b", c, state, ctrl);
      end
      // neginput must alternate every clock
      checks++;
      if (ctrl.neginput != (c % 2 == 1)) failures++;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // the first cycle after reset is S0
    for (int c = 0; c < 14; c++) begin
      checks++;
      if (int'(state) != c % 4 || ctrl != EXP[c % 4]) begin
        failures++;
        $display("cycle %0d: state %0d ctrl %b", c, state, ctrl);
      end
      @(negedge clk);
    end
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    run(21);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
