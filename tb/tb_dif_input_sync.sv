// tb_dif_input_sync: drives random samples on both ADC buses, with the bus-M
// clock dra lagging drb by 3 ns, and checks that m_sync shows the M sample of
// two drb edges earlier and n_reg the N sample of one edge earlier.
`timescale 1ns/1ps
module tb_dif_input_sync;
  logic drb = 1'b0, dra = 1'b0, rst = 1'b1;
  logic signed [9:0] dm = '0, dn = '0, m_sync, n_reg;

  dif_input_sync dut (.dra, .drb, .rst, .dm, .dn, .m_sync, .n_reg);

  always #5 drb = ~drb;
  always @(drb) dra <= #3 drb;

  int checks = 0, failures = 0;
  logic signed [9:0] mh [0:1023];
  logic signed [9:0] nh [0:1023];

  initial begin
    int e;
    repeat (4) @(posedge drb);
    @(negedge drb) rst = 1'b0;
    e = 0;
    for (int j = 0; j < 1024; j++) begin mh[j] = '0; nh[j] = '0; end
    mh[1] = 10'($urandom); nh[1] = 10'($urandom);
    dm = mh[1]; dn = nh[1];
    for (e = 1; e < 1000; e++) begin
      @(posedge drb);
      #1;
      if (e >= 2) begin
        checks++;
        if (m_sync != mh[e-1] || n_reg != nh[e]) begin
          failures++;
          if (failures < 5) $display("e=%0d m_sync %0d exp %0d n_reg %0d exp %0d", e, m_sync, mh[e-1], n_reg, nh[e]);
        end
      end
      @(negedge drb);
      mh[e+1] = 10'($urandom); nh[e+1] = 10'($urandom);
      dm = mh[e+1]; dn = nh[e+1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200) @(posedge drb);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
