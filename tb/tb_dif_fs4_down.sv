// tb_dif_fs4_down: random samples and a random neginput pattern; m_out must be
// -/+ m_in of the previous clock (negated when neginput was 0) and n_out the
// N sample of two clocks earlier, negated when neginput was 1 at its first
// register.  Negation of -512 must wrap to -512.
`timescale 1ns/1ps
module tb_dif_fs4_down;
  logic clk = 1'b0, rst = 1'b1, neginput = 1'b0;
  logic signed [9:0] m_in = '0, n_in = '0, m_out, n_out;

  dif_fs4_down dut (.clk, .rst, .neginput, .m_in, .n_in, .m_out, .n_out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, wraps = 0;

  function automatic int w10(int v);
    v = v & 1023;
    return (v >= 512) ? v - 1024 : v;
  endfunction

  int m_h [0:1023], n_h [0:1023], g_h [0:1023];

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int e = 0; e < 1000; e++) begin
      m_h[e] = (e % 50 == 7) ? -512 : $urandom_range(0, 1023) - 512;
      n_h[e] = (e % 50 == 8) ? -512 : $urandom_range(0, 1023) - 512;
      g_h[e] = $urandom_range(0, 1);
      m_in = 10'(m_h[e]); n_in = 10'(n_h[e]); neginput = g_h[e][0];
      @(posedge clk);
      #1;
      checks++;
      if (m_out != 10'(g_h[e] == 0 ? w10(-m_h[e]) : m_h[e])) failures++;
      if (g_h[e] == 0 && m_h[e] == -512) wraps++;
      if (e >= 1) begin
        checks++;
        if (n_out != 10'(g_h[e-1] == 1 ? w10(-n_h[e-1]) : n_h[e-1])) failures++;
      end
      @(negedge clk);
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
