// tb_dif_fs4_up: random 24-bit filter results and random control lines.  The
// reference keeps bits [19:4], then exchanges real and imaginary when swap was
// 1 one clock before the output edge and negates each word by the negreal /
// negimag lines of the output edge, with 16-bit wrap (-32768 stays -32768).
`timescale 1ns/1ps
module tb_dif_fs4_up;
  logic clk = 1'b0, rst = 1'b1;
  logic swap = 1'b0, negreal = 1'b0, negimag = 1'b0;
  logic signed [23:0] re_in = '0, im_in = '0;
  logic signed [15:0] re_out, im_out;

  dif_fs4_up dut (.clk, .rst, .swap, .negreal, .negimag, .re_in, .im_in, .re_out, .im_out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cnt_min = 0;
  int re_h [0:1023], im_h [0:1023];
  bit sw_h [0:1023], nr_h [0:1023], ni_h [0:1023];

  function automatic int w16(int v);
    v = v & 16'hffff;
    return (v >= 32768) ? v - 65536 : v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int e = 0; e < 1000; e++) begin
      re_h[e] = int'($urandom) >>> 8;
      im_h[e] = int'($urandom) >>> 8;
      if (e % 97 == 5) re_h[e] = 24'sh880000 | 24'sh0 ;   // bits [19:4] = -32768
      sw_h[e] = 1'($urandom); nr_h[e] = 1'($urandom); ni_h[e] = 1'($urandom);
      re_in = 24'(re_h[e]); im_in = 24'(im_h[e]);
      swap = sw_h[e]; negreal = nr_h[e]; negimag = ni_h[e];
      @(posedge clk);
      #1;
      if (e >= 2) begin
        int r, i, m, n;
        r = w16(re_h[e-2] >>> 4);
        i = w16(im_h[e-2] >>> 4);
        m = sw_h[e-1] ? i : r;
        n = sw_h[e-1] ? r : i;
        if (nr_h[e] && m == -32768) cnt_min++;
        if (nr_h[e]) m = w16(-m);
        if (ni_h[e]) n = w16(-n);
        checks++;
        if (re_out != 16'(m) || im_out != 16'(n)) begin
          failures++;
          if (failures < 5) $display("e=%0d got %0d,%0d exp %0d,%0d", e, re_out, im_out, m, n);
        end
      end
      @(negedge clk);
    end
    $display("negations of -32768: %0d", cnt_min);
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
