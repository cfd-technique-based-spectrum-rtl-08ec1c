// tb_bcu: self-checking test of the butterfly computation unit.  Random inputs and
// twiddles (and the extreme values) are loaded; one cycle later y0 = (a+b)/2 and
// y1 = ((a-b)/2)*tw / 2^14, both truncated toward minus infinity and saturated, must
// match values formed here in 64-bit integers.  Also checks that the outputs hold
// while `load` is low.
module tb_bcu;
  import cfd_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, load = 0;
  cplx32_t a, b, y0, y1;
  cplx16_t tw;

  bcu dut (.clk, .load, .a, .b, .tw, .y0, .y1);

  always #5 clk = ~clk;

  function automatic longint sat(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s_re, s_im, d_re, d_im, m_re, m_im;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      a  = {32'($urandom), 32'($urandom)};
      b  = {32'($urandom), 32'($urandom)};
      tw = cplx16_t'($urandom);
      if (i % 7 == 0) begin
        a = {32'sh8000_0000, 32'sh7fff_ffff};
        b = {32'sh7fff_ffff, 32'sh8000_0000};
        tw = '{re: 16'sd16384, im: 16'sd0};
      end
      if (i % 11 == 3) tw = '{re: -16'sd32768, im: -16'sd32768};   // forces saturation
      s_re = (longint'(a.re) + longint'(b.re)) >>> 1;
      s_im = (longint'(a.im) + longint'(b.im)) >>> 1;
      d_re = (longint'(a.re) - longint'(b.re)) >>> 1;
      d_im = (longint'(a.im) - longint'(b.im)) >>> 1;
      m_re = sat((d_re * longint'(tw.re) - d_im * longint'(tw.im)) >>> 14);
      m_im = sat((d_re * longint'(tw.im) + d_im * longint'(tw.re)) >>> 14);
      load = 1;
      @(negedge clk);
      load = 0;
      a = '0; b = '0; tw = '0;
      @(negedge clk);           // outputs must hold without load
      checks++;
      if (longint'(y0.re) != s_re || longint'(y0.im) != s_im ||
          longint'(y1.re) != m_re || longint'(y1.im) != m_im) begin
        failures++;
        $display("FAIL %0d y0=(%0d,%0d) exp (%0d,%0d) y1=(%0d,%0d) exp (%0d,%0d)", i,
                 y0.re, y0.im, s_re, s_im, y1.re, y1.im, m_re, m_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
