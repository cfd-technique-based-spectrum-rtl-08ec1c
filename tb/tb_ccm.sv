// tb_ccm: self-checking test of the complex conjugate module.  Random samples plus the
// two extremes of the imaginary part; the expected value is formed in 32-bit integers.
module tb_ccm;
  import cfd_pkg::*;
  int checks = 0, failures = 0;
  cplx16_t x, y;

  ccm dut (.x, .y);

  task automatic check(input cplx16_t v);
    int exp_im;
    x = v;
    #1;
    exp_im = -int'(v.im);
    if (exp_im > 32767) exp_im = 32767;
    checks++;
    if (y.re !== v.re || int'(y.im) != exp_im) begin
      failures++;
      $display("FAIL x=(%0d,%0d) y=(%0d,%0d)", v.re, v.im, y.re, y.im);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('{re: 16'sd5, im: 16'sd7});
    check('{re: -16'sd100, im: -16'sd32768});
    check('{re: 16'sd1, im: 16'sd32767});
    for (int i = 0; i < 200; i++) check(cplx16_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
