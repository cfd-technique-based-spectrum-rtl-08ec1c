// tb_cmul16: self-checking test of the 16-bit complex multiplier against products
// formed in 64-bit integers, with random and extreme operands.
module tb_cmul16;
  import cfd_pkg::*;
  int checks = 0, failures = 0;
  cplx16_t a, b;
  logic signed [32:0] p_re, p_im;

  cmul16 dut (.a, .b, .p_re, .p_im);

  task automatic check(input cplx16_t va, input cplx16_t vb);
    longint er, ei;
    a = va; b = vb;
    #1;
    er = longint'(va.re) * longint'(vb.re) - longint'(va.im) * longint'(vb.im);
    ei = longint'(va.re) * longint'(vb.im) + longint'(va.im) * longint'(vb.re);
    checks++;
    if (longint'(p_re) != er || longint'(p_im) != ei) begin
      failures++;
      $display("FAIL a=(%0d,%0d) b=(%0d,%0d) p=(%0d,%0d) exp=(%0d,%0d)",
               va.re, va.im, vb.re, vb.im, p_re, p_im, er, ei);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('{re: -16'sd32768, im: -16'sd32768}, '{re: -16'sd32768, im: 16'sd32767});
    check('{re: -16'sd32768, im: 16'sd32767}, '{re: -16'sd32768, im: -16'sd32768});
    for (int i = 0; i < 500; i++) check(cplx16_t'($urandom), cplx16_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
