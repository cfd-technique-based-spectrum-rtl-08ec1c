// tb_acm: self-checking test of the autocorrelation computation module.  A random
// stream with gaps is fed in; the expected output x(n)*conj(x(n-MU)), saturated to
// 32 bits per part, is formed in 64-bit integers from a history of the inputs (zero
// before the first MU samples); the conjugate of -32768 is taken as +32767, as the
// conjugate module saturates.  The one-cycle latency is checked too.
module tb_acm;
  import cfd_pkg::*;
  localparam int MU = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx16_t x_in;
  cplx32_t y_out;
  cplx16_t hist [$];

  acm #(.MU(MU)) dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .y_out);

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
    longint er, ei;
    cplx16_t d, xv;
    for (int i = 0; i < MU; i++) hist.push_back('0);
    x_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      if (i % 50 == 7) x_in = '{re: -16'sd32768, im: -16'sd32768};  // exercises saturation
      else             x_in = cplx16_t'($urandom);
      xv = x_in;
      if (in_valid) begin
        d  = hist[hist.size() - MU];
        if (d.im == -16'sd32768) d.im = -16'sd32767;   // conjugate saturates to +32767
        er = longint'(xv.re) * longint'(d.re) + longint'(xv.im) * longint'(d.im);
        ei = longint'(xv.im) * longint'(d.re) - longint'(xv.re) * longint'(d.im);
        hist.push_back(xv);
      end
      @(negedge clk);
      checks++;
      if (out_valid !== in_valid) begin
        failures++;
        $display("FAIL step %0d out_valid=%b", i, out_valid);
      end
      if (in_valid) begin
        checks++;
        if (longint'(y_out.re) != sat(er) || longint'(y_out.im) != sat(ei)) begin
          failures++;
          $display("FAIL step %0d y=(%0d,%0d) exp=(%0d,%0d)", i, y_out.re, y_out.im, sat(er), sat(ei));
        end
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
