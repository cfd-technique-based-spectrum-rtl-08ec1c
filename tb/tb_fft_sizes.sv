// tb_fft_sizes: the sensor at the two other FFT sizes of its evaluation, N = 1024
// and N = 4096 (P = 64 in both), each sensing a tone frame and a noise frame side by
// side (see size_case).  At N = 1024 one pass of the shared stage takes 8 + 1 cycles,
// at N = 4096 it takes 32 + 1.
module tb_fft_sizes;
  logic clk = 0;
  logic done_a, done_b;
  int checks_a, checks_b, failures_a, failures_b;

  always #5 clk = ~clk;

  size_case #(.N(1024)) u_1024 (.clk, .done(done_a), .checks(checks_a), .failures(failures_a));
  size_case #(.N(4096)) u_4096 (.clk, .done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    #2ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b);
    $finish;
  end
endmodule
