// size_case: one sensor instance at FFT size N (P = 64 butterfly units) driven with
// two frames, a real tone at bin k0 = N/16 (about -3 dB SNR, cyclic feature at
// alpha = 2*k0) and noise only.  It checks the two decisions and the latency from the
// first sample to tc_valid, N + 1 + log2(N)*(N/128 + 1) + N + 1 + 36 cycles, and
// reports its check and failure counts to the enclosing testbench.
module size_case #(
  parameter int N = 1024
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import cfd_pkg::*;
  localparam int K0 = N / 16;
  localparam int S = $clog2(N);
  localparam int LATENCY = N + 1 + S * (N / 128 + 1) + N + 1 + 36;
  localparam real TWO_PI = 6.283185307179586;

  logic rst_n = 0, in_valid = 0, in_ready;
  cplx16_t x_in;
  logic [15:0] alpha = 16'(2 * K0);
  logic [31:0] threshold = 32'(16 << 16);
  logic tc_valid, detect, stat_valid;
  logic [31:0] tc;
  logic signed [31:0] r1, r2;
  logic signed [63:0] cov_w, cov_x, cov_z;

  cfd_sensor #(.N(N), .P(64)) dut (.*);

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  function automatic logic signed [15:0] clamp16(input real v);
    int i = $rtoi(v < 0.0 ? v - 0.5 : v + 0.5);
    if (i > 32767) i = 32767;
    if (i < -32768) i = -32768;
    return 16'(i);
  endfunction

  longint t_first [2];

  initial begin
    checks = 0; failures = 0; done = 0;
    x_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      real amp;
      amp = (f == 0) ? 3000.0 : 0.0;
      for (int n = 0; n < N; ) begin
        @(negedge clk);
        in_valid = 1;
        x_in.re = clamp16(amp * $cos(TWO_PI * ((K0 * n) % N) / N) + 2100.0 * gauss());
        x_in.im = clamp16(2100.0 * gauss());
        @(posedge clk);
        if (in_ready) begin
          if (n == 0) t_first[f] = longint'($time / 10);
          n++;
        end
        #1 in_valid = 0;
      end
    end
  end

  initial begin
    int f = 0;
    wait (rst_n);
    while (f < 2) begin
      @(posedge clk);
      if (tc_valid) begin
        $display("N = %0d frame %0d: Tc = %f detect = %b after %0d cycles", N, f,
                 real'(tc) / 65536.0, detect, longint'($time / 10) - t_first[f]);
        checks++;
        if (detect != (f == 0)) begin
          failures++;
          $display("FAIL N = %0d frame %0d decision", N, f);
        end
        // tc_valid rises LATENCY edges after the first sample; sampled one edge later
        checks++;
        if (longint'($time / 10) - t_first[f] != LATENCY + 1) begin
          failures++;
          $display("FAIL N = %0d frame %0d latency", N, f);
        end
        f++;
      end
    end
    done = 1;
  end
endmodule
