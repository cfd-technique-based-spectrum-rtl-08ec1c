// tb_snr_sweep: detection probability against SNR at the sensor's default size
// (N = 2048, P = 64, MU = 4), a reduced-trial version of the sensor's Monte-Carlo
// evaluation.
//
// The primary-user signal is a real tone A*cos(2*pi*k0*n/N) (k0 = 100) in complex
// white Gaussian noise, so its lag product has a cyclic feature at alpha = 2*k0.  For
// each SNR point (signal power A^2/2 over noise power) TRIALS frames are sensed, plus
// TRIALS noise-only frames for the false-alarm rate; the threshold is Tc > 16.0
// (false-alarm probability exp(-8) for the chi-square statistic with two degrees of
// freedom).  Checks: probability of detection 1.0 at 0 dB and at least 0.9 at -5 dB,
// at most 0.3 at -26 dB, and a false-alarm rate of at most 0.1.  The detection curve
// is printed.
module tb_snr_sweep;
  import cfd_pkg::*;
  localparam int N = 2048, K0 = 100, TRIALS = 20, NPTS = 15;
  localparam real TWO_PI = 6.283185307179586;
  localparam real SIGMA = 2100.0;                       // noise std per I/Q component
  localparam int SNR_DB [NPTS] = '{-26, -24, -22, -20, -18, -16, -14, -12, -10, -8, -6, -5, -4, -2, 0};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready;
  cplx16_t x_in;
  logic [15:0] alpha = 16'(2 * K0);
  logic [31:0] threshold = 32'(16 << 16);
  logic tc_valid, detect, stat_valid;
  logic [31:0] tc;
  logic signed [31:0] r1, r2;
  logic signed [63:0] cov_w, cov_x, cov_z;

  cfd_sensor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // frame list: point p < NPTS is a signal frame at SNR_DB[p], p == NPTS is noise only
  localparam int FRAMES = (NPTS + 1) * TRIALS;
  int hits [NPTS + 1];
  real amp_of [NPTS + 1];

  initial begin
    foreach (hits[p]) hits[p] = 0;
    for (int p = 0; p < NPTS; p++)
      amp_of[p] = $sqrt(2.0 * (10.0 ** (SNR_DB[p] / 10.0)) * 2.0 * SIGMA * SIGMA);
    amp_of[NPTS] = 0.0;
    x_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      int p;
      p = f / TRIALS;
      for (int n = 0; n < N; ) begin
        @(negedge clk);
        in_valid = 1;
        x_in.re = clamp16(amp_of[p] * $cos(TWO_PI * ((K0 * n) % N) / N) + SIGMA * gauss());
        x_in.im = clamp16(SIGMA * gauss());
        @(posedge clk);
        if (in_ready) n++;
        #1 in_valid = 0;
      end
    end
  end

  initial begin
    int f = 0;
    real pd, pfa;
    wait (rst_n);
    while (f < FRAMES) begin
      @(posedge clk);
      if (tc_valid) begin
        if (detect) hits[f / TRIALS]++;
        f++;
      end
    end
    for (int p = 0; p < NPTS; p++)
      $display("SNR %0d dB: probability of detection %0.2f", SNR_DB[p], real'(hits[p]) / TRIALS);
    pfa = real'(hits[NPTS]) / TRIALS;
    $display("noise only: false-alarm rate %0.2f", pfa);
    for (int p = 0; p < NPTS; p++) begin
      pd = real'(hits[p]) / TRIALS;
      if (SNR_DB[p] == 0)   begin checks++; if (pd < 1.0) begin failures++; $display("FAIL Pd at 0 dB"); end end
      if (SNR_DB[p] == -5)  begin checks++; if (pd < 0.9) begin failures++; $display("FAIL Pd at -5 dB"); end end
      if (SNR_DB[p] == -26) begin checks++; if (pd > 0.3) begin failures++; $display("FAIL Pd at -26 dB"); end end
    end
    checks++;
    if (pfa > 0.1) begin failures++; $display("FAIL false-alarm rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
