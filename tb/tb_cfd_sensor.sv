// tb_cfd_sensor: end-to-end test of the spectrum sensor at its default size
// (N = 2048, P = 64, MU = 4; no parameter is overridden).
//
// Four sensing frames are streamed through the sensor:
//   frame 0  primary user present: a real tone A*cos(2*pi*k0*n/N), k0 = 100, in
//            complex Gaussian noise (about -6 dB SNR); its lag product has a
//            spectral line at alpha = 2*k0 = 200;
//   frame 1  noise only;
//   frame 2  primary user present at a weaker level, offered with input gaps;
//   frame 3  noise only, with input gaps.
// For every frame an independent model in real arithmetic forms the lag products,
// the DFT/N at every bin, the covariance entries W, X, Z, r = F(alpha) and
// Tc = r*inv(S)*r^T; the sensor's r, W, X, Z and Tc must match it within tolerances
// for the fixed-point FFT, and its decision must match the model's Tc against the
// threshold (16.0) and the frame's truth.  The time from the first sample of an
// uninterrupted frame to tc_valid is checked (4321 cycles).  Mechanisms that must
// each occur at least once: input back-pressure (in_ready low while a sample is
// offered), all 11 passes of the shared FFT stage per frame, the frequency selection
// hit, a detection, a non-detection, and a frame being loaded while the test
// statistic of the previous one is still computed.
module tb_cfd_sensor;
  import cfd_pkg::*;
  localparam int N = 2048, MU = 4, K0 = 100, ALPHA = 2 * K0, FRAMES = 4;
  localparam real TWO_PI = 6.283185307179586;
  localparam real THR = 16.0;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready;
  cplx16_t x_in;
  logic [15:0] alpha = 16'(ALPHA);
  logic [31:0] threshold = 32'($rtoi(THR * 65536.0));
  logic tc_valid, detect, stat_valid;
  logic [31:0] tc;
  logic signed [31:0] r1, r2;
  logic signed [63:0] cov_w, cov_x, cov_z;

  cfd_sensor dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_backpressure = 0, n_stage = 0, n_hit = 0, n_detect = 0, n_nodetect = 0, n_overlap = 0;
  always @(posedge clk) begin
    if (in_valid && !in_ready) n_backpressure++;
    if (dut.stage_done) n_stage++;
    if (dut.fsm_hit) n_hit++;
    if (in_valid && in_ready && dut.tscm_busy) n_overlap++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus history (all frames, for the lag)
  cplx16_t samples [FRAMES * N];
  real cos_t [N], sin_t [N];

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

  task automatic make_frame(input int f, input real amp, input real sigma);
    for (int n = 0; n < N; n++) begin
      samples[f*N + n].re = clamp16(amp * cos_t[(K0 * n) % N] + sigma * gauss());
      samples[f*N + n].im = clamp16(sigma * gauss());
    end
  endtask

  // ---------------- reference model
  real ref_tc [FRAMES], ref_r1 [FRAMES], ref_r2 [FRAMES];
  real ref_w [FRAMES], ref_x [FRAMES], ref_z [FRAMES];

  task automatic model(input int f);
    real yr [N], yi [N];
    real fr, fi, sw, sx, sz, det, num;
    for (int n = 0; n < N; n++) begin
      int g;
      cplx16_t cur, old;
      g   = f * N + n;
      cur = samples[g];
      old = (g >= MU) ? samples[g - MU] : '0;
      if (old.im == -16'sd32768) old.im = -16'sd32767;
      yr[n] = real'(cur.re) * real'(old.re) + real'(cur.im) * real'(old.im);
      yi[n] = real'(cur.im) * real'(old.re) - real'(cur.re) * real'(old.im);
    end
    sw = 0.0; sx = 0.0; sz = 0.0;
    for (int k = 0; k < N; k++) begin
      fr = 0.0; fi = 0.0;
      for (int n = 0; n < N; n++) begin
        int m = (k * n) % N;
        fr += yr[n] * cos_t[m] + yi[n] * sin_t[m];
        fi += yi[n] * cos_t[m] - yr[n] * sin_t[m];
      end
      fr /= N; fi /= N;
      sw += fr * fr; sx += fr * fi; sz += fi * fi;
      if (k == ALPHA) begin ref_r1[f] = fr; ref_r2[f] = fi; end
    end
    ref_w[f] = sw / N; ref_x[f] = sx / N; ref_z[f] = sz / N;
    det = ref_w[f] * ref_z[f] - ref_x[f] * ref_x[f];
    num = ref_r1[f] * ref_r1[f] * ref_z[f] - 2.0 * ref_r1[f] * ref_r2[f] * ref_x[f]
        + ref_r2[f] * ref_r2[f] * ref_w[f];
    ref_tc[f] = num / det;
  endtask

  function automatic bit near(input real got, input real want, input real rel, input real abs_tol);
    real d = got - want;
    if (d < 0.0) d = -d;
    return d <= abs_tol + rel * (want < 0.0 ? -want : want);
  endfunction

  // ---------------- driver
  longint t_first_accept [FRAMES];
  initial begin
    for (int m = 0; m < N; m++) begin
      cos_t[m] = $cos(TWO_PI * m / N);
      sin_t[m] = $sin(TWO_PI * m / N);
    end
    make_frame(0, 3000.0, 2100.0);
    make_frame(1, 0.0,    2100.0);
    make_frame(2, 2000.0, 2100.0);
    make_frame(3, 0.0,    2100.0);
    for (int f = 0; f < FRAMES; f++) model(f);
    for (int f = 0; f < FRAMES; f++)
      $display("model frame %0d: Tc = %f  r = (%f, %f)  W X Z = %e %e %e",
               f, ref_tc[f], ref_r1[f], ref_r2[f], ref_w[f], ref_x[f], ref_z[f]);

    x_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      bit gaps, first_taken;
      gaps = (f >= 2);
      first_taken = 0;
      for (int n = 0; n < N; ) begin
        @(negedge clk);
        in_valid = !gaps || ($urandom % 5 != 0);
        x_in = samples[f*N + n];
        @(posedge clk);
        if (in_valid && in_ready) begin
          if (!first_taken) t_first_accept[f] = longint'($time / 10);
          first_taken = 1;
          n++;
        end
        #1;
      end
      // keep offering the next sample while the sensor is busy, to exercise back-pressure
      @(negedge clk);
      in_valid = (f < FRAMES - 1);
      x_in = (f < FRAMES - 1) ? samples[(f+1)*N] : '0;
      while (!in_ready && f < FRAMES - 1) @(negedge clk);
      in_valid = 0;
    end
  end

  // ---------------- monitor
  initial begin
    int f = 0;
    int sf = 0;
    longint t_done;
    wait (rst_n);
    fork
      forever begin
        @(posedge clk);
        if (stat_valid && sf < FRAMES) begin
          #1;
          check(near(real'(r1), ref_r1[sf], 0.01, 40.0) && near(real'(r2), ref_r2[sf], 0.01, 40.0),
                $sformatf("frame %0d r = (%0d, %0d), model (%f, %f)", sf, r1, r2, ref_r1[sf], ref_r2[sf]));
          check(near(real'(cov_w), ref_w[sf], 0.01, 1.0e4) && near(real'(cov_z), ref_z[sf], 0.01, 1.0e4)
                && near(real'(cov_x), ref_x[sf], 0.01, 0.01 * ref_w[sf]),
                $sformatf("frame %0d W X Z = %0d %0d %0d, model %e %e %e", sf, cov_w, cov_x, cov_z,
                          ref_w[sf], ref_x[sf], ref_z[sf]));
          sf++;
        end
      end
    join_none
    while (f < FRAMES) begin
      @(posedge clk);
      if (tc_valid) begin
        real got;
        t_done = longint'($time / 10);
        got = real'(tc) / 65536.0;
        $display("frame %0d: Tc = %f (model %f) detect = %b", f, got, ref_tc[f], detect);
        check(near(got, ref_tc[f], 0.02, 0.05), $sformatf("frame %0d Tc %f, model %f", f, got, ref_tc[f]));
        check(detect == (ref_tc[f] > THR), $sformatf("frame %0d decision against model", f));
        check(detect == (f % 2 == 0), $sformatf("frame %0d decision against truth", f));
        if (f < 2)
          // tc_valid rises 4321 edges after the first accepting edge; sampled one edge later
          check(t_done - t_first_accept[f] == 4322,
                $sformatf("frame %0d sensing latency %0d cycles", f, t_done - t_first_accept[f]));
        if (detect) n_detect++; else n_nodetect++;
        f++;
      end
    end
    repeat (5) @(posedge clk);
    $display("mechanisms: backpressure=%0d stage_passes=%0d fsm_hits=%0d detections=%0d non_detections=%0d overlapped_loads=%0d",
             n_backpressure, n_stage, n_hit, n_detect, n_nodetect, n_overlap);
    check(n_backpressure > 0, "input back-pressure never happened");
    check(n_stage == 11 * FRAMES, $sformatf("shared stage passes %0d", n_stage));
    check(n_hit == FRAMES, "frequency selection hits");
    check(n_detect > 0, "no detection");
    check(n_nodetect > 0, "no non-detection");
    check(n_overlap > 0, "no frame loaded while the test statistic was busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
