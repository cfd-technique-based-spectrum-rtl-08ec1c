// tb_fft_core: self-checking test of the resource-shared FFT at N = 256, P = 8
// (8 stages of 16 cycles, the same 16:1 multiplexing as the default size).  Three
// frames are transformed: random data, a complex tone and an impulse.  Every output
// bin is compared with DFT(x)/N computed here in real arithmetic, within a tolerance
// for the truncation of each stage and the 14-bit twiddles.  The test also checks the
// bin numbering, that out_last marks bin N-1, the stage count and the latency of
// log2(N)*(N/(2P)+1)+1 cycles from the last accepted sample to the first bin.
module tb_fft_core;
  import cfd_pkg::*;
  localparam int N = 256, P = 8, STAGES = 8, CYC = N / (2 * P);
  localparam real TWO_PI = 6.283185307179586;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_last, stage_done;
  logic [15:0] out_k;
  cplx32_t in_data, out_data;
  int stage_count = 0;

  fft_core #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (stage_done) stage_count++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xr [N], xi [N];

  task automatic run_frame(input int kind);
    real er, ei, err, tol, maxerr;
    longint t_last, t_first;
    int k;
    // stimulus
    for (int n = 0; n < N; n++) begin
      case (kind)
        0: begin xr[n] = $signed($urandom) >>> 8;  xi[n] = $signed($urandom) >>> 8; end
        1: begin
          xr[n] = longint'($rtoi(1.0e7 * $cos(TWO_PI * 5 * n / N)));
          xi[n] = longint'($rtoi(1.0e7 * $sin(TWO_PI * 5 * n / N)));
        end
        default: begin xr[n] = (n == 3) ? 64'sd100000000 : 0; xi[n] = 0; end
      endcase
    end
    // load with random gaps
    for (int n = 0; n < N; ) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_data  = '{re: 32'(xr[n]), im: 32'(xi[n])};
      @(posedge clk);
      if (in_valid && in_ready) begin
        n++;
        t_last = longint'($time / 10);
      end
      #1 in_valid = 0;
    end
    stage_count = 0;
    // collect and check
    @(posedge clk);
    while (!out_valid) @(posedge clk);
    t_first = longint'($time / 10);
    checks++;
    // out_valid rises STAGES*(CYC+1)+1 edges after the last accepting edge; this
    // loop samples it one edge later
    if (t_first - t_last != STAGES * (CYC + 1) + 2) begin
      failures++;
      $display("FAIL latency %0d", t_first - t_last);
    end
    checks++;
    if (stage_count != STAGES) begin
      failures++;
      $display("FAIL stage count %0d", stage_count);
    end
    maxerr = 0.0;
    for (k = 0; k < N; k++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        real c, s;
        c = $cos(TWO_PI * ((k * n) % N) / N);
        s = $sin(TWO_PI * ((k * n) % N) / N);
        er += real'(xr[n]) * c + real'(xi[n]) * s;
        ei += real'(xi[n]) * c - real'(xr[n]) * s;
      end
      er /= N; ei /= N;
      err = $sqrt((real'(out_data.re) - er) ** 2 + (real'(out_data.im) - ei) ** 2);
      tol = 2.0 * STAGES + 1.0e-3 * $sqrt(er * er + ei * ei) + 1.0e-4 * 1.0e7;
      if (err > maxerr) maxerr = err;
      checks++;
      if (!out_valid || int'(out_k) != k || out_last != (k == N - 1) || err > tol) begin
        failures++;
        $display("FAIL frame %0d bin %0d valid=%b k=%0d last=%b got (%0d,%0d) exp (%f,%f)",
                 kind, k, out_valid, out_k, out_last, out_data.re, out_data.im, er, ei);
      end
      @(posedge clk);
    end
    $display("frame %0d: largest bin error %f", kind, maxerr);
  endtask

  initial begin
    in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(0);
    run_frame(1);
    run_frame(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
