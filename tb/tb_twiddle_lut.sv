// tb_twiddle_lut: self-checking test of the per-BCU twiddle tables at the default
// size (N = 2048, P = 64).  For three BCUs and every (stage, cycle) select value the
// table output must equal exp(-j*2*pi*k/N) in Q2.14, rounded, with
// k = ((c*P + BCU_ID) >> s) << s; the expected value is computed here in real
// arithmetic.
module tb_twiddle_lut;
  import cfd_pkg::*;
  localparam int N = 2048, P = 64, STAGES = 11, CYC = 16;
  localparam int IDS [3] = '{0, 5, 63};
  int checks = 0, failures = 0;
  logic [3:0] stage, cyc;
  cplx16_t tw [3];

  twiddle_lut #(.N(N), .P(P), .BCU_ID(0))  u0 (.stage, .cyc, .tw(tw[0]));
  twiddle_lut #(.N(N), .P(P), .BCU_ID(5))  u1 (.stage, .cyc, .tw(tw[1]));
  twiddle_lut #(.N(N), .P(P), .BCU_ID(63)) u2 (.stage, .cyc, .tw(tw[2]));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < STAGES; s++) begin
      for (int c = 0; c < CYC; c++) begin
        stage = 4'(s); cyc = 4'(c);
        #1;
        for (int u = 0; u < 3; u++) begin
          int j, k, er, ei;
          real ang;
          j   = c * P + IDS[u];
          k   = (j / (1 << s)) * (1 << s);
          ang = 2.0 * 3.14159265358979 * k / N;
          er  = $rtoi($floor(16384.0 * $cos(ang) + 0.5));
          ei  = $rtoi($floor(-16384.0 * $sin(ang) + 0.5));
          checks++;
          if (int'(tw[u].re) != er || int'(tw[u].im) != ei) begin
            failures++;
            $display("FAIL bcu %0d s=%0d c=%0d tw=(%0d,%0d) exp=(%0d,%0d)",
                     IDS[u], s, c, tw[u].re, tw[u].im, er, ei);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
