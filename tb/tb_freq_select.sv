// tb_freq_select: self-checking test of the frequency selection module.  Frames of
// 64 random bins are streamed with random gaps and a different alpha each time
// (including 0 and the last bin); the bin at position alpha is remembered here and
// must appear on r1/r2 with r_valid after the frame, and `hit` must fire exactly once
// per frame.  One frame uses an alpha beyond the frame, where nothing may be captured.
module tb_freq_select;
  import cfd_pkg::*;
  localparam int LEN = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, last = 0, r_valid, hit;
  logic [15:0] alpha;
  cplx32_t f_in;
  logic signed [31:0] r1, r2;

  freq_select dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx32_t want, prev;
    int hits;
    f_in = '0; prev = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 20; fr++) begin
      case (fr)
        0: alpha = 0;
        1: alpha = LEN - 1;
        2: alpha = 16'd1000;       // not in the frame
        default: alpha = 16'($urandom % LEN);
      endcase
      hits = 0;
      want = prev;
      for (int k = 0; k < LEN; ) begin
        @(negedge clk);
        in_valid = ($urandom % 3) != 0;
        first = (k == 0); last = (k == LEN - 1);
        f_in = {32'($urandom), 32'($urandom)};
        if (in_valid) begin
          if (k == int'(alpha)) want = f_in;
          k++;
        end
        @(posedge clk);
        #1;
        if (hit) hits++;
        in_valid = 0;
      end
      checks++;
      if (!r_valid || r1 !== want.re || r2 !== want.im) begin
        failures++;
        $display("FAIL frame %0d alpha %0d r=(%0d,%0d) exp (%0d,%0d) valid=%b",
                 fr, alpha, r1, r2, want.re, want.im, r_valid);
      end
      checks++;
      if (hits != ((alpha < LEN) ? 1 : 0)) begin
        failures++;
        $display("FAIL frame %0d hits %0d", fr, hits);
      end
      prev = want;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
