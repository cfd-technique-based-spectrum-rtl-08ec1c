// tb_tscm: self-checking test of the test-statistic computation module.
// Operands: random r = (r1, r2) and a random positive semi-definite covariance built
// as a Gram matrix (W = a^2 + b^2, Z = c^2 + d^2, X = a*c + b*d), plus a singular
// covariance, an all-zero one and one whose statistic saturates.  The expected Tc is
// floor(2^16 * (r1^2 Z - 2 r1 r2 X + r2^2 W) / (W Z - X^2)), saturated to 32 bits, in
// exact 256-bit integer arithmetic; detect must equal Tc > threshold.  The latency
// (36 cycles from start to tc_valid with a division, 4 without) is checked too.
module tb_tscm;
  import cfd_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, tc_valid, detect;
  logic signed [31:0] r1, r2;
  logic signed [63:0] w, x, z;
  logic [31:0] threshold, tc;

  tscm dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic signed [31:0] vr1, input logic signed [31:0] vr2,
                     input logic signed [63:0] vw, input logic signed [63:0] vx,
                     input logic signed [63:0] vz, input logic [31:0] thr);
    logic signed [255:0] num, den, q;
    logic [31:0] exp_tc;
    int cycles;
    bit divides;
    num = 256'(vr1) * 256'(vr1) * 256'(vz) - 2 * 256'(vr1) * 256'(vr2) * 256'(vx)
        + 256'(vr2) * 256'(vr2) * 256'(vw);
    den = 256'(vw) * 256'(vz) - 256'(vx) * 256'(vx);
    divides = 0;
    if (num < 0) num = 0;
    if (den <= 0) exp_tc = (num <= 0) ? 32'd0 : 32'hffff_ffff;
    else begin
      q = (num <<< 16) / den;
      if (q > 256'sh0_ffff_ffff) exp_tc = 32'hffff_ffff;
      else begin
        exp_tc  = q[31:0];
        divides = 1;
      end
    end
    @(negedge clk);
    r1 = vr1; r2 = vr2; w = vw; x = vx; z = vz; threshold = thr;
    start = 1;
    @(posedge clk);
    #1 start = 0;
    cycles = 0;
    while (!tc_valid && cycles < 100) begin
      @(posedge clk);
      #1 cycles++;
    end
    checks++;
    if (tc !== exp_tc || detect !== (exp_tc > thr)) begin
      failures++;
      $display("FAIL r=(%0d,%0d) W=%0d X=%0d Z=%0d tc=%h exp=%h detect=%b",
               vr1, vr2, vw, vx, vz, tc, exp_tc, detect);
    end
    checks++;
    if (cycles != (divides ? 36 : 4)) begin
      failures++;
      $display("FAIL latency %0d (division %b)", cycles, divides);
    end
  endtask

  initial begin
    logic signed [63:0] a, b, c, d;
    r1 = 0; r2 = 0; w = 0; x = 0; z = 0; threshold = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // hand-picked: identity covariance, Tc = r1^2 + r2^2 = 25
    run(32'sd3, 32'sd4, 64'sd1, 64'sd0, 64'sd1, 32'd20 << 16);
    run(32'sd3, 32'sd4, 64'sd1, 64'sd0, 64'sd1, 32'd30 << 16);
    // all-zero and singular covariance, huge statistic
    run(32'sd0, 32'sd0, 64'sd0, 64'sd0, 64'sd0, 32'd1);
    run(32'sd5, 32'sd1, 64'sd4, 64'sd6, 64'sd9, 32'd1);
    run(32'sd1000000, -32'sd900000, 64'sd3, 64'sd1, 64'sd2, 32'd1);
    for (int i = 0; i < 300; i++) begin
      a = $signed(64'($urandom % 2000000)) - 1000000;
      b = $signed(64'($urandom % 2000000)) - 1000000;
      c = $signed(64'($urandom % 2000000)) - 1000000;
      d = $signed(64'($urandom % 2000000)) - 1000000;
      run($signed($urandom) >>> 10, $signed($urandom) >>> 10,
          a * a + b * b, a * c + b * d, c * c + d * d, $urandom % (64 << 16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
