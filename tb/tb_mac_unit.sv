// tb_mac_unit: self-checking test of the MAC unit with blocks of 16 products
// (SHIFT = 4).  Random 32-bit operands, including the most negative value, are
// streamed with random gaps; the expected block mean is the exact sum, formed in
// 128-bit arithmetic, shifted right by 4 (floor), truncated to 64 bits.  The
// one-cycle result latency and the hold of the result are checked too.
module tb_mac_unit;
  localparam int SHIFT = 4, LEN = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, last = 0, res_valid;
  logic signed [31:0] a, b;
  logic signed [63:0] res;

  mac_unit #(.SHIFT(SHIFT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [127:0] sum, expv;
    a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 30; blk++) begin
      sum = 0;
      for (int i = 0; i < LEN; ) begin
        @(negedge clk);
        in_valid = ($urandom % 4) != 0;
        first = (i == 0); last = (i == LEN - 1);
        a = $signed($urandom); b = $signed($urandom);
        if (blk % 5 == 0) begin a = 32'sh8000_0000; b = 32'sh8000_0000; end   // largest products
        if (in_valid) begin
          sum += 128'(a) * 128'(b);
          i++;
        end
        @(posedge clk);
        #1;
        checks++;
        if (res_valid !== (in_valid && last)) begin
          failures++;
          $display("FAIL res_valid timing blk %0d", blk);
        end
        in_valid = 0;
      end
      expv = sum >>> SHIFT;
      checks++;
      if (res !== expv[63:0]) begin
        failures++;
        $display("FAIL block %0d res=%0d exp=%0d", blk, res, expv[63:0]);
      end
      repeat (2) @(posedge clk);
      #1;
      checks++;
      if (res !== expv[63:0]) begin
        failures++;
        $display("FAIL block %0d result not held", blk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
