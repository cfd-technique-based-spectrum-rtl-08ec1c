// tb_delay_fifo: self-checking test of the lag FIFO.  Random data is pushed with a
// random enable; a reference history array gives the value pushed MU enables ago
// (zero before that), which must equal dout whenever en is high.
module tb_delay_fifo;
  localparam int MU = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [31:0] din, dout;
  logic [31:0] hist [$];

  delay_fifo #(.MU(MU), .DW(32)) dut (.clk, .rst_n, .en, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < MU; i++) hist.push_back('0);
    din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en  = ($urandom % 3) != 0;
      din = $urandom;
      #1;
      if (en) begin
        checks++;
        if (dout !== hist[hist.size() - MU]) begin
          failures++;
          $display("FAIL step %0d dout=%h exp=%h", i, dout, hist[hist.size() - MU]);
        end
        hist.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
