// mac_unit: multiply-and-accumulate unit of the test-statistic path.
//
// Accumulates a*b over a block of samples (the N FFT bins of one sensing frame) with
// a 32x32 signed multiplier and a wide accumulator, and at the end of the block
// delivers the block mean, sum >>> SHIFT (SHIFT = log2(N)), truncated to 64 bits.
// Three of these units compute the entries W = mean(Re^2), X = Y = mean(Re*Im) and
// Z = mean(Im^2) of the 2x2 covariance matrix of the FFT bins that the test-statistic
// module needs.  The document gives the 64-bit input (one complex FFT word), the
// 32-bit multiplier and the accumulator; what is accumulated and the averaging are
// this design's reading.
//
// Timing: one product per cycle while in_valid; `first` restarts the sum with the
// current product, `last` closes the block.  res and res_valid follow the cycle after
// the `last` product; res holds until the next block closes.
module mac_unit
  import cfd_pkg::*;
#(
  parameter int unsigned SHIFT = 11,  // log2 of the block length
  localparam int unsigned ACC_W = 64 + SHIFT + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    first,   // first product of a block
  input  logic                    last,    // last product of a block
  input  logic signed [31:0]      a,
  input  logic signed [31:0]      b,
  output logic                    res_valid,
  output logic signed [COV_W-1:0] res      // block mean of a*b
);
  logic signed [63:0]      prod;
  logic signed [ACC_W-1:0] acc_q, acc_d;
  logic signed [ACC_W-1:0] mean;

  always_comb begin
    prod  = a * b;
    acc_d = (first ? '0 : acc_q) + ACC_W'(prod);
    mean  = acc_d >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      res       <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= in_valid && last;
      if (in_valid) begin
        acc_q <= acc_d;
        if (last) res <= mean[COV_W-1:0];
      end
    end
  end
endmodule
