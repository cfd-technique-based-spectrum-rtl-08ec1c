// freq_select: frequency selection module (FSM of the document, not a state machine).
//
// Runs in parallel with the MAC units on the stream of FFT bins and taps the bin at
// the cyclic frequency of interest: when the bin number equals `alpha` it captures
// r1 = Re F(alpha) and r2 = Im F(alpha), the vector r of the test statistic.  As in the
// document it uses a 16-bit counter that follows the bins as they stream past and
// compares it with the wanted bin.  The counter restarts on `first`; the block never
// looks at the bin number the FFT reports, only at its own count.
//
// Timing: r1/r2 update the cycle after the matching bin; r_valid pulses the cycle
// after `last` (end of the frame) and r1/r2 then hold the frame's F(alpha).
module freq_select
  import cfd_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        alpha,     // bin number of the cyclic frequency
  input  logic               in_valid,
  input  logic               first,     // first bin of a frame
  input  logic               last,      // last bin of a frame
  input  cplx32_t            f_in,      // F(k)
  output logic signed [31:0] r1,        // Re F(alpha)
  output logic signed [31:0] r2,        // Im F(alpha)
  output logic               r_valid,   // r1/r2 hold a complete frame's value
  output logic               hit        // pulse: the bin was captured (monitoring)
);
  logic [15:0] cnt_q, k;

  assign k = first ? 16'd0 : cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      r1      <= '0;
      r2      <= '0;
      r_valid <= 1'b0;
      hit     <= 1'b0;
    end else begin
      r_valid <= in_valid && last;
      hit     <= 1'b0;
      if (in_valid) begin
        cnt_q <= k + 16'd1;
        if (k == alpha) begin
          r1  <= f_in.re;
          r2  <= f_in.im;
          hit <= 1'b1;
        end
      end
    end
  end
endmodule
