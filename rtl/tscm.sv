// tscm: test-statistic computation module.
//
// Forms the cyclostationary test statistic
//   Tc = r * inv(S) * r^T,   r = [r1 r2] = [Re F(alpha)  Im F(alpha)],
//   S  = [[W X] [Y Z]] with Y = X,
// which for a 2x2 matrix is
//   Tc = (r1^2*Z - 2*r1*r2*X + r2^2*W) / (W*Z - X^2).
// This uses exactly the parts the document lists for the module: eight multipliers
// (r1^2, r2^2, r1*r2, W*Z, X*X, then r1^2*Z, r1*r2*X, r2^2*W), two subtractors (in the
// numerator and in W*Z - X^2), one adder, a left shifter (the factor 2) and a divider.
// The closed form is this design's reading of that list.  Tc is produced in unsigned
// Q16.16 and saturates at 2^32-1; a zero denominator gives 0 for a zero numerator and
// saturation otherwise.  A negative numerator (possible only through rounding) is
// clamped to zero.  `detect` compares Tc with `threshold` (same format): the
// comparison is this design's addition, the document stops at Tc.
//
// Timing: `start` with valid operands; two multiplier stages, one add stage, then a
// restoring divider that produces one quotient bit per cycle.  tc_valid pulses
// 3 + 32 + 1 = 36 cycles after `start` (TC_W = 32); `busy` is high meanwhile and a
// `start` during busy is ignored.
module tscm
  import cfd_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [31:0]      r1,
  input  logic signed [31:0]      r2,
  input  logic signed [COV_W-1:0] w,
  input  logic signed [COV_W-1:0] x,
  input  logic signed [COV_W-1:0] z,
  input  logic [TC_W-1:0]         threshold,  // Q16.16
  output logic                    busy,
  output logic                    tc_valid,
  output logic [TC_W-1:0]         tc,         // Q16.16
  output logic                    detect      // tc > threshold, valid with tc_valid
);
  localparam int PW = 2 * COV_W + 2;               // products and their sums
  localparam int RW = PW + TC_FRAC + 1;            // dividend
  localparam int QB = TC_W;                        // quotient bits

  typedef enum logic [2:0] {S_IDLE, S_MUL1, S_MUL2, S_SUM, S_DIV, S_DONE} state_t;
  state_t state_q;

  // operand registers
  logic signed [31:0]      r1_q, r2_q;
  logic signed [COV_W-1:0] w_q, x_q, z_q;
  // first multiplier rank
  logic signed [64:0]      r1sq_q, r2sq_q, r1r2_q;
  logic signed [PW-1:0]    wz_q, xx_q;
  // second multiplier rank
  logic signed [PW-1:0]    t1_q, t2_q, t3_q, den_q;
  // divider
  logic [RW-1:0]           rem_q;
  logic [RW-1:0]           dsh_q;                  // den << bit
  logic [QB-1:0]           q_q;
  logic [$clog2(QB)-1:0]   bit_q;

  logic signed [PW-1:0] num;
  logic [RW-1:0]        dividend, den_top;

  always_comb begin
    // adder, left shifter and subtractor of the numerator
    num      = (t1_q + t3_q) - (t2_q <<< 1);
    dividend = (num < 0) ? '0 : (RW'(num) << TC_FRAC);
    den_top  = RW'(den_q) << QB;
  end

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      tc_valid <= 1'b0;
      tc       <= '0;
      detect   <= 1'b0;
      r1_q <= '0; r2_q <= '0; w_q <= '0; x_q <= '0; z_q <= '0;
      r1sq_q <= '0; r2sq_q <= '0; r1r2_q <= '0; wz_q <= '0; xx_q <= '0;
      t1_q <= '0; t2_q <= '0; t3_q <= '0; den_q <= '0;
      rem_q <= '0; dsh_q <= '0; q_q <= '0; bit_q <= '0;
    end else begin
      tc_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          r1_q <= r1; r2_q <= r2; w_q <= w; x_q <= x; z_q <= z;
          state_q <= S_MUL1;
        end
        S_MUL1: begin
          r1sq_q  <= 65'(r1_q) * 65'(r1_q);
          r2sq_q  <= 65'(r2_q) * 65'(r2_q);
          r1r2_q  <= 65'(r1_q) * 65'(r2_q);
          wz_q    <= PW'(w_q) * PW'(z_q);
          xx_q    <= PW'(x_q) * PW'(x_q);
          state_q <= S_MUL2;
        end
        S_MUL2: begin
          t1_q    <= PW'(r1sq_q) * PW'(z_q);
          t2_q    <= PW'(r1r2_q) * PW'(x_q);
          t3_q    <= PW'(r2sq_q) * PW'(w_q);
          den_q   <= wz_q - xx_q;                 // second subtractor
          state_q <= S_SUM;
        end
        S_SUM: begin
          q_q   <= '0;
          bit_q <= ($clog2(QB))'(QB - 1);
          rem_q <= dividend;
          dsh_q <= RW'(den_q) << (QB - 1);
          if (den_q <= 0) begin
            // degenerate covariance
            q_q     <= (num <= 0) ? '0 : '1;
            state_q <= S_DONE;
          end else if (dividend >= den_top) begin
            q_q     <= '1;                        // quotient does not fit: saturate
            state_q <= S_DONE;
          end else begin
            state_q <= S_DIV;
          end
        end
        S_DIV: begin
          if (rem_q >= dsh_q) begin
            rem_q        <= rem_q - dsh_q;
            q_q[bit_q]   <= 1'b1;
          end
          dsh_q <= dsh_q >> 1;
          if (bit_q == '0) state_q <= S_DONE;
          else             bit_q   <= bit_q - 1'b1;
        end
        S_DONE: begin
          tc       <= q_q;
          detect   <= q_q > threshold;
          tc_valid <= 1'b1;
          state_q  <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
