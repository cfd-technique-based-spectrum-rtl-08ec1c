// cfd_sensor: cyclostationary-feature-detection (CFD) spectrum sensor for a
// cognitive-radio secondary user, working in the frequency domain.
//
// A frame of N complex samples x(n) is turned into the lag product
// x(n)*conj(x(n-mu)) (acm), transformed by a resource-shared N-point FFT (fft_core),
// and the stream of FFT bins F(k) feeds, in parallel, three MAC units and the
// frequency selection module.  The MAC units estimate the covariance entries
// W = mean(Re F^2), X = mean(Re F * Im F), Z = mean(Im F^2); the frequency selection
// module captures r = F(alpha) at the cyclic frequency of interest.  The test-statistic
// module (tscm) then forms Tc = r*inv([[W X][X Z]])*r^T and compares it with a
// threshold: a primary user is declared present when Tc exceeds it.  The chain of
// blocks follows the document; what the MAC units accumulate, the decision compare
// and the framing are this design's choices.
//
// Interface: samples enter with in_valid/in_ready (one per cycle while in_ready).
// in_ready is high while the FFT input register is filling and drops once N samples
// of the frame are taken.  Per frame the sensor needs N input cycles, 1 ACM cycle,
// log2(N)*(N/(2P)+1) FFT cycles, N read-out cycles, 1 cycle to close the MAC sums and
// 36 cycles of test statistic; with the defaults (N = 2048, P = 64) tc_valid rises
// 4321 cycles after the clock edge that takes the first sample of an uninterrupted
// frame.  The next frame can be offered as soon as
// in_ready rises again, while the test statistic of the previous one is still being
// formed.  alpha and threshold must stay stable while a frame is processed.
module cfd_sensor
  import cfd_pkg::*;
#(
  parameter int unsigned N  = 2048,  // FFT points = samples per sensing frame
  parameter int unsigned P  = 64,    // butterfly computation units
  parameter int unsigned MU = 4,     // autocorrelation lag mu
  localparam int unsigned AW = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  cplx16_t                 x_in,       // x(n): 16-bit I and Q
  output logic                    in_ready,
  input  logic [15:0]             alpha,      // FFT bin of the cyclic frequency
  input  logic [TC_W-1:0]         threshold,  // decision threshold, Q16.16
  output logic                    tc_valid,   // pulse: tc and detect are new
  output logic [TC_W-1:0]         tc,         // test statistic, Q16.16
  output logic                    detect,     // primary user present
  // intermediate results, for observation
  output logic                    stat_valid, // pulse: r and W, X, Z of a frame are ready
  output logic signed [31:0]      r1,
  output logic signed [31:0]      r2,
  output logic signed [COV_W-1:0] cov_w,
  output logic signed [COV_W-1:0] cov_x,
  output logic signed [COV_W-1:0] cov_z
);
  // ---------------- input framing: exactly N samples per frame
  logic          fft_in_ready;
  logic [AW:0]   in_cnt_q;
  logic          take;

  assign in_ready = fft_in_ready && (in_cnt_q < (AW+1)'(N));
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             in_cnt_q <= '0;
    else if (!fft_in_ready) in_cnt_q <= '0;
    else if (take)          in_cnt_q <= in_cnt_q + 1'b1;
  end

  // ---------------- autocorrelation computation module
  logic    acm_valid;
  cplx32_t acm_y;

  acm #(.MU(MU)) u_acm (
    .clk, .rst_n, .in_valid(take), .x_in, .out_valid(acm_valid), .y_out(acm_y)
  );

  // ---------------- FFT module
  logic        f_valid, f_last, stage_done;
  logic [15:0] f_k;
  cplx32_t     f_data;
  logic        f_first;

  fft_core #(.N(N), .P(P)) u_fft (
    .clk, .rst_n, .in_valid(acm_valid), .in_data(acm_y), .in_ready(fft_in_ready),
    .out_valid(f_valid), .out_k(f_k), .out_last(f_last), .out_data(f_data),
    .stage_done
  );

  assign f_first = f_valid && (f_k == 16'd0);

  // ---------------- three MAC units and the frequency selection module
  logic w_valid, x_valid, z_valid, r_valid, fsm_hit;

  mac_unit #(.SHIFT(AW)) u_mac_w (
    .clk, .rst_n, .in_valid(f_valid), .first(f_first), .last(f_last),
    .a(f_data.re), .b(f_data.re), .res_valid(w_valid), .res(cov_w)
  );
  mac_unit #(.SHIFT(AW)) u_mac_x (
    .clk, .rst_n, .in_valid(f_valid), .first(f_first), .last(f_last),
    .a(f_data.re), .b(f_data.im), .res_valid(x_valid), .res(cov_x)
  );
  mac_unit #(.SHIFT(AW)) u_mac_z (
    .clk, .rst_n, .in_valid(f_valid), .first(f_first), .last(f_last),
    .a(f_data.im), .b(f_data.im), .res_valid(z_valid), .res(cov_z)
  );

  freq_select u_fsm (
    .clk, .rst_n, .alpha, .in_valid(f_valid), .first(f_first), .last(f_last),
    .f_in(f_data), .r1, .r2, .r_valid, .hit(fsm_hit)
  );

  assign stat_valid = w_valid && x_valid && z_valid && r_valid;

  // ---------------- test-statistic computation module
  logic tscm_busy;

  tscm u_tscm (
    .clk, .rst_n, .start(stat_valid), .r1, .r2, .w(cov_w), .x(cov_x), .z(cov_z),
    .threshold, .busy(tscm_busy), .tc_valid, .tc, .detect
  );

  // the next frame's statistics cannot arrive before the divider is free
  assert property (@(posedge clk) disable iff (!rst_n) stat_valid |-> !tscm_busy)
    else $error("cfd_sensor: frame statistics arrived while the test statistic was busy");
endmodule
