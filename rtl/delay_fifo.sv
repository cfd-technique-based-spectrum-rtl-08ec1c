// delay_fifo: first-in first-out register chain that delays the input stream by MU
// samples, giving x(n-mu) for the autocorrelation computation module.
//
// The document places a FIFO ahead of the complex conjugate module to produce the
// delayed copy of x(n); its depth (the lag mu) is not given, so MU is a parameter
// with an assumed default.  The chain advances only when `en` is high, so the delay
// is counted in samples, not clock cycles.  `dout` is combinational from the oldest
// stage: when a sample x(n) is presented with `en`, `dout` is x(n-MU) in the same
// cycle.  All stages reset to zero, so the first MU samples see a zero past.
module delay_fifo #(
  parameter int unsigned MU = 4,   // lag in samples (>= 1)
  parameter int unsigned DW = 32   // word width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,    // shift in `din`
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout   // value shifted in MU enables ago
);
  logic [DW-1:0] stage_q [MU];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(MU); i++) stage_q[i] <= '0;
    end else if (en) begin
      stage_q[0] <= din;
      for (int i = 1; i < int'(MU); i++) stage_q[i] <= stage_q[i-1];
    end
  end

  assign dout = stage_q[MU-1];
endmodule
