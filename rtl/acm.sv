// acm: autocorrelation computation module.  For every input sample x(n) it produces
// the lag product y(n) = x(n) * conj(x(n-mu)), whose spectrum carries the cyclic
// autocorrelation that the sensor looks for.
//
// Structure, as in the document: a FIFO (delay_fifo) supplies x(n-mu), the complex
// conjugate module (ccm) conjugates it and a 16-bit complex multiplier (cmul16)
// multiplies it with x(n).  The 33-bit product parts are saturated to the 32-bit
// parts of the 64-bit FFT word (only -32768*-32768 + -32768*-32768 can exceed them);
// saturation is this design's choice.
//
// Timing: one sample per cycle when in_valid is high; y is registered, so out_valid
// follows in_valid by one cycle.  The FIFO holds the stream across frames, so the lag
// product of the first samples of a frame uses the end of the previous frame.
module acm
  import cfd_pkg::*;
#(
  parameter int unsigned MU = 4   // lag mu in samples
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  cplx16_t x_in,
  output logic    out_valid,
  output cplx32_t y_out
);
  cplx16_t            x_dly, x_conj;
  logic signed [32:0] p_re, p_im;

  delay_fifo #(.MU(MU), .DW(32)) u_fifo (
    .clk, .rst_n, .en(in_valid), .din(x_in), .dout(x_dly)
  );

  ccm u_ccm (.x(x_dly), .y(x_conj));

  cmul16 u_mul (.a(x_in), .b(x_conj), .p_re, .p_im);

  function automatic logic signed [31:0] sat32(input logic signed [32:0] v);
    if (v > 33'sh0_7fff_ffff)       return 32'sh7fff_ffff;
    else if (v < -33'sh0_8000_0000) return 32'sh8000_0000;
    else                            return v[31:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y_out.re <= sat32(p_re);
        y_out.im <= sat32(p_im);
      end
    end
  end
endmodule
