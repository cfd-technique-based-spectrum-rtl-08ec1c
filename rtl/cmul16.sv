// cmul16: 16-bit complex multiplier of the autocorrelation computation module.
//
// p = a * b with four 16x16 signed multipliers, one subtractor and one adder:
//   p.re = a.re*b.re - a.im*b.im,  p.im = a.re*b.im + a.im*b.re.
// The result keeps full precision (33 bits per part); the caller decides how to
// narrow it.  The document gives the operand width (16 bits); the structure is the
// textbook four-multiplier form.  Purely combinational.
module cmul16
  import cfd_pkg::*;
(
  input  cplx16_t            a,
  input  cplx16_t            b,
  output logic signed [32:0] p_re,
  output logic signed [32:0] p_im
);
  logic signed [31:0] rr, ii, ri, ir;

  always_comb begin
    rr   = a.re * b.re;
    ii   = a.im * b.im;
    ri   = a.re * b.im;
    ir   = a.im * b.re;
    p_re = 33'(rr) - 33'(ii);
    p_im = 33'(ri) + 33'(ir);
  end
endmodule
