// ccm: complex conjugate module of the autocorrelation computation module (ACM).
//
// Returns conj(x) = re - j*im for a 32-bit complex sample.  The document names the
// block and its function only; negating the imaginary part is all it has to do.  This
// design saturates the single value that cannot be negated in 16 bits (-32768 becomes
// +32767) rather than letting it wrap.  Purely combinational.
module ccm
  import cfd_pkg::*;
(
  input  cplx16_t x,   // sample to conjugate
  output cplx16_t y    // conj(x)
);
  always_comb begin
    y.re = x.re;
    y.im = (x.im == 16'sh8000) ? 16'sh7fff : -x.im;
  end
endmodule
