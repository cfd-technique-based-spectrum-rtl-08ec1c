// cfd_pkg: types and constants shared by the cyclostationary-feature spectrum sensor.
//
// The sensor takes 32-bit complex samples (16-bit real and imaginary parts), forms the
// lag product x(n)*conj(x(n-mu)) at 64 bits (32-bit parts) and transforms it with a
// resource-shared radix-2 FFT whose data words are 64 bits wide.  Twiddle factors are
// 16-bit fixed point with TW_FRAC fractional bits, computed at elaboration from cos/sin.
// The sample widths follow the document; the twiddle format and the fixed-point
// formats of the test statistic are choices of this design.
package cfd_pkg;

  // 32-bit input sample: 16-bit real and imaginary parts, two's complement
  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx16_t;

  // 64-bit FFT data word: 32-bit real and imaginary parts
  typedef struct packed {
    logic signed [31:0] re;
    logic signed [31:0] im;
  } cplx32_t;

  // twiddle factors: Q2.14, so that +1.0 is representable
  localparam int TW_FRAC = 14;

  // fractional bits of the test statistic Tc and its threshold (Q16.16)
  localparam int TC_FRAC = 16;
  localparam int TC_W    = 32;

  // width of the covariance terms W, X, Z delivered by the MAC units
  localparam int COV_W = 64;

  // phases of the shared-stage FFT: load the input register, run the stages, read out
  typedef enum logic [1:0] {
    PH_LOAD = 2'd0,
    PH_COMP = 2'd1,
    PH_OUT  = 2'd2
  } fft_phase_t;

  // W_n^k = exp(-j*2*pi*k/n), rounded to Q2.14
  function automatic cplx16_t twiddle(input int k, input int n);
    cplx16_t t;
    real ang;
    ang  = 6.283185307179586 * real'(k) / real'(n);
    t.re = 16'($rtoi($floor($cos(ang) * real'(1 << TW_FRAC) + 0.5)));
    t.im = 16'($rtoi($floor(-$sin(ang) * real'(1 << TW_FRAC) + 0.5)));
    return t;
  endfunction

  // reverse the low `bits` bits of v
  function automatic int unsigned bitrev(input int unsigned v, input int bits);
    int unsigned r;
    r = 0;
    for (int i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

endpackage
