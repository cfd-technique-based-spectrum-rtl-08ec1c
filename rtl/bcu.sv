// bcu: butterfly computation unit of the resource-shared FFT stage.
//
// Holds its two 64-bit input words and its twiddle factor in registers (loaded when
// `load` is high) and computes, from those registers, the radix-2
// decimation-in-frequency butterfly with a truncation unit on each output:
//   y0 = (a + b) / 2
//   y1 = ((a - b) / 2) * tw
// The halving in every stage keeps the 32-bit parts from overflowing; after log2(N)
// stages the FFT output is the DFT divided by N.  The complex twiddle multiplication
// uses four 32x16 multipliers and drops the 14 fractional twiddle bits by arithmetic
// shift (truncation), then saturates to 32 bits.  The document lists registers,
// butterfly and multiplier; the scaling and rounding are this design's choices.
//
// Timing: y0/y1 are valid the cycle after `load`, combinationally from the registers.
module bcu
  import cfd_pkg::*;
(
  input  logic    clk,
  input  logic    load,   // capture a, b and tw
  input  cplx32_t a,      // upper input x[j]
  input  cplx32_t b,      // lower input x[j + N/2]
  input  cplx16_t tw,     // twiddle factor for this butterfly
  output cplx32_t y0,     // to x'[2j]
  output cplx32_t y1      // to x'[2j+1]
);
  cplx32_t a_q, b_q;
  cplx16_t tw_q;

  always_ff @(posedge clk) begin
    if (load) begin
      a_q  <= a;
      b_q  <= b;
      tw_q <= tw;
    end
  end

  function automatic logic signed [31:0] sat32(input logic signed [35:0] v);
    if (v > 36'sh0_7fff_ffff)       return 32'sh7fff_ffff;
    else if (v < -36'sh0_8000_0000) return 32'sh8000_0000;
    else                            return v[31:0];
  endfunction

  logic signed [32:0] sum_re, sum_im, dif_re, dif_im;
  logic signed [31:0] d_re, d_im;
  logic signed [48:0] p_rr, p_ii, p_ri, p_ir;
  logic signed [48:0] m_re, m_im;
  logic signed [48:0] m_re_s, m_im_s;

  always_comb begin
    sum_re = 33'(a_q.re) + 33'(b_q.re);
    sum_im = 33'(a_q.im) + 33'(b_q.im);
    dif_re = 33'(a_q.re) - 33'(b_q.re);
    dif_im = 33'(a_q.im) - 33'(b_q.im);
    // truncation units: divide by two
    y0.re  = sum_re[32:1];
    y0.im  = sum_im[32:1];
    d_re   = dif_re[32:1];
    d_im   = dif_im[32:1];
    // twiddle multiplier
    p_rr   = d_re * tw_q.re;
    p_ii   = d_im * tw_q.im;
    p_ri   = d_re * tw_q.im;
    p_ir   = d_im * tw_q.re;
    m_re   = p_rr - p_ii;
    m_im   = p_ri + p_ir;
    m_re_s = m_re >>> TW_FRAC;
    m_im_s = m_im >>> TW_FRAC;
    y1.re  = sat32(m_re_s[35:0]);
    y1.im  = sat32(m_im_s[35:0]);
  end
endmodule
