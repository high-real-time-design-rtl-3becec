// dpc_pkg: types and address arithmetic shared by the pulse-compression FFT.
//
// Samples are complex numbers of two IEEE-754 single-precision words (the
// format the design computes in throughout). An N-point transform
// (N = 4^(LOG4L+1), 4096 by default) is split into four interleaved sets of
// L = N/4 points: sample n goes to memory n mod 4. Each set is transformed by
// an in-place radix-4 decimation-in-time FFT of LOG4L stages, then a last
// radix-4 stage combines the four sets across the memories.
//
// The address formulas below are the standard in-place radix-4 DIT indexing
// (digit-reversed input, natural-order output); the paper states only that the
// addresses are generated for the 1024-point transform and shared by the four
// sets, so the exact formulas are this design's own.
package dpc_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } cpx_t;

  // Swap real and imaginary parts; used on the way in and out of an IFFT.
  function automatic cpx_t cpx_swap(cpx_t z);
    cpx_swap.re = z.im;
    cpx_swap.im = z.re;
  endfunction

  // Base-4 digit reversal of an index with `digits` digits (up to 8).
  function automatic logic [15:0] digit_rev(logic [15:0] v, int unsigned digits);
    logic [15:0] r;
    r = '0;
    for (int d = 0; d < 8; d++)
      if (d < digits) r[2*(digits-1-d) +: 2] = v[2*d +: 2];
    return r;
  endfunction

  // Address of operand q (0..3) of butterfly b in radix-4 DIT stage s.
  // The span between operands is 4^s; butterflies of one group share the
  // low digits j = b mod 4^s.
  function automatic logic [15:0] op_addr(int unsigned s, logic [15:0] b, logic [1:0] q);
    logic [15:0] j, g;
    j = b & ((16'd1 << (2*s)) - 16'd1);
    g = b >> (2*s);
    return (g << (2*s + 2)) | (16'(q) << (2*s)) | j;
  endfunction

  // Twiddle exponent (in units of W_N, N = 4^(log4l+1)) for operand q of
  // butterfly b in stage s of the L-point FFTs: W_{4^(s+1)}^(q*j).
  function automatic logic [15:0] tw_exp(int unsigned s, int unsigned log4l,
                                         logic [15:0] b, logic [1:0] q);
    logic [15:0] j;
    j = b & ((16'd1 << (2*s)) - 16'd1);
    return (16'(q) * j) << (2*(log4l - s));
  endfunction

endpackage
