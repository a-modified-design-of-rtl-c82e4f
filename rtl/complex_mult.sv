// complex_mult: rotates a complex sample by a twiddle factor, y = x * w.
//
// Four 16x16 real products and two additions; the 33-bit results are
// rounded (add half an LSB, arithmetic shift) back to the sample scale,
// dropping the 14 twiddle fraction bits. The result keeps 18 bits per
// component because a rotation may grow one component by up to sqrt(2). The
// published design only names a complex multiplier per stage; this
// four-multiplier form and the rounding are this design's choice. Purely
// combinational.
module complex_mult
  import fft_pkg::*;
(
  input  cplx_t      x,
  input  twiddle_t   w,
  output cplx_prod_t y
);

  localparam int FULL_W = DATA_W + TW_W + 1;
  typedef logic signed [FULL_W-1:0] full_t;

  localparam full_t HALF = full_t'(1) <<< (TW_FRAC - 1);

  full_t p_re, p_im;

  always_comb begin
    p_re = full_t'(x.re) * full_t'(w.re) - full_t'(x.im) * full_t'(w.im) + HALF;
    p_im = full_t'(x.re) * full_t'(w.im) + full_t'(x.im) * full_t'(w.re) + HALF;
    y.re = prod_t'(p_re >>> TW_FRAC);
    y.im = prod_t'(p_im >>> TW_FRAC);
  end

endmodule
