// butterfly: radix-2 butterfly of one SDF stage, a complex adder and a
// complex subtractor.
//
// sum = (a + b) / 2 and diff = (a - b) / 2, where a is the word coming out of
// the stage buffer and b is the incoming sample already rotated by the
// twiddle factor. Halving every stage keeps the 16-bit word from growing, so
// an L-point FFT comes out divided by L; the halving rounds half up (add one,
// shift right) and the result saturates to 16 bits. The adder/subtractor pair
// is as published; the scaling, rounding and saturation are this design's
// choice. Purely combinational.
module butterfly
  import fft_pkg::*;
(
  input  cplx_t      a,
  input  cplx_prod_t b,
  output cplx_t      sum,
  output cplx_t      diff
);

  typedef logic signed [PROD_W+1:0] acc_t;

  acc_t s_re, s_im, d_re, d_im;

  always_comb begin
    s_re = acc_t'(a.re) + acc_t'(b.re) + acc_t'(1);
    s_im = acc_t'(a.im) + acc_t'(b.im) + acc_t'(1);
    d_re = acc_t'(a.re) - acc_t'(b.re) + acc_t'(1);
    d_im = acc_t'(a.im) - acc_t'(b.im) + acc_t'(1);
    sum.re  = sat_sample(s_re >>> 1);
    sum.im  = sat_sample(s_im >>> 1);
    diff.re = sat_sample(d_re >>> 1);
    diff.im = sat_sample(d_im >>> 1);
  end

endmodule
