// fft_pkg: types, widths and helper functions shared by the variable-length,
// multi-stream radix-2 SDF FFT.
//
// Samples are complex, 16-bit signed real and imaginary parts (the 16-bit
// sample word is the published figure). Twiddle factors use the same 16-bit
// word with 14 fraction bits so that +1.0 is representable exactly; that
// format is a choice of this design. A rotated sample (sample times twiddle)
// keeps two extra integer bits because a rotation can grow a single component
// by up to sqrt(2).
//
// Configuration: the FFT length is 2^NSTAGES >> len_sel and the number of
// time-interleaved streams is 1 << str_sel; the pipeline frame (streams times
// length) is 2^NSTAGES >> tsel with tsel = len_sel - str_sel.
package fft_pkg;

  localparam int DATA_W  = 16;          // sample word length
  localparam int TW_W    = 16;          // twiddle word length (same as data)
  localparam int TW_FRAC = 14;          // twiddle fraction bits
  localparam int PROD_W  = DATA_W + 2;  // rotated sample component width

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [TW_W-1:0]   coef_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    coef_t re;
    coef_t im;
  } twiddle_t;

  typedef struct packed {
    prod_t re;
    prod_t im;
  } cplx_prod_t;

  // Size selectors: fraction of the largest size 2^NSTAGES.
  typedef enum logic [1:0] {
    SIZE_FULL    = 2'd0,
    SIZE_HALF    = 2'd1,
    SIZE_QUARTER = 2'd2
  } size_sel_e;

  // Reverse the low 'bits' bits of v.
  function automatic int unsigned bitrev(int unsigned v, int bits);
    int unsigned r;
    r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  // Saturate a wide signed value to a sample.
  function automatic sample_t sat_sample(logic signed [PROD_W+1:0] v);
    localparam logic signed [PROD_W+1:0] MAXV = (1 <<< (DATA_W-1)) - 1;
    localparam logic signed [PROD_W+1:0] MINV = -(1 <<< (DATA_W-1));
    if (v > MAXV) return sample_t'(MAXV);
    if (v < MINV) return sample_t'(MINV);
    return sample_t'(v);
  endfunction

endpackage
