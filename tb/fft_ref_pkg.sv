// fft_ref_pkg: reference arithmetic for the FFT testbenches.
//
// Integer models of the fixed-point operations (twiddle quantisation,
// rounded complex rotation, halving butterfly with saturation) and an
// in-place decimation-in-time FFT over a whole pipeline frame built from
// them, written from the arithmetic rules rather than from the RTL
// structure: the testbenches compare the pipeline bit for bit against it. A
// floating-point DFT gives an independent accuracy check.
package fft_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int brev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  function automatic int q14(real v);
    real s = v * 16384.0;
    return $rtoi(s < 0.0 ? s - 0.5 : s + 0.5);
  endfunction

  // twiddle of stage s (1-based), block b: exp(-j*2*pi*brev(b)/2^s)
  function automatic void twiddle(int s, int b, output int wr, output int wi);
    real ang = 2.0 * PI * real'(brev(b, s - 1)) / real'(1 << s);
    wr = q14($cos(ang));
    wi = q14(-$sin(ang));
  endfunction

  function automatic longint floor_shift(longint v, int sh);
    return v >>> sh;
  endfunction

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // rotate (xr, xi) by (wr, wi), rounded to the sample scale
  function automatic void cmul(int xr, int xi, int wr, int wi, output longint yr, output longint yi);
    yr = floor_shift(longint'(xr) * wr - longint'(xi) * wi + 8192, 14);
    yi = floor_shift(longint'(xr) * wi + longint'(xi) * wr + 8192, 14);
  endfunction

  // One in-place DIT stage s (1-based) over a frame of T = 2^fl samples.
  function automatic void stage(int fl, int s, ref int re[], ref int im[]);
    int t = 1 << fl;
    int d = t >> s;
    for (int n = 0; n < t; n++) begin
      if ((n & d) == 0) begin
        int wr, wi;
        longint yr, yi;
        longint ar, ai;
        twiddle(s, n / (2 * d), wr, wi);
        cmul(re[n+d], im[n+d], wr, wi, yr, yi);
        ar = re[n];
        ai = im[n];
        re[n]   = sat16(floor_shift(ar + yr + 1, 1));
        im[n]   = sat16(floor_shift(ai + yi + 1, 1));
        re[n+d] = sat16(floor_shift(ar - yr + 1, 1));
        im[n+d] = sat16(floor_shift(ai - yi + 1, 1));
      end
    end
  endfunction

  // In-place DIT over a frame of T = 2^fl samples, first 'nst' stages.
  function automatic void model(int fl, int nst, ref int re[], ref int im[]);
    for (int s = 1; s <= nst; s++) stage(fl, s, re, im);
  endfunction

endpackage
