// tb_complex_mult: checks the twiddle rotation against integer arithmetic.
//
// Random samples and twiddles, plus the corner values (full-scale samples,
// twiddles +1, -1, +j, -j): y must equal round((x * w) / 2^14) per
// component, rounding half up, with 18-bit results.
module tb_complex_mult;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  cplx_t      x;
  twiddle_t   w;
  cplx_prod_t y;
  int checks = 0, failures = 0;

  complex_mult u_dut (.x, .w, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(int xr, int xi, int wr, int wi);
    longint er, ei;
    x.re = sample_t'(xr); x.im = sample_t'(xi);
    w.re = coef_t'(wr);   w.im = coef_t'(wi);
    #1;
    cmul(xr, xi, wr, wi, er, ei);
    checks++;
    if (longint'(y.re) != er || longint'(y.im) != ei) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d,%0d w=%0d,%0d: got %0d,%0d expected %0d,%0d",
                                  xr, xi, wr, wi, y.re, y.im, er, ei);
    end
  endtask

  initial begin
    try(32767, -32768, 16384, 0);
    try(-32768, -32768, 0, -16384);
    try(-32768, 32767, -16384, 0);
    try(-32768, -32768, 11585, -11585);
    try(100, 200, 0, 16384);
    for (int i = 0; i < 2000; i++) begin
      int wr, wi;
      twiddle(11, int'($urandom_range(1023)), wr, wi);
      try(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768, wr, wi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
