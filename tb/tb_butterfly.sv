// tb_butterfly: checks the halving butterfly against integer arithmetic.
//
// Random inputs over the full 16-bit sample range and the full 18-bit
// rotated-sample range, plus the extremes that must saturate: sum must be
// floor((a + b + 1) / 2) and diff floor((a - b + 1) / 2), clipped to 16 bits.
module tb_butterfly;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  cplx_t      a, sum, diff;
  cplx_prod_t b;
  int checks = 0, failures = 0;

  butterfly u_dut (.a, .b, .sum, .diff);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int h(longint v);
    return sat16(floor_shift(v + 1, 1));
  endfunction

  task automatic try(int ar, int ai, int br, int bi);
    a.re = sample_t'(ar); a.im = sample_t'(ai);
    b.re = prod_t'(br);   b.im = prod_t'(bi);
    #1;
    checks++;
    if (int'(sum.re) != h(ar + br) || int'(sum.im) != h(ai + bi) ||
        int'(diff.re) != h(ar - br) || int'(diff.im) != h(ai - bi)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d,%0d b=%0d,%0d: sum %0d,%0d diff %0d,%0d",
                                  ar, ai, br, bi, sum.re, sum.im, diff.re, diff.im);
    end
  endtask

  initial begin
    try(32767, -32768, 131071, -131072);
    try(-32768, 32767, 131071, -131072);
    try(3, -3, 0, 0);
    try(1, -1, 0, 1);
    for (int i = 0; i < 3000; i++)
      try(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
          int'($urandom_range(92000)) - 46000, int'($urandom_range(92000)) - 46000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
