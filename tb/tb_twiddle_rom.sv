// tb_twiddle_rom: reads every entry of the ROMs of stages 1, 4 and 11.
//
// Entry b of stage s must be exp(-j*2*pi*r/2^s), r the (s-1)-bit reversal of
// b, in 16-bit words with 14 fraction bits rounded to nearest; for stage 4
// the angles follow the sequence 0,4,2,6,1,5,3,7 sixteenths. The read is
// synchronous: the word appears after the clock edge with ce high, and
// holds while ce is low.
module tb_twiddle_rom;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  logic        clk = 1'b0;
  logic        ce = 1'b1;
  logic        a1;
  logic [2:0]  a4;
  logic [9:0]  a11;
  twiddle_t    w1, w4, w11;
  int checks = 0, failures = 0;

  twiddle_rom #(.STAGE(1))  u_s1  (.clk, .ce, .addr(a1),  .w(w1));
  twiddle_rom #(.STAGE(4))  u_s4  (.clk, .ce, .addr(a4),  .w(w4));
  twiddle_rom #(.STAGE(11)) u_s11 (.clk, .ce, .addr(a11), .w(w11));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ok(twiddle_t w, real num, real den);
    int er = q14($cos(2.0 * PI * num / den));
    int ei = q14(-$sin(2.0 * PI * num / den));
    return int'(w.re) == er && int'(w.im) == ei;
  endfunction

  localparam int SEQ4 [8] = '{0, 4, 2, 6, 1, 5, 3, 7};

  initial begin
    a1 = 1'b0; a4 = '0; a11 = '0;
    @(negedge clk);
    checks++;
    if (int'(w1.re) != 16384 || int'(w1.im) != 0) failures++;
    for (int b = 0; b < 8; b++) begin
      a4 = 3'(b);
      @(negedge clk);
      checks++;
      if (!ok(w4, real'(SEQ4[b]), 16.0)) begin
        failures++;
        $display("FAIL stage 4 entry %0d: %0d,%0d", b, w4.re, w4.im);
      end
    end
    for (int b = 0; b < 1024; b++) begin
      int r;
      r = 0;
      for (int i = 0; i < 10; i++) r = (r << 1) | ((b >> i) & 1);
      a11 = 10'(b);
      @(negedge clk);
      checks++;
      if (!ok(w11, real'(r), 2048.0)) begin
        failures++;
        if (failures < 10) $display("FAIL stage 11 entry %0d: %0d,%0d", b, w11.re, w11.im);
      end
    end
    // clock enable low: the word must hold
    ce = 1'b0;
    a4 = 3'd1;
    @(negedge clk);
    checks++;
    if (!ok(w4, 7.0, 16.0)) begin
      failures++;
      $display("FAIL stage 4 word changed with ce low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
