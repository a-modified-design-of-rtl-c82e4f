// tb_sdf_buffer: delay line with DMAX = 8, shifted at random moments.
//
// For each tap (8, 4 and 2 words) the output must be the word written that
// many shifts earlier; a history of written words gives the expected value.
module tb_sdf_buffer;
  import fft_pkg::*;

  localparam int DMAX = 8;

  logic       clk = 1'b0;
  logic       en = 1'b0;
  logic [1:0] tap_sel = '0;
  cplx_t      din = '0, dout;
  cplx_t      hist [$];
  int checks = 0, failures = 0;

  sdf_buffer #(.DMAX(DMAX)) u_dut (.clk, .en, .tap_sel, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      int d;
      @(negedge clk);
      tap_sel = 2'(i / 200);
      d = DMAX >> (i / 200);
      #1;
      if (hist.size() >= d) begin
        checks++;
        if (dout != hist[hist.size() - d]) begin
          failures++;
          if (failures < 10) $display("FAIL tap %0d step %0d", tap_sel, i);
        end
      end
      en = ($urandom_range(3) != 0);
      din = cplx_t'($urandom);
      if (en) hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
