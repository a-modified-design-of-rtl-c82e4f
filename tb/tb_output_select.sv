// tb_output_select: every select value with random stage outputs; the
// selected valid and word must come from the last stage (sel 0), the one
// before (sel 1) or the one before that (sel 2 and 3).
module tb_output_select;
  import fft_pkg::*;

  logic [1:0] sel;
  logic [2:0] in_valid;
  cplx_t      in_data [3];
  logic       out_valid;
  cplx_t      out_data;
  int checks = 0, failures = 0;

  output_select u_dut (.sel, .in_valid, .in_data, .out_valid, .out_data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      int k;
      sel = 2'(i % 4);
      in_valid = 3'($urandom_range(7));
      for (int j = 0; j < 3; j++) in_data[j] = cplx_t'($urandom);
      #1;
      k = (i % 4 == 3) ? 2 : i % 4;
      checks++;
      if (out_valid != in_valid[k] || out_data != in_data[k]) begin
        failures++;
        $display("FAIL sel %0d", sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
