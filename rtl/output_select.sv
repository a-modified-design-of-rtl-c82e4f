// output_select: picks the stage that delivers the FFT result.
//
// in_valid/in_data index 0 is the last stage, 1 the stage before it, 2 the
// one before that; sel = 0, 1 or 2 chooses among them (full, half and
// quarter FFT length). A value of 3 is read as 2. Taking the result from
// one of the last three stages is as published; the encoding is this
// design's choice. Purely combinational.
module output_select
  import fft_pkg::*;
(
  input  logic [1:0] sel,
  input  logic [2:0] in_valid,
  input  cplx_t      in_data [3],
  output logic       out_valid,
  output cplx_t      out_data
);

  always_comb begin
    unique case (sel)
      2'd0: begin out_valid = in_valid[0]; out_data = in_data[0]; end
      2'd1: begin out_valid = in_valid[1]; out_data = in_data[1]; end
      default: begin out_valid = in_valid[2]; out_data = in_data[2]; end
    endcase
  end

endmodule
