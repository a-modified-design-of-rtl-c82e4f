// sdf_buffer: feedback delay line of one SDF stage.
//
// A shift register of DMAX complex words (real and imaginary parts in
// separate registers of the packed word): when en is high the input is
// written into the first register and every word moves one place on. The
// output is taken at one of three depths, DMAX, DMAX/2 or DMAX/4 (never below
// one word), so one stage serves pipeline frames of 2^NSTAGES, 2^NSTAGES/2 and
// 2^NSTAGES/4 samples. The shift-register construction and the three taps
// are as published; the tap encoding is this design's choice. The output is
// the word written tap_depth shifts ago. The registers are not reset: the
// stage never forwards a word it has not written.
module sdf_buffer
  import fft_pkg::*;
#(
  parameter int DMAX = 1024
) (
  input  logic       clk,
  input  logic       en,
  input  logic [1:0] tap_sel,
  input  cplx_t      din,
  output cplx_t      dout
);

  localparam int D1 = DMAX;
  localparam int D2 = (DMAX / 2 > 0) ? DMAX / 2 : 1;
  localparam int D4 = (DMAX / 4 > 0) ? DMAX / 4 : 1;

  cplx_t sr [DMAX];

  always_ff @(posedge clk) begin
    if (en) begin
      sr[0] <= din;
      for (int i = 1; i < DMAX; i++) sr[i] <= sr[i-1];
    end
  end

  always_comb begin
    unique case (tap_sel)
      2'd1:    dout = sr[D2-1];
      2'd2:    dout = sr[D4-1];
      default: dout = sr[D1-1];
    endcase
  end

endmodule
