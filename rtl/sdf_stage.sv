// sdf_stage: one radix-2 single-delay-feedback (SDF) stage, decimation in time.
//
// Stage s pairs samples 2^(FL-s) apart in a frame of 2^FL samples
// (FL = NSTAGES - tsel). In the first half of every butterfly block
// (addr_gen phase 0) the incoming sample is written into the delay line and
// the word leaving the delay line - the difference half of the previous
// block - is sent out. In the second half (phase 1) the incoming sample is
// rotated by the block's twiddle factor and meets its partner leaving the
// delay line in the butterfly: the sum is sent out, the difference is fed
// back into the delay line. The output is therefore the stage's in-place
// result in natural order, delayed by the buffer depth. Stage 1 only ever
// uses W^0 = 1 and has no multiplier.
//
// Interface: in_valid/in_data one sample per clock at most; gaps simply
// pause the stage. out_valid/out_data are registered, one clock after the
// sample that produced them; out_valid stays low until the delay line holds
// its first half block. clear is synchronous. The stage structure (buffer,
// multiplexers, coefficient ROM with address generator, complex multiplier
// on the incoming data, butterfly) is as published; the output register,
// the valid signalling and the clear are this design's choice.
module sdf_stage
  import fft_pkg::*;
#(
  parameter int NSTAGES = 11,
  parameter int STAGE   = 1,
  localparam int AW     = (STAGE > 1) ? STAGE - 1 : 1,
  localparam int DMAX   = 1 << (NSTAGES - STAGE)
) (
  input  logic       clk,
  input  logic       clear,
  input  logic [1:0] tsel,
  input  logic       in_valid,
  input  cplx_t      in_data,
  output logic       out_valid,
  output cplx_t      out_data
);

  logic          phase, rom_ce;
  logic [AW-1:0] rom_addr;
  logic          primed;
  cplx_prod_t    rot;
  cplx_t         buf_in, buf_out, bf_sum, bf_diff, result;

  addr_gen #(.NSTAGES(NSTAGES), .STAGE(STAGE)) u_addr (
    .clk, .clear, .en(in_valid), .tsel, .phase, .rom_ce, .rom_addr
  );

  if (STAGE > 1) begin : g_rotate
    twiddle_t w;
    twiddle_rom #(.STAGE(STAGE)) u_rom (.clk, .ce(rom_ce), .addr(rom_addr), .w);
    complex_mult u_mult (.x(in_data), .w, .y(rot));
  end else begin : g_no_rotate
    logic unused_addr;
    assign unused_addr = ^{rom_addr, rom_ce};
    always_comb begin
      rot.re = prod_t'(in_data.re);
      rot.im = prod_t'(in_data.im);
    end
  end

  sdf_buffer #(.DMAX(DMAX)) u_buf (
    .clk, .en(in_valid), .tap_sel(tsel), .din(buf_in), .dout(buf_out)
  );

  butterfly u_bfly (.a(buf_out), .b(rot), .sum(bf_sum), .diff(bf_diff));

  always_comb begin
    buf_in = phase ? bf_diff : in_data;
    result = phase ? bf_sum  : buf_out;
  end

  always_ff @(posedge clk) begin
    if (clear) begin
      primed    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (phase || primed);
      if (in_valid && phase) primed <= 1'b1;
    end
    if (in_valid) out_data <= result;
  end

endmodule
