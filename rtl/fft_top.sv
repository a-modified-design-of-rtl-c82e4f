// fft_top: reconfigurable radix-2 SDF FFT for variable length and
// multi-streaming (one 2048-point, one or two 1024-point, or one, two or four
// 512-point FFTs with the default NSTAGES = 11).
//
// NSTAGES single-delay-feedback stages are cascaded; stage s pairs samples
// half a block apart with a delay line of 2^(NSTAGES-s) words at the full
// frame (1024 ... 1). Several streams are time-interleaved on the input
// (sample m of stream p at frame position m*P + p); because a
// decimation-in-time stage only ever combines samples 2^k apart and its
// twiddle depends only on the stage, the first stages of a long FFT
// compute the interleaved short FFTs unchanged, and the result is taken from
// stage log2(length) through the output select. A frame of P streams of
// length L has P*L samples; when that is less than 2^NSTAGES every delay line
// is switched to a half or quarter depth tap. Each stage has a latch-based
// clock gate: stages beyond log2(length) have their clock stopped, and a
// stage in use is clocked only while it has a sample to take or a result to
// retire. The control unit holds the
// configuration and labels every output with its stream and frequency bin.
//
// Timing: one complex sample per clock (in_valid may drop for any number of
// clocks and stalls the pipeline). Outputs are interleaved like the inputs
// and in bit-reversed bin order; out_stream/out_bin name each sample, and
// out_frame_last marks the end of an output frame. With an uninterrupted input
// the first output of a frame is registered sum(depths) + S - 1 clock edges
// after the edge that takes its first input, S being the number of stages
// used (2047 + 10 for one 2048-point FFT);
// the rest of a frame leaves while the next frame enters. Each stage scales by
// 1/2, so the outputs are the DFT divided by the length. cfg_we loads
// cfg_len_sel/cfg_str_sel and discards everything in flight. Structure and
// sizes follow the published architecture; fixed-point format, valid
// signalling, output labelling and the reconfiguration protocol are this
// design's own.
module fft_top
  import fft_pkg::*;
#(
  parameter int NSTAGES = 11
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               cfg_we,
  input  logic [1:0]         cfg_len_sel,
  input  logic [1:0]         cfg_str_sel,
  input  logic               in_valid,
  input  cplx_t              in_data,
  output logic               out_valid,
  output cplx_t              out_data,
  output logic [1:0]         out_stream,
  output logic [NSTAGES-1:0] out_bin,
  output logic               out_frame_last,
  output logic [NSTAGES-1:0] stage_active
);

  logic               clear;
  logic [1:0]         tsel, out_sel;
  logic [NSTAGES-1:0] stage_en, stage_used, stage_busy, in_count;
  logic [NSTAGES-1:0] gclk;
  logic               st_valid [NSTAGES+1];
  cplx_t              st_data  [NSTAGES+1];
  logic [2:0]         sel_valid;
  cplx_t              sel_data [3];
  logic               res_valid;
  logic               unused_count;

  control_unit #(.NSTAGES(NSTAGES)) u_ctrl (
    .clk, .rst, .cfg_we, .cfg_len_sel, .cfg_str_sel, .in_valid, .res_valid,
    .stage_busy, .clear, .tsel, .out_sel, .stage_used, .stage_en, .in_count,
    .out_stream, .out_bin, .out_last(out_frame_last)
  );

  assign unused_count = ^{in_count, stage_used};
  assign stage_active = stage_en;

  assign st_valid[0] = in_valid;
  assign st_data[0]  = in_data;

  for (genvar s = 1; s <= NSTAGES; s++) begin : g_stage
    assign stage_busy[s-1] = st_valid[s-1] | st_valid[s];
    clock_gate u_cg (.clk, .en(stage_en[s-1]), .gclk(gclk[s-1]));
    sdf_stage #(.NSTAGES(NSTAGES), .STAGE(s)) u_stage (
      .clk(gclk[s-1]), .clear, .tsel,
      .in_valid(st_valid[s-1]), .in_data(st_data[s-1]),
      .out_valid(st_valid[s]), .out_data(st_data[s])
    );
  end

  for (genvar k = 0; k < 3; k++) begin : g_sel
    assign sel_valid[k] = st_valid[NSTAGES-k];
    assign sel_data[k]  = st_data[NSTAGES-k];
  end

  output_select u_osel (
    .sel(out_sel), .in_valid(sel_valid), .in_data(sel_data),
    .out_valid(res_valid), .out_data
  );

  assign out_valid = res_valid;

endmodule
