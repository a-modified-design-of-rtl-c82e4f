// control_unit: central control of the reconfigurable SDF FFT.
//
// Holds the configuration - FFT length 2^NSTAGES >> len_sel and
// 1 << str_sel time-interleaved streams - loaded with cfg_we (after reset: one
// stream at the full length). From it follow the pipeline frame size select
// tsel = len_sel - str_sel (the buffer tap of every stage), the stage that
// delivers the result (the last stage at full length, one or two stages
// earlier for half or quarter length) and the clock-gating enables: stage s
// is in use only if s <= log2(length) (stage_used), and an in-use stage is
// clocked only while it has work, i.e. while a sample is at its input or a
// valid result still sits in its output register (stage_busy). rst and
// cfg_we also clear the pipeline; the clear opens every clock gate for that
// cycle so that it reaches all stages.
//
// The NSTAGES-bit up-counter in_count counts input samples and wraps to zero
// after the last sample of a frame, as the published central counter does;
// its bit NSTAGES-s is the multiplexer select of stage s at the full frame.
// A second counter follows the samples leaving the pipeline and labels each
// with its stream (low bits of the frame position) and its frequency bin (the
// remaining bits, bit-reversed over log2(length) bits), since the outputs
// leave interleaved and in bit-reversed order. The configuration encoding,
// the output labelling and the clear are this design's choice. str_sel
// larger than len_sel (more than 2^NSTAGES samples per frame) is reduced to
// len_sel; the value 3 of either field is read as 2.
module control_unit
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
  input  logic               res_valid,
  input  logic [NSTAGES-1:0] stage_busy,
  output logic               clear,
  output logic [1:0]         tsel,
  output logic [1:0]         out_sel,
  output logic [NSTAGES-1:0] stage_used,
  output logic [NSTAGES-1:0] stage_en,
  output logic [NSTAGES-1:0] in_count,
  output logic [1:0]         out_stream,
  output logic [NSTAGES-1:0] out_bin,
  output logic               out_last
);

  typedef logic [NSTAGES-1:0] cnt_t;

  size_sel_e len_sel, str_sel;
  size_sel_e new_len, new_str;
  cnt_t      last, out_count;

  always_comb begin
    new_len = (cfg_len_sel == 2'd3) ? SIZE_QUARTER : size_sel_e'(cfg_len_sel);
    new_str = (cfg_str_sel == 2'd3) ? SIZE_QUARTER : size_sel_e'(cfg_str_sel);
    if (new_str > new_len) new_str = new_len;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      len_sel <= SIZE_FULL;
      str_sel <= SIZE_FULL;
    end else if (cfg_we) begin
      len_sel <= new_len;
      str_sel <= new_str;
    end
  end

  assign clear   = rst | cfg_we;
  assign tsel    = 2'(len_sel) - 2'(str_sel);
  assign out_sel = 2'(len_sel);
  assign last    = cnt_t'((1 << (NSTAGES - int'(tsel))) - 1);

  always_comb begin
    for (int s = 1; s <= NSTAGES; s++)
      stage_used[s-1] = (s <= NSTAGES - int'(len_sel));
    stage_en = {NSTAGES{clear}} | (stage_used & stage_busy);
  end

  // input-side frame counter
  always_ff @(posedge clk) begin
    if (clear)         in_count <= '0;
    else if (in_valid) in_count <= (in_count == last) ? '0 : in_count + 1'b1;
  end

  // output-side frame counter
  always_ff @(posedge clk) begin
    if (clear)          out_count <= '0;
    else if (res_valid) out_count <= (out_count == last) ? '0 : out_count + 1'b1;
  end

  always_comb begin
    out_stream = 2'(out_count & cnt_t'((1 << int'(str_sel)) - 1));
    out_bin    = cnt_t'(bitrev(int'(out_count) >> int'(str_sel), NSTAGES) >> int'(len_sel));
    out_last   = (out_count == last);
  end

endmodule
