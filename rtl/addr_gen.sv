// addr_gen: sample counter of one SDF stage.
//
// An up-counter of the valid samples entering stage STAGE, wrapping to zero
// after the last sample of a pipeline frame (2^NSTAGES >> tsel samples). With
// FL = log2 of the frame, the buffer depth of the stage is 2^(FL-STAGE), so
// counter bit FL-STAGE tells whether the current sample is in the first half
// of a butterfly block (phase 0: fill the buffer) or the second (phase 1:
// compute the butterfly). This is the published scheme of driving each
// stage's multiplexer straight from one counter bit (bit 10 for stage 1 down
// to bit 0 for stage 11 at 2048 points). The bits above it number the
// butterfly block and address the coefficient ROM, whose entries are stored
// in bit-reversed angle order. A per-stage counter rather than one shared
// counter is this design's choice, because output registers and input gaps
// shift each stage's timing.
//
// Timing: phase describes the sample currently at the stage input; the count
// advances on the clock edge where en is high. The ROM is read on a clock
// edge, so rom_addr/rom_ce look one sample ahead: rom_addr is the block of
// the sample that will be at the input after this edge (block 0 on clear),
// and rom_ce = en | clear, so the ROM word always belongs to the current
// input sample.
module addr_gen
  import fft_pkg::*;
#(
  parameter int NSTAGES = 11,
  parameter int STAGE   = 1,
  localparam int AW     = (STAGE > 1) ? STAGE - 1 : 1
) (
  input  logic          clk,
  input  logic          clear,
  input  logic          en,
  input  logic [1:0]    tsel,
  output logic          phase,
  output logic          rom_ce,
  output logic [AW-1:0] rom_addr
);

  typedef logic [NSTAGES-1:0] cnt_t;

  cnt_t cnt, cnt_next;
  cnt_t last;
  int   fl;

  always_comb begin
    fl       = NSTAGES - int'(tsel);
    last     = cnt_t'((1 << fl) - 1);
    cnt_next = (cnt == last) ? '0 : cnt + 1'b1;
    rom_ce   = en | clear;
    if (fl >= STAGE) begin
      phase    = cnt[fl - STAGE];
      rom_addr = (STAGE > 1 && !clear) ? AW'(int'(cnt_next) >> (fl - STAGE + 1)) : '0;
    end else begin
      // stage unused at this frame size
      phase    = 1'b0;
      rom_addr = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (clear)     cnt <= '0;
    else if (en)   cnt <= cnt_next;
  end

endmodule
