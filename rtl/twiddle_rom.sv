// twiddle_rom: coefficient ROM of SDF stage STAGE.
//
// Stage s holds 2^(s-1) twiddle factors: entry b is exp(-j*2*pi*r/2^s) with
// r the (s-1)-bit reversal of b, so the addresses count through the blocks of
// the stage in order while the angles follow the bit-reversed sequence of a
// decimation-in-time flow graph (for s = 4: 0,4,2,6,1,5,3,7 sixteenths of a
// turn). The same table serves every FFT length and stream count. Real and
// imaginary parts are kept in two separate ROMs; the ROM size, the split into
// two ROMs and the single-port, clock-enabled read are as published, while
// computing the contents from cos/sin at elaboration (signed 16-bit, 14
// fraction bits, rounded to nearest) is this design's choice. Timing: on a
// rising clock edge with ce high, w becomes the entry at addr (synchronous
// read, no further output register); with ce low it holds.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int STAGE = 2,
  localparam int AW    = (STAGE > 1) ? STAGE - 1 : 1,
  localparam int DEPTH = 1 << (STAGE - 1)
) (
  input  logic          clk,
  input  logic          ce,
  input  logic [AW-1:0] addr,
  output twiddle_t      w
);

  localparam real PI = 3.14159265358979323846;

  typedef coef_t rom_t [DEPTH];

  function automatic coef_t quant(real v);
    real s;
    s = v * real'(1 << TW_FRAC);
    return coef_t'($rtoi(s < 0.0 ? s - 0.5 : s + 0.5));
  endfunction

  function automatic rom_t make_rom(bit imag);
    rom_t t;
    for (int b = 0; b < DEPTH; b++) begin
      real ang;
      ang = 2.0 * PI * real'(bitrev(b, STAGE - 1)) / real'(2 * DEPTH);
      t[b] = imag ? coef_t'(-quant($sin(ang))) : quant($cos(ang));
    end
    return t;
  endfunction

  localparam rom_t ROM_RE = make_rom(1'b0);
  localparam rom_t ROM_IM = make_rom(1'b1);

  if (STAGE > 1) begin : g_rom
    always_ff @(posedge clk) begin
      if (ce) begin
        w.re <= ROM_RE[addr];
        w.im <= ROM_IM[addr];
      end
    end
  end else begin : g_unity
    // Stage 1 needs only W^0 = 1; the address has no bit to select with.
    logic unused_in;
    assign unused_in = ^{addr, ce, clk};
    always_comb begin
      w.re = ROM_RE[0];
      w.im = ROM_IM[0];
    end
  end

endmodule
