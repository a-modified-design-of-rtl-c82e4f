// tb_control_unit: central control of a 4-stage pipeline.
//
// Loads every configuration (including a stream count above the length,
// which must be reduced, and the unused code 3), then drives input and
// result valids at random. Checks the derived selects (frame tap, output
// stage, clock-gating enables, clear), the input counter wrapping at the
// frame end, and the stream/bin/frame-end labels of the output counter.
// A stage's clock enable must follow its busy flag when the stage is in use,
// stay off when it is not, and be on for every stage during a clear.
module tb_control_unit;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int NST = 4;

  logic           clk = 1'b0;
  logic           rst = 1'b1;
  logic           cfg_we = 1'b0;
  logic [1:0]     cfg_len_sel = '0, cfg_str_sel = '0;
  logic           in_valid = 1'b0, res_valid = 1'b0;
  logic [NST-1:0] stage_busy = '0, stage_used;
  logic           clear;
  logic [1:0]     tsel, out_sel, out_stream;
  logic [NST-1:0] stage_en, in_count, out_bin;
  logic           out_last;
  int checks = 0, failures = 0;

  control_unit #(.NSTAGES(NST)) u_dut (
    .clk, .rst, .cfg_we, .cfg_len_sel, .cfg_str_sel, .in_valid, .res_valid,
    .stage_busy, .clear, .tsel, .out_sel, .stage_used, .stage_en, .in_count, .out_stream, .out_bin, .out_last);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run(int len_code, int str_code);
    int len = (len_code == 3) ? 2 : len_code;
    int str = (str_code == 3) ? 2 : str_code;
    int lg_l, fl, t, p, ni, no;
    if (str > len) str = len;
    lg_l = NST - len;
    fl = lg_l + str;
    t = 1 << fl;
    p = 1 << str;
    @(negedge clk);
    cfg_we = 1'b1;
    cfg_len_sel = 2'(len_code);
    cfg_str_sel = 2'(str_code);
    #1;
    check(clear && stage_en == '1, "clear opens all clock gates");
    @(negedge clk);
    cfg_we = 1'b0;
    #1;
    check(!clear, "clear released");
    check(int'(tsel) == len - str, $sformatf("tsel %0d for len %0d str %0d", tsel, len, str));
    check(int'(out_sel) == len, "out_sel");
    check(stage_used == NST'((1 << lg_l) - 1), $sformatf("stage_used %b for len %0d", stage_used, len));
    ni = 0;
    no = 0;
    for (int i = 0; i < 3 * t + 5; i++) begin
      in_valid = 1'($urandom_range(1));
      res_valid = 1'($urandom_range(1));
      stage_busy = NST'($urandom);
      #1;
      check(stage_en == (stage_busy & NST'((1 << lg_l) - 1)),
            $sformatf("stage_en %b for busy %b len %0d", stage_en, stage_busy, len));
      check(int'(in_count) == ni, $sformatf("in_count %0d expected %0d", in_count, ni));
      check(int'(out_stream) == no % p && int'(out_bin) == brev(no / p, lg_l) && out_last == (no == t - 1),
            $sformatf("labels at %0d: stream %0d bin %0d last %0d", no, out_stream, out_bin, out_last));
      @(negedge clk);
      if (in_valid) ni = (ni + 1) % t;
      if (res_valid) no = (no + 1) % t;
    end
    in_valid = 1'b0;
    res_valid = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(stage_en == '1 && clear, "reset clears and enables all stages");
    rst = 1'b0;
    #1;
    check(tsel == 2'd0 && out_sel == 2'd0 && stage_used == '1, "reset configuration is one full-length stream");
    for (int l = 0; l < 4; l++)
      for (int s = 0; s < 4; s++)
        run(l, s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
