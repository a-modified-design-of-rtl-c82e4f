// tb_fft_top: end-to-end test of the reconfigurable SDF FFT at its default
// size (11 stages, frames of up to 2048 samples).
//
// Runs every configuration - 1x2048, 2x1024, 4x512, 1x1024, 1x512, 2x512 -
// with random frames, streams interleaved on the input. Every output sample
// is compared bit for bit with an in-place decimation-in-time model of the
// same fixed-point arithmetic (including its stream and bin labels and the
// frame-end flag), and the first frame of each configuration against a
// floating-point DFT of every stream divided by the length. With an
// uninterrupted input it checks the latency, sum of the delay-line depths
// plus S - 1 clock edges from the first input to the first output (S stages
// used). It also counts that each mechanism happened: each FFT length,
// multi-streaming, reduced delay-line taps, reconfiguration, input stalls,
// an unused stage clock-gated and holding still, and the clock of a stage in
// use stopped while it has no data.
module tb_fft_top;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int NST      = 11;
  localparam int WATCHDOG = 400000;
  localparam int AMP      = 12000;
  localparam int TOL      = 8;

  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic             cfg_we = 1'b0;
  logic [1:0]       cfg_len_sel = '0, cfg_str_sel = '0;
  logic             in_valid = 1'b0;
  cplx_t            in_data = '0;
  logic             out_valid;
  cplx_t            out_data;
  logic [1:0]       out_stream;
  logic [NST-1:0]   out_bin;
  logic             out_frame_last;
  logic [NST-1:0]   stage_active;

  fft_top u_dut (
    .clk, .rst, .cfg_we, .cfg_len_sel, .cfg_str_sel, .in_valid, .in_data,
    .out_valid, .out_data, .out_stream, .out_bin, .out_frame_last, .stage_active
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_len [3] = '{0, 0, 0};
  int n_multi = 0, n_tap = 0, n_switch = 0, n_stall = 0, n_gated = 0, n_idle = 0;

  typedef struct {
    int re, im, stream, bin;
    bit last;
  } obs_t;

  obs_t got [$];
  int   first_in = -1, first_out = -1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (in_valid && first_in < 0) first_in = cycle + 1;
  end

  always @(negedge clk) begin
    // a stage in use whose clock is stopped because it has nothing to do
    if (!rst && !cfg_we && !stage_active[0]) n_idle++;
    if (out_valid && !rst) begin
      got.push_back('{int'(out_data.re), int'(out_data.im), int'(out_stream), int'(out_bin), out_frame_last});
      if (first_out < 0) first_out = cycle;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_config(int len_sel, int str_sel, int nframes, int stall_pct);
    int lg_l = NST - len_sel;
    int l = 1 << lg_l;
    int p = 1 << str_sel;
    int fl = lg_l + str_sel;
    int t = 1 << fl;
    int fre [][];
    int fim [][];
    int exp_lat = 0;
    logic [NST-1:0] hold_cnt;
    bit stalled = 0;
    real maxerr = 0.0;

    // reconfigure (also clears the pipeline)
    @(negedge clk);
    cfg_we = 1'b1;
    cfg_len_sel = 2'(len_sel);
    cfg_str_sel = 2'(str_sel);
    @(negedge clk);
    cfg_we = 1'b0;
    #1;
    n_switch++;
    got.delete();
    first_in = -1;
    first_out = -1;

    check(u_dut.stage_used == NST'((1 << lg_l) - 1), $sformatf("stages in use %b for length %0d", u_dut.stage_used, l));
    hold_cnt = u_dut.g_stage[NST].u_stage.u_addr.cnt;

    fre = new[nframes + 1];
    fim = new[nframes + 1];
    for (int f = 0; f <= nframes; f++) begin
      fre[f] = new[t];
      fim[f] = new[t];
      for (int n = 0; n < t; n++) begin
        fre[f][n] = int'($urandom_range(2 * AMP)) - AMP;
        fim[f][n] = int'($urandom_range(2 * AMP)) - AMP;
      end
    end

    // drive nframes + 1 frames: the last one pushes the previous out
    for (int f = 0; f <= nframes; f++) begin
      for (int n = 0; n < t; n++) begin
        if (stall_pct > 0 && int'($urandom_range(99)) < stall_pct) begin
          in_valid = 1'b0;
          repeat (1 + $urandom_range(3)) @(negedge clk);
          stalled = 1;
          n_stall++;
        end
        in_valid = 1'b1;
        in_data.re = sample_t'(fre[f][n]);
        in_data.im = sample_t'(fim[f][n]);
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    repeat (2 * NST) @(negedge clk);

    // latency with an uninterrupted input
    for (int s = 1; s <= lg_l; s++) exp_lat += t >> s;
    exp_lat += lg_l - 1;
    if (!stalled)
      check(first_out - first_in == exp_lat,
            $sformatf("latency %0d, expected %0d", first_out - first_in, exp_lat));

    check(got.size() >= nframes * t, $sformatf("only %0d outputs", got.size()));
    for (int f = 0; f < nframes && got.size() >= nframes * t; f++) begin
      int mre [] = new[t];
      int mim [] = new[t];
      for (int n = 0; n < t; n++) begin
        mre[n] = fre[f][n];
        mim[n] = fim[f][n];
      end
      model(fl, lg_l, mre, mim);
      for (int n = 0; n < t; n++) begin
        obs_t o = got[f * t + n];
        check(o.re == mre[n] && o.im == mim[n],
              $sformatf("L=%0d P=%0d frame %0d pos %0d: got %0d,%0d expected %0d,%0d",
                        l, p, f, n, o.re, o.im, mre[n], mim[n]));
        check(o.stream == n % p && o.bin == brev(n / p, lg_l) && o.last == (n == t - 1),
              $sformatf("label pos %0d: stream %0d bin %0d last %0d", n, o.stream, o.bin, o.last));
      end
    end

    // floating-point DFT of every stream of frame 0
    if (got.size() >= t) begin
      for (int ps = 0; ps < p; ps++) begin
        for (int k = 0; k < l; k++) begin
          real xr = 0.0, xi = 0.0, er, ei;
          obs_t o;
          for (int m = 0; m < l; m++) begin
            real ang = -2.0 * PI * real'((m * k) % l) / real'(l);
            xr += fre[0][m*p+ps] * $cos(ang) - fim[0][m*p+ps] * $sin(ang);
            xi += fre[0][m*p+ps] * $sin(ang) + fim[0][m*p+ps] * $cos(ang);
          end
          o = got[brev(k, lg_l) * p + ps];
          er = real'(o.re) - xr / real'(l);
          ei = real'(o.im) - xi / real'(l);
          if (er < 0) er = -er;
          if (ei < 0) ei = -ei;
          if (er > maxerr) maxerr = er;
          if (ei > maxerr) maxerr = ei;
          check(er <= TOL && ei <= TOL && o.stream == ps && o.bin == k,
                $sformatf("DFT stream %0d bin %0d: got %0d,%0d expected %f,%f", ps, k, o.re, o.im, xr / l, xi / l));
        end
      end
    end

    // the last stage is gated off below full length and must not move
    if (lg_l < NST) begin
      check(u_dut.g_stage[NST].u_stage.u_addr.cnt == hold_cnt, "gated stage moved");
      n_gated++;
    end

    n_len[len_sel]++;
    if (p > 1) n_multi++;
    if (t < (1 << NST)) n_tap++;
    $display("config %0d x %0d-point: %0d outputs, max error against DFT %f LSB%s",
             p, l, got.size(), maxerr, stalled ? ", with stalls" : "");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run_config(0, 0, 2, 0);   // 1 x 2048
    run_config(1, 1, 2, 5);   // 2 x 1024, stalls
    run_config(2, 2, 2, 0);   // 4 x 512
    run_config(1, 0, 2, 0);   // 1 x 1024
    run_config(2, 0, 2, 10);  // 1 x 512, stalls
    run_config(2, 1, 2, 0);   // 2 x 512

    for (int i = 0; i < 3; i++) check(n_len[i] > 0, $sformatf("length select %0d never used", i));
    check(n_multi > 0, "multi-streaming never happened");
    check(n_tap > 0, "reduced delay-line tap never used");
    check(n_switch > 1, "reconfiguration never happened");
    check(n_stall > 0, "input stall never happened");
    check(n_gated > 0, "clock gating of an unused stage never happened");
    check(n_idle > 0, "clock gating of an idle stage never happened");
    $display("mechanisms: lengths %0d/%0d/%0d multistream %0d reduced-tap %0d reconfig %0d stalls %0d gated %0d idle-gated %0d",
             n_len[0], n_len[1], n_len[2], n_multi, n_tap, n_switch, n_stall, n_gated, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
