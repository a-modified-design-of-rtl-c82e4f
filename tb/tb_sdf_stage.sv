// tb_sdf_stage: stages 1 and 2 of a 3-stage pipeline fed with random frames.
//
// Each stage gets a continuous stream of random frames with random gaps; the
// valid outputs must be, frame by frame, the in-place result of that one
// decimation-in-time stage (integer model), starting with the first
// frame. Stage 2 runs at the full frame of 8 samples, stage 1 at a half
// frame of 4 (reduced delay-line tap). The number of valid outputs must
// trail the inputs by exactly the delay-line depth, and with an
// uninterrupted input the first valid output must be registered on the
// edge that takes sample D.
module tb_sdf_stage;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int NST = 3;

  logic  clk = 1'b0;
  logic  clear = 1'b1;
  logic  v_in = 1'b0;
  cplx_t d_in = '0;
  logic  v2, v1;
  cplx_t o2, o1;
  int checks = 0, failures = 0;
  int got_re2 [$], got_im2 [$], got_re1 [$], got_im1 [$];
  int in_cnt = 0, edge_cnt = 0, first_out2 = -1;

  sdf_stage #(.NSTAGES(NST), .STAGE(2)) u_s2 (
    .clk, .clear, .tsel(2'd0), .in_valid(v_in), .in_data(d_in), .out_valid(v2), .out_data(o2));
  sdf_stage #(.NSTAGES(NST), .STAGE(1)) u_s1 (
    .clk, .clear, .tsel(2'd1), .in_valid(v_in), .in_data(d_in), .out_valid(v1), .out_data(o1));

  always #5 clk = ~clk;

  always @(posedge clk) if (!clear) edge_cnt <= edge_cnt + 1;

  always @(negedge clk) begin
    if (v2) begin
      got_re2.push_back(int'(o2.re)); got_im2.push_back(int'(o2.im));
      if (first_out2 < 0) first_out2 = edge_cnt;
    end
    if (v1) begin got_re1.push_back(int'(o1.re)); got_im1.push_back(int'(o1.im)); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int fl, int s, int d, ref int fre[$], ref int fim[$], ref int gre[$], ref int gim[$]);
    int t = 1 << fl;
    int nfr = fre.size() / t;
    checks++;
    if (gre.size() != fre.size() - d) begin
      failures++;
      $display("FAIL stage %0d: %0d outputs for %0d inputs", s, gre.size(), fre.size());
    end
    for (int f = 0; f < nfr - 1; f++) begin
      int re [] = new[t];
      int im [] = new[t];
      for (int n = 0; n < t; n++) begin
        re[n] = fre[f*t+n];
        im[n] = fim[f*t+n];
      end
      stage(fl, s, re, im);
      for (int n = 0; n < t; n++) begin
        checks++;
        if (gre[f*t+n] != re[n] || gim[f*t+n] != im[n]) begin
          failures++;
          if (failures < 10) $display("FAIL stage %0d frame %0d pos %0d: %0d,%0d expected %0d,%0d",
                                      s, f, n, gre[f*t+n], gim[f*t+n], re[n], im[n]);
        end
      end
    end
  endtask

  initial begin
    int fre [$], fim [$];
    repeat (2) @(negedge clk);
    clear = 1'b0;
    for (int i = 0; i < 96; i++) begin
      if (i >= 40 && $urandom_range(3) == 0) begin
        v_in = 1'b0;
        @(negedge clk);
      end
      v_in = 1'b1;
      d_in.re = sample_t'(int'($urandom_range(40000)) - 20000);
      d_in.im = sample_t'(int'($urandom_range(40000)) - 20000);
      fre.push_back(int'(d_in.re));
      fim.push_back(int'(d_in.im));
      @(negedge clk);
    end
    v_in = 1'b0;
    repeat (3) @(negedge clk);
    // stage 2 delay line: 2 words; stage 1 at half frame: 2 words
    checks++;
    if (first_out2 != 3) begin
      failures++;
      $display("FAIL first stage-2 output on edge %0d, expected 3", first_out2);
    end
    compare(3, 2, 2, fre, fim, got_re2, got_im2);
    compare(2, 1, 2, fre, fim, got_re1, got_im1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
