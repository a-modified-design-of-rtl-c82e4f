// tb_addr_gen: stage 3 and stage 1 counters of a 4-stage pipeline.
//
// Samples arrive at random moments for each frame size (16, 8 and 4
// samples). With n the sample's position in the frame and FL = log2(frame),
// the phase must be bit FL-s of n, and the address a clock-enabled ROM
// register has taken (from rom_addr on edges with rom_ce) must be
// n >> (FL-s+1); a stage beyond FL must stay in phase 0. A clear must
// restart the count and load address 0.
module tb_addr_gen;
  import fft_pkg::*;

  logic       clk = 1'b0;
  logic       clear = 1'b1;
  logic       en = 1'b0;
  logic [1:0] tsel = '0;
  logic       ph3, ph1;
  logic [1:0] addr3, reg3;
  logic       addr1, ce3, ce1;
  int checks = 0, failures = 0;

  addr_gen #(.NSTAGES(4), .STAGE(3)) u_s3 (.clk, .clear, .en, .tsel, .phase(ph3), .rom_ce(ce3), .rom_addr(addr3));
  addr_gen #(.NSTAGES(4), .STAGE(1)) u_s1 (.clk, .clear, .en, .tsel, .phase(ph1), .rom_ce(ce1), .rom_addr(addr1));

  // the ROM's address register, as a clock-enabled ROM would hold it
  always @(posedge clk) if (ce3) reg3 <= addr3;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ts = 0; ts < 3; ts++) begin
      int fl, n;
      fl = 4 - ts;
      n = 0;
      @(negedge clk);
      clear = 1'b1;
      tsel = 2'(ts);
      @(negedge clk);
      clear = 1'b0;
      for (int i = 0; i < 200; i++) begin
        int e3, a3, e1;
        en = ($urandom_range(4) != 0);
        #1;
        e3 = (fl >= 3) ? (n >> (fl - 3)) & 1 : 0;
        a3 = (fl >= 3) ? n >> (fl - 2) : 0;
        e1 = (n >> (fl - 1)) & 1;
        checks++;
        if (ph3 != e3[0] || int'(reg3) != a3 || ph1 != e1[0] || addr1 != 1'b0 ||
            ce3 != en || ce1 != en) begin
          failures++;
          if (failures < 10) $display("FAIL tsel %0d n %0d: ph3 %0d rom addr %0d ph1 %0d", ts, n, ph3, reg3, ph1);
        end
        @(negedge clk);
        if (en) n = (n + 1) % (1 << fl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
