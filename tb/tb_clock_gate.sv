// tb_clock_gate: the enable changes at random times, also while the clock is
// high. The gated clock must never be high while the clock is low, must
// only rise together with the clock, and must pulse exactly on the rising
// edges where the enable was high at the end of the preceding low phase.
module tb_clock_gate;
  logic clk = 1'b0;
  logic en = 1'b0;
  logic gclk;
  int checks = 0, failures = 0;
  int pulses = 0, expected = 0;
  logic en_at_low_end;

  clock_gate u_dut (.clk, .en, .gclk);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge gclk) begin
    pulses++;
    checks++;
    if (!clk) begin
      failures++;
      $display("FAIL gated clock rose while clock low");
    end
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      // low phase: 10 time units, enable may change inside it
      #3 en = 1'($urandom_range(1));
      #6 en_at_low_end = en;
      #1;
      clk = 1'b1;
      if (en_at_low_end) expected++;
      // high phase: enable changes must not reach gclk
      #2 en = 1'($urandom_range(1));
      #1;
      checks++;
      if (gclk != en_at_low_end) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: gclk %0d during high phase, latched en %0d", i, gclk, en_at_low_end);
      end
      #4 en = 1'($urandom_range(1));
      #3;
      clk = 1'b0;
      #1;
      checks++;
      if (gclk) begin
        failures++;
        $display("FAIL gated clock high while clock low");
      end
    end
    checks++;
    if (pulses != expected) begin
      failures++;
      $display("FAIL %0d pulses, expected %0d", pulses, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
