// tb_clock_gate: counts gclk pulses against clk pulses while the enable is
// changed at random points of the clock period (never exactly on an edge).
// A pulse must pass exactly when the enable was high at the rising edge, and
// must then last the whole high phase: changes of the enable while clk is
// high must not cut or start a pulse (no glitch). Also checks test_en.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, test_en = 1'b0, gclk;
  int checks = 0, failures = 0, exp_pulses = 0, got_pulses = 0;
  bit en_at_rise;

  clock_gate dut (.clk, .en, .test_en, .gclk);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    en_at_rise = en || test_en;
    if (en_at_rise) exp_pulses++;
  end
  always @(posedge gclk) got_pulses++;

  // gclk must follow clk in cycles enabled at the rising edge, stay low otherwise
  always @(clk or gclk) begin
    #0.1;
    checks++;
    if (gclk !== (clk & en_at_rise)) begin
      failures++; $display("FAIL t=%0t gclk=%b clk=%b en_fall=%b", $time, gclk, clk, en_at_rise);
    end
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      @(clk);
      #($urandom_range(1, 4));
      en = $urandom_range(1);
      if (i > 2500) test_en = 1'b1;
    end
    #20;
    checks++;
    if (got_pulses != exp_pulses) begin failures++; $display("FAIL pulses %0d exp %0d", got_pulses, exp_pulses); end
    checks++;
    if (got_pulses == 0) failures++;
    $display("pulses %0d", got_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
