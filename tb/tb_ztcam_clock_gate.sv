// tb_ztcam_clock_gate: self-checking test of the latch-based clock gate.
// The enable is changed at random, half of the time in the middle of the low
// phase of clk and half of the time in the middle of the high phase. Checks:
// the gated clock is never high while clk is low; a gated pulse appears
// exactly for the rising edges where the enable was high just before the
// edge; a change of the enable during the high phase neither cuts nor starts
// a pulse (each pulse lasts the whole high phase); test_en forces the clock on.
module tb_ztcam_clock_gate;
  logic clk = 1'b0, en = 1'b0, test_en = 1'b0, gclk;
  int checks = 0, failures = 0;
  logic en_at_rise = 1'b0;
  int pulses = 0, gated = 0, forced = 0;
  realtime rise_t;
  bit rose = 1'b0;

  ztcam_clock_gate dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    en_at_rise = en | test_en;
    #0.1;
    checks++;
    if (gclk !== en_at_rise) begin
      failures++;
      $display("FAIL at %0t: gclk=%b, enable before the edge=%b", $realtime, gclk, en_at_rise);
    end
    if (en_at_rise) pulses++; else gated++;
    if (test_en && !en) forced++;
    #4.8;
    checks++;
    if (gclk !== en_at_rise) begin
      failures++;
      $display("FAIL at %0t: gclk changed during the high phase", $realtime);
    end
  end

  always @(posedge gclk) begin rise_t = $realtime; rose = 1'b1; end
  always @(negedge gclk) if (rose) begin
    checks++;
    if ($realtime - rise_t < 4.9) begin
      failures++;
      $display("FAIL short gated pulse at %0t", $realtime);
    end
  end

  always @(clk or gclk) begin
    #0;
    if (gclk && !clk) begin
      failures++;
      $display("FAIL gclk high while clk low at %0t", $realtime);
    end
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      if ($urandom % 2 != 0) @(negedge clk); else @(posedge clk);
      #2.5;
      en = 1'($urandom);
      if (i == 200) test_en = 1'b1;
      if (i == 230) test_en = 1'b0;
    end
    #20;
    checks++;
    if (pulses == 0 || gated == 0 || forced == 0) begin
      failures++;
      $display("FAIL clock never passed, never gated or never forced");
    end
    $display("passed %0d clock cycles, gated %0d, forced %0d", pulses, gated, forced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
