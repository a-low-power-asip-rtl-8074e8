// tb_clock_gate -- checks that gclk follows clk while enabled, is held low
// while disabled, that test_en forces it on, and that an enable change in
// the high phase never shortens a pulse.
`timescale 1ns/1ps
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b1, test_en = 1'b0, gclk;
  int checks = 0, failures = 0, pulses = 0;
  realtime rise_t;
  bit seen_rise = 1'b0;

  clock_gate dut (.clk, .en, .test_en, .gclk);
  always #5 clk = ~clk;

  always @(posedge gclk) begin pulses++; rise_t = $realtime; seen_rise = 1'b1; end
  always @(negedge gclk) if (seen_rise) begin
    checks++;
    if ($realtime - rise_t != 5.0) begin
      failures++;
      $display("FAIL: gclk pulse of %0.1f ns", $realtime - rise_t);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count(input int cycles, input int expected, input string what);
    int p0;
    p0 = pulses;
    repeat (cycles) @(negedge clk);
    checks++;
    if (pulses - p0 != expected) begin
      failures++;
      $display("FAIL: %s: %0d pulses, expected %0d", what, pulses - p0, expected);
    end
  endtask

  initial begin
    @(negedge clk);
    count(10, 10, "enabled");
    en = 1'b0;
    count(10, 0, "disabled");
    test_en = 1'b1;
    count(10, 10, "test_en");
    test_en = 1'b0;
    // change the enable in the middle of the high phase
    @(posedge clk); #2 en = 1'b1;
    @(negedge clk);
    count(5, 5, "re-enabled in high phase");
    @(posedge clk); #2 en = 1'b0;
    @(negedge clk);
    count(5, 0, "disabled in high phase");
    checks++;
    if (gclk !== 1'b0) begin failures++; $display("FAIL: gclk not low when gated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
