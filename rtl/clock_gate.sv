// clock_gate -- integrated clock-gating cell for the processor pipeline.
//
// gclk = clk AND en_l, where en_l is `en | test_en` captured by a latch that
// is transparent while clk is low. The enable may therefore change at any
// time during the high phase without cutting a clock pulse short: a change
// takes effect from the next rising edge. This is the usual glitch-free
// latch-and-AND cell; the published design names only a Clock_gate block
// driven by the FFT accelerator's finish signal. The level-sensitive latch
// is intended (it is the gating cell), as is the AND gate on the clock path.
module clock_gate (
  input  logic clk,
  input  logic en,        // 1: clock runs
  input  logic test_en,   // 1: force the clock on (scan / test)
  output logic gclk
);
  logic en_l;

  always_latch begin
    if (!clk) en_l = en | test_en;
  end

  assign gclk = clk & en_l;
endmodule
