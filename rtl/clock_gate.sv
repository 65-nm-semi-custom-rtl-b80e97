// clock_gate: latch-based integrated clock gate for one row of the array.
//
// The enable is sampled by a latch that is transparent while `clk` is high
// and holds while `clk` is low; the gated clock is the low phase of `clk`
// ANDed with the held enable. So a row enabled during the high phase of a
// cycle gets one clean high pulse on `gclk` during the low phase of the same
// cycle, and the pulse ends at the next rising edge of `clk`, before the
// write data registers change. The enable may change freely while `clk` is
// high without glitching `gclk`.
//
// Using a clock gate per row instead of a write-enable multiplexer per bit
// follows the memory architecture; the low-phase polarity is this design's
// choice. The latch is intentional: it is what makes the gate glitch-free.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;

  always_latch begin
    if (clk) en_l = en;
  end

  assign gclk = ~clk & en_l;
endmodule
