// clock_gate: latch-based clock gating cell (the box "L" and its gate).
//
// The enable is captured by a level-sensitive latch that is transparent
// while clk is low and holds while clk is high; the gated clock is clk ANDed
// with the latched enable.  Because the latch cannot change while clk is
// high, a late or glitching enable can never chop a clock pulse.
//
// The latch polarity and the AND are this design's choice (the usual
// glitch-free gating cell); the source circuit only shows a latch "L" in front
// of the gate that produces the gated clock.
//
// The latched enable is also brought out: it stays 1 through the high phase
// that follows an enabled edge, which gives the power-gated logic half a clock
// period to evaluate the new flip-flop outputs before it is put to sleep.
//
// Interface: clk, en in; en_latched, gclk out.
// Timing: en must be stable before the rising edge of clk; gclk rises with
// clk when en_latched is 1.
`timescale 1ns / 1ps
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic en_latched,
  output logic gclk
);
  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;
endmodule
