// holder: output holder between a power-gated cell and always-on logic.
//
// While the power-gated domain is awake the holder is transparent; when it is
// told to hold it keeps the last value it passed.  It is placed on every
// output of the power-gated logic that reaches always-on logic or a primary
// output, so that those never see the floating value of a cell whose virtual
// ground has been cut off.
//
// It is built as a transparent latch, the simplest storage that does this.
// The caller holds it whenever the domain is asleep or not yet powered
// (hold = sleep | !vgnd_ok); that combination is this design's choice.
//
// Interface: hold, d (W bits) in; q (W bits) out.
// Timing: level-sensitive; q follows d while hold is 0.
`timescale 1ns / 1ps
module holder #(
  parameter int unsigned W = 1
) (
  input  logic         hold,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_latch begin
    if (!hold) q = d;
  end
endmodule
