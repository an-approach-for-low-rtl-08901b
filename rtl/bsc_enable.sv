// bsc_enable: clock-enable generator of bus-specific clock gating (BSC).
//
// A register only needs a clock edge when at least one of its bits would
// change.  For every gated flip-flop the next-state input d[k] is compared with
// the stored value q[k] by an XOR; the mismatches are ORed into a single
// enable.  When every d equals its q the enable is 0 and the clock of the
// whole group can be stopped without changing what the register holds.
//
// This is the XOR comparison and OR chain drawn in the BSC and partial-BSC
// circuits and in the forward-traversing example.  The OR chain is written as
// a reduction, which is the same function; how the OR tree is shaped is left
// to synthesis.
//
// Interface: d, q are N bits wide, en is 1 when d differs from q anywhere.
// Timing: purely combinational.
`timescale 1ns / 1ps
module bsc_enable #(
  parameter int unsigned N = 4  // number of gated flip-flops
) (
  input  logic [N-1:0] d,
  input  logic [N-1:0] q,
  output logic         en
);
  logic [N-1:0] diff;

  always_comb begin
    diff = d ^ q;
    en   = |diff;
  end
endmodule
