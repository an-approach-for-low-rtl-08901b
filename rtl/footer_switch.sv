// footer_switch: behavioural model of a power-gated domain's footer switch.
//
// Behavioural model, not synthesizable: it stands for a transistor.
//
// A high-Vth NMOS sits between the virtual ground of a block of low-Vth cells
// and the real ground.  When sleep is 1 it is off, the virtual ground drifts
// up and the cells stop leaking, but their outputs float.  When sleep returns
// to 0 it takes some time for the virtual ground to be pulled back down.
//
// The model has the footer's gate input (sleep), a power-good output
// (vgnd_ok, 1 while the virtual ground is clamped to ground), and the outputs
// of the cells above it: domain_out equals cells_out (what the cells compute)
// while vgnd_ok is 1 and FLOAT_VALUE while it is 0.
//
// The delays and the floating value are this design's choices; nothing fixes
// them for a particular process.  Delays are in ns.
//
// Timing: vgnd_ok falls T_SLEEP after sleep rises and rises T_WAKE after
// sleep falls.  A sleep change that is reversed before its delay has run
// out is dropped, so vgnd_ok always ends in the state sleep asks for.
`timescale 1ns / 1ps
module footer_switch #(
  parameter int unsigned  W           = 2,
  parameter int unsigned  T_WAKE      = 2,
  parameter int unsigned  T_SLEEP     = 1,
  parameter logic [W-1:0] FLOAT_VALUE = '1
) (
  input  logic         sleep,
  input  logic [W-1:0] cells_out,
  output logic         vgnd_ok,
  output logic [W-1:0] domain_out
);
  // Each change of sleep starts a timer; only the newest one may act.
  int unsigned req;

  // The domain starts unpowered until sleep is first driven low.
  initial begin
    req     = 0;
    vgnd_ok = 1'b0;
  end

  always @(sleep) begin
    automatic int unsigned mine = req + 1;
    automatic logic        tgt  = !sleep;
    req = mine;
    fork
      begin
        if (tgt) #(T_WAKE);
        else     #(T_SLEEP);
        if (req == mine) vgnd_ok = tgt;
      end
    join_none
  end

  assign domain_out = vgnd_ok ? cells_out : FLOAT_VALUE;
endmodule
