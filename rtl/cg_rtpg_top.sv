// cg_rtpg_top: clock gating and run-time power gating driven by one enable.
//
// Five flip-flops A..E (ff_d[0] = A .. ff_d[4] = E).  A is clocked by the free
// clock; B, C, D and E are bus-specific clock gated: their clock only pulses
// when one of their inputs differs from its stored value.  The logic that is
// reached only from B..E (pg_cone, gates a..g) cannot change while that clock
// is stopped, so it sits on a footer switch whose sleep input is the inverted
// latched clock enable: the same signal that stops the clock cuts the leakage
// path of that logic.  The two outputs leaving the sleeping logic (g and b)
// pass through holders, which keep the last valid value while the logic is
// unpowered.  Always-on gate i combines the held g with the ungated A
// (i = A ^ g, an XOR); gate h combines the held b with primary input PI
// (h = b & PI, this design's choice of function).
//
// Sequence of one update:
//   low clock phase   : some ff_d of B..E differs from its q, en rises, the
//                       latched enable follows, sleep falls; after the
//                       footer's wake-up delay vgnd_ok rises and the holders
//                       open (the logic shows the same value it held).
//   rising clock edge : B..E load their inputs through the gated clock.
//   high phase        : the latched enable stays 1, the logic evaluates the new
//                       values and the holders pass them on.
//   next low phase    : if the inputs are unchanged en is 0, sleep rises, the
//                       holders close on the new value and the footer turns off.
// So the power-gated logic must settle within half a clock period.
//
// Reset clears B..E without a gated clock edge, so the domain is held awake
// while rst_n is low (this design's addition); rst_n must stay low longer
// than the footer's wake-up time for out_i and out_h to be valid after it.
//
// Ports: clk, rst_n (asynchronous, active low, clears the flip-flops), ff_d,
// pi in; out_i, out_h, and the observation outputs en (raw clock enable), gclk,
// sleep and vgnd_ok.
`timescale 1ns / 1ps
module cg_rtpg_top (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] ff_d,
  input  logic       pi,
  output logic       out_i,
  output logic       out_h,
  output logic       en,
  output logic       gclk,
  output logic       sleep,
  output logic       vgnd_ok
);
  logic [4:0] ff_q;
  logic       en_latched;
  logic       cone_g, cone_b;          // what the cone computes when powered
  logic [1:0] domain_out;               // what the cone actually drives
  logic       held_g, held_b;
  logic       hold;

  pbsc_register #(.N(5), .GATED(5'b11110)) u_regs (
    .clk       (clk),
    .rst_n     (rst_n),
    .d         (ff_d),
    .q         (ff_q),
    .en        (en),
    .en_latched(en_latched),
    .gclk      (gclk)
  );

  pg_cone u_cone (
    .b_q  (ff_q[1]),
    .c_q  (ff_q[2]),
    .d_q  (ff_q[3]),
    .e_q  (ff_q[4]),
    .g_out(cone_g),
    .b_out(cone_b)
  );

  // While reset is applied the domain is kept powered, so that the holders
  // take the cone's value for the cleared flip-flops.
  assign sleep = !en_latched && rst_n;

  footer_switch #(.W(2)) u_footer (
    .sleep     (sleep),
    .cells_out ({cone_b, cone_g}),
    .vgnd_ok   (vgnd_ok),
    .domain_out(domain_out)
  );

  assign hold = sleep | !vgnd_ok;

  holder #(.W(1)) u_hold_g (
    .hold(hold),
    .d   (domain_out[0]),
    .q   (held_g)
  );

  holder #(.W(1)) u_hold_b (
    .hold(hold),
    .d   (domain_out[1]),
    .q   (held_b)
  );

  // Always-on output gates.
  assign out_i = ff_q[0] ^ held_g;
  assign out_h = held_b & pi;
endmodule
