// pg_cone: power-gated combinational logic of the five-flip-flop example.
//
// This is the part of the example circuit that is reached by forward
// traversal from the gated flip-flops B, C, D and E and from nothing else.
// Since its inputs cannot change while their clock is gated, it does only
// redundant work in that time and is put to sleep by the footer switch.
// Its two outputs that leave the power-gated region (g and b) pass through
// holders.
//
// The gate letters a-g and the wiring follow the example; the gate functions
// are this design's choice because only the letters are given:
//   a = ~B, b = ~E, c = a & C, d = C & D, e = D & b, f = c | d | e, g = ~f.
//
// Interface: the four gated flip-flop outputs in; g_out and b_out out.
// Timing: purely combinational.
`timescale 1ns / 1ps
module pg_cone (
  input  logic b_q,
  input  logic c_q,
  input  logic d_q,
  input  logic e_q,
  output logic g_out,
  output logic b_out
);
  logic a_n, b_n, c_n, d_n, e_n, f_n;

  always_comb begin
    a_n   = ~b_q;
    b_n   = ~e_q;
    c_n   = a_n & c_q;
    d_n   = c_q & d_q;
    e_n   = d_q & b_n;
    f_n   = c_n | d_n | e_n;
    g_out = ~f_n;
    b_out = b_n;
  end
endmodule
