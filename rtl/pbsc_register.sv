// pbsc_register: register with partial bus-specific clock gating (PBSC).
//
// N flip-flops are split by the GATED mask.  The selected ones share a gated
// clock whose enable is the XOR comparison of their inputs with their outputs
// (bsc_enable) latched in a glitch-free gating cell (clock_gate).  The others
// are clocked by the free-running clock.  Gating only a subset keeps
// often-toggling bits, which would keep the enable high and only add
// comparator power, out of the group.  With every bit selected the circuit
// is plain bus-specific clock gating (BSC).
//
// Which bits to gate is chosen at design time from signal activity; here it is
// a parameter.  The default is the five-flip-flop example the design is built
// around: bit 0 (flip-flop A) on the free clock, bits 1..4 (B, C, D, E) gated.
//
// The asynchronous active-low reset to zero is this design's addition; it acts
// on all flip-flops directly, not through the gated clock.
//
// Interface: d/q are N bits; en is the raw enable, en_latched the latched one
// (the power-gated logic fed by the gated bits sleeps while it is 0), gclk the
// gated clock.
// Timing: a gated bit loads d on a rising clk edge only if some gated bit's d
// differed from its q in the cycle before; since an unchanged bit would load
// its own value, q always equals that of an ungated register.
`timescale 1ns / 1ps
module pbsc_register #(
  parameter int unsigned  N     = 5,
  parameter logic [N-1:0] GATED = 5'b11110
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  output logic         en,
  output logic         en_latched,
  output logic         gclk
);
  localparam int unsigned NG = $countones(GATED);

  // Gather the gated bits into a packed vector for the comparator.
  logic [NG-1:0] d_g, q_g;

  always_comb begin
    int unsigned j;
    j   = 0;
    d_g = '0;
    q_g = '0;
    for (int unsigned k = 0; k < N; k++) begin
      if (GATED[k]) begin
        d_g[j] = d[k];
        q_g[j] = q[k];
        j++;
      end
    end
  end

  bsc_enable #(.N(NG)) u_enable (
    .d (d_g),
    .q (q_g),
    .en(en)
  );

  clock_gate u_cg (
    .clk       (clk),
    .en        (en),
    .en_latched(en_latched),
    .gclk      (gclk)
  );

  for (genvar k = 0; k < N; k++) begin : g_ff
    logic r;
    if (GATED[k]) begin : g_gated
      always_ff @(posedge gclk or negedge rst_n) begin
        if (!rst_n) r <= 1'b0;
        else        r <= d[k];
      end
    end else begin : g_free
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) r <= 1'b0;
        else        r <= d[k];
      end
    end
    assign q[k] = r;
  end
endmodule
