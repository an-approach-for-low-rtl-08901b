// tb_cg_rtpg_top: end-to-end test of clock gating with run-time power gating.
// The top is used with its defaults.  Random data is applied to the five
// flip-flops and PI, with the gated bits changed in about one cycle of three
// so that the gated logic both works and sleeps.  A plain register and the
// cone's truth table, modelled here, give the expected outputs:
//   out_i = A ^ g(B..E), out_h = !E & PI, g = !((!B & C) | (C & D) | (D & !E)).
// Outputs are checked in both clock phases.  The testbench also checks that
// the gated clock pulses exactly in the cycles where B..E receive new data and
// that the domain is asleep in the high phase of every other cycle, and it
// counts each mechanism: gated cycles, enabled updates, sleep entries,
// wake-ups, and outputs kept by a holder while the domain drives floating
// values.  A mechanism that never occurs counts as a failure.  Each cycle of
// each gated flip-flop is also classed by whether its clock and its input
// toggled (I both, II clock only, III data only, IV neither); class III must
// never occur, since that would be an update the gating lost.
`timescale 1ns / 1ps
module tb_cg_rtpg_top;
  logic       clk = 1'b0, rst_n = 1'b1;
  logic [4:0] ff_d;
  logic       pi;
  logic       out_i, out_h, en, gclk, sleep, vgnd_ok;
  logic [4:0] refq;
  logic       updated;  // gated bits loaded at the last rising edge
  int checks = 0, failures = 0;
  int n_gated = 0, n_update = 0, n_sleep = 0, n_wake = 0, n_float_held = 0;
  int n_pulses = 0;
  // Per-cycle operation classes of the gated flip-flops B..E, as used for
  // flip-flop power estimation: I clock and data toggle, II only the clock,
  // III only the data, IV neither.
  int n_op[4] = '{0, 0, 0, 0};
  logic [4:0] d_prev;

  cg_rtpg_top dut (
    .clk(clk), .rst_n(rst_n), .ff_d(ff_d), .pi(pi),
    .out_i(out_i), .out_h(out_h), .en(en), .gclk(gclk),
    .sleep(sleep), .vgnd_ok(vgnd_ok));

  always #5 clk = ~clk;

  function automatic logic g_of(input logic [4:0] q);
    return !((!q[1] && q[2]) || (q[2] && q[3]) || (q[3] && !q[4]));
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      refq    <= '0;
      updated <= 1'b0;
    end else begin
      updated <= (ff_d[4:1] != refq[4:1]);
      refq    <= ff_d;
    end
  end

  always @(posedge gclk) if (rst_n) n_pulses++;
  always @(posedge sleep) n_sleep++;
  always @(posedge vgnd_ok) n_wake++;

  task automatic check_outputs(input string phase);
    logic exp_i, exp_h;
    exp_i = refq[0] ^ g_of(refq);
    exp_h = !refq[4] && pi;
    checks++;
    if (out_i !== exp_i || out_h !== exp_h) begin
      failures++;
      $display("%t %s: out_i=%b out_h=%b expected %b %b (q=%b sleep=%b vgnd_ok=%b)",
               $time, phase, out_i, out_h, exp_i, exp_h, refq, sleep, vgnd_ok);
    end
    // The holder is doing its job when the domain drives floating values
    // that differ from what the cone would compute.
    if (!vgnd_ok && dut.domain_out != {dut.cone_b, dut.cone_g}) n_float_held++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ff_d   = '0;
    pi     = 1'b0;
    d_prev = '0;
    #1  rst_n = 1'b0;
    #13 rst_n = 1'b1;
    for (int cyc = 0; cyc < 500; cyc++) begin
      @(negedge clk);
      #4 check_outputs("low phase");
      @(posedge clk);
      #1;
      checks++;
      if (gclk !== updated) begin
        failures++;
        $display("%t gclk=%b but gated bits updated=%b", $time, gclk, updated);
      end
      if (updated) n_update++;
      else         n_gated++;
      for (int k = 1; k <= 4; k++) begin
        n_op[{!gclk, ff_d[k] == d_prev[k]}]++;
      end
      d_prev = ff_d;
      #3;
      check_outputs("high phase");
      checks++;
      if (sleep !== !updated) begin
        failures++;
        $display("%t sleep=%b in the high phase, updated=%b", $time, sleep, updated);
      end
    end
    checks += 7;
    // A gated flip-flop must never see new data without a clock edge.
    if (n_op[2] != 0) begin failures++; $display("data change without clock"); end
    if (n_pulses != n_update) begin
      failures++;
      $display("gated clock pulses %0d, updates %0d", n_pulses, n_update);
    end
    if (n_gated == 0)      begin failures++; $display("clock never gated");        end
    if (n_update == 0)     begin failures++; $display("gated bits never updated"); end
    if (n_sleep == 0)      begin failures++; $display("domain never slept");       end
    if (n_wake == 0)       begin failures++; $display("domain never woke");        end
    if (n_float_held == 0) begin failures++; $display("holders never used");       end
    $display("cycles: gated %0d, updates %0d; sleeps %0d, wake-ups %0d; held over floating %0d",
             n_gated, n_update, n_sleep, n_wake, n_float_held);
    $display("gated flip-flop cycles: OP_I %0d, OP_II %0d, OP_III %0d, OP_IV %0d",
             n_op[0], n_op[1], n_op[2], n_op[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: new values 1 ns into each low phase.
  always @(negedge clk) begin
    if (rst_n) begin
      #1;
      if ($urandom_range(0, 2) == 0) ff_d[4:1] = 4'($urandom);
      ff_d[0] = 1'($urandom);
      pi      = 1'($urandom);
    end
  end
endmodule
