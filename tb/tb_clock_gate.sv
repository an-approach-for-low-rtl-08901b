// tb_clock_gate: checks the latch-based clock gating cell.
// The enable is changed at random points in both clock phases.  Expected
// behaviour: every gated clock pulse is a full clock pulse that exists exactly
// when the enable was 1 at the end of the preceding low phase, and changes of
// the enable during the high phase never reach the gated clock.
`timescale 1ns / 1ps
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0;
  logic en_latched, gclk;
  int checks = 0, failures = 0;
  int pulses = 0, expected_pulses = 0, high_phase_changes = 0;
  logic en_at_edge;

  clock_gate dut (.clk(clk), .en(en), .en_latched(en_latched), .gclk(gclk));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count gated clock pulses independently.
  always @(posedge gclk) pulses++;

  // Any edge of gclk must coincide with an edge of clk.
  always @(gclk) begin
    checks++;
    if (gclk && !clk) begin
      failures++;
      $display("%t gclk high while clk low", $time);
    end
  end

  initial begin
    for (int cyc = 0; cyc < 200; cyc++) begin
      @(negedge clk);
      #($urandom_range(1, 3));
      en = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (en_latched !== en) begin
        failures++;
        $display("%t latch not transparent in low phase", $time);
      end
      @(posedge clk);
      en_at_edge = en;
      if (en_at_edge) expected_pulses++;
      #1;
      checks++;
      if (gclk !== en_at_edge) begin
        failures++;
        $display("%t gclk=%b expected %b", $time, gclk, en_at_edge);
      end
      // Change the enable in the middle of the high phase.
      #1 en = ~en;
      high_phase_changes++;
      #2;
      checks++;
      if (gclk !== en_at_edge || en_latched !== en_at_edge) begin
        failures++;
        $display("%t enable change leaked into the high phase", $time);
      end
    end
    @(negedge clk);
    checks++;
    if (pulses != expected_pulses) begin
      failures++;
      $display("pulses %0d expected %0d", pulses, expected_pulses);
    end
    $display("gated pulses %0d of 200 cycles, high-phase enable changes %0d", pulses, high_phase_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
