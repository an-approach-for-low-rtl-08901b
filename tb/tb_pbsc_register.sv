// tb_pbsc_register: checks the partially clock-gated register.
// Two instances are driven with the same random data: the default one (bit 0
// on the free clock, bits 1..4 gated) and a fully gated BSC one (N = 4, all
// bits gated).  Their outputs are compared every cycle with a plain register
// modelled in the testbench, so gating must never lose or add an update.  The
// gated clock pulses are counted and compared with the number of cycles in
// which some gated bit had a new value.  Data is repeated often so that both
// gated and enabled cycles occur.
`timescale 1ns / 1ps
module tb_pbsc_register;
  logic       clk = 1'b0, rst_n = 1'b1;
  logic [4:0] d5, q5, ref5;
  logic [3:0] d4, q4, ref4;
  logic       en5, enl5, gclk5, en4, enl4, gclk4;
  int checks = 0, failures = 0;
  int pulses5 = 0, pulses4 = 0, need5 = 0, need4 = 0, cycles = 0;

  pbsc_register dut5 (.clk(clk), .rst_n(rst_n), .d(d5), .q(q5),
                      .en(en5), .en_latched(enl5), .gclk(gclk5));

  pbsc_register #(.N(4), .GATED(4'b1111)) dut4 (
    .clk(clk), .rst_n(rst_n), .d(d4), .q(q4),
    .en(en4), .en_latched(enl4), .gclk(gclk4));

  always #5 clk = ~clk;

  // Pulses during reset are not counted: the flip-flops ignore them.
  always @(posedge gclk5) if (rst_n) pulses5++;
  always @(posedge gclk4) if (rst_n) pulses4++;

  // Reference: ordinary registers without any gating.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref5 <= '0;
      ref4 <= '0;
    end else begin
      if (d5[4:1] != ref5[4:1]) need5++;
      if (d4 != ref4) need4++;
      ref5 <= d5;
      ref4 <= d4;
    end
  end

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d5 = '0;
    d4 = '0;
    #1  rst_n = 1'b0;
    #11 rst_n = 1'b1;
    checks++;
    if (q5 !== '0 || q4 !== '0) begin
      failures++;
      $display("not cleared by reset");
    end
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      #1;
      // Change the data in about one cycle of three.
      if ($urandom_range(0, 2) == 0) d5 = 5'($urandom);
      else                           d5[0] = 1'($urandom);  // ungated bit toggles freely
      if ($urandom_range(0, 2) == 0) d4 = 4'($urandom);
      @(posedge clk);
      #1;
      cycles++;
      checks += 2;
      if (q5 !== ref5) begin
        failures++;
        $display("%t PBSC q=%b expected %b", $time, q5, ref5);
      end
      if (q4 !== ref4) begin
        failures++;
        $display("%t BSC q=%b expected %b", $time, q4, ref4);
      end
    end
    checks += 2;
    if (pulses5 != need5) begin
      failures++;
      $display("PBSC gated pulses %0d, expected %0d", pulses5, need5);
    end
    if (pulses4 != need4) begin
      failures++;
      $display("BSC gated pulses %0d, expected %0d", pulses4, need4);
    end
    $display("cycles %0d: PBSC gated clock pulses %0d, BSC %0d", cycles, pulses5, pulses4);
    checks++;
    if (pulses5 == 0 || pulses5 >= cycles) begin
      failures++;
      $display("gating never happened or never enabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
