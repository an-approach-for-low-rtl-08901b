// tb_footer_switch: checks the behavioural footer model.
// Expected: vgnd_ok falls T_SLEEP after sleep rises and rises T_WAKE after
// sleep falls; the domain outputs equal the cell outputs while powered and
// the floating value otherwise; a sleep pulse reversed before its delay ends
// leaves vgnd_ok where it was.
`timescale 1ns / 1ps
module tb_footer_switch;
  localparam int unsigned W = 2;
  logic         sleep;
  logic [W-1:0] cells_out, domain_out;
  logic         vgnd_ok;
  int checks = 0, failures = 0;

  footer_switch #(.W(W), .T_WAKE(2), .T_SLEEP(1), .FLOAT_VALUE(2'b11)) dut (
    .sleep(sleep), .cells_out(cells_out), .vgnd_ok(vgnd_ok), .domain_out(domain_out));

  task automatic expect_state(input logic ok, input string what);
    checks++;
    if (vgnd_ok !== ok || domain_out !== (ok ? cells_out : 2'b11)) begin
      failures++;
      $display("%t %s: vgnd_ok=%b domain_out=%b cells_out=%b", $time, what,
               vgnd_ok, domain_out, cells_out);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cells_out = 2'b00;
    sleep     = 1'b1;
    #5 expect_state(1'b0, "initially asleep");
    for (int i = 0; i < 50; i++) begin
      cells_out = 2'($urandom);
      sleep = 1'b0;
      #1.5 expect_state(1'b0, "still waking");
      #1   expect_state(1'b1, "awake");
      cells_out = 2'($urandom);
      #1   expect_state(1'b1, "awake, new value");
      sleep = 1'b1;
      #0.5 expect_state(1'b1, "before shut-off");
      #1   expect_state(1'b0, "shut off");
      // Short wake request: reversed before T_WAKE has passed.
      sleep = 1'b0;
      #1 sleep = 1'b1;
      #3 expect_state(1'b0, "short wake pulse ignored");
    end
    // Short sleep request while awake.
    sleep = 1'b0;
    #3 expect_state(1'b1, "awake again");
    sleep = 1'b1;
    #0.5 sleep = 1'b0;
    #3 expect_state(1'b1, "short sleep pulse ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
