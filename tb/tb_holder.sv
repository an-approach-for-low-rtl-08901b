// tb_holder: checks that the holder passes its input while hold is 0 and
// keeps the last passed value, whatever its input does, while hold is 1.
`timescale 1ns / 1ps
module tb_holder;
  localparam int unsigned W = 4;
  logic         hold;
  logic [W-1:0] d, q, kept;
  int checks = 0, failures = 0;

  holder #(.W(W)) dut (.hold(hold), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hold = 1'b0;
    d    = '0;
    for (int i = 0; i < 300; i++) begin
      hold = 1'b0;
      d    = W'($urandom);
      #1;
      checks++;
      if (q !== d) begin
        failures++;
        $display("%t transparent: q=%h d=%h", $time, q, d);
      end
      kept = d;
      hold = 1'b1;
      #1;
      for (int j = 0; j < 3; j++) begin
        d = W'($urandom);
        #1;
        checks++;
        if (q !== kept) begin
          failures++;
          $display("%t holding: q=%h expected %h", $time, q, kept);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
