// tb_pg_cone: exhaustive test of the power-gated logic cone.
// The expected outputs come from a truth table written out by hand:
// g is 1 exactly when none of (!B & C), (C & D), (D & !E) holds, and b = !E.
`timescale 1ns / 1ps
module tb_pg_cone;
  logic b_q, c_q, d_q, e_q, g_out, b_out;
  int checks = 0, failures = 0;
  // Index = {E, D, C, B}; bit set means g = 1.
  localparam logic [15:0] G_TABLE = 16'b0011_1011_0000_1011;

  pg_cone dut (.b_q(b_q), .c_q(c_q), .d_q(d_q), .e_q(e_q),
               .g_out(g_out), .b_out(b_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {e_q, d_q, c_q, b_q} = 4'(i);
      #1;
      checks += 2;
      if (g_out !== G_TABLE[i]) begin
        failures++;
        $display("EDCB=%b g=%b expected %b", 4'(i), g_out, G_TABLE[i]);
      end
      if (b_out !== !e_q) begin
        failures++;
        $display("EDCB=%b b=%b expected %b", 4'(i), b_out, !e_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
