// tb_bsc_enable: exhaustive test of the XOR/OR clock-enable generator.
// Every combination of d and q for N = 4 is applied; the expected enable is
// worked out bit by bit (any position where d and q disagree).
`timescale 1ns / 1ps
module tb_bsc_enable;
  localparam int unsigned N = 4;
  logic [N-1:0] d, q;
  logic         en;
  int checks = 0, failures = 0;

  bsc_enable #(.N(N)) dut (.d(d), .q(q), .en(en));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        logic expect_en;
        d = N'(i);
        q = N'(j);
        #1;
        expect_en = 1'b0;
        for (int k = 0; k < N; k++)
          if (d[k] != q[k]) expect_en = 1'b1;
        checks++;
        if (en !== expect_en) begin
          failures++;
          $display("mismatch d=%b q=%b en=%b expected %b", d, q, en, expect_en);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
