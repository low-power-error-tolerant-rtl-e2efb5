// mrf_nand_nor_group_tb: exhaustive self-checking test of mrf_nand_nor_group.
// Checks the NAND-NOR group against the valid-state table: y1 = NAND(a,s), y2 = NOR(b,s),
// for all 8 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module mrf_nand_nor_group_tb;
  logic a;
  logic b;
  logic s;
  logic y1, exp_y1;
  logic y2, exp_y2;
  int checks = 0, failures = 0;
  mrf_nand_nor_group dut (.a(a), .b(b), .s(s), .y1(y1), .y2(y2));
  initial begin
    #(64'd10 * 64'd18);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      a = 1'(v >> 0);
      b = 1'(v >> 1);
      s = 1'(v >> 2);
      #1;
      exp_y1 = ~(a & s);
      checks++;
      if (y1 !== exp_y1) begin
        failures++;
        if (failures < 10) $display("mismatch y1: inputs %0h got %0h expected %0h", v, y1, exp_y1);
      end
      exp_y2 = ~(b | s);
      checks++;
      if (y2 !== exp_y2) begin
        failures++;
        if (failures < 10) $display("mismatch y2: inputs %0h got %0h expected %0h", v, y2, exp_y2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
