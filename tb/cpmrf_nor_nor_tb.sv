// cpmrf_nor_nor_tb: exhaustive self-checking test of cpmrf_nor_nor.
// Checks the NOR-NOR group against two NOR gates,
// for all 16 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module cpmrf_nor_nor_tb;
  logic a1;
  logic b1;
  logic a2;
  logic b2;
  logic y1, exp_y1;
  logic y2, exp_y2;
  int checks = 0, failures = 0;
  cpmrf_nor_nor dut (.a1(a1), .b1(b1), .a2(a2), .b2(b2), .y1(y1), .y2(y2));
  initial begin
    #(64'd10 * 64'd26);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      a1 = 1'(v >> 0);
      b1 = 1'(v >> 1);
      a2 = 1'(v >> 2);
      b2 = 1'(v >> 3);
      #1;
      exp_y1 = ~(a1 | b1);
      checks++;
      if (y1 !== exp_y1) begin
        failures++;
        if (failures < 10) $display("mismatch y1: inputs %0h got %0h expected %0h", v, y1, exp_y1);
      end
      exp_y2 = ~(a2 | b2);
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
