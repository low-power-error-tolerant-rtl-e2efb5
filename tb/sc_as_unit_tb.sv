// sc_as_unit_tb: exhaustive self-checking test of sc_as_unit.
// Checks the AS unit: add = s ? a : b, sub = s ? a : ~b,
// for all 8 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module sc_as_unit_tb;
  logic a;
  logic b;
  logic s;
  logic add, exp_add;
  logic sub, exp_sub;
  int checks = 0, failures = 0;
  sc_as_unit dut (.a(a), .b(b), .s(s), .add(add), .sub(sub));
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
      exp_add = s ? a : b;
      checks++;
      if (add !== exp_add) begin
        failures++;
        if (failures < 10) $display("mismatch add: inputs %0h got %0h expected %0h", v, add, exp_add);
      end
      exp_sub = s ? a : ~b;
      checks++;
      if (sub !== exp_sub) begin
        failures++;
        if (failures < 10) $display("mismatch sub: inputs %0h got %0h expected %0h", v, sub, exp_sub);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
