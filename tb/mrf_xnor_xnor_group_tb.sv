// mrf_xnor_xnor_group_tb: exhaustive self-checking test of mrf_xnor_xnor_group.
// Checks the XNOR-XNOR group (stochastic multipliers) against two XNOR gates,
// for all 16 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module mrf_xnor_xnor_group_tb;
  logic p1;
  logic q1;
  logic p2;
  logic q2;
  logic y_a, exp_y_a;
  logic y_b, exp_y_b;
  int checks = 0, failures = 0;
  mrf_xnor_xnor_group dut (.p1(p1), .q1(q1), .p2(p2), .q2(q2), .y_a(y_a), .y_b(y_b));
  initial begin
    #(64'd10 * 64'd26);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      p1 = 1'(v >> 0);
      q1 = 1'(v >> 1);
      p2 = 1'(v >> 2);
      q2 = 1'(v >> 3);
      #1;
      exp_y_a = ~(p1 ^ q1);
      checks++;
      if (y_a !== exp_y_a) begin
        failures++;
        if (failures < 10) $display("mismatch y_a: inputs %0h got %0h expected %0h", v, y_a, exp_y_a);
      end
      exp_y_b = ~(p2 ^ q2);
      checks++;
      if (y_b !== exp_y_b) begin
        failures++;
        if (failures < 10) $display("mismatch y_b: inputs %0h got %0h expected %0h", v, y_b, exp_y_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
