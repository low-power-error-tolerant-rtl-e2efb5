// cpmrf_and_nor_tb: exhaustive self-checking test of cpmrf_and_nor.
// Checks the AND-NOR pair against AND and NOR of its inputs,
// for all 4 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module cpmrf_and_nor_tb;
  logic in_a;
  logic in_b;
  logic out_and, exp_out_and;
  logic out_nor, exp_out_nor;
  int checks = 0, failures = 0;
  cpmrf_and_nor dut (.in_a(in_a), .in_b(in_b), .out_and(out_and), .out_nor(out_nor));
  initial begin
    #(64'd10 * 64'd14);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      in_a = 1'(v >> 0);
      in_b = 1'(v >> 1);
      #1;
      exp_out_and = in_a & in_b;
      checks++;
      if (out_and !== exp_out_and) begin
        failures++;
        if (failures < 10) $display("mismatch out_and: inputs %0h got %0h expected %0h", v, out_and, exp_out_and);
      end
      exp_out_nor = ~(in_a | in_b);
      checks++;
      if (out_nor !== exp_out_nor) begin
        failures++;
        if (failures < 10) $display("mismatch out_nor: inputs %0h got %0h expected %0h", v, out_nor, exp_out_nor);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
