// cpmrf_and_xor_tb: exhaustive self-checking test of cpmrf_and_xor.
// Checks the AND-XOR half adder against carry, sum and XNOR,
// for all 4 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module cpmrf_and_xor_tb;
  logic a;
  logic b;
  logic carry, exp_carry;
  logic sum, exp_sum;
  logic sum_n, exp_sum_n;
  int checks = 0, failures = 0;
  cpmrf_and_xor dut (.a(a), .b(b), .carry(carry), .sum(sum), .sum_n(sum_n));
  initial begin
    #(64'd10 * 64'd14);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      a = 1'(v >> 0);
      b = 1'(v >> 1);
      #1;
      exp_carry = a & b;
      checks++;
      if (carry !== exp_carry) begin
        failures++;
        if (failures < 10) $display("mismatch carry: inputs %0h got %0h expected %0h", v, carry, exp_carry);
      end
      exp_sum = a ^ b;
      checks++;
      if (sum !== exp_sum) begin
        failures++;
        if (failures < 10) $display("mismatch sum: inputs %0h got %0h expected %0h", v, sum, exp_sum);
      end
      exp_sum_n = ~(a ^ b);
      checks++;
      if (sum_n !== exp_sum_n) begin
        failures++;
        if (failures < 10) $display("mismatch sum_n: inputs %0h got %0h expected %0h", v, sum_n, exp_sum_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
