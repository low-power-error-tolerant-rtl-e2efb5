// cpmrf_cla8_tb: exhaustive self-checking test of cpmrf_cla8.
// Checks the 8-bit carry-lookahead adder, all 65536 operand pairs, against a + b,
// for all 65536 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module cpmrf_cla8_tb;
  logic [7:0] i_a;
  logic [7:0] i_b;
  logic [7:0] o_s, exp_o_s;
  logic o_c, exp_o_c;
  int checks = 0, failures = 0;
  cpmrf_cla8 dut (.i_a(i_a), .i_b(i_b), .o_s(o_s), .o_c(o_c));
  initial begin
    #(64'd10 * 64'd65546);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 65536; v++) begin
      i_a = 8'(v >> 0);
      i_b = 8'(v >> 8);
      #1;
      exp_o_s = 8'(i_a + i_b);
      checks++;
      if (o_s !== exp_o_s) begin
        failures++;
        if (failures < 10) $display("mismatch o_s: inputs %0h got %0h expected %0h", v, o_s, exp_o_s);
      end
      exp_o_c = 1'((9'(i_a) + 9'(i_b)) >> 8);
      checks++;
      if (o_c !== exp_o_c) begin
        failures++;
        if (failures < 10) $display("mismatch o_c: inputs %0h got %0h expected %0h", v, o_c, exp_o_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
