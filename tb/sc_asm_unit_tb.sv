// sc_asm_unit_tb: exhaustive self-checking test of sc_asm_unit.
// Checks the ASM unit: add = s ? m_a*c_x : m_b*c_y, sub = s ? m_a*c_y : -(m_b*c_x), bipolar products by XNOR,
// for all 32 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module sc_asm_unit_tb;
  logic m_a;
  logic m_b;
  logic c_x;
  logic c_y;
  logic s;
  logic add, exp_add;
  logic sub, exp_sub;
  int checks = 0, failures = 0;
  sc_asm_unit dut (.m_a(m_a), .m_b(m_b), .c_x(c_x), .c_y(c_y), .s(s), .add(add), .sub(sub));
  initial begin
    #(64'd10 * 64'd42);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 32; v++) begin
      m_a = 1'(v >> 0);
      m_b = 1'(v >> 1);
      c_x = 1'(v >> 2);
      c_y = 1'(v >> 3);
      s = 1'(v >> 4);
      #1;
      exp_add = s ? ~(m_a ^ c_x) : ~(m_b ^ c_y);
      checks++;
      if (add !== exp_add) begin
        failures++;
        if (failures < 10) $display("mismatch add: inputs %0h got %0h expected %0h", v, add, exp_add);
      end
      exp_sub = s ? ~(m_a ^ c_y) : (m_b ^ c_x);
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
